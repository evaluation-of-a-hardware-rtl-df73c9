// svp_family_table: the Family Table, the thread creation process and the
// release of thread contexts.
//
// A create request allocates a family entry holding the thread body's PC,
// the index sequence (start, step, limit; limit exclusive, positive step),
// the register window (svp_pkg::window_t: numbers of globals, shareds and
// locals, where the parent's globals and shareds are, and the block of nblk
// register contexts given to the family), the count of threads created so
// far, an outstanding-write counter and, per register context, a counter of
// outstanding reads (loads that missed and have not yet been written back).
//
// Thread creation runs on its own, one thread at a time, as long as a family
// has threads left, a free thread-table entry exists and fewer than nblk of
// the family's threads hold a context. For each thread it
//   1. takes an entry from the free list and writes it (PC, family, context
//      slot = creation order modulo nblk, first/last flags),
//   2. clears the thread's shared registers to EMPTY (not for the last
//      thread, whose shareds are the parent's),
//   3. writes the thread index into the first local register (if L > 0),
//   4. puts the thread on the Ready List.
// Register writes go through a request/grant port (rw_*).
//
// A terminated thread's context (and thread-table entry) is reused only
// after its successor has terminated too, because the successor reads the
// thread's shareds; contexts are released in creation order. So nblk must be
// at least 2. A context with a read outstanding is not released either: the
// late load would otherwise land in the next thread's registers (hold_v
// flags a release held back for that reason only). A family is complete (done_v, entry freed) when all its threads
// were created and released and no write is outstanding. The parent is
// outside this core: create and completion are ports of the core.
// Fields and the independent creation process follow the description of the
// core; the release rule and everything about sizes of the fields are this
// design's own choices.
module svp_family_table
  import svp_pkg::*;
#(
  parameter int unsigned NF = NFAMILIES
) (
  input  logic    clk,
  input  logic    rst_n,
  // create
  input  logic    cr_v,
  input  addr_t   cr_pc,
  input  word_t   cr_start,
  input  word_t   cr_step,
  input  word_t   cr_limit,
  input  window_t cr_win,
  output logic    cr_ack,
  output fid_t    cr_fid,
  // free thread entries (head of the thread table's free list)
  input  logic    fr_v,
  input  tid_t    fr_tid,
  output logic    fr_pop,
  output logic    tt_wr,
  output tid_t    tt_tid,
  output thread_t tt_entry,
  // register writes
  output logic    rw_v,
  output wr_op_e  rw_op,
  output ra_t     rw_addr,
  output word_t   rw_data,
  input  logic    rw_grant,
  // new thread to the Ready List
  output logic    rdy_v,
  output tid_t    rdy_tid,
  // window lookup for the pipeline
  input  fid_t    rd_fid,
  output window_t rd_win,
  // thread termination and release
  input  logic    term_v,
  input  fid_t    term_fid,
  input  slot_t   term_slot,
  output logic    rel_v,
  output tid_t    rel_tid,
  // outstanding writes
  input  logic    wis_v,
  input  fid_t    wis_fid,
  input  logic    wack_v,
  input  fid_t    wack_fid,
  // outstanding reads, per register context
  input  logic    ris_v,
  input  fid_t    ris_fid,
  input  slot_t   ris_slot,
  input  logic    rack_v,
  input  fid_t    rack_fid,
  input  slot_t   rack_slot,
  output logic    hold_v,
  // family completion (sync)
  output logic    done_v,
  output fid_t    done_fid
);

  typedef enum logic [1:0] {CS_IDLE, CS_CLEAR, CS_INDEX, CS_PUSH} cstate_e;

  logic            act   [NF];
  addr_t           pc    [NF];
  word_t           cur   [NF], step [NF], limit [NF];
  window_t         win   [NF];
  logic            allc  [NF];
  // created / released counts, kept modulo 2^(TID_W+1): only their
  // difference (at most nblk) and equality are used, so families of any
  // length work
  logic [TID_W:0]  ncr   [NF], nrel [NF];
  logic            fst   [NF];   // no thread created yet
  slot_t           cslot [NF], rslot [NF];
  tid_t            stid  [NF][MAX_BLOCK];
  logic            term  [NF][MAX_BLOCK];
  logic [15:0]     outw  [NF];
  logic [5:0]      outr  [NF][MAX_BLOCK];

  cstate_e c_st;
  fid_t    c_fid;
  tid_t    c_tid;
  slot_t   c_slot;
  word_t   c_idx;
  logic [4:0] c_k;

  assign rd_win = win[rd_fid];

  // ---- selection ----
  logic    fa_v;  fid_t fa;       // free family entry
  logic    cf_v;  fid_t cf;       // family to create a thread for
  logic    rl_v;  fid_t rl;       // family with a releasable thread
  logic    dn_v;  fid_t dn;       // completed family
  always_comb begin
    fa_v = 1'b0; fa = '0; cf_v = 1'b0; cf = '0;
    rl_v = 1'b0; rl = '0; dn_v = 1'b0; dn = '0; hold_v = 1'b0;
    for (int f = NF - 1; f >= 0; f--) begin
      automatic slot_t nx = (rslot[f] == slot_t'(win[f].nblk - 1'b1)) ? '0 : slot_t'(rslot[f] + 1'b1);
      automatic logic  is_last = allc[f] && (nrel[f] + 1'b1 == ncr[f]);
      if (!act[f]) begin fa_v = 1'b1; fa = fid_t'(f); end
      if (act[f] && !allc[f] && (ncr[f] - nrel[f]) < (TID_W+1)'(win[f].nblk)) begin
        cf_v = 1'b1; cf = fid_t'(f);
      end
      if (act[f] && nrel[f] != ncr[f] && term[f][rslot[f]] &&
          (is_last || ((TID_W+1)'(ncr[f] - nrel[f]) > (TID_W+1)'(1) && term[f][nx]))) begin
        if (outr[f][rslot[f]] == '0) begin rl_v = 1'b1; rl = fid_t'(f); end
        else hold_v = 1'b1;
      end
      if (act[f] && allc[f] && nrel[f] == ncr[f] && outw[f] == '0) begin
        dn_v = 1'b1; dn = fid_t'(f);
      end
    end
  end

  assign cr_ack   = cr_v && fa_v;
  assign cr_fid   = fa;
  assign done_v   = dn_v;
  assign done_fid = dn;
  assign rel_v    = rl_v;
  assign rel_tid  = stid[rl][rslot[rl]];

  // ---- creation process outputs ----
  ra_t ctx;
  always_comb begin
    ctx = win[c_fid].ctxbase +
          ra_t'(c_slot) * (ra_t'(win[c_fid].n_shrd) + ra_t'(win[c_fid].n_locl));
    fr_pop = (c_st == CS_IDLE) && cf_v && fr_v;
    tt_wr  = fr_pop;
    tt_tid = fr_tid;
    tt_entry.pc    = pc[cf];
    tt_entry.fid   = cf;
    tt_entry.slot  = cslot[cf];
    tt_entry.first = fst[cf];
    tt_entry.last  = ($signed(cur[cf] + step[cf]) >= $signed(limit[cf]));
    tt_entry.cline = '0;
    rw_v    = (c_st == CS_CLEAR) || (c_st == CS_INDEX);
    rw_op   = (c_st == CS_CLEAR) ? WR_CLEAR : WR_DATA;
    rw_addr = (c_st == CS_CLEAR) ? ctx + ra_t'(c_k) : ctx + ra_t'(win[c_fid].n_shrd);
    rw_data = c_idx;
    rdy_v   = (c_st == CS_PUSH);
    rdy_tid = c_tid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < NF; f++) begin
        act[f] <= 1'b0;
        for (int s = 0; s < MAX_BLOCK; s++) term[f][s] <= 1'b0;
      end
      c_st <= CS_IDLE;
    end else begin
      // family allocation
      if (cr_ack) begin
        act[fa]   <= 1'b1;
        pc[fa]    <= cr_pc;
        cur[fa]   <= cr_start;
        step[fa]  <= cr_step;
        limit[fa] <= cr_limit;
        win[fa]   <= cr_win;
        allc[fa]  <= ($signed(cr_start) >= $signed(cr_limit));
        ncr[fa]   <= '0;
        fst[fa]   <= 1'b1;
        nrel[fa]  <= '0;
        cslot[fa] <= '0;
        rslot[fa] <= '0;
        outw[fa]  <= '0;
        for (int s = 0; s < MAX_BLOCK; s++) outr[fa][s] <= '0;
      end
      // creation process
      unique case (c_st)
        CS_IDLE: if (fr_pop) begin
          c_fid  <= cf;
          c_tid  <= fr_tid;
          c_slot <= cslot[cf];
          c_idx  <= cur[cf];
          c_k    <= '0;
          stid[cf][cslot[cf]] <= fr_tid;
          ncr[cf]   <= ncr[cf] + 1'b1;
          fst[cf]   <= 1'b0;
          cur[cf]   <= cur[cf] + step[cf];
          cslot[cf] <= (cslot[cf] == slot_t'(win[cf].nblk - 1'b1)) ? '0 : slot_t'(cslot[cf] + 1'b1);
          if (tt_entry.last) allc[cf] <= 1'b1;
          if (win[cf].n_shrd != '0 && !tt_entry.last) c_st <= CS_CLEAR;
          else if (win[cf].n_locl != '0)              c_st <= CS_INDEX;
          else                                        c_st <= CS_PUSH;
        end
        CS_CLEAR: if (rw_grant) begin
          c_k <= c_k + 1'b1;
          if (c_k + 1'b1 == win[c_fid].n_shrd)
            c_st <= (win[c_fid].n_locl != '0) ? CS_INDEX : CS_PUSH;
        end
        CS_INDEX: if (rw_grant) c_st <= CS_PUSH;
        CS_PUSH:  c_st <= CS_IDLE;
      endcase
      // termination and release
      if (term_v) term[term_fid][term_slot] <= 1'b1;
      if (rl_v) begin
        term[rl][rslot[rl]] <= 1'b0;
        nrel[rl]  <= nrel[rl] + 1'b1;
        rslot[rl] <= (rslot[rl] == slot_t'(win[rl].nblk - 1'b1)) ? '0 : slot_t'(rslot[rl] + 1'b1);
      end
      // outstanding writes
      for (int f = 0; f < NF; f++) begin
        automatic logic inc = wis_v && wis_fid == fid_t'(f);
        automatic logic dec = wack_v && wack_fid == fid_t'(f);
        if (!(cr_ack && fa == fid_t'(f))) outw[f] <= outw[f] + 16'(inc) - 16'(dec);
      end
      // outstanding reads (a family being allocated has none)
      for (int f = 0; f < NF; f++)
        for (int s = 0; s < MAX_BLOCK; s++) begin
          automatic logic inc = ris_v && ris_fid == fid_t'(f) && ris_slot == slot_t'(s);
          automatic logic dec = rack_v && rack_fid == fid_t'(f) && rack_slot == slot_t'(s);
          if (!(cr_ack && fa == fid_t'(f))) outr[f][s] <= outr[f][s] + 6'(inc) - 6'(dec);
        end
      if (dn_v) act[dn] <= 1'b0;
    end
  end

  a_block_at_least_two: assert property (@(posedge clk) disable iff (!rst_n)
    cr_ack |-> cr_win.nblk >= 2);

endmodule
