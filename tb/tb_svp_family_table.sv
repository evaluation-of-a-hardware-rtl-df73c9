// tb_svp_family_table: runs one family (indices 3,5,..,11; one shared, two
// locals; two register contexts) through the creation process with the
// testbench acting as thread table, register file and pipeline. Checks: each
// created thread's entry (PC, family, slot, first/last), the shared register
// cleared (not for the last thread), the index written into the first
// local, threads reaching the Ready List in order, never more than two
// threads holding a context, contexts released in order and only after the
// successor terminated, a context with an outstanding read held back
// (hold_v) until the read completes, and completion only after the
// outstanding write has been acknowledged.
module tb_svp_family_table;
  import svp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    cr_v, cr_ack, fr_v, fr_pop, tt_wr, rw_v, rw_grant, rdy_v, term_v, rel_v;
  logic    wis_v, wack_v, done_v, ris_v, rack_v, hold_v;
  fid_t    ris_fid, rack_fid;
  slot_t   ris_slot, rack_slot;
  addr_t   cr_pc;
  word_t   cr_start, cr_step, cr_limit, rw_data;
  window_t cr_win, rd_win;
  fid_t    cr_fid, rd_fid, term_fid, wis_fid, wack_fid, done_fid;
  tid_t    fr_tid, tt_tid, rdy_tid, rel_tid;
  thread_t tt_entry;
  wr_op_e  rw_op;
  ra_t     rw_addr;
  slot_t   term_slot;
  int checks = 0, failures = 0;

  svp_family_table dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  localparam int NTH = 5;
  tid_t    tid_of [NTH];
  thread_t ent_of [NTH];
  int      ncreated = 0, nready = 0, nterm = 0, nrel = 0, ndone = 0;
  bit      termd [NTH];
  bit      cleared [NTH];
  bit      indexed [NTH];
  tid_t    pool [$];
  fid_t    fam;
  bit      write_acked = 0;
  bit      read_acked = 0, hold_seen = 0;

  initial begin
    cr_v = 0; fr_v = 0; fr_tid = '0; rw_grant = 0; term_v = 0; term_fid = '0; term_slot = '0;
    wis_v = 0; wis_fid = '0; wack_v = 0; wack_fid = '0; rd_fid = '0;
    ris_v = 0; ris_fid = '0; ris_slot = '0; rack_v = 0; rack_fid = '0; rack_slot = '0;
    cr_pc = 64'h2000; cr_start = 3; cr_step = 2; cr_limit = 12;
    cr_win = '0; cr_win.n_shrd = 1; cr_win.n_locl = 2; cr_win.ctxbase = 100; cr_win.nblk = 2;
    cr_win.pshbase = 500;
    for (int i = 0; i < 8; i++) pool.push_back(tid_t'(40 + i));
    for (int i = 0; i < NTH; i++) begin termd[i] = 0; cleared[i] = 0; indexed[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cr_v = 1;
    #1;
    chk(cr_ack, "family allocated");
    fam = cr_fid;
    @(negedge clk);
    cr_v = 0;
    rd_fid = fam;
    #1;
    chk(rd_win.ctxbase == 100 && rd_win.nblk == 2, "window stored");

    for (int c = 0; c < 400 && ndone == 0; c++) begin
      // inputs for this cycle
      fr_v = pool.size() > 0;
      fr_tid = fr_v ? pool[0] : '0;
      rw_grant = ($urandom % 3) != 0;
      term_v = 0; wis_v = 0; wack_v = 0; ris_v = 0; rack_v = 0;
      // terminate a random ready, not yet terminated thread (not in order)
      begin
        automatic int k = $urandom % NTH;
        if (k < nready && !termd[k] && ($urandom % 2)) begin
          term_v = 1; term_fid = fam; term_slot = ent_of[k].slot; termd[k] = 1; nterm++;
          if (k == 2) begin wis_v = 1; wis_fid = fam; end   // thread 2 issues a store
          if (k == 1) begin                                 // thread 1 ends with a load in flight
            ris_v = 1; ris_fid = fam; ris_slot = ent_of[k].slot;
          end
        end
      end
      if (hold_seen && !read_acked && ($urandom % 4 == 0)) begin
        rack_v = 1; rack_fid = fam; rack_slot = ent_of[1].slot; read_acked = 1;
      end
      if (nterm == NTH && !write_acked && ($urandom % 4 == 0)) begin
        wack_v = 1; wack_fid = fam; write_acked = 1;
      end
      #1;
      // observe
      if (fr_pop) begin
        chk(tt_wr && tt_tid == pool[0], "entry written for popped thread");
        chk(ncreated < NTH, "not too many threads");
        tid_of[ncreated] = tt_tid; ent_of[ncreated] = tt_entry;
        chk(tt_entry.pc == 64'h2000 && tt_entry.fid == fam && tt_entry.slot == slot_t'(ncreated % 2) &&
            tt_entry.first == (ncreated == 0) && tt_entry.last == (ncreated == NTH - 1),
            $sformatf("thread %0d entry", ncreated));
        void'(pool.pop_front());
        ncreated++;
        chk(ncreated - nrel <= 2, "at most nblk threads hold contexts");
      end
      if (rw_v && rw_grant) begin
        automatic int k = ncreated - 1;
        automatic int ctx = 100 + (k % 2) * 3;
        if (rw_op == WR_CLEAR) begin
          chk(rw_addr == ra_t'(ctx) && k != NTH - 1, $sformatf("shared cleared in own context k=%0d addr=%0d", k, rw_addr));
          cleared[k] = 1;
        end else begin
          chk(rw_op == WR_DATA && rw_addr == ra_t'(ctx + 1) && rw_data == word_t'(3 + 2 * k), "index in first local");
          indexed[k] = 1;
        end
      end
      if (rdy_v) begin
        chk(rdy_tid == tid_of[nready], "ready in creation order");
        chk(indexed[nready] && (cleared[nready] || nready == NTH - 1), "registers set before ready");
        nready++;
      end
      if (hold_v) begin
        chk(nrel == 1 && termd[1] && termd[2] && (!read_acked || rack_v), "hold only for the context with a read in flight");
        hold_seen = 1;
      end
      if (rel_v) begin
        chk(rel_tid == tid_of[nrel], "release in creation order");
        if (nrel == 1) chk(read_acked, "context released only after its read completed");
        chk(termd[nrel] && (nrel == NTH - 1 || termd[nrel + 1]), "released after successor terminated");
        pool.push_back(rel_tid);
        nrel++;
      end
      if (done_v) begin
        chk(done_fid == fam && nrel == NTH && write_acked, "completion after all released and write acked");
        ndone++;
      end
      @(negedge clk);
    end
    chk(ndone == 1, "family completed");
    chk(hold_seen, "a release was held back by an outstanding read");
    chk(ncreated == NTH && nrel == NTH, "all threads created and released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
