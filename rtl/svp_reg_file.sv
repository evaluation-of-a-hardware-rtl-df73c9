// svp_reg_file: register file whose registers carry synchronisation state.
//
// Every register has a 2-bit state (EMPTY, PENDING, WAITING, FULL) next to
// its 64-bit value. A register that is not FULL uses its value field for
// bookkeeping (svp_pkg::nf_reg_t): the head and tail of the list of threads
// suspended on it and the details of an outstanding load. This is how a
// consumer thread suspends on a channel or a load result simply by reading
// its register, and is woken when the producer writes it.
//
// Interface: NRD combinational read ports (value and state), one write port
// taking one of four operations (svp_pkg::wr_op_e), applied at the clock edge:
//   WR_DATA    value becomes FULL; if threads were suspended on it, their
//              list is handed out on wake_* in the same cycle so the caller
//              can append it to the Ready List.
//   WR_CLEAR   register becomes EMPTY.
//   WR_SUSPEND thread wr_tid joins the suspended list. If the list already
//              existed, link_* asks the thread table to chain the old tail
//              to the new thread (the list links live in the thread table).
//   WR_LOAD    records an outstanding load (fields of wr_data as nf_reg_t):
//              state becomes PENDING, or stays WAITING with its list kept.
// All states reset to EMPTY; values are not reset.
// The state set and the use of the value field follow the description of
// the core; the encodings and the single write port are this design's own.
module svp_reg_file
  import svp_pkg::*;
#(
  parameter int unsigned N   = NREGS,
  parameter int unsigned NRD = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ra_t        rd_addr  [NRD],
  output word_t      rd_data  [NRD],
  output reg_state_e rd_state [NRD],
  input  logic       wr_en,
  input  wr_op_e     wr_op,
  input  ra_t        wr_addr,
  input  word_t      wr_data,
  input  tid_t       wr_tid,
  output logic       wake_valid,
  output tid_t       wake_head,
  output tid_t       wake_tail,
  output logic       link_valid,
  output tid_t       link_from,
  output tid_t       link_to
);

  word_t      val [N];
  reg_state_e st  [N];

  always_comb begin
    for (int i = 0; i < NRD; i++) begin
      rd_data[i]  = val[rd_addr[i]];
      rd_state[i] = st[rd_addr[i]];
    end
  end

  nf_reg_t    cur_nf, new_nf, in_nf;
  assign in_nf = nf_reg_t'(wr_data);
  reg_state_e cur_st;
  assign cur_nf = nf_reg_t'(val[wr_addr]);
  assign cur_st = st[wr_addr];

  // Wake and link outputs are combinational results of the write being done.
  always_comb begin
    wake_valid = wr_en && wr_op == WR_DATA && cur_st == RS_WAITING;
    wake_head  = cur_nf.wait_head;
    wake_tail  = cur_nf.wait_tail;
    link_valid = wr_en && wr_op == WR_SUSPEND && cur_st == RS_WAITING;
    link_from  = cur_nf.wait_tail;
    link_to    = wr_tid;
  end

  always_comb begin
    new_nf = cur_nf;
    unique case (wr_op)
      WR_SUSPEND: begin
        if (cur_st != RS_WAITING) new_nf.wait_head = wr_tid;
        new_nf.wait_tail = wr_tid;
      end
      WR_LOAD: begin
        new_nf.ld_fid    = in_nf.ld_fid;
        new_nf.ld_slot   = in_nf.ld_slot;
        new_nf.ld_off    = in_nf.ld_off;
        new_nf.ld_long   = in_nf.ld_long;
        new_nf.ld_next   = in_nf.ld_next;
        new_nf.ld_next_v = in_nf.ld_next_v;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) st[i] <= RS_EMPTY;
    end else if (wr_en) begin
      unique case (wr_op)
        WR_DATA:    st[wr_addr] <= RS_FULL;
        WR_CLEAR:   st[wr_addr] <= RS_EMPTY;
        WR_SUSPEND: st[wr_addr] <= RS_WAITING;
        WR_LOAD:    st[wr_addr] <= (cur_st == RS_WAITING) ? RS_WAITING : RS_PENDING;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_op != WR_CLEAR)
      val[wr_addr] <= (wr_op == WR_DATA) ? wr_data : word_t'(new_nf);
  end

  // A suspend only makes sense on a register that is not FULL.
  a_no_suspend_on_full: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en && wr_op == WR_SUSPEND |-> cur_st != RS_FULL);

endmodule
