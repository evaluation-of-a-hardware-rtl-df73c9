// tb_svp_reg_file: directed and random checks of the register file with
// state bits: reset to EMPTY, data writes, suspending several threads on one
// register (links requested between them), the wake-up list handed out by
// the write that fills it, load bookkeeping kept across a suspend, clears,
// and random writes against a reference model.
module tb_svp_reg_file;
  import svp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ra_t        rd_addr [3];
  word_t      rd_data [3];
  reg_state_e rd_state [3];
  logic       wr_en;
  wr_op_e     wr_op;
  ra_t        wr_addr;
  word_t      wr_data;
  tid_t       wr_tid;
  logic       wake_valid, link_valid;
  tid_t       wake_head, wake_tail, link_from, link_to;
  int checks = 0, failures = 0;

  svp_reg_file #(.NRD(3)) dut (.*);

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

  // apply one write at the next edge; outputs are checked before the edge
  task automatic wr(wr_op_e op, ra_t a, word_t d, tid_t t);
    @(negedge clk);
    wr_en = 1; wr_op = op; wr_addr = a; wr_data = d; wr_tid = t;
    #1;
  endtask
  task automatic idle();
    @(negedge clk);
    wr_en = 0;
    #1;
  endtask
  function automatic reg_state_e st(ra_t a);
    return dut.st[a];
  endfunction

  word_t      mv [1024];
  reg_state_e ms [1024];

  initial begin
    nf_reg_t nf;
    wr_en = 0; wr_op = WR_DATA; wr_addr = '0; wr_data = '0; wr_tid = '0;
    for (int i = 0; i < 3; i++) rd_addr[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    idle();
    for (int i = 0; i < 1024; i += 97) chk(st(ra_t'(i)) == RS_EMPTY, "reset state");

    wr(WR_DATA, 10, 64'hDEAD_BEEF, 0);
    chk(!wake_valid, "no wake on empty");
    idle();
    rd_addr[0] = 10; #1;
    chk(rd_state[0] == RS_FULL && rd_data[0] == 64'hDEAD_BEEF, "data write");

    // three threads suspend on register 20
    wr(WR_SUSPEND, 20, 0, 5);
    chk(!link_valid, "first suspend needs no link");
    wr(WR_SUSPEND, 20, 0, 9);
    chk(link_valid && link_from == 5 && link_to == 9, "second suspend links 5->9");
    wr(WR_SUSPEND, 20, 0, 12);
    chk(link_valid && link_from == 9 && link_to == 12, "third suspend links 9->12");
    wr(WR_DATA, 20, 64'd77, 0);
    chk(wake_valid && wake_head == 5 && wake_tail == 12, "wake list 5..12");
    idle();
    rd_addr[1] = 20; #1;
    chk(rd_state[1] == RS_FULL && rd_data[1] == 64'd77, "filled after wake");

    // outstanding load, then a thread suspends on it
    nf = '0; nf.ld_off = 6'd52; nf.ld_long = 1'b1; nf.ld_next = 10'd300; nf.ld_next_v = 1'b1;
    wr(WR_LOAD, 30, word_t'(nf), 0);
    idle();
    rd_addr[2] = 30; #1;
    chk(rd_state[2] == RS_PENDING, "load pending");
    wr(WR_SUSPEND, 30, 0, 7);
    idle();
    nf = nf_reg_t'(rd_data[2]);
    chk(rd_state[2] == RS_WAITING && nf.ld_off == 52 && nf.ld_long && nf.ld_next == 300 && nf.ld_next_v &&
        nf.wait_head == 7 && nf.wait_tail == 7, "load info kept under suspend");
    wr(WR_DATA, 30, 64'd5, 0);
    chk(wake_valid && wake_head == 7 && wake_tail == 7, "load result wakes thread 7");
    wr(WR_CLEAR, 30, 0, 0);
    idle();
    chk(rd_state[2] == RS_EMPTY, "clear");

    // random data writes and clears against a model
    for (int i = 0; i < 1024; i++) ms[i] = st(ra_t'(i));
    for (int i = 0; i < 1024; i++) mv[i] = dut.val[i];
    for (int n = 0; n < 3000; n++) begin
      automatic ra_t a = ra_t'($urandom);
      if ($urandom % 4 == 0) begin
        wr(WR_CLEAR, a, 0, 0); ms[a] = RS_EMPTY;
      end else begin
        automatic word_t d = {$urandom, $urandom};
        wr(WR_DATA, a, d, 0); ms[a] = RS_FULL; mv[a] = d;
      end
      idle();
      rd_addr[0] = ra_t'($urandom); rd_addr[1] = a; #1;
      chk(rd_state[0] == ms[rd_addr[0]] && (ms[rd_addr[0]] != RS_FULL || rd_data[0] == mv[rd_addr[0]]), "random read");
      chk(rd_state[1] == ms[a] && (ms[a] != RS_FULL || rd_data[1] == mv[a]), "random read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
