// tb_svp_icache: directed test of the I-cache thread lists and counters:
// a miss starts a line read and a thread list, further threads for the line
// in flight join the list (links 1->2->3), the fill hands the whole list to
// the Active List and makes the data readable, a later check hits; when all
// four ways of a set are referenced a miss cannot be accepted, and becomes
// possible once the threads of one line have been released.
module tb_svp_icache;
  import svp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  chk_v, chk_accept, chk_hit, chk_link_v;
  tid_t  chk_tid, chk_link_from, chk_link_to;
  addr_t chk_pc;
  line_t chk_line;
  logic  rel_v;
  line_t rel_line;
  logic  fill_v;
  line_t fill_line;
  logic [LINE_BITS-1:0] fill_data, rd_data;
  logic  act_v;
  tid_t  act_h, act_t;
  logic  req_v, req_ack;
  addr_t req_addr;
  line_t req_line, rd_line;
  int checks = 0, failures = 0;

  svp_icache dut (.*);

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

  task automatic quiet();
    chk_v = 0; rel_v = 0; fill_v = 0; req_ack = 0;
  endtask

  // present a thread for its check; sample outputs before the edge
  task automatic check_thread(tid_t t, addr_t pc, output logic acc, hit, lk, output line_t ln, output tid_t lf);
    @(negedge clk);
    quiet();
    chk_v = 1; chk_tid = t; chk_pc = pc;
    #1;
    acc = chk_accept; hit = chk_hit; lk = chk_link_v; ln = chk_line; lf = chk_link_from;
    @(negedge clk);
    quiet();
  endtask

  task automatic take_req(addr_t exp_addr, line_t exp_line);
    @(negedge clk);
    quiet();
    #1;
    chk(req_v && req_addr == exp_addr && req_line == exp_line,
        $sformatf("request %h line %0d (got %0d %h %0d)", exp_addr, exp_line, req_v, req_addr, req_line));
    req_ack = 1;
    @(negedge clk);
    quiet();
    #1;
  endtask

  task automatic fill(line_t l, logic [LINE_BITS-1:0] d, output logic av, output tid_t h, t);
    @(negedge clk);
    quiet();
    fill_v = 1; fill_line = l; fill_data = d;
    #1;
    av = act_v; h = act_h; t = act_t;
    @(negedge clk);
    quiet();
  endtask

  initial begin
    logic acc, hit, lk, av;
    line_t ln, l0, lw [4];
    tid_t lf, h, t;
    logic [LINE_BITS-1:0] d;
    quiet();
    chk_tid = '0; chk_pc = '0; rel_line = '0; fill_line = '0; fill_data = '0; rd_line = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    check_thread(1, 64'h1000, acc, hit, lk, l0, lf);
    chk(acc && !hit && !lk, "first miss accepted");
    take_req(64'h1000, l0);
    check_thread(2, 64'h1010, acc, hit, lk, ln, lf);
    chk(acc && !hit && lk && lf == 1 && ln == l0, "second thread joins line in flight");
    check_thread(3, 64'h1004, acc, hit, lk, ln, lf);
    chk(acc && !hit && lk && lf == 2, "third thread joins");
    chk(!req_v, "one read per line");
    for (int i = 0; i < LINE_BITS / 32; i++) d[32*i +: 32] = $urandom;
    fill(l0, d, av, h, t);
    chk(av && h == 1 && t == 3, "fill hands list 1..3 to Active List");
    rd_line = l0; #1;
    chk(rd_data == d, "line data readable");
    check_thread(4, 64'h1020, acc, hit, lk, ln, lf);
    chk(acc && hit && ln == l0, "hit after fill");

    // fill the other three ways of set 0, each with one referencing thread
    lw[0] = l0;
    for (int w = 1; w < 4; w++) begin
      check_thread(tid_t'(10 + w), 64'h1000 + 64'(w) * 64'h100, acc, hit, lk, lw[w], lf);
      chk(acc && !hit && lw[w] != l0, "miss in set 0 takes a free way");
      take_req(64'h1000 + 64'(w) * 64'h100, lw[w]);
      fill(lw[w], d, av, h, t);
      chk(av && h == tid_t'(10 + w), "single-thread list activated");
    end
    check_thread(20, 64'h1400, acc, hit, lk, ln, lf);
    chk(!acc, "no way free: check refused");
    // thread 12 leaves the pipeline: its line has no more references
    @(negedge clk); quiet(); rel_v = 1; rel_line = lw[2];
    @(negedge clk); quiet();
    check_thread(20, 64'h1400, acc, hit, lk, ln, lf);
    chk(acc && !hit && ln == lw[2], "released line replaced");
    take_req(64'h1400, lw[2]);
    // the old line is gone
    check_thread(21, 64'h1200, acc, hit, lk, ln, lf);
    chk(!acc, "evicted line misses and no way is free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
