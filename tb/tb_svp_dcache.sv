// tb_svp_dcache: directed test of decoupled loads: three misses to one line
// form a register list (each new register links to the previous head), one
// line read is requested, and after the fill the walker writes every
// register with its own word (the testbench plays the register file, holding
// the load records and granting writes on random cycles). Then: load hit,
// write-through store with its tagged memory write, the updated word read
// back, and the one-entry store buffer refusing a second store.
module tb_svp_dcache;
  import svp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     ld_v, ld_long, ld_commit, ld_hit, ld_miss_ok;
  addr_t    ld_addr;
  ra_t      ld_dst;
  word_t    ld_data;
  nf_reg_t  ld_nf;
  logic     st_commit, st_ready;
  addr_t    st_addr;
  word_t    st_data;
  fid_t     st_fid;
  logic     fill_v;
  line_t    fill_line;
  logic [LINE_BITS-1:0] fill_data;
  logic     wk_v, wk_grant;
  ra_t      wk_addr;
  word_t    wk_data;
  nf_reg_t  wk_nf;
  logic     req_v, req_ack;
  mem_req_t req;
  int checks = 0, failures = 0;

  svp_dcache dut (.*);

  // register-file stand-in
  nf_reg_t rec [1024];
  word_t   got [1024];
  logic    full [1024];
  assign wk_nf = rec[wk_addr];

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
    ld_v = 0; ld_commit = 0; st_commit = 0; fill_v = 0; req_ack = 0; wk_grant = 0;
  endtask

  task automatic load(addr_t a, ra_t dst, output logic hit, miss_ok, output word_t d, output nf_reg_t nf,
                      input logic lng = 1'b0);
    @(negedge clk);
    quiet();
    ld_v = 1; ld_addr = a; ld_dst = dst; ld_long = lng;
    #1;
    hit = ld_hit; miss_ok = ld_miss_ok; d = ld_data; nf = ld_nf;
    ld_commit = 1;
    if (miss_ok) rec[dst] = ld_nf;
    @(negedge clk);
    quiet();
  endtask

  initial begin
    logic hit, mok;
    word_t d;
    nf_reg_t nf;
    logic [LINE_BITS-1:0] line;
    mem_req_t r;
    line_t ln;
    int nwr;
    quiet();
    ld_addr = '0; ld_long = 0; ld_dst = '0; st_addr = '0; st_data = '0; st_fid = '0;
    fill_line = '0; fill_data = '0;
    for (int i = 0; i < 1024; i++) begin rec[i] = '0; full[i] = 0; got[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    load(64'h4008, 100, hit, mok, d, nf);
    chk(!hit && mok && !nf.ld_next_v && nf.ld_off == 6'd8 && !nf.ld_long, "first miss");
    load(64'h4030, 101, hit, mok, d, nf);
    chk(!hit && mok && nf.ld_next_v && nf.ld_next == 100 && nf.ld_off == 6'd48, "second miss links to 100");
    load(64'h4000, 102, hit, mok, d, nf);
    chk(!hit && mok && nf.ld_next_v && nf.ld_next == 101 && nf.ld_off == 6'd0, "third miss links to 101");
    load(64'h403C, 105, hit, mok, d, nf, 1'b1);
    chk(!hit && mok && nf.ld_next_v && nf.ld_next == 102 && nf.ld_off == 6'd60 && nf.ld_long,
        "longword miss links to 102 and records offset and size");

    @(negedge clk); #1;
    chk(req_v && req.tag.kind == TAG_DREAD && req.addr == 64'h4000, "one line read requested");
    r = req;
    ln = line_t'(req.tag.index);
    req_ack = 1;
    @(negedge clk); quiet(); #1;
    chk(!req_v, "no second read for the same line");

    for (int i = 0; i < 16; i++) line[32*i +: 32] = $urandom;
    line[511] = 1'b1;          // negative longwords for the sign extension
    line[64*2+63] = 1'b1;
    @(negedge clk);
    fill_v = 1; fill_line = ln; fill_data = line;
    @(negedge clk); quiet();
    nwr = 0;
    for (int c = 0; c < 40; c++) begin
      #1;
      if (wk_v && ($urandom % 3 != 0)) begin
        wk_grant = 1;
        got[wk_addr] = wk_data; full[wk_addr] = 1; nwr++;
      end
      @(negedge clk); quiet();
    end
    chk(nwr == 4, $sformatf("walker wrote %0d registers", nwr));
    chk(full[105] && got[105] == {{32{1'b1}}, line[480 +: 32]}, "r105 gets longword 15 sign-extended");
    chk(full[100] && got[100] == line[64*1 +: 64], "r100 gets word 1");
    chk(full[101] && got[101] == line[64*6 +: 64], "r101 gets word 6");
    chk(full[102] && got[102] == line[64*0 +: 64], "r102 gets word 0");

    load(64'h4010, 103, hit, mok, d, nf);
    chk(hit && d == line[64*2 +: 64], "load hit");
    load(64'h4014, 106, hit, mok, d, nf, 1'b1);
    chk(hit && d == {{32{1'b1}}, line[64*2+32 +: 32]}, "longword load hit, sign-extended");
    load(64'h4010, 107, hit, mok, d, nf, 1'b1);
    chk(hit && d == {{32{line[64*2+31]}}, line[64*2 +: 32]}, "low longword load hit");

    @(negedge clk); #1;
    chk(st_ready, "store buffer free");
    st_commit = 1; st_addr = 64'h4010; st_data = 64'hABCD; st_fid = 5'd9;
    @(negedge clk); quiet(); #1;
    chk(!st_ready, "store buffer full");
    chk(req_v && req.tag.kind == TAG_WRITE && req.tag.index == 9 && req.addr == 64'h4010 &&
        req.wdata == 64'hABCD, "tagged memory write");
    load(64'h4010, 104, hit, mok, d, nf);
    chk(hit && d == 64'hABCD, "store updated the present line");
    @(negedge clk); req_ack = 1;
    @(negedge clk); quiet(); #1;
    chk(st_ready && !req_v, "store buffer drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
