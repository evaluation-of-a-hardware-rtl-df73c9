// tb_svp_workloads: the linear inner product and the linear prefix sum at
// their evaluation size of 65,536 elements, run one after the other on one
// full-size core against the random-latency memory model.
//
// Both are single families of N threads with one shared channel carrying
// the running sum from thread to thread:
//   IP : thread i loads a[i] and b[i], multiplies and adds the incoming sum
//   PS : thread i loads c[i], adds the incoming sum and stores it back in
//        place (c[i] becomes the sum of c[0..i])
// They use integer arithmetic (MULQ, ADDQ) where the evaluated kernels use
// floating point. The data lives only in the memory model, as it would
// off chip. The testbench checks the results, the number of threads that
// terminated, every stored element, and that each run finishes within
// 16 cycles per thread; it prints cycles, instructions and instructions per
// cycle for each run.
module tb_svp_workloads;
  import svp_pkg::*;

  localparam int N = 65536;
  localparam int unsigned MEMQ = 1 << 18;           // 2 MB of memory
  localparam longint WATCHDOG = 8000000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     cr_v, cr_ack, done_v, hw_v, hw_grant;
  addr_t    cr_pc;
  word_t    cr_start, cr_step, cr_limit, hw_data, hr_data;
  window_t  cr_win;
  fid_t     cr_fid, done_fid;
  ra_t      hw_addr, hr_addr;
  reg_state_e hr_state;
  logic     mem_req_v, mem_req_ready, mem_rsp_v;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  core_ev_t ev;

  svp_core dut (.*);
  svp_mem_model #(.MEMQ(MEMQ)) u_mem (.clk, .rst_n, .mem_req_v, .mem_req, .mem_req_ready,
                                      .mem_rsp_v, .mem_rsp);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(WATCHDOG * 10);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- instruction encoding (Alpha formats) ----
  function automatic logic [31:0] opr(logic [5:0] op, logic [6:0] fn, logic [4:0] ra, rb, rc);
    return {op, ra, rb, 3'b000, 1'b0, fn, rc};
  endfunction
  function automatic logic [31:0] mfmt(logic [5:0] op, logic [4:0] ra, rb, logic [15:0] d);
    return {op, ra, rb, d};
  endfunction

  // Instruction word w (1..15) of the line at 'line', annotation an.
  task automatic put(addr_t line, int w, logic [31:0] ins, annot_e an);
    addr_t q0 = line >> 3;
    logic [63:0] q;
    q = u_mem.mem[q0 + w / 2];
    q[32*(w%2) +: 32] = ins;
    u_mem.mem[q0 + w / 2] = q;
    q = u_mem.mem[q0];
    q[2*(w-1) + 2 +: 2] = an;
    u_mem.mem[q0] = q;
  endtask

  // ---- counters ----
  longint n_issue = 0, n_end = 0;
  int     n_done = 0;
  fid_t   last_done;
  always begin
    @(negedge clk);
    #2;
    if (rst_n) begin
      n_issue += longint'(ev.issue);
      n_end   += longint'(ev.sw_end);
      if (done_v) begin n_done++; last_done = done_fid; end
    end
  end

  task automatic host_write(ra_t r, word_t v);
    @(negedge clk);
    hw_v = 1'b1; hw_addr = r; hw_data = v;
    #2;
    while (!hw_grant) begin @(negedge clk); #2; end
    @(negedge clk);
    hw_v = 1'b0;
  endtask

  task automatic create(addr_t pc, word_t limit, window_t w, output fid_t f);
    @(negedge clk);
    cr_v = 1'b1; cr_pc = pc; cr_start = '0; cr_step = 64'd1; cr_limit = limit; cr_win = w;
    #2;
    while (!cr_ack) begin @(negedge clk); #2; end
    f = cr_fid;
    @(negedge clk);
    cr_v = 1'b0;
  endtask

  function automatic window_t mkwin(int g, s, l, int gb, psb, ctx, nb);
    window_t w;
    w.n_glob = 5'(g); w.n_shrd = 5'(s); w.n_locl = 5'(l);
    w.gbase = ra_t'(gb); w.pshbase = ra_t'(psb); w.ctxbase = ra_t'(ctx); w.nblk = (SLOT_W+1)'(nb);
    return w;
  endfunction

  // Runs one family to completion; returns its cycles and instructions.
  task automatic run(string name, addr_t pc, window_t w, output longint cycles, output longint instrs);
    fid_t   f;
    longint c0, i0, e0;
    int     d0;
    c0 = cyc; i0 = n_issue; e0 = n_end; d0 = n_done;
    create(pc, N, w, f);
    wait (n_done == d0 + 1);
    cycles = cyc - c0;
    instrs = n_issue - i0;
    check(last_done == f, {name, ": completion of the created family"});
    check(n_end - e0 == N, $sformatf("%s: %0d threads terminated, expected %0d", name, n_end - e0, N));
    check(cycles <= 16 * longint'(N), $sformatf("%s: %0d cycles, more than 16 per thread", name, cycles));
    $display("%s: %0d threads, %0d cycles, %0d instructions, IPC %0.3f",
             name, N, cycles, instrs, real'(instrs) / real'(cycles));
  endtask

  localparam addr_t P_IP = 64'h1000, P_PS = 64'h1040;
  localparam addr_t A_A = 64'h40000, A_B = 64'hC0000, A_C = 64'h140000;

  word_t exp_ip, run_sum, ip_res;
  longint cy, ins;
  int nbad;

  initial begin
    cr_v = 1'b0; hw_v = 1'b0; hr_addr = '0; cr_pc = '0; cr_start = '0; cr_step = '0;
    cr_limit = '0; cr_win = '0; hw_addr = '0; hw_data = '0;
    for (int i = 0; i < int'(MEMQ); i++) u_mem.mem[i] = '0;

    // IP: r0=a r1=b (globals), r2 sum out (shared), r3 index r4 r5 (locals), r6 sum in
    put(P_IP, 1, opr(6'h10, 7'h32, 5'd3, 5'd0, 5'd4), AN_CONTINUE);   // S8ADDQ r3,r0,r4
    put(P_IP, 2, opr(6'h10, 7'h32, 5'd3, 5'd1, 5'd5), AN_CONTINUE);   // S8ADDQ r3,r1,r5
    put(P_IP, 3, mfmt(6'h29, 5'd4, 5'd4, 16'd0), AN_CONTINUE);        // LDQ r4,0(r4)
    put(P_IP, 4, mfmt(6'h29, 5'd5, 5'd5, 16'd0), AN_CONTINUE);        // LDQ r5,0(r5)
    put(P_IP, 5, opr(6'h13, 7'h20, 5'd4, 5'd5, 5'd4), AN_SWCH);       // MULQ r4,r5,r4
    put(P_IP, 6, opr(6'h10, 7'h20, 5'd6, 5'd4, 5'd2), AN_END);        // ADDQ r6,r4,r2
    // PS: r0=c (global), r1 sum out, r2 index r3 r4 (locals), r5 sum in
    put(P_PS, 1, opr(6'h10, 7'h32, 5'd2, 5'd0, 5'd3), AN_CONTINUE);   // S8ADDQ r2,r0,r3
    put(P_PS, 2, mfmt(6'h29, 5'd4, 5'd3, 16'd0), AN_CONTINUE);        // LDQ r4,0(r3)
    put(P_PS, 3, opr(6'h10, 7'h20, 5'd5, 5'd4, 5'd4), AN_SWCH);       // ADDQ r5,r4,r4
    put(P_PS, 4, mfmt(6'h2D, 5'd4, 5'd3, 16'd0), AN_CONTINUE);        // STQ r4,0(r3)
    put(P_PS, 5, opr(6'h11, 7'h20, 5'd31, 5'd4, 5'd1), AN_END);       // BIS r31,r4,r1

    // data: a[i] = i mod 1000 + 1, b[i] = 3i mod 997, c[i] = i xor 0x5a5
    exp_ip = '0;
    for (int i = 0; i < N; i++) begin
      u_mem.mem[(A_A >> 3) + i] = word_t'(i % 1000 + 1);
      u_mem.mem[(A_B >> 3) + i] = word_t'((3 * i) % 997);
      u_mem.mem[(A_C >> 3) + i] = word_t'(i ^ 32'h5a5);
      exp_ip += word_t'(i % 1000 + 1) * word_t'((3 * i) % 997);
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    host_write(ra_t'(900), A_A);
    host_write(ra_t'(901), A_B);
    host_write(ra_t'(910), 64'd0);
    host_write(ra_t'(930), A_C);
    host_write(ra_t'(931), 64'd0);

    run("inner product", P_IP, mkwin(2, 1, 3, 900, 910, 0, MAX_BLOCK), cy, ins);
    hr_addr = ra_t'(910); #1;
    ip_res = hr_data;
    check(hr_state == RS_FULL && ip_res == exp_ip,
          $sformatf("inner product %0d expected %0d", ip_res, exp_ip));

    run("prefix sum", P_PS, mkwin(1, 1, 3, 930, 931, 0, MAX_BLOCK), cy, ins);
    // the write-through stores are acknowledged before completion, so
    // memory holds the final array now
    run_sum = '0; nbad = 0;
    for (int i = 0; i < N; i++) begin
      run_sum += word_t'(i ^ 32'h5a5);
      if (u_mem.mem[(A_C >> 3) + i] != run_sum) nbad++;
    end
    check(nbad == 0, $sformatf("prefix sum: %0d wrong elements", nbad));
    hr_addr = ra_t'(931); #1;
    check(hr_state == RS_FULL && hr_data == run_sum,
          $sformatf("prefix total %0d expected %0d", hr_data, run_sum));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
