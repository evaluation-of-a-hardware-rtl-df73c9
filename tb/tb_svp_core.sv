// tb_svp_core: end-to-end test of one microthreaded core at its full size.
//
// Five families run concurrently against a random-latency, out-of-order
// memory model, each an SVP program in the core's Alpha subset:
//   IP  : linear inner product, one thread per element, the running sum
//         carried through a shared channel (NIP elements)
//   FIB : the Fibonacci family (threads 2..9, two shared channels,
//         body straddling two cache lines), result 55
//   PS  : linear in-place prefix sum with stores (NPS elements)
//   LOOP: a loop with a backward branch in each of 4 threads
//   LAST: each thread loads the upper longword of its element (LDL,
//         sign-extended) into its outgoing shared register and ends at
//         once, so contexts are released only when the loads come back;
//         the parent receives the last one (NLS elements)
// Expected results are computed here from the inputs. The test also counts
// the core's event pulses and fails if any mechanism (switch on SWCH, END,
// end of line and branch; suspend and wake; I-cache hit/miss/join/fill;
// D-cache hit/miss/join; stores; port stalls; creation; context release;
// a release held back by an outstanding read; completion) never happened.
module tb_svp_core;
  import svp_pkg::*;

  localparam int NIP = 100;
  localparam int NPS = 64;
  localparam int NLS = 16;
  localparam longint WATCHDOG = 200000;

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
  svp_mem_model u_mem (.clk, .rst_n, .mem_req_v, .mem_req, .mem_req_ready, .mem_rsp_v, .mem_rsp);

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

  // ---- instruction encoding (Alpha formats) ----
  function automatic logic [31:0] opr(logic [5:0] op, logic [6:0] fn, logic [4:0] ra, rb, rc);
    return {op, ra, rb, 3'b000, 1'b0, fn, rc};
  endfunction
  function automatic logic [31:0] opl(logic [5:0] op, logic [6:0] fn, logic [4:0] ra, logic [7:0] lit, logic [4:0] rc);
    return {op, ra, lit, 1'b1, fn, rc};
  endfunction
  function automatic logic [31:0] mfmt(logic [5:0] op, logic [4:0] ra, rb, logic [15:0] d);
    return {op, ra, rb, d};
  endfunction
  function automatic logic [31:0] bfmt(logic [5:0] op, logic [4:0] ra, logic [20:0] d);
    return {op, ra, d};
  endfunction

  // Write instruction word w (1..15) of the line at 'line' with annotation an.
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

  int n_done = 0;
  logic [NFAMILIES-1:0] done_seen = '0;

  // ---- event counters ----
  int n_ev [20];
  string ev_name [20] = '{"issue", "sw_swch", "sw_end", "sw_eol", "sw_branch", "suspend", "wake",
                          "ic_hit", "ic_miss", "ic_join", "ic_fill", "dc_hit", "dc_miss", "dc_join",
                          "store", "stall", "create", "freed", "rd_hold", "sync"};
  // Pulses are sampled shortly before the rising edge that acts on them.
  always begin
    @(negedge clk);
    #2;
    if (rst_n) begin
      logic [19:0] b;
      b = ev;
      for (int i = 0; i < 20; i++) n_ev[i] += int'(b[19 - i]);
      if (done_v) begin
        n_done++;
        done_seen[done_fid] = 1'b1;
      end
    end
  end


  initial begin
    #(WATCHDOG * 10);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(ra_t r, word_t v);
    @(negedge clk);
    hw_v = 1'b1; hw_addr = r; hw_data = v;
    #2;
    while (!hw_grant) begin @(negedge clk); #2; end
    @(negedge clk);
    hw_v = 1'b0;
  endtask

  task automatic create(addr_t pc, word_t start, word_t step, word_t limit, window_t w, output fid_t f);
    @(negedge clk);
    cr_v = 1'b1; cr_pc = pc; cr_start = start; cr_step = step; cr_limit = limit; cr_win = w;
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

  localparam addr_t P_IP = 64'h1000, P_FIB0 = 64'h1040, P_FIB1 = 64'h1080,
                    P_PS = 64'h10C0, P_LOOP = 64'h1100, P_LS = 64'h1140;
  localparam addr_t A_A = 64'h4000, A_B = 64'h6000, A_C = 64'h8000, A_D = 64'hA000;

  word_t a [NIP], b [NIP], c [NPS], d [NLS];
  word_t exp_ip, exp_ps [NPS];
  fid_t  f_ip, f_fib, f_ps, f_loop, f_ls;
  longint t0, t_end;

  initial begin
    cr_v = 1'b0; hw_v = 1'b0; hr_addr = '0; cr_pc = '0; cr_start = '0; cr_step = '0;
    cr_limit = '0; cr_win = '0; hw_addr = '0; hw_data = '0;
    for (int i = 0; i < int'(u_mem.MEMQ); i++) u_mem.mem[i] = '0;

    // IP: r0=a r1=b (globals), r2 sum out (shared), r3 index r4 r5 (locals), r6 sum in
    put(P_IP, 1, opr(6'h10, 7'h32, 5'd3, 5'd0, 5'd4), AN_CONTINUE);   // S8ADDQ r3,r0,r4
    put(P_IP, 2, opr(6'h10, 7'h32, 5'd3, 5'd1, 5'd5), AN_CONTINUE);   // S8ADDQ r3,r1,r5
    put(P_IP, 3, mfmt(6'h29, 5'd4, 5'd4, 16'd0), AN_CONTINUE);        // LDQ r4,0(r4)
    put(P_IP, 4, mfmt(6'h29, 5'd5, 5'd5, 16'd0), AN_CONTINUE);        // LDQ r5,0(r5)
    put(P_IP, 5, opr(6'h13, 7'h20, 5'd4, 5'd5, 5'd4), AN_SWCH);       // MULQ r4,r5,r4
    put(P_IP, 6, opr(6'h10, 7'h20, 5'd6, 5'd4, 5'd2), AN_END);        // ADDQ r6,r4,r2
    // FIB: r0 r1 shareds, r2 r3 dependents; body crosses a line boundary
    put(P_FIB0, 15, opr(6'h10, 7'h20, 5'd2, 5'd3, 5'd0), AN_CONTINUE); // ADDQ r2,r3,r0
    put(P_FIB1, 1, opr(6'h11, 7'h20, 5'd31, 5'd2, 5'd1), AN_END);      // BIS r31,r2,r1
    // PS: r0=c (global), r1 sum out, r2 index r3 r4 (locals), r5 sum in
    put(P_PS, 1, opr(6'h10, 7'h32, 5'd2, 5'd0, 5'd3), AN_CONTINUE);   // S8ADDQ r2,r0,r3
    put(P_PS, 2, mfmt(6'h29, 5'd4, 5'd3, 16'd0), AN_CONTINUE);        // LDQ r4,0(r3)
    put(P_PS, 3, opr(6'h10, 7'h20, 5'd5, 5'd4, 5'd4), AN_SWCH);       // ADDQ r5,r4,r4
    put(P_PS, 4, mfmt(6'h2D, 5'd4, 5'd3, 16'd0), AN_CONTINUE);        // STQ r4,0(r3)
    put(P_PS, 5, opr(6'h11, 7'h20, 5'd31, 5'd4, 5'd1), AN_END);       // BIS r31,r4,r1
    // LOOP: r0 out, r1 index r2 counter r3 acc (locals), r4 in
    put(P_LOOP, 1, mfmt(6'h08, 5'd2, 5'd31, 16'd10), AN_CONTINUE);    // LDA r2,10(r31)
    put(P_LOOP, 2, opr(6'h11, 7'h20, 5'd31, 5'd31, 5'd3), AN_CONTINUE); // BIS r31,r31,r3
    put(P_LOOP, 3, opr(6'h10, 7'h20, 5'd3, 5'd2, 5'd3), AN_CONTINUE); // ADDQ r3,r2,r3
    put(P_LOOP, 4, opl(6'h10, 7'h29, 5'd2, 8'd1, 5'd2), AN_CONTINUE); // SUBQ r2,#1,r2
    put(P_LOOP, 5, bfmt(6'h3D, 5'd2, -21'sd3), AN_SWCH);              // BNE r2,w3
    put(P_LOOP, 6, opr(6'h10, 7'h20, 5'd3, 5'd4, 5'd0), AN_END);      // ADDQ r3,r4,r0
    // LAST: r0=d (global), r1 out (shared), r2 index r3 (locals), r4 in (unused)
    put(P_LS, 1, opr(6'h10, 7'h32, 5'd2, 5'd0, 5'd3), AN_CONTINUE);   // S8ADDQ r2,r0,r3
    put(P_LS, 2, mfmt(6'h28, 5'd1, 5'd3, 16'd4), AN_END);             // LDL r1,4(r3)

    exp_ip = '0;
    for (int i = 0; i < NIP; i++) begin
      a[i] = word_t'($urandom % 1000); b[i] = word_t'($urandom % 1000);
      u_mem.mem[(A_A >> 3) + i] = a[i];
      u_mem.mem[(A_B >> 3) + i] = b[i];
      exp_ip += a[i] * b[i];
    end
    for (int i = 0; i < NPS; i++) begin
      c[i] = word_t'($urandom % 100000);
      u_mem.mem[(A_C >> 3) + i] = c[i];
      exp_ps[i] = (i == 0) ? c[i] : exp_ps[i-1] + c[i];
    end

    for (int i = 0; i < NLS; i++) begin
      d[i] = {$urandom, $urandom};
      if (i == NLS - 1) d[i][63] = 1'b1;   // negative: checks the sign extension
      u_mem.mem[(A_D >> 3) + i] = d[i];
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // parent registers: globals and initial shared values
    host_write(ra_t'(900), A_A);
    host_write(ra_t'(901), A_B);
    host_write(ra_t'(910), 64'd0);
    host_write(ra_t'(920), 64'd1);
    host_write(ra_t'(921), 64'd1);
    host_write(ra_t'(930), A_C);
    host_write(ra_t'(931), 64'd0);
    host_write(ra_t'(940), 64'd7);
    host_write(ra_t'(950), A_D);

    t0 = cyc;
    create(P_IP,   0, 1, NIP, mkwin(2, 1, 3, 900, 910, 0, 8), f_ip);
    create(P_FIB0 + 60, 2, 1, 10, mkwin(0, 2, 0, 0, 920, 64, 2), f_fib);
    create(P_PS,   0, 1, NPS, mkwin(1, 1, 3, 930, 931, 128, 8), f_ps);
    create(P_LOOP, 0, 1, 4,   mkwin(0, 1, 3, 0, 940, 192, 4), f_loop);
    create(P_LS,   0, 1, NLS, mkwin(1, 1, 2, 950, 951, 224, 2), f_ls);

    wait (done_seen[f_ip] && done_seen[f_fib] && done_seen[f_ps] && done_seen[f_loop] &&
          done_seen[f_ls]);
    t_end = cyc;
    @(negedge clk);

    hr_addr = ra_t'(910); #1;
    check(hr_state == RS_FULL && hr_data == exp_ip, $sformatf("inner product %0d expected %0d", hr_data, exp_ip));
    hr_addr = ra_t'(920); #1;
    check(hr_state == RS_FULL && hr_data == 64'd55, $sformatf("fibonacci f1 %0d expected 55", hr_data));
    hr_addr = ra_t'(921); #1;
    check(hr_data == 64'd34, $sformatf("fibonacci f2 %0d expected 34", hr_data));
    hr_addr = ra_t'(931); #1;
    check(hr_data == exp_ps[NPS-1], $sformatf("prefix total %0d expected %0d", hr_data, exp_ps[NPS-1]));
    hr_addr = ra_t'(940); #1;
    check(hr_data == 64'd227, $sformatf("loop result %0d expected 227", hr_data));
    hr_addr = ra_t'(951); #1;
    check(hr_state == RS_FULL && hr_data == {{32{d[NLS-1][63]}}, d[NLS-1][63:32]},
          $sformatf("last element %0h expected %0h", hr_data, {{32{d[NLS-1][63]}}, d[NLS-1][63:32]}));
    for (int i = 0; i < NPS; i++)
      check(u_mem.mem[(A_C >> 3) + i] == exp_ps[i], $sformatf("prefix b[%0d]", i));
    check(n_done == 5, "five completions");
    check(n_ev[2] == NIP + 8 + NPS + 4 + NLS, $sformatf("END count %0d", n_ev[2]));
    check(n_ev[16] == NIP + 8 + NPS + 4 + NLS, $sformatf("create count %0d", n_ev[16]));
    check(n_ev[17] == NIP + 8 + NPS + 4 + NLS, $sformatf("release count %0d", n_ev[17]));
    check(n_ev[14] == NPS, $sformatf("store count %0d", n_ev[14]));
    // each LOOP thread takes its backward branch 9 times and falls through once
    check(n_ev[4] == 4 * 10, $sformatf("branch switches %0d", n_ev[4]));
    for (int i = 0; i < 20; i++) begin
      $display("  %-10s %0d", ev_name[i], n_ev[i]);
      check(n_ev[i] > 0, $sformatf("mechanism %s never happened", ev_name[i]));
    end
    $display("cycles from first create to last completion: %0d, instructions %0d", t_end - t0, n_ev[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
