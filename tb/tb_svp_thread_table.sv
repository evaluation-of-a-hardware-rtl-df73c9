// tb_svp_thread_table: checks the linked-list thread queues against queue
// models: reset free list order, random traffic where each cycle threads
// move free -> Ready -> Active -> free/Ready with pops and appends in the
// same cycle, a whole chain (built with the link ports, as a register's
// suspended list is) spliced onto a list in one cycle, and entry writes.
module tb_svp_thread_table;
  import svp_pkg::*;

  localparam int NT = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    pop [3], head_v [3];
  tid_t    head [3];
  logic    app_v [3][3];
  tid_t    app_h [3][3], app_t [3][3];
  logic    link_v [2];
  tid_t    link_from [2], link_to [2];
  tid_t    rd_tid [2];
  thread_t rd_entry [2];
  logic    wr_init, wr_pc, wr_cline;
  tid_t    wr_init_tid, wr_pc_tid, wr_cline_tid;
  thread_t wr_init_entry;
  addr_t   wr_pc_val;
  line_t   wr_cline_val;
  int checks = 0, failures = 0;

  svp_thread_table #(.NT(NT)) dut (.*);

  tid_t mq [3][$];

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

  task automatic clear_in();
    for (int l = 0; l < 3; l++) begin
      pop[l] = 0;
      for (int a = 0; a < 3; a++) begin app_v[l][a] = 0; app_h[l][a] = '0; app_t[l][a] = '0; end
    end
    for (int k = 0; k < 2; k++) begin link_v[k] = 0; link_from[k] = '0; link_to[k] = '0; end
    wr_init = 0; wr_pc = 0; wr_cline = 0;
  endtask

  task automatic compare();
    for (int l = 0; l < 3; l++) begin
      chk(head_v[l] == (mq[l].size() > 0), $sformatf("list %0d valid", l));
      if (mq[l].size() > 0) chk(head[l] == mq[l][0], $sformatf("list %0d head %0d exp %0d", l, head[l], mq[l][0]));
    end
  endtask

  initial begin
    clear_in();
    rd_tid[0] = '0; rd_tid[1] = '0;
    wr_init_tid = '0; wr_init_entry = '0; wr_pc_tid = '0; wr_pc_val = '0;
    wr_cline_tid = '0; wr_cline_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NT; i++) mq[0].push_back(tid_t'(i));
    @(negedge clk);
    compare();

    // random traffic
    for (int n = 0; n < 2000; n++) begin
      tid_t x, y, z;
      bit px, py, pz;
      @(negedge clk);
      clear_in();
      px = head_v[0] && ($urandom % 2);
      py = head_v[1] && ($urandom % 2);
      pz = head_v[2] && ($urandom % 2);
      x = head[0]; y = head[1]; z = head[2];
      if (px) begin pop[0] = 1; void'(mq[0].pop_front()); end
      if (py) begin pop[1] = 1; void'(mq[1].pop_front()); end
      if (pz) begin pop[2] = 1; void'(mq[2].pop_front()); end
      if (px) begin app_v[1][0] = 1; app_h[1][0] = x; app_t[1][0] = x; mq[1].push_back(x); end
      if (py) begin app_v[2][1] = 1; app_h[2][1] = y; app_t[2][1] = y; mq[2].push_back(y); end
      if (pz) begin
        if ($urandom % 2) begin app_v[0][0] = 1; app_h[0][0] = z; app_t[0][0] = z; mq[0].push_back(z); end
        else begin app_v[1][2] = 1; app_h[1][2] = z; app_t[1][2] = z; mq[1].push_back(z); end
      end
      @(negedge clk);
      clear_in();
      #1;
      compare();
    end

    // chain splice: take three free threads, link them, append as one list
    begin
      tid_t c [3];
      @(negedge clk);
      clear_in();
      while (mq[0].size() < 3) begin
        // drain Ready/Active back to free
        if (head_v[1]) begin pop[1] = 1; app_v[0][0] = 1; app_h[0][0] = head[1]; app_t[0][0] = head[1];
          mq[0].push_back(mq[1].pop_front()); end
        @(negedge clk); clear_in(); #1;
        if (!head_v[1] && mq[0].size() < 3 && head_v[2]) begin
          pop[2] = 1; app_v[0][0] = 1; app_h[0][0] = head[2]; app_t[0][0] = head[2];
          mq[0].push_back(mq[2].pop_front());
          @(negedge clk); clear_in(); #1;
        end
      end
      for (int i = 0; i < 3; i++) begin
        c[i] = head[0];
        pop[0] = 1; void'(mq[0].pop_front());
        @(negedge clk); clear_in(); #1;
      end
      link_v[0] = 1; link_from[0] = c[0]; link_to[0] = c[1];
      link_v[1] = 1; link_from[1] = c[1]; link_to[1] = c[2];
      @(negedge clk); clear_in();
      app_v[2][0] = 1; app_h[2][0] = c[0]; app_t[2][0] = c[2];
      for (int i = 0; i < 3; i++) mq[2].push_back(c[i]);
      @(negedge clk); clear_in(); #1;
      compare();
      while (mq[2].size() > 0) begin
        chk(head_v[2] && head[2] == mq[2][0], "chain order");
        if (!head_v[2]) break;   // list lost its entries: stop popping
        pop[2] = 1; void'(mq[2].pop_front());
        @(negedge clk); clear_in(); #1;
      end
      chk(!head_v[2], "active list drained");
    end

    // entry fields
    @(negedge clk);
    wr_init = 1; wr_init_tid = 4'd3; wr_init_entry = '{pc: 64'h1234, fid: 5'd7, slot: 4'd2, first: 1'b1, last: 1'b0, cline: 4'd9};
    @(negedge clk); clear_in();
    wr_pc = 1; wr_pc_tid = 4'd3; wr_pc_val = 64'h5678;
    wr_cline = 1; wr_cline_tid = 4'd3; wr_cline_val = 4'd11;
    @(negedge clk); clear_in();
    rd_tid[1] = 4'd3; #1;
    chk(rd_entry[1].pc == 64'h5678 && rd_entry[1].fid == 7 && rd_entry[1].slot == 2 &&
        rd_entry[1].first && !rd_entry[1].last && rd_entry[1].cline == 11, "entry fields");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
