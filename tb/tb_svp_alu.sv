// tb_svp_alu: random operands through every supported operate instruction,
// compared with results computed here; also checks that an opcode/function
// pair outside the subset is flagged as unknown.
module tb_svp_alu;
  import svp_pkg::*;

  logic [5:0] opcode;
  logic [6:0] func;
  word_t      a, b, y;
  logic       known;
  int checks = 0, failures = 0;

  svp_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(logic [5:0] op, logic [6:0] fn, word_t exp, string nm);
    opcode = op; func = fn;
    #1;
    checks++;
    if (!known || y !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h exp %h", nm, a, b, y, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (n % 7 == 0) b = a;
      t(6'h10, 7'h20, a + b, "ADDQ");
      t(6'h10, 7'h29, a - b, "SUBQ");
      t(6'h10, 7'h32, a * 8 + b, "S8ADDQ");
      t(6'h10, 7'h2D, (a == b) ? 1 : 0, "CMPEQ");
      t(6'h10, 7'h4D, ($signed(a) < $signed(b)) ? 1 : 0, "CMPLT");
      t(6'h10, 7'h1D, (a < b) ? 1 : 0, "CMPULT");
      t(6'h11, 7'h00, a & b, "AND");
      t(6'h11, 7'h20, a | b, "BIS");
      t(6'h11, 7'h40, a ^ b, "XOR");
      t(6'h12, 7'h39, a << (b % 64), "SLL");
      t(6'h12, 7'h34, a >> (b % 64), "SRL");
      t(6'h13, 7'h20, a * b, "MULQ");
    end
    opcode = 6'h16; func = 7'h20;
    #1;
    checks++;
    if (known) begin failures++; $display("FAIL unknown op accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
