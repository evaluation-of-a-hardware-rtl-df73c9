// tb_svp_annot_decode: builds random cache lines whose word 0 packs random
// 2-bit annotations (instruction k at bits 2k+3..2k+2) and checks that every
// word 1..15 returns its instruction, its own annotation and the end-of-line
// flag (word 15 only).
module tb_svp_annot_decode;
  import svp_pkg::*;

  logic [LINE_BITS-1:0] line;
  logic [3:0]  word;
  logic [31:0] instr;
  annot_e      annot;
  logic        last_in_line;
  int checks = 0, failures = 0;

  svp_annot_decode dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      logic [1:0]  an [15];
      logic [31:0] ins [15];
      logic [31:0] w0;
      w0 = {30'($urandom), 2'($urandom)};
      for (int k = 0; k < 15; k++) begin
        an[k] = 2'($urandom % 3);
        ins[k] = $urandom;
        w0[2*k+2 +: 2] = an[k];
        line[32*(k+1) +: 32] = ins[k];
      end
      line[31:0] = w0;
      for (int k = 0; k < 15; k++) begin
        word = 4'(k + 1);
        #1;
        checks++;
        if (instr != ins[k] || annot != annot_e'(an[k]) || last_in_line != (k == 14)) begin
          failures++;
          $display("FAIL word %0d: %h/%0d/%0d", k + 1, instr, annot, last_in_line);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
