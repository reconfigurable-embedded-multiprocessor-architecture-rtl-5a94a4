// tb_arise_decoder: checks that ARISE words are split into their fields and
// replaced by a bubble for the CP, and that other words pass unchanged.
module tb_arise_decoder;
  import arise_pkg::*;
  logic [XLEN-1:0] if_instr, cp_instr;
  logic            if_valid;
  arise_word_t     aw;
  int checks = 0, failures = 0;

  arise_decoder dut (.if_instr, .if_valid, .cp_instr, .aw);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [XLEN-1:0] w;
      logic            v, arise;
      w = $urandom;
      if (t % 2 == 0) w[31:26] = 6'h1C;   // reserved ARISE opcode
      v = (t % 7) != 3;
      if_instr = w; if_valid = v;
      #1;
      arise = v && (w[31:26] == 6'h1C);
      check(aw.valid == arise, "valid");
      check(cp_instr == (arise ? 32'h0 : w), "cp word");
      if (arise) begin
        check(aw.instr == arise_instr_e'(w[10:8]), "instr");
        check(aw.opc == w[7:0], "opc");
        check(aw.rs == w[25:21] && aw.rt == w[20:16] && aw.rd == w[15:11], "regs");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
