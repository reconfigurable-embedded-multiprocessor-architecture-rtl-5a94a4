// tb_arise_control_unit: every instr code, valid and invalid, against the
// expected control signals.
module tb_arise_control_unit;
  import arise_pkg::*;
  arise_word_t aw;
  arise_ctrl_t ctrl;
  int checks = 0, failures = 0;

  arise_control_unit dut (.aw, .ctrl);

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int i = 0; i < 8; i++) begin
        logic [7:0] exp;   // {iob_wr,iob_rd,tbl_wr,exec,conf,rd_status,wb,need_idle}
        aw = '0;
        aw.valid = v[0];
        aw.instr = arise_instr_e'(i);
        aw.opc = 8'($urandom);
        aw.rd = 5'($urandom);
        #1;
        case (i)
          0: exp = 8'b1000_0001;
          1: exp = 8'b0100_0011;
          2: exp = 8'b0001_0001;
          3: exp = 8'b0000_1001;
          4: exp = 8'b0010_0000;
          5: exp = 8'b0000_0110;
          default: exp = 8'b0;
        endcase
        if (v == 0) exp = 8'b0;
        checks++;
        if (ctrl != exp) begin
          failures++;
          $display("FAIL valid=%0d instr=%0d ctrl=%b exp=%b", v, i, ctrl, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
