// arise_control_unit: ARISE control unit of the PRE stage.
//
// From the instr field of the ARISE word held in PRE it generates the
// control signals for all ARISE components (IOB, Opcode-to-Id table,
// wrappers, status register, CP register-file write-back). Combinational;
// its output is registered into the PRO stage by arise_interface. The set of
// ARISE instructions (movta, movfa, execute, configure) follows the ARISE
// framework; setid (run-time reassignment of an opc) and rdst (read the
// status register) are this design's way of exposing the table and the
// status register to software. Unused instr codes decode to no action.
module arise_control_unit
  import arise_pkg::*;
(
  input  arise_word_t aw,     // ARISE word at PRE
  output arise_ctrl_t ctrl
);
  always_comb begin
    ctrl = '0;
    if (aw.valid) begin
      unique case (aw.instr)
        A_MOVTA: begin ctrl.iob_wr = 1'b1; ctrl.need_idle = 1'b1; end
        A_MOVFA: begin ctrl.iob_rd = 1'b1; ctrl.wb = 1'b1; ctrl.need_idle = 1'b1; end
        A_EXEC:  begin ctrl.exec   = 1'b1; ctrl.need_idle = 1'b1; end
        A_CONF:  begin ctrl.conf   = 1'b1; ctrl.need_idle = 1'b1; end
        A_SETID: ctrl.tbl_wr = 1'b1;
        A_RDST:  begin ctrl.rd_status = 1'b1; ctrl.wb = 1'b1; end
        default: ctrl = '0;
      endcase
    end
  end
endmodule
