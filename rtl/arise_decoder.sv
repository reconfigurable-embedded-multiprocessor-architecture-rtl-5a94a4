// arise_decoder: ARISE instruction decoder in the CP fetch stage.
//
// Every fetched word is pre-decoded. A word whose primary opcode is the one
// reserved for ARISE is turned into an ARISE instruction word (instr, opc and
// the three register specifiers) for the interface's PRE stage, and the CP's
// ID stage receives a bubble (CP_NOP) in its place. Any other word goes to
// the CP unchanged and the ARISE word is marked invalid. Purely
// combinational: both outputs are valid in the cycle the word is fetched.
// The pre-decode itself follows the ARISE interface; the field positions
// come from arise_pkg and are this design's choice.
module arise_decoder
  import arise_pkg::*;
(
  input  logic [XLEN-1:0] if_instr,  // fetched instruction word
  input  logic            if_valid,  // fetch stage holds a valid word
  output logic [XLEN-1:0] cp_instr,  // word for the CP ID stage
  output arise_word_t     aw         // word for the ARISE PRE stage
);
  logic is_arise;

  always_comb begin
    is_arise    = if_valid && (if_instr[31:26] == ARISE_MAJOR);
    aw.valid    = is_arise;
    aw.instr    = arise_instr_e'(if_instr[10:8]);
    aw.opc      = if_instr[7:0];
    aw.rs       = if_instr[25:21];
    aw.rt       = if_instr[20:16];
    aw.rd       = if_instr[15:11];
    cp_instr    = is_arise ? CP_NOP : if_instr;
  end
endmodule
