// arise_opc_id_table: Opcode-to-Id table of the ARISE interface.
//
// Holds, for each of the 2**OPC_W values of the instruction's opc field, the
// Id of the ARISE operation it currently names. The Id may be wider than the
// opc, so more operations exist than opcodes, and any entry can be rewritten
// at run time (setid) so one opc can name different operations over time.
// Read is combinational (used at PRE); write is synchronous. On reset every
// entry maps opc to Id == opc (this design's choice; the reset contents are
// not given). The table is a register array so that it can be reset.
module arise_opc_id_table
  import arise_pkg::*;
#(
  parameter int unsigned OPCW = OPC_W,
  parameter int unsigned IDW  = ID_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [OPCW-1:0] rd_opc,
  output logic [IDW-1:0]  rd_id,
  input  logic            wr_en,
  input  logic [OPCW-1:0] wr_opc,
  input  logic [IDW-1:0]  wr_id
);
  localparam int unsigned N = 1 << OPCW;
  logic [IDW-1:0] tbl [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) tbl[i] <= IDW'(i);
    end else if (wr_en) begin
      tbl[wr_opc] <= wr_id;
    end
  end

  assign rd_id = tbl[rd_opc];
endmodule
