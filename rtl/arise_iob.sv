// arise_iob: input/output buffer (IOB) of the ARISE interface.
//
// Two register banks of DEPTH words. The input bank is filled by movta
// instructions: each one writes the two register-file read values to the next
// two consecutive places, so an operation can be given more operands than one
// CP instruction can carry while every register-file read port is used. The
// output bank is written by the active computing unit and drained by movfa
// instructions, one word per instruction (the register file has one write
// port), again from consecutive places.
//
// Timing: writes are synchronous. The CP-side read (movfa) is combinational
// from the current read place and is advanced at the clock edge of the read.
// in_clr (issued with an execute) rewinds the input write place for the next
// operand set; out_rewind (operation finished) rewinds the output read place.
// The banks keep their contents until overwritten. Writes past the last place
// are dropped (this design's choice). The bank depth is not given; 8 is
// assumed.
module arise_iob
  import arise_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = XLEN
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // CP side
  input  logic                          mov_to,     // movta: store a, b
  input  logic [W-1:0]                  mov_a,
  input  logic [W-1:0]                  mov_b,
  input  logic                          mov_from,   // movfa: consume one result
  output logic [W-1:0]                  mov_rdata,
  input  logic                          in_clr,
  input  logic                          out_rewind,
  // CU side
  output logic [DEPTH-1:0][W-1:0]       in_bank,
  output logic [$clog2(DEPTH+1)-1:0]    in_count,   // operands written so far
  input  logic [DEPTH-1:0]              out_we,
  input  logic [DEPTH-1:0][W-1:0]       out_wdata
);
  localparam int unsigned PW = $clog2(DEPTH+1);
  logic [DEPTH-1:0][W-1:0] out_bank;
  logic [PW-1:0] wptr, rptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_bank  <= '0;
      out_bank <= '0;
      wptr     <= '0;
      rptr     <= '0;
    end else begin
      if (in_clr) begin
        wptr <= '0;
      end else if (mov_to) begin
        if (32'(wptr) < DEPTH)     in_bank[wptr]      <= mov_a;
        if (32'(wptr) + 1 < DEPTH) in_bank[wptr + 1'b1] <= mov_b;
        wptr <= (32'(wptr) + 2 > DEPTH) ? PW'(DEPTH) : wptr + PW'(2);
      end
      for (int i = 0; i < DEPTH; i++)
        if (out_we[i]) out_bank[i] <= out_wdata[i];
      if (out_rewind)
        rptr <= '0;
      else if (mov_from && 32'(rptr) < DEPTH)
        rptr <= rptr + 1'b1;
    end
  end

  assign in_count  = wptr;
  assign mov_rdata = (32'(rptr) < DEPTH) ? out_bank[rptr[PW-1:0]] : '0;
endmodule
