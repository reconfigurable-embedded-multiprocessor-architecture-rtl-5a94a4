// shared_mem: on-chip single-port RAM used for the shared data memory and
// for the configuration (bitstream) memory of the multiprocessor.
//
// WORDS words of W bits, synchronous write, synchronous read with one cycle
// of latency (rdata holds the word addressed in the previous enabled read).
// It stands in for the FPGA block RAM behind the shared memory system; its
// organisation and sizes are this design's choice. The array is not reset;
// rdata is.
module shared_mem #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          rdata <= '0;
    else if (en && !we)  rdata <= mem[addr];
  end
endmodule
