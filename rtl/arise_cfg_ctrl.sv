// arise_cfg_ctrl: configuration controller of an ARISE wrapper.
//
// On `start` it takes control and fetches the bitstream of one operation
// from the configuration memory, one memory word per cycle, from start_addr
// up to and including end_addr (consecutive places, so it generates the
// addresses itself). The first word of the bitstream is the ARISE
// configuration word of the operation; it is written into the wrapper's
// table at entry op_idx. Every later word is configuration data for the
// reconfigurable computing unit and is forwarded to it (cu_cfg_valid /
// cu_cfg_data, tagged with op_idx) without being stored in the wrapper.
//
// Timing: the configuration memory has a one-cycle read latency. A bitstream
// of K words keeps `busy` high for K+1 cycles after the start cycle and
// `done` pulses in the last of them. If end_addr < start_addr only the ARISE
// word is read. The ARISE part being exactly one word is this design's
// choice.
module arise_cfg_ctrl
  import arise_pkg::*;
#(
  parameter int unsigned CA_W   = 8,  // configuration memory address width
  parameter int unsigned IDX_W  = 2   // operation index width inside the wrapper
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CA_W-1:0]   start_addr,
  input  logic [CA_W-1:0]   end_addr,
  input  logic [IDX_W-1:0]  op_idx,
  // configuration memory read port
  output logic              cmem_re,
  output logic [CA_W-1:0]   cmem_addr,
  input  logic [XLEN-1:0]   cmem_rdata,
  // ARISE configuration table write
  output logic              tbl_we,
  output logic [IDX_W-1:0]  tbl_idx,
  output arise_cfg_t        tbl_wdata,
  // CU configuration stream
  output logic              cu_cfg_valid,
  output logic [IDX_W-1:0]  cu_cfg_idx,
  output logic [XLEN-1:0]   cu_cfg_data,
  output logic              busy,
  output logic              done
);
  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_DRAIN} state_e;
  state_e            state;
  logic [CA_W-1:0]   addr, last;
  logic [IDX_W-1:0]  idx;
  logic              rvalid_q, first_q, last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      addr     <= '0;
      last     <= '0;
      idx      <= '0;
      rvalid_q <= 1'b0;
      first_q  <= 1'b0;
      last_q   <= 1'b0;
    end else begin
      rvalid_q <= 1'b0;
      last_q   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          addr  <= start_addr;
          last  <= (end_addr < start_addr) ? start_addr : end_addr;
          idx   <= op_idx;
          first_q <= 1'b1;
          state <= S_FETCH;
        end
        S_FETCH: begin
          rvalid_q <= 1'b1;
          last_q   <= (addr == last);
          addr     <= addr + 1'b1;
          if (addr == last) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (rvalid_q) first_q <= 1'b0;
    end
  end

  assign cmem_re      = (state == S_FETCH);
  assign cmem_addr    = addr;
  assign tbl_we       = rvalid_q && first_q;
  assign tbl_idx      = idx;
  assign tbl_wdata    = arise_cfg_t'(cmem_rdata);
  assign cu_cfg_valid = rvalid_q && !first_q;
  assign cu_cfg_idx   = idx;
  assign cu_cfg_data  = cmem_rdata;
  assign busy         = (state != S_IDLE);
  assign done         = last_q;
endmodule
