// arise_mem_arbiter: shares the CP's data-memory port between the CP and the
// computing units.
//
// The CUs reach data memory through their wrappers and the CP's memory port.
// When a CU and the CP request in the same cycle (an operation running in
// concurrent mode), the CU is served and the CP is stalled (cp_stall) until
// it is granted. Among the CUs the lowest index wins (fixed priority, this
// design's choice). The memory is single-ported with a one-cycle read
// latency: a granted read returns its word on mem_rdata in the next cycle,
// flagged by the requester's rvalid bit. Writes complete in the grant cycle.
module arise_mem_arbiter
  import arise_pkg::*;
#(
  parameter int unsigned NM   = 3,   // number of CU ports
  parameter int unsigned DA_W = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NM-1:0]             cu_req,
  input  logic [NM-1:0]             cu_we,
  input  logic [NM-1:0][DA_W-1:0]   cu_addr,
  input  logic [NM-1:0][XLEN-1:0]   cu_wdata,
  output logic [NM-1:0]             cu_gnt,
  output logic [NM-1:0]             cu_rvalid,
  input  logic                      cp_req,
  input  logic                      cp_we,
  input  logic [DA_W-1:0]           cp_addr,
  input  logic [XLEN-1:0]           cp_wdata,
  output logic                      cp_gnt,
  output logic                      cp_rvalid,
  output logic                      cp_stall,
  // single-port memory
  output logic                      mem_en,
  output logic                      mem_we,
  output logic [DA_W-1:0]           mem_addr,
  output logic [XLEN-1:0]           mem_wdata
);
  always_comb begin
    cu_gnt    = '0;
    cp_gnt    = 1'b0;
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = cp_addr;
    mem_wdata = cp_wdata;
    for (int i = NM-1; i >= 0; i--) begin
      if (cu_req[i]) begin
        cu_gnt    = '0;
        cu_gnt[i] = 1'b1;
        mem_we    = cu_we[i];
        mem_addr  = cu_addr[i];
        mem_wdata = cu_wdata[i];
      end
    end
    if (|cu_req) begin
      mem_en = 1'b1;
    end else if (cp_req) begin
      cp_gnt = 1'b1;
      mem_en = 1'b1;
      mem_we = cp_we;
    end
  end

  assign cp_stall = cp_req && !cp_gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cu_rvalid <= '0;
      cp_rvalid <= 1'b0;
    end else begin
      cu_rvalid <= cu_gnt & ~cu_we;
      cp_rvalid <= cp_gnt && !cp_we;
    end
  end

  // at most one requester owns the port, and only a requester is granted
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0({cu_gnt, cp_gnt}));
  a_gnt_req:   assert property (@(posedge clk) disable iff (!rst_n) ((cu_gnt & ~cu_req) == '0) && (!cp_gnt || cp_req));
endmodule
