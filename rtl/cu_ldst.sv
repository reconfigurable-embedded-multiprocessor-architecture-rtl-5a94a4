// cu_ldst: load-store processor attached to the ARISE interface as a
// computing unit.
//
// The unit moves blocks of words between data memory and the IOB through the
// data-memory access path its wrapper serves. Per operation slot k it keeps
// the last configuration word received, which selects
//   [0]   mode: 0 load (gather), 1 store (scatter)
//   [7:4] word count n (0: load fills the output bank, store takes every
//         input operand after the first two)
// Operands come from the IOB input bank: place 0 is the base address and
// place 1 the stride. A load reads words base, base+stride, ... into output
// places 0..n-1; a store writes input places 2..n+1 to those addresses.
//
// Timing: one request per cycle while granted; a read returns in the cycle
// after its grant (mem_rvalid). The number of cycles depends on how often
// the arbiter gives the port to someone else, so the operation's ARISE word
// should leave the latency unknown: `done` pulses when the last write is
// granted or the last read word has arrived. The
// multiprocessor calls for a load-store processor as one of its CUs; the
// block-move function and its configuration format are this design's
// choices.
module cu_ldst
  import arise_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NOPS  = 4,
  parameter int unsigned DA_W  = 10,
  localparam int unsigned IDX_W = (NOPS > 1) ? $clog2(NOPS) : 1,
  localparam int unsigned CW    = $clog2(DEPTH+1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_valid,
  input  logic [IDX_W-1:0]           cfg_idx,
  input  logic [XLEN-1:0]            cfg_data,
  input  logic                       start,
  input  logic [IDX_W-1:0]           op,
  input  logic [DEPTH-1:0][XLEN-1:0] in_bank,
  input  logic [CW-1:0]              in_count,
  output logic [DEPTH-1:0]           out_we,
  output logic [DEPTH-1:0][XLEN-1:0] out_wdata,
  output logic                       done,
  // data memory access, served by the wrapper
  output logic                       mem_req,
  output logic                       mem_we,
  output logic [DA_W-1:0]            mem_addr,
  output logic [XLEN-1:0]            mem_wdata,
  input  logic                       mem_gnt,
  input  logic                       mem_rvalid,
  input  logic [XLEN-1:0]            mem_rdata
);
  logic [7:0]      cfg_q [NOPS];
  logic            run, store;
  logic [CW-1:0]   n, issued, returned;
  logic [DA_W-1:0] addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NOPS; i++) cfg_q[i] <= '0;
      run      <= 1'b0;
      store    <= 1'b0;
      n        <= '0;
      issued   <= '0;
      returned <= '0;
      addr     <= '0;
    end else begin
      if (cfg_valid) cfg_q[cfg_idx] <= cfg_data[7:0];
      if (start && !run) begin
        logic [CW-1:0] cnt, avail;
        avail = (in_count > CW'(2)) ? in_count - CW'(2) : '0;
        if (cfg_q[op][0])
          cnt = (cfg_q[op][7:4] == 4'd0 || 32'(cfg_q[op][7:4]) > DEPTH - 2)
                ? avail : CW'(cfg_q[op][7:4]);
        else
          cnt = (cfg_q[op][7:4] == 4'd0 || 32'(cfg_q[op][7:4]) > DEPTH)
                ? CW'(DEPTH) : CW'(cfg_q[op][7:4]);
        store    <= cfg_q[op][0];
        n        <= cnt;
        issued   <= '0;
        returned <= '0;
        addr     <= in_bank[0][DA_W-1:0];
        run      <= 1'b1;
      end else if (run) begin
        if (mem_req && mem_gnt) begin
          issued <= issued + 1'b1;
          addr   <= addr + in_bank[1][DA_W-1:0];
        end
        if (mem_rvalid) returned <= returned + 1'b1;
        if (done) run <= 1'b0;
      end
    end
  end

  assign mem_req   = run && (issued < n);
  assign mem_we    = store;
  assign mem_addr  = addr;
  assign mem_wdata = (32'(issued) + 2 < DEPTH) ? in_bank[issued + CW'(2)] : '0;

  // store: finished once the last write is granted (or nothing to do);
  // load: finished when the last read word has arrived
  assign done = run && (store ? (issued == n || (issued + 1'b1 == n && mem_gnt))
                              : (returned == n || (returned + 1'b1 == n && mem_rvalid)));

  always_comb begin
    out_we    = '0;
    out_wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      out_wdata[i] = mem_rdata;
      out_we[i]    = run && !store && mem_rvalid && (returned == CW'(i));
    end
  end
endmodule
