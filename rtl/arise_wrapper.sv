// arise_wrapper: wrapper that attaches one computing unit (CU) to the ARISE
// interface.
//
// The wrapper owns the Id range [ID_BASE, ID_BASE+NOPS): each ARISE
// operation implemented on its CU is one Id of that range, and `hit` tells
// the interface that the presented Id belongs here. Inside are
//   - the ARISE configuration table, one arise_cfg_t word per operation,
//     filled by the configuration controller,
//   - the configuration controller (arise_cfg_ctrl), which on conf_start
//     fetches the operation's bitstream from configuration memory, keeps the
//     ARISE word and streams the rest to the CU,
//   - the execution controller (arise_exec_ctrl), which on exec_start starts
//     the CU, stalls the CP for the given latency or until the CU is done,
//     and blocks interrupts as configured.
// The wrapper also serves the CU's data-memory accesses: requests are passed
// on to the memory port only while an operation of this CU runs.
// Timing: conf_start / exec_start are one-cycle pulses issued only when
// `hit` is high and the wrapper is idle; will_stall tells the interface,
// in the dispatch cycle, whether the CP must wait for the operation. The table is reset to all-zero
// words (unknown latency, stalling mode), this design's choice.
module arise_wrapper
  import arise_pkg::*;
#(
  parameter logic [ID_W-1:0] ID_BASE = 12'h010,
  parameter int unsigned     NOPS    = 4,
  parameter int unsigned     CA_W    = 8,
  parameter int unsigned     DA_W    = 10,
  localparam int unsigned    IDX_W   = (NOPS > 1) ? $clog2(NOPS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the interface
  input  logic [ID_W-1:0]   id,
  output logic              hit,
  output logic              will_stall,  // the hit operation runs in stalling mode
  input  logic              exec_start,
  input  logic              conf_start,
  input  logic [CA_W-1:0]   conf_start_addr,
  input  logic [CA_W-1:0]   conf_end_addr,
  output logic              busy,        // configuring or executing
  output logic              exec_busy,
  output logic              stall_req,
  output logic              irq_block,
  output logic              exec_done,
  output logic              conf_done,
  // configuration memory
  output logic              cmem_re,
  output logic [CA_W-1:0]   cmem_addr,
  input  logic [XLEN-1:0]   cmem_rdata,
  // computing unit
  output logic              cu_cfg_valid,
  output logic [IDX_W-1:0]  cu_cfg_idx,
  output logic [XLEN-1:0]   cu_cfg_data,
  output logic              cu_start,
  output logic [IDX_W-1:0]  cu_op,
  input  logic              cu_done,
  input  logic              cu_mem_req,
  input  logic              cu_mem_we,
  input  logic [DA_W-1:0]   cu_mem_addr,
  input  logic [XLEN-1:0]   cu_mem_wdata,
  // data memory port towards the arbiter
  output logic              mem_req,
  output logic              mem_we,
  output logic [DA_W-1:0]   mem_addr,
  output logic [XLEN-1:0]   mem_wdata
);
  arise_cfg_t       table_q [NOPS];
  logic [ID_W-1:0]  offs;
  logic [IDX_W-1:0] idx;
  logic             tbl_we;
  logic [IDX_W-1:0] tbl_idx;
  arise_cfg_t       tbl_wdata;
  logic             cfg_busy;

  assign offs = id - ID_BASE;
  assign hit  = (id >= ID_BASE) && ({1'b0, offs} < (ID_W+1)'(NOPS));
  assign idx  = offs[IDX_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NOPS; i++) table_q[i] <= '0;
    end else if (tbl_we) begin
      table_q[tbl_idx] <= tbl_wdata;
    end
  end

  arise_cfg_ctrl #(.CA_W(CA_W), .IDX_W(IDX_W)) u_cfg (
    .clk, .rst_n,
    .start      (conf_start && hit && !busy),
    .start_addr (conf_start_addr),
    .end_addr   (conf_end_addr),
    .op_idx     (idx),
    .cmem_re, .cmem_addr, .cmem_rdata,
    .tbl_we, .tbl_idx, .tbl_wdata,
    .cu_cfg_valid, .cu_cfg_idx, .cu_cfg_data,
    .busy       (cfg_busy),
    .done       (conf_done)
  );

  arise_exec_ctrl #(.IDX_W(IDX_W)) u_exec (
    .clk, .rst_n,
    .start     (exec_start && hit && !busy),
    .op_idx    (idx),
    .cfg       (table_q[idx]),
    .cu_done,
    .cu_start,
    .cu_op,
    .busy      (exec_busy),
    .stall_req,
    .irq_block,
    .done      (exec_done)
  );

  assign will_stall = hit && !table_q[idx].concurrent;
  assign busy      = cfg_busy || exec_busy;
  assign mem_req   = cu_mem_req && exec_busy;
  assign mem_we    = cu_mem_we;
  assign mem_addr  = cu_mem_addr;
  assign mem_wdata = cu_mem_wdata;

  // the interface dispatches one request at a time, and never to a busy wrapper
  a_one_start:  assert property (@(posedge clk) disable iff (!rst_n) !(exec_start && conf_start));
  a_idle_start: assert property (@(posedge clk) disable iff (!rst_n) ((exec_start || conf_start) && hit) |-> !busy);
endmodule
