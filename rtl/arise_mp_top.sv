// arise_mp_top: reconfigurable embedded multiprocessor built around the
// ARISE interface.
//
// A core processor (CP, outside this module) has its instruction set
// extended once by the ARISE interface; any number of further processors can
// then be attached to it as computing units (CUs), each behind a wrapper that
// owns a range of operation Ids. This top holds:
//   - arise_interface: decoder, control unit, Opcode-to-Id table, IOB and
//     status register, pipelined beside the CP (F / PRE / PRO / POST);
//   - wrapper 0 + cu_int: the integer-operation processor, Ids 0x010-0x013;
//   - wrapper 1 + cu_ldst: the load-store processor, Ids 0x020-0x023;
//   - wrapper 2: Ids 0x030-0x033 for a third processor (the VLIW processor)
//     whose CU-side signals are ports (x_*), so it can be attached outside;
//   - arise_mem_arbiter + data memory: the shared memory reached by the CP's
//     memory port and, through the wrappers, by the CUs (CU first, CP
//     stalled on a conflict);
//   - configuration memory holding the bitstreams; it is loaded through the
//     cmem_load_* port and read by the wrappers' configuration controllers.
//
// CP connection: the CP fetches into if_instr, takes cp_instr into its ID
// stage, reads its register file at pre_rs / pre_rt and returns the values in
// the same cycle, writes wb_rd with wb_data when wb_we, and holds its whole
// pipeline while stall_cp is high. cp_ext_stall tells the interface the CP
// is stalled for its own reasons. The CP's data accesses use cp_mem_*: a
// request is done in the cycle cp_mem_gnt is high, a read word arrives in the
// next cycle with cp_mem_rvalid. A configuration-memory load write has
// priority over a wrapper's read; load bitstreams before configuring.
// The Id ranges, the number of wrappers, the memory sizes and all port
// timing are this design's choices.
module arise_mp_top
  import arise_pkg::*;
#(
  parameter int unsigned DEPTH       = 8,     // IOB bank depth
  parameter int unsigned NOPS        = 4,     // operations per wrapper
  parameter int unsigned DMEM_WORDS  = 1024,  // shared data memory
  parameter int unsigned CMEM_WORDS  = 256,   // configuration memory
  localparam int unsigned DA_W  = $clog2(DMEM_WORDS),
  localparam int unsigned CA_W  = $clog2(CMEM_WORDS),
  localparam int unsigned IDX_W = (NOPS > 1) ? $clog2(NOPS) : 1,
  localparam int unsigned CW    = $clog2(DEPTH+1),
  localparam int unsigned NW    = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // CP pipeline
  input  logic [XLEN-1:0]            if_instr,
  input  logic                       if_valid,
  output logic [XLEN-1:0]            cp_instr,
  input  logic                       cp_ext_stall,
  output logic                       stall_cp,
  output logic                       irq_block,
  output logic [REG_W-1:0]           pre_rs,
  output logic [REG_W-1:0]           pre_rt,
  input  logic [XLEN-1:0]            pre_rs_val,
  input  logic [XLEN-1:0]            pre_rt_val,
  output logic                       wb_we,
  output logic [REG_W-1:0]           wb_rd,
  output logic [XLEN-1:0]            wb_data,
  output logic [XLEN-1:0]            status,
  // CP data-memory port
  input  logic                       cp_mem_req,
  input  logic                       cp_mem_we,
  input  logic [DA_W-1:0]            cp_mem_addr,
  input  logic [XLEN-1:0]            cp_mem_wdata,
  output logic                       cp_mem_gnt,
  output logic                       cp_mem_rvalid,
  output logic [XLEN-1:0]            cp_mem_rdata,
  // configuration memory load port
  input  logic                       cmem_load_we,
  input  logic [CA_W-1:0]            cmem_load_addr,
  input  logic [XLEN-1:0]            cmem_load_wdata,
  // third computing unit (VLIW processor), attached outside
  output logic                       x_cfg_valid,
  output logic [IDX_W-1:0]           x_cfg_idx,
  output logic [XLEN-1:0]            x_cfg_data,
  output logic                       x_start,
  output logic [IDX_W-1:0]           x_op,
  input  logic                       x_done,
  output logic [DEPTH-1:0][XLEN-1:0] x_in_bank,
  output logic [CW-1:0]              x_in_count,
  input  logic [DEPTH-1:0]           x_out_we,
  input  logic [DEPTH-1:0][XLEN-1:0] x_out_wdata,
  input  logic                       x_mem_req,
  input  logic                       x_mem_we,
  input  logic [DA_W-1:0]            x_mem_addr,
  input  logic [XLEN-1:0]            x_mem_wdata,
  output logic                       x_mem_gnt,
  output logic                       x_mem_rvalid,
  output logic [XLEN-1:0]            x_mem_rdata
);
  localparam logic [ID_W-1:0] BASE [NW] = '{12'h010, 12'h020, 12'h030};

  // interface <-> wrappers
  logic [ID_W-1:0]  w_id;
  logic             w_exec_start, w_conf_start;
  logic [XLEN-1:0]  w_conf_saddr, w_conf_eaddr;
  logic [NW-1:0]    w_hit, w_will_stall, w_busy, w_stall_req, w_irq_block, w_exec_done, w_conf_done;
  logic [NW-1:0]    w_exec_busy;
  // IOB
  logic [DEPTH-1:0][XLEN-1:0] in_bank;
  logic [CW-1:0]              in_count;
  logic [DEPTH-1:0]           out_we, int_we, ls_we;
  logic [DEPTH-1:0][XLEN-1:0] out_wdata, int_wdata, ls_wdata;
  // configuration memory
  logic [NW-1:0]              cm_re;
  logic [NW-1:0][CA_W-1:0]    cm_addr;
  logic [XLEN-1:0]            cm_rdata;
  logic [CA_W-1:0]            cm_addr_sel;
  // CU side of the wrappers
  logic [NW-1:0]              cu_cfg_valid, cu_start, cu_done;
  logic [NW-1:0][IDX_W-1:0]   cu_cfg_idx, cu_op;
  logic [NW-1:0][XLEN-1:0]    cu_cfg_data;
  logic [NW-1:0]              cu_mreq, cu_mwe;
  logic [NW-1:0][DA_W-1:0]    cu_maddr;
  logic [NW-1:0][XLEN-1:0]    cu_mwdata;
  logic [NW-1:0]              m_req, m_we, m_gnt, m_rvalid;
  logic [NW-1:0][DA_W-1:0]    m_addr;
  logic [NW-1:0][XLEN-1:0]    m_wdata;
  // data memory
  logic                       dm_en, dm_we, cp_mem_stall, arise_stall;
  logic [DA_W-1:0]            dm_addr;
  logic [XLEN-1:0]            dm_wdata, dm_rdata;

  arise_interface #(.NW(NW), .DEPTH(DEPTH)) u_if (
    .clk, .rst_n,
    .if_instr, .if_valid, .cp_instr,
    .ext_stall   (cp_ext_stall || cp_mem_stall),
    .arise_stall,
    .irq_block,
    .pre_rs, .pre_rt, .pre_rs_val, .pre_rt_val,
    .wb_we, .wb_rd, .wb_data,
    .w_id, .w_exec_start, .w_conf_start, .w_conf_saddr, .w_conf_eaddr,
    .w_hit, .w_will_stall, .w_busy, .w_stall_req, .w_irq_block, .w_exec_done, .w_conf_done,
    .iob_in_bank   (in_bank),
    .iob_in_count  (in_count),
    .iob_out_we    (out_we),
    .iob_out_wdata (out_wdata),
    .status
  );

  assign stall_cp = arise_stall || cp_mem_stall;

  for (genvar g = 0; g < NW; g++) begin : g_wrap
    arise_wrapper #(.ID_BASE(BASE[g]), .NOPS(NOPS), .CA_W(CA_W), .DA_W(DA_W)) u_wrap (
      .clk, .rst_n,
      .id              (w_id),
      .hit             (w_hit[g]),
      .will_stall      (w_will_stall[g]),
      .exec_start      (w_exec_start),
      .conf_start      (w_conf_start),
      .conf_start_addr (w_conf_saddr[CA_W-1:0]),
      .conf_end_addr   (w_conf_eaddr[CA_W-1:0]),
      .busy            (w_busy[g]),
      .exec_busy       (w_exec_busy[g]),
      .stall_req       (w_stall_req[g]),
      .irq_block       (w_irq_block[g]),
      .exec_done       (w_exec_done[g]),
      .conf_done       (w_conf_done[g]),
      .cmem_re         (cm_re[g]),
      .cmem_addr       (cm_addr[g]),
      .cmem_rdata      (cm_rdata),
      .cu_cfg_valid    (cu_cfg_valid[g]),
      .cu_cfg_idx      (cu_cfg_idx[g]),
      .cu_cfg_data     (cu_cfg_data[g]),
      .cu_start        (cu_start[g]),
      .cu_op           (cu_op[g]),
      .cu_done         (cu_done[g]),
      .cu_mem_req      (cu_mreq[g]),
      .cu_mem_we       (cu_mwe[g]),
      .cu_mem_addr     (cu_maddr[g]),
      .cu_mem_wdata    (cu_mwdata[g]),
      .mem_req         (m_req[g]),
      .mem_we          (m_we[g]),
      .mem_addr        (m_addr[g]),
      .mem_wdata       (m_wdata[g])
    );
  end

  // integer-operation processor (no memory access)
  cu_int #(.DEPTH(DEPTH), .NOPS(NOPS)) u_int (
    .clk, .rst_n,
    .cfg_valid (cu_cfg_valid[0]), .cfg_idx (cu_cfg_idx[0]), .cfg_data (cu_cfg_data[0]),
    .start     (cu_start[0]),     .op      (cu_op[0]),
    .in_bank, .in_count,
    .out_we    (int_we), .out_wdata (int_wdata),
    .done      (cu_done[0])
  );
  assign cu_mreq[0]   = 1'b0;
  assign cu_mwe[0]    = 1'b0;
  assign cu_maddr[0]  = '0;
  assign cu_mwdata[0] = '0;

  // load-store processor
  cu_ldst #(.DEPTH(DEPTH), .NOPS(NOPS), .DA_W(DA_W)) u_ldst (
    .clk, .rst_n,
    .cfg_valid (cu_cfg_valid[1]), .cfg_idx (cu_cfg_idx[1]), .cfg_data (cu_cfg_data[1]),
    .start     (cu_start[1]),     .op      (cu_op[1]),
    .in_bank, .in_count,
    .out_we    (ls_we), .out_wdata (ls_wdata),
    .done      (cu_done[1]),
    .mem_req   (cu_mreq[1]), .mem_we (cu_mwe[1]), .mem_addr (cu_maddr[1]), .mem_wdata (cu_mwdata[1]),
    .mem_gnt   (m_gnt[1]),   .mem_rvalid (m_rvalid[1]), .mem_rdata (dm_rdata)
  );

  // third processor, attached through the x_* ports
  assign x_cfg_valid  = cu_cfg_valid[2];
  assign x_cfg_idx    = cu_cfg_idx[2];
  assign x_cfg_data   = cu_cfg_data[2];
  assign x_start      = cu_start[2];
  assign x_op         = cu_op[2];
  assign cu_done[2]   = x_done;
  assign x_in_bank    = in_bank;
  assign x_in_count   = in_count;
  assign cu_mreq[2]   = x_mem_req;
  assign cu_mwe[2]    = x_mem_we;
  assign cu_maddr[2]  = x_mem_addr;
  assign cu_mwdata[2] = x_mem_wdata;
  assign x_mem_gnt    = m_gnt[2];
  assign x_mem_rvalid = m_rvalid[2];
  assign x_mem_rdata  = dm_rdata;

  // IOB output bank: only the running CU writes
  always_comb begin
    out_we = int_we | ls_we | x_out_we;
    for (int i = 0; i < DEPTH; i++)
      out_wdata[i] = int_we[i] ? int_wdata[i] : ls_we[i] ? ls_wdata[i] : x_out_wdata[i];
  end

  // configuration memory: one configuration controller reads at a time
  always_comb begin
    cm_addr_sel = '0;
    for (int i = 0; i < NW; i++)
      if (cm_re[i]) cm_addr_sel = cm_addr[i];
  end

  shared_mem #(.WORDS(CMEM_WORDS), .W(XLEN)) u_cmem (
    .clk, .rst_n,
    .en    (cmem_load_we || |cm_re),
    .we    (cmem_load_we),
    .addr  (cmem_load_we ? cmem_load_addr : cm_addr_sel),
    .wdata (cmem_load_wdata),
    .rdata (cm_rdata)
  );

  // shared data memory
  arise_mem_arbiter #(.NM(NW), .DA_W(DA_W)) u_arb (
    .clk, .rst_n,
    .cu_req (m_req), .cu_we (m_we), .cu_addr (m_addr), .cu_wdata (m_wdata),
    .cu_gnt (m_gnt), .cu_rvalid (m_rvalid),
    .cp_req (cp_mem_req), .cp_we (cp_mem_we), .cp_addr (cp_mem_addr), .cp_wdata (cp_mem_wdata),
    .cp_gnt (cp_mem_gnt), .cp_rvalid (cp_mem_rvalid), .cp_stall (cp_mem_stall),
    .mem_en (dm_en), .mem_we (dm_we), .mem_addr (dm_addr), .mem_wdata (dm_wdata)
  );
  assign cp_mem_rdata = dm_rdata;

  shared_mem #(.WORDS(DMEM_WORDS), .W(XLEN)) u_dmem (
    .clk, .rst_n,
    .en (dm_en), .we (dm_we), .addr (dm_addr), .wdata (dm_wdata), .rdata (dm_rdata)
  );
endmodule
