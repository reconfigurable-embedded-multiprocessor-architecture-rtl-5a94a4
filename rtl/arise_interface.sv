// arise_interface: the ARISE interface pipeline that sits beside the core
// processor (CP) pipeline.
//
// Stages, matched one-to-one with the CP's:
//   F    arise_decoder pre-decodes the fetched word; the CP receives a bubble
//        for an ARISE word, the interface receives the ARISE word.
//   PRE  the ARISE control unit decodes instr into control signals, the
//        Opcode-to-Id table turns opc into the operation Id, and the CP's
//        register file supplies the values of rs and rt (pre_rs / pre_rt are
//        the specifiers, pre_rs_val / pre_rt_val the values, same cycle).
//   PRO  the instruction acts: movta writes the IOB input bank, setid writes
//        the table, execute / configure are dispatched to the wrapper whose Id
//        range holds the Id, movfa reads the IOB output bank, rdst reads the
//        ARISE status register.
//   POST movfa / rdst results are written back to the CP register file
//        (wb_we / wb_rd / wb_data, registered).
//
// Stalls (arise_stall, to be OR-ed into the CP's stall): an execute of an
// operation in stalling mode holds PRO, and so the CP, for the operation's
// latency, or until its CU reports completion when no latency is given; an
// operation in concurrent mode retires at once and the CP runs on. A
// configure holds PRO until the bitstream is loaded. movta, movfa, execute
// and configure wait while any operation is still running. ext_stall (the CP
// stalled for its own reasons) freezes the interface pipeline too.
// A setid retiring in PRO is bypassed to the table read at PRE, so an
// execute right after it already uses the new Id.
//
// Status register (rdst): [0] some operation running, [1] an operation has
// completed, [2] execute/configure of an Id no wrapper owns, [3] a
// configuration completed, [16+:ID_W] Id of the last dispatched operation.
// Bits 1-3 are sticky and cleared by rdst. Timing and status layout are this
// design's choices; the stage structure follows the ARISE interface.
module arise_interface
  import arise_pkg::*;
#(
  parameter int unsigned NW    = 3,   // number of wrappers
  parameter int unsigned DEPTH = 8,   // IOB bank depth
  localparam int unsigned CW   = $clog2(DEPTH+1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // CP fetch / decode
  input  logic [XLEN-1:0]            if_instr,
  input  logic                       if_valid,
  output logic [XLEN-1:0]            cp_instr,
  input  logic                       ext_stall,
  output logic                       arise_stall,
  output logic                       irq_block,
  // CP register file
  output logic [REG_W-1:0]           pre_rs,
  output logic [REG_W-1:0]           pre_rt,
  input  logic [XLEN-1:0]            pre_rs_val,
  input  logic [XLEN-1:0]            pre_rt_val,
  output logic                       wb_we,
  output logic [REG_W-1:0]           wb_rd,
  output logic [XLEN-1:0]            wb_data,
  // wrappers
  output logic [ID_W-1:0]            w_id,
  output logic                       w_exec_start,
  output logic                       w_conf_start,
  output logic [XLEN-1:0]            w_conf_saddr,
  output logic [XLEN-1:0]            w_conf_eaddr,
  input  logic [NW-1:0]              w_hit,
  input  logic [NW-1:0]              w_will_stall,
  input  logic [NW-1:0]              w_busy,
  input  logic [NW-1:0]              w_stall_req,
  input  logic [NW-1:0]              w_irq_block,
  input  logic [NW-1:0]              w_exec_done,
  input  logic [NW-1:0]              w_conf_done,
  // IOB, computing-unit side
  output logic [DEPTH-1:0][XLEN-1:0] iob_in_bank,
  output logic [CW-1:0]              iob_in_count,
  input  logic [DEPTH-1:0]           iob_out_we,
  input  logic [DEPTH-1:0][XLEN-1:0] iob_out_wdata,
  output logic [XLEN-1:0]            status
);
  arise_word_t      aw_f, pre_aw;
  arise_ctrl_t      pre_ctrl, pro_ctrl;
  logic [ID_W-1:0]  tbl_id, pre_id, pro_id;
  logic [OPC_W-1:0] pro_opc;
  logic [REG_W-1:0] pro_rd;
  logic [XLEN-1:0]  pro_a, pro_b;
  logic             pro_valid, issued;
  logic             en, fire, busy_any, hit_any, blocked, issue;
  logic             st_done, st_err, st_conf;
  logic [ID_W-1:0]  st_id;
  logic [XLEN-1:0]  iob_rdata;

  // ---------------- F
  arise_decoder u_dec (.if_instr, .if_valid, .cp_instr, .aw(aw_f));

  // ---------------- PRE
  arise_control_unit u_cu (.aw(pre_aw), .ctrl(pre_ctrl));

  arise_opc_id_table u_tbl (
    .clk, .rst_n,
    .rd_opc (pre_aw.opc),
    .rd_id  (tbl_id),
    .wr_en  (fire && pro_ctrl.tbl_wr),
    .wr_opc (pro_opc),
    .wr_id  (pro_a[ID_W-1:0])
  );

  assign pre_id = (fire && pro_ctrl.tbl_wr && pro_opc == pre_aw.opc) ? pro_a[ID_W-1:0] : tbl_id;
  assign pre_rs = pre_aw.rs;
  assign pre_rt = pre_aw.rt;

  // ---------------- PRO: stall and dispatch
  assign busy_any = |w_busy;
  assign hit_any  = |w_hit;
  assign blocked  = pro_valid && pro_ctrl.need_idle && !issued && busy_any;
  assign issue    = pro_valid && !issued && !busy_any && hit_any && (pro_ctrl.exec || pro_ctrl.conf);

  always_comb begin
    arise_stall = 1'b0;
    if (blocked)
      arise_stall = 1'b1;
    else if (issue)
      arise_stall = pro_ctrl.conf || |(w_hit & w_will_stall);
    else if (issued)
      arise_stall = pro_ctrl.exec ? (|w_stall_req && !(|w_exec_done))
                                  : (busy_any && !(|w_conf_done));
  end

  assign en   = !arise_stall && !ext_stall;
  assign fire = pro_valid && en;

  assign w_id         = pro_id;
  assign w_exec_start = issue && pro_ctrl.exec;
  assign w_conf_start = issue && pro_ctrl.conf;
  assign w_conf_saddr = pro_a;
  assign w_conf_eaddr = pro_b;
  assign irq_block    = |w_irq_block;

  arise_iob #(.DEPTH(DEPTH)) u_iob (
    .clk, .rst_n,
    .mov_to     (fire && pro_ctrl.iob_wr),
    .mov_a      (pro_a),
    .mov_b      (pro_b),
    .mov_from   (fire && pro_ctrl.iob_rd),
    .mov_rdata  (iob_rdata),
    .in_clr     (w_exec_start),
    .out_rewind (|w_exec_done),
    .in_bank    (iob_in_bank),
    .in_count   (iob_in_count),
    .out_we     (iob_out_we),
    .out_wdata  (iob_out_wdata)
  );

  always_comb begin
    status = '0;
    status[ST_BUSY] = busy_any;
    status[ST_DONE] = st_done;
    status[ST_ERR]  = st_err;
    status[ST_CONF] = st_conf;
    status[ST_ID +: ID_W] = st_id;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_aw    <= '0;
      pro_valid <= 1'b0;
      pro_ctrl  <= '0;
      pro_id    <= '0;
      pro_opc   <= '0;
      pro_rd    <= '0;
      pro_a     <= '0;
      pro_b     <= '0;
      issued    <= 1'b0;
      wb_we     <= 1'b0;
      wb_rd     <= '0;
      wb_data   <= '0;
      st_done   <= 1'b0;
      st_err    <= 1'b0;
      st_conf   <= 1'b0;
      st_id     <= '0;
    end else begin
      if (en) begin
        pre_aw    <= aw_f;
        pro_valid <= pre_aw.valid;
        pro_ctrl  <= pre_ctrl;
        pro_id    <= pre_id;
        pro_opc   <= pre_aw.opc;
        pro_rd    <= pre_aw.rd;
        pro_a     <= pre_rs_val;
        pro_b     <= pre_rt_val;
      end
      if (fire)       issued <= 1'b0;
      else if (issue) issued <= 1'b1;

      wb_we <= fire && pro_ctrl.wb;
      if (fire && pro_ctrl.wb) begin
        wb_rd   <= pro_rd;
        wb_data <= pro_ctrl.rd_status ? status : iob_rdata;
      end

      if (issue) st_id <= pro_id;
      if (fire && pro_ctrl.rd_status) begin
        st_done <= 1'b0;
        st_err  <= 1'b0;
        st_conf <= 1'b0;
      end
      if (|w_exec_done) st_done <= 1'b1;
      if (|w_conf_done) st_conf <= 1'b1;
      if (pro_valid && !issued && !busy_any && !hit_any && (pro_ctrl.exec || pro_ctrl.conf))
        st_err <= 1'b1;
    end
  end

  // at most one wrapper may own an Id
  a_onehot_hit: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(w_hit));
  // a dispatched operation always has an owner
  a_issue_hit: assert property (@(posedge clk) disable iff (!rst_n) (w_exec_start || w_conf_start) |-> hit_any);
endmodule
