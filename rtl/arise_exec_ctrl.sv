// arise_exec_ctrl: execution controller of an ARISE wrapper.
//
// Controls one ARISE operation on the wrapper's computing unit according to
// the operation's ARISE configuration word:
//   1. it checks whether the latency of the operation is given;
//   2. if it is, the operation lasts exactly `latency` cycles (0 counts as 1);
//      otherwise it lasts until the CU raises cu_done;
//   3. it reports completion (done, one-cycle pulse) so the interface can set
//      the ARISE status register;
//   4. while the operation runs it requests a CP stall unless the operation
//      is configured for concurrent mode, and blocks interrupts to the CP if
//      the configuration asks for it.
// Timing: cu_start is raised combinationally in the start cycle; busy is high
// from the next cycle until and including the cycle of `done`. A start while
// busy is ignored (the interface never issues one).
module arise_exec_ctrl
  import arise_pkg::*;
#(
  parameter int unsigned IDX_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IDX_W-1:0] op_idx,
  input  arise_cfg_t       cfg,        // configuration word of op_idx
  input  logic             cu_done,
  output logic             cu_start,
  output logic [IDX_W-1:0] cu_op,
  output logic             busy,
  output logic             stall_req,
  output logic             irq_block,
  output logic             done
);
  arise_cfg_t  cur;
  logic [15:0] cnt;

  assign cu_start = start && !busy;
  assign cu_op    = op_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= '0;
      cnt  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        cur  <= cfg;
        cnt  <= (cfg.latency == 16'd0) ? 16'd1 : cfg.latency;
      end
    end else begin
      if (cur.lat_known) cnt <= cnt - 1'b1;
      if (done) busy <= 1'b0;
    end
  end

  assign done      = busy && (cur.lat_known ? (cnt == 16'd1) : cu_done);
  assign stall_req = busy && !cur.concurrent;
  assign irq_block = busy && cur.block_irq;
endmodule
