// cu_int: integer-operation processor attached to the ARISE interface as a
// reconfigurable computing unit.
//
// The unit is configured per operation: the configuration words its wrapper
// forwards for operation slot k are kept in cfg_q[k] (the last word received
// wins). A configuration word selects
//   [2:0] function: 0 sum, 1 a0-a1-..., 2 and, 3 or, 4 xor, 5 signed max,
//                   6 signed min, 7 multiply-accumulate of operand pairs
//   [7:4] operand count n (0: as many as the IOB input bank holds)
// and an operation reduces the first n operands of the IOB input bank to one
// result, written to output-bank place 0.
//
// Timing: one operand (one pair for multiply-accumulate) per cycle. After the
// start cycle S the result is written, and `done` pulses, in cycle S+n
// (S+ceil(n/2) for multiply-accumulate, whose odd n is rounded up to a
// whole pair), and at least S+1. This fixed latency is
// what the operation's ARISE configuration word should state. The
// multiprocessor calls for an integer-operation processor as one of its
// CUs; the function set, the configuration format and the serial datapath
// are this design's choices.
module cu_int
  import arise_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NOPS  = 4,
  localparam int unsigned IDX_W = (NOPS > 1) ? $clog2(NOPS) : 1,
  localparam int unsigned CW    = $clog2(DEPTH+1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_valid,
  input  logic [IDX_W-1:0]         cfg_idx,
  input  logic [XLEN-1:0]          cfg_data,
  input  logic                     start,
  input  logic [IDX_W-1:0]         op,
  input  logic [DEPTH-1:0][XLEN-1:0] in_bank,
  input  logic [CW-1:0]            in_count,
  output logic [DEPTH-1:0]         out_we,
  output logic [DEPTH-1:0][XLEN-1:0] out_wdata,
  output logic                     done
);
  typedef enum logic [2:0] {F_SUM, F_SUB, F_AND, F_OR, F_XOR, F_MAX, F_MIN, F_MAC} func_e;

  logic [7:0]      cfg_q [NOPS];
  logic            run;
  func_e           func;
  logic [CW-1:0]   n, k;
  logic [XLEN-1:0] acc, nxt, opnd, opnd2;

  always_comb begin
    opnd  = (32'(k) < DEPTH)     ? in_bank[k[CW-1:0]] : '0;
    opnd2 = (32'(k) + 1 < DEPTH) ? in_bank[k + 1'b1]  : '0;
    unique case (func)
      F_SUM: nxt = acc + opnd;
      F_SUB: nxt = acc - opnd;
      F_AND: nxt = acc & opnd;
      F_OR:  nxt = acc | opnd;
      F_XOR: nxt = acc ^ opnd;
      F_MAX: nxt = ($signed(opnd) > $signed(acc)) ? opnd : acc;
      F_MIN: nxt = ($signed(opnd) < $signed(acc)) ? opnd : acc;
      F_MAC: nxt = acc + opnd * opnd2;
      default: nxt = acc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NOPS; i++) cfg_q[i] <= '0;
      run  <= 1'b0;
      func <= F_SUM;
      n    <= '0;
      k    <= '0;
      acc  <= '0;
    end else begin
      if (cfg_valid) cfg_q[cfg_idx] <= cfg_data[7:0];
      if (start && !run) begin
        logic [CW-1:0] cnt;
        cnt  = (cfg_q[op][7:4] == 4'd0 || 32'(cfg_q[op][7:4]) > DEPTH)
               ? in_count : CW'(cfg_q[op][7:4]);
        func <= func_e'(cfg_q[op][2:0]);
        n    <= cnt;
        run  <= 1'b1;
        if (func_e'(cfg_q[op][2:0]) == F_MAC) begin
          acc <= in_bank[0] * in_bank[1];
          k   <= CW'(2);
        end else begin
          acc <= in_bank[0];
          k   <= CW'(1);
        end
      end else if (run) begin
        if (k < n) begin
          acc <= nxt;
          k   <= (func == F_MAC) ? k + CW'(2) : k + CW'(1);
        end else begin
          run <= 1'b0;
        end
      end
    end
  end

  assign done = run && !(k < n);
  always_comb begin
    out_we       = '0;
    out_wdata    = '0;
    out_we[0]    = done;
    out_wdata[0] = acc;
  end
endmodule
