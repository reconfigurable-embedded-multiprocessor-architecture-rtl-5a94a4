// tb_arise_exec_ctrl: fixed-latency operations must finish after exactly
// `latency` cycles, others when the CU signals done; stall and interrupt
// blocking follow the concurrent / block_irq bits of the configuration.
module tb_arise_exec_ctrl;
  import arise_pkg::*;
  logic clk = 0, rst_n, start, cu_done, cu_start, busy, stall_req, irq_block, done;
  logic [1:0] op_idx, cu_op;
  arise_cfg_t cfg;
  int checks = 0, failures = 0, cycles = 0;

  arise_exec_ctrl #(.IDX_W(2)) dut (.clk, .rst_n, .start, .op_idx, .cfg, .cu_done,
    .cu_start, .cu_op, .busy, .stall_req, .irq_block, .done);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycles++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  initial begin
    start = 0; cu_done = 0; op_idx = 0; cfg = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int lat, dly, n;
      bit known, conc, blk;
      known = (t % 2) == 0; conc = ($urandom % 2) == 1; blk = ($urandom % 2) == 1;
      lat = (t % 10 == 0) ? 0 : 1 + $urandom % 20;
      dly = 1 + $urandom % 15;
      @(negedge clk);
      cfg = '0; cfg.lat_known = known; cfg.concurrent = conc; cfg.block_irq = blk;
      cfg.latency = 16'(lat);
      start = 1; op_idx = 2'($urandom);
      #1; check(cu_start && cu_op == op_idx, "cu_start");
      @(negedge clk); start = 0; cfg = '0;   // later changes of cfg must not matter
      n = 0;
      while (1) begin
        n++;
        cu_done = !known && (n == dly);
        #1;
        check(busy, "busy");
        check(stall_req == !conc, "stall_req");
        check(irq_block == blk, "irq_block");
        if (done) break;
        @(negedge clk);
        if (n > 100) break;
      end
      @(posedge clk); #1; cu_done = 0;
      if (known) check(n == ((lat == 0) ? 1 : lat), "fixed latency");
      else       check(n == dly, "until cu_done");
      @(negedge clk); #1;
      check(!busy && !stall_req && !irq_block, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
