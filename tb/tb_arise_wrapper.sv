// tb_arise_wrapper: Id-range decoding, configuration of each operation from a
// configuration-memory model (ARISE word kept, CU words forwarded), and
// execution under the stored configuration: fixed latency against a CU that
// signals done, stalling vs concurrent mode, interrupt blocking, and CU
// memory requests passed on only while an operation runs.
module tb_arise_wrapper;
  import arise_pkg::*;
  localparam logic [11:0] BASE = 12'h020;
  logic clk = 0, rst_n;
  logic [11:0] id;
  logic hit, will_stall, exec_start, conf_start, busy, exec_busy, stall_req, irq_block, exec_done, conf_done;
  logic [7:0] cs, ce, cmem_addr;
  logic cmem_re, cu_cfg_valid, cu_start, cu_done;
  logic [31:0] cmem_rdata, cu_cfg_data;
  logic [1:0] cu_cfg_idx, cu_op;
  logic cu_mem_req, cu_mem_we, mem_req, mem_we;
  logic [9:0] cu_mem_addr, mem_addr;
  logic [31:0] cu_mem_wdata, mem_wdata;
  logic [31:0] cmem [256];
  int checks = 0, failures = 0, cycles = 0, cu_words = 0;

  arise_wrapper #(.ID_BASE(BASE), .NOPS(4), .CA_W(8), .DA_W(10)) dut (.clk, .rst_n, .id, .hit, .will_stall,
    .exec_start, .conf_start, .conf_start_addr(cs), .conf_end_addr(ce), .busy, .exec_busy, .stall_req,
    .irq_block, .exec_done, .conf_done, .cmem_re, .cmem_addr, .cmem_rdata, .cu_cfg_valid, .cu_cfg_idx,
    .cu_cfg_data, .cu_start, .cu_op, .cu_done, .cu_mem_req, .cu_mem_we, .cu_mem_addr, .cu_mem_wdata,
    .mem_req, .mem_we, .mem_addr, .mem_wdata);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycles++;
  always @(posedge clk) if (cmem_re) cmem_rdata <= cmem[cmem_addr];
  always @(posedge clk) if (cu_cfg_valid) cu_words++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  initial begin
    arise_cfg_t c [4];
    int cu_delay [4];
    exec_start = 0; conf_start = 0; cs = 0; ce = 0; id = 0; cu_done = 0;
    cu_mem_req = 0; cu_mem_we = 0; cu_mem_addr = 0; cu_mem_wdata = 0; cmem_rdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // Id range
    for (int i = 0; i < 64; i++) begin
      id = 12'(i); #1; check(hit == (i >= 32 && i < 36), "hit range");
    end
    id = 12'hFFF; #1; check(!hit, "no hit far away");
    for (int round = 0; round < 6; round++) begin
      // configure all four operations
      for (int op = 0; op < 4; op++) begin
        int len, n;
        c[op] = '0;
        c[op].lat_known = $urandom; c[op].concurrent = $urandom; c[op].block_irq = $urandom;
        c[op].latency = 16'(1 + $urandom % 12);
        cu_delay[op] = 1 + $urandom % 10;
        len = 1 + $urandom % 5;
        cmem[op * 40] = 32'(c[op]);
        for (int k = 1; k < len; k++) cmem[op * 40 + k] = $urandom;
        cu_words = 0;
        @(negedge clk); id = BASE + 12'(op); cs = 8'(op * 40); ce = 8'(op * 40 + len - 1); conf_start = 1;
        @(negedge clk); conf_start = 0;
        n = 0;
        while (!conf_done && n < 50) begin
          check(busy && !exec_busy, "busy while configuring");
          @(negedge clk); n++;
        end
        check(n == len, "configuration length");
        @(negedge clk);
        check(cu_words == len - 1, "CU words forwarded");
        check(!busy, "idle after conf");
      end
      // run each operation
      for (int op = 0; op < 4; op++) begin
        int n, dly;
        dly = cu_delay[op];
        @(negedge clk); id = BASE + 12'(op); #1;
        check(will_stall == !c[op].concurrent, "will_stall");
        exec_start = 1; #1;
        check(cu_start && cu_op == 2'(op), "cu_start");
        cu_mem_req = 1; #1; check(!mem_req, "no memory access when idle");
        @(negedge clk); exec_start = 0; n = 0;
        while (1) begin
          n++;
          cu_done = (n == dly);
          #1;
          check(mem_req, "CU memory request passed on");
          check(stall_req == !c[op].concurrent && irq_block == c[op].block_irq, "stall/irq");
          if (exec_done) break;
          @(negedge clk);
          if (n > 60) break;
        end
        @(posedge clk); #1; cu_done = 0; cu_mem_req = 0;
        if (c[op].lat_known) check(n == c[op].latency, "fixed latency");
        else check(n == dly, "latency by CU done");
        @(negedge clk); check(!busy && !stall_req && !irq_block, "idle after exec");
      end
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
