// tb_arise_cfg_ctrl: bitstreams of random length are fetched from a model of
// the configuration memory; the first word must reach the table, the rest the
// CU in order, and busy must last exactly K+1 cycles for K words.
module tb_arise_cfg_ctrl;
  import arise_pkg::*;
  logic clk = 0, rst_n, start;
  logic [7:0] start_addr, end_addr, cmem_addr;
  logic [1:0] op_idx, tbl_idx, cu_cfg_idx;
  logic cmem_re, tbl_we, cu_cfg_valid, busy, done;
  logic [31:0] cmem_rdata, cu_cfg_data;
  arise_cfg_t tbl_wdata;
  logic [31:0] cmem [256];
  int checks = 0, failures = 0, cycles = 0;

  arise_cfg_ctrl #(.CA_W(8), .IDX_W(2)) dut (.clk, .rst_n, .start, .start_addr, .end_addr, .op_idx,
    .cmem_re, .cmem_addr, .cmem_rdata, .tbl_we, .tbl_idx, .tbl_wdata,
    .cu_cfg_valid, .cu_cfg_idx, .cu_cfg_data, .busy, .done);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycles++;
  always @(posedge clk) if (cmem_re) cmem_rdata <= cmem[cmem_addr];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) cmem[i] = $urandom;
    start = 0; start_addr = 0; end_addr = 0; op_idx = 0; cmem_rdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int k, n_tbl, n_cu, busy_cycles;
      bit seen_done;
      logic [7:0] s;
      s = 8'($urandom % 200);
      k = 1 + ($urandom % 12);
      if (t == 5) k = 0;   // end below start: only the ARISE word
      @(negedge clk);
      start = 1; start_addr = s; end_addr = (k == 0) ? s - 1 : s + 8'(k - 1); op_idx = 2'($urandom);
      @(negedge clk); start = 0;
      if (k == 0) k = 1;
      n_tbl = 0; n_cu = 0; busy_cycles = 0; seen_done = 0;
      while (busy) begin
        busy_cycles++;
        if (tbl_we) begin
          n_tbl++;
          check(tbl_wdata == arise_cfg_t'(cmem[s]) && tbl_idx == op_idx, "table word");
        end
        if (cu_cfg_valid) begin
          n_cu++;
          check(cu_cfg_data == cmem[s + 8'(n_cu)] && cu_cfg_idx == op_idx, "cu word");
        end
        if (done) begin
          seen_done = 1;
          check(!tbl_we || k == 1, "done with last word");
        end
        @(negedge clk);
        if (busy_cycles > 100) break;
      end
      check(n_tbl == 1, "one table word");
      check(n_cu == k - 1, "cu word count");
      check(busy_cycles == k + 1, "busy cycles = K+1");
      check(seen_done, "done pulse");
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
