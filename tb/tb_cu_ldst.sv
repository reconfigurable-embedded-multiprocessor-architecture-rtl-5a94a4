// tb_cu_ldst: gather loads and scatter stores with random base, stride and
// count through a memory model whose grant is randomly withheld (as when the
// port is busy); loaded words must reach the output bank in order, stored
// words the right addresses, and done must come with the last transfer.
module tb_cu_ldst;
  import arise_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n, cfg_valid, start, done;
  logic [1:0] cfg_idx, op;
  logic [31:0] cfg_data;
  logic [D-1:0][31:0] in_bank, out_wdata;
  logic [3:0] in_count;
  logic [D-1:0] out_we;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [9:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [31:0] mem [1024], obank [D];
  int checks = 0, failures = 0, cycles = 0, denied = 0;

  cu_ldst #(.DEPTH(D), .NOPS(4), .DA_W(10)) dut (.clk, .rst_n, .cfg_valid, .cfg_idx, .cfg_data,
    .start, .op, .in_bank, .in_count, .out_we, .out_wdata, .done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycles++;

  // memory model: random grant, one-cycle read latency
  initial mem_gnt = 1;
  always @(posedge clk) mem_gnt <= ($urandom % 3) != 0;
  always @(posedge clk) begin
    mem_rvalid <= mem_req && mem_gnt && !mem_we;
    if (mem_req && !mem_gnt) denied++;
    if (mem_req && mem_gnt && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_req && mem_gnt && !mem_we) mem_rdata <= mem[mem_addr];
    for (int i = 0; i < D; i++) if (out_we[i]) obank[i] <= out_wdata[i];
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  initial begin
    int mode [4], cnt [4];
    for (int i = 0; i < 1024; i++) mem[i] = $urandom;
    cfg_valid = 0; cfg_idx = 0; cfg_data = 0; start = 0; op = 0; in_bank = '0; in_count = 0;
    mem_rvalid = 0; mem_rdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      mode[s] = s % 2; cnt[s] = (s < 2) ? 0 : 1 + $urandom % 6;
      @(negedge clk); cfg_valid = 1; cfg_idx = 2'(s); cfg_data = 32'(cnt[s] << 4 | mode[s]);
    end
    @(negedge clk); cfg_valid = 0;
    for (int t = 0; t < 120; t++) begin
      int n, base, stride, guard;
      logic [31:0] img [1024];
      op = 2'($urandom);
      base = $urandom % 1024; stride = 1 + $urandom % 40;
      in_bank[0] = 32'(base); in_bank[1] = 32'(stride);
      for (int i = 2; i < D; i++) in_bank[i] = $urandom;
      in_count = 4'(2 + $urandom % (D - 1));
      if (mode[op] == 0) n = (cnt[op] == 0) ? D : cnt[op];
      else n = (cnt[op] == 0) ? in_count - 2 : cnt[op];
      for (int i = 0; i < D; i++) obank[i] = 32'hdead_0000 + i;
      img = mem;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      guard = 0;
      while (!done && guard < 200) begin @(negedge clk); guard++; end
      check(done, "done");
      @(negedge clk);
      for (int j = 0; j < n; j++) begin
        int a;
        a = (base + j * stride) % 1024;
        if (mode[op] == 0) check(obank[j] == img[a], $sformatf("load %0d", j));
        else begin
          img[a] = in_bank[2+j];
        end
      end
      if (mode[op] == 1) check(mem == img, "store image");
      else for (int j = n; j < D; j++) check(obank[j] == 32'hdead_0000 + j, "untouched place");
    end
    check(denied > 0, "grant withheld at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
