// tb_shared_mem: random writes and reads against a reference array; a read
// returns its word one cycle after the request.
module tb_shared_mem;
  localparam int WORDS = 64;
  logic clk = 0, rst_n, en, we;
  logic [5:0] addr;
  logic [31:0] wdata, rdata, ref_mem [WORDS], expect_q;
  logic pend;
  int checks = 0, failures = 0, cycles = 0;

  shared_mem #(.WORDS(WORDS), .W(32)) dut (.clk, .rst_n, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycles++;

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0; pend = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 6'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== expect_q) begin failures++; $display("FAIL read %h %h", rdata, expect_q); end
      end
      en = ($urandom % 4) != 0; we = ($urandom % 3) == 0; addr = 6'($urandom); wdata = $urandom;
      pend = en && !we;
      expect_q = ref_mem[addr];
      if (en && we) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
