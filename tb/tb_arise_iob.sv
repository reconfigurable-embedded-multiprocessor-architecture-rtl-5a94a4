// tb_arise_iob: movta fills consecutive input places two at a time, the CU
// side sees them, in_clr rewinds; CU writes to the output bank are read back
// in order by movfa, out_rewind restarts the reading, overflow is dropped.
module tb_arise_iob;
  import arise_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n;
  logic mov_to, mov_from, in_clr, out_rewind;
  logic [31:0] mov_a, mov_b, mov_rdata;
  logic [D-1:0][31:0] in_bank, out_wdata;
  logic [3:0] in_count;
  logic [D-1:0] out_we;
  logic [31:0] ref_in [D], ref_out [D];
  int checks = 0, failures = 0, cycles = 0;

  arise_iob #(.DEPTH(D)) dut (.clk, .rst_n, .mov_to, .mov_a, .mov_b, .mov_from, .mov_rdata,
    .in_clr, .out_rewind, .in_bank, .in_count, .out_we, .out_wdata);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycles++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    mov_to = 0; mov_from = 0; in_clr = 0; out_rewind = 0; out_we = '0;
  endtask

  initial begin
    idle(); mov_a = 0; mov_b = 0; out_wdata = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      // fill the input bank with D/2 movta and one extra that overflows
      for (int m = 0; m <= D/2; m++) begin
        @(negedge clk); idle();
        mov_to = 1; mov_a = $urandom; mov_b = $urandom;
        if (m < D/2) begin ref_in[2*m] = mov_a; ref_in[2*m+1] = mov_b; end
        @(posedge clk); #1;
        check(in_count == 4'((m < D/2) ? 2*m+2 : D), "count");
      end
      for (int i = 0; i < D; i++) check(in_bank[i] == ref_in[i], "input place");
      @(negedge clk); idle(); in_clr = 1;
      @(posedge clk); #1; check(in_count == 0, "in_clr");
      // the CU writes every output place, some in one cycle, some in another
      @(negedge clk); idle();
      for (int i = 0; i < D; i++) begin
        out_wdata[i] = $urandom; ref_out[i] = out_wdata[i]; out_we[i] = (i % 2 == 0);
      end
      @(negedge clk); idle();
      for (int i = 0; i < D; i++) begin
        out_wdata[i] = $urandom; out_we[i] = (i % 2 == 1);
        if (i % 2 == 1) ref_out[i] = out_wdata[i];
      end
      out_rewind = 1;
      @(negedge clk); idle();
      for (int i = 0; i < D; i++) begin
        mov_from = 1; #1;
        check(mov_rdata == ref_out[i], "movfa order");
        @(negedge clk);
      end
      idle(); #1; check(mov_rdata == 0, "read past end");
      out_rewind = 1; @(negedge clk); idle(); #1;
      check(mov_rdata == ref_out[0], "rewind");
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
