// tb_cu_int: every function with random operand counts and values against a
// reference reduction; the result and done must appear exactly n cycles
// (ceil(n/2) for multiply-accumulate) after the start cycle.
module tb_cu_int;
  import arise_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n, cfg_valid, start, done;
  logic [1:0] cfg_idx, op;
  logic [31:0] cfg_data;
  logic [D-1:0][31:0] in_bank, out_wdata;
  logic [3:0] in_count;
  logic [D-1:0] out_we;
  int checks = 0, failures = 0, cycles = 0;

  cu_int #(.DEPTH(D), .NOPS(4)) dut (.clk, .rst_n, .cfg_valid, .cfg_idx, .cfg_data, .start, .op,
    .in_bank, .in_count, .out_we, .out_wdata, .done);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycles++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  function automatic logic [31:0] model(int f, int n);
    logic [31:0] a;
    a = in_bank[0];
    if (f == 7) begin
      a = in_bank[0] * in_bank[1];
      for (int k = 2; k < n; k += 2) a += in_bank[k] * ((k + 1 < D) ? in_bank[k+1] : 0);
      return a;
    end
    for (int k = 1; k < n; k++) begin
      case (f)
        0: a = a + in_bank[k];
        1: a = a - in_bank[k];
        2: a = a & in_bank[k];
        3: a = a | in_bank[k];
        4: a = a ^ in_bank[k];
        5: a = ($signed(in_bank[k]) > $signed(a)) ? in_bank[k] : a;
        6: a = ($signed(in_bank[k]) < $signed(a)) ? in_bank[k] : a;
        default: ;
      endcase
    end
    return a;
  endfunction

  initial begin
    int fcfg [4], ncfg [4];
    cfg_valid = 0; cfg_idx = 0; cfg_data = 0; start = 0; op = 0; in_bank = '0; in_count = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int n, exp_lat, lat;
      logic [31:0] exp;
      if (t % 8 == 0) begin
        // reconfigure all four slots; two words per slot, the last wins
        for (int s = 0; s < 4; s++) begin
          fcfg[s] = $urandom % 8; ncfg[s] = $urandom % 9;
          @(negedge clk); cfg_valid = 1; cfg_idx = 2'(s); cfg_data = $urandom;
          @(negedge clk); cfg_data = {$urandom, 8'(ncfg[s] << 4 | fcfg[s])} ;
        end
        @(negedge clk); cfg_valid = 0;
      end
      op = 2'($urandom);
      for (int i = 0; i < D; i++) in_bank[i] = (t % 3 == 0) ? 32'($urandom % 20) - 10 : $urandom;
      in_count = 4'(1 + $urandom % D);
      n = (ncfg[op] == 0) ? in_count : ncfg[op];
      exp = model(fcfg[op], n);
      exp_lat = (fcfg[op] == 7) ? (n + 1) / 2 : n;
      if (exp_lat < 1) exp_lat = 1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done && lat < 50) begin @(negedge clk); lat++; end
      check(done, "done");
      check(out_we == 8'b1, "writes place 0");
      check(out_wdata[0] == exp, $sformatf("result f=%0d n=%0d", fcfg[op], n));
      check(lat == exp_lat, $sformatf("latency %0d vs %0d", lat, exp_lat));
      @(negedge clk); check(!done && out_we == 0, "single pulse");
    end
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
