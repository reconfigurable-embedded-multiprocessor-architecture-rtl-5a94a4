// tb_arise_mem_arbiter: random requests from three CUs and the CP against a
// reference priority model; writes land in a memory model, reads come back
// one cycle later to the right requester, and the CP is stalled exactly when
// a CU competes with it.
module tb_arise_mem_arbiter;
  import arise_pkg::*;
  localparam int NM = 3;
  logic clk = 0, rst_n;
  logic [NM-1:0] cu_req, cu_we, cu_gnt, cu_rvalid;
  logic [NM-1:0][9:0] cu_addr;
  logic [NM-1:0][31:0] cu_wdata;
  logic cp_req, cp_we, cp_gnt, cp_rvalid, cp_stall, mem_en, mem_we;
  logic [9:0] cp_addr, mem_addr;
  logic [31:0] cp_wdata, mem_wdata, rdata;
  logic [31:0] mem [1024];
  int checks = 0, failures = 0, cycles = 0, stalls = 0;
  int exp_who;  // -1 none, 0..NM-1 CU, NM for CP
  logic [31:0] exp_rdata;
  logic exp_rd;

  arise_mem_arbiter #(.NM(NM), .DA_W(10)) dut (.clk, .rst_n, .cu_req, .cu_we, .cu_addr, .cu_wdata,
    .cu_gnt, .cu_rvalid, .cp_req, .cp_we, .cp_addr, .cp_wdata, .cp_gnt, .cp_rvalid, .cp_stall,
    .mem_en, .mem_we, .mem_addr, .mem_wdata);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycles++;
  always @(posedge clk) begin
    if (mem_en && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_en && !mem_we) rdata <= mem[mem_addr];
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    cu_req = 0; cu_we = 0; cu_addr = 0; cu_wdata = 0; cp_req = 0; cp_we = 0; cp_addr = 0; cp_wdata = 0;
    exp_rd = 0; exp_who = -1;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      // read issued last cycle
      if (exp_rd) begin
        check(rdata == exp_rdata, "read data");
        for (int i = 0; i < NM; i++) check(cu_rvalid[i] == (exp_who == i), "cu rvalid");
        check(cp_rvalid == (exp_who == NM), "cp rvalid");
      end else begin
        check(cu_rvalid == 0 && !cp_rvalid, "no rvalid");
      end
      for (int i = 0; i < NM; i++) begin
        cu_req[i] = ($urandom % 5) == 0; cu_we[i] = $urandom; cu_addr[i] = 10'($urandom % 16);
        cu_wdata[i] = $urandom;
      end
      cp_req = ($urandom % 2) == 0; cp_we = $urandom; cp_addr = 10'($urandom % 16); cp_wdata = $urandom;
      #1;
      exp_who = -1;
      for (int i = NM-1; i >= 0; i--) if (cu_req[i]) exp_who = i;
      if (exp_who < 0 && cp_req) exp_who = NM;
      for (int i = 0; i < NM; i++) check(cu_gnt[i] == (exp_who == i), "cu grant");
      check(cp_gnt == (exp_who == NM), "cp grant");
      check(cp_stall == (cp_req && exp_who != NM), "cp stall");
      if (cp_stall) stalls++;
      exp_rd = 0;
      if (exp_who >= 0 && exp_who < NM) begin
        exp_rd = !cu_we[exp_who]; exp_rdata = mem[cu_addr[exp_who]];
        if (cu_we[exp_who]) begin @(posedge clk); #1; check(mem[cu_addr[exp_who]] == cu_wdata[exp_who], "cu write"); end
      end else if (exp_who == NM) begin
        exp_rd = !cp_we; exp_rdata = mem[cp_addr];
        if (cp_we) begin @(posedge clk); #1; check(mem[cp_addr] == cp_wdata, "cp write"); end
      end
    end
    check(stalls > 0, "cp stall seen");
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
