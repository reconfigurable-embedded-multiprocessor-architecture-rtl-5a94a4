// tb_arise_opc_id_table: reset mapping, random rewrites against a reference
// array, and reassignment of one opc to a second Id.
module tb_arise_opc_id_table;
  import arise_pkg::*;
  logic clk = 0, rst_n;
  logic [OPC_W-1:0] rd_opc, wr_opc;
  logic [ID_W-1:0]  rd_id, wr_id;
  logic             wr_en;
  logic [ID_W-1:0]  ref_tbl [256];
  int checks = 0, failures = 0, cycles = 0;

  arise_opc_id_table dut (.clk, .rst_n, .rd_opc, .rd_id, .wr_en, .wr_opc, .wr_id);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycles++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wr_en = 0; wr_opc = 0; wr_id = 0; rd_opc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) ref_tbl[i] = ID_W'(i);
    for (int i = 0; i < 256; i += 17) begin
      rd_opc = 8'(i); #1; check(rd_id == ID_W'(i), "reset mapping");
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      wr_en  = ($urandom % 2) == 0;
      wr_opc = 8'($urandom);
      wr_id  = ID_W'($urandom);
      rd_opc = 8'($urandom);
      #1;
      check(rd_id == ref_tbl[rd_opc], "read");
      @(posedge clk);
      if (wr_en) ref_tbl[wr_opc] = wr_id;
    end
    // the same opc names two different operations over time
    @(negedge clk); wr_en = 1; wr_opc = 8'h05; wr_id = 12'h011;
    @(negedge clk); wr_en = 0; rd_opc = 8'h05; #1; check(rd_id == 12'h011, "assign 1");
    @(negedge clk); wr_en = 1; wr_opc = 8'h05; wr_id = 12'h022;
    @(negedge clk); wr_en = 0; #1; check(rd_id == 12'h022, "reassign");
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
