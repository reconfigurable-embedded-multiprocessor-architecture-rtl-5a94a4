// tb_arise_interface: the interface pipeline driven by an instruction stream
// and one modelled wrapper (Ids 0x010-0x013). The register file is modelled
// as value(r) = 0x100*r + 5. Checks the CP bubble, operand capture into the
// IOB, Id lookup and the setid bypass, dispatch pulses, the stall length of
// stalling (latency L) and concurrent operations, waiting while an
// operation runs, configuration stalls, movfa / rdst write-back and the
// unknown-Id status bit.
module tb_arise_interface;
  import arise_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n;
  logic [31:0] if_instr, cp_instr, pre_rs_val, pre_rt_val, wb_data, status, w_conf_saddr, w_conf_eaddr;
  logic if_valid, ext_stall, arise_stall, irq_block, wb_we, w_exec_start, w_conf_start;
  logic [4:0] pre_rs, pre_rt, wb_rd;
  logic [11:0] w_id;
  logic [0:0] w_hit, w_will_stall, w_busy, w_stall_req, w_irq_block, w_exec_done, w_conf_done;
  logic [D-1:0][31:0] iob_in_bank, iob_out_wdata;
  logic [3:0] iob_in_count;
  logic [D-1:0] iob_out_we;
  int checks = 0, failures = 0, cycles = 0;

  arise_interface #(.NW(1), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycles++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  function automatic logic [31:0] rv(logic [4:0] r); return 32'h100 * r + 5; endfunction
  assign pre_rs_val = rv(pre_rs);
  assign pre_rt_val = rv(pre_rt);
  assign ext_stall  = 1'b0;

  // ---------------- wrapper model
  int lat = 3;            // latency of the next operation
  logic conc = 0;         // concurrent mode of the next operation
  int cnt;
  logic ex_busy, cf_busy, cur_conc;
  logic [31:0] res_seed;
  assign w_hit[0]        = w_id >= 12'h010 && w_id < 12'h014;
  assign w_will_stall[0] = w_hit[0] && !conc;
  assign w_busy[0]       = ex_busy || cf_busy;
  assign w_stall_req[0]  = ex_busy && !cur_conc;
  assign w_irq_block[0]  = ex_busy;
  assign w_exec_done[0]  = ex_busy && cnt == 1;
  assign w_conf_done[0]  = cf_busy && cnt == 1;
  always_comb begin
    iob_out_we = '0;
    for (int i = 0; i < D; i++) iob_out_wdata[i] = res_seed + 32'(i);
    if (w_exec_done[0]) iob_out_we = '1;
  end
  always @(posedge clk) begin
    if (w_exec_start && w_hit[0]) begin ex_busy <= 1; cnt <= lat; cur_conc <= conc; end
    else if (w_conf_start && w_hit[0]) begin cf_busy <= 1; cnt <= 4; end
    else if (ex_busy || cf_busy) begin
      cnt <= cnt - 1;
      if (cnt == 1) begin ex_busy <= 0; cf_busy <= 0; end
    end
  end

  // ---------------- instruction driver
  function automatic logic [31:0] aw(arise_instr_e i, int opc, int rs, int rt, int rd);
    return {ARISE_MAJOR, 5'(rs), 5'(rt), 5'(rd), 3'(i), 8'(opc)};
  endfunction
  int stall_cycles;
  int wb_n = 0;
  logic [4:0] wb_rds [16];
  logic [31:0] wb_vals [16];
  always @(posedge clk) if (wb_we) begin wb_rds[wb_n] <= wb_rd; wb_vals[wb_n] <= wb_data; wb_n <= wb_n + 1; end

  task automatic issue(logic [31:0] w);
    @(negedge clk);
    if_instr = w; if_valid = 1;
    #1;
    check(cp_instr == ((w[31:26] == ARISE_MAJOR) ? 32'h0 : w), "CP word");
    @(posedge clk);
    while (arise_stall) begin stall_cycles++; @(posedge clk); end
  endtask
  task automatic flush();
    for (int i = 0; i < 4; i++) issue(32'h0);
  endtask

  logic [11:0] seen_id;
  int starts = 0;
  always @(posedge clk) if (w_exec_start) begin seen_id <= w_id; starts <= starts + 1; end

  initial begin
    if_instr = 0; if_valid = 0; ex_busy = 0; cf_busy = 0; cnt = 0; cur_conc = 0; res_seed = 32'h5000;
    repeat (2) @(posedge clk); rst_n = 1;
    // register specifiers reach the CP at PRE
    @(negedge clk); if_instr = aw(A_MOVTA, 0, 7, 9, 0); if_valid = 1;
    @(negedge clk); if_instr = 0; #1; check(pre_rs == 7 && pre_rt == 9, "register specifiers at PRE");
    flush();
    check(iob_in_count == 2 && iob_in_bank[0] == rv(7) && iob_in_bank[1] == rv(9), "movta");
    issue(aw(A_MOVTA, 0, 1, 2, 0)); issue(aw(A_MOVTA, 0, 3, 4, 0)); flush();
    check(iob_in_count == 6 && iob_in_bank[4] == rv(3) && iob_in_bank[5] == rv(4), "consecutive places");

    // configuration: opc 0x12 maps to Id 0x012 after reset
    stall_cycles = 0;
    issue(aw(A_CONF, 8'h12, 10, 11, 0)); flush();
    check(stall_cycles == 4, $sformatf("configuration stall %0d", stall_cycles));

    // stalling operation, latency 5
    lat = 5; conc = 0; stall_cycles = 0;
    issue(aw(A_EXEC, 8'h12, 0, 0, 0)); flush();
    check(seen_id == 12'h012, "Id from table");
    check(stall_cycles == 5, $sformatf("stall of latency %0d", stall_cycles));
    check(iob_in_count == 0, "input bank rewound at execute");
    issue(aw(A_MOVFA, 0, 0, 0, 3)); issue(aw(A_MOVFA, 0, 0, 0, 4)); flush();
    check(wb_n == 2 && wb_rds[0] == 3 && wb_vals[0] == 32'h5000 && wb_rds[1] == 4 && wb_vals[1] == 32'h5001, "movfa");

    // setid of opc 7 to rv(0)[11:0] = 0x005, an Id no wrapper owns, then execute it
    lat = 2; conc = 1; stall_cycles = 0;
    issue(aw(A_SETID, 7, 0, 0, 0));      // opc 7 -> Id rv(0)[11:0] = 0x005: nobody owns it
    issue(aw(A_EXEC, 7, 0, 0, 0)); flush();
    check(starts == 1, "no dispatch for an unowned Id");
    check(status[ST_ERR], "unknown Id flagged");
    // concurrent operation on Id 0x010, then a movta that has to wait for it
    issue(aw(A_EXEC, 8'h10, 0, 0, 0));
    issue(aw(A_MOVTA, 0, 1, 1, 0));      // must wait for the running operation
    flush();
    check(starts == 2 && seen_id == 12'h010, "concurrent dispatch");
    check(stall_cycles >= 1 && stall_cycles <= 2, $sformatf("concurrent: only the wait stalls (%0d)", stall_cycles));
    // setid immediately followed by execute of the same opc uses the new Id
    issue(aw(A_SETID, 8'h11, 0, 0, 0));  // opc 0x11 -> 0x005
    issue(aw(A_EXEC, 8'h11, 0, 0, 0)); flush();
    check(starts == 2, "bypassed Id 0x005 not dispatched");
    issue(aw(A_RDST, 0, 0, 0, 9)); flush();
    check(wb_rds[wb_n-1] == 9 && wb_vals[wb_n-1][ST_ERR] && wb_vals[wb_n-1][ST_DONE] && wb_vals[wb_n-1][ST_CONF]
          && wb_vals[wb_n-1][ST_ID +: 12] == 12'h010, "rdst value");
    check(!status[ST_ERR] && !status[ST_DONE], "status cleared by rdst");
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
