// tb_arise_mp_top: end-to-end test of the multiprocessor at its default
// sizes.
//
// A small in-order model of the core processor (CP) runs a program that mixes
// its own instructions (addi, lw, sw) with ARISE instructions. The CP model
// fetches one word per cycle unless stall_cp is high, executes its own
// instructions at fetch, reads its register file for the interface at
// pre_rs / pre_rt and applies the interface's write-backs. Bitstreams are put
// into configuration memory through the load port first. The third wrapper's
// computing unit is a small model here: it reads one data-memory word
// through its wrapper and returns it together with in0 byte-reversed.
//
// The program configures five operations on three CUs, runs them in
// stalling and concurrent mode with given and unknown latency, lets the CP
// collide with a CU on data memory, reassigns an opc to another Id, executes
// an Id nobody owns, and reads results and status back. Every result is
// compared with a value computed here, the fixed-latency stall is timed, and
// each mechanism must have occurred at least once.
module tb_arise_mp_top;
  import arise_pkg::*;
  localparam int D = 8;

  logic clk = 0, rst_n;
  logic [31:0] if_instr, cp_instr, pre_rs_val, pre_rt_val, wb_data, status;
  logic if_valid, cp_ext_stall, stall_cp, irq_block, wb_we;
  logic [4:0] pre_rs, pre_rt, wb_rd;
  logic cp_mem_req, cp_mem_we, cp_mem_gnt, cp_mem_rvalid;
  logic [9:0] cp_mem_addr;
  logic [31:0] cp_mem_wdata, cp_mem_rdata;
  logic cmem_load_we;
  logic [7:0] cmem_load_addr;
  logic [31:0] cmem_load_wdata;
  logic x_cfg_valid, x_start, x_done;
  logic [1:0] x_cfg_idx, x_op;
  logic [31:0] x_cfg_data;
  logic [D-1:0][31:0] x_in_bank, x_out_wdata;
  logic [3:0] x_in_count;
  logic [D-1:0] x_out_we;
  logic x_mem_req, x_mem_we, x_mem_gnt, x_mem_rvalid;
  logic [9:0] x_mem_addr;
  logic [31:0] x_mem_wdata, x_mem_rdata;

  arise_mp_top dut (.*);

  always #5 clk = ~clk;
  initial begin rst_n = 1; #1 rst_n = 0; end   // a real falling edge for the asynchronous reset

  int checks = 0, failures = 0, cycles = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  // ---------------- program
  logic [31:0] prog [256];
  int plen = 0;
  function automatic void emit(logic [31:0] w); prog[plen] = w; plen++; endfunction
  function automatic void a_ins(arise_instr_e i, int opc, int rs, int rt, int rd);
    emit({ARISE_MAJOR, 5'(rs), 5'(rt), 5'(rd), 3'(i), 8'(opc)});
  endfunction
  function automatic void addi(int rt, int rs, int imm); emit({6'h09, 5'(rs), 5'(rt), 16'(imm)}); endfunction
  function automatic void lw  (int rt, int rs, int imm); emit({6'h23, 5'(rs), 5'(rt), 16'(imm)}); endfunction
  function automatic void sw  (int rt, int rs, int imm); emit({6'h2B, 5'(rs), 5'(rt), 16'(imm)}); endfunction
  function automatic void nop(); emit(32'h0); endfunction

  // ---------------- CP model: F, D, X stages; X lines up with the interface's
  // PRO stage, so the CP's own instructions act in program order with the
  // ARISE instructions. An addi in X is forwarded to the interface's PRE read.
  logic [31:0] rf [32];
  int pc;
  logic running, ld_pend;
  logic [4:0] ld_rd;
  logic [31:0] cur, xd, xx, x_res;
  logic pl_en;           // preload of data memory before the program
  logic [9:0] pl_addr;
  logic [31:0] pl_data;
  logic x_is_addi, x_is_mem;
  assign cur        = running ? prog[pc] : 32'h0;
  assign if_instr   = cur;
  assign if_valid   = running;
  assign x_is_addi  = xx[31:26] == 6'h09 && xx[20:16] != 0;
  assign x_is_mem   = xx[31:26] == 6'h23 || xx[31:26] == 6'h2B;
  assign x_res      = rf[xx[25:21]] + {{16{xx[15]}}, xx[15:0]};
  assign pre_rs_val = (x_is_addi && xx[20:16] == pre_rs) ? x_res : rf[pre_rs];
  assign pre_rt_val = (x_is_addi && xx[20:16] == pre_rt) ? x_res : rf[pre_rt];
  assign cp_mem_req   = pl_en || x_is_mem;
  assign cp_mem_we    = pl_en || xx[31:26] == 6'h2B;
  assign cp_mem_addr  = pl_en ? pl_addr : 10'(x_res);
  assign cp_mem_wdata = pl_en ? pl_data : rf[xx[20:16]];
  assign cp_ext_stall = 1'b0;

  always @(posedge clk) begin
    if (ld_pend && cp_mem_rvalid) begin rf[ld_rd] <= cp_mem_rdata; ld_pend <= 0; end
    if (wb_we) rf[wb_rd] <= wb_data;
    if (!stall_cp) begin
      if (running) check(cp_instr == ((cur[31:26] == ARISE_MAJOR) ? 32'h0 : cur), "CP gets a bubble for ARISE words");
      case (xx[31:26])
        6'h09: if (xx[20:16] != 0) rf[xx[20:16]] <= x_res;
        6'h23: begin ld_pend <= 1; ld_rd <= xx[20:16]; end
        default: ;
      endcase
      xx <= xd;
      xd <= cp_instr;
      if (running) pc <= pc + 1;
    end
  end

  // ---------------- third CU model: reads the data-memory word at in1 through
  // its wrapper, then returns in0 byte-reversed (place 0) and that word (place 1)
  logic x_run, x_gnt_seen;
  always @(posedge clk) begin
    if (x_start) begin x_run <= 1; x_gnt_seen <= 0; end
    else if (x_run) begin
      if (x_mem_gnt) x_gnt_seen <= 1;
      if (x_done) x_run <= 0;
    end
  end
  assign x_done      = x_run && x_mem_rvalid;
  assign x_mem_req   = x_run && !x_gnt_seen;
  assign x_mem_we    = 0;
  assign x_mem_addr  = 10'(x_in_bank[1]);
  assign x_mem_wdata = 0;
  always_comb begin
    x_out_we = '0; x_out_wdata = '0;
    x_out_we[0] = x_done; x_out_we[1] = x_done;
    x_out_wdata[0] = {x_in_bank[0][7:0], x_in_bank[0][15:8], x_in_bank[0][23:16], x_in_bank[0][31:24]};
    x_out_wdata[1] = x_mem_rdata;
  end

  // ---------------- mechanism counters
  int n_blocked = 0, n_bypass = 0, n_stall = 0, n_conc = 0, n_memconf = 0, n_irqblk = 0, n_xcfg = 0, n_cfgstall = 0;
  int run_len = 0, irq_rise = -1, stall_start = -1, fixed_stall = -1;
  logic prev_irq = 0, prev_stall = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (stall_cp) n_stall++;
    if (status[ST_BUSY] && !stall_cp && running) n_conc++;          // CP runs beside a CU
    if (cp_mem_req && !cp_mem_gnt) n_memconf++;                      // CU won the memory port
    if (irq_block) n_irqblk++;
    if (x_cfg_valid) n_xcfg++;
    if (stall_cp && dut.u_if.blocked) n_blocked++;                  // waiting for a running operation
    if (dut.u_if.fire && dut.u_if.pro_ctrl.tbl_wr && dut.u_if.pre_aw.valid &&
        dut.u_if.pro_opc == dut.u_if.pre_aw.opc) n_bypass++;         // setid bypassed to PRE
    if (stall_cp && dut.u_if.pro_ctrl.conf) n_cfgstall++;
    if (stall_cp && !prev_stall) stall_start = cycles;
    if (!stall_cp && prev_stall && irq_rise == stall_start + 1 && fixed_stall < 0)
      fixed_stall = cycles - stall_start;
    if (irq_block && !prev_irq) irq_rise = cycles;
    prev_irq <= irq_block; prev_stall <= stall_cp;
  end

  // ---------------- bitstreams
  logic [31:0] cm [64];
  function automatic logic [31:0] cfgw(bit known, bit conc, bit blk, int lat);
    arise_cfg_t c; c = '0; c.lat_known = known; c.concurrent = conc; c.block_irq = blk; c.latency = 16'(lat);
    return 32'(c);
  endfunction

  logic [31:0] v [12];
  logic [31:0] e_sum, e_mac, e_mac2, e_x;
  int err_before;

  initial begin
    for (int i = 0; i < 32; i++) rf[i] = 0;
    pc = 0; running = 0; pl_en = 0; pl_addr = 0; pl_data = 0; xd = 0; xx = 0; ld_pend = 0; ld_rd = 0; x_run = 0; x_gnt_seen = 0;
    cmem_load_we = 0; cmem_load_addr = 0; cmem_load_wdata = 0;
    for (int i = 0; i < 64; i++) cm[i] = 0;
    // 0: sum of 6 operands, latency 6 given, stalling, interrupts blocked
    cm[0]  = cfgw(1, 0, 1, 6);  cm[1]  = 32'h60;
    // 8: multiply-accumulate of 4 operands, latency 2 given, concurrent
    cm[8]  = cfgw(1, 1, 0, 2);  cm[9]  = 32'h47;
    // 16: gather 4 words, latency unknown, concurrent
    cm[16] = cfgw(0, 1, 0, 0);  cm[17] = 32'h40;
    // 24: scatter 3 words, latency unknown, stalling
    cm[24] = cfgw(0, 0, 0, 0);  cm[25] = 32'h31;
    // 32: third CU, latency unknown, stalling, two CU words
    cm[32] = cfgw(0, 0, 0, 0);  cm[33] = 32'hC0FFEE; cm[34] = 32'hBEEF;
    for (int i = 0; i < 12; i++) v[i] = 32'($urandom % 1000) + 1;

    // ---- program
    // r4..r9 operands, r13 base, r14 stride
    for (int i = 0; i < 6; i++) addi(4 + i, 0, int'(v[i]));
    addi(1, 0, 'h010); a_ins(A_SETID, 1, 1, 0, 0);
    addi(2, 0, 0); addi(3, 0, 1);
    addi(1, 0, 'h010); a_ins(A_SETID, 1, 1, 0, 0); a_ins(A_CONF, 1, 2, 3, 0);   // conf right after setid
    addi(1, 0, 'h011); addi(2, 0, 8);  addi(3, 0, 9);  a_ins(A_SETID, 2, 1, 0, 0); a_ins(A_CONF, 2, 2, 3, 0);
    addi(1, 0, 'h020); addi(2, 0, 16); addi(3, 0, 17); a_ins(A_SETID, 3, 1, 0, 0); a_ins(A_CONF, 3, 2, 3, 0);
    addi(1, 0, 'h021); addi(2, 0, 24); addi(3, 0, 25); a_ins(A_SETID, 4, 1, 0, 0); a_ins(A_CONF, 4, 2, 3, 0);
    addi(1, 0, 'h030); addi(2, 0, 32); addi(3, 0, 34); a_ins(A_SETID, 6, 1, 0, 0); a_ins(A_CONF, 6, 2, 3, 0);
    // sum (stalling, fixed latency)
    a_ins(A_MOVTA, 0, 4, 5, 0); a_ins(A_MOVTA, 0, 6, 7, 0); a_ins(A_MOVTA, 0, 8, 9, 0);
    a_ins(A_EXEC, 1, 0, 0, 0);
    a_ins(A_MOVFA, 0, 0, 0, 10);
    a_ins(A_RDST, 0, 0, 0, 11);
    // multiply-accumulate (concurrent): the CP keeps running addi meanwhile
    a_ins(A_MOVTA, 0, 4, 5, 0); a_ins(A_MOVTA, 0, 6, 7, 0);
    a_ins(A_EXEC, 2, 0, 0, 0);
    addi(20, 0, 77);
    a_ins(A_MOVFA, 0, 0, 0, 12);
    // gather (concurrent), CP memory accesses collide with the CU
    addi(13, 0, 100); addi(14, 0, 3);
    a_ins(A_MOVTA, 0, 13, 14, 0);
    a_ins(A_EXEC, 3, 0, 0, 0);
    sw(4, 0, 500); lw(21, 0, 500); sw(5, 0, 501);
    a_ins(A_MOVFA, 0, 0, 0, 15); a_ins(A_MOVFA, 0, 0, 0, 16); a_ins(A_MOVFA, 0, 0, 0, 17); a_ins(A_MOVFA, 0, 0, 0, 18);
    // scatter (stalling, until the CU is done)
    addi(13, 0, 200); addi(14, 0, 2);
    a_ins(A_MOVTA, 0, 13, 14, 0); a_ins(A_MOVTA, 0, 6, 7, 0); a_ins(A_MOVTA, 0, 8, 0, 0);
    a_ins(A_EXEC, 4, 0, 0, 0);
    lw(22, 0, 200); lw(23, 0, 202); lw(24, 0, 204);
    // third CU
    a_ins(A_MOVTA, 0, 9, 13, 0); a_ins(A_EXEC, 6, 0, 0, 0); a_ins(A_MOVFA, 0, 0, 0, 25); a_ins(A_MOVFA, 0, 0, 0, 29);
    // Id owned by nobody, then status
    addi(1, 0, 'h777); a_ins(A_SETID, 5, 1, 0, 0); a_ins(A_EXEC, 5, 0, 0, 0);
    nop(); a_ins(A_RDST, 0, 0, 0, 26);
    // opc 1 now names the multiply-accumulate operation
    addi(1, 0, 'h011); a_ins(A_SETID, 1, 1, 0, 0);
    a_ins(A_MOVTA, 0, 10, 9, 0); a_ins(A_MOVTA, 0, 8, 7, 0);
    a_ins(A_EXEC, 1, 0, 0, 0); a_ins(A_MOVFA, 0, 0, 0, 27);
    a_ins(A_RDST, 0, 0, 0, 28);
    nop(); nop(); nop();

    // memory contents for the gather
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); cmem_load_we = 1; cmem_load_addr = 8'(i); cmem_load_wdata = cm[i];
    end
    @(negedge clk); cmem_load_we = 0;
    // data memory image for the gather, written by the CP port before the program
    for (int i = 0; i < 4; i++) begin
      pl_en = 1; pl_addr = 10'(100 + 3*i); pl_data = v[6+i];
      @(negedge clk);
    end
    pl_en = 0;
    @(negedge clk); running = 1;
    wait (pc == plen);
    running = 0;
    repeat (5) @(posedge clk);

    e_sum = v[0] + v[1] + v[2] + v[3] + v[4] + v[5];
    e_mac = v[0] * v[1] + v[2] * v[3];
    e_mac2 = e_sum * v[5] + v[4] * v[3];
    e_x = {v[5][7:0], v[5][15:8], v[5][23:16], v[5][31:24]};
    check(rf[10] == e_sum, "sum result");
    check(rf[11][ST_DONE] && rf[11][ST_CONF] && rf[11][ST_ID +: ID_W] == 12'h010 && !rf[11][ST_ERR], "status after sum");
    check(rf[12] == e_mac, "multiply-accumulate result");
    check(rf[20] == 77, "CP instruction beside concurrent operation");
    for (int i = 0; i < 4; i++) check(rf[15+i] == v[6+i], $sformatf("gathered word %0d", i));
    check(rf[21] == v[0], "CP load after collision");
    check(rf[22] == v[2] && rf[23] == v[3] && rf[24] == v[4],
          $sformatf("scattered words %0d %0d %0d vs %0d %0d %0d", rf[22], rf[23], rf[24], v[2], v[3], v[4]));
    check(rf[25] == e_x, "third CU result");
    check(rf[29] == v[2], "third CU read data memory through its wrapper");
    check(rf[26][ST_ERR] && rf[26][ST_ID +: ID_W] == 12'h030, "unknown Id flagged");
    check(rf[27] == e_mac2, "opc reassigned to multiply-accumulate");
    check(!rf[28][ST_ERR] && rf[28][ST_DONE] && rf[28][ST_ID +: ID_W] == 12'h011, "status cleared by read");
    check(fixed_stall == 6, $sformatf("fixed-latency stall %0d cycles", fixed_stall));
    check(n_irqblk == 6, $sformatf("interrupts blocked %0d cycles", n_irqblk));
    check(n_xcfg == 2, "two words forwarded to third CU");
    check(n_stall > 0, "stall");
    check(n_conc > 0, "concurrent execution");
    check(n_memconf > 0, "memory conflict stall");
    check(n_cfgstall > 0, "configuration stall");
    check(n_blocked > 0, "wait for running operation");
    check(n_bypass > 0, "setid bypass");
    $display("mechanisms: stall=%0d concurrent=%0d memconflict=%0d irqblock=%0d cfgstall=%0d fixed_stall=%0d blocked=%0d bypass=%0d",
             n_stall, n_conc, n_memconf, n_irqblk, n_cfgstall, fixed_stall, n_blocked, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
