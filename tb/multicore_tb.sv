// End-to-end testbench for the quad-core system at its default size.
//
// A dual-port test memory holds a parallel vector-add program at 0x200 and
// its data: src0 at 0x2000, src1 at 0x2400, dest at 0x3000.  All three
// arrays map onto the same data-cache sets, so the run has conflict misses
// and dirty write-backs.  Every core reads its id, the core count and, from
// its manager source, the block length n; it adds its block of
// src0 + src1 into dest inside the stats_en region, then re-reads its block
// of dest through a called subroutine and sends id, core count and the sum
// to its manager sink.  The sums are checked against values computed here.
//
// The statistics hooks are counted over the stats_en region as in a
// simulator report, and the mechanisms of the design must each occur at
// least once: I-cache hits and misses in every core, D-cache hits and
// misses in every bank, dirty write-backs, requests of several cores
// queued in CacheNet at once, several I-caches competing for the refill
// MemNet bus in one cycle, manager traffic, and in the cores' pipelines
// branch/jalr squashes, jal redirects, load-use stalls and operand bypasses.
module multicore_tb;
  import mcore_pkg::*;
  import rv_asm_pkg::*;

  localparam int NC = 4;
  localparam int BLK = 24;              // elements per core

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic          m2p_val [NC], m2p_rdy [NC], p2m_val [NC], p2m_rdy [NC];
  logic [31:0]   m2p_msg [NC], p2m_msg [NC];
  logic          mreq_val [2], mreq_rdy [2], mresp_val [2], mresp_rdy [2];
  mem_req_16B_t  mreq_msg [2];
  mem_resp_16B_t mresp_msg [2];
  logic [NC-1:0] commit_inst, icache_miss, icache_access, dcache_miss, dcache_access;
  logic          stats_en;

  multicore dut (
    .clk, .reset,
    .mngr2proc_val(m2p_val), .mngr2proc_rdy(m2p_rdy), .mngr2proc_msg(m2p_msg),
    .proc2mngr_val(p2m_val), .proc2mngr_rdy(p2m_rdy), .proc2mngr_msg(p2m_msg),
    .imemreq_val(mreq_val[0]), .imemreq_rdy(mreq_rdy[0]), .imemreq_msg(mreq_msg[0]),
    .imemresp_val(mresp_val[0]), .imemresp_rdy(mresp_rdy[0]), .imemresp_msg(mresp_msg[0]),
    .dmemreq_val(mreq_val[1]), .dmemreq_rdy(mreq_rdy[1]), .dmemreq_msg(mreq_msg[1]),
    .dmemresp_val(mresp_val[1]), .dmemresp_rdy(mresp_rdy[1]), .dmemresp_msg(mresp_msg[1]),
    .commit_inst, .icache_miss, .icache_access, .dcache_miss, .dcache_access, .stats_en);

  test_mem #(.NPORTS(2), .LAT(2), .STALL_PCT(10)) u_mem (
    .clk, .reset,
    .req_val(mreq_val), .req_rdy(mreq_rdy), .req_msg(mreq_msg),
    .resp_val(mresp_val), .resp_rdy(mresp_rdy), .resp_msg(mresp_msg));

  int checks = 0, failures = 0;
  logic [31:0] prog [$];
  logic [31:0] exp_out [NC][3];
  int got [NC];
  bit sent_n [NC];

  // statistics and mechanism counters
  int cycles = 0, stat_cycles = 0, commits [NC], ic_miss [NC], ic_acc [NC], dc_miss [NC], dc_acc [NC];
  int writebacks = 0, cnet_contention = 0, inet_contention = 0, m2p_cnt = 0, p2m_cnt = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // pipeline events inside each core
  logic [NC-1:0] p_squash, p_jal, p_loaduse, p_bypass;
  for (genvar c = 0; c < NC; c++) begin : g_probe
    assign p_squash[c]  = dut.g_core[c].u_proc.x_redirect;
    assign p_jal[c]     = dut.g_core[c].u_proc.d_redirect;
    assign p_loaduse[c] = dut.g_core[c].u_proc.d_hazard;
    // an operand in D whose newest value is still in X, M or W
    assign p_bypass[c]  = dut.g_core[c].u_proc.fd_valid && dut.g_core[c].u_proc.use_rs1
                          && dut.g_core[c].u_proc.rs1 != 5'd0
                          && ((dut.g_core[c].u_proc.dx_q.valid && dut.g_core[c].u_proc.dx_q.wen
                               && dut.g_core[c].u_proc.dx_q.rd == dut.g_core[c].u_proc.rs1)
                           || (dut.g_core[c].u_proc.xm_q.valid && dut.g_core[c].u_proc.xm_q.wen
                               && dut.g_core[c].u_proc.xm_q.rd == dut.g_core[c].u_proc.rs1)
                           || (dut.g_core[c].u_proc.mw_q.valid && dut.g_core[c].u_proc.mw_q.wen
                               && dut.g_core[c].u_proc.mw_q.rd == dut.g_core[c].u_proc.rs1));
  end
  int squashes = 0, jal_redirects = 0, load_use = 0, bypasses = 0;

  always @(posedge clk) if (!reset) begin
    int v, w;
    cycles++;
    squashes += $countones(p_squash);
    jal_redirects += $countones(p_jal);
    load_use += $countones(p_loaduse);
    bypasses += $countones(p_bypass);
    if (stats_en) begin
      stat_cycles++;
      for (int c = 0; c < NC; c++) begin
        commits[c] += int'(commit_inst[c]);
        ic_miss[c] += int'(icache_miss[c]);  ic_acc[c] += int'(icache_access[c]);
        dc_miss[c] += int'(dcache_miss[c]);  dc_acc[c] += int'(dcache_access[c]);
      end
    end
    if (mreq_val[1] && mreq_rdy[1] && mreq_msg[1].typ == MEM_WRITE) writebacks++;
    v = 0; w = 0;
    for (int c = 0; c < NC; c++) begin
      v += int'(dut.u_dcache.u_cachenet.u_reqnet.iq_val[c]) + int'(dut.u_dcache.u_cachenet.reqout_val[c]);
      w += int'(dut.u_imemnet.u_reqnet.iq_val[c]);
    end
    if (v > 1) cnet_contention++;
    if (w > 1) inet_contention++;
  end

  // manager sources (one value each) and sinks
  always @(negedge clk) for (int c = 0; c < NC; c++) begin
    m2p_val[c] = !sent_n[c];
    m2p_msg[c] = 32'(BLK);
    p2m_rdy[c] = ($urandom % 3 != 0);
  end
  always @(posedge clk) if (!reset) for (int c = 0; c < NC; c++) begin
    if (m2p_val[c] && m2p_rdy[c]) begin sent_n[c] <= 1; m2p_cnt++; end
    if (p2m_val[c] && p2m_rdy[c]) begin
      p2m_cnt++;
      if (got[c] < 3)
        check(p2m_msg[c] == exp_out[c][got[c]],
              $sformatf("core %0d result %0d: got %0d exp %0d", c, got[c], p2m_msg[c], exp_out[c][got[c]]));
      else check(0, "extra result");
      got[c]++;
    end
  end

  function automatic logic [31:0] src0(int i); return 32'(i * 3 + 1); endfunction
  function automatic logic [31:0] src1(int i); return 32'(1000 + i * i); endfunction

  initial begin
    int loop_idx, sum_idx, s_idx, jal_idx;
    prog.push_back(CSRR(1, 'hF14));          // x1 = core id
    prog.push_back(CSRR(2, 'hFC1));          // x2 = number of cores
    prog.push_back(CSRR(3, 'hFC0));          // x3 = n
    prog.push_back(ADDI(20, 0, 1));
    prog.push_back(CSRW('h7C1, 20));         // stats on
    prog.push_back(MUL(4, 1, 3));
    prog.push_back(SLLI(4, 4, 2));           // x4 = byte offset of block
    prog.push_back(LUI(5, 2));
    prog.push_back(ADD(5, 5, 4));            // &src0[start]
    prog.push_back(ADDI(6, 5, 'h400));       // &src1[start]
    prog.push_back(LUI(7, 3));
    prog.push_back(ADD(7, 7, 4));            // &dest[start]
    prog.push_back(ADDI(8, 0, 0));
    loop_idx = prog.size();
    prog.push_back(LW(11, 5, 0));
    prog.push_back(LW(12, 6, 0));
    prog.push_back(ADD(13, 11, 12));
    prog.push_back(SW(13, 7, 0));
    prog.push_back(ADDI(5, 5, 4));
    prog.push_back(ADDI(6, 6, 4));
    prog.push_back(ADDI(7, 7, 4));
    prog.push_back(ADDI(8, 8, 1));
    prog.push_back(BNE(8, 3, (loop_idx - prog.size()) * 4));
    prog.push_back(LUI(7, 3));
    prog.push_back(ADD(7, 7, 4));
    jal_idx = prog.size();
    prog.push_back(JAL(15, 6 * 4));          // call the summing routine
    prog.push_back(CSRW('h7C1, 0));          // stats off
    prog.push_back(CSRW('h7C0, 1));
    prog.push_back(CSRW('h7C0, 2));
    prog.push_back(CSRW('h7C0, 10));
    prog.push_back(JAL(0, 0));               // park
    sum_idx = prog.size();
    prog.push_back(ADDI(10, 0, 0));
    prog.push_back(ADDI(8, 0, 0));
    s_idx = prog.size();
    prog.push_back(LW(11, 7, 0));
    prog.push_back(ADD(10, 10, 11));
    prog.push_back(ADDI(7, 7, 4));
    prog.push_back(ADDI(8, 8, 1));
    prog.push_back(BNE(8, 3, (s_idx - prog.size()) * 4));
    prog.push_back(JALR(0, 15, 0));
    check(sum_idx == jal_idx + 6, "program layout");

    for (int i = 0; i < prog.size(); i++) u_mem.mem[128 + i] = prog[i];
    for (int i = 0; i < NC * BLK; i++) begin
      u_mem.mem[('h2000 >> 2) + i] = src0(i);
      u_mem.mem[('h2400 >> 2) + i] = src1(i);
      u_mem.mem[('h3000 >> 2) + i] = 32'hBAD0_0000;
    end
    for (int c = 0; c < NC; c++) begin
      logic [31:0] s;
      s = 0;
      for (int i = c * BLK; i < (c + 1) * BLK; i++) s += src0(i) + src1(i);
      exp_out[c][0] = 32'(c); exp_out[c][1] = 32'(NC); exp_out[c][2] = s;
      got[c] = 0; sent_n[c] = 0;
      commits[c] = 0; ic_miss[c] = 0; ic_acc[c] = 0; dc_miss[c] = 0; dc_acc[c] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    wait (got[0] == 3 && got[1] == 3 && got[2] == 3 && got[3] == 3);
    repeat (2) @(posedge clk);

    $display("num_cycles (stats_en region of core 0) = %0d, total cycles = %0d", stat_cycles, cycles);
    for (int c = 0; c < NC; c++)
      $display("core%0d: committed=%0d icache miss/access=%0d/%0d  dcache_bank%0d miss/access=%0d/%0d",
               c, commits[c], ic_miss[c], ic_acc[c], c, dc_miss[c], dc_acc[c]);
    $display("writebacks=%0d cachenet_queued=%0d imemnet_contention=%0d", writebacks, cnet_contention, inet_contention);

    for (int c = 0; c < NC; c++) begin
      check(ic_miss[c] > 0 && ic_acc[c] > ic_miss[c], $sformatf("core %0d icache hits and misses", c));
      check(dc_miss[c] > 0 && dc_acc[c] > dc_miss[c], $sformatf("bank %0d dcache hits and misses", c));
      check(commits[c] > 0, $sformatf("core %0d commits", c));
    end
    $display("squashes=%0d jal_redirects=%0d load_use_stalls=%0d bypasses=%0d",
             squashes, jal_redirects, load_use, bypasses);
    check(squashes > 0, "taken branch/jalr squash");
    check(jal_redirects > 0, "jal redirect in D");
    check(load_use > 0, "load-use stall");
    check(bypasses > 0, "operand bypassed from X, M or W");
    check(writebacks > 0, "dirty write-back happened");
    check(cnet_contention > 0, "requests from several cores queued in CacheNet at once");
    check(inet_contention > 0, "I-cache MemNet contention happened");
    check(m2p_cnt == NC && p2m_cnt == 3 * NC, "manager traffic");
    check(stat_cycles > 0 && !stats_en, "stats_en region opened and closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
