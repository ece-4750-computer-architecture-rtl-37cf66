// Self-checking testbench for the TinyRV2 processor.
//
// The core (core_id 2, NUM_CORES 4) runs a small program from a one-cycle
// instruction memory and a slower data memory.  The program reads two words
// from the manager source, exercises add, sub, mul, addi, slt, srai, lui,
// auipc, lw, sw, bne, jal, jalr and the coreid, numcores and stats_en
// registers, and writes results to the manager sink, where they are
// compared with values worked out here.  The number of committed
// instructions is checked (wrong-path instructions must not commit), and
// the pipeline mechanisms must each occur: branch/jalr squashes in X, jal
// redirects in D and load-use stalls.  Back-to-back dependent instructions
// exercise the X, M and W bypasses.
module proc_tb;
  import mcore_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic         m2p_val, m2p_rdy, p2m_val, p2m_rdy, commit_inst, stats_en;
  logic [31:0]  m2p_msg, p2m_msg;
  logic         req_val [2], req_rdy [2], resp_val [2], resp_rdy [2];
  mem_req_4B_t  req_msg [2];
  mem_resp_4B_t resp_msg [2];

  proc #(.NUM_CORES(4)) dut (
    .clk, .reset, .core_id(32'd2),
    .mngr2proc_val(m2p_val), .mngr2proc_rdy(m2p_rdy), .mngr2proc_msg(m2p_msg),
    .proc2mngr_val(p2m_val), .proc2mngr_rdy(p2m_rdy), .proc2mngr_msg(p2m_msg),
    .imemreq_val(req_val[0]), .imemreq_rdy(req_rdy[0]), .imemreq_msg(req_msg[0]),
    .imemresp_val(resp_val[0]), .imemresp_rdy(resp_rdy[0]), .imemresp_msg(resp_msg[0]),
    .dmemreq_val(req_val[1]), .dmemreq_rdy(req_rdy[1]), .dmemreq_msg(req_msg[1]),
    .dmemresp_val(resp_val[1]), .dmemresp_rdy(resp_rdy[1]), .dmemresp_msg(resp_msg[1]),
    .commit_inst, .stats_en);

  // instruction memory answers in one cycle; data memory takes four, so a
  // load can wait in X behind a store in M while its consumer sits in D
  test_mem #(.req_t(mem_req_4B_t), .resp_t(mem_resp_4B_t), .DATA_BITS(32),
             .NPORTS(1), .LAT(1), .STALL_PCT(10)) u_mem (
    .clk, .reset, .req_val(req_val[0:0]), .req_rdy(req_rdy[0:0]), .req_msg(req_msg[0:0]),
    .resp_val(resp_val[0:0]), .resp_rdy(resp_rdy[0:0]), .resp_msg(resp_msg[0:0]));
  test_mem #(.req_t(mem_req_4B_t), .resp_t(mem_resp_4B_t), .DATA_BITS(32),
             .NPORTS(1), .LAT(4), .STALL_PCT(10)) u_dmem (
    .clk, .reset, .req_val(req_val[1:1]), .req_rdy(req_rdy[1:1]), .req_msg(req_msg[1:1]),
    .resp_val(resp_val[1:1]), .resp_rdy(resp_rdy[1:1]), .resp_msg(resp_msg[1:1]));

  int checks = 0, failures = 0;
  logic [31:0] prog [$];
  logic [31:0] expected [$];
  logic [31:0] src_vals [$];
  int commits = 0, stats_seen = 0, got = 0;
  int exp_commits;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int squashes = 0, load_use = 0, jal_redirects = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.x_redirect) squashes++;
    if (dut.d_hazard) load_use++;
    if (dut.d_redirect) jal_redirects++;
    if (commit_inst) commits++;
    if (stats_en) stats_seen++;
  end

  // manager source and sink
  int src_idx = 0;
  always @(negedge clk) begin
    m2p_val = (src_idx < src_vals.size());
    m2p_msg = m2p_val ? src_vals[src_idx] : '0;
    p2m_rdy = ($urandom % 4 != 0);
  end
  always @(posedge clk) if (!reset) begin
    if (m2p_val && m2p_rdy) src_idx <= src_idx + 1;
    if (p2m_val && p2m_rdy) begin
      if (got < expected.size())
        check(p2m_msg == expected[got], $sformatf("result %0d: got %h exp %h", got, p2m_msg, expected[got]));
      else check(0, "extra result");
      got++;
    end
  end

  initial begin
    int loop_idx, jal_idx, f_idx, end_idx;
    src_vals = '{32'd5, 32'd7};
    prog.push_back(CSRR(1, 'hFC0));                 // x1 = 5
    prog.push_back(CSRR(2, 'hFC0));                 // x2 = 7
    prog.push_back(ADD(3, 1, 2));      prog.push_back(CSRW('h7C0, 3)); expected.push_back(12);
    prog.push_back(MUL(4, 1, 2));      prog.push_back(CSRW('h7C0, 4)); expected.push_back(35);
    prog.push_back(ADDI(5, 0, -3));
    prog.push_back(SUB(6, 1, 5));      prog.push_back(CSRW('h7C0, 6)); expected.push_back(8);
    prog.push_back(SLT(7, 5, 1));      prog.push_back(CSRW('h7C0, 7)); expected.push_back(1);
    prog.push_back(SRAI(8, 5, 1));     prog.push_back(CSRW('h7C0, 8)); expected.push_back(32'hFFFF_FFFE);
    prog.push_back(ADDI(20, 0, 1));    prog.push_back(CSRW('h7C1, 20));   // stats on
    prog.push_back(LUI(9, 3));
    prog.push_back(SW(4, 9, 8));
    prog.push_back(LW(10, 9, 8));      prog.push_back(CSRW('h7C0, 10)); expected.push_back(35);
    prog.push_back(SW(6, 9, -4));
    prog.push_back(LW(10, 9, -4));     prog.push_back(CSRW('h7C0, 10)); expected.push_back(8);
    prog.push_back(CSRW('h7C1, 0));                                       // stats off
    prog.push_back(CSRR(11, 'hF14));   prog.push_back(CSRW('h7C0, 11)); expected.push_back(2);
    prog.push_back(CSRR(12, 'hFC1));   prog.push_back(CSRW('h7C0, 12)); expected.push_back(4);
    prog.push_back(ADDI(13, 0, 0));
    prog.push_back(ADDI(14, 0, 0));
    loop_idx = prog.size();
    prog.push_back(ADDI(14, 14, 1));
    prog.push_back(ADD(13, 13, 14));
    prog.push_back(BNE(14, 1, (loop_idx - prog.size()) * 4));
    prog.push_back(CSRW('h7C0, 13));   expected.push_back(15);
    jal_idx = prog.size();
    prog.push_back(JAL(15, 4 * 4));                  // to f_idx = jal_idx + 4
    prog.push_back(CSRW('h7C0, 16));   expected.push_back(77);
    prog.push_back(CSRW('h7C0, 15));   expected.push_back(32'h200 + 32'(4 * (jal_idx + 1)));
    prog.push_back(JAL(0, 3 * 4));                   // to end_idx
    f_idx = prog.size();
    prog.push_back(ADDI(16, 0, 77));
    prog.push_back(JALR(0, 15, 0));
    end_idx = prog.size();
    prog.push_back(AUIPC(17, 1));      prog.push_back(CSRW('h7C0, 17)); expected.push_back(32'h200 + 32'(4 * end_idx) + 32'h1000);
    prog.push_back(CSRR(1, 'hFC0));                 // park: the source is empty
    check(f_idx == jal_idx + 4, "program layout");
    // every instruction but the parked one commits once; the loop body
    // (3 instructions) runs 5 times
    exp_commits = (prog.size() - 1) + 3 * 4;
    for (int i = 0; i < prog.size(); i++) u_mem.mem[128 + i] = prog[i];
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    wait (got == expected.size());
    repeat (20) @(posedge clk); #1;
    check(commits == exp_commits, $sformatf("committed %0d expected %0d", commits, exp_commits));
    check(u_dmem.mem[(32'h3000 + 8) >> 2] == 35, "store reached memory");
    check(stats_seen > 0 && !stats_en, "stats_en region");
    check(squashes >= 5, $sformatf("taken branches/jalr squashing fetch: %0d", squashes));
    check(load_use > 0, "load-use stall");
    check(jal_redirects >= 2, "jal redirect in D");
    $display("squashes=%0d load_use_stalls=%0d jal_redirects=%0d commits=%0d", squashes, load_use, jal_redirects, commits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
