// Parallel sort on the quad-core system at its default size.
//
// It follows the block-sort-then-merge scheme the system targets.  The input is
// NELEM uniformly distributed 32-bit random integers, split into one block
// per core.  Each core insertion-sorts its own block in place, then raises
// a flag word in memory.  Core 0 spins on the other cores' flags, which
// works because every word lives in exactly one data-cache bank.  It then
// merges blocks 0+1 and 2+3 into a scratch area, merges the two halves into
// the destination, and streams the result to its manager sink.  Cores 1-3
// report their ids.
//
// A second run resets the system and sorts the whole array on core 0 alone
// while cores 1-3 park, the single-threaded comparison point.  The
// testbench checks the sorted output of both runs against a sort done here,
// prints the statistics-hook totals over each stats_en region, as a
// simulator report would, and requires the parallel run to be faster.  The program is assembled twice so that forward
// branch labels are known on the second pass.
module mcore_sort_tb;
  import mcore_pkg::*;
  import rv_asm_pkg::*;

  localparam int NC    = 4;
  localparam int NELEM = 128;
  localparam int BLK   = NELEM / NC;

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

  test_mem #(.NPORTS(2), .LAT(2)) u_mem (
    .clk, .reset,
    .req_val(mreq_val), .req_rdy(mreq_rdy), .req_msg(mreq_msg),
    .resp_val(mresp_val), .resp_rdy(mresp_rdy), .resp_msg(mresp_msg));

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ assembler
  logic [31:0] prog [512];
  int pc, lbl [32];

  function automatic void emit(logic [31:0] w); prog[pc] = w; pc++; endfunction
  function automatic int off(int l); return (lbl[l] - pc) * 4; endfunction
  function automatic void label(int l); lbl[l] = pc; endfunction
  function automatic logic [31:0] BGE(int rs1, int rs2, int o); return b_type(o, rs2, rs1, 3'b101); endfunction

  localparam int L_OUT = 0, L_IN = 1, L_INS = 2, L_SDONE = 3, L_MASTER = 4, L_WAITL = 5,
                 L_SPIN = 6, L_OUTL = 7, L_MERGE = 8, L_TAKEB = 9, L_TAILA = 10,
                 L_TAILB = 11, L_DONE = 12, L_PARK = 13;

  // insertion sort of the x3 words at x4 (x5..x9 scratch), ends at L_SDONE
  function automatic void emit_isort();
    emit(ADDI(5, 0, 1));             // i = 1
    label(L_OUT);
    emit(BEQ(5, 3, off(L_SDONE)));
    emit(SLLI(6, 5, 2));
    emit(ADD(6, 6, 4));              // &a[i]
    emit(LW(7, 6, 0));               // key
    emit(ADDI(8, 6, -4));            // p = &a[i-1]
    label(L_IN);
    emit(BLT(8, 4, off(L_INS)));     // ran off the start of the block
    emit(LW(9, 8, 0));
    emit(BGE(7, 9, off(L_INS)));     // key >= a[j]: stop
    emit(SW(9, 8, 4));               // a[j+1] = a[j]
    emit(ADDI(8, 8, -4));
    emit(JAL(0, off(L_IN)));
    label(L_INS);
    emit(SW(7, 8, 4));               // a[j+1] = key
    emit(ADDI(5, 5, 1));
    emit(JAL(0, off(L_OUT)));
  endfunction

  function automatic void build();
    pc = 0;
    emit(CSRR(1, 'hF14));            // x1 = core id
    emit(CSRR(2, 'hFC1));            // x2 = number of cores
    emit(CSRR(3, 'hFC0));            // x3 = block length
    emit(ADDI(30, 0, 1));
    emit(CSRW('h7C1, 30));           // stats on
    emit(LUI(4, 4));                 // x4 = 0x4000 + id * blk * 4
    emit(MUL(5, 1, 3));
    emit(SLLI(5, 5, 2));
    emit(ADD(4, 4, 5));
    emit_isort();
    label(L_SDONE);
    // workers raise their flag and park; core 0 waits for all flags
    emit(BEQ(1, 0, off(L_MASTER)));
    emit(LUI(10, 5));
    emit(SLLI(11, 1, 4));
    emit(ADD(10, 10, 11));
    emit(ADDI(12, 0, 1));
    emit(SW(12, 10, 0));
    emit(CSRW('h7C0, 1));
    emit(CSRR(0, 'hFC0));            // park: the source has nothing more
    label(L_MASTER);
    emit(LUI(10, 5));
    emit(ADDI(13, 0, 1));
    label(L_WAITL);
    emit(SLLI(11, 13, 4));
    emit(ADD(11, 10, 11));
    label(L_SPIN);
    emit(LW(12, 11, 0));
    emit(BEQ(12, 0, off(L_SPIN)));
    emit(ADDI(13, 13, 1));
    emit(BNE(13, 2, off(L_WAITL)));
    // merge blocks 0+1 -> 0x6000, blocks 2+3 -> 0x6000 + 2*blk*4, halves -> 0x7000
    emit(SLLI(14, 3, 2));            // block bytes
    emit(SLLI(15, 14, 1));           // two blocks
    emit(LUI(20, 4));
    emit(ADD(21, 20, 14));
    emit(ADD(22, 21, 0));
    emit(ADD(23, 22, 14));
    emit(LUI(24, 6));
    emit(JAL(31, off(L_MERGE)));
    emit(LUI(20, 4));
    emit(ADD(20, 20, 15));
    emit(ADD(21, 20, 14));
    emit(ADD(22, 21, 0));
    emit(ADD(23, 22, 14));
    emit(LUI(24, 6));
    emit(ADD(24, 24, 15));
    emit(JAL(31, off(L_MERGE)));
    emit(LUI(20, 6));
    emit(ADD(21, 20, 15));
    emit(ADD(22, 21, 0));
    emit(ADD(23, 22, 15));
    emit(LUI(24, 7));
    emit(JAL(31, off(L_MERGE)));
    emit(CSRW('h7C1, 0));            // stats off
    emit(LUI(20, 7));
    emit(SLLI(21, 15, 1));
    emit(ADD(21, 20, 21));
    label(L_OUTL);
    emit(LW(25, 20, 0));
    emit(CSRW('h7C0, 25));
    emit(ADDI(20, 20, 4));
    emit(BNE(20, 21, off(L_OUTL)));
    emit(CSRR(0, 'hFC0));            // park
    // merge(a=x20..x21, b=x22..x23, out=x24), returns through x31
    label(L_MERGE);
    emit(BEQ(20, 21, off(L_TAILB)));
    emit(BEQ(22, 23, off(L_TAILA)));
    emit(LW(25, 20, 0));
    emit(LW(26, 22, 0));
    emit(BLT(26, 25, off(L_TAKEB)));
    emit(SW(25, 24, 0));
    emit(ADDI(20, 20, 4));
    emit(ADDI(24, 24, 4));
    emit(JAL(0, off(L_MERGE)));
    label(L_TAKEB);
    emit(SW(26, 24, 0));
    emit(ADDI(22, 22, 4));
    emit(ADDI(24, 24, 4));
    emit(JAL(0, off(L_MERGE)));
    label(L_TAILA);
    emit(BEQ(20, 21, off(L_DONE)));
    emit(LW(25, 20, 0));
    emit(SW(25, 24, 0));
    emit(ADDI(20, 20, 4));
    emit(ADDI(24, 24, 4));
    emit(JAL(0, off(L_TAILA)));
    label(L_TAILB);
    emit(BEQ(22, 23, off(L_DONE)));
    emit(LW(26, 22, 0));
    emit(SW(26, 24, 0));
    emit(ADDI(22, 22, 4));
    emit(ADDI(24, 24, 4));
    emit(JAL(0, off(L_TAILB)));
    label(L_DONE);
    emit(JALR(0, 31, 0));
  endfunction


  // Single-threaded version: core 0 sorts the whole array, the others park.
  function automatic void build_scalar();
    pc = 0;
    emit(CSRR(1, 'hF14));
    emit(BNE(1, 0, off(L_PARK)));
    emit(CSRR(3, 'hFC0));            // x3 = element count
    emit(ADDI(30, 0, 1));
    emit(CSRW('h7C1, 30));           // stats on
    emit(LUI(4, 4));
    emit_isort();
    label(L_SDONE);
    emit(CSRW('h7C1, 0));            // stats off
    emit(LUI(20, 4));
    emit(SLLI(21, 3, 2));
    emit(ADD(21, 20, 21));
    label(L_OUTL);
    emit(LW(25, 20, 0));
    emit(CSRW('h7C0, 25));
    emit(ADDI(20, 20, 4));
    emit(BNE(20, 21, off(L_OUTL)));
    label(L_PARK);
    emit(CSRR(0, 'hFC0));
    emit(JAL(0, off(L_PARK)));
  endfunction

  // ------------------------------------------------------ manager streams
  int got [NC];
  bit sent_n [NC];
  int sorted_ref [NELEM];
  bit scalar = 0;
  int stat_cycles = 0, commits [NC], ic_miss [NC], ic_acc [NC], dc_miss [NC], dc_acc [NC];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) for (int c = 0; c < NC; c++) begin
    m2p_val[c] = !sent_n[c];
    m2p_msg[c] = scalar ? 32'(NELEM) : 32'(BLK);
    p2m_rdy[c] = 1'b1;
  end
  always @(posedge clk) if (!reset) begin
    if (stats_en) begin
      stat_cycles++;
      for (int c = 0; c < NC; c++) begin
        commits[c] += int'(commit_inst[c]);
        ic_miss[c] += int'(icache_miss[c]);  ic_acc[c] += int'(icache_access[c]);
        dc_miss[c] += int'(dcache_miss[c]);  dc_acc[c] += int'(dcache_access[c]);
      end
    end
    for (int c = 0; c < NC; c++) begin
      if (m2p_val[c] && m2p_rdy[c]) sent_n[c] <= 1;
      if (p2m_val[c] && p2m_rdy[c]) begin
        if (c == 0) begin
          if (got[0] < NELEM)
            check(p2m_msg[0] == 32'(sorted_ref[got[0]]),
                  $sformatf("element %0d: got %0d exp %0d", got[0], $signed(p2m_msg[0]), sorted_ref[got[0]]));
          else check(0, "extra output");
        end else check(!scalar && p2m_msg[c] == 32'(c), $sformatf("core %0d finish report", c));
        got[c]++;
      end
    end
  end

  // Load a program and fresh data, hold reset, run until core 0 has
  // streamed the array out, and print the statistics of the run.
  task automatic run(bit sc, output int cycles);
    scalar = sc;
    reset = 1;
    if (sc) begin build_scalar(); build_scalar(); end
    else    begin build();        build();        end
    for (int i = 0; i < pc; i++) u_mem.mem[128 + i] = prog[i];
    for (int i = 0; i < NELEM; i++) begin
      sorted_ref[i] = int'($urandom);
      u_mem.mem[('h4000 >> 2) + i] = 32'(sorted_ref[i]);
    end
    for (int c = 0; c < NC; c++) begin
      u_mem.mem[('h5000 >> 2) + 4 * c] = 0;
      got[c] = 0;
      sent_n[c] = sc && c != 0;
      commits[c] = 0; ic_miss[c] = 0; ic_acc[c] = 0; dc_miss[c] = 0; dc_acc[c] = 0;
    end
    stat_cycles = 0;
    for (int i = 1; i < NELEM; i++)          // signed insertion sort
      for (int j = i; j > 0 && sorted_ref[j-1] > sorted_ref[j]; j--) begin
        sorted_ref[j]   ^= sorted_ref[j-1];
        sorted_ref[j-1] ^= sorted_ref[j];
        sorted_ref[j]   ^= sorted_ref[j-1];
      end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    if (sc) wait (got[0] == NELEM);
    else    wait (got[0] == NELEM && got[1] == 1 && got[2] == 1 && got[3] == 1);
    repeat (20) @(posedge clk);
    if (sc) $display("scalar sort, program of %0d instructions", pc);
    else    $display("parallel sort, program of %0d instructions", pc);
    $display("num_cycles = %0d", stat_cycles);
    for (int c = 0; c < NC; c++)
      $display("core%0d_committed_inst = %0d  icache%0d miss/access = %0d/%0d  dcache_bank%0d miss/access = %0d/%0d",
               c, commits[c], c, ic_miss[c], ic_acc[c], c, dc_miss[c], dc_acc[c]);
    check(stat_cycles > 0, "stats region");
    check(got[0] == NELEM, "all elements streamed out");
    for (int c = 1; c < NC; c++)
      check(sc ? commits[c] == 0 : commits[c] > 0, $sformatf("core %0d activity in the measured region", c));
    cycles = stat_cycles;
  endtask

  initial begin
    int par_cycles, sc_cycles;
    run(1'b0, par_cycles);
    run(1'b1, sc_cycles);
    $display("speedup of the parallel sort = %0d.%02d", sc_cycles / par_cycles,
             (sc_cycles * 100 / par_cycles) % 100);
    check(par_cycles < sc_cycles, "parallel sort faster than scalar sort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
