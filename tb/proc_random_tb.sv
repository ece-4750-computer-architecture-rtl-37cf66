// Random-program testbench for the pipelined TinyRV2 core.
//
// Each round generates a random program from the whole instruction subset:
// every register-register and immediate ALU operation (mul included), lui,
// auipc, lw and sw into a 256-byte data area, forward branches of all six
// kinds, and forward jal and jalr.  Instructions pick their registers from a
// small pool, so most of them depend on one of the last few, which keeps the
// bypass paths and the load-use interlock busy.  After the random part the
// program sends every register and every data word to the manager sink.
//
// An instruction-level model in this file decodes the same words and runs
// the program to produce the expected stream and the number of committed
// instructions.  The core runs against a one-cycle instruction memory and a
// two-cycle data memory, both with random stalls, and the manager sink
// applies random back-pressure.  Every word of the stream and the commit
// count are checked; each round starts from reset with a new program.
module proc_random_tb;
  import mcore_pkg::*;
  import rv_asm_pkg::*;

  localparam int ROUNDS = 6;
  localparam int BODY   = 400;            // random instructions per round
  localparam int NREG   = 10;             // x1..x10 are the random pool
  localparam int BASE   = 11;             // x11 holds the data base 0x2000
  localparam int LINK   = 12;             // x12 holds auipc results for jalr
  localparam int NDATA  = 64;             // data words

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic         m2p_val, m2p_rdy, p2m_val, p2m_rdy, commit_inst, stats_en;
  logic [31:0]  m2p_msg, p2m_msg;
  logic         req_val [2], req_rdy [2], resp_val [2], resp_rdy [2];
  mem_req_4B_t  req_msg [2];
  mem_resp_4B_t resp_msg [2];

  proc dut (
    .clk, .reset, .core_id(32'd0),
    .mngr2proc_val(m2p_val), .mngr2proc_rdy(m2p_rdy), .mngr2proc_msg(m2p_msg),
    .proc2mngr_val(p2m_val), .proc2mngr_rdy(p2m_rdy), .proc2mngr_msg(p2m_msg),
    .imemreq_val(req_val[0]), .imemreq_rdy(req_rdy[0]), .imemreq_msg(req_msg[0]),
    .imemresp_val(resp_val[0]), .imemresp_rdy(resp_rdy[0]), .imemresp_msg(resp_msg[0]),
    .dmemreq_val(req_val[1]), .dmemreq_rdy(req_rdy[1]), .dmemreq_msg(req_msg[1]),
    .dmemresp_val(resp_val[1]), .dmemresp_rdy(resp_rdy[1]), .dmemresp_msg(resp_msg[1]),
    .commit_inst, .stats_en);

  test_mem #(.req_t(mem_req_4B_t), .resp_t(mem_resp_4B_t), .DATA_BITS(32),
             .NPORTS(1), .LAT(1), .STALL_PCT(10)) u_imem (
    .clk, .reset, .req_val(req_val[0:0]), .req_rdy(req_rdy[0:0]), .req_msg(req_msg[0:0]),
    .resp_val(resp_val[0:0]), .resp_rdy(resp_rdy[0:0]), .resp_msg(resp_msg[0:0]));
  test_mem #(.req_t(mem_req_4B_t), .resp_t(mem_resp_4B_t), .DATA_BITS(32),
             .NPORTS(1), .LAT(2), .STALL_PCT(20)) u_dmem (
    .clk, .reset, .req_val(req_val[1:1]), .req_rdy(req_rdy[1:1]), .req_msg(req_msg[1:1]),
    .resp_val(resp_val[1:1]), .resp_rdy(resp_rdy[1:1]), .resp_msg(resp_msg[1:1]));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ generator
  logic [31:0] prog [$];
  logic [31:0] data0 [NDATA];

  function automatic int rreg();  return 1 + int'($urandom % NREG); endfunction
  function automatic int rimm12(); return int'($urandom % 4096) - 2048; endfunction

  function automatic void gen();
    int kind, skip;
    logic [2:0] f3;
    logic [6:0] f7;
    prog.delete();
    prog.push_back(LUI(BASE, 2));
    for (int r = 1; r <= NREG; r++) begin
      prog.push_back(LUI(r, int'($urandom % 1048576)));
      prog.push_back(ADDI(r, r, rimm12()));
    end
    for (int n = 0; n < BODY; n++) begin
      kind = int'($urandom % 100);
      if (kind < 30) begin                       // register-register
        f3 = 3'($urandom);
        f7 = 7'h00;
        if (f3 == 3'b000) f7 = ($urandom % 3 == 0) ? 7'h01 : (($urandom % 2 == 0) ? 7'h20 : 7'h00);
        if (f3 == 3'b101 && $urandom % 2 == 0) f7 = 7'h20;
        prog.push_back(r_type(f7, rreg(), rreg(), f3, rreg(), 7'b0110011));
      end else if (kind < 52) begin              // register-immediate
        f3 = 3'($urandom);
        if (f3 == 3'b001)      prog.push_back(i_type(int'($urandom % 32), rreg(), f3, rreg(), 7'b0010011));
        else if (f3 == 3'b101) prog.push_back(i_type(int'($urandom % 32) | (($urandom % 2 == 0) ? 'h400 : 0),
                                                    rreg(), f3, rreg(), 7'b0010011));
        else                   prog.push_back(i_type(rimm12(), rreg(), f3, rreg(), 7'b0010011));
      end else if (kind < 55) prog.push_back(LUI(rreg(), int'($urandom % 1048576)));
      else if (kind < 57) prog.push_back(AUIPC(rreg(), int'($urandom % 1048576)));
      else if (kind < 72) prog.push_back(LW(rreg(), BASE, 4 * int'($urandom % NDATA)));
      else if (kind < 84) prog.push_back(SW(rreg(), BASE, 4 * int'($urandom % NDATA)));
      else if (kind < 94) begin                  // forward branch over 0..2
        skip = int'($urandom % 3);
        case ($urandom % 6)
          0: f3 = 3'b000; 1: f3 = 3'b001; 2: f3 = 3'b100;
          3: f3 = 3'b101; 4: f3 = 3'b110; default: f3 = 3'b111;
        endcase
        prog.push_back(b_type(4 * (skip + 1), rreg(), rreg(), f3));
      end else if (kind < 97) begin              // forward jal over 0..2
        prog.push_back(JAL(($urandom % 2 == 0) ? 0 : rreg(), 4 * (int'($urandom % 3) + 1)));
      end else begin                             // auipc + jalr over 0..2
        prog.push_back(AUIPC(LINK, 0));
        prog.push_back(JALR(rreg(), LINK, 4 * (int'($urandom % 3) + 2)));
      end
    end
    // a jump that lands on a jalr would skip the auipc that sets its base:
    // aim it at that auipc instead, so every jump stays forward
    for (int i = 0; i < prog.size(); i++) begin
      logic [31:0] w;
      int off, t;
      w = prog[i];
      if (w[6:0] == 7'b1100011)
        off = int'($signed({w[31], w[7], w[30:25], w[11:8], 1'b0}));
      else if (w[6:0] == 7'b1101111)
        off = int'($signed({w[31], w[19:12], w[20], w[30:21], 1'b0}));
      else if (w[6:0] == 7'b1100111)
        off = int'($signed(w[31:20])) - 4;      // base is the auipc just before
      else continue;
      t = i + off / 4;
      if (t < prog.size() && prog[t][6:0] == 7'b1100111) begin
        if (w[6:0] == 7'b1100011)      prog[i] = b_type(off - 4, int'(w[24:20]), int'(w[19:15]), w[14:12]);
        else if (w[6:0] == 7'b1101111) prog[i] = JAL(int'(w[11:7]), off - 4);
        else                           prog[i] = JALR(int'(w[11:7]), LINK, off);
      end
    end
    prog.push_back(ADDI(0, 0, 0));               // landing pad for the last jumps
    prog.push_back(ADDI(0, 0, 0));
    prog.push_back(ADDI(0, 0, 0));
    for (int r = 1; r <= NREG; r++) prog.push_back(CSRW('h7C0, r));
    for (int i = 0; i < NDATA; i++) begin
      prog.push_back(LW(1, BASE, 4 * i));
      prog.push_back(CSRW('h7C0, 1));
    end
    prog.push_back(CSRR(0, 'hFC0));              // park: the source stays empty
  endfunction

  // ------------------------------------------------- instruction-level model
  logic [31:0] expected [$];
  int exp_commits;

  function automatic logic [31:0] sx(logic [31:0] v, int bits);
    return 32'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  function automatic void model();
    logic [31:0] x [32];
    logic [31:0] dm [NDATA];
    logic [31:0] pc, ins, a, b, imm, res, nxt;
    logic [6:0] op;
    logic [2:0] f3;
    logic wen;
    int idx;
    expected.delete();
    exp_commits = 0;
    foreach (x[i]) x[i] = '0;
    foreach (dm[i]) dm[i] = data0[i];
    pc = 32'h200;
    forever begin
      idx = int'((pc - 32'h200) >> 2);
      if (idx < 0 || idx >= prog.size()) begin
        $display("FAIL model left the program at pc %h", pc);
        break;
      end
      ins = prog[idx];
      op  = ins[6:0];
      f3  = ins[14:12];
      a   = x[ins[19:15]];
      b   = x[ins[24:20]];
      nxt = pc + 4;
      wen = 1'b1;
      res = '0;
      if (ins == CSRR(0, 'hFC0)) break;
      exp_commits++;
      case (op)
        7'b0110011: begin
          if (ins[31:25] == 7'h01) res = a * b;
          else case (f3)
            3'b000: res = ins[30] ? a - b : a + b;
            3'b001: res = a << b[4:0];
            3'b010: res = 32'($signed(a) < $signed(b));
            3'b011: res = 32'(a < b);
            3'b100: res = a ^ b;
            3'b101: res = ins[30] ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
            3'b110: res = a | b;
            default: res = a & b;
          endcase
        end
        7'b0010011: begin
          imm = sx({20'b0, ins[31:20]}, 12);
          case (f3)
            3'b000: res = a + imm;
            3'b001: res = a << ins[24:20];
            3'b010: res = 32'($signed(a) < $signed(imm));
            3'b011: res = 32'(a < imm);
            3'b100: res = a ^ imm;
            3'b101: res = ins[30] ? 32'($signed(a) >>> ins[24:20]) : a >> ins[24:20];
            3'b110: res = a | imm;
            default: res = a & imm;
          endcase
        end
        7'b0110111: res = {ins[31:12], 12'b0};
        7'b0010111: res = pc + {ins[31:12], 12'b0};
        7'b0000011: res = dm[((a + sx({20'b0, ins[31:20]}, 12)) - 32'h2000) >> 2];
        7'b0100011: begin
          dm[((a + sx({20'b0, ins[31:25], ins[11:7]}, 12)) - 32'h2000) >> 2] = b;
          wen = 1'b0;
        end
        7'b1100011: begin
          bit t;
          case (f3)
            3'b000: t = (a == b);
            3'b001: t = (a != b);
            3'b100: t = $signed(a) < $signed(b);
            3'b101: t = $signed(a) >= $signed(b);
            3'b110: t = a < b;
            default: t = a >= b;
          endcase
          if (t) nxt = pc + sx({19'b0, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0}, 13);
          wen = 1'b0;
        end
        7'b1101111: begin
          res = pc + 4;
          nxt = pc + sx({11'b0, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0}, 21);
        end
        7'b1100111: begin
          res = pc + 4;
          nxt = (a + sx({20'b0, ins[31:20]}, 12)) & ~32'd1;
        end
        7'b1110011: begin                        // only csrw proc2mngr is used
          expected.push_back(a);
          wen = 1'b0;
        end
        default: wen = 1'b0;
      endcase
      if (wen && ins[11:7] != 5'd0) x[ins[11:7]] = res;
      pc = nxt;
    end
  endfunction

  // ----------------------------------------------------- manager streams
  int got = 0, commits = 0;
  int load_use = 0, squashes = 0, jal_redirects = 0;

  always @(negedge clk) begin
    m2p_val = 1'b0;
    m2p_msg = '0;
    p2m_rdy = ($urandom % 4 != 0);
  end
  always @(posedge clk) if (!reset) begin
    if (commit_inst) commits++;
    if (dut.d_hazard) load_use++;
    if (dut.x_redirect) squashes++;
    if (dut.d_redirect) jal_redirects++;
    if (p2m_val && p2m_rdy) begin
      if (got < expected.size())
        check(p2m_msg == expected[got], $sformatf("stream word %0d: got %h exp %h", got, p2m_msg, expected[got]));
      else check(0, "extra stream word");
      got++;
    end
  end

  initial begin
    for (int round = 0; round < ROUNDS; round++) begin
      reset = 1;
      gen();
      for (int i = 0; i < NDATA; i++) data0[i] = $urandom;
      for (int i = 0; i < prog.size(); i++) u_imem.mem[128 + i] = prog[i];
      for (int i = 0; i < NDATA; i++) u_dmem.mem[(32'h2000 >> 2) + i] = data0[i];
      model();
      got = 0;
      commits = 0;
      repeat (3) @(posedge clk);
      @(negedge clk) reset = 0;
      wait (got == expected.size());
      repeat (30) @(posedge clk);
      check(commits == exp_commits, $sformatf("round %0d: committed %0d expected %0d", round, commits, exp_commits));
      $display("round %0d: %0d instructions committed, %0d stream words", round, commits, got);
    end
    $display("squashes=%0d load_use_stalls=%0d jal_redirects=%0d", squashes, load_use, jal_redirects);
    check(squashes > 0 && load_use > 0 && jal_redirects > 0, "pipeline events");
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
