// TinyRV2 processor core for the multicore system: a five-stage pipeline
// (F, D, X, M, W) with full bypassing and latency-insensitive memory ports.
//
// Executes the TinyRV2 subset of RV32IM (register-register and immediate
// ALU operations, mul, lui, auipc, lw, sw, jal, jalr, all six branches)
// plus csrr/csrw on these control/status registers:
//   0xFC0 mngr2proc  read a word from the manager (test source) stream
//   0x7C0 proc2mngr  write a word to the manager (test sink) stream
//   0xF14 coreid     this core's id, taken from the core_id input
//   0xFC1 numcores   the NUM_CORES parameter
//   0x7C1 stats_en   drives the stats_en output that marks the measured
//                    region of a program
// All loads and stores are full words.  Execution starts at 0x200.
//
// Stages:
//   F  keeps one instruction request in flight on imemreq/imemresp and
//      predicts fall-through (pc+4).  A response belonging to a squashed
//      fetch is dropped when it arrives.
//   D  decodes, reads the register file with bypasses from X, M and W,
//      stalls one cycle on a load-use hazard, and redirects fetch for jal.
//   X  computes, resolves branches and jalr (a taken branch squashes the
//      instruction in D and the fetch in flight: two wrong-path slots),
//      sends the data request, and performs csrr/csrw, waiting there for
//      the manager streams.
//   M  waits for the data response of a load or store.
//   W  writes the register file; commit_inst pulses for each instruction
//      leaving W.
// A stage holds its instruction while any later stage is stalled.  Every
// val output depends only on pipeline registers and the stall from M, never
// on the rdy of the same interface.
//
// The pipeline with F and X stages, squashing of a mispredicted backward
// branch, the instruction subset, the CSR numbers of coreid, numcores and
// stats_en, the core_id port and the num_cores parameter follow the system
// description.  The stage assignment of each operation, the single
// outstanding fetch, the manager CSR numbers and the reset address are this
// design's choices.
module proc #(
  parameter int unsigned NUM_CORES = 1
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic [31:0]             core_id,

  input  logic                    mngr2proc_val,
  output logic                    mngr2proc_rdy,
  input  logic [31:0]             mngr2proc_msg,

  output logic                    proc2mngr_val,
  input  logic                    proc2mngr_rdy,
  output logic [31:0]             proc2mngr_msg,

  output logic                    imemreq_val,
  input  logic                    imemreq_rdy,
  output mcore_pkg::mem_req_4B_t  imemreq_msg,
  input  logic                    imemresp_val,
  output logic                    imemresp_rdy,
  input  mcore_pkg::mem_resp_4B_t imemresp_msg,

  output logic                    dmemreq_val,
  input  logic                    dmemreq_rdy,
  output mcore_pkg::mem_req_4B_t  dmemreq_msg,
  input  logic                    dmemresp_val,
  output logic                    dmemresp_rdy,
  input  mcore_pkg::mem_resp_4B_t dmemresp_msg,

  output logic                    commit_inst,
  output logic                    stats_en
);
  import mcore_pkg::*;

  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;

  typedef enum logic [3:0] {
    K_NOP, K_ALU, K_MUL, K_LUI, K_AUIPC, K_JAL, K_JALR, K_BR,
    K_LOAD, K_STORE, K_CSRR, K_CSRW
  } kind_e;

  // D -> X pipeline register
  typedef struct packed {
    logic        valid;
    kind_e       kind;
    logic [31:0] pc;
    logic [2:0]  funct3;
    logic        alt;          // sub / sra
    logic        use_imm;      // ALU second operand is the immediate
    logic [31:0] imm;
    logic [31:0] op1, op2;     // bypassed register values
    logic [4:0]  rd;
    logic        wen;
    logic [11:0] csr;
  } dx_t;

  // X -> M and M -> W pipeline registers
  typedef struct packed {
    logic        valid;
    logic        is_mem;
    logic        is_load;
    logic [31:0] result;
    logic [4:0]  rd;
    logic        wen;
  } xm_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] result;
    logic [4:0]  rd;
    logic        wen;
  } mw_t;

  logic [31:0] rf [32];
  logic        stats_q;

  // ---------------------------------------------------------------- F state
  logic [31:0] pc_f;           // address of the next fetch
  logic [31:0] req_pc_q;       // address of the fetch in flight
  logic        out_q;          // a fetch is in flight
  logic        drop_q;         // the fetch in flight was squashed
  logic        fd_valid;
  logic [31:0] fd_inst, fd_pc;

  dx_t dx_q;
  xm_t xm_q;
  mw_t mw_q;

  // ------------------------------------------------------------ stall logic
  logic m_stall, x_wait, x_go, m_go, d_hazard, d_go;
  logic x_redirect, d_redirect;
  logic [31:0] x_target, d_target;

  // ----------------------------------------------------------------- decode
  logic [6:0]  opc;
  logic [4:0]  rs1, rs2, rd;
  logic [2:0]  f3;
  logic [6:0]  f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;
  dx_t         d_out;
  logic        use_rs1, use_rs2;

  assign opc   = fd_inst[6:0];
  assign rd    = fd_inst[11:7];
  assign f3    = fd_inst[14:12];
  assign rs1   = fd_inst[19:15];
  assign rs2   = fd_inst[24:20];
  assign f7    = fd_inst[31:25];
  assign imm_i = {{20{fd_inst[31]}}, fd_inst[31:20]};
  assign imm_s = {{20{fd_inst[31]}}, fd_inst[31:25], fd_inst[11:7]};
  assign imm_b = {{20{fd_inst[31]}}, fd_inst[7], fd_inst[30:25], fd_inst[11:8], 1'b0};
  assign imm_u = {fd_inst[31:12], 12'b0};
  assign imm_j = {{12{fd_inst[31]}}, fd_inst[19:12], fd_inst[20], fd_inst[30:21], 1'b0};

  // X-stage result, used for bypassing as well
  logic [31:0] x_result;
  logic [31:0] m_result;

  function automatic logic [31:0] bypass(input logic [4:0] r, input logic [31:0] xr,
                                         input logic [31:0] mr);
    if (r == 5'd0)                                    return '0;
    if (dx_q.valid && dx_q.wen && dx_q.rd == r)       return xr;
    if (xm_q.valid && xm_q.wen && xm_q.rd == r)       return mr;
    if (mw_q.valid && mw_q.wen && mw_q.rd == r)       return mw_q.result;
    return rf[r];
  endfunction

  always_comb begin
    d_out         = '0;
    d_out.valid   = fd_valid;
    d_out.pc      = fd_pc;
    d_out.funct3  = f3;
    d_out.rd      = rd;
    d_out.csr     = fd_inst[31:20];
    use_rs1       = 1'b0;
    use_rs2       = 1'b0;
    unique case (opc)
      OP_LUI:    begin d_out.kind = K_LUI;   d_out.imm = imm_u; d_out.wen = 1'b1; end
      OP_AUIPC:  begin d_out.kind = K_AUIPC; d_out.imm = imm_u; d_out.wen = 1'b1; end
      OP_JAL:    begin d_out.kind = K_JAL;   d_out.imm = imm_j; d_out.wen = 1'b1; end
      OP_JALR:   begin d_out.kind = K_JALR;  d_out.imm = imm_i; d_out.wen = 1'b1; use_rs1 = 1'b1; end
      OP_BRANCH: begin d_out.kind = K_BR;    d_out.imm = imm_b; use_rs1 = 1'b1; use_rs2 = 1'b1; end
      OP_LOAD:   begin d_out.kind = K_LOAD;  d_out.imm = imm_i; d_out.wen = 1'b1; use_rs1 = 1'b1; end
      OP_STORE:  begin d_out.kind = K_STORE; d_out.imm = imm_s; use_rs1 = 1'b1; use_rs2 = 1'b1; end
      OP_IMM: begin
        d_out.kind    = K_ALU;
        d_out.imm     = imm_i;
        d_out.use_imm = 1'b1;
        d_out.alt     = (f3 == 3'b101) && f7[5];
        d_out.wen     = 1'b1;
        use_rs1       = 1'b1;
      end
      OP_REG: begin
        d_out.kind = (f7 == 7'b0000001) ? K_MUL : K_ALU;
        d_out.alt  = f7[5];
        d_out.wen  = 1'b1;
        use_rs1    = 1'b1;
        use_rs2    = 1'b1;
      end
      OP_SYSTEM: begin
        if (f3 == 3'b010) begin
          d_out.kind = K_CSRR;
          d_out.wen  = 1'b1;
        end else if (f3 == 3'b001) begin
          d_out.kind = K_CSRW;
          use_rs1    = 1'b1;
        end else d_out.kind = K_NOP;
      end
      default: d_out.kind = K_NOP;
    endcase
    if (rd == 5'd0) d_out.wen = 1'b0;
    d_out.op1 = bypass(rs1, x_result, m_result);
    d_out.op2 = bypass(rs2, x_result, m_result);
  end

  // load-use: the value a load in X produces is not ready until M
  assign d_hazard = fd_valid && dx_q.valid && dx_q.kind == K_LOAD && dx_q.rd != 5'd0 &&
                    ((use_rs1 && rs1 == dx_q.rd) || (use_rs2 && rs2 == dx_q.rd));

  assign d_target   = fd_pc + imm_j;

  // ---------------------------------------------------------------- execute
  function automatic logic [31:0] alu(input logic [2:0] fn, input logic alt,
                                      input logic [31:0] x, input logic [31:0] y);
    unique case (fn)
      3'b000: alu = alt ? x - y : x + y;
      3'b001: alu = x << y[4:0];
      3'b010: alu = {31'b0, $signed(x) < $signed(y)};
      3'b011: alu = {31'b0, x < y};
      3'b100: alu = x ^ y;
      3'b101: alu = alt ? 32'($signed(x) >>> y[4:0]) : x >> y[4:0];
      3'b110: alu = x | y;
      default: alu = x & y;
    endcase
  endfunction

  logic        x_take;
  logic [31:0] x_addr;
  logic        x_is_mem, x_mngr_rd, x_mngr_wr;

  always_comb begin
    x_result  = '0;
    x_take    = 1'b0;
    x_target  = dx_q.pc + dx_q.imm;
    x_addr    = dx_q.op1 + dx_q.imm;
    x_is_mem  = dx_q.kind == K_LOAD || dx_q.kind == K_STORE;
    x_mngr_rd = dx_q.kind == K_CSRR && dx_q.csr == CSR_MNGR2PROC;
    x_mngr_wr = dx_q.kind == K_CSRW && dx_q.csr == CSR_PROC2MNGR;
    unique case (dx_q.kind)
      K_ALU:   x_result = alu(dx_q.funct3, dx_q.alt, dx_q.op1, dx_q.use_imm ? dx_q.imm : dx_q.op2);
      K_MUL:   x_result = 32'(dx_q.op1 * dx_q.op2);
      K_LUI:   x_result = dx_q.imm;
      K_AUIPC: x_result = dx_q.pc + dx_q.imm;
      K_JAL:   x_result = dx_q.pc + 32'd4;
      K_JALR: begin
        x_result = dx_q.pc + 32'd4;
        x_take   = 1'b1;
        x_target = (dx_q.op1 + dx_q.imm) & ~32'd1;
      end
      K_BR: begin
        unique case (dx_q.funct3)
          3'b000:  x_take = (dx_q.op1 == dx_q.op2);
          3'b001:  x_take = (dx_q.op1 != dx_q.op2);
          3'b100:  x_take = ($signed(dx_q.op1) <  $signed(dx_q.op2));
          3'b101:  x_take = ($signed(dx_q.op1) >= $signed(dx_q.op2));
          3'b110:  x_take = (dx_q.op1 <  dx_q.op2);
          default: x_take = (dx_q.op1 >= dx_q.op2);
        endcase
      end
      K_CSRR: begin
        unique case (dx_q.csr)
          CSR_MNGR2PROC: x_result = mngr2proc_msg;
          CSR_NUMCORES:  x_result = 32'(NUM_CORES);
          CSR_COREID:    x_result = core_id;
          CSR_STATS_EN:  x_result = {31'b0, stats_q};
          default:       x_result = '0;
        endcase
      end
      default: ;
    endcase
  end

  assign m_result = (xm_q.is_load) ? dmemresp_msg.data : xm_q.result;

  // ---------------------------------------------------------- stall network
  assign m_stall = xm_q.valid && xm_q.is_mem && !dmemresp_val;
  assign m_go    = !m_stall;
  assign x_wait  = dx_q.valid && ((x_is_mem && !dmemreq_rdy) ||
                                  (x_mngr_rd && !mngr2proc_val) ||
                                  (x_mngr_wr && !proc2mngr_rdy));
  assign x_go    = m_go && !x_wait;
  assign d_go    = x_go && !d_hazard;

  assign x_redirect = x_go && dx_q.valid && x_take;
  assign d_redirect = d_go && fd_valid && d_out.kind == K_JAL && !x_redirect;

  // ------------------------------------------------------------- interfaces
  assign dmemreq_val   = dx_q.valid && x_is_mem && m_go;
  assign dmemresp_rdy  = xm_q.valid && xm_q.is_mem;
  assign mngr2proc_rdy = dx_q.valid && x_mngr_rd && m_go;
  assign proc2mngr_val = dx_q.valid && x_mngr_wr && m_go;
  assign proc2mngr_msg = dx_q.op1;

  always_comb begin
    dmemreq_msg      = '0;
    dmemreq_msg.typ  = (dx_q.kind == K_STORE) ? MEM_WRITE : MEM_READ;
    dmemreq_msg.addr = x_addr;
    dmemreq_msg.data = dx_q.op2;
    imemreq_msg      = '0;
    imemreq_msg.typ  = MEM_READ;
    imemreq_msg.addr = pc_f;
  end

  // fetch: one request in flight; a response is taken when D has room or
  // when it is to be dropped
  logic squash_f, fd_free, resp_take, resp_keep;
  assign squash_f     = x_redirect || d_redirect;
  assign fd_free      = !fd_valid || d_go;
  assign imemreq_val  = !out_q;
  assign imemresp_rdy = out_q && (drop_q || squash_f || fd_free);
  assign resp_take    = imemresp_val && imemresp_rdy;
  assign resp_keep    = resp_take && !drop_q && !squash_f;

  assign commit_inst = mw_q.valid;
  assign stats_en    = stats_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      pc_f     <= RESET_PC;
      out_q    <= 1'b0;
      drop_q   <= 1'b0;
      fd_valid <= 1'b0;
      dx_q     <= '0;
      xm_q     <= '0;
      mw_q     <= '0;
      stats_q  <= 1'b0;
      for (int i = 0; i < 32; i++) rf[i] <= '0;
    end else begin
      // ---- F
      if (imemreq_val && imemreq_rdy) begin
        out_q    <= 1'b1;
        req_pc_q <= pc_f;
        drop_q   <= squash_f;
        pc_f     <= squash_f ? (x_redirect ? x_target : d_target) : pc_f + 32'd4;
      end else begin
        if (resp_take) out_q <= 1'b0;
        if (resp_take) drop_q <= 1'b0;
        else if (squash_f && out_q) drop_q <= 1'b1;
        if (squash_f) pc_f <= x_redirect ? x_target : d_target;
      end
      if (x_redirect)          fd_valid <= 1'b0;
      else if (resp_keep) begin
        fd_valid <= 1'b1;
        fd_inst  <= imemresp_msg.data;
        fd_pc    <= req_pc_q;
      end else if (d_go)       fd_valid <= 1'b0;

      // ---- D -> X
      if (x_go) begin
        dx_q       <= d_out;
        dx_q.valid <= fd_valid && !d_hazard && !x_redirect;
      end

      // ---- X -> M
      if (m_go) begin
        xm_q.valid   <= dx_q.valid && x_go;
        xm_q.is_mem  <= x_is_mem;
        xm_q.is_load <= dx_q.kind == K_LOAD;
        xm_q.result  <= x_result;
        xm_q.rd      <= dx_q.rd;
        xm_q.wen     <= dx_q.wen;
        if (dx_q.valid && x_go && dx_q.kind == K_CSRW && dx_q.csr == CSR_STATS_EN)
          stats_q <= dx_q.op1[0];
      end

      // ---- M -> W
      mw_q.valid  <= xm_q.valid && m_go;
      mw_q.result <= m_result;
      mw_q.rd     <= xm_q.rd;
      mw_q.wen    <= xm_q.wen;

      // ---- W
      if (mw_q.valid && mw_q.wen) rf[mw_q.rd] <= mw_q.result;
    end
  end

`ifndef SYNTHESIS
  // Only one fetch may be in flight, and a response only comes for it.
  assert property (@(posedge clk) disable iff (reset) imemresp_val |-> out_q);
  // A data response only arrives for a load or store waiting in M.
  assert property (@(posedge clk) disable iff (reset) dmemresp_val |-> xm_q.valid && xm_q.is_mem);
`endif
endmodule
