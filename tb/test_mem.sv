// Behavioural multi-port test memory for simulation only.
//
// NPORTS independent val/rdy ports share one word array of 2**AW words
// (byte addresses wrap).  A port accepts a request when it holds no
// response, answers LAT cycles later (LAT >= 1) and holds the response
// until it is taken.  Reads return DATA_BITS/32 consecutive words starting
// at the word-aligned address; writes store them.  The response echoes
// type and opaque, with test bits 0.  When STALL_PCT > 0 a port randomly
// refuses requests that share of cycles, to exercise back-pressure.
module test_mem #(
  parameter type         req_t     = mcore_pkg::mem_req_16B_t,
  parameter type         resp_t    = mcore_pkg::mem_resp_16B_t,
  parameter int unsigned DATA_BITS = 128,
  parameter int unsigned NPORTS    = 1,
  parameter int unsigned AW        = 14,
  parameter int unsigned LAT       = 1,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic  clk,
  input  logic  reset,
  input  logic  req_val  [NPORTS],
  output logic  req_rdy  [NPORTS],
  input  req_t  req_msg  [NPORTS],
  output logic  resp_val [NPORTS],
  input  logic  resp_rdy [NPORTS],
  output resp_t resp_msg [NPORTS]
);
  localparam int unsigned WORDS = DATA_BITS / 32;

  logic [31:0] mem [2**AW];

  logic        pend  [NPORTS];
  int unsigned wait_cnt [NPORTS];
  logic        stall [NPORTS];
  resp_t       rsp_q [NPORTS];

  function automatic int unsigned widx(input logic [31:0] a, input int k);
    return ((a >> 2) + k) & ((1 << AW) - 1);
  endfunction

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    assign req_rdy[p]  = !pend[p] && !stall[p];
    assign resp_val[p] = pend[p] && (wait_cnt[p] == 0);
    assign resp_msg[p] = rsp_q[p];

    always_ff @(posedge clk) begin
      if (reset) begin
        pend[p]  <= 1'b0;
        stall[p] <= 1'b0;
        wait_cnt[p] <= 0;
      end else begin
        stall[p] <= (STALL_PCT > 0) && (($urandom % 100) < STALL_PCT);
        if (pend[p] && wait_cnt[p] != 0) wait_cnt[p] <= wait_cnt[p] - 1;
        if (resp_val[p] && resp_rdy[p]) pend[p] <= 1'b0;
        if (req_val[p] && req_rdy[p]) begin
          resp_t r;
          r        = '0;
          r.typ    = req_msg[p].typ;
          r.opaque = req_msg[p].opaque;
          for (int k = 0; k < int'(WORDS); k++) begin
            if (req_msg[p].typ == mcore_pkg::MEM_READ)
              r.data[k*32 +: 32] = mem[widx(req_msg[p].addr, k)];
            else
              mem[widx(req_msg[p].addr, k)] <= req_msg[p].data[k*32 +: 32];
          end
          rsp_q[p]    <= r;
          pend[p]     <= 1'b1;
          wait_cnt[p] <= LAT - 1;
        end
      end
    end
  end
endmodule
