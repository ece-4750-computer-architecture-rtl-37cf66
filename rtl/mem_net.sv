// MemNet: the request/response network pair between four caches and the
// single main-memory port.
//
// Built like CacheNet but carrying cache-line (128-bit) memory messages,
// and with upstream adapters in the mode that always addresses terminal 0,
// so every refill or write-back request reaches main-memory port 0.  The
// memory's response returns to the cache whose id rides in the high opaque
// bits.  The downstream adapters of terminals 1-3 are present, as in the
// four-port network, but never receive a request; their memory-side
// request outputs stay unused and their response inputs are tied idle.
// Each network is a four-port bus (see net_bus).
module mem_net #(
  parameter int unsigned NPORTS = 4
) (
  input  logic                     clk,
  input  logic                     reset,

  input  logic                     memreq_val   [NPORTS],
  output logic                     memreq_rdy   [NPORTS],
  input  mcore_pkg::mem_req_16B_t  memreq_msg   [NPORTS],
  output logic                     memresp_val  [NPORTS],
  input  logic                     memresp_rdy  [NPORTS],
  output mcore_pkg::mem_resp_16B_t memresp_msg  [NPORTS],

  output logic                     mainmemreq_val,
  input  logic                     mainmemreq_rdy,
  output mcore_pkg::mem_req_16B_t  mainmemreq_msg,
  input  logic                     mainmemresp_val,
  output logic                     mainmemresp_rdy,
  input  mcore_pkg::mem_resp_16B_t mainmemresp_msg
);
  import mcore_pkg::*;

  logic          reqin_val  [NPORTS], reqin_rdy  [NPORTS];
  net_req_16B_t  reqin_msg  [NPORTS];
  logic          reqout_val [NPORTS], reqout_rdy [NPORTS];
  net_req_16B_t  reqout_msg [NPORTS];
  logic          rspin_val  [NPORTS], rspin_rdy  [NPORTS];
  net_resp_16B_t rspin_msg  [NPORTS];
  logic          rspout_val [NPORTS], rspout_rdy [NPORTS];
  net_resp_16B_t rspout_msg [NPORTS];

  // memory side of every downstream adapter
  logic          dreq_val  [NPORTS], dreq_rdy  [NPORTS];
  mem_req_16B_t  dreq_msg  [NPORTS];
  logic          dresp_val [NPORTS], dresp_rdy [NPORTS];
  mem_resp_16B_t dresp_msg [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_up
    upstream_adapter #(
      .req_t(mem_req_16B_t), .resp_t(mem_resp_16B_t),
      .net_req_t(net_req_16B_t), .net_resp_t(net_resp_16B_t),
      .ID(i), .DEST_FROM_BANK(1'b0)
    ) u_up (
      .memreq_val (memreq_val[i]),  .memreq_rdy (memreq_rdy[i]),  .memreq_msg (memreq_msg[i]),
      .netreq_val (reqin_val[i]),   .netreq_rdy (reqin_rdy[i]),   .netreq_msg (reqin_msg[i]),
      .netresp_val(rspout_val[i]),  .netresp_rdy(rspout_rdy[i]),  .netresp_msg(rspout_msg[i]),
      .memresp_val(memresp_val[i]), .memresp_rdy(memresp_rdy[i]), .memresp_msg(memresp_msg[i])
    );
  end

  net_bus #(.msg_t(net_req_16B_t), .NPORTS(NPORTS)) u_reqnet (
    .clk, .reset,
    .in_val(reqin_val),   .in_rdy(reqin_rdy),   .in_msg(reqin_msg),
    .out_val(reqout_val), .out_rdy(reqout_rdy), .out_msg(reqout_msg)
  );

  net_bus #(.msg_t(net_resp_16B_t), .NPORTS(NPORTS)) u_respnet (
    .clk, .reset,
    .in_val(rspin_val),   .in_rdy(rspin_rdy),   .in_msg(rspin_msg),
    .out_val(rspout_val), .out_rdy(rspout_rdy), .out_msg(rspout_msg)
  );

  for (genvar j = 0; j < NPORTS; j++) begin : g_down
    downstream_adapter #(
      .req_t(mem_req_16B_t), .resp_t(mem_resp_16B_t),
      .net_req_t(net_req_16B_t), .net_resp_t(net_resp_16B_t),
      .ID(j)
    ) u_down (
      .netreq_val (reqout_val[j]), .netreq_rdy (reqout_rdy[j]), .netreq_msg (reqout_msg[j]),
      .memreq_val (dreq_val[j]),   .memreq_rdy (dreq_rdy[j]),   .memreq_msg (dreq_msg[j]),
      .memresp_val(dresp_val[j]),  .memresp_rdy(dresp_rdy[j]),  .memresp_msg(dresp_msg[j]),
      .netresp_val(rspin_val[j]),  .netresp_rdy(rspin_rdy[j]),  .netresp_msg(rspin_msg[j])
    );
  end

  // Terminal 0 is the main-memory port; terminals 1-3 have no memory.
  assign mainmemreq_val  = dreq_val[0];
  assign dreq_rdy[0]     = mainmemreq_rdy;
  assign mainmemreq_msg  = dreq_msg[0];
  assign dresp_val[0]    = mainmemresp_val;
  assign mainmemresp_rdy = dresp_rdy[0];
  assign dresp_msg[0]    = mainmemresp_msg;
  for (genvar j = 1; j < NPORTS; j++) begin : g_idle
    assign dreq_rdy[j]  = 1'b0;
    assign dresp_val[j] = 1'b0;
    assign dresp_msg[j] = '0;
  end
endmodule
