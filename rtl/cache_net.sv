// CacheNet: the request/response network pair between the four processors
// and the four data-cache banks.
//
// Each processor terminal i has an upstream adapter (id i) that turns the
// processor's memory request into a request-network message addressed to
// the bank named by address bits [5:4], and turns response-network
// messages back into memory responses.  Each bank terminal j has a
// downstream adapter (id j) that hands requests to bank j and sends the
// bank's responses back to the processor whose id rides in the high opaque
// bits.  Both networks are four-port buses (see net_bus), so a request
// reaches a bank two cycles after it is accepted when the bus is idle, and
// likewise for a response.  Messages between one processor and one bank
// stay in order; responses from different banks may arrive out of order.
module cache_net #(
  parameter int unsigned NPORTS = 4
) (
  input  logic                    clk,
  input  logic                    reset,

  input  logic                    procreq_val   [NPORTS],
  output logic                    procreq_rdy   [NPORTS],
  input  mcore_pkg::mem_req_4B_t  procreq_msg   [NPORTS],
  output logic                    procresp_val  [NPORTS],
  input  logic                    procresp_rdy  [NPORTS],
  output mcore_pkg::mem_resp_4B_t procresp_msg  [NPORTS],

  output logic                    cachereq_val  [NPORTS],
  input  logic                    cachereq_rdy  [NPORTS],
  output mcore_pkg::mem_req_4B_t  cachereq_msg  [NPORTS],
  input  logic                    cacheresp_val [NPORTS],
  output logic                    cacheresp_rdy [NPORTS],
  input  mcore_pkg::mem_resp_4B_t cacheresp_msg [NPORTS]
);
  import mcore_pkg::*;

  logic         reqin_val  [NPORTS], reqin_rdy  [NPORTS];
  net_req_4B_t  reqin_msg  [NPORTS];
  logic         reqout_val [NPORTS], reqout_rdy [NPORTS];
  net_req_4B_t  reqout_msg [NPORTS];
  logic         rspin_val  [NPORTS], rspin_rdy  [NPORTS];
  net_resp_4B_t rspin_msg  [NPORTS];
  logic         rspout_val [NPORTS], rspout_rdy [NPORTS];
  net_resp_4B_t rspout_msg [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_up
    upstream_adapter #(
      .req_t(mem_req_4B_t), .resp_t(mem_resp_4B_t),
      .net_req_t(net_req_4B_t), .net_resp_t(net_resp_4B_t),
      .ID(i), .DEST_FROM_BANK(1'b1), .BANK_LSB(4)
    ) u_up (
      .memreq_val (procreq_val[i]),  .memreq_rdy (procreq_rdy[i]),  .memreq_msg (procreq_msg[i]),
      .netreq_val (reqin_val[i]),    .netreq_rdy (reqin_rdy[i]),    .netreq_msg (reqin_msg[i]),
      .netresp_val(rspout_val[i]),   .netresp_rdy(rspout_rdy[i]),   .netresp_msg(rspout_msg[i]),
      .memresp_val(procresp_val[i]), .memresp_rdy(procresp_rdy[i]), .memresp_msg(procresp_msg[i])
    );
  end

  net_bus #(.msg_t(net_req_4B_t), .NPORTS(NPORTS)) u_reqnet (
    .clk, .reset,
    .in_val(reqin_val),   .in_rdy(reqin_rdy),   .in_msg(reqin_msg),
    .out_val(reqout_val), .out_rdy(reqout_rdy), .out_msg(reqout_msg)
  );

  net_bus #(.msg_t(net_resp_4B_t), .NPORTS(NPORTS)) u_respnet (
    .clk, .reset,
    .in_val(rspin_val),   .in_rdy(rspin_rdy),   .in_msg(rspin_msg),
    .out_val(rspout_val), .out_rdy(rspout_rdy), .out_msg(rspout_msg)
  );

  for (genvar j = 0; j < NPORTS; j++) begin : g_down
    downstream_adapter #(
      .req_t(mem_req_4B_t), .resp_t(mem_resp_4B_t),
      .net_req_t(net_req_4B_t), .net_resp_t(net_resp_4B_t),
      .ID(j)
    ) u_down (
      .netreq_val (reqout_val[j]),    .netreq_rdy (reqout_rdy[j]),    .netreq_msg (reqout_msg[j]),
      .memreq_val (cachereq_val[j]),  .memreq_rdy (cachereq_rdy[j]),  .memreq_msg (cachereq_msg[j]),
      .memresp_val(cacheresp_val[j]), .memresp_rdy(cacheresp_rdy[j]), .memresp_msg(cacheresp_msg[j]),
      .netresp_val(rspin_val[j]),     .netresp_rdy(rspin_rdy[j]),     .netresp_msg(rspin_msg[j])
    );
  end
endmodule
