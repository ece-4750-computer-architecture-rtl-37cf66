// Downstream message adapter: sits at a responder's terminal (a cache bank
// or main memory) of a request/response network pair.
//
// Request side: the network header is dropped and the payload is handed on
// as the memory request.  Response side: the responder's memory response
// becomes a network message whose destination is the requester id found in
// the two high opaque bits (placed there by the upstream adapter), whose
// source is this adapter's id ID, and whose payload is the response with
// those two opaque bits cleared again, restoring the requester's own opaque
// value.  Responders must return the request's opaque field unchanged.
//
// Both directions are purely combinational, adding no latency.
module downstream_adapter #(
  parameter type         req_t      = mcore_pkg::mem_req_4B_t,
  parameter type         resp_t     = mcore_pkg::mem_resp_4B_t,
  parameter type         net_req_t  = mcore_pkg::net_req_4B_t,
  parameter type         net_resp_t = mcore_pkg::net_resp_4B_t,
  parameter int unsigned ID         = 0
) (
  // network request in, memory request out
  input  logic      netreq_val,
  output logic      netreq_rdy,
  input  net_req_t  netreq_msg,
  output logic      memreq_val,
  input  logic      memreq_rdy,
  output req_t      memreq_msg,
  // memory response in, network response out
  input  logic      memresp_val,
  output logic      memresp_rdy,
  input  resp_t     memresp_msg,
  output logic      netresp_val,
  input  logic      netresp_rdy,
  output net_resp_t netresp_msg
);
  import mcore_pkg::*;

  assign memreq_val = netreq_val;
  assign netreq_rdy = memreq_rdy;
  assign memreq_msg = netreq_msg.payload;

  assign netresp_val = memresp_val;
  assign memresp_rdy = netresp_rdy;

  always_comb begin
    netresp_msg         = '0;
    netresp_msg.src     = PORT_BITS'(ID);
    netresp_msg.dest    = memresp_msg.opaque[OPAQUE_BITS-1 -: PORT_BITS];
    netresp_msg.opaque  = memresp_msg.opaque;
    netresp_msg.payload = memresp_msg;
    netresp_msg.payload.opaque[OPAQUE_BITS-1 -: PORT_BITS] = '0;
  end
endmodule
