// Upstream message adapter: sits at a requester's terminal of a
// request/response network pair.
//
// Request side: a memory request from the requester becomes a network
// message whose payload is that request.  The header's source is this
// adapter's id ID.  The destination is, in banked mode (DEST_FROM_BANK=1),
// the two bank bits addr[BANK_LSB+1:BANK_LSB] of the request, so that
// cache lines interleave over the four data-cache banks; in the other mode
// it is always terminal 0 (the single main-memory port).  The requester id
// is also written into the two high bits of the payload's opaque field so
// that the far side can route the response back; the low six opaque bits
// pass unchanged.  Response side: the network header is dropped and the
// payload is handed on as the memory response.
//
// Both directions are purely combinational (val, rdy and msg pass
// straight through), adding no latency.  The id-in-opaque scheme follows
// the system description; the bit positions are this design's choice, and
// requesters must keep their own opaque values below 64.
module upstream_adapter #(
  parameter type         req_t          = mcore_pkg::mem_req_4B_t,
  parameter type         resp_t         = mcore_pkg::mem_resp_4B_t,
  parameter type         net_req_t      = mcore_pkg::net_req_4B_t,
  parameter type         net_resp_t     = mcore_pkg::net_resp_4B_t,
  parameter int unsigned ID             = 0,
  parameter bit          DEST_FROM_BANK = 1'b1,
  parameter int unsigned BANK_LSB       = 4
) (
  // memory request in, network request out
  input  logic      memreq_val,
  output logic      memreq_rdy,
  input  req_t      memreq_msg,
  output logic      netreq_val,
  input  logic      netreq_rdy,
  output net_req_t  netreq_msg,
  // network response in, memory response out
  input  logic      netresp_val,
  output logic      netresp_rdy,
  input  net_resp_t netresp_msg,
  output logic      memresp_val,
  input  logic      memresp_rdy,
  output resp_t     memresp_msg
);
  import mcore_pkg::*;

  assign netreq_val = memreq_val;
  assign memreq_rdy = netreq_rdy;

  always_comb begin
    netreq_msg             = '0;
    netreq_msg.src         = PORT_BITS'(ID);
    netreq_msg.dest        = DEST_FROM_BANK ? memreq_msg.addr[BANK_LSB +: PORT_BITS]
                                            : '0;
    netreq_msg.opaque      = memreq_msg.opaque;
    netreq_msg.payload     = memreq_msg;
    netreq_msg.payload.opaque[OPAQUE_BITS-1 -: PORT_BITS] = PORT_BITS'(ID);
  end

  assign memresp_val = netresp_val;
  assign netresp_rdy = memresp_rdy;
  assign memresp_msg = netresp_msg.payload;
endmodule
