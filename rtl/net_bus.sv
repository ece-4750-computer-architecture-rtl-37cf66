// Four-terminal bus network carrying messages between terminals.
//
// Each input terminal feeds a small input queue; each output terminal is
// fed by a small output queue.  One shared bus moves at most one message
// per cycle: a round-robin arbiter picks among the input-queue heads whose
// destination output queue has room, and the winner is written into the
// output queue selected by the message's dest field.  Messages from one
// source to one destination stay in order.  Latency through an idle bus is
// two cycles (input queue, then output queue); throughput is one message
// per cycle for the whole network, which is what makes it a bus.
//
// The system needs a four-port network but leaves the topology open
// (a bus or a ring); the bus and its queue depths are this design's
// choice.  msg_t must be a packed struct with a "dest" field.
module net_bus #(
  parameter type         msg_t     = mcore_pkg::net_req_4B_t,
  parameter int unsigned NPORTS    = 4,
  parameter int unsigned QDEPTH    = 2
) (
  input  logic clk,
  input  logic reset,

  input  logic in_val [NPORTS],
  output logic in_rdy [NPORTS],
  input  msg_t in_msg [NPORTS],

  output logic out_val [NPORTS],
  input  logic out_rdy [NPORTS],
  output msg_t out_msg [NPORTS]
);
  logic        iq_val [NPORTS];
  logic        iq_rdy [NPORTS];
  msg_t        iq_msg [NPORTS];
  logic        oq_enq_val [NPORTS];
  logic        oq_enq_rdy [NPORTS];
  logic [NPORTS-1:0] req, grant;
  msg_t        bus_msg;
  logic        bus_val;

  for (genvar i = 0; i < NPORTS; i++) begin : g_inq
    vr_queue #(.msg_t(msg_t), .DEPTH(QDEPTH)) u_inq (
      .clk, .reset,
      .enq_val(in_val[i]), .enq_rdy(in_rdy[i]), .enq_msg(in_msg[i]),
      .deq_val(iq_val[i]), .deq_rdy(iq_rdy[i]), .deq_msg(iq_msg[i])
    );
  end

  // A head may request the bus only if its destination can accept.
  always_comb begin
    for (int i = 0; i < int'(NPORTS); i++)
      req[i] = iq_val[i] && oq_enq_rdy[int'(iq_msg[i].dest) % int'(NPORTS)];
  end

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk, .reset, .en(1'b1), .req, .grant
  );

  always_comb begin
    bus_val = 1'b0;
    bus_msg = iq_msg[0];
    for (int i = 0; i < int'(NPORTS); i++) begin
      iq_rdy[i] = grant[i];
      if (grant[i]) begin
        bus_val = 1'b1;
        bus_msg = iq_msg[i];
      end
    end
    for (int o = 0; o < int'(NPORTS); o++)
      oq_enq_val[o] = bus_val && (int'(bus_msg.dest) % int'(NPORTS) == o);
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_outq
    vr_queue #(.msg_t(msg_t), .DEPTH(QDEPTH)) u_outq (
      .clk, .reset,
      .enq_val(oq_enq_val[o]), .enq_rdy(oq_enq_rdy[o]), .enq_msg(bus_msg),
      .deq_val(out_val[o]), .deq_rdy(out_rdy[o]), .deq_msg(out_msg[o])
    );
  end

`ifndef SYNTHESIS
  // At most one message crosses the bus per cycle.
  assert property (@(posedge clk) disable iff (reset) $onehot0(grant));
`endif
endmodule
