// Self-checking testbench for the downstream message adapter.
//
// Random network requests must come out as their payloads; random memory
// responses whose high opaque bits name a requester must become network
// messages addressed to that requester, from this adapter's id (1), with
// the opaque bits restored to the requester's own value.
module downstream_adapter_tb;
  import mcore_pkg::*;

  int checks = 0, failures = 0;

  logic         nq_val, nq_rdy, mq_val, mq_rdy, mr_val, mr_rdy, nr_val, nr_rdy;
  net_req_4B_t  nq_msg;
  mem_req_4B_t  mq_msg;
  mem_resp_4B_t mr_msg;
  net_resp_4B_t nr_msg;

  downstream_adapter #(.ID(1)) dut (
    .netreq_val(nq_val), .netreq_rdy(nq_rdy), .netreq_msg(nq_msg),
    .memreq_val(mq_val), .memreq_rdy(mq_rdy), .memreq_msg(mq_msg),
    .memresp_val(mr_val), .memresp_rdy(mr_rdy), .memresp_msg(mr_msg),
    .netresp_val(nr_val), .netresp_rdy(nr_rdy), .netresp_msg(nr_msg));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [1:0] req_id;
      logic [5:0] own;
      req_id = 2'($urandom);
      own    = 6'($urandom);
      nq_val = 1'($urandom); mq_rdy = 1'($urandom);
      mr_val = 1'($urandom); nr_rdy = 1'($urandom);
      nq_msg = '0;
      nq_msg.src  = req_id;
      nq_msg.dest = 2'd1;
      nq_msg.payload.addr = $urandom;
      nq_msg.payload.data = $urandom;
      nq_msg.payload.opaque = {req_id, own};
      mr_msg = '0;
      mr_msg.typ = mem_type_e'($urandom % 2);
      mr_msg.opaque = {req_id, own};
      mr_msg.data = $urandom;
      mr_msg.test = 2'($urandom);
      #1;
      check(mq_val == nq_val && nq_rdy == mq_rdy, "request handshake");
      check(mq_msg == nq_msg.payload, "request payload");
      check(nr_val == mr_val && mr_rdy == nr_rdy, "response handshake");
      check(nr_msg.dest == req_id, "response destination from opaque");
      check(nr_msg.src == 2'd1, "response source id");
      check(nr_msg.payload.opaque == {2'b00, own}, "opaque restored");
      check(nr_msg.payload.data == mr_msg.data && nr_msg.payload.test == mr_msg.test
            && nr_msg.payload.typ == mr_msg.typ, "response payload");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
