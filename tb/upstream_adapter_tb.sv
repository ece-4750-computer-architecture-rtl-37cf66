// Self-checking testbench for the upstream message adapter.
//
// Two adapters are checked with random messages: one in banked mode
// (id 2, destination from address bits [5:4]) and one in main-memory mode
// (id 3, destination always 0).  Expected header, payload and the
// id-in-opaque encoding are computed here from the field definitions, and
// the val/rdy pass-through is checked in both directions.
module upstream_adapter_tb;
  import mcore_pkg::*;

  int checks = 0, failures = 0;

  logic         mq_val [2], mq_rdy [2], nq_val [2], nq_rdy [2];
  logic         nr_val [2], nr_rdy [2], mr_val [2], mr_rdy [2];
  mem_req_4B_t  mq_msg [2];
  net_req_4B_t  nq_msg [2];
  net_resp_4B_t nr_msg [2];
  mem_resp_4B_t mr_msg [2];

  upstream_adapter #(.ID(2), .DEST_FROM_BANK(1'b1)) u_bank (
    .memreq_val(mq_val[0]), .memreq_rdy(mq_rdy[0]), .memreq_msg(mq_msg[0]),
    .netreq_val(nq_val[0]), .netreq_rdy(nq_rdy[0]), .netreq_msg(nq_msg[0]),
    .netresp_val(nr_val[0]), .netresp_rdy(nr_rdy[0]), .netresp_msg(nr_msg[0]),
    .memresp_val(mr_val[0]), .memresp_rdy(mr_rdy[0]), .memresp_msg(mr_msg[0]));
  upstream_adapter #(.ID(3), .DEST_FROM_BANK(1'b0)) u_zero (
    .memreq_val(mq_val[1]), .memreq_rdy(mq_rdy[1]), .memreq_msg(mq_msg[1]),
    .netreq_val(nq_val[1]), .netreq_rdy(nq_rdy[1]), .netreq_msg(nq_msg[1]),
    .netresp_val(nr_val[1]), .netresp_rdy(nr_rdy[1]), .netresp_msg(nr_msg[1]),
    .memresp_val(mr_val[1]), .memresp_rdy(mr_rdy[1]), .memresp_msg(mr_msg[1]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < 2; k++) begin
        mq_val[k] = 1'($urandom); nq_rdy[k] = 1'($urandom);
        nr_val[k] = 1'($urandom); mr_rdy[k] = 1'($urandom);
        mq_msg[k] = '0;
        mq_msg[k].typ    = mem_type_e'($urandom % 2);
        mq_msg[k].opaque = 8'($urandom % 64);
        mq_msg[k].addr   = $urandom;
        mq_msg[k].data   = $urandom;
        nr_msg[k] = '0;
        nr_msg[k].src    = 2'($urandom);
        nr_msg[k].dest   = 2'(k + 2);
        nr_msg[k].payload.opaque = 8'($urandom % 64);
        nr_msg[k].payload.data   = $urandom;
        nr_msg[k].payload.test   = 2'($urandom);
      end
      #1;
      for (int k = 0; k < 2; k++) begin
        logic [1:0] want_dest;
        logic [1:0] id;
        id = (k == 0) ? 2'd2 : 2'd3;
        want_dest = (k == 0) ? mq_msg[k].addr[5:4] : 2'd0;
        check(nq_val[k] == mq_val[k] && mq_rdy[k] == nq_rdy[k], "request handshake");
        check(nq_msg[k].src == id, "source id");
        check(nq_msg[k].dest == want_dest, "destination");
        check(nq_msg[k].payload.addr == mq_msg[k].addr && nq_msg[k].payload.data == mq_msg[k].data
              && nq_msg[k].payload.typ == mq_msg[k].typ, "payload");
        check(nq_msg[k].payload.opaque == {id, mq_msg[k].opaque[5:0]}, "opaque carries id");
        check(mr_val[k] == nr_val[k] && nr_rdy[k] == mr_rdy[k], "response handshake");
        check(mr_msg[k] == nr_msg[k].payload, "response payload");
      end
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
