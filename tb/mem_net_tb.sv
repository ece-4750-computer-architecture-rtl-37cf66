// Self-checking testbench for MemNet.
//
// Four cache-side sources send random cache-line reads and writes, each to
// its own set of lines, and a single-port test memory serves main-memory
// port 0.  Checked: every request leaves through port 0 whatever its
// address, every response returns to its sender with the sender's opaque
// value and the right line of data, and the network serialises requests
// from several sources that compete in the same cycle.
module mem_net_tb;
  import mcore_pkg::*;

  localparam int N = 4;
  localparam int REQS = 200;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic          req_val [N], req_rdy [N], resp_val [N], resp_rdy [N];
  mem_req_16B_t  req_msg [N];
  mem_resp_16B_t resp_msg [N];
  logic          mm_req_val [1], mm_req_rdy [1], mm_resp_val [1], mm_resp_rdy [1];
  mem_req_16B_t  mm_req_msg [1];
  mem_resp_16B_t mm_resp_msg [1];

  mem_net #(.NPORTS(N)) dut (
    .clk, .reset,
    .memreq_val(req_val), .memreq_rdy(req_rdy), .memreq_msg(req_msg),
    .memresp_val(resp_val), .memresp_rdy(resp_rdy), .memresp_msg(resp_msg),
    .mainmemreq_val(mm_req_val[0]), .mainmemreq_rdy(mm_req_rdy[0]), .mainmemreq_msg(mm_req_msg[0]),
    .mainmemresp_val(mm_resp_val[0]), .mainmemresp_rdy(mm_resp_rdy[0]), .mainmemresp_msg(mm_resp_msg[0]));

  test_mem #(.NPORTS(1), .LAT(1), .STALL_PCT(20)) u_mem (
    .clk, .reset,
    .req_val(mm_req_val), .req_rdy(mm_req_rdy), .req_msg(mm_req_msg),
    .resp_val(mm_resp_val), .resp_rdy(mm_resp_rdy), .resp_msg(mm_resp_msg));

  int checks = 0, failures = 0, contention = 0, done_srcs = 0, mm_reqs = 0;
  logic [127:0] ref_line [N][32];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (!reset) begin
    int v;
    v = 0;
    for (int j = 0; j < N; j++) if (dut.u_reqnet.iq_val[j]) v++;
    if (v > 1) contention++;
    if (mm_req_val[0] && mm_req_rdy[0]) mm_reqs++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      req_val[i] = 0; req_msg[i] = '0; resp_rdy[i] = 1;
      for (int k = 0; k < 32; k++) begin
        ref_line[i][k] = {$urandom, $urandom, $urandom, $urandom};
        for (int w = 0; w < 4; w++) u_mem.mem[(k * N + i) * 4 + w] = ref_line[i][k][w*32 +: 32];
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int s = 0; s < N; s++) begin
      automatic int src = s;
      fork begin
        for (int n = 0; n < REQS; n++) begin
          automatic int slot = $urandom % 32;
          automatic bit wr = ($urandom % 2) == 1;
          automatic logic [7:0] op = 8'(n % 64);
          @(negedge clk);
          req_val[src] = 1;
          req_msg[src] = '0;
          req_msg[src].typ = wr ? MEM_WRITE : MEM_READ;
          req_msg[src].addr = 32'((slot * N + src) * 16);
          req_msg[src].opaque = op;
          req_msg[src].data = {$urandom, $urandom, $urandom, $urandom};
          while (!req_rdy[src]) @(negedge clk);
          @(posedge clk);
          #1 req_val[src] = 0;
          while (!resp_val[src]) begin @(posedge clk); #1; end
          check(resp_msg[src].opaque == op, $sformatf("src %0d opaque", src));
          if (!wr) check(resp_msg[src].data == ref_line[src][slot], $sformatf("src %0d line data", src));
          else     ref_line[src][slot] = req_msg[src].data;
          @(posedge clk);
        end
        done_srcs++;
      end join_none
    end
    wait (done_srcs == N);
    check(mm_reqs == N * REQS, $sformatf("main memory saw %0d requests", mm_reqs));
    check(contention > 0, "no contention seen");
    $display("contention cycles=%0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
