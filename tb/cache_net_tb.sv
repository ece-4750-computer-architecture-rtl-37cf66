// Self-checking testbench for CacheNet.
//
// Four processor-side sources send random word reads and writes; the four
// cache-side ports are served by a four-port test memory (standing in for
// the banks).  Each source writes only words whose address bits [3:2]
// equal its own id, so its reference model is private, while bits [5:4]
// spread its requests over all four banks.  Checked: every request arrives
// at the bank named by bits [5:4]; every response returns to the source
// that sent it, with its own opaque value and correct data.  Contention
// (several requests waiting for the request bus in the same cycle) must occur.
module cache_net_tb;
  import mcore_pkg::*;

  localparam int N = 4;
  localparam int REQS = 300;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic         preq_val [N], preq_rdy [N], presp_val [N], presp_rdy [N];
  mem_req_4B_t  preq_msg [N];
  mem_resp_4B_t presp_msg [N];
  logic         creq_val [N], creq_rdy [N], cresp_val [N], cresp_rdy [N];
  mem_req_4B_t  creq_msg [N];
  mem_resp_4B_t cresp_msg [N];

  cache_net #(.NPORTS(N)) dut (
    .clk, .reset,
    .procreq_val(preq_val), .procreq_rdy(preq_rdy), .procreq_msg(preq_msg),
    .procresp_val(presp_val), .procresp_rdy(presp_rdy), .procresp_msg(presp_msg),
    .cachereq_val(creq_val), .cachereq_rdy(creq_rdy), .cachereq_msg(creq_msg),
    .cacheresp_val(cresp_val), .cacheresp_rdy(cresp_rdy), .cacheresp_msg(cresp_msg));

  test_mem #(.req_t(mem_req_4B_t), .resp_t(mem_resp_4B_t), .DATA_BITS(32),
             .NPORTS(N), .LAT(2), .STALL_PCT(25)) u_mem (
    .clk, .reset,
    .req_val(creq_val), .req_rdy(creq_rdy), .req_msg(creq_msg),
    .resp_val(cresp_val), .resp_rdy(cresp_rdy), .resp_msg(cresp_msg));

  int checks = 0, failures = 0, contention = 0, done_srcs = 0;
  int bank_hits [N];
  logic [31:0] ref_mem [N][64];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // requests reach the bank named by address bits [5:4]
  always @(posedge clk) if (!reset) begin
    int v;
    v = 0;
    for (int j = 0; j < N; j++) begin
      if (creq_val[j] && creq_rdy[j]) begin
        check(int'(creq_msg[j].addr[5:4]) == j, "request at wrong bank");
        bank_hits[j]++;
      end
      if (dut.u_reqnet.iq_val[j]) v++;
    end
    if (v > 1) contention++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      preq_val[i] = 0; preq_msg[i] = '0; presp_rdy[i] = 1; bank_hits[i] = 0;
      for (int k = 0; k < 64; k++) ref_mem[i][k] = 32'(i * 64 + k) ^ 32'h5A5A_0000;
    end
    for (int w = 0; w < 256; w++) u_mem.mem[w] = ref_mem[w % 4][w / 4];
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int s = 0; s < N; s++) begin
      automatic int src = s;
      fork begin
        for (int n = 0; n < REQS; n++) begin
          automatic int slot;
          automatic logic [31:0] a;
          automatic logic [7:0] op;
          automatic bit wr;
          slot = $urandom % 64;
          a  = 32'(slot * 16 + src * 4);
          wr = ($urandom % 2) == 1;
          op = 8'(n % 64);
          @(negedge clk);
          preq_val[src] = 1;
          preq_msg[src] = '0;
          preq_msg[src].typ = wr ? MEM_WRITE : MEM_READ;
          preq_msg[src].addr = a;
          preq_msg[src].opaque = op;
          preq_msg[src].data = $urandom;
          while (!preq_rdy[src]) @(negedge clk);
          @(posedge clk);
          #1 preq_val[src] = 0;
          while (!presp_val[src]) begin @(posedge clk); #1; end
          check(presp_msg[src].opaque == op, $sformatf("src %0d opaque %h exp %h", src, presp_msg[src].opaque, op));
          if (!wr)
            check(presp_msg[src].data == ref_mem[src][slot],
                  $sformatf("src %0d read %h got %h exp %h", src, a, presp_msg[src].data, ref_mem[src][slot]));
          else
            ref_mem[src][slot] = preq_msg[src].data;
          @(posedge clk);
        end
        done_srcs++;
      end join_none
    end
    wait (done_srcs == N);
    check(contention > 0, "no request contention seen");
    for (int j = 0; j < N; j++) check(bank_hits[j] > 0, "a bank was never used");
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
