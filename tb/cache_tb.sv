// Self-checking testbench for the blocking cache (unbanked, 16 lines).
//
// The cache sits in front of a test memory with two-cycle latency and
// random back-pressure.  Random reads and writes over 1 KB (four lines
// competing for every set) are checked against a word-level reference
// memory, and the reported hit/miss bit against a reference tag store of
// a direct-mapped cache.  Reads of lines that were evicted dirty prove the
// write-back path.  The hit latency (response two cycles after the
// request's handshake cycle) is checked on every hit.
module cache_tb;
  import mcore_pkg::*;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic          creq_val, creq_rdy, cresp_val, cresp_rdy;
  mem_req_4B_t   creq_msg;
  mem_resp_4B_t  cresp_msg;
  logic          mreq_val [1], mreq_rdy [1], mresp_val [1], mresp_rdy [1];
  mem_req_16B_t  mreq_msg [1];
  mem_resp_16B_t mresp_msg [1];

  cache #(.NUM_BANKS(0), .NUM_LINES(16)) dut (
    .clk, .reset,
    .cachereq_val(creq_val), .cachereq_rdy(creq_rdy), .cachereq_msg(creq_msg),
    .cacheresp_val(cresp_val), .cacheresp_rdy(cresp_rdy), .cacheresp_msg(cresp_msg),
    .memreq_val(mreq_val[0]), .memreq_rdy(mreq_rdy[0]), .memreq_msg(mreq_msg[0]),
    .memresp_val(mresp_val[0]), .memresp_rdy(mresp_rdy[0]), .memresp_msg(mresp_msg[0]));

  test_mem #(.NPORTS(1), .LAT(2), .STALL_PCT(20)) u_mem (
    .clk, .reset,
    .req_val(mreq_val), .req_rdy(mreq_rdy), .req_msg(mreq_msg),
    .resp_val(mresp_val), .resp_rdy(mresp_rdy), .resp_msg(mresp_msg));

  int checks = 0, failures = 0;
  int hits = 0, misses = 0, writebacks = 0;
  logic [31:0] ref_mem [256];          // 1 KB region
  logic [23:0] ref_tag [16];
  logic        ref_val [16];

  always @(posedge clk)
    if (!reset && mreq_val[0] && mreq_rdy[0] && mreq_msg[0].typ == MEM_WRITE) writebacks++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(mem_type_e t, logic [31:0] addr, logic [31:0] wdata);
    int lat;
    bit exp_hit;
    logic [3:0] idx;
    idx = addr[7:4];
    exp_hit = (t == MEM_INIT) || (ref_val[idx] && ref_tag[idx] == addr[31:8]);
    @(negedge clk);
    creq_val = 1;
    creq_msg = '0;
    creq_msg.typ = t; creq_msg.addr = addr; creq_msg.data = wdata;
    creq_msg.opaque = 8'($urandom);
    while (!creq_rdy) @(negedge clk);
    @(posedge clk);
    #1 creq_val = 0;
    lat = 1;
    while (!cresp_val) begin @(posedge clk); #1; lat++; end
    check(cresp_msg.opaque == creq_msg.opaque && cresp_msg.typ == t, "opaque/type echoed");
    check(cresp_msg.test[0] == exp_hit, $sformatf("hit bit for %h (exp %0d)", addr, exp_hit));
    if (t == MEM_READ)
      check(cresp_msg.data == ref_mem[addr[9:2]],
            $sformatf("read %h got %h exp %h", addr, cresp_msg.data, ref_mem[addr[9:2]]));
    else
      ref_mem[addr[9:2]] = wdata;
    if (exp_hit && t != MEM_INIT) begin
      hits++;
      check(lat == 2, $sformatf("hit latency %0d", lat));
    end else if (!exp_hit) misses++;
    ref_val[idx] = 1; ref_tag[idx] = addr[31:8];
    @(negedge clk);
    cresp_rdy = ($urandom % 4 != 0);
    if (!cresp_rdy) begin @(negedge clk); cresp_rdy = 1; end
  endtask

  initial begin
    creq_val = 0; creq_msg = '0; cresp_rdy = 1;
    for (int i = 0; i < 16; i++) ref_val[i] = 0;
    for (int i = 0; i < 256; i++) begin
      ref_mem[i] = 32'hA000_0000 + 32'(i * 7);
      u_mem.mem[i] = ref_mem[i];
    end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // INIT installs a line without a memory access
    access(MEM_INIT, 32'h0000_0010, 32'h1234_5678);
    access(MEM_READ, 32'h0000_0010, 0);
    // a read miss, then hits on the same line
    access(MEM_READ, 32'h0000_0124, 0);
    access(MEM_READ, 32'h0000_0128, 0);
    access(MEM_WRITE, 32'h0000_012C, 32'hDEAD_BEEF);
    access(MEM_READ, 32'h0000_012C, 0);
    // conflict: evicts the dirty line, then brings it back
    access(MEM_READ, 32'h0000_0224, 0);
    access(MEM_READ, 32'h0000_012C, 0);
    for (int n = 0; n < 1500; n++) begin
      logic [31:0] a;
      a = {22'b0, 8'($urandom), 2'b00};
      if ($urandom % 2) access(MEM_WRITE, a, $urandom);
      else              access(MEM_READ, a, 0);
    end
    check(hits > 100 && misses > 100, $sformatf("hits %0d misses %0d", hits, misses));
    check(writebacks > 50, $sformatf("write-backs %0d", writebacks));
    $display("hits=%0d misses=%0d writebacks=%0d", hits, misses, writebacks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
