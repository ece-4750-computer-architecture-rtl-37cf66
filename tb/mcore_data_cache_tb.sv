// Self-checking testbench for McoreDataCache, the shared banked data cache.
//
// Four processor-side sources issue random word reads and writes over a
// 4 KB region (four times the total capacity, so lines conflict and dirty
// lines are written back), in front of a single-port main memory with
// random stalls.  Each source writes only words whose bits [3:2] equal its
// id, so it owns a private reference model, yet all four share every cache
// line.  Checked: read data and opaque values; the per-bank access hooks
// add up to the number of requests sent to each bank; misses, hits and
// write-backs all occur in every bank's traffic.
module mcore_data_cache_tb;
  import mcore_pkg::*;

  localparam int N = 4;
  localparam int REQS = 400;
  localparam int SLOTS = 256;           // 256 lines * 16 B = 4 KB

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic          preq_val [N], preq_rdy [N], presp_val [N], presp_rdy [N];
  mem_req_4B_t   preq_msg [N];
  mem_resp_4B_t  presp_msg [N];
  logic          mm_req_val [1], mm_req_rdy [1], mm_resp_val [1], mm_resp_rdy [1];
  mem_req_16B_t  mm_req_msg [1];
  mem_resp_16B_t mm_resp_msg [1];
  logic [N-1:0]  dcache_access, dcache_miss;

  mcore_data_cache dut (
    .clk, .reset,
    .procreq_val(preq_val), .procreq_rdy(preq_rdy), .procreq_msg(preq_msg),
    .procresp_val(presp_val), .procresp_rdy(presp_rdy), .procresp_msg(presp_msg),
    .mainmemreq_val(mm_req_val[0]), .mainmemreq_rdy(mm_req_rdy[0]), .mainmemreq_msg(mm_req_msg[0]),
    .mainmemresp_val(mm_resp_val[0]), .mainmemresp_rdy(mm_resp_rdy[0]), .mainmemresp_msg(mm_resp_msg[0]),
    .dcache_access, .dcache_miss);

  test_mem #(.NPORTS(1), .LAT(2), .STALL_PCT(20)) u_mem (
    .clk, .reset,
    .req_val(mm_req_val), .req_rdy(mm_req_rdy), .req_msg(mm_req_msg),
    .resp_val(mm_resp_val), .resp_rdy(mm_resp_rdy), .resp_msg(mm_resp_msg));

  int checks = 0, failures = 0, done_srcs = 0, writebacks = 0;
  int sent_to_bank [N], access_cnt [N], miss_cnt [N];
  logic [31:0] ref_mem [N][SLOTS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (!reset) begin
    for (int j = 0; j < N; j++) begin
      if (dcache_access[j]) access_cnt[j]++;
      if (dcache_miss[j])   miss_cnt[j]++;
    end
    if (mm_req_val[0] && mm_req_rdy[0] && mm_req_msg[0].typ == MEM_WRITE) writebacks++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      preq_val[i] = 0; preq_msg[i] = '0; presp_rdy[i] = 1;
      sent_to_bank[i] = 0; access_cnt[i] = 0; miss_cnt[i] = 0;
      for (int k = 0; k < SLOTS; k++) begin
        ref_mem[i][k] = $urandom;
        u_mem.mem[k * 4 + i] = ref_mem[i][k];
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int s = 0; s < N; s++) begin
      automatic int src = s;
      fork begin
        for (int n = 0; n < REQS; n++) begin
          automatic int slot = $urandom % SLOTS;
          automatic bit wr = ($urandom % 3) == 0;
          automatic logic [7:0] op = 8'($urandom % 64);
          automatic logic [31:0] a = 32'(slot * 16 + src * 4);
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
          sent_to_bank[a[5:4]]++;
          while (!presp_val[src]) begin @(posedge clk); #1; end
          check(presp_msg[src].opaque == op, $sformatf("src %0d opaque", src));
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
    repeat (2) @(posedge clk);
    for (int j = 0; j < N; j++) begin
      check(access_cnt[j] == sent_to_bank[j],
            $sformatf("bank %0d accesses %0d sent %0d", j, access_cnt[j], sent_to_bank[j]));
      check(miss_cnt[j] > 0 && miss_cnt[j] < access_cnt[j], $sformatf("bank %0d misses %0d", j, miss_cnt[j]));
      $display("bank %0d: access=%0d miss=%0d", j, access_cnt[j], miss_cnt[j]);
    end
    check(writebacks > 0, "no dirty write-back");
    $display("writebacks=%0d", writebacks);
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
