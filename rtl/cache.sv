// Blocking, direct-mapped, write-back, write-allocate cache with
// latency-insensitive request/response interfaces on both sides.
//
// The same module serves as a private instruction cache (NUM_BANKS=0) and
// as one bank of the shared data cache (NUM_BANKS=4).  Lines are 16 bytes
// (four 32-bit words); there are NUM_LINES lines.  With banking the two
// address bits [5:4] select the bank outside this module and the index is
// taken from the bits above them, [9:6]; without banking it is [7:4].
//
// A finite-state machine handles one request at a time:
//   IDLE        accept a request (cachereq_rdy=1)
//   TAG_CHECK   compare tag; on a hit read or write the word and go to RESP;
//               on a miss go to EVICT_REQ if the victim is dirty, else
//               REFILL_REQ
//   EVICT_REQ/EVICT_WAIT    write the dirty line back to memory
//   REFILL_REQ/REFILL_WAIT  read the line from memory and install it, then
//                           return to TAG_CHECK, which now hits
//   RESP        present the response until it is accepted
// A hit returns its response two cycles after the request is accepted.
// Response test bit 0 is 1 on a hit and 0 on a miss, which is how the
// system counts misses.  An INIT request writes the word and installs the
// line without touching memory (for loading caches in tests).  Memory
// requests carry opaque 0; responses return the request's opaque and type.
//
// What follows the system description: two caches per core role, 128-bit
// memory-side data, 32-bit processor-side data, bank bits [5:4], index
// [9:6] and tag [31:10] when banked.  The state machine, write policy and
// the direct-mapped organisation are this design's choices.  The tag array
// also keeps the bank bits (constant within one bank), so it stores
// addr[31:4] without the index bits.
module cache #(
  parameter int unsigned NUM_BANKS = 0,
  parameter int unsigned NUM_LINES = 16
) (
  input  logic                     clk,
  input  logic                     reset,

  input  logic                     cachereq_val,
  output logic                     cachereq_rdy,
  input  mcore_pkg::mem_req_4B_t   cachereq_msg,

  output logic                     cacheresp_val,
  input  logic                     cacheresp_rdy,
  output mcore_pkg::mem_resp_4B_t  cacheresp_msg,

  output logic                     memreq_val,
  input  logic                     memreq_rdy,
  output mcore_pkg::mem_req_16B_t  memreq_msg,

  input  logic                     memresp_val,
  output logic                     memresp_rdy,
  input  mcore_pkg::mem_resp_16B_t memresp_msg
);
  import mcore_pkg::*;

  localparam int unsigned BANK_BITS = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 0;
  localparam int unsigned IDX_BITS  = $clog2(NUM_LINES);
  localparam int unsigned IDX_LSB   = 4 + BANK_BITS;

  typedef enum logic [2:0] {
    S_IDLE, S_TAG_CHECK, S_EVICT_REQ, S_EVICT_WAIT,
    S_REFILL_REQ, S_REFILL_WAIT, S_RESP
  } state_e;

  state_e                state_q;
  mem_req_4B_t           req_q;
  logic                  miss_q;       // this request missed at least once
  logic [31:0]           rdata_q;

  logic [27:0]           tag_arr   [NUM_LINES];   // addr[31:4], index bits zero
  logic                  valid_arr [NUM_LINES];
  logic                  dirty_arr [NUM_LINES];
  logic [LINE_BITS-1:0]  data_arr  [NUM_LINES];

  function automatic logic [27:0] line_tag(input logic [31:0] a);
    logic [31:0] m;
    m = a;
    m[IDX_LSB +: IDX_BITS] = '0;
    return m[31:4];
  endfunction

  logic [IDX_BITS-1:0] idx;
  logic [1:0]          woff;
  logic                hit;
  logic [31:0]         victim_addr;

  assign idx  = req_q.addr[IDX_LSB +: IDX_BITS];
  assign woff = req_q.addr[3:2];
  assign hit  = valid_arr[idx] && (tag_arr[idx] == line_tag(req_q.addr));

  always_comb begin
    victim_addr = {tag_arr[idx], 4'b0};
    victim_addr[IDX_LSB +: IDX_BITS] = idx;
  end

  assign cachereq_rdy = (state_q == S_IDLE);
  assign cacheresp_val = (state_q == S_RESP);
  always_comb begin
    cacheresp_msg        = '0;
    cacheresp_msg.typ    = req_q.typ;
    cacheresp_msg.opaque = req_q.opaque;
    cacheresp_msg.test   = {1'b0, ~miss_q};
    cacheresp_msg.data   = (req_q.typ == MEM_READ) ? rdata_q : '0;
  end

  assign memreq_val  = (state_q == S_EVICT_REQ) || (state_q == S_REFILL_REQ);
  assign memresp_rdy = (state_q == S_EVICT_WAIT) || (state_q == S_REFILL_WAIT);
  always_comb begin
    memreq_msg = '0;
    if (state_q == S_EVICT_REQ) begin
      memreq_msg.typ  = MEM_WRITE;
      memreq_msg.addr = victim_addr;
      memreq_msg.data = data_arr[idx];
    end else begin
      memreq_msg.typ  = MEM_READ;
      memreq_msg.addr = {req_q.addr[31:4], 4'b0};
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= S_IDLE;
      miss_q  <= 1'b0;
      for (int i = 0; i < int'(NUM_LINES); i++) begin
        valid_arr[i] <= 1'b0;
        dirty_arr[i] <= 1'b0;
      end
    end else begin
      unique case (state_q)
        S_IDLE: if (cachereq_val) begin
          req_q   <= cachereq_msg;
          miss_q  <= 1'b0;
          state_q <= S_TAG_CHECK;
        end
        S_TAG_CHECK: begin
          if (req_q.typ == MEM_INIT || hit) begin
            if (req_q.typ == MEM_READ) begin
              rdata_q <= data_arr[idx][woff*32 +: 32];
            end else begin
              data_arr[idx][woff*32 +: 32] <= req_q.data;
              if (req_q.typ == MEM_INIT) begin
                tag_arr[idx]   <= line_tag(req_q.addr);
                valid_arr[idx] <= 1'b1;
                dirty_arr[idx] <= 1'b0;
              end else begin
                dirty_arr[idx] <= 1'b1;
              end
            end
            state_q <= S_RESP;
          end else begin
            miss_q  <= 1'b1;
            state_q <= (valid_arr[idx] && dirty_arr[idx]) ? S_EVICT_REQ : S_REFILL_REQ;
          end
        end
        S_EVICT_REQ:   if (memreq_rdy)  state_q <= S_EVICT_WAIT;
        S_EVICT_WAIT:  if (memresp_val) begin
          dirty_arr[idx] <= 1'b0;
          state_q        <= S_REFILL_REQ;
        end
        S_REFILL_REQ:  if (memreq_rdy)  state_q <= S_REFILL_WAIT;
        S_REFILL_WAIT: if (memresp_val) begin
          data_arr[idx]  <= memresp_msg.data;
          tag_arr[idx]   <= line_tag(req_q.addr);
          valid_arr[idx] <= 1'b1;
          dirty_arr[idx] <= 1'b0;
          state_q        <= S_TAG_CHECK;
        end
        S_RESP:        if (cacheresp_rdy) state_q <= S_IDLE;
        default:       state_q <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // The response must hold steady while it waits to be accepted.
  assert property (@(posedge clk) disable iff (reset)
    cacheresp_val && !cacheresp_rdy |=> cacheresp_val && $stable(cacheresp_msg));
`endif
endmodule
