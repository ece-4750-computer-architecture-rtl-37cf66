// McoreDataCache: the shared, banked data-cache subsystem.
//
// CacheNet routes each processor's word request to one of four cache
// banks by address bits [5:4]; each bank is a cache with NUM_BANKS=4, so it
// indexes with bits [9:6]; MemNet funnels the banks' refill and write-back
// requests to the single main-memory port.  Cache lines are thus
// interleaved across the banks, and all four processors see one coherent
// data memory because every address lives in exactly one bank.
//
// Statistics hooks: dcache_access[j] is high in a cycle in which bank j
// hands a response to CacheNet, and dcache_miss[j] when that response
// reports a miss (test bit 0 clear).
module mcore_data_cache #(
  parameter int unsigned NPORTS    = 4,
  parameter int unsigned NUM_LINES = 16
) (
  input  logic                     clk,
  input  logic                     reset,

  input  logic                     procreq_val  [NPORTS],
  output logic                     procreq_rdy  [NPORTS],
  input  mcore_pkg::mem_req_4B_t   procreq_msg  [NPORTS],
  output logic                     procresp_val [NPORTS],
  input  logic                     procresp_rdy [NPORTS],
  output mcore_pkg::mem_resp_4B_t  procresp_msg [NPORTS],

  output logic                     mainmemreq_val,
  input  logic                     mainmemreq_rdy,
  output mcore_pkg::mem_req_16B_t  mainmemreq_msg,
  input  logic                     mainmemresp_val,
  output logic                     mainmemresp_rdy,
  input  mcore_pkg::mem_resp_16B_t mainmemresp_msg,

  output logic [NPORTS-1:0]        dcache_access,
  output logic [NPORTS-1:0]        dcache_miss
);
  import mcore_pkg::*;

  logic          creq_val  [NPORTS], creq_rdy  [NPORTS];
  mem_req_4B_t   creq_msg  [NPORTS];
  logic          cresp_val [NPORTS], cresp_rdy [NPORTS];
  mem_resp_4B_t  cresp_msg [NPORTS];
  logic          mreq_val  [NPORTS], mreq_rdy  [NPORTS];
  mem_req_16B_t  mreq_msg  [NPORTS];
  logic          mresp_val [NPORTS], mresp_rdy [NPORTS];
  mem_resp_16B_t mresp_msg [NPORTS];

  cache_net #(.NPORTS(NPORTS)) u_cachenet (
    .clk, .reset,
    .procreq_val,  .procreq_rdy,  .procreq_msg,
    .procresp_val, .procresp_rdy, .procresp_msg,
    .cachereq_val (creq_val),  .cachereq_rdy (creq_rdy),  .cachereq_msg (creq_msg),
    .cacheresp_val(cresp_val), .cacheresp_rdy(cresp_rdy), .cacheresp_msg(cresp_msg)
  );

  for (genvar j = 0; j < NPORTS; j++) begin : g_bank
    cache #(.NUM_BANKS(NPORTS), .NUM_LINES(NUM_LINES)) u_bank (
      .clk, .reset,
      .cachereq_val (creq_val[j]),  .cachereq_rdy (creq_rdy[j]),  .cachereq_msg (creq_msg[j]),
      .cacheresp_val(cresp_val[j]), .cacheresp_rdy(cresp_rdy[j]), .cacheresp_msg(cresp_msg[j]),
      .memreq_val   (mreq_val[j]),  .memreq_rdy   (mreq_rdy[j]),  .memreq_msg   (mreq_msg[j]),
      .memresp_val  (mresp_val[j]), .memresp_rdy  (mresp_rdy[j]), .memresp_msg  (mresp_msg[j])
    );
    assign dcache_access[j] = cresp_val[j] && cresp_rdy[j];
    assign dcache_miss[j]   = cresp_val[j] && cresp_rdy[j] && !cresp_msg[j].test[0];
  end

  mem_net #(.NPORTS(NPORTS)) u_memnet (
    .clk, .reset,
    .memreq_val (mreq_val),  .memreq_rdy (mreq_rdy),  .memreq_msg (mreq_msg),
    .memresp_val(mresp_val), .memresp_rdy(mresp_rdy), .memresp_msg(mresp_msg),
    .mainmemreq_val, .mainmemreq_rdy, .mainmemreq_msg,
    .mainmemresp_val, .mainmemresp_rdy, .mainmemresp_msg
  );
endmodule
