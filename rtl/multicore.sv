// MultiCore: a quad-core processor with private instruction caches and a
// shared, banked data cache.
//
// Four processors (core ids 0-3, NUM_CORES=4) each fetch through a private
// instruction cache (unbanked).  The four instruction caches refill over
// one MemNet from main-memory port 0 (imemreq/imemresp).  Every processor's
// loads and stores go through McoreDataCache: CacheNet to four shared data
// banks selected by address bits [5:4], then a second MemNet to main-memory
// port 1 (dmemreq/dmemresp).  Each core has its own manager ports
// (mngr2proc/proc2mngr) for test input and output.  The main memory itself
// is outside this module; both memory ports carry 128-bit cache lines.
//
// Statistics hooks, one bit per core, cache or bank, each high for one
// cycle per event: commit_inst (an instruction completed), icache_access
// (an instruction cache delivered a response) and icache_miss (that
// response was a miss), dcache_access and dcache_miss (per data bank).
// stats_en is core 0's stats_en register, marking the measured region.
module multicore #(
  parameter int unsigned NUM_CORES = 4,
  parameter int unsigned NUM_LINES = 16
) (
  input  logic                     clk,
  input  logic                     reset,

  input  logic                     mngr2proc_val [NUM_CORES],
  output logic                     mngr2proc_rdy [NUM_CORES],
  input  logic [31:0]              mngr2proc_msg [NUM_CORES],
  output logic                     proc2mngr_val [NUM_CORES],
  input  logic                     proc2mngr_rdy [NUM_CORES],
  output logic [31:0]              proc2mngr_msg [NUM_CORES],

  output logic                     imemreq_val,
  input  logic                     imemreq_rdy,
  output mcore_pkg::mem_req_16B_t  imemreq_msg,
  input  logic                     imemresp_val,
  output logic                     imemresp_rdy,
  input  mcore_pkg::mem_resp_16B_t imemresp_msg,

  output logic                     dmemreq_val,
  input  logic                     dmemreq_rdy,
  output mcore_pkg::mem_req_16B_t  dmemreq_msg,
  input  logic                     dmemresp_val,
  output logic                     dmemresp_rdy,
  input  mcore_pkg::mem_resp_16B_t dmemresp_msg,

  output logic [NUM_CORES-1:0]     commit_inst,
  output logic [NUM_CORES-1:0]     icache_miss,
  output logic [NUM_CORES-1:0]     icache_access,
  output logic [NUM_CORES-1:0]     dcache_miss,
  output logic [NUM_CORES-1:0]     dcache_access,
  output logic                     stats_en
);
  import mcore_pkg::*;

  // processor <-> icache
  logic          ireq_val  [NUM_CORES], ireq_rdy  [NUM_CORES];
  mem_req_4B_t   ireq_msg  [NUM_CORES];
  logic          iresp_val [NUM_CORES], iresp_rdy [NUM_CORES];
  mem_resp_4B_t  iresp_msg [NUM_CORES];
  // icache <-> MemNet
  logic          imreq_val  [NUM_CORES], imreq_rdy  [NUM_CORES];
  mem_req_16B_t  imreq_msg  [NUM_CORES];
  logic          imresp_val [NUM_CORES], imresp_rdy [NUM_CORES];
  mem_resp_16B_t imresp_msg [NUM_CORES];
  // processor <-> McoreDataCache
  logic          dreq_val  [NUM_CORES], dreq_rdy  [NUM_CORES];
  mem_req_4B_t   dreq_msg  [NUM_CORES];
  logic          dresp_val [NUM_CORES], dresp_rdy [NUM_CORES];
  mem_resp_4B_t  dresp_msg [NUM_CORES];
  logic [NUM_CORES-1:0] core_stats;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    proc #(.NUM_CORES(NUM_CORES)) u_proc (
      .clk, .reset,
      .core_id      (32'(c)),
      .mngr2proc_val(mngr2proc_val[c]), .mngr2proc_rdy(mngr2proc_rdy[c]), .mngr2proc_msg(mngr2proc_msg[c]),
      .proc2mngr_val(proc2mngr_val[c]), .proc2mngr_rdy(proc2mngr_rdy[c]), .proc2mngr_msg(proc2mngr_msg[c]),
      .imemreq_val  (ireq_val[c]),  .imemreq_rdy  (ireq_rdy[c]),  .imemreq_msg  (ireq_msg[c]),
      .imemresp_val (iresp_val[c]), .imemresp_rdy (iresp_rdy[c]), .imemresp_msg (iresp_msg[c]),
      .dmemreq_val  (dreq_val[c]),  .dmemreq_rdy  (dreq_rdy[c]),  .dmemreq_msg  (dreq_msg[c]),
      .dmemresp_val (dresp_val[c]), .dmemresp_rdy (dresp_rdy[c]), .dmemresp_msg (dresp_msg[c]),
      .commit_inst  (commit_inst[c]),
      .stats_en     (core_stats[c])
    );

    cache #(.NUM_BANKS(0), .NUM_LINES(NUM_LINES)) u_icache (
      .clk, .reset,
      .cachereq_val (ireq_val[c]),   .cachereq_rdy (ireq_rdy[c]),   .cachereq_msg (ireq_msg[c]),
      .cacheresp_val(iresp_val[c]),  .cacheresp_rdy(iresp_rdy[c]),  .cacheresp_msg(iresp_msg[c]),
      .memreq_val   (imreq_val[c]),  .memreq_rdy   (imreq_rdy[c]),  .memreq_msg   (imreq_msg[c]),
      .memresp_val  (imresp_val[c]), .memresp_rdy  (imresp_rdy[c]), .memresp_msg  (imresp_msg[c])
    );

    assign icache_access[c] = iresp_val[c] && iresp_rdy[c];
    assign icache_miss[c]   = iresp_val[c] && iresp_rdy[c] && !iresp_msg[c].test[0];
  end

  assign stats_en = core_stats[0];

  mem_net #(.NPORTS(NUM_CORES)) u_imemnet (
    .clk, .reset,
    .memreq_val (imreq_val),  .memreq_rdy (imreq_rdy),  .memreq_msg (imreq_msg),
    .memresp_val(imresp_val), .memresp_rdy(imresp_rdy), .memresp_msg(imresp_msg),
    .mainmemreq_val (imemreq_val),  .mainmemreq_rdy (imemreq_rdy),  .mainmemreq_msg (imemreq_msg),
    .mainmemresp_val(imemresp_val), .mainmemresp_rdy(imemresp_rdy), .mainmemresp_msg(imemresp_msg)
  );

  mcore_data_cache #(.NPORTS(NUM_CORES), .NUM_LINES(NUM_LINES)) u_dcache (
    .clk, .reset,
    .procreq_val (dreq_val),  .procreq_rdy (dreq_rdy),  .procreq_msg (dreq_msg),
    .procresp_val(dresp_val), .procresp_rdy(dresp_rdy), .procresp_msg(dresp_msg),
    .mainmemreq_val (dmemreq_val),  .mainmemreq_rdy (dmemreq_rdy),  .mainmemreq_msg (dmemreq_msg),
    .mainmemresp_val(dmemresp_val), .mainmemresp_rdy(dmemresp_rdy), .mainmemresp_msg(dmemresp_msg),
    .dcache_access, .dcache_miss
  );
endmodule
