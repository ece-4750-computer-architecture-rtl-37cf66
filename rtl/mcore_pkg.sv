// Shared types and constants of the quad-core system.
//
// Memory messages follow a latency-insensitive request/response format:
// a request carries a type, an opaque tag, a byte address, a length and
// data; a response carries the type, the same opaque tag, two test bits
// (bit 0 is set by a cache on a hit), a length and data.  Two widths are
// used: 32-bit data between processors and caches, and 128-bit (one cache
// line) data between caches and main memory.  Network messages wrap a
// memory message in a header of source terminal, destination terminal and
// an opaque field.  Field widths and type encodings are this design's own
// choices; the high two opaque bits carry the requester id across a
// network, as the system requires.
package mcore_pkg;

  localparam int unsigned NUM_CORES   = 4;
  localparam int unsigned NUM_PORTS   = 4;
  localparam int unsigned PORT_BITS   = 2;
  localparam int unsigned OPAQUE_BITS = 8;
  localparam int unsigned LINE_BITS   = 128;

  typedef enum logic [2:0] {
    MEM_READ  = 3'd0,
    MEM_WRITE = 3'd1,
    MEM_INIT  = 3'd2
  } mem_type_e;

  // Word-wide (processor <-> cache) messages.
  typedef struct packed {
    mem_type_e                 typ;
    logic [OPAQUE_BITS-1:0]    opaque;
    logic [31:0]               addr;
    logic [1:0]                len;
    logic [31:0]               data;
  } mem_req_4B_t;

  typedef struct packed {
    mem_type_e                 typ;
    logic [OPAQUE_BITS-1:0]    opaque;
    logic [1:0]                test;
    logic [1:0]                len;
    logic [31:0]               data;
  } mem_resp_4B_t;

  // Line-wide (cache <-> main memory) messages.
  typedef struct packed {
    mem_type_e                 typ;
    logic [OPAQUE_BITS-1:0]    opaque;
    logic [31:0]               addr;
    logic [3:0]                len;
    logic [LINE_BITS-1:0]      data;
  } mem_req_16B_t;

  typedef struct packed {
    mem_type_e                 typ;
    logic [OPAQUE_BITS-1:0]    opaque;
    logic [1:0]                test;
    logic [3:0]                len;
    logic [LINE_BITS-1:0]      data;
  } mem_resp_16B_t;

  // Network messages: header plus a memory message as payload.
  typedef struct packed {
    logic [PORT_BITS-1:0]      src;
    logic [PORT_BITS-1:0]      dest;
    logic [OPAQUE_BITS-1:0]    opaque;
    mem_req_4B_t               payload;
  } net_req_4B_t;

  typedef struct packed {
    logic [PORT_BITS-1:0]      src;
    logic [PORT_BITS-1:0]      dest;
    logic [OPAQUE_BITS-1:0]    opaque;
    mem_resp_4B_t              payload;
  } net_resp_4B_t;

  typedef struct packed {
    logic [PORT_BITS-1:0]      src;
    logic [PORT_BITS-1:0]      dest;
    logic [OPAQUE_BITS-1:0]    opaque;
    mem_req_16B_t              payload;
  } net_req_16B_t;

  typedef struct packed {
    logic [PORT_BITS-1:0]      src;
    logic [PORT_BITS-1:0]      dest;
    logic [OPAQUE_BITS-1:0]    opaque;
    mem_resp_16B_t             payload;
  } net_resp_16B_t;

  // Control/status register numbers of the processor.
  localparam logic [11:0] CSR_PROC2MNGR = 12'h7C0;
  localparam logic [11:0] CSR_STATS_EN  = 12'h7C1;
  localparam logic [11:0] CSR_MNGR2PROC = 12'hFC0;
  localparam logic [11:0] CSR_NUMCORES  = 12'hFC1;
  localparam logic [11:0] CSR_COREID    = 12'hF14;

  // Address the processor fetches from after reset.
  localparam logic [31:0] RESET_PC = 32'h0000_0200;

endpackage
