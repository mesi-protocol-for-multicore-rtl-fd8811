// mesi_pkg: types, sizes and the 7-bit coherency code shared by the dual-core
// MESI cache-coherence design.
//
// Sizes: a 32-bit byte address is split into a 26-bit tag, a 2-bit set index
// (four sets, indices 00..11), a 2-bit word offset (four 32-bit words per line)
// and a 2-bit byte offset. The shared main memory holds 32 words.
//
// The 7-bit coherency code of a cache line packs four fields, MSB first:
//   M[1:0]  00 not modified, 01 modified in processor 1, 10 modified in processor 2
//   E[1:0]  00 not exclusive, 01 exclusive in processor 1, 10 exclusive in processor 2
//   S       0 not shared, 1 shared
//   I[1:0]  00 valid, 01 not valid in processor 1, 10 not valid in processor 2
// The field layout and field values follow the published state table; which
// field value is written for each MESI state of a given cache (encode) and how
// a code is read back (decode) is this design's own choice, described below.
package mesi_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned DATA_W     = 32;
  localparam int unsigned LINE_WORDS = 4;   // 32-bit words per cache line
  localparam int unsigned SETS       = 4;   // direct-mapped sets per cache
  localparam int unsigned MEM_WORDS  = 32;  // words in the shared main memory
  localparam int unsigned NCORES     = 2;   // processors MIPS1 and MIPS2
  localparam int unsigned CODE_W     = 7;   // coherency code width

  // MESI state of one line in one cache.
  typedef enum logic [1:0] {
    ST_I = 2'd0,
    ST_S = 2'd1,
    ST_E = 2'd2,
    ST_M = 2'd3
  } mesi_state_e;

  // Events that move a line between MESI states. PR_* come from the cache's own
  // processor, BUS_* are snooped from the other processor's bus transaction.
  typedef enum logic [2:0] {
    EV_PR_RD   = 3'd0,  // processor load
    EV_PR_WR   = 3'd1,  // processor store
    EV_EVICT   = 3'd2,  // line is replaced
    EV_BUS_RD  = 3'd3,  // other processor reads the line (BusRd)
    EV_BUS_RDX = 3'd4,  // other processor writes the line (BusRdX / upgrade)
    EV_NONE    = 3'd5
  } mesi_event_e;

  // Seven-bit coherency code: M(2) E(2) S(1) I(2).
  typedef struct packed {
    logic [1:0] m;
    logic [1:0] e;
    logic       s;
    logic [1:0] i;
  } mesi_code_t;

  // One-cycle pulses from the coherence controller, one per mechanism.
  typedef struct packed {
    logic rd_hit;          // load hit, served from the own cache (direct read)
    logic wr_hit;          // store hit in M or E (direct write, E -> M silently)
    logic upgrade;         // store hit in S: S -> M, other copy invalidated
    logic rd_miss_excl;    // load miss filled in E (no other copy)
    logic rd_miss_shared;  // load miss filled in S (other cache has a copy)
    logic wr_miss;         // store miss: I -> M
    logic writeback;       // modified victim written back on eviction
    logic silent_evict;    // clean victim (E or S) dropped
    logic flush;           // other cache's modified line written back on BusRd
    logic c2c;             // line supplied cache to cache (send data)
    logic invalidate;      // other cache's copy invalidated (BusRdX)
    logic conflict;        // S -> M upgrade lost its copy while waiting: I -> M
  } ctrl_events_t;

  // Field value naming processor `core` (0 -> 2'b01 for MIPS1, 1 -> 2'b10 for MIPS2).
  function automatic logic [1:0] core_field(input logic core);
    return core ? 2'b10 : 2'b01;
  endfunction

  // Code stored for a line of cache `core` that is in state `st`.
  function automatic mesi_code_t encode_code(input mesi_state_e st, input logic core);
    mesi_code_t c;
    c = '0;
    unique case (st)
      ST_M: c.m = core_field(core);
      ST_E: c.e = core_field(core);
      ST_S: c.s = 1'b1;
      default: c.i = core_field(core);
    endcase
    return c;
  endfunction

  // MESI state of cache `core` read back from a code. The I field wins, then M,
  // then E, then S; a code with no field set is treated as invalid.
  function automatic mesi_state_e decode_code(input mesi_code_t c, input logic core);
    logic [1:0] f;
    f = core_field(core);
    if ((c.i & f) != 2'b00) return ST_I;
    if ((c.m & f) != 2'b00) return ST_M;
    if ((c.e & f) != 2'b00) return ST_E;
    if (c.s)                return ST_S;
    return ST_I;
  endfunction

endpackage
