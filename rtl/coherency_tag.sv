// coherency_tag: the coherence controller's own copy of both caches' tags and
// MESI states.
//
// For each cache c (MESI1/TAG1 for MIPS1, MESI2/TAG2 for MIPS2) and each set
// index it stores a 7-bit coherency code (mesi_pkg::mesi_code_t) and the line's
// 26-bit tag, as in the published coherency-tag layout (four indices 00..11 per
// cache). Each processor p presents its current address on lk_addr[p]; for it
// the block returns, for both caches c, the stored code and tag at that index
// and hit[p][c] = the line of cache c at that index is valid (decoded state not
// I) and its tag equals the address tag. hit[0][0], hit[0][1], hit[1][0] and
// hit[1][1] are the signals mp1hit1, mp1hit2, mp2hit1 and mp2hit2.
//
// Reads are combinational; each cache has one write port (we[c], idx, code,
// tag) that updates the entry on the rising clock edge. Reset sets every entry
// to the Invalid code of its cache (I field 01 for MIPS1, 10 for MIPS2).
module coherency_tag
  import mesi_pkg::*;
#(
  parameter int unsigned SETS_P       = mesi_pkg::SETS,
  parameter int unsigned LINE_WORDS_P = mesi_pkg::LINE_WORDS,
  localparam int unsigned IDX_W  = $clog2(SETS_P),
  localparam int unsigned WOFF_W = $clog2(LINE_WORDS_P),
  localparam int unsigned TAG_W  = ADDR_W - IDX_W - WOFF_W - 2
) (
  input  logic                         clk,
  input  logic                         rst,
  // lookup, one per processor
  input  logic [NCORES-1:0][ADDR_W-1:0] lk_addr,
  output logic [NCORES-1:0][NCORES-1:0] hit,       // [processor][cache]
  output mesi_code_t                    code [NCORES][NCORES],
  output logic [TAG_W-1:0]              tag  [NCORES][NCORES],
  // one write port per cache
  input  logic [NCORES-1:0]             we,
  input  logic [IDX_W-1:0]              w_idx  [NCORES],
  input  mesi_code_t                    w_code [NCORES],
  input  logic [TAG_W-1:0]              w_tag  [NCORES]
);

  mesi_code_t       mesi_q [NCORES][SETS_P];
  logic [TAG_W-1:0] tag_q  [NCORES][SETS_P];

  always_comb begin
    for (int p = 0; p < NCORES; p++) begin
      for (int c = 0; c < NCORES; c++) begin
        code[p][c] = mesi_q[c][lk_addr[p][2+WOFF_W +: IDX_W]];
        tag[p][c]  = tag_q[c][lk_addr[p][2+WOFF_W +: IDX_W]];
        hit[p][c]  = (decode_code(code[p][c], c[0]) != ST_I) &&
                     (tag[p][c] == lk_addr[p][ADDR_W-1 -: TAG_W]);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int c = 0; c < NCORES; c++) begin
      if (rst) begin
        for (int s = 0; s < SETS_P; s++) begin
          mesi_q[c][s] <= encode_code(ST_I, c[0]);
          tag_q[c][s]  <= '0;
        end
      end else if (we[c]) begin
        mesi_q[c][w_idx[c]] <= w_code[c];
        tag_q[c][w_idx[c]]  <= w_tag[c];
      end
    end
  end

endmodule
