// cache_mem: the private, direct-mapped data cache of one processor.
//
// Each of the SETS sets holds one line of LINE_WORDS 32-bit words, its tag, a
// valid bit and a dirty bit. The byte address splits as
//   tag = addr[31 : 2+WOFF_W+IDX_W], index = addr[2+WOFF_W +: IDX_W],
//   word = addr[2 +: WOFF_W], with the two byte-offset bits ignored.
// With the defaults (4 sets of 4 words) the tag is 26 bits wide.
//
// Reads are combinational: for `lk_addr` the cache returns the addressed word,
// the whole line of that set, its stored tag, valid and dirty bits and `hit`
// (valid and tags equal). All writes happen on the rising clock edge and are
// issued by the coherence controller:
//   wr_en    store one word into a present line and set its dirty bit
//   fill_en  load a whole line, its tag and dirty bit; the line becomes valid
//   inv_en   clear valid and dirty of a set (the line became Invalid)
//   clean_en clear the dirty bit of a set (the line was written back)
// If several writes address the same set in one cycle, fill wins over a word
// write, and inv/clean are applied last. Reset clears every valid and dirty bit.
// Sizes follow the published cache (direct mapped, four 32-bit words and a
// 26-bit tag per line, valid and dirty bits); the port set is this design's.
module cache_mem
  import mesi_pkg::*;
#(
  parameter int unsigned SETS_P       = mesi_pkg::SETS,
  parameter int unsigned LINE_WORDS_P = mesi_pkg::LINE_WORDS,
  localparam int unsigned IDX_W  = $clog2(SETS_P),
  localparam int unsigned WOFF_W = $clog2(LINE_WORDS_P),
  localparam int unsigned TAG_W  = ADDR_W - IDX_W - WOFF_W - 2
) (
  input  logic                                   clk,
  input  logic                                   rst,
  // lookup
  input  logic [ADDR_W-1:0]                      lk_addr,
  output logic                                   hit,
  output logic [DATA_W-1:0]                      rd_word,
  output logic [LINE_WORDS_P-1:0][DATA_W-1:0]    rd_line,
  output logic [TAG_W-1:0]                       rd_tag,
  output logic                                   rd_valid,
  output logic                                   rd_dirty,
  // word write (store hit)
  input  logic                                   wr_en,
  input  logic [ADDR_W-1:0]                      wr_addr,
  input  logic [DATA_W-1:0]                      wr_data,
  // line fill
  input  logic                                   fill_en,
  input  logic [IDX_W-1:0]                       fill_idx,
  input  logic [TAG_W-1:0]                       fill_tag,
  input  logic [LINE_WORDS_P-1:0][DATA_W-1:0]    fill_line,
  input  logic                                   fill_dirty,
  // state bits
  input  logic                                   inv_en,
  input  logic                                   clean_en,
  input  logic [IDX_W-1:0]                       st_idx
);

  logic [LINE_WORDS_P-1:0][DATA_W-1:0] data_q [SETS_P];
  logic [TAG_W-1:0]                    tag_q  [SETS_P];
  logic [SETS_P-1:0]                   valid_q, dirty_q;

  logic [IDX_W-1:0]  lk_idx, wr_idx;
  logic [WOFF_W-1:0] lk_woff, wr_woff;
  logic [TAG_W-1:0]  lk_tag;

  assign lk_idx  = lk_addr[2+WOFF_W +: IDX_W];
  assign lk_woff = lk_addr[2 +: WOFF_W];
  assign lk_tag  = lk_addr[ADDR_W-1 -: TAG_W];
  assign wr_idx  = wr_addr[2+WOFF_W +: IDX_W];
  assign wr_woff = wr_addr[2 +: WOFF_W];

  assign rd_line  = data_q[lk_idx];
  assign rd_word  = data_q[lk_idx][lk_woff];
  assign rd_tag   = tag_q[lk_idx];
  assign rd_valid = valid_q[lk_idx];
  assign rd_dirty = dirty_q[lk_idx];
  assign hit      = valid_q[lk_idx] && (tag_q[lk_idx] == lk_tag);

  // Data and tag arrays: no reset, they are only read while valid.
  always_ff @(posedge clk) begin
    if (fill_en) begin
      data_q[fill_idx] <= fill_line;
      tag_q[fill_idx]  <= fill_tag;
    end
    if (wr_en && !(fill_en && fill_idx == wr_idx))
      data_q[wr_idx][wr_woff] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= '0;
      dirty_q <= '0;
    end else begin
      if (wr_en) dirty_q[wr_idx] <= 1'b1;
      if (fill_en) begin
        valid_q[fill_idx] <= 1'b1;
        dirty_q[fill_idx] <= fill_dirty;
      end
      if (clean_en) dirty_q[st_idx] <= 1'b0;
      if (inv_en) begin
        valid_q[st_idx] <= 1'b0;
        dirty_q[st_idx] <= 1'b0;
      end
    end
  end

endmodule
