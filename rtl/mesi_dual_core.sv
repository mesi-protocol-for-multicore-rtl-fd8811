// mesi_dual_core: the on-chip part of a dual-processor system whose two private
// caches are kept coherent with the MESI protocol, plus its shared memory.
//
// Two processors (MIPS1 = index 0, MIPS2 = index 1) issue loads and stores on
// the ports below; the processors themselves are outside this module. Each has
// a private direct-mapped cache (cache_mem: 4 sets x 4 words, 26-bit tags).
// A cache coherency controller made of the coherency tag (coherency_tag: the
// 7-bit MESI code and tag of every line of both caches) and an FSM
// (coherence_controller) serves one request at a time, chosen by the bus
// controller (bus_controller), and moves lines between the caches and the
// 32-word shared main memory (main_memory).
//
// Processor interface, per processor p: raise p_rd[p] (load) or p_wr[p]
// (store) with p_addr[p] (byte address, word aligned) and p_wdata[p], and hold
// them until p_ack[p] is high at a rising edge; rdata is valid in that cycle.
// A load or store hit is acknowledged in the cycle after it is accepted; a miss
// takes 3 to 5 cycles (see coherence_controller).
//
// Observation outputs: mphit[p][c] is "the address of processor p is present
// in cache c" (mp1hit1, mp1hit2, mp2hit1, mp2hit2); outmesi[c] is the 7-bit
// coherency code of cache c at its own processor's address; events pulses
// once per coherence mechanism used.
module mesi_dual_core
  import mesi_pkg::*;
#(
  parameter int unsigned SETS_P       = mesi_pkg::SETS,
  parameter int unsigned LINE_WORDS_P = mesi_pkg::LINE_WORDS,
  parameter int unsigned MEM_WORDS_P  = mesi_pkg::MEM_WORDS
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NCORES-1:0]             p_rd,
  input  logic [NCORES-1:0]             p_wr,
  input  logic [NCORES-1:0][ADDR_W-1:0] p_addr,
  input  logic [NCORES-1:0][DATA_W-1:0] p_wdata,
  output logic [NCORES-1:0]             p_ack,
  output logic [DATA_W-1:0]             rdata,
  output logic [NCORES-1:0][NCORES-1:0] mphit,
  output mesi_code_t [NCORES-1:0]       outmesi,
  output ctrl_events_t                  events,
  output logic                          busy
);

  localparam int unsigned IDX_W  = $clog2(SETS_P);
  localparam int unsigned WOFF_W = $clog2(LINE_WORDS_P);
  localparam int unsigned TAG_W  = ADDR_W - IDX_W - WOFF_W - 2;
  localparam int unsigned LINES  = MEM_WORDS_P / LINE_WORDS_P;
  localparam int unsigned LADR_W = (LINES > 1) ? $clog2(LINES) : 1;

  // bus controller
  logic [NCORES-1:0] gnt;

  // coherency tag
  mesi_code_t        ct_code [NCORES][NCORES];
  logic [TAG_W-1:0]  ct_tag  [NCORES][NCORES];
  logic [NCORES-1:0] ct_we;
  logic [IDX_W-1:0]  ct_idx  [NCORES];
  mesi_code_t        ct_wcode[NCORES];
  logic [TAG_W-1:0]  ct_wtag [NCORES];

  // caches
  logic [ADDR_W-1:0]                   c_lk_addr;
  logic [NCORES-1:0]                   c_hit, c_valid, c_dirty;
  logic [DATA_W-1:0]                   c_rd_word [NCORES];
  logic [LINE_WORDS_P-1:0][DATA_W-1:0] c_rd_line [NCORES];
  logic [TAG_W-1:0]                    c_rd_tag  [NCORES];
  logic [NCORES-1:0]                   c_wr_en, c_fill_en, c_inv_en, c_clean_en;
  logic [ADDR_W-1:0]                   c_wr_addr;
  logic [DATA_W-1:0]                   c_wr_data;
  logic [IDX_W-1:0]                    c_fill_idx, c_st_idx;
  logic [TAG_W-1:0]                    c_fill_tag;
  logic [LINE_WORDS_P-1:0][DATA_W-1:0] c_fill_line;
  logic                                c_fill_dirty;

  // main memory
  logic [LADR_W-1:0]                   m_line_addr;
  logic                                m_re, m_we;
  logic [LINE_WORDS_P-1:0][DATA_W-1:0] m_wr_line, m_rd_line;

  bus_controller u_bus (
    .clk (clk),
    .rst (rst),
    .req (p_rd | p_wr),
    .done(|p_ack),
    .gnt (gnt)
  );

  coherency_tag #(.SETS_P(SETS_P), .LINE_WORDS_P(LINE_WORDS_P)) u_ctag (
    .clk    (clk),
    .rst    (rst),
    .lk_addr(p_addr),
    .hit    (mphit),
    .code   (ct_code),
    .tag    (ct_tag),
    .we     (ct_we),
    .w_idx  (ct_idx),
    .w_code (ct_wcode),
    .w_tag  (ct_wtag)
  );

  for (genvar c = 0; c < NCORES; c++) begin : g_cache
    cache_mem #(.SETS_P(SETS_P), .LINE_WORDS_P(LINE_WORDS_P)) u_cache (
      .clk       (clk),
      .rst       (rst),
      .lk_addr   (c_lk_addr),
      .hit       (c_hit[c]),
      .rd_word   (c_rd_word[c]),
      .rd_line   (c_rd_line[c]),
      .rd_tag    (c_rd_tag[c]),
      .rd_valid  (c_valid[c]),
      .rd_dirty  (c_dirty[c]),
      .wr_en     (c_wr_en[c]),
      .wr_addr   (c_wr_addr),
      .wr_data   (c_wr_data),
      .fill_en   (c_fill_en[c]),
      .fill_idx  (c_fill_idx),
      .fill_tag  (c_fill_tag),
      .fill_line (c_fill_line),
      .fill_dirty(c_fill_dirty),
      .inv_en    (c_inv_en[c]),
      .clean_en  (c_clean_en[c]),
      .st_idx    (c_st_idx)
    );
    assign outmesi[c] = ct_code[c][c];
  end

  coherence_controller #(
    .SETS_P(SETS_P), .LINE_WORDS_P(LINE_WORDS_P), .MEM_WORDS_P(MEM_WORDS_P)
  ) u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .p_rd        (p_rd),
    .p_wr        (p_wr),
    .p_addr      (p_addr),
    .p_wdata     (p_wdata),
    .ack         (p_ack),
    .rdata       (rdata),
    .gnt         (gnt),
    .ct_hit      (mphit),
    .ct_code     (ct_code),
    .ct_we       (ct_we),
    .ct_idx      (ct_idx),
    .ct_wcode    (ct_wcode),
    .ct_wtag     (ct_wtag),
    .c_lk_addr   (c_lk_addr),
    .c_rd_word   (c_rd_word),
    .c_rd_line   (c_rd_line),
    .c_rd_tag    (c_rd_tag),
    .c_wr_en     (c_wr_en),
    .c_wr_addr   (c_wr_addr),
    .c_wr_data   (c_wr_data),
    .c_fill_en   (c_fill_en),
    .c_fill_idx  (c_fill_idx),
    .c_fill_tag  (c_fill_tag),
    .c_fill_line (c_fill_line),
    .c_fill_dirty(c_fill_dirty),
    .c_inv_en    (c_inv_en),
    .c_clean_en  (c_clean_en),
    .c_st_idx    (c_st_idx),
    .m_line_addr (m_line_addr),
    .m_re        (m_re),
    .m_we        (m_we),
    .m_wr_line   (m_wr_line),
    .m_rd_line   (m_rd_line),
    .events      (events),
    .busy        (busy)
  );

  main_memory #(.MEM_WORDS_P(MEM_WORDS_P), .LINE_WORDS_P(LINE_WORDS_P)) u_mem (
    .clk      (clk),
    .rst      (rst),
    .line_addr(m_line_addr),
    .re       (m_re),
    .we       (m_we),
    .wr_line  (m_wr_line),
    .rd_line  (m_rd_line)
  );

  // The caches' own hit/valid/dirty bits must agree with the coherency tag
  // while the controller works on a processor's address: hit equal, valid
  // exactly when the code is not I, dirty exactly when it is M.
  for (genvar p = 0; p < NCORES; p++) begin : g_chk_p
    for (genvar c = 0; c < NCORES; c++) begin : g_chk_c
      assert property (@(posedge clk) disable iff (rst)
        (busy && c_lk_addr == p_addr[p]) |->
          (c_hit[c] == mphit[p][c] &&
           c_valid[c] == (decode_code(ct_code[p][c], c[0]) != ST_I) &&
           c_dirty[c] == (decode_code(ct_code[p][c], c[0]) == ST_M) &&
           (!c_valid[c] || c_rd_tag[c] == ct_tag[p][c])));
    end
  end

  // Single writer: a line is never M or E in one cache while valid in the other.
  assert property (@(posedge clk) disable iff (rst)
    (mphit[0][0] && mphit[0][1]) |->
      (decode_code(ct_code[0][0], 1'b0) == ST_S && decode_code(ct_code[0][1], 1'b1) == ST_S));
  assert property (@(posedge clk) disable iff (rst)
    (mphit[1][0] && mphit[1][1]) |->
      (decode_code(ct_code[1][0], 1'b0) == ST_S && decode_code(ct_code[1][1], 1'b1) == ST_S));

endmodule
