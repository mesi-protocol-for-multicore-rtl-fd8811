// tb_coherence_controller: directed MESI scenarios for the coherence
// controller, run with the real caches, coherency tag, bus controller and
// main memory around it.
//
// Each step issues one load or store from MIPS1 or MIPS2 and checks the data
// returned, both 7-bit coherency codes of the line afterwards, the mechanism
// pulses (events) and the latency, counted in clock edges from the edge that
// accepts the request to the edge that sees ack (hit 1, miss filled from the
// other cache 3, from memory 4, one more with a modified victim). Expected
// values come from the MESI rules, not from the design. The two cases the
// published simulation shows are included: MIPS1 load hit on an Exclusive line
// (code 0001000 stays) and MIPS1 store hit (code becomes M=01, E=00). The last
// step makes two stores to a line shared by both caches collide, which must
// take the S -> M conflict path once.
module tb_coherence_controller;
  import mesi_pkg::*;
  localparam int TAG_W = 26;

  logic clk = 0, rst;
  logic [1:0] p_rd, p_wr, ack, gnt;
  logic [1:0][ADDR_W-1:0] p_addr;
  logic [1:0][DATA_W-1:0] p_wdata;
  logic [DATA_W-1:0] rdata;

  logic [1:0][1:0] ct_hit;
  mesi_code_t ct_code [2][2];
  logic [TAG_W-1:0] ct_tag [2][2];
  logic [1:0] ct_we;
  logic [1:0] ct_idx [2];
  mesi_code_t ct_wcode [2];
  logic [TAG_W-1:0] ct_wtag [2];
  logic [ADDR_W-1:0] c_lk_addr, c_wr_addr;
  logic [1:0] c_hit, c_valid, c_dirty, c_wr_en, c_fill_en, c_inv_en, c_clean_en;
  logic [DATA_W-1:0] c_rd_word [2];
  logic [LINE_WORDS-1:0][DATA_W-1:0] c_rd_line [2];
  logic [TAG_W-1:0] c_rd_tag [2];
  logic [DATA_W-1:0] c_wr_data;
  logic [1:0] c_fill_idx, c_st_idx;
  logic [TAG_W-1:0] c_fill_tag;
  logic [LINE_WORDS-1:0][DATA_W-1:0] c_fill_line, m_wr_line, m_rd_line;
  logic c_fill_dirty, m_re, m_we, busy;
  logic [2:0] m_line_addr;
  ctrl_events_t events;

  bus_controller u_bus (.clk, .rst, .req(p_rd | p_wr), .done(|ack), .gnt);
  coherency_tag u_ctag (.clk, .rst, .lk_addr(p_addr), .hit(ct_hit), .code(ct_code), .tag(ct_tag),
                        .we(ct_we), .w_idx(ct_idx), .w_code(ct_wcode), .w_tag(ct_wtag));
  for (genvar c = 0; c < 2; c++) begin : g_c
    cache_mem u_cache (.clk, .rst, .lk_addr(c_lk_addr), .hit(c_hit[c]), .rd_word(c_rd_word[c]),
      .rd_line(c_rd_line[c]), .rd_tag(c_rd_tag[c]), .rd_valid(c_valid[c]), .rd_dirty(c_dirty[c]),
      .wr_en(c_wr_en[c]), .wr_addr(c_wr_addr), .wr_data(c_wr_data), .fill_en(c_fill_en[c]),
      .fill_idx(c_fill_idx), .fill_tag(c_fill_tag), .fill_line(c_fill_line), .fill_dirty(c_fill_dirty),
      .inv_en(c_inv_en[c]), .clean_en(c_clean_en[c]), .st_idx(c_st_idx));
  end
  main_memory u_mem (.clk, .rst, .line_addr(m_line_addr), .re(m_re), .we(m_we),
                     .wr_line(m_wr_line), .rd_line(m_rd_line));

  coherence_controller dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  ctrl_events_t seen;          // events OR-ed over the current operation
  always @(posedge clk) seen <= seen | events;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One operation by processor p; returns read data and latency.
  task automatic op(input int p, input logic wr, input logic [31:0] a, input logic [31:0] d,
                    output logic [31:0] rd, output int lat);
    @(negedge clk);
    p_addr[p] = a; p_wdata[p] = d;
    if (wr) p_wr[p] = 1'b1; else p_rd[p] = 1'b1;
    lat = -1;
    forever begin
      @(posedge clk);
      lat++;
      if (ack[p]) break;
    end
    rd = rdata;
    @(negedge clk);
    p_rd[p] = 1'b0; p_wr[p] = 1'b0;
  endtask

  function automatic mesi_state_e st_of(input int c, input logic [31:0] a);
    // state of line a in cache c, read from the coherency tag arrays
    mesi_code_t k;
    k = u_ctag.mesi_q[c][a[5:4]];
    if (u_ctag.tag_q[c][a[5:4]] != a[31:6]) return ST_I;
    return decode_code(k, c[0]);
  endfunction

  task automatic step(input string name, input int p, input logic wr, input logic [31:0] a,
                      input logic [31:0] d, input logic [31:0] exp_rd, input int exp_lat,
                      input mesi_state_e exp1, input mesi_state_e exp2, input ctrl_events_t exp_ev);
    logic [31:0] rd;
    int lat;
    @(negedge clk) seen = '0;
    op(p, wr, a, d, rd, lat);
    if (!wr) chk(rd == exp_rd, $sformatf("%s: data %h want %h", name, rd, exp_rd));
    chk(lat == exp_lat, $sformatf("%s: latency %0d want %0d", name, lat, exp_lat));
    chk(st_of(0, a) == exp1, $sformatf("%s: cache1 %s want %s", name, st_of(0, a).name(), exp1.name()));
    chk(st_of(1, a) == exp2, $sformatf("%s: cache2 %s want %s", name, st_of(1, a).name(), exp2.name()));
    chk(seen == exp_ev, $sformatf("%s: events %b want %b", name, seen, exp_ev));
  endtask

  function automatic ctrl_events_t ev(input string names);
    ctrl_events_t e;
    e = '0;
    for (int i = 0; i < names.len(); i++) begin
      case (names[i])
        "r": e.rd_hit = 1; "w": e.wr_hit = 1; "u": e.upgrade = 1; "x": e.rd_miss_excl = 1;
        "s": e.rd_miss_shared = 1; "m": e.wr_miss = 1; "b": e.writeback = 1;
        "e": e.silent_evict = 1; "f": e.flush = 1; "c": e.c2c = 1; "i": e.invalidate = 1;
        "k": e.conflict = 1; default: ;
      endcase
    end
    return e;
  endfunction

  localparam logic [31:0] A = 32'h00, B = 32'h40, C = 32'h10, D = 32'h20;

  initial begin
    logic [31:0] rd1, rd2;
    int l1, l2;
    rst = 1; p_rd = 0; p_wr = 0; p_addr = '0; p_wdata = '0; seen = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    step("MP1 load miss -> E",      0, 0, A + 4, 0, 32'h0, 4, ST_E, ST_I, ev("x"));
    step("MP1 load hit E (St3)",    0, 0, A + 4, 0, 32'h0, 1, ST_E, ST_I, ev("r"));
    chk(ct_code[0][0] == 7'b0001000, $sformatf("St3 code %b", ct_code[0][0]));
    chk(ct_hit[0][0] && !ct_hit[0][1], "St3 mp1hit1=1 mp1hit2=0");
    step("MP1 store hit E->M (St9)", 0, 1, A + 4, 32'h1111_0001, 0, 1, ST_M, ST_I, ev("w"));
    chk(ct_code[0][0] == 7'b0100000, $sformatf("St9 code %b", ct_code[0][0]));
    step("MP2 load, MP1 M flushes", 1, 0, A + 4, 0, 32'h1111_0001, 3, ST_S, ST_S, ev("sfc"));
    chk(u_mem.mem_q[0][1] == 32'h1111_0001, "flush wrote memory");
    step("MP2 store hit S upgrade", 1, 1, A + 8, 32'h2222_0002, 0, 1, ST_I, ST_M, ev("ui"));
    step("MP1 load, MP2 M flushes", 0, 0, A + 8, 0, 32'h2222_0002, 3, ST_S, ST_S, ev("sfc"));
    step("MP1 load B, S evicted",   0, 0, B, 0, 32'h0, 4, ST_E, ST_I, ev("ex"));
    chk(st_of(1, A) == ST_S, "A still S in cache2");
    step("MP1 store hit E->M",      0, 1, B, 32'h3333_0003, 0, 1, ST_M, ST_I, ev("w"));
    step("MP1 load A, M victim",    0, 0, A + 4, 0, 32'h1111_0001, 5, ST_S, ST_S, ev("bs"));
    chk(u_mem.mem_q[4][0] == 32'h3333_0003, "victim written back");
    step("MP2 load B",              1, 0, B, 0, 32'h3333_0003, 4, ST_I, ST_E, ev("ex"));
    step("MP2 store miss C",        1, 1, C + 12, 32'h4444_0004, 0, 4, ST_I, ST_M, ev("m"));
    step("MP1 store C, MP2 M",      0, 1, C, 32'h5555_0005, 0, 3, ST_M, ST_I, ev("mci"));
    step("MP1 load hit C merged",   0, 0, C + 12, 0, 32'h4444_0004, 1, ST_M, ST_I, ev("r"));
    step("MP2 load C, MP1 M",       1, 0, C, 0, 32'h5555_0005, 3, ST_S, ST_S, ev("sfc"));
    step("MP2 store E->M B",        1, 1, B + 4, 32'h6666_0006, 0, 1, ST_I, ST_M, ev("w"));
    step("MP1 store B, MP2 M",      0, 1, B + 8, 32'h7777_0007, 0, 3, ST_M, ST_I, ev("emci"));

    // Both caches share D, then both store to it in the same cycle.
    step("MP1 load D",              0, 0, D, 0, 32'h0, 4, ST_E, ST_I, ev("x"));
    step("MP2 load D",              1, 0, D, 0, 32'h0, 3, ST_S, ST_S, ev("sc"));
    @(negedge clk) seen = '0;
    fork
      op(0, 1, D + 4, 32'hAAAA_000A, rd1, l1);
      op(1, 1, D + 8, 32'hBBBB_000B, rd2, l2);
    join
    chk(seen.upgrade && seen.conflict && seen.wr_miss, $sformatf("collision events %b", seen));
    chk((st_of(0, D) == ST_M && st_of(1, D) == ST_I) || (st_of(0, D) == ST_I && st_of(1, D) == ST_M),
        "collision leaves a single M copy");
    // Whichever store won, both words must be visible to both processors.
    op(0, 0, D + 4, 0, rd1, l1);
    op(1, 0, D + 8, 0, rd2, l2);
    chk(rd1 == 32'hAAAA_000A && rd2 == 32'hBBBB_000B, $sformatf("after collision %h %h", rd1, rd2));
    op(1, 0, D + 4, 0, rd2, l2);
    chk(rd2 == 32'hAAAA_000A && l2 == 1, "MP2 hit on merged line");
    chk(st_of(0, D) == ST_S && st_of(1, D) == ST_S, "D shared at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
