// tb_cache_mem: random lookups, word writes, line fills, invalidations and
// dirty-bit clears of one direct-mapped cache, compared every cycle with a
// reference model kept in the testbench (address split 26/2/2/2, fill wins
// over a word write to the same set, invalidate/clean applied last).
module tb_cache_mem;
  import mesi_pkg::*;
  localparam int TAG_W = 26;

  logic clk = 0, rst;
  logic [ADDR_W-1:0] lk_addr, wr_addr;
  logic hit, rd_valid, rd_dirty;
  logic [DATA_W-1:0] rd_word, wr_data;
  logic [LINE_WORDS-1:0][DATA_W-1:0] rd_line, fill_line;
  logic [TAG_W-1:0] rd_tag, fill_tag;
  logic wr_en, fill_en, fill_dirty, inv_en, clean_en;
  logic [1:0] fill_idx, st_idx;

  logic [LINE_WORDS-1:0][DATA_W-1:0] m_data [SETS];
  logic [TAG_W-1:0] m_tag [SETS];
  logic [SETS-1:0] m_valid, m_dirty;
  int checks = 0, failures = 0;
  int hits = 0;

  cache_mem dut (.*);

  always #5 clk = ~clk;

  // A few tags only, so that hits are frequent.
  function automatic logic [ADDR_W-1:0] rand_addr();
    return {24'h0, 2'($urandom_range(0, 3)), 2'($urandom), 2'($urandom), 2'b00};
  endfunction

  task automatic compare();
    logic [1:0] i, w;
    logic exp_hit;
    i = lk_addr[5:4]; w = lk_addr[3:2];
    exp_hit = m_valid[i] && m_tag[i] == lk_addr[31:6];
    checks++;
    if (rd_valid !== m_valid[i] || rd_dirty !== m_dirty[i] || hit !== exp_hit ||
        (m_valid[i] && (rd_tag !== m_tag[i] || rd_line !== m_data[i] || rd_word !== m_data[i][w]))) begin
      failures++;
      $display("FAIL addr %h: hit %b/%b valid %b/%b dirty %b/%b", lk_addr, hit, exp_hit,
               rd_valid, m_valid[i], rd_dirty, m_dirty[i]);
    end
    if (exp_hit) hits++;
  endtask

  initial begin
    rst = 1; wr_en = 0; fill_en = 0; inv_en = 0; clean_en = 0;
    lk_addr = '0; wr_addr = '0; wr_data = '0; fill_idx = '0; fill_tag = '0;
    fill_line = '0; fill_dirty = 0; st_idx = '0;
    m_valid = '0; m_dirty = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [ADDR_W-1:0] fa;
      lk_addr = rand_addr();
      #1 compare();
      // choose commands
      wr_en = ($urandom_range(0, 3) == 0);
      wr_addr = rand_addr(); wr_data = $urandom;
      fill_en = ($urandom_range(0, 2) == 0);
      fa = rand_addr();
      fill_idx = fa[5:4]; fill_tag = fa[31:6]; fill_dirty = $urandom_range(0, 1);
      for (int k = 0; k < LINE_WORDS; k++) fill_line[k] = $urandom;
      inv_en = ($urandom_range(0, 7) == 0);
      clean_en = ($urandom_range(0, 5) == 0);
      st_idx = 2'($urandom);
      @(posedge clk);
      // model update, in the documented priority order
      if (wr_en) begin
        if (!(fill_en && fill_idx == wr_addr[5:4])) m_data[wr_addr[5:4]][wr_addr[3:2]] = wr_data;
        m_dirty[wr_addr[5:4]] = 1'b1;
      end
      if (fill_en) begin
        m_data[fill_idx] = fill_line; m_tag[fill_idx] = fill_tag;
        m_valid[fill_idx] = 1'b1; m_dirty[fill_idx] = fill_dirty;
      end
      if (clean_en) m_dirty[st_idx] = 1'b0;
      if (inv_en) begin m_valid[st_idx] = 1'b0; m_dirty[st_idx] = 1'b0; end
      @(negedge clk);
      wr_en = 0; fill_en = 0; inv_en = 0; clean_en = 0;
    end
    checks++;
    if (hits < 50) begin failures++; $display("FAIL too few hits: %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
