// tb_coherency_tag: random writes of 7-bit codes and 26-bit tags into both
// caches' entries and random lookups from both processors, compared with a
// model. Checks the reset code (Invalid for each cache) and the four hit
// signals mp1hit1, mp1hit2, mp2hit1, mp2hit2, whose expected value is
// computed here directly from the code fields.
module tb_coherency_tag;
  import mesi_pkg::*;
  localparam int TAG_W = 26;

  logic clk = 0, rst;
  logic [NCORES-1:0][ADDR_W-1:0] lk_addr;
  logic [NCORES-1:0][NCORES-1:0] hit;
  mesi_code_t code [NCORES][NCORES];
  logic [TAG_W-1:0] tag [NCORES][NCORES];
  logic [NCORES-1:0] we;
  logic [1:0] w_idx [NCORES];
  mesi_code_t w_code [NCORES];
  logic [TAG_W-1:0] w_tag [NCORES];

  mesi_code_t m_code [NCORES][SETS];
  logic [TAG_W-1:0] m_tag [NCORES][SETS];
  int checks = 0, failures = 0, nhits = 0;

  coherency_tag dut (.*);

  always #5 clk = ~clk;

  // Valid for cache c: no "not valid" bit for c, and one of M/E for c or S.
  function automatic logic valid_in(input mesi_code_t k, input int c);
    logic [1:0] f;
    f = (c == 0) ? 2'b01 : 2'b10;
    if (k.i & f) return 1'b0;
    return ((k.m & f) != 0) || ((k.e & f) != 0) || k.s;
  endfunction

  function automatic mesi_code_t rand_code(input int c);
    mesi_state_e s;
    s = mesi_state_e'($urandom_range(0, 3));
    return encode_code(s, c[0]);
  endfunction

  initial begin
    rst = 1; we = '0; lk_addr = '0;
    w_idx = '{default: '0}; w_code = '{default: '0}; w_tag = '{default: '0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // reset values
    for (int s = 0; s < SETS; s++) begin
      lk_addr[0] = ADDR_W'(s << 4); lk_addr[1] = ADDR_W'(s << 4);
      #1;
      checks++;
      if (code[0][0] !== 7'b0000001 || code[0][1] !== 7'b0000010 || hit !== '0) begin
        failures++; $display("FAIL reset set %0d: %b %b", s, code[0][0], code[0][1]);
      end
    end
    for (int c = 0; c < NCORES; c++)
      for (int s = 0; s < SETS; s++) begin
        m_code[c][s] = (c == 0) ? 7'b0000001 : 7'b0000010;
        m_tag[c][s] = '0;
      end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NCORES; p++)
        lk_addr[p] = {24'h0, 2'($urandom_range(0, 1)), 2'($urandom), 4'($urandom) & 4'hC};
      #1;
      for (int p = 0; p < NCORES; p++)
        for (int c = 0; c < NCORES; c++) begin
          logic [1:0] i;
          logic eh;
          i = lk_addr[p][5:4];
          eh = valid_in(m_code[c][i], c) && m_tag[c][i] == lk_addr[p][31:6];
          checks++;
          if (code[p][c] !== m_code[c][i] || tag[p][c] !== m_tag[c][i] || hit[p][c] !== eh) begin
            failures++;
            $display("FAIL p%0d c%0d set %0d: code %b/%b hit %b/%b", p, c, i, code[p][c],
                     m_code[c][i], hit[p][c], eh);
          end
          if (eh) nhits++;
        end
      for (int c = 0; c < NCORES; c++) begin
        we[c] = $urandom_range(0, 1);
        w_idx[c] = 2'($urandom);
        w_code[c] = rand_code(c);
        w_tag[c] = {24'h0, 2'($urandom_range(0, 1))};
      end
      @(posedge clk);
      for (int c = 0; c < NCORES; c++)
        if (we[c]) begin m_code[c][w_idx[c]] = w_code[c]; m_tag[c][w_idx[c]] = w_tag[c]; end
      @(negedge clk) we = '0;
    end
    checks++;
    if (nhits < 100) begin failures++; $display("FAIL too few hits %0d", nhits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
