// tb_mesi_paper_cases: the two published simulation cases, run on the whole
// system through the top-level ports with default sizes and a 10 ns clock.
//
// Case 1, direct read: MIPS1 holds a line Exclusive (code M=00 E=01 S=0 I=00,
// 0001000) and loads from it. Expected: mp1hit1 = 1, mp1hit2 = 0, mp2hit1 =
// mp2hit2 = 0, the code stays 0001000, no memory access, answer one cycle
// after acceptance.
// Case 2, direct write: MIPS1 stores to the same line. Expected: code becomes
// M=01 E=00 S=0 I=00 (0100000, "not exclusive"), still a hit, one cycle, no
// bus message to MIPS2's cache (its code stays Invalid, 0000010).
// Before that, the line is brought in by a load miss (code 0001000 after 4
// cycles) so that the cases start from the published state.
module tb_mesi_paper_cases;
  import mesi_pkg::*;

  logic clk = 0, rst;
  logic [1:0] p_rd, p_wr, p_ack;
  logic [1:0][ADDR_W-1:0] p_addr;
  logic [1:0][DATA_W-1:0] p_wdata;
  logic [DATA_W-1:0] rdata;
  logic [1:0][1:0] mphit;
  mesi_code_t [1:0] outmesi;
  ctrl_events_t events;
  logic busy;
  int checks = 0, failures = 0;
  int mem_ops = 0;

  mesi_dual_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) mem_ops += int'(dut.m_re || dut.m_we);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // MIPS1 access; returns data and cycles from acceptance to ack
  task automatic mp1(input logic wr, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output int lat);
    @(negedge clk);
    p_addr[0] = a; p_wdata[0] = d; p_rd[0] = !wr; p_wr[0] = wr;
    lat = 0;
    @(posedge clk);
    while (!p_ack[0]) begin @(posedge clk); lat++; end
    rd = rdata;
    @(negedge clk);
    p_rd[0] = 0; p_wr[0] = 0;
  endtask

  initial begin
    logic [31:0] rd;
    int lat, m0;
    rst = 1; p_rd = 0; p_wr = 0; p_addr = '0; p_wdata = '0;
    p_addr[1] = 32'h0000_0040;   // MIPS2 idle, pointing elsewhere
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    mp1(0, 32'h0000_0008, 0, rd, lat);
    chk(lat == 4 && outmesi[0] == 7'b0001000, $sformatf("fill: lat %0d code %b", lat, outmesi[0]));

    // Case 1: direct read
    m0 = mem_ops;
    @(negedge clk);
    p_addr[0] = 32'h0000_0008;   // hit signals follow the address at once
    #1;
    chk(mphit == 4'b0001, $sformatf("hits mp2hit2,mp2hit1,mp1hit2,mp1hit1 = %b", mphit));
    chk(outmesi[0] == 7'b0001000, $sformatf("inmesi1 %b", outmesi[0]));
    mp1(0, 32'h0000_0008, 0, rd, lat);
    chk(lat == 1, $sformatf("direct read latency %0d", lat));
    chk(rd == 32'h0, "direct read data");
    chk(outmesi[0] == 7'b0001000, $sformatf("after direct read %b", outmesi[0]));
    chk(mem_ops == m0, "direct read used no memory");

    // Case 2: direct write
    mp1(1, 32'h0000_0008, 32'hCAFE_0001, rd, lat);
    chk(lat == 1, $sformatf("direct write latency %0d", lat));
    chk(outmesi[0] == 7'b0100000, $sformatf("after direct write %b", outmesi[0]));
    chk(outmesi[1] == 7'b0000010, $sformatf("MIPS2 code %b", outmesi[1]));
    chk(mem_ops == m0, "direct write used no memory");
    mp1(0, 32'h0000_0008, 0, rd, lat);
    chk(rd == 32'hCAFE_0001 && lat == 1, "written word read back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
