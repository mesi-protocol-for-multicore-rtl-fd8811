// tb_main_memory: line writes and reads of the shared memory against a model.
// Checks that a read returns the line one clock after `re`, that reset clears
// the array, that writes land in the addressed line only, and that a read and
// write to the same line in one cycle returns the old contents.
module tb_main_memory;
  import mesi_pkg::*;
  localparam int LINES = MEM_WORDS / LINE_WORDS;

  logic clk = 0, rst;
  logic [2:0] line_addr;
  logic re, we;
  logic [LINE_WORDS-1:0][DATA_W-1:0] wr_line, rd_line;
  logic [LINE_WORDS-1:0][DATA_W-1:0] model [LINES];
  int checks = 0, failures = 0;

  main_memory dut (.*);

  always #5 clk = ~clk;

  task automatic check_line(input logic [2:0] a, input logic [LINE_WORDS-1:0][DATA_W-1:0] exp_line);
    checks++;
    if (rd_line !== exp_line) begin
      failures++;
      $display("FAIL line %0d got %h want %h", a, rd_line, exp_line);
    end
  endtask

  initial begin
    rst = 1; re = 0; we = 0; line_addr = '0; wr_line = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int l = 0; l < LINES; l++) model[l] = '0;
    // reads after reset are zero
    for (int l = 0; l < LINES; l++) begin
      @(negedge clk); re = 1; line_addr = l[2:0];
      @(negedge clk); re = 0;
      check_line(l[2:0], '0);
    end
    // random traffic
    for (int n = 0; n < 300; n++) begin
      logic [2:0] a;
      logic [LINE_WORDS-1:0][DATA_W-1:0] d, old_line;
      a = 3'($urandom_range(0, LINES-1));
      for (int w = 0; w < LINE_WORDS; w++) d[w] = $urandom;
      old_line = model[a];
      @(negedge clk);
      line_addr = a; we = $urandom_range(0, 1); re = 1; wr_line = d;
      if (we) model[a] = d;
      @(negedge clk);
      we = 0; re = 0;
      check_line(a, old_line);       // read in the same cycle sees the old line
      @(negedge clk);
      re = 1; line_addr = a;
      @(negedge clk);
      re = 0;
      check_line(a, model[a]);
      // rd_line holds while re is low
      @(negedge clk);
      check_line(a, model[a]);
    end
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
