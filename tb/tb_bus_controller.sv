// tb_bus_controller: arbitration of the shared bus between two requesters.
// Checks: a lone request is granted in the same cycle; the grant stays on the
// owner until `done`, even if the other processor asks meanwhile; with both
// asking, grants alternate (round robin); never two grants at once.
module tb_bus_controller;
  import mesi_pkg::*;

  logic clk = 0, rst;
  logic [1:0] req, gnt;
  logic done;
  int checks = 0, failures = 0;

  bus_controller dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic [1:0] exp_gnt, input string what);
    checks++;
    if (gnt !== exp_gnt) begin
      failures++;
      $display("FAIL %s: gnt %b want %b", what, gnt, exp_gnt);
    end
  endtask

  initial begin
    int last;
    rst = 1; req = 0; done = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(2'b00, "idle");
    // lone request from processor 2, granted at once
    req = 2'b10; #1 chk(2'b10, "lone p2");
    @(negedge clk);
    req = 2'b11; #1 chk(2'b10, "locked on p2");
    @(negedge clk); chk(2'b10, "still locked");
    done = 1; #1 chk(2'b10, "done cycle");
    @(negedge clk); done = 0; req = 2'b11;
    #1 chk(2'b01, "p1 after p2");
    // both keep asking: alternate
    last = 0;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk); done = 1;
      @(negedge clk); done = 0;
      #1;
      chk(last == 0 ? 2'b10 : 2'b01, "round robin");
      last = (gnt == 2'b10) ? 1 : 0;
    end
    // random traffic: one-hot, lock holds until done
    for (int n = 0; n < 500; n++) begin
      logic [1:0] g0;
      @(negedge clk);
      req = 2'($urandom);
      done = 0;
      #1 g0 = gnt;
      checks++;
      if (!$onehot0(gnt) || (gnt != 0 && (gnt & req) == 0 && !dut.locked_q)) begin
        failures++; $display("FAIL random grant %b req %b", gnt, req);
      end
      if (g0 != 0) begin
        @(negedge clk);
        req = 2'($urandom);
        #1 chk(g0, "held until done");
        done = 1;
        @(negedge clk) done = 0; req = 0;
      end
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
