// tb_mesi_next_state: exhaustive check of the MESI transition function.
// Every (state, event, shared) combination is applied and the next state and
// the four action outputs are compared with a reference table written out
// below from the protocol's state table: processor load/store/eviction and
// snooped read/write requests in M, E, S and I.
module tb_mesi_next_state;
  import mesi_pkg::*;

  mesi_state_e st, nxt;
  mesi_event_e ev;
  logic        shared, brd, brdx, send, wb;
  int          checks = 0, failures = 0;

  mesi_next_state dut (
    .state(st), .event_i(ev), .shared(shared),
    .next_state(nxt), .bus_rd(brd), .bus_rdx(brdx), .send_data(send), .write_back(wb)
  );

  // expected {next, bus_rd, bus_rdx, send, wb}
  task automatic expect_row(input mesi_state_e s, input mesi_event_e e, input logic sh,
                            input mesi_state_e en, input logic ebrd, input logic ebrdx,
                            input logic esend, input logic ewb);
    st = s; ev = e; shared = sh;
    #1;
    checks++;
    if (nxt !== en || brd !== ebrd || brdx !== ebrdx || send !== esend || wb !== ewb) begin
      failures++;
      $display("FAIL state=%s ev=%s sh=%0b: got %s %b%b%b%b want %s %b%b%b%b", s.name(), e.name(), sh,
               nxt.name(), brd, brdx, send, wb, en.name(), ebrd, ebrdx, esend, ewb);
    end
  endtask

  initial begin
    for (int sh = 0; sh < 2; sh++) begin
      // Modified
      expect_row(ST_M, EV_PR_RD,   sh[0], ST_M, 0, 0, 0, 0);
      expect_row(ST_M, EV_PR_WR,   sh[0], ST_M, 0, 0, 0, 0);
      expect_row(ST_M, EV_EVICT,   sh[0], ST_I, 0, 0, 0, 1);
      expect_row(ST_M, EV_BUS_RD,  sh[0], ST_S, 0, 0, 1, 1);
      expect_row(ST_M, EV_BUS_RDX, sh[0], ST_I, 0, 0, 1, 0);
      expect_row(ST_M, EV_NONE,    sh[0], ST_M, 0, 0, 0, 0);
      // Exclusive
      expect_row(ST_E, EV_PR_RD,   sh[0], ST_E, 0, 0, 0, 0);
      expect_row(ST_E, EV_PR_WR,   sh[0], ST_M, 0, 0, 0, 0);
      expect_row(ST_E, EV_EVICT,   sh[0], ST_I, 0, 0, 0, 0);
      expect_row(ST_E, EV_BUS_RD,  sh[0], ST_S, 0, 0, 1, 0);
      expect_row(ST_E, EV_BUS_RDX, sh[0], ST_I, 0, 0, 1, 0);
      // Shared
      expect_row(ST_S, EV_PR_RD,   sh[0], ST_S, 0, 0, 0, 0);
      expect_row(ST_S, EV_PR_WR,   sh[0], ST_M, 0, 1, 0, 0);
      expect_row(ST_S, EV_EVICT,   sh[0], ST_I, 0, 0, 0, 0);
      expect_row(ST_S, EV_BUS_RD,  sh[0], ST_S, 0, 0, 0, 0);
      expect_row(ST_S, EV_BUS_RDX, sh[0], ST_I, 0, 0, 0, 0);
      // Invalid
      expect_row(ST_I, EV_PR_RD,   sh[0], sh ? ST_S : ST_E, 1, 0, 0, 0);
      expect_row(ST_I, EV_PR_WR,   sh[0], ST_M, 0, 1, 0, 0);
      expect_row(ST_I, EV_EVICT,   sh[0], ST_I, 0, 0, 0, 0);
      expect_row(ST_I, EV_BUS_RD,  sh[0], ST_I, 0, 0, 0, 0);
      expect_row(ST_I, EV_BUS_RDX, sh[0], ST_I, 0, 0, 0, 0);
    end
    // 7-bit code round trip for both caches
    for (int c = 0; c < 2; c++) begin
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (decode_code(encode_code(mesi_state_e'(s), c[0]), c[0]) != mesi_state_e'(s)) begin
          failures++;
          $display("FAIL code round trip cache %0d state %0d", c, s);
        end
      end
    end
    checks++;
    if (encode_code(ST_E, 1'b0) != 7'b0001000 || encode_code(ST_M, 1'b1) != 7'b1000000 ||
        encode_code(ST_I, 1'b1) != 7'b0000010 || encode_code(ST_S, 1'b0) != 7'b0000100) begin
      failures++;
      $display("FAIL code values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
