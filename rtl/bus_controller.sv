// bus_controller: arbiter for the shared system bus of the two processors.
//
// Each processor raises req[p] while it has a load or store outstanding. When
// the bus is free the arbiter grants one requester at once (gnt is
// combinational in that cycle) and locks the bus to it from the next clock edge
// until the coherence controller pulses `done`; while locked, gnt stays on the
// owner and other requests wait. When both processors ask in the same cycle,
// the one that did not have the bus last time wins (round robin), so neither
// can be starved. The document only says that a bus controller serialises
// modules that use the shared bus at the same time; round robin and the
// grant/lock timing are this design's choice.
module bus_controller
  import mesi_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [NCORES-1:0] req,
  input  logic              done,   // end of the granted transaction
  output logic [NCORES-1:0] gnt     // one-hot or zero
);

  logic       locked_q;
  logic       owner_q;   // processor that holds / last held the bus
  logic       pick;

  // Round robin between two: prefer the processor that was not the last owner.
  always_comb begin
    if (req[!owner_q]) pick = !owner_q;
    else               pick = owner_q;
  end

  always_comb begin
    gnt = '0;
    if (locked_q)    gnt[owner_q] = 1'b1;
    else if (|req)   gnt[pick]    = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked_q <= 1'b0;
      owner_q  <= 1'b1;   // processor 1 (index 0) wins the first tie
    end else if (locked_q) begin
      if (done) locked_q <= 1'b0;
    end else if (|req && !done) begin
      locked_q <= 1'b1;
      owner_q  <= pick;
    end
  end

  // At most one grant at a time.
  assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));

endmodule
