// main_memory: the shared main memory, MEM_WORDS 32-bit words (32 by default).
//
// It is accessed a whole cache line (LINE_WORDS words) at a time through one
// port. `line_addr` selects the line: the address bits above the line offset,
// modulo the number of lines (addresses above MEM_WORDS*4 bytes wrap around).
// A read (re) returns the line on rd_line after the next rising edge (one
// cycle of latency); a write (we) stores wr_line on the rising edge. Reset
// clears the array so that every read is defined. The 32-entry size follows
// the document; the line-wide port and the one-cycle latency are this design's
// choice.
module main_memory
  import mesi_pkg::*;
#(
  parameter int unsigned MEM_WORDS_P  = mesi_pkg::MEM_WORDS,
  parameter int unsigned LINE_WORDS_P = mesi_pkg::LINE_WORDS,
  localparam int unsigned LINES  = MEM_WORDS_P / LINE_WORDS_P,
  localparam int unsigned LADR_W = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [LADR_W-1:0]                   line_addr,
  input  logic                                re,
  input  logic                                we,
  input  logic [LINE_WORDS_P-1:0][DATA_W-1:0] wr_line,
  output logic [LINE_WORDS_P-1:0][DATA_W-1:0] rd_line
);

  logic [LINE_WORDS_P-1:0][DATA_W-1:0] mem_q [LINES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < LINES; l++) mem_q[l] <= '0;
      rd_line <= '0;
    end else begin
      if (we) mem_q[line_addr] <= wr_line;
      if (re) rd_line <= mem_q[line_addr];
    end
  end

endmodule
