// mesi_next_state: the MESI transition function of one cache line.
//
// Given the line's present state, one event and the `shared` signal (another
// cache holds a valid copy), it returns the next state and the actions the
// transition needs. It is purely combinational.
//
// Transitions, following the protocol's state table and transition diagram:
//   Processor side          I --PrRd/BusRd--> S (shared) or E (not shared)
//                           I --PrWr/BusRdX--> M,   S --PrWr/BusRdX--> M
//                           E --PrWr--> M (no bus message), M/E/S --PrRd--> same
//                           M --PrWr--> M
//   Eviction                M --> I with write-back; E, S --> I silently
//   Snooped BusRd           M --> S with flush (send data and write back)
//                           E --> S sending data, S --> S, I --> I
//   Snooped BusRdX          M --> I sending data (no write-back: the requester
//                           takes the line in M), E --> I sending data, S --> I
// The S->M upgrade is reported as a BusRdX so the other copy is invalidated.
// Outputs: bus_rd / bus_rdx (the transition needs a bus transaction), send_data
// (this cache supplies the line), write_back (the line goes to main memory).
module mesi_next_state
  import mesi_pkg::*;
(
  input  mesi_state_e state,
  input  mesi_event_e event_i,
  input  logic        shared,
  output mesi_state_e next_state,
  output logic        bus_rd,
  output logic        bus_rdx,
  output logic        send_data,
  output logic        write_back
);

  always_comb begin
    next_state = state;
    bus_rd     = 1'b0;
    bus_rdx    = 1'b0;
    send_data  = 1'b0;
    write_back = 1'b0;
    unique case (event_i)
      EV_PR_RD: begin
        if (state == ST_I) begin
          bus_rd     = 1'b1;
          next_state = shared ? ST_S : ST_E;
        end
      end
      EV_PR_WR: begin
        if (state == ST_I || state == ST_S) bus_rdx = 1'b1;
        next_state = ST_M;
      end
      EV_EVICT: begin
        write_back = (state == ST_M);
        next_state = ST_I;
      end
      EV_BUS_RD: begin
        if (state == ST_M) begin
          send_data  = 1'b1;
          write_back = 1'b1;
          next_state = ST_S;
        end else if (state == ST_E) begin
          send_data  = 1'b1;
          next_state = ST_S;
        end
      end
      EV_BUS_RDX: begin
        send_data  = (state == ST_M) || (state == ST_E);
        next_state = ST_I;
      end
      default: ;
    endcase
  end

endmodule
