// scenario_rom -- on-chip ROM of test driving scenarios.
//
// Holds the eight driving situations that exercise the chip from ignition
// to autonomous driving, one event word (bnf_pkg::event_t) per address, at
// addresses 1 to 8: ignition with the transmission off, steady distance,
// three closing events the driver brakes for (brake 2, 3 and 8 at speeds
// 1, 5 and 9 m/s, 62 m apart), a closing event with too little driver brake
// (2), and two closing events without driver brake (speed 9 and 7 m/s).
// The contents and their addresses follow the design's scenario table and
// simulation traces; every other address reads as an all-zero word, which
// is this design's choice.
//
// Interface: addr in, data out. Timing: synchronous read, data is valid on
// the clock edge after addr is presented (one cycle latency).
module scenario_rom
  import bnf_pkg::*;
#(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output event_t        data
);

  function automatic event_t scen(input int unsigned a);
    event_t e;
    e = '0;
    case (a)
      //                trans  relation     distance        speed     driver brake
      1: e = '{1'b0, REL_STOP,    6'b111110, 5'b00000, 6'b000000};
      2: e = '{1'b1, REL_STEADY,  6'b111110, 5'b00000, 6'b000000};
      3: e = '{1'b1, REL_CLOSING, 6'b111110, 5'b00001, 6'b000010};
      4: e = '{1'b1, REL_CLOSING, 6'b111110, 5'b00101, 6'b000011};
      5: e = '{1'b1, REL_CLOSING, 6'b111110, 5'b01001, 6'b001000};
      6: e = '{1'b1, REL_CLOSING, 6'b111110, 5'b01001, 6'b000010};
      7: e = '{1'b1, REL_CLOSING, 6'b111110, 5'b01001, 6'b000000};
      8: e = '{1'b1, REL_CLOSING, 6'b111110, 5'b00111, 6'b000000};
      default: e = '0;
    endcase
    return e;
  endfunction

  always_ff @(posedge clk) begin
    data <= scen(int'(addr));
  end

endmodule
