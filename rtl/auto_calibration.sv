// auto_calibration -- automatic calibration of the BNF brake.
//
// Repeated full or abrupt braking is uncomfortable and wears the brake, so
// the calibration core shapes the brake command while two cars close in.
// At every sampling strobe (tick) it shifts the nervous factor into a
// two-deep history, nout1 = N(n+1) and nout2 = N(n). While the cars are
// closing and N rises above the last sample, the current BNF brake
// position is captured, alternately into aa (B(n)) and bb (B(n+1)); the
// calibrated brake is their sum, nadd = aa + bb. A steady or falling N
// leaves aa and bb unchanged, so the calibrated brake holds. When the cars
// stop closing, aa and bb are cleared and the calibration releases.
//
// This behaviour is read off the design's calibration traces (0, 5, 11 for
// a rising N with brake positions 5 and 6; 8 + 8 = 16 held at a steady and
// at a falling N; 0 on release). The design's equation for a falling N
// instead follows the BNF brake; the traces and their description (the
// brake keeps its status) are followed here. Saturating brake_calibration
// at B_F is this implementation's choice; nadd is the raw sum.
//
// The design clocks this core with its own clock; here the sampling clock
// is a strobe on the system clock, which avoids a multi-bit clock crossing.
//
// Timing: registers update on the clock edge where tick is high; nadd and
// brake_calibration are combinational from them.
module auto_calibration
  import bnf_pkg::*;
#(
  parameter int unsigned B_F = B_F_DEF
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               tick,
  input  logic [NF_W-1:0]    nf,
  input  logic [BRAKE_W-1:0] bpos,
  input  relation_e          relation,
  output logic [NF_W-1:0]    nout1,
  output logic [NF_W-1:0]    nout2,
  output logic [BRAKE_W-1:0] aa,
  output logic [BRAKE_W-1:0] bb,
  output logic [BRAKE_W:0]   nadd,
  output logic [BRAKE_W-1:0] brake_calibration
);

  logic sel_bb;  // next capture goes to bb

  always_ff @(posedge clk) begin
    if (rst) begin
      nout1  <= '0;
      nout2  <= '0;
      aa     <= '0;
      bb     <= '0;
      sel_bb <= 1'b0;
    end else if (tick) begin
      nout1 <= nf;
      nout2 <= nout1;
      if (relation != REL_CLOSING) begin
        aa     <= '0;
        bb     <= '0;
        sel_bb <= 1'b0;
      end else if (nf > nout1) begin
        if (sel_bb) bb <= bpos;
        else        aa <= bpos;
        sel_bb <= ~sel_bb;
      end
    end
  end

  always_comb begin
    nadd = {1'b0, aa} + {1'b0, bb};
    brake_calibration = (nadd > (BRAKE_W + 1)'(B_F)) ? BRAKE_W'(B_F) : nadd[BRAKE_W-1:0];
  end

endmodule
