// bnf_unit -- braking nervous factor and BNF brake position.
//
// The braking nervous factor is the ratio r = v^2 / (2 g mu D) of the
// distance the car needs to stop from relative speed v to the distance D
// to the car in front. The unit reports it in percent, N = ceil(100 r)
// saturated at N_FULL, and converts it into a brake position
// B = ceil(B_F r) saturated at B_F, so r = 1 (the full nervous factor)
// means the brake pressed to the bottom. Both equations are the design's;
// rounding up, computing B from r rather than from the rounded N, and
// treating D = 0 as a full nervous factor are this implementation's
// choices, picked because they reproduce the values of the design's
// traces (speed 9 m/s at 62 m gives N = 9, B = 6; 7 m/s gives 6 and 4).
//
// With g and mu held in tenths, 100 r = 10000 v^2 / (G_X10 * MU_X10 * 2 * D),
// so each result is one integer division with round-up.
//
// Interface: distance (m) and speed (m/s) in; nf (percent) and bpos out.
// Timing: combinational dividers, registered outputs loaded when en is high;
// results appear one clock after en.
module bnf_unit
  import bnf_pkg::*;
#(
  parameter int unsigned B_F    = B_F_DEF,
  parameter int unsigned N_FULL = N_FULL_DEF,
  parameter int unsigned G_X10  = G_X10_DEF,
  parameter int unsigned MU_X10 = MU_X10_DEF
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic [DIST_W-1:0]  distance,
  input  logic [SPEED_W-1:0] speed,
  output logic [NF_W-1:0]    nf,
  output logic [BRAKE_W-1:0] bpos
);

  localparam int unsigned K2GMU = 2 * G_X10 * MU_X10;  // 2 g mu, in 0.01 m/s^2

  logic [31:0] v2, den, num_n, num_b, q_n, q_b;
  logic [NF_W-1:0]    nf_d;
  logic [BRAKE_W-1:0] bpos_d;

  always_comb begin
    v2    = 32'(speed) * 32'(speed);
    den   = 32'(K2GMU) * 32'(distance);
    num_n = v2 * 32'(100 * 100);
    num_b = v2 * 32'(100 * B_F);
    q_n   = '0;
    q_b   = '0;
    if (speed == '0) begin
      nf_d   = '0;
      bpos_d = '0;
    end else if (distance == '0) begin
      nf_d   = NF_W'(N_FULL);
      bpos_d = BRAKE_W'(B_F);
    end else begin
      q_n    = (num_n + den - 32'd1) / den;
      q_b    = (num_b + den - 32'd1) / den;
      nf_d   = (q_n > 32'(N_FULL)) ? NF_W'(N_FULL) : NF_W'(q_n);
      bpos_d = (q_b > 32'(B_F))    ? BRAKE_W'(B_F) : BRAKE_W'(q_b);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      nf   <= '0;
      bpos <= '0;
    end else if (en) begin
      nf   <= nf_d;
      bpos <= bpos_d;
    end
  end

endmodule
