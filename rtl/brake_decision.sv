// brake_decision -- the decision step of the braking controller.
//
// For one event it picks what the chip does, following the design's flow
// chart: with the transmission off the car is braked fully; in autonomous
// mode the chip brakes from its experience database, or from the BNF brake
// when it has no experience for the situation; otherwise the driver brakes,
// and the chip either learns the driver's brake (safe braking) or abandons
// it and stores the BNF brake in the database instead.
//
// Autonomous mode needs the auto-navigation enable, which the design feeds
// into its decision step. Conditions chosen by this implementation where
// the design gives only examples: autonomous mode is, in addition,
// transmission on, cars closing and no driver brake; the driver brakes safely when the driver's brake is at least the
// BNF brake. Learning is judged per event.
//
// Interface: auto-navigation enable, event, BNF brake and database entry in; action, the selected
// brake (opt), autonomous flag and a database write request out.
// Timing: purely combinational.
module brake_decision
  import bnf_pkg::*;
#(
  parameter int unsigned B_F = B_F_DEF
) (
  input  logic               auto_nav_en,
  input  event_t             ev,
  input  logic [BRAKE_W-1:0] bnf_brake,
  input  logic               db_valid,
  input  logic [BRAKE_W-1:0] db_brake,
  output action_e            action,
  output logic [BRAKE_W-1:0] opt,
  output logic               auto_drive,
  output logic               db_we,
  output logic [BRAKE_W-1:0] db_wdata
);

  always_comb begin
    action     = ACT_NONE;
    opt        = '0;
    auto_drive = 1'b0;
    db_we      = 1'b0;
    db_wdata   = '0;
    if (!ev.trans) begin
      action = ACT_FULL_BRAKE;
      opt    = BRAKE_W'(B_F);
    end else if (auto_nav_en && ev.relation == REL_CLOSING && ev.brake == '0) begin
      auto_drive = 1'b1;
      if (db_valid) begin
        action = ACT_AUTO_EXP;
        opt    = db_brake;
      end else begin
        action = ACT_AUTO_BNF;
        opt    = bnf_brake;
      end
    end else if (ev.brake >= bnf_brake) begin
      action   = ACT_LEARN;
      opt      = ev.brake;
      db_we    = 1'b1;
      db_wdata = ev.brake;
    end else begin
      action   = ACT_ABANDON;
      opt      = bnf_brake;
      db_we    = 1'b1;
      db_wdata = bnf_brake;
    end
  end

endmodule
