// brake_controller -- event sequencer of the braking-control chip.
//
// Processes one event at a time. An event comes from the scenario ROM
// (addresses FIRST_ADDR .. FIRST_ADDR+NUM_SCEN-1, then the controller halts
// with scen_done high until use_sensors is raised) or, with use_sensors
// high, from the digitised sensor word (then it loops forever). For each event the state machine
//
//   BRAKE_EN1  presents the ROM address
//   BRAKE_EN2  latches the event; with the transmission off it brakes
//              fully (N = 100 %, every brake output B_F) and ends the event
//   BRAKE_EN3  starts the BNF unit on the event's distance and speed
//   BRAKE_EN4  latches N and the BNF brake position
//   BRAKE_EN5  latches the experience entry for {distance, speed}
//   BRAKE_EN6  latches the decision (brake_decision)
//   BRAKE_EN7  drives brake_out_opt, auto_drive and action
//   BRAKE_EN8  branches: autonomous -> EXP1, otherwise -> WE1
//   WE1        writes the database (driver's brake learnt, or BNF brake)
//   EXP1       loads brake_muxout, the actuator command, with the choice
//   NEXT       pulses event_done and moves to the next event
//
// The state names brake_en1..brake_en8, we1 and exp1, and the branches
// brake_en8 -> we1 / exp1, are the design's; what each state does, the
// INIT wait for the database clearing and NEXT/DONE are this
// implementation's. brake_muxout changes only in autonomous mode and at
// full brake and holds its value otherwise, as in the design's traces.
//
// Timing: a full-brake event takes 3 cycles (EN1, EN2, NEXT), any other
// event 10 cycles. Outputs are registers and stay valid until the next
// event overwrites them.
module brake_controller
  import bnf_pkg::*;
#(
  parameter int unsigned ROM_AW     = 4,
  parameter int unsigned DB_AW      = DIST_W + SPEED_W,
  parameter int unsigned FIRST_ADDR = 1,
  parameter int unsigned NUM_SCEN   = 8,
  parameter int unsigned B_F        = B_F_DEF,
  parameter int unsigned N_FULL     = N_FULL_DEF
) (
  input  logic               clk,
  input  logic               rst,
  // event sources
  input  logic               use_sensors,
  input  logic               auto_nav_en,
  input  event_t             sensor_event,
  output logic [ROM_AW-1:0]  rom_addr,
  input  event_t             rom_data,
  // BNF unit
  output logic               bnf_en,
  output logic [DIST_W-1:0]  bnf_dist,
  output logic [SPEED_W-1:0] bnf_speed,
  input  logic [NF_W-1:0]    bnf_nf,
  input  logic [BRAKE_W-1:0] bnf_bpos,
  // experience database
  input  logic               db_ready,
  output logic [DB_AW-1:0]   db_raddr,
  input  logic               db_rvalid,
  input  logic [BRAKE_W-1:0] db_rdata,
  output logic               db_we,
  output logic [DB_AW-1:0]   db_waddr,
  output logic [BRAKE_W-1:0] db_wdata,
  // results
  output event_t             ev,
  output logic [NF_W-1:0]    nervous_factor_out,
  output logic [BRAKE_W-1:0] brake_position,
  output logic [BRAKE_W-1:0] brake_out_opt,
  output logic [BRAKE_W-1:0] brake_muxout,
  output logic               auto_drive,
  output action_e            action,
  output logic               event_done,
  output logic               scen_done
);

  typedef enum logic [3:0] {
    INIT, BRAKE_EN1, BRAKE_EN2, BRAKE_EN3, BRAKE_EN4, BRAKE_EN5, BRAKE_EN6,
    BRAKE_EN7, BRAKE_EN8, WE1, EXP1, NEXT, DONE
  } bcntl_state_e;

  localparam int unsigned LAST_ADDR = FIRST_ADDR + NUM_SCEN - 1;

  bcntl_state_e       bcntl_state;
  event_t             ev_in;
  logic               dbv_q;
  logic [BRAKE_W-1:0] dbb_q;
  action_e            act_d, act_q;
  logic [BRAKE_W-1:0] opt_d, opt_q;
  logic               auto_d, auto_q;
  logic               we_d, we_q;
  logic [BRAKE_W-1:0] wdata_d, wdata_q;

  assign ev_in = use_sensors ? sensor_event : rom_data;

  brake_decision #(.B_F(B_F)) u_decision (
    .auto_nav_en(auto_nav_en),
    .ev        (ev),
    .bnf_brake (brake_position),
    .db_valid  (dbv_q),
    .db_brake  (dbb_q),
    .action    (act_d),
    .opt       (opt_d),
    .auto_drive(auto_d),
    .db_we     (we_d),
    .db_wdata  (wdata_d)
  );

  assign bnf_en    = (bcntl_state == BRAKE_EN3);
  assign bnf_dist  = ev.distance;
  assign bnf_speed = ev.speed;
  assign db_raddr  = {ev.distance, ev.speed};
  assign db_waddr  = {ev.distance, ev.speed};
  assign db_we     = (bcntl_state == WE1) && we_q;
  assign db_wdata  = wdata_q;
  assign event_done = (bcntl_state == NEXT);
  assign scen_done  = (bcntl_state == DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      bcntl_state        <= INIT;
      rom_addr           <= ROM_AW'(FIRST_ADDR);
      ev                 <= '0;
      nervous_factor_out <= '0;
      brake_position     <= '0;
      brake_out_opt      <= '0;
      brake_muxout       <= '0;
      auto_drive         <= 1'b0;
      action             <= ACT_NONE;
      dbv_q              <= 1'b0;
      dbb_q              <= '0;
      act_q              <= ACT_NONE;
      opt_q              <= '0;
      auto_q             <= 1'b0;
      we_q               <= 1'b0;
      wdata_q            <= '0;
    end else begin
      unique case (bcntl_state)
        INIT:      if (db_ready) bcntl_state <= BRAKE_EN1;
        BRAKE_EN1: bcntl_state <= BRAKE_EN2;
        BRAKE_EN2: begin
          ev <= ev_in;
          if (!ev_in.trans) begin
            nervous_factor_out <= NF_W'(N_FULL);
            brake_position     <= BRAKE_W'(B_F);
            brake_out_opt      <= BRAKE_W'(B_F);
            brake_muxout       <= BRAKE_W'(B_F);
            auto_drive         <= 1'b0;
            action             <= ACT_FULL_BRAKE;
            bcntl_state        <= NEXT;
          end else begin
            bcntl_state <= BRAKE_EN3;
          end
        end
        BRAKE_EN3: bcntl_state <= BRAKE_EN4;
        BRAKE_EN4: begin
          nervous_factor_out <= bnf_nf;
          brake_position     <= bnf_bpos;
          bcntl_state        <= BRAKE_EN5;
        end
        BRAKE_EN5: begin
          dbv_q       <= db_rvalid;
          dbb_q       <= db_rdata;
          bcntl_state <= BRAKE_EN6;
        end
        BRAKE_EN6: begin
          act_q       <= act_d;
          opt_q       <= opt_d;
          auto_q      <= auto_d;
          we_q        <= we_d;
          wdata_q     <= wdata_d;
          bcntl_state <= BRAKE_EN7;
        end
        BRAKE_EN7: begin
          brake_out_opt <= opt_q;
          auto_drive    <= auto_q;
          action        <= act_q;
          bcntl_state   <= BRAKE_EN8;
        end
        BRAKE_EN8: bcntl_state <= auto_q ? EXP1 : WE1;
        WE1:       bcntl_state <= NEXT;
        EXP1: begin
          brake_muxout <= opt_q;
          bcntl_state  <= NEXT;
        end
        NEXT: begin
          if (!use_sensors && rom_addr == ROM_AW'(LAST_ADDR)) begin
            bcntl_state <= DONE;
          end else begin
            if (!use_sensors) rom_addr <= rom_addr + 1'b1;
            bcntl_state <= BRAKE_EN1;
          end
        end
        DONE:      if (use_sensors) bcntl_state <= BRAKE_EN1;
        default:   bcntl_state <= INIT;
      endcase
    end
  end

  // The database is only written once its clearing sweep is over, and only
  // for an event the driver handled (never in autonomous mode).
  a_db_write_ready: assert property (@(posedge clk) disable iff (rst) db_we |-> db_ready);
  a_db_write_manual: assert property (@(posedge clk) disable iff (rst) db_we |-> !auto_q);
  a_mux_only_auto: assert property (@(posedge clk) disable iff (rst)
                                    (bcntl_state == EXP1) |-> auto_q);

endmodule
