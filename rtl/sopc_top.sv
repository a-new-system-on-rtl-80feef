// sopc_top -- braking-control system on a programmable chip.
//
// The chip predicts how hard a driver would brake from the braking nervous
// factor N = v^2 / (2 g mu D) of the current situation, learns the driver's
// actual braking into an on-chip experience database, and brakes on its own
// (autonomous mode) from that experience or from N when the driver does
// not. An automatic calibration core shapes the brake command while the
// cars close in.
//
//   event source   scenario_rom (test scenarios) or sensor_event
//                  (digitised distance/speed from an external ADC)
//   brake_controller  sequences each event: BNF, database, decision
//     brake_decision  full brake / learn / abandon / autonomous
//   bnf_unit       N in percent and the BNF brake position
//   experience_db  learned brake per {distance, speed}
//   brake_calibration  sums brake positions while N rises
//
// The block structure, the event word, the ROM scenarios and the signal
// names (eventget_rom_addr, brake_out, speed_out, nervous_factor_out,
// brake_position, brake_out_opt, brake_muxout, auto_drive, nadd,
// brake_calibration) and the auto-navigation enable are the design's; the ADC interface is outside this
// RTL, and use_sensors selecting between ROM and sensors is this
// implementation's addition. brake_muxout is the actuator command without
// calibration; brake_calibration is the calibrated command.
//
// Clock and reset: one clock, synchronous active-high reset. After reset
// the experience database is cleared (2^DB_AW cycles), then events run:
// 3 cycles for a full-brake event, 10 for any other. The calibration core
// samples once per event, on event_done.
module sopc_top
  import bnf_pkg::*;
#(
  parameter int unsigned ROM_AW   = 4,
  parameter int unsigned NUM_SCEN = 8,
  parameter int unsigned DB_AW    = DIST_W + SPEED_W
) (
  input  logic               sys_clock,
  input  logic               sys_reset,
  input  logic               use_sensors,
  input  logic               auto_nav_enable,
  input  event_t             sensor_event,
  output logic [ROM_AW-1:0]  eventget_rom_addr,
  output logic [BRAKE_W-1:0] brake_out,
  output logic [SPEED_W-1:0] speed_out,
  output relation_e          relation_out,
  output logic [NF_W-1:0]    nervous_factor_out,
  output logic [BRAKE_W-1:0] brake_position,
  output logic [BRAKE_W-1:0] brake_out_opt,
  output logic [BRAKE_W-1:0] brake_muxout,
  output logic               auto_drive,
  output logic [BRAKE_W-1:0] brake_calibration,
  output logic [BRAKE_W:0]   nadd,
  output logic [NF_W-1:0]    nout1,
  output logic [NF_W-1:0]    nout2,
  output logic [BRAKE_W-1:0] aa,
  output logic [BRAKE_W-1:0] bb,
  output logic               event_done,
  output logic               scen_done,
  output action_e            action
);

  event_t             rom_data, ev;
  logic               bnf_en;
  logic [DIST_W-1:0]  bnf_dist;
  logic [SPEED_W-1:0] bnf_speed;
  logic [NF_W-1:0]    bnf_nf;
  logic [BRAKE_W-1:0] bnf_bpos;
  logic               db_ready, db_rvalid, db_we;
  logic [DB_AW-1:0]   db_raddr, db_waddr;
  logic [BRAKE_W-1:0] db_rdata, db_wdata;

  scenario_rom #(.AW(ROM_AW)) u_rom (
    .clk (sys_clock),
    .addr(eventget_rom_addr),
    .data(rom_data)
  );

  bnf_unit u_bnf (
    .clk  (sys_clock),
    .rst  (sys_reset),
    .en   (bnf_en),
    .distance (bnf_dist),
    .speed(bnf_speed),
    .nf   (bnf_nf),
    .bpos (bnf_bpos)
  );

  experience_db #(.AW(DB_AW), .DW(BRAKE_W)) u_db (
    .clk   (sys_clock),
    .rst   (sys_reset),
    .ready (db_ready),
    .raddr (db_raddr),
    .rvalid(db_rvalid),
    .rdata (db_rdata),
    .we    (db_we),
    .waddr (db_waddr),
    .wdata (db_wdata)
  );

  brake_controller #(
    .ROM_AW  (ROM_AW),
    .DB_AW   (DB_AW),
    .NUM_SCEN(NUM_SCEN)
  ) u_bcntl (
    .clk               (sys_clock),
    .rst               (sys_reset),
    .use_sensors       (use_sensors),
    .auto_nav_en       (auto_nav_enable),
    .sensor_event      (sensor_event),
    .rom_addr          (eventget_rom_addr),
    .rom_data          (rom_data),
    .bnf_en            (bnf_en),
    .bnf_dist          (bnf_dist),
    .bnf_speed         (bnf_speed),
    .bnf_nf            (bnf_nf),
    .bnf_bpos          (bnf_bpos),
    .db_ready          (db_ready),
    .db_raddr          (db_raddr),
    .db_rvalid         (db_rvalid),
    .db_rdata          (db_rdata),
    .db_we             (db_we),
    .db_waddr          (db_waddr),
    .db_wdata          (db_wdata),
    .ev                (ev),
    .nervous_factor_out(nervous_factor_out),
    .brake_position    (brake_position),
    .brake_out_opt     (brake_out_opt),
    .brake_muxout      (brake_muxout),
    .auto_drive        (auto_drive),
    .action            (action),
    .event_done        (event_done),
    .scen_done         (scen_done)
  );

  auto_calibration u_cal (
    .clk              (sys_clock),
    .rst              (sys_reset),
    .tick             (event_done),
    .nf               (nervous_factor_out),
    .bpos             (brake_position),
    .relation         (ev.relation),
    .nout1            (nout1),
    .nout2            (nout2),
    .aa               (aa),
    .bb               (bb),
    .nadd             (nadd),
    .brake_calibration(brake_calibration)
  );

  assign brake_out    = ev.brake;
  assign speed_out    = ev.speed;
  assign relation_out = ev.relation;

endmodule
