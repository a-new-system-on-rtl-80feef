// tb_brake_controller -- runs the controller on the scenario ROM and on
// directed sensor events.
//
// The controller is connected to the scenario ROM, the BNF unit and the
// experience database. For the eight ROM scenarios the expected outputs are
// the values of the design's traces: ignition (N 100, every brake 63),
// steady (N 0), learning 2, 3 and 8, abandoning 2 for BNF 6, autonomous 6
// from experience, autonomous 4 from BNF. brake_muxout must keep 63 until
// the autonomous events. Event lengths are checked (3 cycles at full brake,
// 10 otherwise), as are the database writes. Then the controller is
// switched to sensor events: a learn / abandon / recall sequence at a new
// distance and speed.
module tb_brake_controller;
  import bnf_pkg::*;

  logic clk = 1'b0, rst, use_sensors, auto_nav_en;
  event_t sensor_event, rom_data, ev;
  logic [3:0] rom_addr;
  logic bnf_en;
  logic [5:0] bnf_dist, bnf_bpos, db_rdata, db_wdata;
  logic [4:0] bnf_speed;
  logic [6:0] bnf_nf, nervous_factor_out;
  logic db_ready, db_rvalid, db_we;
  logic [10:0] db_raddr, db_waddr;
  logic [5:0] brake_position, brake_out_opt, brake_muxout;
  logic auto_drive, event_done, scen_done;
  action_e action;
  int checks = 0, failures = 0;
  int cycle = 0, last_done = 0, n_writes = 0;
  logic [10:0] last_waddr;
  logic [5:0]  last_wdata;

  scenario_rom u_rom (.clk(clk), .addr(rom_addr), .data(rom_data));
  bnf_unit u_bnf (.clk(clk), .rst(rst), .en(bnf_en), .distance(bnf_dist), .speed(bnf_speed),
                  .nf(bnf_nf), .bpos(bnf_bpos));
  experience_db u_db (.clk(clk), .rst(rst), .ready(db_ready), .raddr(db_raddr),
    .rvalid(db_rvalid), .rdata(db_rdata), .we(db_we), .waddr(db_waddr), .wdata(db_wdata));

  brake_controller dut (
    .clk(clk), .rst(rst), .use_sensors(use_sensors), .auto_nav_en(auto_nav_en),
    .sensor_event(sensor_event),
    .rom_addr(rom_addr), .rom_data(rom_data), .bnf_en(bnf_en), .bnf_dist(bnf_dist),
    .bnf_speed(bnf_speed), .bnf_nf(bnf_nf), .bnf_bpos(bnf_bpos), .db_ready(db_ready),
    .db_raddr(db_raddr), .db_rvalid(db_rvalid), .db_rdata(db_rdata), .db_we(db_we),
    .db_waddr(db_waddr), .db_wdata(db_wdata), .ev(ev), .nervous_factor_out(nervous_factor_out),
    .brake_position(brake_position), .brake_out_opt(brake_out_opt), .brake_muxout(brake_muxout),
    .auto_drive(auto_drive), .action(action), .event_done(event_done), .scen_done(scen_done));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (db_we) begin
      n_writes   <= n_writes + 1;
      last_waddr <= db_waddr;
      last_wdata <= db_wdata;
    end
  end

  // Waits for the end of the next event and checks its outputs and length.
  task automatic check_event(input int addr, input int n, input int b, input int opt,
                             input int mux, input bit au, input action_e act, input int len,
                             input int wr, input string what);
    int w0;
    w0 = n_writes;
    do begin
      @(posedge clk);
      #1;
    end while (!event_done);
    checks++;
    if (nervous_factor_out != 7'(n) || brake_position != 6'(b) || brake_out_opt != 6'(opt) ||
        brake_muxout != 6'(mux) || auto_drive != au || action != act ||
        (addr >= 0 && rom_addr != 4'(addr))) begin
      failures++;
      $display("%s: got addr=%0d N=%0d B=%0d opt=%0d mux=%0d auto=%0d act=%0d", what, rom_addr,
               nervous_factor_out, brake_position, brake_out_opt, brake_muxout, auto_drive, action);
    end
    if (len > 0) begin
      checks++;
      if (cycle - last_done != len) begin
        failures++;
        $display("%s: event took %0d cycles, expected %0d", what, cycle - last_done, len);
      end
    end
    last_done = cycle;
    checks++;
    if ((wr < 0 && n_writes != w0) ||
        (wr >= 0 && (n_writes != w0 + 1 || last_wdata != 6'(wr) ||
                     last_waddr != {ev.distance, ev.speed}))) begin
      failures++;
      $display("%s: database write wrong (writes %0d, data %0d)", what, n_writes - w0, last_wdata);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; use_sensors = 1'b0; sensor_event = '0; auto_nav_en = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    //          addr  N   B  opt mux auto action        len  write
    check_event(1, 100, 63, 63, 63, 0, ACT_FULL_BRAKE, 0, -1, "a ignition");
    check_event(2,   0,  0,  0, 63, 0, ACT_LEARN,     10,  0, "b steady");
    check_event(3,   1,  1,  2, 63, 0, ACT_LEARN,     10,  2, "row 3");
    check_event(4,   3,  2,  3, 63, 0, ACT_LEARN,     10,  3, "row 4");
    check_event(5,   9,  6,  8, 63, 0, ACT_LEARN,     10,  8, "c learn 8");
    check_event(6,   9,  6,  6, 63, 0, ACT_ABANDON,   10,  6, "d abandon");
    check_event(7,   9,  6,  6,  6, 1, ACT_AUTO_EXP,  10, -1, "e auto from experience");
    check_event(8,   6,  4,  4,  4, 1, ACT_AUTO_BNF,  10, -1, "f auto from BNF");
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (!scen_done || rom_addr != 4'd8) begin
      failures++;
      $display("controller did not halt after the last scenario");
    end

    // sensor events: D = 20 m, v = 10 m/s -> N 32, B 21
    @(negedge clk);
    sensor_event = {1'b1, REL_CLOSING, 6'd20, 5'd10, 6'd5};
    use_sensors  = 1'b1;
    last_done    = cycle;
    check_event(-1, 32, 21, 21, 4, 0, ACT_ABANDON, 0, 21, "sensor abandon");
    sensor_event = {1'b1, REL_CLOSING, 6'd20, 5'd10, 6'd0};
    check_event(-1, 32, 21, 21, 21, 1, ACT_AUTO_EXP, 10, -1, "sensor recall");
    sensor_event = {1'b1, REL_LEAVING, 6'd20, 5'd10, 6'd30};
    check_event(-1, 32, 21, 30, 21, 0, ACT_LEARN, 10, 30, "sensor learn");
    sensor_event = {1'b1, REL_CLOSING, 6'd20, 5'd10, 6'd0};
    check_event(-1, 32, 21, 30, 30, 1, ACT_AUTO_EXP, 10, -1, "sensor recall learnt");
    sensor_event = {1'b0, REL_STOP, 6'd20, 5'd10, 6'd0};
    check_event(-1, 100, 63, 63, 63, 0, ACT_FULL_BRAKE, 3, -1, "sensor full brake");
    sensor_event = {1'b1, REL_CLOSING, 6'd0, 5'd3, 6'd0};
    check_event(-1, 100, 63, 63, 63, 1, ACT_AUTO_BNF, 10, -1, "zero distance");
    sensor_event = {1'b1, REL_CLOSING, 6'd20, 5'd10, 6'd0};
    auto_nav_en  = 1'b0;
    check_event(-1, 32, 21, 21, 63, 0, ACT_ABANDON, 10, 21, "auto navigation off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
