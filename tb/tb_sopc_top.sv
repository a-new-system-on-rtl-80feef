// tb_sopc_top -- end-to-end test of the braking-control chip at its
// default size.
//
// Part 1 runs the eight ROM scenarios and checks each event's outputs
// against the values of the design's traces, plus the calibrated brake
// (released at ignition and steady distance, then 1, 3, 8 while N rises
// through 1, 3, 9, and 8 held while N stays or falls). Part 2 switches to
// sensor events: random situations over a few distances and speeds so that
// situations recur, each checked against a reference model kept here (the
// nervous factor and BNF brake by integer search, a shadow database, the
// decision rules, the held actuator output and the calibration history).
// Every mechanism must occur at least once: database clearing, full brake,
// learning, abandoning, autonomous braking from experience and from BNF,
// calibration rise, hold and release, the ROM-to-sensor mode switch, and
// a driverless closing event with auto navigation disabled.
module tb_sopc_top;
  import bnf_pkg::*;

  logic       sys_clock = 1'b0, sys_reset, use_sensors, auto_nav_enable;
  event_t     sensor_event;
  logic [3:0] eventget_rom_addr;
  logic [5:0] brake_out, brake_position, brake_out_opt, brake_muxout, brake_calibration, aa, bb;
  logic [4:0] speed_out;
  relation_e  relation_out;
  logic [6:0] nervous_factor_out, nadd, nout1, nout2;
  logic       auto_drive, event_done, scen_done;
  action_e    action;

  int checks = 0, failures = 0, cycle = 0;
  int n_act [6];
  int n_rise = 0, n_hold = 0, n_release = 0, n_switch = 0, n_clear = 0, n_nav_off = 0;

  // reference state
  logic [6:0] shadow [int];
  int m_mux, m_n1, m_n2, m_a, m_b;
  int addr_at_done;
  bit m_sel;

  sopc_top dut (
    .sys_clock(sys_clock), .sys_reset(sys_reset), .use_sensors(use_sensors), .auto_nav_enable(auto_nav_enable),
    .sensor_event(sensor_event), .eventget_rom_addr(eventget_rom_addr), .brake_out(brake_out),
    .speed_out(speed_out), .relation_out(relation_out), .nervous_factor_out(nervous_factor_out),
    .brake_position(brake_position), .brake_out_opt(brake_out_opt), .brake_muxout(brake_muxout),
    .auto_drive(auto_drive), .brake_calibration(brake_calibration), .nadd(nadd),
    .nout1(nout1), .nout2(nout2), .aa(aa), .bb(bb),
    .event_done(event_done), .scen_done(scen_done), .action(action));

  always #5 sys_clock = ~sys_clock;
  always @(posedge sys_clock) cycle <= cycle + 1;

  function automatic int ceil_search(input int scale, input int limit, input int d, input int v);
    longint target = longint'(100) * scale * v * v;
    if (v == 0) return 0;
    if (d == 0) return limit;
    for (int n = 0; n <= limit; n++)
      if (longint'(n) * 2 * 98 * 8 * d >= target) return n;
    return limit;
  endfunction

  task automatic wait_event();
    do begin
      @(posedge sys_clock);
      #1;
    end while (!event_done);
  endtask

  // Reference for one event; updates the shadow state and checks outputs.
  task automatic ref_event(input event_t e, input string what);
    int n, b, opt, cal;
    bit au;
    action_e act;
    int key;
    key = {e.distance, e.speed};
    if (!e.trans) begin
      n = 100; b = 63; opt = 63; au = 0; act = ACT_FULL_BRAKE; m_mux = 63;
    end else begin
      n = ceil_search(100, 100, e.distance, e.speed);
      b = ceil_search(63, 63, e.distance, e.speed);
      au = (auto_nav_enable && e.relation == REL_CLOSING && e.brake == 0);
      if (!auto_nav_enable && e.relation == REL_CLOSING && e.brake == 0) n_nav_off++;
      if (au) begin
        if (shadow.exists(key)) begin act = ACT_AUTO_EXP; opt = shadow[key]; end
        else begin act = ACT_AUTO_BNF; opt = b; end
        m_mux = opt;
      end else if (e.brake >= b) begin
        act = ACT_LEARN; opt = e.brake; shadow[key] = e.brake;
      end else begin
        act = ACT_ABANDON; opt = b; shadow[key] = 7'(b);
      end
    end
    // calibration history, sampled at the end of the event
    if (e.relation != REL_CLOSING) begin
      if (m_a != 0 || m_b != 0) n_release++;
      m_a = 0; m_b = 0; m_sel = 0;
    end else if (n > m_n1) begin
      n_rise++;
      if (m_sel) m_b = b; else m_a = b;
      m_sel = !m_sel;
    end else n_hold++;
    m_n2 = m_n1; m_n1 = n;
    cal = (m_a + m_b > 63) ? 63 : m_a + m_b;
    n_act[int'(act)]++;

    wait_event();
    addr_at_done = int'(eventget_rom_addr);
    @(posedge sys_clock); #1;   // calibration registers have sampled
    checks++;
    if (nervous_factor_out != 7'(n) || brake_position != 6'(b) || brake_out_opt != 6'(opt) ||
        brake_muxout != 6'(m_mux) || auto_drive != au || action != act ||
        brake_out != e.brake || speed_out != e.speed || relation_out != e.relation) begin
      failures++;
      $display("%s: got N=%0d B=%0d opt=%0d mux=%0d auto=%0d act=%0d; expected %0d %0d %0d %0d %0d %0d",
               what, nervous_factor_out, brake_position, brake_out_opt, brake_muxout, auto_drive,
               action, n, b, opt, m_mux, au, act);
    end
    checks++;
    if (nout1 != 7'(m_n1) || nout2 != 7'(m_n2) || aa != 6'(m_a) || bb != 6'(m_b) ||
        nadd != 7'(m_a + m_b) || brake_calibration != 6'(cal)) begin
      failures++;
      $display("%s: calibration got nadd=%0d cal=%0d aa=%0d bb=%0d expected %0d %0d %0d %0d",
               what, nadd, brake_calibration, aa, bb, m_a + m_b, cal, m_a, m_b);
    end
  endtask

  task automatic expect_trace(input int n, input int b, input int opt, input int mux, input bit au,
                              input int cal, input string what);
    checks++;
    if (nervous_factor_out != 7'(n) || brake_position != 6'(b) || brake_out_opt != 6'(opt) ||
        brake_muxout != 6'(mux) || auto_drive != au || brake_calibration != 6'(cal)) begin
      failures++;
      $display("%s: trace values differ", what);
    end
  endtask

  localparam event_t TABLE [8] = '{
    {1'b0, REL_STOP,    6'd62, 5'd0, 6'd0},
    {1'b1, REL_STEADY,  6'd62, 5'd0, 6'd0},
    {1'b1, REL_CLOSING, 6'd62, 5'd1, 6'd2},
    {1'b1, REL_CLOSING, 6'd62, 5'd5, 6'd3},
    {1'b1, REL_CLOSING, 6'd62, 5'd9, 6'd8},
    {1'b1, REL_CLOSING, 6'd62, 5'd9, 6'd2},
    {1'b1, REL_CLOSING, 6'd62, 5'd9, 6'd0},
    {1'b1, REL_CLOSING, 6'd62, 5'd7, 6'd0}
  };

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    sys_reset = 1'b1; use_sensors = 1'b0; sensor_event = '0; auto_nav_enable = 1'b1;
    m_mux = 0; m_n1 = 0; m_n2 = 0; m_a = 0; m_b = 0; m_sel = 0;
    repeat (3) @(posedge sys_clock);
    @(negedge sys_clock) sys_reset = 1'b0;
    t0 = cycle;
    while (!dut.u_db.ready) @(posedge sys_clock);
    if (cycle - t0 >= 2048) n_clear++;

    // Part 1: the ROM scenarios
    for (int i = 0; i < 8; i++) begin
      ref_event(TABLE[i], $sformatf("scenario %0d", i + 1));
      checks++;
      if (addr_at_done != i + 1) begin
        failures++;
        $display("scenario %0d read from address %0d", i + 1, addr_at_done);
      end
      case (i)
        0: expect_trace(100, 63, 63, 63, 0, 0, "trace a");
        1: expect_trace(0, 0, 0, 63, 0, 0, "trace b");
        2: expect_trace(1, 1, 2, 63, 0, 1, "row 3");
        3: expect_trace(3, 2, 3, 63, 0, 3, "row 4");
        4: expect_trace(9, 6, 8, 63, 0, 8, "trace c");
        5: expect_trace(9, 6, 6, 63, 0, 8, "trace d");
        6: expect_trace(9, 6, 6, 6, 1, 8, "trace e");
        7: expect_trace(6, 4, 4, 4, 1, 8, "trace f");
        default: ;
      endcase
    end
    repeat (4) @(posedge sys_clock);
    #1;
    checks++;
    if (!scen_done) begin failures++; $display("no halt after the ROM scenarios"); end

    // Part 2: sensor events
    @(negedge sys_clock);
    for (int i = 0; i < 600; i++) begin
      event_t e;
      int dsel;
      dsel = $urandom_range(3);
      e.trans    = ($urandom_range(19) != 0);
      e.relation = relation_e'(($urandom_range(3) == 0) ? $urandom_range(3) : 1);
      e.distance = (dsel == 0) ? 6'd8 : (dsel == 1) ? 6'd20 : (dsel == 2) ? 6'd62 : 6'($urandom);
      e.speed    = 5'($urandom_range(15));
      e.brake    = ($urandom_range(2) == 0) ? 6'd0 : 6'($urandom_range(40));
      sensor_event = e;
      auto_nav_enable = ($urandom_range(5) != 0);
      if (!use_sensors) begin
        use_sensors = 1'b1;
        n_switch++;
      end
      ref_event(e, $sformatf("sensor event %0d", i));
    end

    $display("mechanisms: nav_off=%0d clear=%0d full=%0d learn=%0d abandon=%0d auto_exp=%0d auto_bnf=%0d rise=%0d hold=%0d release=%0d switch=%0d",
             n_nav_off, n_clear, n_act[1], n_act[2], n_act[3], n_act[4], n_act[5], n_rise, n_hold, n_release, n_switch);
    for (int a = 1; a < 6; a++) begin
      checks++;
      if (n_act[a] == 0) begin failures++; $display("action %0d never happened", a); end
    end
    checks++;
    if (n_nav_off == 0 || n_clear == 0 || n_rise == 0 || n_hold == 0 || n_release == 0 || n_switch == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
