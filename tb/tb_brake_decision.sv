// tb_brake_decision -- checks the decision step against the flow chart.
//
// First the six trace cases (full brake at ignition, learning the driver's
// brake 8 over BNF 6, abandoning brake 2 for BNF 6, autonomous from
// experience 6, autonomous from BNF 4 without experience), the same
// situation with auto navigation disabled, then random
// events against an independent reference written as a priority list.
module tb_brake_decision;
  import bnf_pkg::*;

  event_t     ev;
  logic [5:0] bnf_brake, db_brake, opt, db_wdata;
  logic       db_valid, auto_drive, db_we, auto_nav_en;
  action_e    action;
  int checks = 0, failures = 0;
  int n_act [6];

  brake_decision dut (.auto_nav_en(auto_nav_en), .ev(ev), .bnf_brake(bnf_brake), .db_valid(db_valid),
    .db_brake(db_brake), .action(action), .opt(opt), .auto_drive(auto_drive),
    .db_we(db_we), .db_wdata(db_wdata));

  task automatic check(input action_e a, input int o, input bit au, input bit w, input int wd,
                       input string what);
    #1;
    checks++;
    if (action != a || opt != 6'(o) || auto_drive != au || db_we != w || (w && db_wdata != 6'(wd))) begin
      failures++;
      $display("%s: got act=%0d opt=%0d auto=%0d we=%0d wd=%0d, expected act=%0d opt=%0d auto=%0d we=%0d wd=%0d",
               what, action, opt, auto_drive, db_we, db_wdata, a, o, au, w, wd);
    end
    n_act[int'(action)]++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    auto_nav_en = 1'b1;
    // (a) transmission off
    ev = {1'b0, REL_STOP, 6'd62, 5'd0, 6'd0}; bnf_brake = 0; db_valid = 0; db_brake = 0;
    check(ACT_FULL_BRAKE, 63, 0, 0, 0, "case a");
    // (b) steady, nothing pressed, BNF 0: learns 0
    ev = {1'b1, REL_STEADY, 6'd62, 5'd0, 6'd0}; bnf_brake = 0;
    check(ACT_LEARN, 0, 0, 1, 0, "case b");
    // (c) driver 8 over BNF 6
    ev = {1'b1, REL_CLOSING, 6'd62, 5'd9, 6'd8}; bnf_brake = 6;
    check(ACT_LEARN, 8, 0, 1, 8, "case c");
    // (d) driver 2 under BNF 6
    ev = {1'b1, REL_CLOSING, 6'd62, 5'd9, 6'd2}; bnf_brake = 6;
    check(ACT_ABANDON, 6, 0, 1, 6, "case d");
    // (e) no driver brake, experience 6
    ev = {1'b1, REL_CLOSING, 6'd62, 5'd9, 6'd0}; bnf_brake = 6; db_valid = 1; db_brake = 6;
    check(ACT_AUTO_EXP, 6, 1, 0, 0, "case e");
    // (f) no driver brake, no experience, BNF 4
    ev = {1'b1, REL_CLOSING, 6'd62, 5'd7, 6'd0}; bnf_brake = 4; db_valid = 0; db_brake = 9;
    check(ACT_AUTO_BNF, 4, 1, 0, 0, "case f");
    // auto navigation disabled: the missing driver brake is unsafe
    auto_nav_en = 1'b0;
    check(ACT_ABANDON, 4, 0, 1, 4, "auto navigation off");

    for (int i = 0; i < 5000; i++) begin
      action_e ea; int eo; bit eau, ew; int ewd;
      ev = event_t'($urandom);
      if (i % 4 == 0) ev.brake = '0;
      if (i % 2 == 0) ev.relation = REL_CLOSING;
      if (i % 8 == 1) ev.trans = 1'b1;
      bnf_brake = 6'($urandom);
      db_valid  = 1'($urandom);
      db_brake  = 6'($urandom);
      auto_nav_en = ($urandom_range(7) != 0);
      // reference
      eau = 0; ew = 0; ewd = 0;
      if (ev.trans == 1'b0) begin ea = ACT_FULL_BRAKE; eo = 63; end
      else if (auto_nav_en && ev.relation == REL_CLOSING && ev.brake == 0) begin
        eau = 1;
        if (db_valid) begin ea = ACT_AUTO_EXP; eo = int'(db_brake); end
        else begin ea = ACT_AUTO_BNF; eo = int'(bnf_brake); end
      end else if (int'(ev.brake) < int'(bnf_brake)) begin
        ea = ACT_ABANDON; eo = int'(bnf_brake); ew = 1; ewd = int'(bnf_brake);
      end else begin
        ea = ACT_LEARN; eo = int'(ev.brake); ew = 1; ewd = int'(ev.brake);
      end
      check(ea, eo, eau, ew, ewd, $sformatf("random %0d", i));
    end
    for (int a = 1; a < 6; a++) begin
      checks++;
      if (n_act[a] == 0) begin
        failures++;
        $display("action %0d never taken", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
