// tb_auto_calibration -- replays the four calibration traces.
//
// (a) N rises 5 -> 7 -> 9 with brake positions 5 and 6: the calibrated
//     brake goes 0 -> 5 -> 11 and nout1/nout2 follow 5/4, 7/5, 9/7.
// (b) N steady at 12 with brake 8: aa = bb = 8, calibrated brake 16 held.
// (c) N falls from 12 to 8: 16 is kept.
// (d) the cars stop closing: everything released to 0.
// Then: no update without tick, alternation of aa/bb over a longer rise,
// saturation of the calibrated brake at 63, and a random run against a
// reference model.
module tb_auto_calibration;
  import bnf_pkg::*;

  logic       clk = 1'b0, rst, tick;
  logic [6:0] nf, nout1, nout2;
  logic [5:0] bpos, aa, bb, brake_calibration;
  logic [6:0] nadd;
  relation_e  relation;
  int checks = 0, failures = 0;

  auto_calibration dut (.clk(clk), .rst(rst), .tick(tick), .nf(nf), .bpos(bpos),
    .relation(relation), .nout1(nout1), .nout2(nout2), .aa(aa), .bb(bb),
    .nadd(nadd), .brake_calibration(brake_calibration));

  always #5 clk = ~clk;

  task automatic sample(input int n, input int b, input relation_e r);
    @(negedge clk);
    nf = 7'(n); bpos = 6'(b); relation = r; tick = 1'b1;
    @(negedge clk);
    tick = 1'b0;
  endtask

  task automatic expect_state(input int n1, input int n2, input int a, input int b2,
                              input int sum, input string what);
    int sat;
    sat = (sum > 63) ? 63 : sum;
    checks++;
    if (nout1 != 7'(n1) || nout2 != 7'(n2) || aa != 6'(a) || bb != 6'(b2) ||
        nadd != 7'(sum) || brake_calibration != 6'(sat)) begin
      failures++;
      $display("%s: got nout1=%0d nout2=%0d aa=%0d bb=%0d nadd=%0d cal=%0d", what,
               nout1, nout2, aa, bb, nadd, brake_calibration);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_n1, m_n2, m_a, m_b;
    bit m_sel;
    rst = 1'b1; tick = 1'b0; nf = '0; bpos = '0; relation = REL_STOP;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    expect_state(0, 0, 0, 0, 0, "reset");

    // (a) history 4, 5 recorded while not closing, then rising N
    sample(4, 2, REL_STEADY);
    sample(5, 3, REL_STEADY);
    expect_state(5, 4, 0, 0, 0, "a0");
    sample(7, 5, REL_CLOSING);
    expect_state(7, 5, 5, 0, 5, "a1");
    sample(9, 6, REL_CLOSING);
    expect_state(9, 7, 5, 6, 11, "a2");

    // (b) steady N = 12 at brake 8
    sample(0, 0, REL_STEADY);
    sample(10, 8, REL_CLOSING);
    sample(12, 8, REL_CLOSING);
    sample(12, 8, REL_CLOSING);
    expect_state(12, 12, 8, 8, 16, "b");

    // (c) N falls to 8 (brake 6): held
    sample(8, 6, REL_CLOSING);
    expect_state(8, 12, 8, 8, 16, "c1");
    sample(8, 6, REL_CLOSING);
    expect_state(8, 8, 8, 8, 16, "c2");

    // (d) cars no longer closing
    sample(0, 0, REL_STEADY);
    expect_state(0, 8, 0, 0, 0, "d1");
    sample(0, 0, REL_STEADY);
    expect_state(0, 0, 0, 0, 0, "d2");

    // no tick, no change
    @(negedge clk);
    nf = 7'd50; bpos = 6'd30; relation = REL_CLOSING;
    repeat (4) @(negedge clk);
    expect_state(0, 0, 0, 0, 0, "no tick");

    // longer rise: alternation aa, bb, aa, bb
    sample(3, 2, REL_CLOSING);  expect_state(3, 0, 2, 0, 2, "r1");
    sample(6, 4, REL_CLOSING);  expect_state(6, 3, 2, 4, 6, "r2");
    sample(9, 6, REL_CLOSING);  expect_state(9, 6, 6, 4, 10, "r3");
    sample(12, 8, REL_CLOSING); expect_state(12, 9, 6, 8, 14, "r4");
    // saturation
    sample(60, 40, REL_CLOSING); expect_state(60, 12, 40, 8, 48, "s1");
    sample(80, 50, REL_CLOSING); expect_state(80, 60, 40, 50, 90, "s2");
    // leaving also releases
    sample(80, 50, REL_LEAVING); expect_state(80, 80, 0, 0, 0, "leave");

    // random run against a reference
    m_n1 = 80; m_n2 = 80; m_a = 0; m_b = 0; m_sel = 0;
    for (int i = 0; i < 3000; i++) begin
      int n, b;
      relation_e r;
      n = $urandom_range(100);
      b = $urandom_range(63);
      r = relation_e'((i % 5 == 0) ? $urandom_range(3) : 1);
      sample(n, b, r);
      if (r != REL_CLOSING) begin m_a = 0; m_b = 0; m_sel = 0; end
      else if (n > m_n1) begin
        if (m_sel) m_b = b; else m_a = b;
        m_sel = !m_sel;
      end
      m_n2 = m_n1; m_n1 = n;
      expect_state(m_n1, m_n2, m_a, m_b, m_a + m_b, $sformatf("random %0d", i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
