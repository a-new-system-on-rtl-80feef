// tb_bnf_unit -- exhaustive check of the nervous factor and BNF brake.
//
// For every distance (0..63 m) and speed (0..31 m/s) the expected values
// are found by searching for the smallest integer n with
// n * 2 g mu * D >= 100 * 100 * v^2 (g = 9.8, mu = 0.8, kept in hundredths),
// i.e. the round-up of 100 v^2 / (2 g mu D), and likewise for the brake with
// 63 in place of 100; both saturate. Also checks the trace points (62 m,
// 9 m/s) -> N 9, B 6 and (62 m, 7 m/s) -> N 6, B 4, the one-cycle latency
// and that the outputs hold while en is low.
module tb_bnf_unit;
  import bnf_pkg::*;

  logic       clk = 1'b0, rst, en;
  logic [5:0] distance;
  logic [4:0] speed;
  logic [6:0] nf;
  logic [5:0] bpos;
  int checks = 0, failures = 0;

  bnf_unit dut (.clk(clk), .rst(rst), .en(en), .distance(distance), .speed(speed),
                .nf(nf), .bpos(bpos));

  always #5 clk = ~clk;

  function automatic int ceil_search(input int scale, input int limit, input int d, input int v);
    longint target = longint'(100) * scale * v * v;
    if (v == 0) return 0;
    if (d == 0) return limit;
    for (int n = 0; n <= limit; n++)
      if (longint'(n) * 1568 * d >= target) return n;
    return limit;
  endfunction

  task automatic apply(input int d, input int v);
    @(negedge clk);
    distance = 6'(d);
    speed    = 5'(v);
    en       = 1'b1;
    @(negedge clk);
    en = 1'b0;
  endtask

  task automatic expect_out(input int n_exp, input int b_exp, input string what);
    checks++;
    if (nf != 7'(n_exp) || bpos != 6'(b_exp)) begin
      failures++;
      $display("%s: got N=%0d B=%0d expected N=%0d B=%0d", what, nf, bpos, n_exp, b_exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; distance = '0; speed = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    expect_out(0, 0, "after reset");

    apply(62, 9);  expect_out(9, 6, "62 m, 9 m/s");
    apply(62, 7);  expect_out(6, 4, "62 m, 7 m/s");
    apply(62, 0);  expect_out(0, 0, "62 m, 0 m/s");

    // latency: result present exactly one edge after en
    @(negedge clk);
    distance = 6'd10; speed = 5'd31; en = 1'b1;
    #1 expect_out(0, 0, "before the edge");
    @(negedge clk) en = 1'b0;
    expect_out(100, 63, "10 m, 31 m/s saturates");
    // hold while en is low
    distance = 6'd62; speed = 5'd1;
    repeat (3) @(negedge clk);
    expect_out(100, 63, "hold with en low");

    for (int d = 0; d < 64; d++)
      for (int v = 0; v < 32; v++) begin
        apply(d, v);
        expect_out(ceil_search(100, 100, d, v), ceil_search(63, 63, d, v),
                   $sformatf("D=%0d v=%0d", d, v));
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
