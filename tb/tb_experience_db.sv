// tb_experience_db -- checks the clearing sweep and the read/write ports.
//
// After reset, ready must stay low for exactly 2^AW cycles; afterwards
// every entry reads as empty. Random writes and reads are then compared
// with a shadow copy kept in the testbench, including the read-old-data
// rule for a read and a write of one address in the same cycle. A second
// reset must empty the database again.
module tb_experience_db;
  localparam int AW = 11;
  localparam int DW = 6;

  logic          clk = 1'b0, rst, ready, rvalid, we;
  logic [AW-1:0] raddr, waddr;
  logic [DW-1:0] rdata, wdata;
  int checks = 0, failures = 0;
  int unsigned busy_cycles;
  logic [DW:0]   shadow [1 << AW];

  experience_db dut (
    .clk(clk), .rst(rst), .ready(ready), .raddr(raddr), .rvalid(rvalid),
    .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  task automatic do_reset_and_clear();
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    busy_cycles = 0;
    while (!ready) begin
      @(negedge clk);
      busy_cycles++;
    end
    checks++;
    if (busy_cycles != (1 << AW)) begin
      failures++;
      $display("clearing took %0d cycles, expected %0d", busy_cycles, 1 << AW);
    end
    foreach (shadow[i]) shadow[i] = '0;
  endtask

  task automatic check_read(input logic [AW-1:0] a);
    @(negedge clk) raddr = a;
    @(negedge clk);
    checks++;
    if ({rvalid, rdata} != shadow[a]) begin
      failures++;
      $display("addr %0d: got %b expected %b", a, {rvalid, rdata}, shadow[a]);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0; we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    // fill with garbage first so that the sweep has something to clear
    @(negedge clk) rst = 1'b1;
    repeat (3) @(negedge clk);
    do_reset_and_clear();
    for (int a = 0; a < (1 << AW); a += 37) check_read(AW'(a));

    // random writes, each followed by a read of a random earlier address
    for (int i = 0; i < 600; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom_range((1 << AW) - 1));
      if (i % 3 == 0) a = AW'($urandom_range(15));  // revisit a few entries
      @(negedge clk);
      we = 1'b1; waddr = a; wdata = DW'($urandom);
      raddr = a;
      @(negedge clk);
      // read in the write cycle returned the old entry
      checks++;
      if ({rvalid, rdata} != shadow[a]) begin
        failures++;
        $display("read during write of %0d: got %b expected old %b", a, {rvalid, rdata}, shadow[a]);
      end
      shadow[a] = {1'b1, wdata};
      we = 1'b0;
      check_read(a);
      check_read(AW'($urandom_range((1 << AW) - 1)));
    end

    // writes while clearing are ignored; everything is empty afterwards
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    we = 1'b1; waddr = AW'(5); wdata = 6'd33;
    @(negedge clk) we = 1'b0;
    while (!ready) @(negedge clk);
    foreach (shadow[i]) shadow[i] = '0;
    for (int a = 0; a < 16; a++) check_read(AW'(a));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
