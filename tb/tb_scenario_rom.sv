// tb_scenario_rom -- checks every word of the scenario ROM.
//
// The expected words are rebuilt here field by field from the scenario
// table (transmission, relation, distance, speed, driver brake); every
// other address must read zero. Also checks the one-cycle read latency.
module tb_scenario_rom;
  import bnf_pkg::*;

  logic   clk = 1'b0;
  logic [3:0] addr;
  event_t data;
  int checks = 0, failures = 0;

  scenario_rom dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  function automatic logic [19:0] expected(input int a);
    // {trans, relation, distance, speed, brake} as printed in the table
    case (a)
      1: return {1'b0, 2'b00, 6'b111110, 5'b00000, 6'b000000};
      2: return {1'b1, 2'b11, 6'b111110, 5'b00000, 6'b000000};
      3: return {1'b1, 2'b01, 6'b111110, 5'b00001, 6'b000010};
      4: return {1'b1, 2'b01, 6'b111110, 5'b00101, 6'b000011};
      5: return {1'b1, 2'b01, 6'b111110, 5'b01001, 6'b001000};
      6: return {1'b1, 2'b01, 6'b111110, 5'b01001, 6'b000010};
      7: return {1'b1, 2'b01, 6'b111110, 5'b01001, 6'b000000};
      8: return {1'b1, 2'b01, 6'b111110, 5'b00111, 6'b000000};
      default: return 20'd0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 4'd0;
    @(posedge clk);
    for (int a = 0; a < 16; a++) begin
      @(negedge clk) addr = 4'(a);
      @(posedge clk); #1;
      checks++;
      if (data !== expected(a)) begin
        failures++;
        $display("addr %0d: got %05h expected %05h", a, data, expected(a));
      end
    end
    // latency: a new address must not show before the clock edge
    @(negedge clk) addr = 4'd5;
    @(posedge clk); #1;
    @(negedge clk) addr = 4'd1;
    #2;
    checks++;
    if (data !== expected(5)) begin
      failures++;
      $display("data changed before the clock edge");
    end
    // field decoding of case (c): speed 9, driver brake 8, closing
    @(negedge clk) addr = 4'd5;
    @(posedge clk); #1;
    checks++;
    if (data.speed != 5'd9 || data.brake != 6'd8 || data.relation != REL_CLOSING ||
        data.distance != 6'd62 || data.trans != 1'b1) begin
      failures++;
      $display("field decode of address 5 wrong");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
