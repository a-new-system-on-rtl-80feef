// experience_db -- the chip's database of the driver's braking experience.
//
// One entry per driving situation, addressed by {distance, speed}, holds a
// brake position and a valid flag. The controller writes the driver's brake
// when the driver brakes safely, or the BNF brake when the driver brakes
// too little, and reads the entry back in autonomous mode; an entry that
// was never written reports rvalid = 0, so the controller falls back to the
// BNF brake. That the chip keeps such a database in its RAM is the
// design's; its organisation (direct addressing by the event's distance and
// speed, a valid bit per word) is this implementation's choice. The default
// 2048 x 7 bits uses 14336 bits of RAM.
//
// Reset: a RAM block cannot be reset, so after rst the module sweeps every
// address writing an empty entry, holding ready low for 2^AW cycles.
// Writes and reads requested during the sweep are ignored.
//
// Interface: one write port (we, waddr, wdata) and one read port (raddr,
// rvalid, rdata). Timing: synchronous read, data one clock after raddr;
// a read of the address being written in the same cycle returns the old
// entry.
module experience_db #(
  parameter int unsigned AW = 11,
  parameter int unsigned DW = 6
) (
  input  logic          clk,
  input  logic          rst,
  output logic          ready,
  input  logic [AW-1:0] raddr,
  output logic          rvalid,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [DW:0]   mem [DEPTH];     // {valid, brake}
  logic [AW-1:0] clr_addr;
  logic          clearing;

  logic          wr_en;
  logic [AW-1:0] wr_addr;
  logic [DW:0]   wr_word;

  always_comb begin
    if (clearing) begin
      wr_en   = 1'b1;
      wr_addr = clr_addr;
      wr_word = '0;
    end else begin
      wr_en   = we;
      wr_addr = waddr;
      wr_word = {1'b1, wdata};
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_word;
    {rvalid, rdata} <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(DEPTH - 1)) clearing <= 1'b0;
    end
  end

  assign ready = ~clearing;

endmodule
