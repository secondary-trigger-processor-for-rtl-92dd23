// mk2_vlsr: variable length shift register (1..DEPTH clocks of delay).
//
// As in the published module it is a DEPTH x 1 RAM addressed by a counter
// whose period is the programmed delay (len_m1 + 1, set through write lines
// W5-W10). Each enabled clock the addressed cell is first read into the
// output latch and then rewritten with the new input bit; the same cell comes
// round again after len_m1+1 clocks, so a bit sampled on clock t appears on
// dout after clock t+len_m1+1, exactly like a shift register of that length.
// clr (system reset) restarts the counter and clears the latch. The RAM is
// not cleared: its first len_m1+1 outputs after a reset are stale data,
// which the track gate never looks at.
module mk2_vlsr #(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          en,
  input  logic [AW-1:0] len_m1,
  input  logic          din,
  output logic          dout
);

  logic          ram [DEPTH];
  logic [AW-1:0] addr;

  always_ff @(posedge clk) begin
    if (en) ram[addr] <= din;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      addr <= '0;
      dout <= 1'b0;
    end else if (en) begin
      dout <= ram[addr];
      addr <= (addr >= len_m1) ? '0 : addr + 1'b1;
    end
  end

endmodule
