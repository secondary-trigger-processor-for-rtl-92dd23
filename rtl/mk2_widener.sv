// mk2_widener: programmable track widener of one curvature module channel.
//
// A hit bit is stretched to cover `width` further clocks (0..15), which turns
// a single element into a road of width+1 clocks. A retriggerable down
// counter is loaded with `width` on every hit; the output is high while the
// input or the counter is nonzero. The output is registered: a hit sampled
// on clock t gives dout = 1 on clocks t+1 .. t+1+width. en is the gated
// clock enable; clr (system reset) empties the counter and the output. The
// 0-15 range follows the published module; the counter form is this
// design's choice.
module mk2_widener #(
  parameter int unsigned WW = 4
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          en,
  input  logic [WW-1:0] width,
  input  logic          din,
  output logic          dout
);

  logic [WW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (clr) begin
      cnt  <= '0;
      dout <= 1'b0;
    end else if (en) begin
      dout <= din | (cnt != '0);
      if (din)             cnt <= width;
      else if (cnt != '0)  cnt <= cnt - 1'b1;
    end
  end

endmodule
