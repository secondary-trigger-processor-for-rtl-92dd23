// mk2_data_sr: recirculating data shift register for one detector layer.
//
// The LEN hit bits of a layer sit in a circular loop; element e is at
// azimuth 2*pi*e/LEN. Each shift pulse (the layer's burped clock) moves the
// loop one place, so after s shifts the pickoff output dout shows element
// (s mod LEN). A parallel load takes a new event's hits (element e from
// din[e]). For tests, test_sel replaces the recirculated bit by test_bit on
// a shift, so LEN shifts write a whole pattern serially, element 0 first;
// shifting without test_sel then reads it back through dout. Load has
// priority over shift. dout is the register bit itself (no added latency).
// The recirculating loop, the shift-by-burped-clock and test insertion follow
// the published system; the load port is this design's interface to the
// detector readout.
module mk2_data_sr #(
  parameter int unsigned LEN = 252
) (
  input  logic           clk,
  input  logic           load,      // parallel load of din
  input  logic [LEN-1:0] din,
  input  logic           shift,     // burped clock enable
  input  logic           test_sel,  // insert test_bit instead of recirculating
  input  logic           test_bit,
  output logic           dout       // element at the pickoff position
);

  logic [LEN-1:0] sr;

  always_ff @(posedge clk) begin
    if (load)       sr <= din;
    else if (shift) sr <= {(test_sel ? test_bit : sr[0]), sr[LEN-1:1]};
  end

  assign dout = sr[0];

endmodule
