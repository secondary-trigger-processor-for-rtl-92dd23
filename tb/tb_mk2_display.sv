// tb_mk2_display: checks the raw-data display driver.
// A random 252 x 12 picture is captured (with a few capture gaps), then
// two full frames of points are compared with coordinates computed here in
// real arithmetic: x = 128 + floor(R*round(127 cos a)/128), the same for y
// with sin, R = 10 + 10*channel, a = 2*pi*step/252, z = the captured bit.
module tb_mk2_display;
  localparam int NCH = 12, NST = 252;
  logic clk = 0, rst_n = 0;
  logic clr, capture;
  logic [NCH-1:0] data;
  logic [7:0] x, y;
  logic z;
  int checks = 0, failures = 0;

  mk2_display dut (.clk, .rst_n, .clr, .capture, .data, .x, .y, .z);

  always #50 clk = ~clk;

  function automatic int coord(int p, int c, bit sine);
    real a, v;
    int q;
    a = 2.0 * 3.14159265358979 * real'(p) / real'(NST);
    v = 127.0 * (sine ? $sin(a) : $cos(a));
    q = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    return 128 + int'($floor(real'((10 + 10 * c) * q) / 128.0));
  endfunction

  initial begin
    logic [NCH-1:0] pic [NST];
    int p, c, ones;
    clr = 0; capture = 0; data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    clr = 1; @(posedge clk); #1 clr = 0;
    p = 0;
    while (p < NST) begin
      capture = ($urandom % 5 != 0);
      data = NCH'($urandom);
      if (capture) begin pic[p] = data; p++; end
      @(posedge clk); #1;
    end
    capture = 0;
    // find the frame position: wait for the counter to wrap to point (0,0)
    while (!(dut.p == 8'd0 && dut.c == 4'd0)) begin @(posedge clk); #1; end
    ones = 0;
    for (int n = 0; n < 2 * NCH * NST; n++) begin
      p = n % NST; c = (n / NST) % NCH;
      @(posedge clk); #1;
      checks++;
      if (int'(x) != coord(p, c, 0) || int'(y) != coord(p, c, 1) || z != pic[p][c]) begin
        failures++;
        if (failures < 10)
          $display("FAIL: point (%0d,%0d): x %0d/%0d y %0d/%0d z %b/%b", p, c,
                   x, coord(p, c, 0), y, coord(p, c, 1), z, pic[p][c]);
      end
      ones += int'(z);
    end
    checks++;
    if (ones == 0) begin failures++; $display("FAIL: nothing drawn"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
