// tb_mk2_data_sr: checks the recirculating data shift register (144 elements).
// A random pattern is loaded and rotated for two revolutions with random
// gaps in the shift enable; dout must always show element (shifts mod LEN).
// Then a new pattern is written serially through the test input and read
// back by rotating again.
module tb_mk2_data_sr;
  localparam int unsigned LEN = 144;
  logic           clk = 0;
  logic           load, shift, test_sel, test_bit, dout;
  logic [LEN-1:0] din, pat;
  int checks = 0, failures = 0;

  mk2_data_sr #(.LEN(LEN)) dut (.clk, .load, .din, .shift, .test_sel, .test_bit, .dout);

  always #50 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n;
    load = 0; shift = 0; test_sel = 0; test_bit = 0;
    for (int i = 0; i < int'(LEN); i++) pat[i] = 1'($urandom);
    din = pat;
    @(posedge clk); #1 load = 1;
    @(posedge clk); #1 load = 0;
    n = 0;
    while (n < 2 * int'(LEN)) begin
      check(dout == pat[n % LEN], $sformatf("rotation: element %0d", n % LEN));
      shift = 1'($urandom % 4 != 0);
      @(posedge clk); #1;
      if (shift) n++;
    end
    shift = 0;
    // serial test insertion, element 0 first
    for (int i = 0; i < int'(LEN); i++) pat[i] = 1'($urandom);
    for (int i = 0; i < int'(LEN); i++) begin
      shift = 1; test_sel = 1; test_bit = pat[i];
      @(posedge clk); #1;
    end
    shift = 0; test_sel = 0;
    for (int i = 0; i < int'(LEN); i++) begin
      check(dout == pat[i], $sformatf("read back element %0d", i));
      shift = 1;
      @(posedge clk); #1;
    end
    shift = 0;
    @(posedge clk); #1;
    check(dout == pat[0], "hold without shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
