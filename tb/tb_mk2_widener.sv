// tb_mk2_widener: checks the track widener for every width 0..15.
// Reference: after an enabled clock the output is the OR of the last
// width+1 enabled input samples. Random sparse input, random enable gaps.
module tb_mk2_widener;
  logic       clk = 0;
  logic       clr, en, din, dout;
  logic [3:0] width;
  int checks = 0, failures = 0;

  mk2_widener #(.WW(4)) dut (.clk, .clr, .en, .width, .din, .dout);

  always #50 clk = ~clk;

  initial begin
    logic hist [$];
    bit   exp_o;
    clr = 1; en = 0; din = 0; width = 0;
    @(posedge clk); #1 clr = 0;
    for (int w = 0; w < 16; w++) begin
      width = 4'(w);
      clr = 1; @(posedge clk); #1 clr = 0;
      checks++;
      if (dout != 1'b0) begin failures++; $display("FAIL: clear"); end
      hist.delete();
      for (int t = 0; t < 200; t++) begin
        en  = 1'($urandom % 5 != 0);
        din = 1'($urandom % 23 == 0);
        @(posedge clk); #1;
        if (en) begin
          hist.push_back(din);
          exp_o = 0;
          for (int j = 0; j <= w && j < hist.size(); j++) exp_o |= hist[hist.size() - 1 - j];
          checks++;
          if (dout != exp_o) begin
            failures++;
            $display("FAIL: width %0d t %0d dout %b exp %b", w, t, dout, exp_o);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
