// tb_mk2_vlsr: checks the variable length shift register for every delay
// 1..64. After a clear and len_m1+1 enabled clocks to flush the RAM, the
// output after each enabled clock must equal the input sampled len_m1+1
// enabled clocks earlier. Enable has random gaps.
module tb_mk2_vlsr;
  logic       clk = 0;
  logic       clr, en, din, dout;
  logic [5:0] len_m1;
  int checks = 0, failures = 0;

  mk2_vlsr #(.DEPTH(64)) dut (.clk, .clr, .en, .len_m1, .din, .dout);

  always #50 clk = ~clk;

  initial begin
    logic hist [$];
    int   d;
    clr = 1; en = 0; din = 0; len_m1 = 0;
    for (d = 1; d <= 64; d++) begin
      len_m1 = 6'(d - 1);
      clr = 1; @(posedge clk); #1 clr = 0;
      hist.delete();
      for (int t = 0; t < d + 150; t++) begin
        en  = 1'($urandom % 6 != 0);
        din = 1'($urandom);
        @(posedge clk); #1;
        if (en) begin
          hist.push_back(din);
          if (hist.size() > d) begin
            checks++;
            if (dout != hist[hist.size() - 1 - d]) begin
              failures++;
              $display("FAIL: delay %0d sample %0d", d, hist.size());
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
