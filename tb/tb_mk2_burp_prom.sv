// tb_mk2_burp_prom: checks the burped-clock ROM.
// For every layer it checks that the layer gets exactly N pulses per 252
// steps and that the pulses are spread evenly: after s steps the running
// count differs from s*N/252 by less than one (computed in real numbers).
// It also checks the two patterns quoted for the detector: a 216-element
// layer shifts on 6 of every 7 clocks and a 144-element layer on 4 of 7.
module tb_mk2_burp_prom;
  import mk2_pkg::*;

  logic [7:0]      step;
  logic [N_CH-1:0] burp;
  int checks = 0, failures = 0;

  mk2_burp_prom dut (.step, .burp);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cnt [N_CH];
    int win [N_CH];
    real ideal;
    foreach (cnt[c]) begin cnt[c] = 0; win[c] = 0; end
    for (int s = 0; s < int'(STEPS); s++) begin
      step = 8'(s);
      #1;
      for (int c = 0; c < int'(N_CH); c++) begin
        cnt[c] += int'(burp[c]);
        win[c] += int'(burp[c]);
        ideal = real'(s + 1) * real'(LAYER_LEN_DEF[c]) / real'(STEPS);
        check((real'(cnt[c]) - ideal < 1.0) && (ideal - real'(cnt[c]) < 1.0),
              $sformatf("layer %0d uneven at step %0d (count %0d, ideal %f)", c, s, cnt[c], ideal));
        if ((s + 1) % 7 == 0) begin
          if (LAYER_LEN_DEF[c] == 216) check(win[c] == 6, $sformatf("216-layer %0d pulses in 7", win[c]));
          if (LAYER_LEN_DEF[c] == 144) check(win[c] == 4, $sformatf("144-layer %0d pulses in 7", win[c]));
          if (LAYER_LEN_DEF[c] == 252) check(win[c] == 7, $sformatf("252-layer %0d pulses in 7", win[c]));
          win[c] = 0;
        end
      end
    end
    for (int c = 0; c < int'(N_CH); c++)
      check(cnt[c] == int'(LAYER_LEN_DEF[c]), $sformatf("layer %0d: %0d pulses per revolution", c, cnt[c]));
    step = 8'd252;
    #1 check(burp == '0, "no pulses outside the revolution");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
