// tb_mk2_curvature_module: checks one curvature module against a model.
// The 12 channels get random widths and delays and the track logic memory
// a rule computed here: C if at least 5 of channels 0-5 and channel 9 are
// set, A if at least 5 of channels 0-5, B if channels 0, 1, 6, 7, 8 are
// all set, null otherwise. Random sparse data plus injected coincident
// "tracks" drive the module; each clock the model widens and delays every
// channel from its own history (hit sampled at clock t is visible on trk at
// clocks t+2+delay .. t+2+delay+width) and classifies the result. Also
// checked: register and memory read back, the gate-qualified output latch,
// its clear, and the hold of all state while run is low.
module tb_mk2_curvature_module;
  import mk2_pkg::*;

  logic clk = 0, rst_n = 0;
  camac_cmd_t cmd;
  camac_rsp_t rsp;
  logic sys_reset, run, gate;
  logic [N_CH-1:0] data;
  logic [2:0] trk, led;
  int checks = 0, failures = 0;
  int wid [N_CH], dly [N_CH];
  int seen [4];

  mk2_curvature_module #(.STATION(7'd9)) dut (.clk, .rst_n, .cmd, .rsp,
    .sys_reset, .run, .gate, .data, .trk, .led);

  always #50 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cam(input logic [3:0] a, input logic [4:0] f, input logic [23:0] w,
                     output logic [23:0] r);
    cmd = '{strobe: 1'b1, n: 7'd9, a: a, f: f, w: w};
    #1 r = rsp.r;
    check(rsp.x && rsp.q, "command accepted");
    @(posedge clk); #1 cmd.strobe = 1'b0;
  endtask

  function automatic logic [1:0] rule(logic [11:0] a);
    int dc;
    dc = $countones(a[5:0]);
    if (dc >= 5 && a[9])                  return 2'd3;
    if (dc >= 5)                          return 2'd1;
    if (a[0] && a[1] && a[6] && a[7] && a[8]) return 2'd2;
    return 2'd0;
  endfunction

  initial begin
    logic [23:0] r;
    logic [N_CH-1:0] hist [$];
    logic [N_CH-1:0] addr;
    logic [2:0] exp_trk, exp_led;
    int k;
    cmd = '0; sys_reset = 0; run = 0; gate = 0; data = '0;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < int'(N_CH); c++) begin
      wid[c] = $urandom_range(0, 15);
      dly[c] = $urandom_range(1, 64);
      cam(4'(c), F_WRITE, 24'({6'(dly[c] - 1), 4'(wid[c])}), r);
    end
    for (int c = 0; c < int'(N_CH); c++) begin
      cam(4'(c), F_READ, 24'd0, r);
      check(r[9:0] == {6'(dly[c] - 1), 4'(wid[c])}, "channel setting read back");
    end
    cam(4'd12, F_WRITE, 24'd0, r);
    for (int a = 0; a < 4096; a++) cam(4'd13, F_WRITE, 24'(rule(12'(a))), r);
    for (int i = 0; i < 20; i++) begin
      k = $urandom_range(0, 4095);
      cam(4'd12, F_WRITE, 24'(k), r);
      cam(4'd13, F_READ, 24'd0, r);
      check(r[1:0] == rule(12'(k)), "track logic memory read back");
    end
    // one scan
    sys_reset = 1; @(posedge clk); #1 sys_reset = 0;
    exp_led = '0;
    hist.delete();
    for (int t = 0; t < 3000; t++) begin
      run  = (t % 97) != 50;            // a few clocks with the clock gated off
      gate = (t > 200) && (t < 2800);
      data = '0;
      for (int c = 0; c < int'(N_CH); c++) data[c] = ($urandom % 40 == 0);
      if (t % 150 == 10) begin          // a track aligned for this road
        k = $urandom_range(0, 3);
        for (int c = 0; c < int'(N_CH); c++) data[c] = 1'b0;
      end
      // schedule aligned hits: channel c hit at t0 - dly[c]
      for (int c = 0; c < int'(N_CH); c++)
        if ((t + dly[c]) % 150 == 100) data[c] = (k == 0) ? (c < 6 || c == 9) :
                                                 (k == 1) ? (c < 5) :
                                                 (k == 2) ? (c == 0 || c == 1 || c == 6 || c == 7 || c == 8) :
                                                            (c < 4);
      @(posedge clk); #1;
      if (run) begin
        hist.push_back(data);
        addr = '0;
        for (int c = 0; c < int'(N_CH); c++)
          for (int j = 0; j <= wid[c]; j++) begin
            int idx;
            idx = hist.size() - 1 - (dly[c] + 2) - j;
            if (idx >= 0) addr[c] |= hist[idx][c];
          end
        exp_trk = '0;
        if (hist.size() > 2 + 64 + 15) begin
          unique case (rule(addr))
            2'd1: exp_trk = 3'b001;
            2'd2: exp_trk = 3'b010;
            2'd3: exp_trk = 3'b100;
            default: ;
          endcase
          checks++;
          if (trk != exp_trk) begin
            failures++;
            if (failures < 10) $display("FAIL: t %0d trk %b expected %b", t, trk, exp_trk);
          end
          seen[rule(addr)]++;
        end
      end
      if (gate) exp_led |= trk;
    end
    run = 0; gate = 0;
    @(posedge clk); #1;
    cam(4'd14, F_READ, 24'd0, r);
    check(r[2:0] == exp_led && led == exp_led, $sformatf("output latch %b expected %b", r[2:0], exp_led));
    for (int i = 1; i < 4; i++) check(seen[i] > 0, $sformatf("class %0d produced", i));
    cam(4'd0, F_CLEAR, 24'd0, r);
    check(led == 3'b000, "latch cleared");
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
