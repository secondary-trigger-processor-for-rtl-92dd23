// tb_mk2_master_clock: checks the scan sequence of the Master Clock.
// For each primary trigger it counts, clock by clock, the reset, scan
// (gated clock) and gate lengths, the gate position in the scan, the
// gate_first and scan_end strobes, the busy time (about 34 us at 10 MHz)
// and the burped shift pulses each layer receives. A second trigger during
// busy must be ignored. The gate start is then moved through the command
// bus, which must move the gate and stretch the scan.
module tb_mk2_master_clock;
  import mk2_pkg::*;

  logic clk = 0, rst_n = 0;
  camac_cmd_t cmd;
  camac_rsp_t rsp;
  logic start, sys_reset, run, gate, gate_first, scan_end, busy;
  logic [N_CH-1:0] burp;
  int checks = 0, failures = 0;

  mk2_master_clock dut (.clk, .rst_n, .cmd, .rsp, .start, .sys_reset, .burp,
    .run, .gate, .gate_first, .scan_end, .busy);

  always #50 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cam(input logic [3:0] a, input logic [4:0] f, input logic [23:0] w,
                     output logic [23:0] r);
    cmd = '{strobe: 1'b1, n: ST_MASTER, a: a, f: f, w: w};
    #1 r = rsp.r;
    check(rsp.x && rsp.q, "command accepted");
    @(posedge clk); #1 cmd.strobe = 1'b0;
  endtask

  // Run one scan cycle and measure it.
  task automatic scan(input int gs, input bit retrigger);
    int n_reset = 0, n_run = 0, n_gate = 0, n_busy = 0, n_first = 0, n_end = 0;
    int gate_at = -1, first_at = -1, end_at = -1, t = 0;
    int pulses [N_CH];
    int exp_run, exp_pulses;
    foreach (pulses[c]) pulses[c] = 0;
    start = 1;
    @(posedge clk); #1 start = 0;
    while (busy) begin
      if (retrigger && t == 100) start = 1;
      if (retrigger && t == 101) start = 0;
      n_busy++;
      if (sys_reset) n_reset++;
      if (run) n_run++;
      if (gate) begin
        if (gate_at < 0) gate_at = n_run - 1;
        n_gate++;
        check(run, "gate only during the scan");
      end
      if (gate_first) begin n_first++; first_at = n_run - 1; end
      if (scan_end) begin n_end++; end_at = n_busy; end
      for (int c = 0; c < int'(N_CH); c++) pulses[c] += int'(burp[c]);
      @(posedge clk); #1;
      t++;
    end
    exp_run = (gs + 252 > 341) ? gs + 252 : 341;
    check(n_reset == 2, $sformatf("reset clocks %0d", n_reset));
    check(n_run == exp_run, $sformatf("scan clocks %0d, expected %0d", n_run, exp_run));
    check(n_gate == 252, $sformatf("gate clocks %0d", n_gate));
    check(gate_at == gs, $sformatf("gate opens at scan clock %0d, expected %0d", gate_at, gs));
    check(n_first == 1 && first_at == gs, "one gate_first at the gate start");
    check(n_end == 1 && end_at == 2 + exp_run + 1, $sformatf("scan_end at %0d", end_at));
    check(n_busy == exp_run + 5, $sformatf("busy clocks %0d", n_busy));
    if (gs == 89)
      check(n_busy * 100 >= 33000 && n_busy * 100 <= 35000, "busy about 34 us");
    for (int c = 0; c < int'(N_CH); c++) begin
      // whole revolutions plus the pulses of the partial one
      exp_pulses = (exp_run / 252) * int'(LAYER_LEN_DEF[c]) +
                   ((exp_run % 252) * int'(LAYER_LEN_DEF[c])) / 252;
      check(pulses[c] == exp_pulses, $sformatf("layer %0d: %0d pulses, expected %0d", c, pulses[c], exp_pulses));
    end
    repeat (3) begin
      @(posedge clk); #1;
      check(!busy, "no second cycle from a trigger during busy");
    end
  endtask

  initial begin
    logic [23:0] r;
    cmd = '0; start = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    cam(4'd0, F_READ, 24'd0, r);
    check(r == 24'd89, $sformatf("default gate start %0d", r));
    scan(89, 1'b0);
    scan(89, 1'b1);
    cam(4'd0, F_WRITE, 24'd100, r);
    cam(4'd0, F_READ, 24'd0, r);
    check(r == 24'd100, "gate start written");
    scan(100, 1'b0);
    cam(4'd0, F_WRITE, 24'd40, r);
    scan(40, 1'b0);
    cam(4'd1, F_READ, 24'd0, r);
    check(r[15:0] == 16'd4 && !r[16], $sformatf("status %h", r));
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
