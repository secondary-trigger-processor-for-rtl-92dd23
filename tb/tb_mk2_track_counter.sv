// tb_mk2_track_counter: checks one track counter against a list model.
// Each scan drives 252 gate clocks of curvature module outputs (bursts of
// a few modules over a few clocks, standing for one track seen by
// overlapping roads), with random activity outside the gate that must be
// ignored. The model splits the gate into anti-chatter intervals, builds the
// expected track words (fired modules, opening clock, flags), closes an
// interval left open at the end, detects Condition A (a track across the
// start/end boundary) and looks up the expected group in the trigger logic
// table, which is random. Scans cover interval lengths 1, 4, 9 and 16, an
// empty event, a boundary track, and an overflow of the 63-track counter.
module tb_mk2_track_counter;
  import mk2_pkg::*;

  logic clk = 0, rst_n = 0;
  camac_cmd_t cmd;
  camac_rsp_t rsp;
  logic sys_reset, gate, gate_first, scan_end, done;
  logic [31:0] trk;
  logic [1:0] group;
  logic [1:0] table_q [64];
  int checks = 0, failures = 0;
  int n_conda = 0, n_unterm = 0, n_ovf = 0, n_merge = 0;

  mk2_track_counter #(.STATION(7'd5)) dut (.clk, .rst_n, .cmd, .rsp, .sys_reset,
    .gate, .gate_first, .scan_end, .trk, .group, .done);

  always #50 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cam(input logic [3:0] a, input logic [4:0] f, input logic [23:0] w,
                     output logic [23:0] r);
    cmd = '{strobe: 1'b1, n: 7'd5, a: a, f: f, w: w};
    #1 r = rsp.r;
    check(rsp.x && rsp.q, "command accepted");
    @(posedge clk); #1 cmd.strobe = 1'b0;
  endtask

  task automatic run_scan(input int len, input int kind);
    logic [31:0] v [252];
    logic [43:0] words [$];
    logic [31:0] fired;
    logic [23:0] r;
    int start, endg, nwords, cnt, exp_grp, p;
    bit active, first, first_seen, cond_a, ovf;
    logic [43:0] got;
    cam(4'd0, F_WRITE, 24'(len - 1), r);
    // build the stimulus
    foreach (v[g]) v[g] = '0;
    if (kind == 1) begin                       // overflow: a hit every other clock
      for (int g = 0; g < 252; g += 2) v[g] = 32'(1) << (g % 32);
    end else if (kind == 0) begin              // bursts
      p = $urandom_range(0, 6);
      while (p < 252) begin
        for (int j = 0; j < 3; j++)
          if (p + j < 252) v[p + j] |= 32'(1) << $urandom_range(0, 23);
        p += $urandom_range(5, 40);
      end
    end else if (kind == 2) begin              // boundary track and one more
      v[0] = 32'h3; v[1] = 32'h4; v[120] = 32'h10; v[250] = 32'h1; v[251] = 32'h2;
    end
    // model
    words.delete(); active = 0; first_seen = 0;
    for (int g = 0; g < 252; g++) begin
      if (!active && v[g] != 0) begin
        active = 1; start = g; fired = '0; endg = g + len - 1; first = (g == 0);
        if (g == 0) first_seen = 1;
      end
      if (active) begin
        fired |= v[g];
        if (g == endg) begin
          words.push_back({2'b00, 1'b0, first, 8'(start), fired});
          if ($countones(fired) > 1) n_merge++;
          active = 0;
        end
      end
    end
    cond_a = active && first_seen;
    if (active) begin
      words.push_back({2'b00, 1'b1, first, 8'(start), fired});
      n_unterm++;
    end
    nwords = words.size();
    ovf = nwords > 63;
    cnt = ovf ? 63 : nwords;
    exp_grp = table_q[cnt - int'(cond_a)];
    if (cond_a) n_conda++;
    if (ovf) n_ovf++;
    // drive
    sys_reset = 1; @(posedge clk); #1 sys_reset = 0;
    for (int t = 0; t < 30; t++) begin trk = $urandom; @(posedge clk); #1; end
    for (int g = 0; g < 252; g++) begin
      gate = 1; gate_first = (g == 0); trk = v[g];
      @(posedge clk); #1;
    end
    gate = 0; gate_first = 0;
    for (int t = 0; t < 5; t++) begin trk = $urandom; @(posedge clk); #1; end
    trk = '0; scan_end = 1;
    @(posedge clk); #1 scan_end = 0;
    check(!done, "done not before the lookup");
    @(posedge clk); #1;
    check(done, "done one clock after the end-of-scan clock");
    check(group == 2'(exp_grp), $sformatf("group %0d expected %0d (count %0d condA %0d)", group, exp_grp, cnt, cond_a));
    @(posedge clk); #1;
    check(!done, "done is a pulse");
    cam(4'd3, F_READ, 24'd0, r);
    check(r[5:0] == 6'(cnt), $sformatf("MAR %0d expected %0d", r[5:0], cnt));
    check(r[6] == cond_a, "condition A flag");
    check(r[7] == ovf, "overflow flag");
    for (int i = 0; i < cnt; i++) begin
      cam(4'd4, F_WRITE, 24'(i), r);
      cam(4'd4, F_READ, 24'd0, r);
      got[23:0] = r;
      cam(4'd5, F_READ, 24'd0, r);
      got[43:24] = r[19:0];
      check(got == words[i], $sformatf("track word %0d: %h expected %h", i, got, words[i]));
    end
  endtask

  initial begin
    logic [23:0] r;
    cmd = '0; sys_reset = 0; gate = 0; gate_first = 0; scan_end = 0; trk = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cam(4'd1, F_WRITE, 24'd0, r);
    for (int i = 0; i < 64; i++) begin
      table_q[i] = 2'($urandom);
      cam(4'd2, F_WRITE, 24'(table_q[i]), r);
    end
    cam(4'd1, F_WRITE, 24'd17, r);
    cam(4'd2, F_READ, 24'd0, r);
    check(r[1:0] == table_q[17], "trigger logic memory read back");
    run_scan(4, 0);
    run_scan(4, 2);
    run_scan(1, 1);
    run_scan(16, 0);
    run_scan(9, 0);
    run_scan(1, 0);
    run_scan(4, 3);
    run_scan(16, 2);
    check(n_conda > 0 && n_unterm > 0 && n_ovf > 0 && n_merge > 0,
          $sformatf("mechanisms: condA %0d unterminated %0d overflow %0d merged %0d", n_conda, n_unterm, n_ovf, n_merge));
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
