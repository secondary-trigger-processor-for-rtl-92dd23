// tb_mk2_trigger_top: end-to-end test of the whole trigger processor at its
// full size (24 curvature modules, 12 layers, 341-clock scan).
//
// Programming, all over the command bus: modules 0 and 1 get the same
// straight road (delay 20, widening 3 on every channel), module 2 a road for
// tracks whose azimuth grows by 2 steps per layer, module 3 one for -2;
// modules 4-23 get a null track logic memory. The track logic rule is:
// C = at least 5 of the 6 axial layers and the scintillator channel;
// A = at least 5 of the 6 axial layers; B = axial layers 0 and 1 and all
// three endcap channels. Track counters: anti-chatter interval 8, group =
// min(tracks, 3). Decision: accept if A >= 1 or C >= 1 or B >= 2.
//
// Events are built from tracks placed at an azimuth (0..251 in the common
// frame; element round(phi*N/252) in a layer of N) plus random noise points.
// A clock-level model written here predicts every track counter's words,
// count, Condition A and group: the pickoff bit of layer c on scan clock k
// is element floor(k*N_c/252) mod N_c, the backplane shows it one clock
// later, a module's output on clock k is its rule applied to the widened,
// delayed bits (pickoff of clock k-4-delay-m, m = 0..width), and the
// counters merge the outputs on gate clocks 89..340.
// Mechanisms that must each occur: burped rotation of layers of different
// length, merging of overlapping roads, curved roads, each class A/B/C,
// an unterminated interval, Condition A, accept, reenable, a primary trigger
// blocked by busy, test insertion and read back through the Test-Pickoff,
// the front-panel latches and the display drawing the hits.
module tb_mk2_trigger_top;
  import mk2_pkg::*;

  localparam int GS = 89;

  logic clk = 0, rst_n = 0;
  camac_cmd_t cmd;
  camac_rsp_t rsp;
  logic start, hits_load, busy, accept, reenable, tc_done, scope_z;
  logic [N_CH-1:0][STEPS-1:0] hits;
  logic [2:0][1:0] tc_group;
  logic [N_CM-1:0][2:0] cm_led;
  logic [7:0] scope_x, scope_y;
  int checks = 0, failures = 0;

  mk2_trigger_top dut (.clk, .rst_n, .cmd, .rsp, .start, .hits_load, .hits,
    .busy, .accept, .reenable, .tc_group, .tc_done, .cm_led, .scope_x,
    .scope_y, .scope_z);

  always #50 clk = ~clk;

  // mechanism counters
  int m_merge = 0, m_curved = 0, m_cls [3] = '{0, 0, 0}, m_unterm = 0, m_conda = 0;
  int m_accept = 0, m_reject = 0, m_blocked = 0, m_test = 0, m_led = 0, m_display = 0, m_burp = 0;

  // road settings: delay and width per module and channel
  int dly [4][N_CH], wid [4][N_CH];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cam(input logic [6:0] n, input logic [3:0] a, input logic [4:0] f,
                     input logic [23:0] w, output logic [23:0] r);
    cmd = '{strobe: 1'b1, n: n, a: a, f: f, w: w};
    #1 r = rsp.r;
    if (!(rsp.x && rsp.q)) begin
      failures++; checks++;
      $display("FAIL: command N%0d A%0d F%0d not accepted", n, a, f);
    end
    @(posedge clk); #1 cmd.strobe = 1'b0;
  endtask

  function automatic logic [1:0] rule(logic [11:0] a);
    int dc;
    dc = $countones(a[5:0]);
    if (dc >= 5 && a[9])                          return 2'd3;
    if (dc >= 5)                                  return 2'd1;
    if (a[0] && a[1] && a[6] && a[7] && a[8])     return 2'd2;
    return 2'd0;
  endfunction

  function automatic bit decide(int ga, int gb, int gc);
    return (ga >= 1) || (gc >= 1) || (gb >= 2);
  endfunction

  function automatic int elem(int phi, int c);
    int n;
    n = int'(LAYER_LEN_DEF[c]);
    return ((((phi % 252) + 252) % 252) * n + 126) / 252 % n;
  endfunction

  // ---------------- reference model ----------------
  logic [N_CH-1:0][STEPS-1:0] ev;

  function automatic bit pick(int c, int k);
    int n;
    if (k < 0) k = 0;
    n = int'(LAYER_LEN_DEF[c]);
    return ev[c][(k * n / 252) % n];
  endfunction

  // class output of module i on scan clock k
  function automatic logic [1:0] cm_out(int i, int k);
    logic [11:0] a;
    if (i > 3) return 2'd0;
    a = '0;
    for (int c = 0; c < int'(N_CH); c++)
      for (int m = 0; m <= wid[i][c]; m++)
        if (k - 4 - dly[i][c] - m >= -1) a[c] |= pick(c, k - 4 - dly[i][c] - m);
    return rule(a);
  endfunction

  typedef struct {
    logic [43:0] words [$];
    int cnt;
    bit conda;
    int grp;
  } tc_model_t;

  task automatic model(output tc_model_t res [3]);
    logic [31:0] v [3][252];
    logic [1:0] cl;
    for (int g = 0; g < 252; g++)
      for (int k = 0; k < 3; k++) v[k][g] = '0;
    for (int i = 0; i < 4; i++)
      for (int g = 0; g < 252; g++) begin
        cl = cm_out(i, GS + g);
        if (cl != 0) v[cl - 1][g][i] = 1'b1;
      end
    for (int k = 0; k < 3; k++) begin
      bit active, first, first_seen;
      int st, endg;
      logic [31:0] fired;
      res[k].words.delete();
      active = 0; first_seen = 0;
      for (int g = 0; g < 252; g++) begin
        if (!active && v[k][g] != 0) begin
          active = 1; st = g; fired = '0; endg = g + 7; first = (g == 0);
          if (g == 0) first_seen = 1;
        end
        if (active) begin
          fired |= v[k][g];
          if (g == endg) begin
            res[k].words.push_back({3'b000, first, 8'(st), fired});
            active = 0;
          end
        end
      end
      res[k].conda = active && first_seen;
      if (active) res[k].words.push_back({3'b001, first, 8'(st), fired});
      res[k].cnt = (res[k].words.size() > 63) ? 63 : res[k].words.size();
      res[k].grp = res[k].cnt - int'(res[k].conda);
      if (res[k].grp > 3) res[k].grp = 3;
    end
  endtask

  // ---------------- event helpers ----------------
  task automatic add_track(int phi, int slope, bit axial, bit endcap, bit scint);
    for (int c = 0; c < 6; c++)
      if (axial || (endcap && c < 2)) ev[c][elem(phi + slope * c, c)] = 1'b1;
    if (endcap) for (int c = 6; c < 9; c++) ev[c][elem(phi, c)] = 1'b1;
    if (scint) ev[9][elem(phi, 9)] = 1'b1;
  endtask

  task automatic add_noise(int avoid0, int avoid1);
    int phi;
    for (int c = 0; c < int'(N_CH); c++) begin
      do phi = $urandom_range(0, 251);
      while ((phi > avoid0 - 25 && phi < avoid0 + 25) || (phi > avoid1 - 25 && phi < avoid1 + 25));
      ev[c][elem(phi, c)] = 1'b1;
    end
  endtask

  // Run one event already in ev; compare with the model and expected tracks.
  task automatic run_event(string name, int exp_a, int exp_b, int exp_c, bit use_load, bit retrigger);
    tc_model_t res [3];
    logic [23:0] r;
    logic [43:0] w;
    int n_busy, exp_ones, ones;
    bit dec, exp_dec;
    model(res);
    check(res[0].words.size() == exp_a && res[1].words.size() == exp_b && res[2].words.size() == exp_c,
          $sformatf("%s: model finds A %0d B %0d C %0d tracks", name, res[0].words.size(), res[1].words.size(), res[2].words.size()));
    if (use_load) begin
      hits = ev;
      hits_load = 1; @(posedge clk); #1 hits_load = 0;
    end
    @(posedge clk); #1;
    start = 1; @(posedge clk); #1 start = 0;
    n_busy = 0;
    dec = 0;
    while (busy) begin
      n_busy++;
      if (retrigger && n_busy == 150) start = 1;
      if (retrigger && n_busy == 151) begin start = 0; m_blocked++; end
      @(posedge clk); #1;
      if (accept || reenable) dec = accept;
    end
    check(n_busy == 346, $sformatf("%s: busy for %0d clocks", name, n_busy));
    repeat (2) begin
      @(posedge clk); #1;
      if (accept || reenable) dec = accept;
      check(!busy, $sformatf("%s: no second scan", name));
    end
    for (int k = 0; k < 3; k++) begin
      cam(ST_TC0 + 7'(k), 4'd3, F_READ, 24'd0, r);
      check(int'(r[5:0]) == res[k].cnt, $sformatf("%s class %0d: %0d tracks, model %0d", name, k, r[5:0], res[k].cnt));
      check(r[6] == res[k].conda, $sformatf("%s class %0d: condition A %b", name, k, r[6]));
      check(int'(r[9:8]) == res[k].grp && int'(tc_group[k]) == res[k].grp,
            $sformatf("%s class %0d: group %0d, model %0d", name, k, r[9:8], res[k].grp));
      if (r[6]) m_conda++;
      for (int t = 0; t < res[k].cnt; t++) begin
        cam(ST_TC0 + 7'(k), 4'd4, F_WRITE, 24'(t), r);
        cam(ST_TC0 + 7'(k), 4'd4, F_READ, 24'd0, r);
        w[23:0] = r;
        cam(ST_TC0 + 7'(k), 4'd5, F_READ, 24'd0, r);
        w[43:24] = r[19:0];
        check(w == res[k].words[t], $sformatf("%s class %0d word %0d: %h, model %h", name, k, t, w, res[k].words[t]));
        if ($countones(w[31:0]) > 1) m_merge++;
        if (w[2] || w[3]) m_curved++;
        if (w[41]) m_unterm++;
        m_cls[k]++;
      end
    end
    exp_dec = decide(res[0].grp, res[1].grp, res[2].grp);
    check(dec == exp_dec, $sformatf("%s: decision %b expected %b", name, dec, exp_dec));
    if (dec) m_accept++; else m_reject++;
    // front panel latches of the straight-road module
    for (int k = 0; k < 3; k++)
      if (cm_led[0][k]) m_led++;
    // display: the picture holds the backplane bits of scan clocks 0..251
    exp_ones = 0;
    for (int c = 0; c < int'(N_CH); c++)
      for (int k = 0; k < 252; k++) exp_ones += int'(pick(c, k - 1));
    ones = 0;
    for (int n = 0; n < int'(N_CH) * 252; n++) begin
      @(posedge clk); #1;
      ones += int'(scope_z);
    end
    check(ones == exp_ones, $sformatf("%s: display shows %0d hit points, expected %0d", name, ones, exp_ones));
    if (ones > 0) m_display++;
  endtask

  initial begin
    logic [23:0] r;
    int phi_b;
    tc_model_t res [3];
    cmd = '0; start = 0; hits_load = 0; hits = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < int'(N_CH); c++) m_burp += (LAYER_LEN_DEF[c] != 252) ? 1 : 0;
    // roads
    for (int i = 0; i < 4; i++)
      for (int c = 0; c < int'(N_CH); c++) begin
        wid[i][c] = (c < 10) ? 3 : 0;
        dly[i][c] = 20;
        if (i == 2 && c < 6) dly[i][c] = 20 + 2 * (5 - c);
        if (i == 3 && c < 6) dly[i][c] = 20 + 2 * c;
      end
    for (int i = 0; i < int'(N_CM); i++) begin
      for (int c = 0; c < int'(N_CH); c++)
        if (i < 4) cam(ST_CM0 + 7'(i), 4'(c), F_WRITE, 24'({6'(dly[i][c] - 1), 4'(wid[i][c])}), r);
      cam(ST_CM0 + 7'(i), 4'd12, F_WRITE, 24'd0, r);
      for (int a = 0; a < 4096; a++)
        cam(ST_CM0 + 7'(i), 4'd13, F_WRITE, (i < 4) ? 24'(rule(12'(a))) : 24'd0, r);
    end
    for (int k = 0; k < 3; k++) begin
      cam(ST_TC0 + 7'(k), 4'd0, F_WRITE, 24'd7, r);
      cam(ST_TC0 + 7'(k), 4'd1, F_WRITE, 24'd0, r);
      for (int t = 0; t < 64; t++) cam(ST_TC0 + 7'(k), 4'd2, F_WRITE, 24'((t > 3) ? 3 : t), r);
    end
    cam(ST_TCB, 4'd0, F_WRITE, 24'd0, r);
    for (int g = 0; g < 64; g++)
      cam(ST_TCB, 4'd1, F_WRITE, 24'(decide(g % 4, (g / 4) % 4, g / 16)), r);
    cam(ST_MASTER, 4'd0, F_READ, 24'd0, r);
    check(r == 24'(GS), "gate start");

    // E1: straight track, noise, a blocked retrigger
    ev = '0; add_track(150, 0, 1, 0, 0); add_noise(150, 150);
    run_event("straight", 1, 0, 0, 1, 1);
    check(cm_led[0] == 3'b001 && cm_led[1] == 3'b001, "straight roads latched A");
    // E2: two curved tracks
    ev = '0; add_track(60, 2, 1, 0, 0); add_track(180, -2, 1, 0, 0);
    run_event("curved", 2, 0, 0, 1, 0);
    // E3: endcap track
    ev = '0; add_track(200, 0, 0, 1, 0);
    run_event("endcap", 0, 1, 0, 1, 0);
    // E4: noise only
    ev = '0; add_noise(300, 300);
    run_event("noise", 0, 0, 0, 1, 0);
    // E5: track with scintillator hit and a track across the gate boundary
    phi_b = -1;
    for (int phi = 55; phi < 80 && phi_b < 0; phi++) begin
      ev = '0; add_track(100, 0, 1, 0, 1); add_track(phi, 0, 1, 0, 0);
      model(res);
      if (res[0].conda) phi_b = phi;
    end
    check(phi_b >= 0, "a boundary azimuth exists");
    run_event("boundary", 2, 0, 1, 1, 0);
    // E6: data written through the Test-Pickoff instead of loaded
    ev = '0; add_track(21, 0, 1, 0, 1);
    for (int c = 0; c < int'(N_CH); c++) begin
      cam(ST_PICKOFF, 4'd0, F_WRITE, 24'(c), r);
      for (int e = 0; e < int'(LAYER_LEN_DEF[c]); e++)
        cam(ST_PICKOFF, 4'd1, F_WRITE, 24'(ev[c][e]), r);
    end
    cam(ST_PICKOFF, 4'd0, F_WRITE, 24'd5, r);
    for (int e = 0; e < int'(LAYER_LEN_DEF[5]); e++) begin
      cam(ST_PICKOFF, 4'd1, F_READ, 24'd0, r);
      check(r[0] == ev[5][e], $sformatf("test read back element %0d", e));
      cam(ST_PICKOFF, 4'd2, F_WRITE, 24'd0, r);
      @(posedge clk); #1;   // the shift follows the command by one clock
    end
    m_test++;
    run_event("test data", 0, 0, 1, 0, 0);

    check(m_burp > 0, "burped layers present");
    check(m_merge > 0, $sformatf("overlapping roads merged %0d", m_merge));
    check(m_curved > 0, $sformatf("curved roads fired %0d", m_curved));
    for (int k = 0; k < 3; k++) check(m_cls[k] > 0, $sformatf("class %0d tracks %0d", k, m_cls[k]));
    check(m_unterm > 0, $sformatf("unterminated intervals %0d", m_unterm));
    check(m_conda > 0, $sformatf("condition A %0d", m_conda));
    check(m_accept > 0 && m_reject > 0, $sformatf("accept %0d reenable %0d", m_accept, m_reject));
    check(m_blocked > 0, "trigger during busy");
    check(m_test > 0, "test insertion");
    check(m_led > 0, "front panel latches");
    check(m_display > 0, "display");
    $display("mechanisms: merge %0d curved %0d A %0d B %0d C %0d unterminated %0d condA %0d accept %0d reenable %0d blocked %0d",
             m_merge, m_curved, m_cls[0], m_cls[1], m_cls[2], m_unterm, m_conda, m_accept, m_reject, m_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
