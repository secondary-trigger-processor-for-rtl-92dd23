// tb_mk2_workload_tracks: track-finding efficiency and noise workload.
//
// The full processor is set up as a track finder for the six axial drift
// chamber layers: 24 curvature modules whose roads span a range of
// curvatures, each requiring at least 5 of the 6 layers (class A), and a
// track counter whose group is the corrected track count (0..3).
// Geometry used here: layer c has N_c cells on a radius proportional to
// N_c, so a track from the beam line with curvature parameter S (its
// azimuth shift, in 252-step units, at the outermost layer) crosses layer c
// at azimuth phi0 + S*N_c/252. Road i is centred on S_i, spaced evenly over
// [-SMAX, SMAX], with delays D_c = D0 - round(S_i*(N_c/252 - NREF)) and
// widening W. Measuring the azimuth at a middle reference radius (NREF)
// makes every road that sees a track fire on about the same clock, so the
// overlapping roads merge into one track.
// Each event holds one such track at random phi0 and S, plus one random
// noise point per layer.
// Checked: every track is found and counted exactly once (group 1),
// including tracks across the gate boundary. Noise-only events with 1, 2,
// 4 and 8 random points per layer give the false-track rate as a function
// of noise; at one point per layer it must stay below 10 %.
module tb_mk2_workload_tracks;
  import mk2_pkg::*;

  localparam int N_TRACK = 300, N_NOISE = 60;
  localparam int SMAX = 30, D0 = 32, W = 4;
  localparam real NREF = 0.778;   // mean N_c/252 of the six axial layers

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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cam(input logic [6:0] n, input logic [3:0] a, input logic [4:0] f,
                     input logic [23:0] w, output logic [23:0] r);
    cmd = '{strobe: 1'b1, n: n, a: a, f: f, w: w};
    #1 r = rsp.r;
    @(posedge clk); #1 cmd.strobe = 1'b0;
  endtask

  function automatic int rnd(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int elem(real phi, int c);
    int n, e;
    n = int'(LAYER_LEN_DEF[c]);
    e = rnd(phi * real'(n) / 252.0);
    return ((e % n) + n) % n;
  endfunction

  task automatic run(output int grp, output int ntrk, output bit conda);
    logic [23:0] r;
    hits_load = 1; @(posedge clk); #1 hits_load = 0;
    start = 1; @(posedge clk); #1 start = 0;
    while (busy) begin @(posedge clk); #1; end
    cam(ST_TC0, 4'd3, F_READ, 24'd0, r);
    grp = int'(r[9:8]); ntrk = int'(r[5:0]); conda = r[6];
  endtask

  initial begin
    logic [23:0] r;
    int grp, ntrk, found, once, false_ev, boundary, n_in_range;
    bit conda;
    real phi0, s, si;
    cmd = '0; start = 0; hits_load = 0; hits = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < int'(N_CM); i++) begin
      si = -real'(SMAX) + 2.0 * real'(SMAX) * real'(i) / real'(N_CM - 1);
      for (int c = 0; c < 6; c++)
        cam(ST_CM0 + 7'(i), 4'(c), F_WRITE,
            24'({6'(D0 - rnd(si * (real'(LAYER_LEN_DEF[c]) / 252.0 - NREF)) - 1), 4'(W)}), r);
      cam(ST_CM0 + 7'(i), 4'd12, F_WRITE, 24'd0, r);
      for (int a = 0; a < 4096; a++)
        cam(ST_CM0 + 7'(i), 4'd13, F_WRITE, ($countones(a[5:0]) >= 5) ? 24'd1 : 24'd0, r);
    end
    for (int k = 0; k < 3; k++) begin
      cam(ST_TC0 + 7'(k), 4'd0, F_WRITE, 24'd15, r);
      cam(ST_TC0 + 7'(k), 4'd1, F_WRITE, 24'd0, r);
      for (int t = 0; t < 64; t++) cam(ST_TC0 + 7'(k), 4'd2, F_WRITE, 24'((t > 3) ? 3 : t), r);
    end
    found = 0; once = 0; boundary = 0; n_in_range = 0;
    for (int ev = 0; ev < N_TRACK; ev++) begin
      hits = '0;
      phi0 = real'($urandom_range(0, 25199)) / 100.0;
      s = real'($urandom_range(0, 2 * SMAX * 100)) / 100.0 - real'(SMAX);
      for (int c = 0; c < 6; c++) begin
        hits[c][elem(phi0 + s * real'(LAYER_LEN_DEF[c]) / 252.0, c)] = 1'b1;
        hits[c][$urandom_range(0, int'(LAYER_LEN_DEF[c]) - 1)] = 1'b1;   // noise
      end
      run(grp, ntrk, conda);
      n_in_range++;
      if (grp >= 1) found++;
      if (grp == 1) once++;
      if (conda) boundary++;
      check(grp == 1, $sformatf("event %0d phi0 %f S %f: group %0d tracks %0d condA %b",
                                ev, phi0, s, grp, ntrk, conda));
    end
    $display("efficiency: %0d of %0d tracks found, %0d counted exactly once, %0d across the gate boundary",
             found, n_in_range, once, boundary);
    // noise only: 1, 2, 4 and 8 random points per layer
    for (int lvl = 1; lvl <= 8; lvl *= 2) begin
      false_ev = 0;
      for (int ev = 0; ev < N_NOISE; ev++) begin
        hits = '0;
        for (int c = 0; c < 6; c++)
          for (int j = 0; j < lvl; j++) hits[c][$urandom_range(0, int'(LAYER_LEN_DEF[c]) - 1)] = 1'b1;
        run(grp, ntrk, conda);
        if (grp != 0) false_ev++;
      end
      $display("noise: %0d points per layer: %0d of %0d events gave a false track", lvl, false_ev, N_NOISE);
      if (lvl == 1) begin
        checks++;
        if (false_ev * 10 > N_NOISE) begin failures++; $display("FAIL: too many false tracks"); end
      end
    end
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
