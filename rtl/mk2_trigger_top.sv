// mk2_trigger_top: the complete secondary trigger processor.
//
// Hits of up to 12 detector layers (6 axial drift chamber layers, 3 endcap
// fan-blade layers, scintillators or stereo layers) are loaded into
// recirculating data shift registers, one per layer. A primary trigger
// starts the Master Clock, which resets the modules and then rotates every
// layer through the same angle per clock with burped shift enables, for 341
// clocks. The Test-Pickoff drives the 12 pickoff bits onto the backplane.
// N_CM curvature modules each delay and widen the 12 bits to form one curved
// road and classify each clock as null/A/B/C through their track logic
// memories. While the 252-clock gate is open, three track counters (A, B, C)
// merge the module outputs into discrete tracks, count and store them, and
// reduce each count to a 2-bit group; the Trigger Control Box turns the three
// groups into accept or reenable. busy blocks primary triggers for the
// whole cycle (346 clocks, 34.6 us at 10 MHz). The display driver draws the
// raw data of each event on an X-Y-Z scope.
// All programming (delays, widths, logic memories, anti-chatter intervals,
// decision table, test data) goes over one command bus modelled on the CAMAC
// dataway: cmd is broadcast, and rsp is the OR of the modules' answers
// (only the addressed module answers). Stations: Master Clock 1,
// Test-Pickoff 2, Trigger Control Box 3, track counters A/B/C 4/5/6,
// curvature module i at 8+i. Track counter inputs beyond N_CM are tied low.
// hits[c][e] is element e of layer c; bits at or above the layer's length
// are ignored. hits_load should be used only while busy is low.
module mk2_trigger_top
  import mk2_pkg::*;
#(
  parameter int unsigned N_CM_P    = N_CM,
  parameter len_vec_t    LAYER_LEN = LAYER_LEN_DEF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  camac_cmd_t                   cmd,
  output camac_rsp_t                   rsp,
  input  logic                         start,      // primary trigger
  input  logic                         hits_load,
  input  logic [N_CH-1:0][STEPS-1:0]   hits,
  output logic                         busy,
  output logic                         accept,
  output logic                         reenable,
  output logic [2:0][1:0]              tc_group,   // A, B, C groups
  output logic                         tc_done,
  output logic [N_CM_P-1:0][2:0]       cm_led,     // {C,B,A} latches per module
  output logic [7:0]                   scope_x,
  output logic [7:0]                   scope_y,
  output logic                         scope_z
);

  localparam int unsigned N_RSP = N_CM_P + 6;

  camac_rsp_t rsps [N_RSP];

  logic                sys_reset, run, gate, gate_first, scan_end;
  logic [N_CH-1:0]     burp, sr_out, data, test_sel, test_shift;
  logic                test_bit;
  logic [N_CM_P-1:0][2:0] cm_trk;
  logic [2:0]          tc_done_v;

  mk2_master_clock #(.LAYER_LEN(LAYER_LEN)) u_master (
    .clk, .rst_n, .cmd, .rsp(rsps[0]), .start, .sys_reset, .burp, .run,
    .gate, .gate_first, .scan_end, .busy);

  for (genvar c = 0; c < N_CH; c++) begin : g_layer
    mk2_data_sr #(.LEN(int'(LAYER_LEN[c]))) u_sr (
      .clk, .load(hits_load), .din(hits[c][LAYER_LEN[c]-1:0]),
      .shift(burp[c] | test_shift[c]), .test_sel(test_sel[c]),
      .test_bit, .dout(sr_out[c]));
  end

  mk2_test_pickoff u_pickoff (
    .clk, .rst_n, .cmd, .rsp(rsps[1]), .sr_out, .data, .test_sel, .test_bit,
    .test_shift);

  for (genvar i = 0; i < N_CM_P; i++) begin : g_cm
    mk2_curvature_module #(.STATION(ST_CM0 + 7'(i))) u_cm (
      .clk, .rst_n, .cmd, .rsp(rsps[6+i]), .sys_reset, .run, .gate, .data,
      .trk(cm_trk[i]), .led(cm_led[i]));
  end

  for (genvar k = 0; k < 3; k++) begin : g_tc
    logic [TC_IN-1:0] tc_in;
    always_comb begin
      tc_in = '0;
      for (int i = 0; i < N_CM_P; i++) tc_in[i] = cm_trk[i][k];
    end
    mk2_track_counter #(.STATION(ST_TC0 + 7'(k))) u_tc (
      .clk, .rst_n, .cmd, .rsp(rsps[3+k]), .sys_reset, .gate, .gate_first,
      .scan_end, .trk(tc_in), .group(tc_group[k]), .done(tc_done_v[k]));
  end

  assign tc_done = &tc_done_v;   // the three counters finish together

  mk2_trigger_control u_tcb (
    .clk, .rst_n, .cmd, .rsp(rsps[2]), .groups(tc_group), .valid(tc_done),
    .accept, .reenable);

  mk2_display u_display (
    .clk, .rst_n, .clr(sys_reset), .capture(run), .data,
    .x(scope_x), .y(scope_y), .z(scope_z));

  // Station decoding must be unique: at most one module answers a command.
  logic [N_RSP-1:0] responders;
  always_comb
    for (int i = 0; i < int'(N_RSP); i++) responders[i] = rsps[i].x;

  a_one_responder: assert property (@(posedge clk)
    cmd.strobe |-> $countones(responders) <= 1)
    else $error("station %0d answered by more than one module", cmd.n);

  always_comb begin
    rsp = RSP_NONE;
    for (int i = 0; i < int'(N_RSP); i++) begin
      rsp.r = rsp.r | rsps[i].r;
      rsp.q = rsp.q | rsps[i].q;
      rsp.x = rsp.x | rsps[i].x;
    end
  end

endmodule
