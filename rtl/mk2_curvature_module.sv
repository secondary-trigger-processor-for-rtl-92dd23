// mk2_curvature_module: one curvature road of the track finder.
//
// Each of the N_CH_P channels passes its backplane data bit through a
// programmable widener (0-15 clocks) and a VLSR (1-64 clocks of delay).
// The delays undo the curvature of one family of tracks, so that a track of
// that curvature, seen as the data rotate, arrives on all channels on the
// same clock; the wideners give the road its width. The 12 widened and
// delayed bits address a 4096 x 2 track logic memory, loaded by the
// computer, that classifies each combination as null, A, B or C (so any
// logic function of the 12 channels, e.g. "5 of the 6 axial layers", can be
// programmed). The class is decoded into the three track outputs trk[0]=A,
// trk[1]=B, trk[2]=C through an output register. While the gate is open,
// each class that fires also sets a sticky output latch (front panel LEDs,
// readable by the computer); sys_reset clears it.
// Timing: with run high every clock, a data bit sampled on clock t reaches
// trk after clock t + 2 + delay (one clock each for the widener and the
// output register, delay clocks for the VLSR) and stays for width+1 clocks.
// Structure and sizes follow the published module. This design's choices:
// Command bus (station STATION):
//   F16 A0..A11  W[3:0] widener, W[9:4] VLSR delay-1 of channel A
//   F0  A0..A11  read that setting
//   F16 A12      set the track logic memory pointer (12 bits)
//   F16 A13      write W[1:0] at the pointer, then advance the pointer
//   F0  A13      read the word at the pointer
//   F0  A14      read the output latch {C, B, A}
//   F9  A0       clear the output latch
module mk2_curvature_module
  import mk2_pkg::*;
#(
  parameter logic [6:0]  STATION = ST_CM0,
  parameter int unsigned N_CH_P  = N_CH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  camac_cmd_t        cmd,
  output camac_rsp_t        rsp,
  input  logic              sys_reset,
  input  logic              run,        // gated clock enable
  input  logic              gate,
  input  logic [N_CH_P-1:0] data,
  output logic [2:0]        trk,        // {C, B, A}
  output logic [2:0]        led         // latched {C, B, A}
);

  localparam int unsigned MW = N_CH_P;   // track logic memory address width

  cm_chan_cfg_t      cfg [N_CH_P];
  logic [N_CH_P-1:0] wide, dly;
  logic [1:0]        tlm [2**MW];
  logic [MW-1:0]     tlm_ptr;
  trk_class_t        cls;

  logic sel;
  assign sel = cmd.strobe && (cmd.n == STATION);

  for (genvar c = 0; c < N_CH_P; c++) begin : g_ch
    mk2_widener #(.WW(4)) u_wid (
      .clk(clk), .clr(sys_reset), .en(run), .width(cfg[c].width),
      .din(data[c]), .dout(wide[c]));
    mk2_vlsr #(.DEPTH(VLSR_DEPTH)) u_vlsr (
      .clk(clk), .clr(sys_reset), .en(run), .len_m1(cfg[c].len_m1),
      .din(wide[c]), .dout(dly[c]));
  end

  // Programming registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH_P; c++) cfg[c] <= '0;
      tlm_ptr <= '0;
    end else if (sel && cmd.f == F_WRITE) begin
      if (32'(cmd.a) < N_CH_P) cfg[cmd.a] <= cmd.w[9:0];
      else if (cmd.a == 4'd12) tlm_ptr <= cmd.w[MW-1:0];
      else if (cmd.a == 4'd13) tlm_ptr <= tlm_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (sel && cmd.f == F_WRITE && cmd.a == 4'd13) tlm[tlm_ptr] <= cmd.w[1:0];
  end

  assign cls = trk_class_t'(tlm[dly]);

  // Track outputs and the output latch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trk <= '0;
      led <= '0;
    end else begin
      if (sys_reset) trk <= '0;
      else if (run) begin
        trk[0] <= (cls == TRK_A);
        trk[1] <= (cls == TRK_B);
        trk[2] <= (cls == TRK_C);
      end
      if (sys_reset || (sel && cmd.f == F_CLEAR && cmd.a == 4'd0)) led <= '0;
      else if (gate) led <= led | trk;
    end
  end

  always_comb begin
    rsp = RSP_NONE;
    if (sel) begin
      rsp.x = 1'b1;
      if (cmd.f == F_WRITE && (32'(cmd.a) < N_CH_P || cmd.a == 4'd12 || cmd.a == 4'd13))
        rsp.q = 1'b1;
      else if (cmd.f == F_READ && 32'(cmd.a) < N_CH_P) begin
        rsp.r = 24'(cfg[cmd.a]);
        rsp.q = 1'b1;
      end else if (cmd.f == F_READ && cmd.a == 4'd13) begin
        rsp.r = 24'(tlm[tlm_ptr]);
        rsp.q = 1'b1;
      end else if (cmd.f == F_READ && cmd.a == 4'd14) begin
        rsp.r = 24'(led);
        rsp.q = 1'b1;
      end else if (cmd.f == F_CLEAR && cmd.a == 4'd0)
        rsp.q = 1'b1;
    end
  end

endmodule
