// mk2_display: raw-data display driver for an X-Y-Z oscilloscope.
//
// During the first revolution of a scan (capture high, up to STEPS_P clocks
// after clr) the 12 backplane data bits are stored, one 12-bit word per main
// step, so word p holds every layer's element at azimuth 2*pi*p/STEPS_P.
// The stored picture is then drawn continuously as concentric circles, one
// per channel, channel c on radius RADIUS0 + RADIUS_STEP*c: each clock one
// point (channel c, step p) is put out as
//     x = 128 + floor(R_c * round(127*cos(2*pi*p/STEPS_P)) / 128)
//     y = 128 + floor(R_c * round(127*sin(2*pi*p/STEPS_P)) / 128)
//     z = stored bit (beam on for a hit),
// registered, one clock after the point counter. Steps run fastest; a full
// frame is N_CH_P*STEPS_P clocks. The cosine table is computed at
// elaboration. The paper describes only the function (raw data shown as
// concentric circles simulating the detector); sampling in the common
// 252-step frame, the radii and the 8-bit codes are this design's choices.
// The digital-to-analog converters and the scope are outside this module.
module mk2_display
  import mk2_pkg::*;
#(
  parameter int unsigned N_CH_P      = N_CH,
  parameter int unsigned STEPS_P     = STEPS,
  parameter int unsigned RADIUS0     = 10,
  parameter int unsigned RADIUS_STEP = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,       // start a new picture
  input  logic              capture,   // sample data this clock
  input  logic [N_CH_P-1:0] data,
  output logic [7:0]        x,
  output logic [7:0]        y,
  output logic              z
);

  localparam real PI = 3.14159265358979;

  function automatic logic [STEPS_P*8-1:0] build_trig(bit sine);
    logic [STEPS_P*8-1:0] t;
    real a, v;
    t = '0;
    for (int p = 0; p < int'(STEPS_P); p++) begin
      a = 2.0 * PI * real'(p) / real'(STEPS_P);
      v = 127.0 * (sine ? $sin(a) : $cos(a));
      t[p*8 +: 8] = 8'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam logic [STEPS_P*8-1:0] COS_T = build_trig(1'b0);
  localparam logic [STEPS_P*8-1:0] SIN_T = build_trig(1'b1);

  logic [N_CH_P-1:0] pic [STEPS_P];
  logic [7:0]        wptr, p;
  logic [3:0]        c;

  always_ff @(posedge clk) begin
    if (capture && 32'(wptr) < STEPS_P) pic[wptr] <= data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                wptr <= '0;
    else if (clr)                              wptr <= '0;
    else if (capture && 32'(wptr) < STEPS_P)   wptr <= wptr + 8'd1;
  end

  logic signed [7:0]  cs, sn;
  logic signed [15:0] px, py;
  logic [7:0]         rad;

  always_comb begin
    cs  = COS_T[32'(p)*8 +: 8];
    sn  = SIN_T[32'(p)*8 +: 8];
    rad = 8'(RADIUS0 + RADIUS_STEP * 32'(c));
    px  = $signed({8'd0, rad}) * cs;
    py  = $signed({8'd0, rad}) * sn;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0; c <= '0; x <= 8'd128; y <= 8'd128; z <= 1'b0;
    end else begin
      x <= 8'(16'sd128 + (px >>> 7));
      y <= 8'(16'sd128 + (py >>> 7));
      z <= (32'(p) < 32'(wptr)) && pic[p][c];
      if (32'(p) == STEPS_P - 1) begin
        p <= '0;
        c <= (32'(c) == N_CH_P - 1) ? '0 : c + 4'd1;
      end else
        p <= p + 8'd1;
    end
  end

endmodule
