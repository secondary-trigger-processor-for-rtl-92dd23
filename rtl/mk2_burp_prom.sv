// mk2_burp_prom: the burped-clock pattern ROM of the Master Clock.
//
// Layers have between 48 and 252 elements, but every layer must turn through
// the same angle per main clock. The largest layer (STEPS = 252 elements) is
// shifted on every clock; a layer of N elements is shifted on only N of every
// 252 clocks, with the missing pulses spread as evenly as possible (216
// elements: 6 of every 7 clocks; 144 elements: 4 of every 7). Bit c of word s
// is 1 when layer c shifts on main step s:
//     burp[c] = floor((s+1)*N_c/252) != floor(s*N_c/252)
// The pattern is fixed by the detector geometry, so it is a ROM built at
// elaboration time, as the original used PROMs. The lookup is combinational;
// the Master Clock registers it.
module mk2_burp_prom
  import mk2_pkg::*;
#(
  parameter int unsigned N_CH_P    = N_CH,
  parameter int unsigned STEPS_P   = STEPS,
  parameter logic [N_CH_P-1:0][LEN_W-1:0] LAYER_LEN = LAYER_LEN_DEF
) (
  input  logic [7:0]        step,   // main step in the revolution, 0..STEPS_P-1
  output logic [N_CH_P-1:0] burp    // shift enables for that step
);

  function automatic logic [STEPS_P*N_CH_P-1:0] build_rom();
    logic [STEPS_P*N_CH_P-1:0] r;
    r = '0;
    for (int unsigned s = 0; s < STEPS_P; s++)
      for (int unsigned c = 0; c < N_CH_P; c++)
        r[s*N_CH_P + c] = (((s + 1) * LAYER_LEN[c]) / STEPS_P) != ((s * LAYER_LEN[c]) / STEPS_P);
    return r;
  endfunction

  localparam logic [STEPS_P*N_CH_P-1:0] ROM = build_rom();

  always_comb begin
    if (32'(step) < STEPS_P) burp = ROM[32'(step)*N_CH_P +: N_CH_P];
    else                     burp = '0;
  end

endmodule
