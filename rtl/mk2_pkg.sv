// mk2_pkg: types and constants shared by the Mark II secondary trigger
// processor.
//
// The processor rotates the hit patterns of up to 12 detector layers past 24
// "Curvature Modules", each of which looks for one curved road, and counts
// the tracks it finds in three classes (A, B, C). The sizes below follow the
// published design (12 channels, 24 modules, 252-element outer layer, 341
// scan clocks, 252-clock gate, 64-bit VLSRs, 0-15 bit wideners, 4K x 2 track
// logic memory, 32-input track counters with a 64 x 44 track memory).
//
// Layer sizes other than 252, 216 and 144 are not published; LAYER_LEN_DEF
// is this design's choice (see the README). The computer bus is modelled as a
// simplified CAMAC dataway: a one-cycle strobe carries station N, subaddress
// A, function F and 24 write bits W; the addressed module answers in the same
// cycle with 24 read bits R and the Q and X responses. Function codes follow
// the usual CAMAC meaning (F0 read, F9 clear, F16 write); the subaddress maps
// are this design's own and are listed in each module.
package mk2_pkg;

  localparam int unsigned N_CH        = 12;   // data channels (layers)
  localparam int unsigned N_CM        = 24;   // curvature modules
  localparam int unsigned TC_IN       = 32;   // track counter inputs
  localparam int unsigned STEPS       = 252;  // main clocks per revolution
  localparam int unsigned SCAN_CLOCKS = 341;  // clocks in one scan
  localparam int unsigned GATE_LEN    = 252;  // track gate length
  localparam int unsigned VLSR_DEPTH  = 64;   // maximum VLSR delay
  localparam int unsigned LEN_W       = 9;    // width of a layer length

  // Elements per layer, channel 0 first. Channels 0-5: axial drift chamber
  // layers (inner to outer); 6-8: endcap fan-blade layers; 9: the 48
  // scintillation counters; 10-11: inner stereo drift chamber layers.
  typedef logic [N_CH-1:0][LEN_W-1:0] len_vec_t;
  localparam len_vec_t LAYER_LEN_DEF = {
    9'd144, 9'd144, 9'd48, 9'd96, 9'd96, 9'd96,
    9'd252, 9'd216, 9'd204, 9'd192, 9'd168, 9'd144};

  // Station numbers on the command bus.
  localparam logic [6:0] ST_MASTER  = 7'd1;
  localparam logic [6:0] ST_PICKOFF = 7'd2;
  localparam logic [6:0] ST_TCB     = 7'd3;
  localparam logic [6:0] ST_TC0     = 7'd4;   // A, B, C at 4, 5, 6
  localparam logic [6:0] ST_CM0     = 7'd8;   // modules at 8 .. 31

  localparam logic [4:0] F_READ  = 5'd0;
  localparam logic [4:0] F_CLEAR = 5'd9;
  localparam logic [4:0] F_WRITE = 5'd16;

  typedef struct packed {
    logic        strobe;
    logic [6:0]  n;
    logic [3:0]  a;
    logic [4:0]  f;
    logic [23:0] w;
  } camac_cmd_t;

  typedef struct packed {
    logic [23:0] r;
    logic        q;
    logic        x;
  } camac_rsp_t;

  localparam camac_rsp_t RSP_NONE = '{r: '0, q: 1'b0, x: 1'b0};

  // Class code stored in the track logic memory.
  typedef enum logic [1:0] {
    TRK_NULL = 2'd0,
    TRK_A    = 2'd1,
    TRK_B    = 2'd2,
    TRK_C    = 2'd3
  } trk_class_t;

  // Curvature module channel setting: widener W1-W4, VLSR length W5-W10.
  typedef struct packed {
    logic [5:0] len_m1;   // VLSR delay minus one (delay 1..64)
    logic [3:0] width;    // widener extension (0..15)
  } cm_chan_cfg_t;

  // One word of the track counter's track data memory.
  typedef struct packed {
    logic [1:0]  spare;          // always zero
    logic        unterminated;   // interval still open at the end of the gate
    logic        at_gate_start;  // interval opened on the first gate clock
    logic [7:0]  time_count;     // gate clock on which the interval opened
    logic [31:0] fired;          // which curvature modules fired
  } tc_word_t;

  // Burp rule: a layer of len elements gets a shift pulse on main step s
  // when floor((s+1)*len/STEPS) exceeds floor(s*len/STEPS), which spreads the
  // len pulses of a revolution as evenly as possible over STEPS clocks.
  function automatic logic burp_bit(int unsigned len, int unsigned s);
    return (((s + 1) * len) / STEPS) != ((s * len) / STEPS);
  endfunction

endpackage
