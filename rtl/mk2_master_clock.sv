// mk2_master_clock: scan sequencer of the secondary trigger processor.
//
// A primary trigger (start) while idle begins one scan cycle:
//   RESET  RESET_CLOCKS clocks of sys_reset (clears modules for the event);
//   SCAN   SCAN_CLOCKS (341) clocks. On scan clock k the data shift
//          registers get the burped shift enables of ROM step (k mod 252),
//          and run, the gated clock enable of the curvature modules, is
//          high. gate is high on scan clocks gate_start .. gate_start+251
//          (one revolution, so each track is counted once); gate_first marks
//          the first of them. The scan is stretched if a late gate_start
//          needs it;
//   END    one clock of scan_end: the track counters close their last
//          anti-chatter interval;
//   HOLD   HOLD_CLOCKS clocks for the track counter and trigger control box
//          decisions.
// busy is high from the clock after start until the cycle is over and
// blocks further primary triggers. With the defaults a cycle is
// 2+341+1+2 = 346 clocks, 34.6 us at 10 MHz.
// The reset/clock/gate/busy sequence, the 341 clocks and the 252-clock gate
// follow the published Master Clock; the state lengths outside the scan and
// the default gate start (341-252 = 89) are this design's choices.
// Command bus (station STATION): F16 A0 writes gate_start (9 bits), F0 A0
// reads it, F0 A1 reads {busy, scans completed[15:0]}.
module mk2_master_clock
  import mk2_pkg::*;
#(
  parameter logic [6:0]  STATION            = ST_MASTER,
  parameter int unsigned SCAN_CLOCKS_P      = SCAN_CLOCKS,
  parameter int unsigned GATE_LEN_P         = GATE_LEN,
  parameter int unsigned STEPS_P            = STEPS,
  parameter int unsigned GATE_START_DEFAULT = SCAN_CLOCKS - GATE_LEN,
  parameter int unsigned RESET_CLOCKS       = 2,
  parameter int unsigned HOLD_CLOCKS        = 2,
  parameter len_vec_t    LAYER_LEN          = LAYER_LEN_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  camac_cmd_t       cmd,
  output camac_rsp_t       rsp,
  input  logic             start,
  output logic             sys_reset,
  output logic [N_CH-1:0]  burp,
  output logic             run,
  output logic             gate,
  output logic             gate_first,
  output logic             scan_end,
  output logic             busy
);

  typedef enum logic [2:0] {S_IDLE, S_RESET, S_SCAN, S_END, S_HOLD} state_t;

  state_t      state;
  logic [9:0]  cnt;          // clocks spent in the current state
  logic [7:0]  step;         // scan clock modulo STEPS_P
  logic [8:0]  gate_start;
  logic [15:0] n_scans;
  logic [9:0]  scan_last;    // index of the last scan clock
  logic [N_CH-1:0] rom_burp;

  mk2_burp_prom #(.N_CH_P(N_CH), .STEPS_P(STEPS_P), .LAYER_LEN(LAYER_LEN)) u_prom (
    .step(step), .burp(rom_burp));

  always_comb begin
    if (10'(gate_start) + 10'(GATE_LEN_P) > 10'(SCAN_CLOCKS_P))
      scan_last = 10'(gate_start) + 10'(GATE_LEN_P) - 10'd1;
    else
      scan_last = 10'(SCAN_CLOCKS_P) - 10'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      step    <= '0;
      n_scans <= '0;
    end else begin
      cnt <= cnt + 10'd1;
      unique case (state)
        S_IDLE: begin
          cnt  <= '0;
          step <= '0;
          if (start) state <= S_RESET;
        end
        S_RESET: if (cnt == 10'(RESET_CLOCKS - 1)) begin
          state <= S_SCAN;
          cnt   <= '0;
          step  <= '0;
        end
        S_SCAN: begin
          step <= (32'(step) == STEPS_P - 1) ? '0 : step + 8'd1;
          if (cnt == scan_last) begin
            state <= S_END;
            cnt   <= '0;
          end
        end
        S_END: begin
          state <= S_HOLD;
          cnt   <= '0;
        end
        S_HOLD: if (cnt == 10'(HOLD_CLOCKS - 1)) begin
          state   <= S_IDLE;
          n_scans <= n_scans + 16'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    sys_reset  = (state == S_RESET);
    run        = (state == S_SCAN);
    burp       = run ? rom_burp : '0;
    gate       = run && (cnt >= 10'(gate_start)) && (cnt < 10'(gate_start) + 10'(GATE_LEN_P));
    gate_first = run && (cnt == 10'(gate_start));
    scan_end   = (state == S_END);
    busy       = (state != S_IDLE);
  end

  // Command bus.
  logic sel;
  assign sel = cmd.strobe && (cmd.n == STATION);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gate_start <= 9'(GATE_START_DEFAULT);
    else if (sel && cmd.f == F_WRITE && cmd.a == 4'd0) gate_start <= cmd.w[8:0];
  end

  always_comb begin
    rsp = RSP_NONE;
    if (sel) begin
      rsp.x = 1'b1;
      if (cmd.f == F_READ && cmd.a == 4'd0) begin
        rsp.r = 24'(gate_start);
        rsp.q = 1'b1;
      end else if (cmd.f == F_READ && cmd.a == 4'd1) begin
        rsp.r = {7'd0, busy, n_scans};
        rsp.q = 1'b1;
      end else if (cmd.f == F_WRITE && cmd.a == 4'd0) begin
        rsp.q = 1'b1;
      end
    end
  end

endmodule
