// mk2_track_counter: track counter for one track class (A, B or C).
//
// Neighbouring curvature roads overlap, so one track usually fires several
// modules on nearby clocks. While the gate is open, the first clock on which
// any of the N_IN inputs fires opens an anti-chatter interval of
// ac_len_m1+1 clocks (1..16); every input that fires inside it is merged
// into the same track. On the interval's last clock the track is counted:
// the word {flags, time count, fired modules} is written into a 64 x 44
// track data memory at the address held by the track count MAR, and MAR
// advances. The time count is the gate clock (0..251) on which the interval
// opened, i.e. the track's azimuth.
// End of scan (scan_end, after the gate has closed):
//  * an interval still open is closed and counted (flag `unterminated`), so
//    a track at the end of the revolution is not lost;
//  * "Condition A": if that interval was open at the end of the gate and an
//    interval also opened on the first gate clock, the two are one track
//    seen across the start/end boundary, and MAR-1 instead of MAR addresses
//    the trigger logic memory.
// One clock after scan_end the 64 x 2 trigger logic memory, addressed by the
// (corrected) count, gives `group`, and `done` pulses for one clock.
// MAR saturates at 63 (the `overflow` flag is then set and further tracks
// are not stored). sys_reset clears all event state, not the programming.
// Merging, the 1-16 interval, the 64 x 44 memory, the 6-bit MAR, the 64 x 2
// trigger logic memory, the unterminated interval and Condition A follow the
// published track counter; the flag bits in the word, the saturation and the
// command map are this design's.
// Command bus (station STATION):
//   F16 A0 W[3:0] anti-chatter length-1     F0 A0 read it
//   F16 A1 trigger logic memory pointer     F16 A2 write W[1:0], pointer+1
//   F0  A2 read trigger logic word          F0 A3 read {group, overflow, condA, MAR}
//   F16 A4 track memory read pointer        F0 A4 / A5 read word bits 23:0 / 43:24
module mk2_track_counter
  import mk2_pkg::*;
#(
  parameter logic [6:0]  STATION = ST_TC0,
  parameter int unsigned N_IN    = TC_IN
) (
  input  logic            clk,
  input  logic            rst_n,
  input  camac_cmd_t      cmd,
  output camac_rsp_t      rsp,
  input  logic            sys_reset,
  input  logic            gate,
  input  logic            gate_first,
  input  logic            scan_end,
  input  logic [N_IN-1:0] trk,
  output logic [1:0]      group,
  output logic            done
);

  localparam int unsigned DEPTH = 64;

  // Programming.
  logic [3:0]  ac_len_m1;
  logic [1:0]  trm [DEPTH];
  logic [5:0]  trm_ptr, rd_ptr;
  tc_word_t    mem [DEPTH];

  // Event state.
  logic        active, first_f, first_seen, cond_a, overflow, fin;
  logic [3:0]  rem;
  logic [31:0] fired;
  logic [7:0]  tstart, tcount;
  logic [5:0]  mar;

  // Next-interval view of this clock.
  logic [31:0] fired_n;
  logic [3:0]  rem_n;
  logic [7:0]  tnow, tst_n;
  logic        first_n, in_iv, close_now, store_end, store;
  tc_word_t    word;

  logic sel;
  assign sel = cmd.strobe && (cmd.n == STATION);

  always_comb begin
    tnow      = gate_first ? 8'd0 : tcount;
    fired_n   = (active ? fired : 32'd0) | 32'(trk);
    rem_n     = active ? rem : ac_len_m1;
    tst_n     = active ? tstart : tnow;
    first_n   = active ? first_f : gate_first;
    in_iv     = active || (|trk);
    close_now = gate && in_iv && (rem_n == 4'd0);
    store_end = scan_end && active;
    store     = close_now || store_end;
    word      = '0;
    if (store_end) begin
      word.unterminated  = 1'b1;
      word.at_gate_start = first_f;
      word.time_count    = tstart;
      word.fired         = fired;
    end else begin
      word.at_gate_start = first_n;
      word.time_count    = tst_n;
      word.fired         = fired_n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; first_f <= 1'b0; first_seen <= 1'b0; cond_a <= 1'b0;
      overflow <= 1'b0; fin <= 1'b0; rem <= '0; fired <= '0; tstart <= '0;
      tcount <= '0; mar <= '0; group <= '0; done <= 1'b0;
    end else if (sys_reset) begin
      active <= 1'b0; first_f <= 1'b0; first_seen <= 1'b0; cond_a <= 1'b0;
      overflow <= 1'b0; fin <= 1'b0; rem <= '0; fired <= '0; tstart <= '0;
      tcount <= '0; mar <= '0; done <= 1'b0;
    end else begin
      if (gate) tcount <= tnow + 8'd1;
      if (gate && in_iv) begin
        if (!active && gate_first) first_seen <= 1'b1;
        if (rem_n == 4'd0) active <= 1'b0;
        else begin
          active  <= 1'b1;
          rem     <= rem_n - 4'd1;
          fired   <= fired_n;
          tstart  <= tst_n;
          first_f <= first_n;
        end
      end
      if (scan_end) begin
        active <= 1'b0;
        cond_a <= active && first_seen;
      end
      if (store) begin
        if (mar == 6'(DEPTH - 1)) overflow <= 1'b1;
        else                      mar <= mar + 6'd1;
      end
      fin  <= scan_end;
      done <= fin;
      if (fin) group <= trm[mar - 6'(cond_a)];
    end
  end

  always_ff @(posedge clk) begin
    if (store && mar != 6'(DEPTH - 1)) mem[mar] <= word;
  end

  // Sequencing rules: the gate is closed at the end of the scan, and the
  // first gate clock is a gate clock.
  a_gate_closed_at_end: assert property (@(posedge clk)
    !(gate && scan_end)) else $error("scan_end while the gate is open");
  a_first_in_gate: assert property (@(posedge clk)
    gate_first |-> gate) else $error("gate_first outside the gate");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ac_len_m1 <= '0;
      trm_ptr   <= '0;
      rd_ptr    <= '0;
    end else if (sel && cmd.f == F_WRITE) begin
      unique case (cmd.a)
        4'd0: ac_len_m1 <= cmd.w[3:0];
        4'd1: trm_ptr   <= cmd.w[5:0];
        4'd2: trm_ptr   <= trm_ptr + 6'd1;
        4'd4: rd_ptr    <= cmd.w[5:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (sel && cmd.f == F_WRITE && cmd.a == 4'd2) trm[trm_ptr] <= cmd.w[1:0];
  end

  always_comb begin
    rsp = RSP_NONE;
    if (sel) begin
      rsp.x = 1'b1;
      if (cmd.f == F_WRITE)
        rsp.q = (cmd.a == 4'd0 || cmd.a == 4'd1 || cmd.a == 4'd2 || cmd.a == 4'd4);
      else if (cmd.f == F_READ) begin
        rsp.q = 1'b1;
        unique case (cmd.a)
          4'd0: rsp.r = 24'(ac_len_m1);
          4'd2: rsp.r = 24'(trm[trm_ptr]);
          4'd3: rsp.r = 24'({group, overflow, cond_a, mar});
          4'd4: rsp.r = mem[rd_ptr][23:0];
          4'd5: rsp.r = 24'(mem[rd_ptr][43:24]);
          default: rsp.q = 1'b0;
        endcase
      end
    end
  end

endmodule
