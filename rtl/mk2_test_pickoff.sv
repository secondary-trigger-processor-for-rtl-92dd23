// mk2_test_pickoff: Test-Pickoff module.
//
// In normal running it picks off one bit per layer from the data shift
// registers and drives the 12 data lines of the curvature module backplane
// through a register (one clock of latency). For tests the computer can
// write simulated track data into any data shift register and read it back:
//   F16 A0  W[3:0]  select layer
//   F16 A1  W[0]    shift the selected layer once, inserting W[0]
//   F16 A2          shift the selected layer once, recirculating
//   F0  A0          read the selection
//   F0  A1          read the selected layer's pickoff bit
//   F0  A3          read all 12 pickoff bits
// A write produces, on the following clock, a one-clock test_shift pulse for
// the selected layer, with test_sel/test_bit set for an insertion. Writing
// a layer of N elements takes N A1 writes, element 0 first. Test insertion
// and read back are published functions; the command map is this design's.
module mk2_test_pickoff
  import mk2_pkg::*;
#(
  parameter logic [6:0] STATION = ST_PICKOFF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  camac_cmd_t      cmd,
  output camac_rsp_t      rsp,
  input  logic [N_CH-1:0] sr_out,      // pickoff bits of the data shift registers
  output logic [N_CH-1:0] data,        // backplane data lines
  output logic [N_CH-1:0] test_sel,
  output logic            test_bit,
  output logic [N_CH-1:0] test_shift
);

  logic [3:0] chan;
  logic       sel, wr_ins, wr_adv;

  assign sel    = cmd.strobe && (cmd.n == STATION);
  assign wr_ins = sel && cmd.f == F_WRITE && cmd.a == 4'd1 && 32'(chan) < N_CH;
  assign wr_adv = sel && cmd.f == F_WRITE && cmd.a == 4'd2 && 32'(chan) < N_CH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chan       <= '0;
      data       <= '0;
      test_sel   <= '0;
      test_bit   <= 1'b0;
      test_shift <= '0;
    end else begin
      data       <= sr_out;
      test_sel   <= '0;
      test_shift <= '0;
      if (sel && cmd.f == F_WRITE && cmd.a == 4'd0) chan <= cmd.w[3:0];
      if (wr_ins || wr_adv) begin
        test_shift[chan] <= 1'b1;
        test_sel[chan]   <= wr_ins;
        test_bit         <= cmd.w[0];
      end
    end
  end

  always_comb begin
    rsp = RSP_NONE;
    if (sel) begin
      rsp.x = 1'b1;
      unique case ({cmd.f, cmd.a})
        {F_WRITE, 4'd0}, {F_WRITE, 4'd1}, {F_WRITE, 4'd2}: rsp.q = 1'b1;
        {F_READ, 4'd0}: begin rsp.r = 24'(chan); rsp.q = 1'b1; end
        {F_READ, 4'd1}: begin rsp.r = 24'(sr_out[chan]); rsp.q = 1'b1; end
        {F_READ, 4'd3}: begin rsp.r = 24'(sr_out); rsp.q = 1'b1; end
        default: ;
      endcase
    end
  end

endmodule
