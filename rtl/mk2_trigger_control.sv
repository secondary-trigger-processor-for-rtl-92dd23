// mk2_trigger_control: Trigger Control Box, the final decision.
//
// The three track counters each reduce their track count to a 2-bit group
// through their own trigger logic memories. When the groups are valid this
// box looks up the 6-bit combination {C, B, A} in a 64 x 1 decision memory,
// loaded by the computer, and pulses `accept` (record the event: trigger the
// data processing computer) or `reenable` (reject it: reset the detector
// electronics and wait for the next event) on the following clock. Any rule
// on the three groups, e.g. "at least one A track", is a table. The paper
// gives only the box's function; the table is this design's simplest
// programmable form of it.
// Command bus (station STATION):
//   F16 A0 table pointer      F16 A1 write W[0] at pointer, pointer+1
//   F0  A1 read table bit     F0  A2 read {accepted count[15:0], last decision, last groups[5:0]}
module mk2_trigger_control
  import mk2_pkg::*;
#(
  parameter logic [6:0] STATION = ST_TCB
) (
  input  logic       clk,
  input  logic       rst_n,
  input  camac_cmd_t cmd,
  output camac_rsp_t rsp,
  input  logic [5:0] groups,    // {C[1:0], B[1:0], A[1:0]}
  input  logic       valid,
  output logic       accept,
  output logic       reenable
);

  logic        table_q [64];
  logic [5:0]  ptr, last_groups;
  logic        last_dec;
  logic [15:0] n_accept;
  logic        sel;

  assign sel = cmd.strobe && (cmd.n == STATION);

  always_ff @(posedge clk) begin
    if (sel && cmd.f == F_WRITE && cmd.a == 4'd1) table_q[ptr] <= cmd.w[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0; last_groups <= '0; last_dec <= 1'b0; n_accept <= '0;
      accept <= 1'b0; reenable <= 1'b0;
    end else begin
      accept   <= 1'b0;
      reenable <= 1'b0;
      if (valid) begin
        accept      <= table_q[groups];
        reenable    <= !table_q[groups];
        last_groups <= groups;
        last_dec    <= table_q[groups];
        if (table_q[groups]) n_accept <= n_accept + 16'd1;
      end
      if (sel && cmd.f == F_WRITE && cmd.a == 4'd0) ptr <= cmd.w[5:0];
      else if (sel && cmd.f == F_WRITE && cmd.a == 4'd1) ptr <= ptr + 6'd1;
    end
  end

  always_comb begin
    rsp = RSP_NONE;
    if (sel) begin
      rsp.x = 1'b1;
      if (cmd.f == F_WRITE && (cmd.a == 4'd0 || cmd.a == 4'd1)) rsp.q = 1'b1;
      else if (cmd.f == F_READ && cmd.a == 4'd1) begin
        rsp.r = 24'(table_q[ptr]);
        rsp.q = 1'b1;
      end else if (cmd.f == F_READ && cmd.a == 4'd2) begin
        rsp.r = {1'b0, n_accept, last_dec, last_groups};
        rsp.q = 1'b1;
      end
    end
  end

endmodule
