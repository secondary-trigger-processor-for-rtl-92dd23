// tb_mk2_trigger_control: checks the Trigger Control Box.
// The decision table is loaded with "accept if at least one A track, or at
// least two C tracks"; every one of the 64 group combinations is then
// presented and accept/reenable must follow one clock later as single
// pulses, with nothing when valid is low.
module tb_mk2_trigger_control;
  import mk2_pkg::*;

  logic clk = 0, rst_n = 0;
  camac_cmd_t cmd;
  camac_rsp_t rsp;
  logic [5:0] groups;
  logic valid, accept, reenable;
  int checks = 0, failures = 0;

  mk2_trigger_control dut (.clk, .rst_n, .cmd, .rsp, .groups, .valid, .accept, .reenable);

  always #50 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cam(input logic [3:0] a, input logic [4:0] f, input logic [23:0] w,
                     output logic [23:0] r);
    cmd = '{strobe: 1'b1, n: ST_TCB, a: a, f: f, w: w};
    #1 r = rsp.r;
    check(rsp.x && rsp.q, "command accepted");
    @(posedge clk); #1 cmd.strobe = 1'b0;
  endtask

  function automatic bit rule(logic [5:0] g);
    return (g[1:0] >= 2'd1) || (g[5:4] >= 2'd2);
  endfunction

  initial begin
    logic [23:0] r;
    int n_acc;
    cmd = '0; groups = '0; valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cam(4'd0, F_WRITE, 24'd0, r);
    for (int i = 0; i < 64; i++) cam(4'd1, F_WRITE, 24'(rule(6'(i))), r);
    cam(4'd0, F_WRITE, 24'd5, r);
    cam(4'd1, F_READ, 24'd0, r);
    check(r[0] == rule(6'd5), "table read back");
    n_acc = 0;
    for (int i = 0; i < 64; i++) begin
      groups = 6'(i); valid = 1;
      @(posedge clk); #1 valid = 0; groups = 6'($urandom);
      check(accept == rule(6'(i)) && reenable == !rule(6'(i)),
            $sformatf("groups %b: accept %b reenable %b", 6'(i), accept, reenable));
      if (rule(6'(i))) n_acc++;
      @(posedge clk); #1;
      check(!accept && !reenable, "single pulse");
    end
    cam(4'd2, F_READ, 24'd0, r);
    check(r[22:7] == 16'(n_acc) && r[5:0] == 6'd63 && r[6] == rule(6'd63), $sformatf("status %h", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
