// tb_mk2_test_pickoff: checks the Test-Pickoff together with three data
// shift registers of different lengths. Random patterns are written
// serially into each layer through the command bus and read back bit by
// bit; the backplane data lines must follow the pickoff bits one clock later.
module tb_mk2_test_pickoff;
  import mk2_pkg::*;

  localparam int unsigned NL = 3;
  localparam int unsigned LENS [NL] = '{48, 96, 144};

  logic clk = 0, rst_n = 0;
  camac_cmd_t cmd;
  camac_rsp_t rsp;
  logic [N_CH-1:0] sr_out, data, test_sel, test_shift;
  logic test_bit;
  int checks = 0, failures = 0;

  mk2_test_pickoff dut (.clk, .rst_n, .cmd, .rsp, .sr_out, .data, .test_sel,
    .test_bit, .test_shift);

  for (genvar c = 0; c < NL; c++) begin : g_sr
    mk2_data_sr #(.LEN(LENS[c])) u_sr (.clk, .load(1'b0), .din('0),
      .shift(test_shift[c]), .test_sel(test_sel[c]), .test_bit,
      .dout(sr_out[c]));
  end
  for (genvar c = NL; c < N_CH; c++) begin : g_rest
    assign sr_out[c] = 1'(c % 2);
  end

  always #50 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cam(input logic [3:0] a, input logic [4:0] f, input logic [23:0] w,
                     output logic [23:0] r);
    cmd = '{strobe: 1'b1, n: ST_PICKOFF, a: a, f: f, w: w};
    #1 r = rsp.r;
    check(rsp.x && rsp.q, "command accepted");
    @(posedge clk); #1 cmd.strobe = 1'b0;
    @(posedge clk); #1;
  endtask

  logic [N_CH-1:0] prev;
  always @(posedge clk) begin
    prev <= sr_out;
    if (rst_n && $time > 500) begin
      #1;
      checks++;
      if (data != prev) begin failures++; $display("FAIL: data lines"); end
    end
  end

  initial begin
    logic [23:0] r;
    logic [143:0] pat [NL];
    cmd = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < int'(NL); c++) begin
      cam(4'd0, F_WRITE, 24'(c), r);
      cam(4'd0, F_READ, 24'd0, r);
      check(r == 24'(c), "selection read back");
      for (int i = 0; i < int'(LENS[c]); i++) begin
        pat[c][i] = 1'($urandom);
        cam(4'd1, F_WRITE, 24'(pat[c][i]), r);
      end
    end
    for (int c = 0; c < int'(NL); c++) begin
      cam(4'd0, F_WRITE, 24'(c), r);
      for (int i = 0; i < int'(LENS[c]); i++) begin
        cam(4'd1, F_READ, 24'd0, r);
        check(r[0] == pat[c][i], $sformatf("layer %0d element %0d", c, i));
        cam(4'd3, F_READ, 24'd0, r);
        check(r[N_CH-1:0] == sr_out, "all pickoff bits");
        cam(4'd2, F_WRITE, 24'd0, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
