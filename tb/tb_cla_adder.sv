// tb_cla_adder: self-checking test of the carry-lookahead adder at the widths
// the multiplier uses. Four adders run side by side: the default width (16)
// and widths 6 (a short final group), 4 (one group) and 48 (twelve groups).
// Each cycle all four get the same random operands, masked to their width,
// and their sums are compared with 48-bit addition truncated to the
// width. Corner cases come first: all ones plus one, whose carry has to pass
// through every lookahead group, and alternating patterns. The adder is
// combinational; sums are checked one time step after the operands change.
module tb_cla_adder;
  localparam int unsigned NRAND = 20_000;

  logic        clk;
  logic [47:0] x, y;
  logic [15:0] s16;
  logic [5:0]  s6;
  logic [3:0]  s4;
  logic [47:0] s48;
  int checks = 0, failures = 0;

  always begin
    clk = 1'b0;
    #5;
    clk = 1'b1;
    #5;
  end

  cla_adder             dut16 (.x(x[15:0]), .y(y[15:0]), .s(s16));
  cla_adder #(.W(6))    dut6  (.x(x[5:0]),  .y(y[5:0]),  .s(s6));
  cla_adder #(.W(4))    dut4  (.x(x[3:0]),  .y(y[3:0]),  .s(s4));
  cla_adder #(.W(48))   dut48 (.x(x[47:0]), .y(y[47:0]), .s(s48));

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog: cla_adder test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [47:0] xv, input logic [47:0] yv);
    logic [47:0] sum;
    @(posedge clk);
    x = xv;
    y = yv;
    #1;
    sum = xv + yv;
    checks += 4;
    if (s16 !== sum[15:0]) begin failures++; $display("FAIL W=16 %h+%h got %h", xv[15:0], yv[15:0], s16); end
    if (s6  !== sum[5:0])  begin failures++; $display("FAIL W=6 %h+%h got %h",  xv[5:0],  yv[5:0],  s6);  end
    if (s4  !== sum[3:0])  begin failures++; $display("FAIL W=4 %h+%h got %h",  xv[3:0],  yv[3:0],  s4);  end
    if (s48 !== sum[47:0]) begin failures++; $display("FAIL W=48 %h+%h got %h", xv[47:0], yv[47:0], s48); end
  endtask

  initial begin
    apply('1, 48'd1);
    apply('1, '1);
    apply(48'h5555_5555_5555, 48'hAAAA_AAAA_AAAA);
    apply(48'h5555_5555_5555, 48'hAAAA_AAAA_AAAB);
    apply(48'h0, 48'h0);
    apply(48'h0FFF_F0FF_FF0F, 48'h0000_0F00_00F1);
    for (int n = 0; n < NRAND; n++) apply(48'({$urandom, $urandom}), 48'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
