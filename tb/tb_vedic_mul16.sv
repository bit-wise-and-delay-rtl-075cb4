// tb_vedic_mul16: self-checking test of the 16x16 Vedic multiplier.
// Corner operands (zero, one, all ones, single bits, alternating bits) are
// applied in every pairing, then random pairs, one per testbench clock cycle.
// The 32-bit product is compared with integer multiplication one time step
// after the operands change (combinational, zero cycles of latency).
// A watchdog ends a hung run with a failure.
module tb_vedic_mul16;
  localparam int unsigned NRAND = 50_000;

  logic        clk;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  logic [15:0] corner [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000,
                              16'h00FF, 16'hFF00, 16'h5555, 16'hAAAA};

  always begin
    clk = 1'b0;
    #5;
    clk = 1'b1;
    #5;
  end

  vedic_mul16 dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog: vedic_mul16 test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] av, input logic [15:0] bv);
    logic [31:0] expected;
    @(posedge clk);
    a = av;
    b = bv;
    #1;
    expected = 32'(av) * 32'(bv);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h got %h expected %h", av, bv, p, expected);
    end
  endtask

  initial begin
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    for (int n = 0; n < NRAND; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
