// tb_vedic_mul8: exhaustive self-checking test of the 8x8 Vedic multiplier.
// It first applies the example operands 8'b10001001 (137) and 8'b01001001
// (73), whose product is 16'b0010011100010001 (10001), then all 65536
// operand pairs, one per testbench clock cycle, comparing the 16-bit product
// with integer multiplication one time step after the operands change
// (combinational, zero cycles of latency). A watchdog ends a hung run.
module tb_vedic_mul8;
  logic        clk;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  always begin
    clk = 1'b0;
    #5;
    clk = 1'b1;
    #5;
  end

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog: vedic_mul8 test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    a = 8'b10001001;
    b = 8'b01001001;
    #1;
    checks++;
    if (p !== 16'b0010011100010001) begin
      failures++;
      $display("FAIL example 137 * 73 got %0d", p);
    end
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        @(posedge clk);
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
