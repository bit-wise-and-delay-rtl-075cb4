// tb_vedic_mul4: exhaustive self-checking test of the 4x4 Vedic multiplier.
// All 256 operand pairs are applied, one per testbench clock cycle, and the
// 8-bit product is compared with integer multiplication one time step later
// (combinational, zero cycles of latency). A watchdog ends a hung run.
module tb_vedic_mul4;
  logic       clk;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  always begin
    clk = 1'b0;
    #5;
    clk = 1'b1;
    #5;
  end

  vedic_mul4 dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog: vedic_mul4 test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        @(posedge clk);
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
