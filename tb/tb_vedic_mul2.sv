// tb_vedic_mul2: exhaustive self-checking test of the 2x2 Vedic multiplier.
// All 16 operand pairs are applied, one per testbench clock cycle, and the
// 4-bit product is compared with integer multiplication one time step after
// the operands change (the multiplier is combinational, zero cycles of
// latency). A watchdog ends the run with a failure if it hangs.
module tb_vedic_mul2;
  logic       clk;
  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0, failures = 0;

  always begin
    clk = 1'b0;
    #5;
    clk = 1'b1;
    #5;
  end

  vedic_mul2 dut (.a(a), .b(b), .q(q));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: vedic_mul2 test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        @(posedge clk);
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (q !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d got %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
