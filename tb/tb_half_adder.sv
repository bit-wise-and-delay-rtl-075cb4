// tb_half_adder: exhaustive self-checking test of the one-bit half adder.
// All four input pairs are applied, one per clock cycle of a testbench clock;
// the sum and carry are compared with the two bits of x + y computed in
// integer arithmetic. A watchdog ends the run with a failure if it hangs.
module tb_half_adder;
  logic clk;
  logic x, y, s, c;
  int checks = 0, failures = 0;

  always begin
    clk = 1'b0;
    #5;
    clk = 1'b1;
    #5;
  end

  half_adder dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: half_adder test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(posedge clk);
      x = v[0];
      y = v[1];
      #1;
      checks++;
      if ({c, s} !== 2'(int'(v[0]) + int'(v[1]))) begin
        failures++;
        $display("FAIL x=%0d y=%0d got c=%0d s=%0d", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
