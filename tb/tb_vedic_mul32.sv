// tb_vedic_mul32: end-to-end self-checking test of the whole multiplier tree,
// the 32x32 Vedic multiplier at its only size, with nothing overridden.
//
// Operands are corner values in every pairing, then random pairs drawn from
// three mixes (uniform, mostly-ones, mostly-zeros), one pair per testbench
// clock cycle. The 64-bit product is compared with 64-bit integer
// multiplication one time step after the operands change: the multiplier is
// combinational, so its latency is zero cycles.
//
// The test also counts how often the mechanisms of the construction were
// exercised, working them out from the operands on its own:
//   zero      an operand is zero
//   max       both operands are all ones, the largest product
//   midcarry  the crosswise column at weight 2^16 (aH*bL + aL*bH plus the
//             upper half of aL*bL) carries into the aH*bH column
//   crosscarry the upper half of aL*bH plus the lower half of aH*bH
//             overflows 16 bits inside the cross-term adder
//   example   the 8x8 example 137 * 73 = 10001, here as 32-bit operands
// A mechanism that never happened counts as a failure.
module tb_vedic_mul32;
  localparam int unsigned NRAND = 200_000;

  logic        clk;
  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;
  int n_zero = 0, n_max = 0, n_midcarry = 0, n_crosscarry = 0, n_example = 0;
  logic [31:0] corner [10] = '{32'h0000_0000, 32'h0000_0001, 32'hFFFF_FFFF,
                               32'h8000_0000, 32'h0000_FFFF, 32'hFFFF_0000,
                               32'h5555_5555, 32'hAAAA_AAAA, 32'h0000_0089,
                               32'h0000_0049};

  always begin
    clk = 1'b0;
    #5;
    clk = 1'b1;
    #5;
  end

  vedic_mul32 dut (.a(a), .b(b), .p(p));

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog: vedic_mul32 test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] av, input logic [31:0] bv);
    logic [63:0] expected, ll, hl, lh, hh;
    @(posedge clk);
    a = av;
    b = bv;
    #1;
    expected = 64'(av) * 64'(bv);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h got %h expected %h", av, bv, p, expected);
    end
    // Mechanism bookkeeping from the four half products.
    ll = 64'(av[15:0])  * 64'(bv[15:0]);
    hl = 64'(av[31:16]) * 64'(bv[15:0]);
    lh = 64'(av[15:0])  * 64'(bv[31:16]);
    hh = 64'(av[31:16]) * 64'(bv[31:16]);
    if (av == 0 || bv == 0) n_zero++;
    if (av == '1 && bv == '1) n_max++;
    if (((ll >> 16) + hl + lh) >> 32 != 0) n_midcarry++;
    if (((lh >> 16) + (hh & 64'hFFFF)) >> 16 != 0) n_crosscarry++;
    if (av == 32'd137 && bv == 32'd73 && p == 64'd10001) n_example++;
  endtask

  initial begin
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    for (int n = 0; n < NRAND; n++) begin
      case (n % 3)
        0: apply($urandom, $urandom);
        1: apply($urandom | $urandom | $urandom, $urandom | $urandom | $urandom);
        default: apply($urandom & $urandom & $urandom, $urandom & $urandom);
      endcase
    end
    $display("mechanisms: zero=%0d max=%0d midcarry=%0d crosscarry=%0d example=%0d",
             n_zero, n_max, n_midcarry, n_crosscarry, n_example);
    checks += 5;
    if (n_zero == 0)       begin failures++; $display("FAIL zero operand never applied"); end
    if (n_max == 0)        begin failures++; $display("FAIL all-ones operands never applied"); end
    if (n_midcarry == 0)   begin failures++; $display("FAIL middle-column carry never happened"); end
    if (n_crosscarry == 0) begin failures++; $display("FAIL cross-adder carry never happened"); end
    if (n_example == 0)    begin failures++; $display("FAIL 137 * 73 example never passed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
