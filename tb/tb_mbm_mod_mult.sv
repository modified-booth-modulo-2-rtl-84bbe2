// End-to-end testbench of the modified Booth modulo 2^N-1 multiplier. It runs the widths the
// design is evaluated at (N = 4, 8, 16, 32) with both reduction schemes, an odd width (N = 5,
// 7) and the single-zero final adder, exhaustively up to N = 8 and with random operands
// above. Each configuration checks every product against A*B modulo 2^N-1; this module
// adds up the checks and fails the run if any mechanism of the design (each Booth digit
// value, the wrapped b(N-1) digit of even widths, the end-around carries of the reduction
// and of the final adder, the all-ones operand and the all-ones zero result) never occurred.
module tb_mbm_mod_mult;
  import mbm_pkg::*;

  localparam int NCFG = 10;
  logic [NCFG-1:0] done;

  tb_mult_cfg #(.N(8),  .REDUCTION(RED_WALLACE), .EXHAUSTIVE(1'b1)) c0 (.done(done[0]));
  tb_mult_cfg #(.N(8),  .REDUCTION(RED_CSA),     .EXHAUSTIVE(1'b1)) c1 (.done(done[1]));
  tb_mult_cfg #(.N(4),  .REDUCTION(RED_WALLACE), .EXHAUSTIVE(1'b1)) c2 (.done(done[2]));
  tb_mult_cfg #(.N(5),  .REDUCTION(RED_CSA),     .EXHAUSTIVE(1'b1)) c3 (.done(done[3]));
  tb_mult_cfg #(.N(7),  .REDUCTION(RED_WALLACE), .EXHAUSTIVE(1'b1), .SINGLE_ZERO(1'b1)) c4 (.done(done[4]));
  tb_mult_cfg #(.N(8),  .REDUCTION(RED_WALLACE), .EXHAUSTIVE(1'b1), .SINGLE_ZERO(1'b1)) c5 (.done(done[5]));
  tb_mult_cfg #(.N(16), .REDUCTION(RED_WALLACE), .VECS(50000)) c6 (.done(done[6]));
  tb_mult_cfg #(.N(16), .REDUCTION(RED_CSA),     .VECS(50000)) c7 (.done(done[7]));
  tb_mult_cfg #(.N(32), .REDUCTION(RED_WALLACE), .VECS(50000)) c8 (.done(done[8]));
  tb_mult_cfg #(.N(32), .REDUCTION(RED_CSA),     .VECS(50000)) c9 (.done(done[9]));

  int checks, failures;

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic mech(input string what, input int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    #1;
    wait (&done);
    checks = c0.checks + c1.checks + c2.checks + c3.checks + c4.checks
           + c5.checks + c6.checks + c7.checks + c8.checks + c9.checks;
    failures = c0.failures + c1.failures + c2.failures + c3.failures + c4.failures
             + c5.failures + c6.failures + c7.failures + c8.failures + c9.failures;
    $display("mechanisms exercised:");
    mech("digit -2",                        c0.dig_cnt[0] + c8.dig_cnt[0]);
    mech("digit -1",                        c0.dig_cnt[1] + c8.dig_cnt[1]);
    mech("digit 0 (triplet 000)",           c0.dig_cnt[2] + c8.dig_cnt[2]);
    mech("digit 0 (triplet 111)",           c0.dig_cnt[5] + c8.dig_cnt[5]);
    mech("digit +1",                        c0.dig_cnt[3] + c8.dig_cnt[3]);
    mech("digit +2",                        c0.dig_cnt[4] + c8.dig_cnt[4]);
    mech("b(N-1) wrapped into first digit", c0.wrap_digit + c6.wrap_digit + c8.wrap_digit);
    mech("reduction end-around carry, Wallace", c0.red_eac + c8.red_eac);
    mech("reduction end-around carry, CSA", c1.red_eac + c9.red_eac);
    mech("final adder end-around carry",    c0.add_eac + c8.add_eac);
    mech("all-ones operand",                c0.ones_in + c8.ones_in);
    mech("all-ones (second zero) result",   c0.ones_out + c1.ones_out);
    mech("odd width",                       c3.checks + c4.checks);
    mech("single-zero adder",               c4.checks + c5.checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
