// Self-checking testbench for booth_encoder: all eight triplets. The digit carried on the
// {neg, one, two} bus is decoded and compared with b(2i-1) + b(2i) - 2*b(2i+1); for the zero
// digit the bus must select nothing, and neg must equal b(2i+1).
module tb_booth_encoder;
  import mbm_pkg::*;

  logic        b_hi, b_mid, b_lo;
  booth_code_t code;
  int          checks = 0, failures = 0;

  booth_encoder dut (.b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo), .code(code));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int digit, mag, got;
      {b_hi, b_mid, b_lo} = 3'(t);
      #1;
      digit = int'(b_lo) + int'(b_mid) - 2 * int'(b_hi);
      mag   = (digit < 0) ? -digit : digit;
      // never both magnitudes at once
      checks++;
      if (code.one && code.two) begin
        failures++;
        $display("FAIL triplet %03b: one and two both set", t[2:0]);
      end
      got = code.one ? 1 : (code.two ? 2 : 0);
      if (code.neg) got = -got;
      checks++;
      if (got != digit) begin
        failures++;
        $display("FAIL triplet %03b: digit %0d, bus decodes to %0d", t[2:0], digit, got);
      end
      checks++;
      if (code.neg != b_hi) begin
        failures++;
        $display("FAIL triplet %03b: neg %0b", t[2:0], code.neg);
      end
      if (mag == 0) begin
        checks++;
        if (code.one || code.two) begin
          failures++;
          $display("FAIL triplet %03b: zero digit selects a multiple", t[2:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
