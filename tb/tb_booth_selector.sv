// Self-checking testbench for booth_selector: every legal bus value (digit -2..+2, plus the
// inverted zero of triplet 111) with every pair of multiplicand bits. The expected bit is the
// selected bit of A (digit +-1) or of 2A (digit +-2), inverted for negative digits.
module tb_booth_selector;
  import mbm_pkg::*;

  booth_code_t code;
  logic        a_j, a_jm1, pp;
  int          checks = 0, failures = 0;

  booth_selector dut (.code(code), .a_j(a_j), .a_jm1(a_jm1), .pp(pp));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      if (c[1] && c[0]) continue;  // one and two never together
      for (int v = 0; v < 4; v++) begin
        logic exp_bit;
        code  = booth_code_t'(c[2:0]);
        a_j   = v[0];
        a_jm1 = v[1];
        #1;
        if (code.one)      exp_bit = a_j;
        else if (code.two) exp_bit = a_jm1;
        else               exp_bit = 1'b0;
        if (code.neg) exp_bit = !exp_bit;
        checks++;
        if (pp !== exp_bit) begin
          failures++;
          $display("FAIL code %03b a_j %0b a_jm1 %0b: pp %0b expected %0b", c[2:0], a_j, a_jm1, pp, exp_bit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
