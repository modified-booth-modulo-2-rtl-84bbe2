// Self-checking testbench for full_adder: all eight input combinations, 2*c + s = x + y + z.
module tb_full_adder;
  logic x, y, z, s, c;
  int   checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      {x, y, z} = 3'(t);
      #1;
      checks++;
      if (2 * int'(c) + int'(s) != int'(x) + int'(y) + int'(z)) begin
        failures++;
        $display("FAIL %0b%0b%0b: c %0b s %0b", x, y, z, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
