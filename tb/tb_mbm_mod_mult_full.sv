// Full-size testbench: mbm_mod_mult with every parameter at its default (N = 8, Wallace-tree
// reduction, plain end-around-carry final adder), driven with all 2^16 operand pairs. Each
// result must be congruent to A*B modulo 255; an all-ones result is accepted as zero. The
// number of all-ones results is reported.
module tb_mbm_mod_mult_full;
  localparam int N = 8;
  localparam int MOD = (1 << N) - 1;

  logic [N-1:0] a, b, p;
  int checks = 0, failures = 0, ones = 0;

  mbm_mod_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < (1 << N); va++) begin
      for (int vb = 0; vb < (1 << N); vb++) begin
        a = N'(va);
        b = N'(vb);
        #1;
        checks++;
        if (int'(p) % MOD != ((va % MOD) * (vb % MOD)) % MOD) begin
          failures++;
          if (failures < 10) $display("FAIL %h * %h gave %h", a, b, p);
        end
        if (p == '1) ones++;
      end
    end
    $display("all-ones (zero) results: %0d", ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
