// Self-checking testbench for csa_array. Several instances (operand counts M = 2, 3, 4, 5, 8, 9,
// 16, 17, 32 at widths 8, 13 and 32) are fed random operands, with all-ones and all-zeros
// operands mixed in; sum + carry must equal the sum of the operands modulo 2^N-1.
module tb_csa_array;
  import mbm_pkg::*;

  localparam int NCFG = 9;
  localparam int MS [NCFG] = '{2, 3, 4, 5, 8, 9, 16, 17, 32};
  localparam int NS [NCFG] = '{8, 8, 8, 13, 8, 13, 32, 13, 32};
  localparam int VECS = 3000;

  int checks = 0, failures = 0;
  logic [NCFG-1:0] done;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int M = MS[g];
    localparam int N = NS[g];
    localparam longint unsigned MOD = (64'd1 << N) - 1;

    logic [M-1:0][N-1:0] ops;
    logic [N-1:0]        sum, carry;

    csa_array #(.N(N), .M(M)) dut (.ops(ops), .sum(sum), .carry(carry));

    initial begin
      done[g] = 1'b0;
      for (int t = 0; t < VECS; t++) begin
        longint unsigned total;
        total = 0;
        for (int o = 0; o < M; o++) begin
          automatic int sel = $urandom_range(0, 7);
          ops[o] = (sel == 0) ? '0 : (sel == 1) ? '1 : N'({$urandom, $urandom});
          total += 64'(ops[o]);
        end
        #1;
        checks++;
        if ((64'(sum) + 64'(carry)) % MOD != total % MOD) begin
          failures++;
          if (failures < 10) $display("FAIL M=%0d N=%0d: sum %h carry %h", M, N, sum, carry);
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    #1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
