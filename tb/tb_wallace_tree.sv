// Self-checking testbench for wallace_tree. Several instances (operand counts M = 2, 3, 4, 5, 8, 9,
// 16, 17, 32 at widths 8, 13 and 32) are fed random operands, with all-ones and all-zeros
// operands mixed in; sum + carry must equal the sum of the operands modulo 2^N-1.
module tb_wallace_tree;
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

    wallace_tree #(.N(N), .M(M)) dut (.ops(ops), .sum(sum), .carry(carry));

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

  // Depth of the tree in full adders against k(x) = 0,1,2,3,4,4,6,6,8 for
  // x = 2,3,4,5,8,9,16,17,32.
  localparam int KX [NCFG] = '{0, 1, 2, 3, 4, 4, 6, 6, 8};

  initial begin
    for (int g = 0; g < NCFG; g++) begin
      checks++;
      if (wallace_depth(MS[g]) != KX[g]) begin
        failures++;
        $display("FAIL depth for %0d operands: %0d, expected %0d", MS[g], wallace_depth(MS[g]), KX[g]);
      end
    end
    // the instantiated tree has exactly that many levels
    checks++;
    if ($size(g_cfg[8].dut.g_lvl[8].v) != 2) begin
      failures++;
      $display("FAIL 32-operand tree does not end with two operands after 8 levels");
    end
    #1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
