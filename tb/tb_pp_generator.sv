// Self-checking testbench for pp_generator at N = 8 (exhaustive over A and B) and N = 7
// (odd width, exhaustive). Each partial product PP_i is compared, modulo 2^N-1, with
// A * d_i * 4^i, where the Booth digit d_i is computed arithmetically from the bits of B
// (b(-1) = b(N-1) for even N, 0 for odd N). The count of partial products, ceil(N/2), is
// checked as well, and so is the double zero: triplets 000 and 111 must give 0...0 and
// 1...1 respectively.
module tb_pp_generator;
  import mbm_pkg::*;

  localparam int NE = 8;
  localparam int NO = 7;

  logic [NE-1:0]                ae, be;
  logic [num_pp(NE)-1:0][NE-1:0] ppe;
  logic [NO-1:0]                ao, bo;
  logic [num_pp(NO)-1:0][NO-1:0] ppo;

  int checks = 0, failures = 0;

  pp_generator #(.N(NE)) dut_e (.a(ae), .b(be), .pp(ppe));
  pp_generator #(.N(NO)) dut_o (.a(ao), .b(bo), .pp(ppo));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bit j of b for j in -1 .. 2*ceil(n/2)-1 with the design's boundary rules.
  function automatic int bbit(input longint unsigned b, input int n, input int j);
    if (j == -1) return (n % 2 == 0) ? int'((b >> (n - 1)) & 1) : 0;
    if (j >= n) return 0;
    return int'((b >> j) & 1);
  endfunction

  // |A * d * 4^i| modulo 2^n-1 as an integer in [0, 2^n-2].
  function automatic longint unsigned ref_pp(input longint unsigned a, input longint unsigned b,
                                             input int n, input int i);
    longint unsigned m = (64'd1 << n) - 1;
    int d = bbit(b, n, 2*i - 1) + bbit(b, n, 2*i) - 2 * bbit(b, n, 2*i + 1);
    longint unsigned mag = (a % m) * longint'(d < 0 ? -d : d);
    for (int k = 0; k < 2 * i; k++) mag = (mag * 2) % m;
    mag = mag % m;
    return (d < 0) ? (m - mag) % m : mag;
  endfunction

  function automatic int digit_code(input longint unsigned b, input int n, input int i);
    return 4 * bbit(b, n, 2*i + 1) + 2 * bbit(b, n, 2*i) + bbit(b, n, 2*i - 1);
  endfunction

  initial begin
    checks++;
    if ($bits(ppe) != NE * 4 || $bits(ppo) != NO * 4) begin
      failures++;
      $display("FAIL partial product count");
    end
    for (int a = 0; a < (1 << NE); a++) begin
      for (int b = 0; b < (1 << NE); b++) begin
        ae = NE'(a);
        be = NE'(b);
        ao = NO'(a);
        bo = NO'(b);
        #1;
        for (int i = 0; i < num_pp(NE); i++) begin
          automatic longint unsigned m = (64'd1 << NE) - 1;
          checks++;
          if (64'(ppe[i]) % m != ref_pp(64'(a), 64'(b), NE, i)) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d a %h b %h PP%0d %h expected %h", NE, a, b, i, ppe[i], ref_pp(64'(a), 64'(b), NE, i));
          end
          if (digit_code(64'(b), NE, i) == 0 || digit_code(64'(b), NE, i) == 7) begin
            checks++;
            if (ppe[i] != ((digit_code(64'(b), NE, i) == 7) ? '1 : '0)) begin
              failures++;
              if (failures < 10) $display("FAIL N=%0d b %h PP%0d zero digit gives %h", NE, b, i, ppe[i]);
            end
          end
        end
        if (a < (1 << NO) && b < (1 << NO)) begin
          for (int i = 0; i < num_pp(NO); i++) begin
            automatic longint unsigned m = (64'd1 << NO) - 1;
            checks++;
            if (64'(ppo[i]) % m != ref_pp(64'(a), 64'(b), NO, i)) begin
              failures++;
              if (failures < 10) $display("FAIL N=%0d a %h b %h PP%0d %h expected %h", NO, a, b, i, ppo[i], ref_pp(64'(a), 64'(b), NO, i));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
