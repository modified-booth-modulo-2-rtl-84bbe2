// Self-checking testbench for eac_csa at N = 8 (exhaustive over x and y for a set of z) and
// N = 13 (random). Checks s = x ^ y ^ z bit by bit and s + c = x + y + z modulo 2^N-1, and
// counts the vectors in which the top carry actually wraps to bit 0.
module tb_eac_csa;
  localparam int NA = 8;
  localparam int NB = 13;

  logic [NA-1:0] xa, ya, za, sa, ca;
  logic [NB-1:0] xb, yb, zb, sb, cb;
  int checks = 0, failures = 0, wraps = 0;

  eac_csa #(.N(NA)) dut_a (.x(xa), .y(ya), .z(za), .s(sa), .c(ca));
  eac_csa #(.N(NB)) dut_b (.x(xb), .y(yb), .z(zb), .s(sb), .c(cb));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned modm(input longint unsigned v, input int n);
    return v % ((64'd1 << n) - 1);
  endfunction

  initial begin
    for (int zi = 0; zi < 8; zi++) begin
      for (int xi = 0; xi < 256; xi++) begin
        for (int yi = 0; yi < 256; yi++) begin
          xa = NA'(xi);
          ya = NA'(yi);
          za = (zi == 0) ? '0 : (zi == 1) ? '1 : NA'($urandom);
          #1;
          checks++;
          if (sa != (xa ^ ya ^ za) ||
              modm(64'(sa) + 64'(ca), NA) != modm(64'(xa) + 64'(ya) + 64'(za), NA)) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d x %h y %h z %h: s %h c %h", NA, xa, ya, za, sa, ca);
          end
          if (ca[0]) wraps++;
        end
      end
    end
    for (int t = 0; t < 20000; t++) begin
      xb = NB'($urandom);
      yb = NB'($urandom);
      zb = NB'($urandom);
      #1;
      checks++;
      if (sb != (xb ^ yb ^ zb) ||
          modm(64'(sb) + 64'(cb), NB) != modm(64'(xb) + 64'(yb) + 64'(zb), NB)) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d x %h y %h z %h: s %h c %h", NB, xb, yb, zb, sb, cb);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL end-around carry never exercised");
    end
    $display("end-around carries exercised: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
