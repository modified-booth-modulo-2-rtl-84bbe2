// Self-checking testbench for mod_adder: exhaustive over both 8-bit summands for both
// settings of SINGLE_ZERO, plus random 32-bit summands. The plain end-around-carry adder
// must give exactly x + y, minus 2^N-1 when that sum reaches 2^N (so x + y = 2^N-1 shows as
// all ones); with SINGLE_ZERO the result must be the residue in [0, 2^N-2]. The end-around carry and the all-ones result are counted and must
// both occur.
module tb_mod_adder;
  localparam int N  = 8;
  localparam int NW = 32;

  logic [N-1:0]  x, y, s0, s1;
  logic [NW-1:0] xw, yw, sw;
  int checks = 0, failures = 0, wraps = 0, ones = 0;

  mod_adder #(.N(N), .SINGLE_ZERO(1'b0)) dut0 (.x(x), .y(y), .s(s0));
  mod_adder #(.N(N), .SINGLE_ZERO(1'b1)) dut1 (.x(x), .y(y), .s(s1));
  mod_adder #(.N(NW))                    dutw (.x(xw), .y(yw), .s(sw));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned eac_ref(input longint unsigned a, input longint unsigned b,
                                              input int n);
    longint unsigned t = a + b;
    return (t >= (64'd1 << n)) ? t - ((64'd1 << n) - 1) : t;
  endfunction

  initial begin
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        automatic longint unsigned m = (64'd1 << N) - 1;
        x = N'(a);
        y = N'(b);
        #1;
        checks++;
        if (64'(s0) != eac_ref(64'(a), 64'(b), N)) begin
          failures++;
          if (failures < 10) $display("FAIL x %h y %h: s %h", x, y, s0);
        end
        checks++;
        if (64'(s1) != (64'(a) + 64'(b)) % m) begin
          failures++;
          if (failures < 10) $display("FAIL SINGLE_ZERO x %h y %h: s %h", x, y, s1);
        end
        if (a + b >= (1 << N)) wraps++;
        if (s0 == '1) ones++;
      end
    end
    for (int t = 0; t < 20000; t++) begin
      xw = $urandom;
      yw = (t % 7 == 0) ? ~xw : $urandom;
      #1;
      checks++;
      if (64'(sw) != eac_ref(64'(xw), 64'(yw), NW)) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 x %h y %h: s %h", xw, yw, sw);
      end
    end
    checks += 2;
    if (wraps == 0) begin failures++; $display("FAIL no end-around carry"); end
    if (ones == 0)  begin failures++; $display("FAIL no all-ones zero"); end
    $display("end-around carries %0d, all-ones results %0d", wraps, ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
