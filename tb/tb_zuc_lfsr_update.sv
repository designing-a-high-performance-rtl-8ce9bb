// Self-checking testbench of zuc_lfsr_update.
//
// Drives random 31-bit cell values (including the all-ones value that stands
// for 0 modulo 2^31-1) and random W words in both modes, and compares s16
// with a reference computed by plain 64-bit integer arithmetic:
// (2^15 s15 + 2^17 s13 + 2^21 s10 + 2^20 s4 + 257 s0 + mode*(W>>1)) mod
// (2^31-1), with 0 mapped to 2^31-1.
module tb_zuc_lfsr_update;
  logic [30:0] s0, s4, s10, s13, s15, s16;
  logic [31:0] w;
  logic        init;
  int          checks = 0, failures = 0;

  zuc_lfsr_update dut (.s0, .s4, .s10, .s13, .s15, .w, .init, .s16);

  function automatic logic [30:0] rnd31(input int sel);
    case (sel % 8)
      0: return 31'h7FFFFFFF;
      1: return 31'h1;
      default: return 31'($urandom);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned p, acc;
    p = 64'h7FFFFFFF;
    for (int t = 0; t < 20000; t++) begin
      s0 = rnd31($urandom); s4 = rnd31($urandom); s10 = rnd31($urandom);
      s13 = rnd31($urandom); s15 = rnd31($urandom);
      w = $urandom; init = t[0];
      #1;
      acc = ((64'(s15) << 15) % p + (64'(s13) << 17) % p + (64'(s10) << 21) % p +
             (64'(s4) << 20) % p + (64'(s0) * 257) % p + (init ? 64'(w >> 1) : 64'd0)) % p;
      if (acc == 0) acc = p;
      checks++;
      if (64'(s16) != acc) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d init=%0d s16=%08h exp=%08h", t, init, s16, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
