// Self-checking testbench of rsa_core at K = 128.
//
// A random 128-bit ZUC key is RSA-encrypted in the testbench (public
// exponent 65537, wide-integer square-and-multiply), shifted in as four
// 32-bit words, most significant first, and decrypted. Checks: zuc_key
// equals the original key when decrypt_done pulses, the cycle count
// (K+3+K/32)*(K + popcount(d) + 2) + 2, zuc_key_valid low while busy and
// high afterwards, and that zuc_key keeps the previous key during the next
// decryption.
module tb_rsa_core;
  localparam int K = 128;
  localparam logic [K-1:0] N = 128'hcd8b8b191e7914f2d50c4719bec7181b;
  localparam logic [K-1:0] D = 128'h0f93fee3d57a69cae6f0b460aa401499;
  localparam int T = K + 3 + K / 32;
  logic         clk = 1'b0, rst_n = 1'b0, ct_wr = 1'b0, start = 1'b0;
  logic [31:0]  ct_word = '0;
  logic [K-1:0] rmodn, r2modn;
  logic [127:0] zuc_key;
  logic         zuc_key_valid, decrypt_done, busy;
  int           checks = 0, failures = 0;

  rsa_core #(.K(K)) dut (.clk, .rst_n, .ct_wr, .ct_word, .start, .n(N), .d(D), .rmodn, .r2modn,
                         .zuc_key, .zuc_key_valid, .decrypt_done, .busy);

  always #5 clk = ~clk;

  function automatic logic [K-1:0] powmod(input logic [K-1:0] base, input logic [K-1:0] e);
    logic [2*K-1:0] acc, bb;
    acc = 1;
    bb  = (2*K)'(base);
    for (int i = 0; i < K; i++) begin
      if (e[i]) acc = (acc * bb) % (2*K)'(N);
      bb = (bb * bb) % (2*K)'(N);
    end
    return K'(acc);
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] msg, ct;
    logic [127:0] prev;
    logic [3*K:0] w;
    int cyc;
    w = ((3*K+1)'(1) << (K + 2)) % (3*K+1)'(N);      rmodn  = K'(w);
    w = ((3*K+1)'(1) << (2*K + 4)) % (3*K+1)'(N);    r2modn = K'(w);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("valid low after reset", !zuc_key_valid);
    prev = '0;
    for (int t = 0; t < 4; t++) begin
      msg = {$urandom, $urandom, $urandom, $urandom};
      msg = msg % N;
      ct  = powmod(msg, 65537);
      for (int i = K / 32 - 1; i >= 0; i--) begin
        ct_wr = 1'b1; ct_word = ct[32*i +: 32];
        @(negedge clk);
      end
      ct_wr = 1'b0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      check("busy after start", busy);
      check("valid low while busy", !zuc_key_valid);
      check("old key kept while busy", zuc_key == prev);
      while (!decrypt_done) begin
        @(negedge clk);
        cyc++;
      end
      check($sformatf("key %0d: got %h expected %h", t, zuc_key, msg[127:0]), zuc_key == msg[127:0]);
      check("valid after done", zuc_key_valid);
      check($sformatf("cycles %0d expected %0d", cyc, T * (K + $countones(D) + 2) + 2),
            cyc == T * (K + $countones(D) + 2) + 2);
      prev = zuc_key;
      repeat (3) @(negedge clk);
      check("valid holds", zuc_key_valid && zuc_key == prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
