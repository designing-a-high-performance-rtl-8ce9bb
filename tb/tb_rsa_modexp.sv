// Self-checking testbench of rsa_modexp at K = 64.
//
// Random messages m are encrypted in the testbench with the public
// exponent 65537 (square-and-multiply on wide integers), the ciphertexts
// are decrypted by the exponentiator with the matching private exponent,
// and the result must equal m. The cycle count from start to done must be
// (K+3+K/32)*(K + popcount(d) + 2) + 1. Exponents with few set bits and
// the value 1 are also run against a direct reference.
module tb_rsa_modexp;
  localparam int K = 64;
  localparam logic [K-1:0] N = 64'hc44a92944d3087f3;
  localparam logic [K-1:0] D = 64'h5a76f3ee4e522741;
  localparam int T = K + 3 + K / 32;
  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K-1:0] c = '0, d = '0, m, b, r2;
  logic         busy, done;
  int           checks = 0, failures = 0;

  rsa_modexp #(.K(K)) dut (.clk, .rst_n, .start, .c, .n(N), .d, .b, .r2, .m, .busy, .done);

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

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [K-1:0] cin, input logic [K-1:0] din, input logic [K-1:0] exp);
    int cyc;
    @(negedge clk);
    c = cin; d = din; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (m !== exp) begin
      failures++;
      $display("FAIL c=%0h d=%0h m=%0h expected %0h", cin, din, m, exp);
    end
    if (cyc != T * (K + $countones(din) + 2) + 1) begin
      failures++;
      $display("FAIL cycles %0d expected %0d", cyc, T * (K + $countones(din) + 2) + 1);
    end
  endtask

  initial begin
    logic [K-1:0] msg, ct;
    logic [3*K:0] w;
    w  = ((3*K+1)'(1) << (K + 2)) % (3*K+1)'(N);
    b  = K'(w);
    w  = ((3*K+1)'(1) << (2*K + 4)) % (3*K+1)'(N);
    r2 = K'(w);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 12; t++) begin
      msg = K'({$urandom, $urandom} % N);
      ct  = powmod(msg, 65537);
      run(ct, D, msg);
    end
    run(64'h1234_5678_9abc_def0 % N, 64'd1, 64'h1234_5678_9abc_def0 % N);
    run(64'h0fed_cba9_8765_4321, 64'h8000_0000_0000_0003, powmod(64'h0fed_cba9_8765_4321, 64'h8000_0000_0000_0003));
    run(64'd2, 64'hffff_ffff_ffff_ffff, powmod(64'd2, 64'hffff_ffff_ffff_ffff));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
