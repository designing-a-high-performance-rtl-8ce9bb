// End-to-end testbench of cryptosystem_top with every parameter at its
// default (1024-bit RSA, 256-word packets, 256-word FIFOs).
//
// The testbench plays the server: it RSA-encrypts two ZUC keys with the
// public exponent 65537 (wide-integer arithmetic), builds a stream of six
// packets and encrypts their video with a ZUC keystream computed by its own
// model of the cipher. Packet signaling: 3 (first key, apply), 0, 1 (second
// key, keep decrypting with the first), 0, 2 (apply the second key), 0.
// The video of packets 0 and 4 starts with fixed words (1, 2, 3, ... and
// 00190cdf, 00190ce0, ...), whose first six decrypted words are also
// checked against fixed reference values.
//
// The stream is written into FIFO IN with gaps and FIFO OUT is drained with
// long pauses. Every decrypted word is compared with the plaintext. It
// counts, and requires at least once: a stall for the first key, video
// decrypted while RSA works on the next key, a stall at the apply
// packet, the output FIFO reaching almost full, the input FIFO running
// empty during video, a pause through enable, and a run of 200
// consecutive decrypted words at one word per clock. The RSA decryption
// time must be (K+3+K/32)*(K + popcount(d) + 2) + 2 cycles.
module tb_cryptosystem_top;
  import crypto_pkg::ZUC_S0;
  import crypto_pkg::ZUC_S1;
  import crypto_pkg::ZUC_D;

  localparam int K  = 1024;
  localparam int VW = 256;
  localparam int NPKT = 6;
  localparam logic [K-1:0] N = 1024'hcccb6c1a78a397a5f91cdbc94e989563ea1f1cafa7cf9c351d67d962adf4c797e1b4aabe5ccf4d65f0d27b97f9dcea227ff224a8a6315250421ff61af681a75d8b87e1f965fc26170219fd81494f1f8ae3033527d62770b83571732de9e885dc042148f17cba99516173ce2d9bd94378844de8e71cd9eb1e92e770fea30c3ba7;
  localparam logic [K-1:0] D = 1024'hcacc3e56d0541f9de9dc1c0172e5423a58e34a42dfc885054c03448fa5779a16db194f63870079c29301bc063915fc7d017a45b7042c1f38fee22b9173bddc7ecdc3a2070e38da23fedbe232b4b2ac3e09934c39f0a876e42c715d6b363f5f386bb77a8206dee3dc18c7113b4d9641d370fb6995ddbfb86ae817063263f2f7b1;
  localparam logic [127:0] IV   = 128'h84319aa8de6915ca1f6bda6bfbd8c766;
  localparam logic [127:0] KEY1 = 128'h3d4c4be96a82fdaeb58f641db17b455b;
  localparam logic [127:0] KEY2 = 128'h444c4be96a82fdaeb58f641db17b4544;

  logic         clk = 1'b0, reset_n = 1'b0, enable = 1'b0;
  logic         in_wr = 1'b0, in_full, out_rd = 1'b0, out_empty;
  logic [31:0]  in_data = '0, out_data;
  logic [K-1:0] rsa_rmodn, rsa_r2modn;
  logic         zuc_key_valid, decrypt_done;
  int           checks = 0, failures = 0;

  cryptosystem_top dut (
    .clk, .reset_n, .enable, .in_wr, .in_data, .in_full, .out_rd, .out_data, .out_empty,
    .rsa_n(N), .rsa_d(D), .rsa_rmodn, .rsa_r2modn, .zuc_iv(IV), .zuc_key_valid, .decrypt_done);

  always #4 clk = ~clk;     // 125 MHz

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- ZUC model
  logic [30:0] zs [16];
  logic [31:0] zr1, zr2;

  function automatic logic [31:0] rl(input logic [31:0] x, input int k);
    return {x, x} >> (32 - k);
  endfunction
  function automatic logic [31:0] sb(input logic [31:0] x);
    return {ZUC_S0[x[31:24]], ZUC_S1[x[23:16]], ZUC_S0[x[15:8]], ZUC_S1[x[7:0]]};
  endfunction
  function automatic logic [30:0] mulpow(input logic [30:0] x, input int k);
    longint unsigned t;
    t = (64'(x) << k) % 64'h7FFFFFFF;
    return 31'(t);
  endfunction
  // one round: returns W ^ X3, steps the LFSR with u = W>>1 if init
  function automatic logic [31:0] zuc_round(input bit init);
    logic [31:0] x0, x1, x2, x3, w, w1, w2, u, v;
    longint unsigned acc;
    x0 = {zs[15][30:15], zs[14][15:0]};
    x1 = {zs[11][15:0], zs[9][30:15]};
    x2 = {zs[7][15:0], zs[5][30:15]};
    x3 = {zs[2][15:0], zs[0][30:15]};
    w  = (x0 ^ zr1) + zr2;
    w1 = zr1 + x1; w2 = zr2 ^ x2;
    u  = {w1[15:0], w2[31:16]};
    v  = {w2[15:0], w1[31:16]};
    zr1 = sb(u ^ rl(u, 2) ^ rl(u, 10) ^ rl(u, 18) ^ rl(u, 24));
    zr2 = sb(v ^ rl(v, 8) ^ rl(v, 14) ^ rl(v, 22) ^ rl(v, 30));
    acc = (64'(mulpow(zs[15], 15)) + 64'(mulpow(zs[13], 17)) + 64'(mulpow(zs[10], 21)) +
           64'(mulpow(zs[4], 20)) + 64'(mulpow(zs[0], 8)) + 64'(zs[0]) +
           (init ? 64'(w >> 1) : 64'd0)) % 64'h7FFFFFFF;
    if (acc == 0) acc = 64'h7FFFFFFF;
    for (int i = 0; i < 15; i++) zs[i] = zs[i+1];
    zs[15] = 31'(acc);
    return w ^ x3;
  endfunction
  function automatic void zuc_init(input logic [127:0] k, input logic [127:0] iv);
    for (int i = 0; i < 16; i++) zs[i] = {k[127-8*i -: 8], ZUC_D[i], iv[127-8*i -: 8]};
    zr1 = '0; zr2 = '0;
    for (int i = 0; i < 32; i++) void'(zuc_round(1'b1));
    void'(zuc_round(1'b0));
  endfunction

  // ---------------------------------------------------------- RSA model
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

  // ---------------------------------------------------------- stream
  logic [31:0] stream [$];
  logic [31:0] plain [$];

  task automatic build_stream();
    logic [1:0]   sig [NPKT] = '{2'd3, 2'd0, 2'd1, 2'd0, 2'd2, 2'd0};
    logic [K-1:0] msg, ct;
    logic [31:0]  c;
    for (int p = 0; p < NPKT; p++) begin
      stream.push_back({30'd0, sig[p]});
      if (sig[p][0]) begin
        msg = {1'b0, {(K-1-128)/32{$urandom}}, 31'($urandom), (p == 0) ? KEY1 : KEY2};
        check("message below n", msg < N);
        ct = powmod(msg, 65537);
        for (int i = K / 32 - 1; i >= 0; i--) stream.push_back(ct[32*i +: 32]);
      end
      if (p == 0) zuc_init(KEY1, IV);
      if (p == 4) zuc_init(KEY2, IV);
      for (int i = 0; i < VW; i++) begin
        if (p == 0)      c = 32'(i + 1);             // fixed reference inputs
        else if (p == 4) c = 32'h0019_0cdf + 32'(i);
        else             c = $urandom;
        stream.push_back(c);
        plain.push_back(c ^ zuc_round(1'b0));
      end
    end
  endtask

  // ---------------------------------------------------------- monitors
  int st_first_key, par_words, st_apply, af_cycles, empty_cycles, en_low, run, max_run;
  int rsa_start_cyc, rsa_cycles [$];

  always @(posedge clk) if (reset_n) begin
    if (dut.u_ctrl.state == 3'd4 && dut.u_rsa.busy) begin
      if (dut.zuc_ready) st_apply++; else st_first_key++;
    end
    if (dut.fifo_wr_req && dut.u_rsa.busy) par_words++;
    if (dut.fifo_almost_full) af_cycles++;
    if (dut.u_ctrl.state == 3'd6 && dut.fifo_almost_empty && enable) empty_cycles++;
    if (!enable) en_low++;
    run = dut.fifo_wr_req ? run + 1 : 0;
    if (run > max_run) max_run = run;
    if (dut.rsa_start) rsa_start_cyc = 0;
    else rsa_start_cyc++;
    if (decrypt_done) rsa_cycles.push_back(rsa_start_cyc);
  end

  // ---------------------------------------------------------- drivers
  initial begin
    logic [3*K+4:0] w;
    int nwords;
    w = ((3*K+5)'(1) << (K + 2)) % (3*K+5)'(N);     rsa_rmodn  = K'(w);
    w = ((3*K+5)'(1) << (2*K + 4)) % (3*K+5)'(N);   rsa_r2modn = K'(w);
    build_stream();
    nwords = stream.size();
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    enable  = 1'b1;
    for (int i = 0; i < nwords; i++) begin
      while (in_full) @(negedge clk);
      in_wr = 1'b1; in_data = stream[i];
      @(negedge clk);
      in_wr = 1'b0;
      // a gap in packet 5 starves the controller; a pause through enable
      if (i > nwords - 40) repeat (10) @(negedge clk);
      if (i == nwords - 50) begin
        enable = 1'b0;
        repeat (20) @(negedge clk);
        enable = 1'b1;
      end
    end
  end

  initial begin
    int got;
    logic [31:0] ref1 [6] = '{32'h14F1C273, 32'h3279C41B, 32'h4B8EA41E, 32'h0CC80867, 32'hD28062E4, 32'hE71D3DDC};
    logic [31:0] ref2 [6] = '{32'h03983B74, 32'h6E31D09D, 32'h42E2AD4A, 32'h6F40660E, 32'hFC630C95, 32'h481F9D1E};
    run = 0; max_run = 0; got = 0; rsa_start_cyc = 0;
    st_first_key = 0; par_words = 0; st_apply = 0; af_cycles = 0; empty_cycles = 0; en_low = 0;
    wait (reset_n);
    while (got < NPKT * VW) begin
      @(negedge clk);
      // drain FIFO OUT, but hold off for a while in packet 2 so it fills up
      out_rd = !out_empty && !(got >= 2 * VW + 10 && got < 2 * VW + 20 && af_cycles < 50);
      if (out_rd) begin
        if (got < 6)                      check($sformatf("reference 1 word %0d", got), out_data == ref1[got]);
        if (got >= 4 * VW && got < 4 * VW + 6) check($sformatf("reference 2 word %0d", got - 4 * VW), out_data == ref2[got - 4 * VW]);
        checks++;
        if (out_data !== plain[got]) begin
          failures++;
          if (failures < 20) $display("FAIL word %0d: got %08h expected %08h", got, out_data, plain[got]);
        end
        got++;
      end
    end
    @(negedge clk);
    out_rd = 1'b0;
    repeat (10) @(negedge clk);
    check("output FIFO empty at end", out_empty);
    $display("first-key stall %0d, words during RSA %0d, apply stall %0d, almost-full cycles %0d, input-empty cycles %0d, enable-low %0d, longest run %0d",
             st_first_key, par_words, st_apply, af_cycles, empty_cycles, en_low, max_run);
    check("stall for first key", st_first_key > 0);
    check("video during RSA", par_words > 0);
    check("apply stall", st_apply > 0);
    check("output almost full", af_cycles > 0);
    check("input empty", empty_cycles > 0);
    check("enable pause", en_low > 0);
    check("one word per clock for 200 words", max_run >= 200);
    check("two decryptions", rsa_cycles.size() == 2);
    foreach (rsa_cycles[i])
      check($sformatf("RSA cycles %0d expected %0d", rsa_cycles[i], (K + 3 + K / 32) * (K + $countones(D) + 2) + 2),
            rsa_cycles[i] == (K + 3 + K / 32) * (K + $countones(D) + 2) + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
