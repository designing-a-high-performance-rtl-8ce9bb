// RSA coprocessor of the video decryptor: recovers the 128-bit ZUC secret
// key from a K-bit RSA ciphertext.
//
// The decrypt controller shifts the encrypted key into the ciphertext
// register one 32-bit word per ct_wr strobe, most significant word first
// (K/32 words), then pulses start. The coprocessor computes
// m = c^d mod n with rsa_modexp and presents the low 128 bits of m as
// zuc_key. zuc_key_valid rises with decrypt_done when the decryption ends
// and stays high until the next start; zuc_key holds its value until the
// next decryption ends, so the ZUC core can keep its current key while a
// new one is being decrypted. The private key (n, d) and the two
// Montgomery constants r mod n and r^2 mod n (r = 2^(K+2)) are inputs that
// must be stable while busy. K must be at least 128.
//
// Timing: decrypt_done follows start by T*(K + popcount(d) + 2) + 2 cycles,
// T = K+3+K/32.
//
// RSA decryption of the secret key, the 1024-bit key length, loading the
// encrypted key from the input FIFO and the zuc_key/zuc_key_valid outputs
// follow the design. Carrying the key in the low 128 bits of the RSA
// message, the word order, and supplying the private key and the Montgomery
// constants on ports are this implementation's choices.
module rsa_core #(
  parameter int unsigned K = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ct_wr,         // shift one ciphertext word in
  input  logic [31:0]  ct_word,
  input  logic         start,
  input  logic [K-1:0] n,
  input  logic [K-1:0] d,
  input  logic [K-1:0] rmodn,
  input  logic [K-1:0] r2modn,
  output logic [127:0] zuc_key,
  output logic         zuc_key_valid,
  output logic         decrypt_done,
  output logic         busy
);
  logic [K-1:0] ct;
  logic [K-1:0] m;
  logic         me_busy, me_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ct <= '0;
    else if (ct_wr) ct <= {ct[K-33:0], ct_word};
  end

  rsa_modexp #(.K(K)) u_modexp (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start && !me_busy),
    .c     (ct),
    .n     (n),
    .d     (d),
    .b     (rmodn),
    .r2    (r2modn),
    .m     (m),
    .busy  (me_busy),
    .done  (me_done)
  );

  // the exponentiator's result register keeps the last key until the next
  // decryption ends
  assign zuc_key = m[127:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zuc_key_valid <= 1'b0;
      decrypt_done  <= 1'b0;
    end else begin
      decrypt_done <= me_done;
      if (start && !me_busy) zuc_key_valid <= 1'b0;
      else if (me_done)      zuc_key_valid <= 1'b1;
    end
  end

  assign busy = me_busy;
endmodule
