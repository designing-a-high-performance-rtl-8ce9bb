// Hybrid RSA/ZUC decryptor for encrypted video streams.
//
// Encrypted packets enter FIFO IN one 32-bit word at a time. The decrypt
// controller reads each packet's signaling header; an RSA-encrypted 1024-bit
// secret key that follows is shifted into the RSA coprocessor, which
// recovers the 128-bit ZUC key while video keeps flowing. When a header
// asks for the new key, the ZUC core is re-initialized with it (key and the
// fixed IV zuc_iv). Each encrypted video word read from FIFO IN is XORed
// with the current 32-bit keystream word and written to FIFO OUT in the
// same cycle, one word per clock (4.0 Gbit/s at 125 MHz).
//
// Ports: the write side of FIFO IN (fed by a DMA engine in a full system),
// the read side of FIFO OUT (drained by a video decoder), the controller
// enable, the RSA private key n, d with the Montgomery constants
// r mod n and r^2 mod n (r = 2^(K+2)), the ZUC IV, and two status outputs of the RSA
// coprocessor (zuc_key_valid, decrypt_done). All are plain
// signals, synchronous to clk; reset_n is asynchronous, active low.
//
// The block structure (FIFO IN, decrypt controller, RSA, ZUC, XOR, FIFO
// OUT) and the signal names follow the design. FIFO depth, packet length,
// the packet format details and supplying the IV and private key on ports
// are this implementation's choices; see the blocks below.
module cryptosystem_top
  import crypto_pkg::*;
#(
  parameter int unsigned K           = 1024,
  parameter int unsigned VIDEO_WORDS = 256,
  parameter int unsigned FIFO_DEPTH  = 256
) (
  input  logic         clk,
  input  logic         reset_n,
  input  logic         enable,
  input  logic         in_wr,
  input  logic [31:0]  in_data,
  output logic         in_full,
  input  logic         out_rd,
  output logic [31:0]  out_data,
  output logic         out_empty,
  input  logic [K-1:0] rsa_n,
  input  logic [K-1:0] rsa_d,
  input  logic [K-1:0] rsa_rmodn,
  input  logic [K-1:0] rsa_r2modn,
  input  logic [127:0] zuc_iv,
  output logic         zuc_key_valid,  // RSA holds a decrypted key
  output logic         decrypt_done    // pulse: RSA finished a key
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic [31:0]  data_fr_fifo, data_to_fifo, keystream;
  logic         fifo_rd_req, fifo_wr_req, fifo_almost_empty, fifo_almost_full;
  logic         rsa_ct_wr, rsa_start, rsa_busy;
  logic         zuc_load, zuc_next, zuc_ready;
  logic [127:0] zuc_key;
  logic         in_empty, in_af, out_full, out_ae;
  logic [CW-1:0] in_count, out_count;

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk          (clk),
    .rst_n        (reset_n),
    .wr_req       (in_wr),
    .wr_data      (in_data),
    .rd_req       (fifo_rd_req),
    .rd_data      (data_fr_fifo),
    .full         (in_full),
    .empty        (in_empty),
    .almost_full  (in_af),
    .almost_empty (fifo_almost_empty),
    .count        (in_count)
  );

  decrypt_controller #(.VIDEO_WORDS(VIDEO_WORDS), .KEY_WORDS(K / 32)) u_ctrl (
    .clk               (clk),
    .reset_n           (reset_n),
    .enable            (enable),
    .data_fr_fifo      (data_fr_fifo),
    .fifo_almost_empty (fifo_almost_empty),
    .fifo_rd_req       (fifo_rd_req),
    .fifo_almost_full  (fifo_almost_full),
    .fifo_wr_req       (fifo_wr_req),
    .rsa_ct_wr         (rsa_ct_wr),
    .rsa_start         (rsa_start),
    .rsa_busy          (rsa_busy),
    .zuc_key_valid     (zuc_key_valid),
    .zuc_load          (zuc_load),
    .zuc_next          (zuc_next),
    .zuc_ready         (zuc_ready)
  );

  rsa_core #(.K(K)) u_rsa (
    .clk           (clk),
    .rst_n         (reset_n),
    .ct_wr         (rsa_ct_wr),
    .ct_word       (data_fr_fifo),
    .start         (rsa_start),
    .n             (rsa_n),
    .d             (rsa_d),
    .rmodn         (rsa_rmodn),
    .r2modn        (rsa_r2modn),
    .zuc_key       (zuc_key),
    .zuc_key_valid (zuc_key_valid),
    .decrypt_done  (decrypt_done),
    .busy          (rsa_busy)
  );

  zuc_core u_zuc (
    .clk       (clk),
    .rst_n     (reset_n),
    .load      (zuc_load),
    .key       (zuc_key),
    .iv        (zuc_iv),
    .next      (zuc_next),
    .keystream (keystream),
    .ready     (zuc_ready)
  );

  assign data_to_fifo = data_fr_fifo ^ keystream;

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk          (clk),
    .rst_n        (reset_n),
    .wr_req       (fifo_wr_req),
    .wr_data      (data_to_fifo),
    .rd_req       (out_rd),
    .rd_data      (out_data),
    .full         (out_full),
    .empty        (out_empty),
    .almost_full  (fifo_almost_full),
    .almost_empty (out_ae),
    .count        (out_count)
  );
endmodule
