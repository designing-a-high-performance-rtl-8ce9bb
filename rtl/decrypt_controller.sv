// Decrypt controller of the hybrid RSA/ZUC video decryptor.
//
// It walks the encrypted stream in the input FIFO packet by packet. A
// packet is a 32-bit signaling header, then, if header bit 0 is set, the
// RSA-encrypted secret key (KEY_WORDS words, most significant first), then
// VIDEO_WORDS words of encrypted video:
//   bit 0 (key_follows) - the controller waits until the RSA coprocessor
//                         is idle, shifts the key words into its ciphertext
//                         register and starts the decryption. It does not
//                         wait for the result: video keeps being decrypted
//                         with the current ZUC key while RSA works.
//   bit 1 (apply_key)   - before this packet's video the controller waits
//                         for zuc_key_valid (RSA finished), pulses
//                         zuc_load so the ZUC core re-initializes with the
//                         new key, and waits for zuc_ready.
// Video words move one per clock: when the input FIFO is not almost empty
// and the output FIFO is not almost full, fifo_rd_req, fifo_wr_req and
// zuc_next are raised together; the word leaving the input FIFO is XORed
// with the current keystream word outside this block and written to the
// output FIFO in the same cycle. Until a first key has been applied the
// keystream register holds 0 and video passes unchanged.
//
// enable low freezes the controller (an RSA decryption in progress goes
// on). All outputs are combinational from the state and the flags.
//
// Reading the key into the RSA registers, starting RSA, signaling new-key
// and apply events in the packet header, decrypting video in parallel with
// the key, and the flag names follow the design. The bit assignment of the
// signaling word (3 = key follows and apply it, 1 = key follows, 2 = apply
// the key sent earlier, 0 = video only), the packet length VIDEO_WORDS and the
// position of the header at the front of the packet are this
// implementation's choices.
module decrypt_controller
  import crypto_pkg::*;
#(
  parameter int unsigned VIDEO_WORDS = 256,
  parameter int unsigned KEY_WORDS   = 32
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        enable,
  // input FIFO
  input  logic [31:0] data_fr_fifo,
  input  logic        fifo_almost_empty,
  output logic        fifo_rd_req,
  // output FIFO
  input  logic        fifo_almost_full,
  output logic        fifo_wr_req,
  // RSA coprocessor (ctrl_sig_rsa)
  output logic        rsa_ct_wr,
  output logic        rsa_start,
  input  logic        rsa_busy,
  input  logic        zuc_key_valid,
  // ZUC coprocessor (ctrl_sig_zuc)
  output logic        zuc_load,
  output logic        zuc_next,
  input  logic        zuc_ready
);
  localparam int unsigned CW = $clog2((VIDEO_WORDS > KEY_WORDS ? VIDEO_WORDS : KEY_WORDS) + 1);

  typedef enum logic [2:0] {HDR, KEYWAIT, KEY, KSTART, APPLYWAIT, ZUCWAIT, VIDEO} dc_state_t;

  dc_state_t  state;
  signaling_t sig;
  logic [CW-1:0] cnt;
  logic       keyed;          // a key has been applied to ZUC
  logic       in_ok, video_go;
  signaling_t hdr;

  assign hdr = signaling_t'(data_fr_fifo);

  assign in_ok    = enable && !fifo_almost_empty;
  assign video_go = in_ok && !fifo_almost_full && (zuc_ready || !keyed);

  always_comb begin
    fifo_rd_req = 1'b0;
    fifo_wr_req = 1'b0;
    rsa_ct_wr   = 1'b0;
    rsa_start   = 1'b0;
    zuc_load    = 1'b0;
    zuc_next    = 1'b0;
    unique case (state)
      HDR:       fifo_rd_req = in_ok;
      KEY:       begin fifo_rd_req = in_ok; rsa_ct_wr = in_ok; end
      KSTART:    rsa_start = enable;
      APPLYWAIT: zuc_load = enable && zuc_key_valid && !rsa_busy;
      VIDEO:     begin fifo_rd_req = video_go; fifo_wr_req = video_go; zuc_next = video_go && keyed; end
      default:   ;
    endcase
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state <= HDR;
      sig   <= '0;
      cnt   <= '0;
      keyed <= 1'b0;
    end else if (enable) begin
      unique case (state)
        HDR: if (in_ok) begin
          sig <= hdr;
          cnt <= '0;
          if (hdr.key_follows)    state <= KEYWAIT;
          else if (hdr.apply_key) state <= APPLYWAIT;
          else                    state <= VIDEO;
        end
        KEYWAIT: if (!rsa_busy) state <= KEY;
        KEY: if (in_ok) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(KEY_WORDS - 1)) begin
            cnt   <= '0;
            state <= KSTART;
          end
        end
        KSTART: state <= sig.apply_key ? APPLYWAIT : VIDEO;
        APPLYWAIT: if (zuc_key_valid && !rsa_busy) begin
          keyed <= 1'b1;
          state <= ZUCWAIT;
        end
        ZUCWAIT: if (zuc_ready) state <= VIDEO;
        VIDEO: if (video_go) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(VIDEO_WORDS - 1)) begin
            cnt   <= '0;
            state <= HDR;
          end
        end
        default: state <= HDR;
      endcase
    end
  end
endmodule
