// ZUC stream cipher core: 128-bit key and 128-bit IV in, one 32-bit
// keystream word per clock out.
//
// Three layers as in the ZUC architecture: a linear feedback shift register
// of sixteen 31-bit cells s0..s15, a bit reorganization that forms the
// 32-bit words X0 = s15H||s14L, X1 = s11L||s9H, X2 = s7L||s5H and
// X3 = s2L||s0H (H = bits 30..15, L = bits 15..0), and the nonlinear
// function F (zuc_f). The LFSR feedback s16 comes from the carry-save tree
// of zuc_lfsr_update, whose mode multiplexer adds W>>1 only during
// initialization.
//
// Operation:
//   load  (one-cycle pulse) - the key loader writes s_i = k_i || d_i || iv_i
//                             (k_i, iv_i the i-th byte from the most
//                             significant end, d_i the 15-bit constants) and
//                             clears R1, R2.
//   32 initialization steps - one per clock, LFSR fed with s16 + (W>>1).
//   1 working step          - F output discarded.
//   1 working step          - first keystream word W ^ X3 written into the
//                             32-bit keystream register; ready goes high.
// Then every cycle with next=1 replaces the keystream register with the
// following word and steps the LFSR, so a new word is available every
// clock (32 bits x 125 MHz = 4.0 Gbit/s). ready rises 34 clock edges
// after the edge that samples load (32 initialization, 1 discard and
// 1 fill step). A load while ready restarts the core with the new
// key; the keystream register keeps its old word until the new key's first
// word replaces it.
//
// The layer structure, the mode multiplexer, the CSA tree and the 32-bit
// output register follow the design; the load/next/ready handshake, the
// one-step-per-clock schedule of initialization and the reset value 0 of
// the keystream register are this implementation's choices.
module zuc_core
  import crypto_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] key,
  input  logic [127:0] iv,
  input  logic         next,
  output logic [31:0]  keystream,
  output logic         ready
);
  typedef enum logic [1:0] {IDLE, INIT, DISCARD, WORK} zuc_state_t;

  zuc_state_t  state;
  logic [4:0]  round;
  logic        first;            // WORK entered, register not yet filled
  logic [30:0] s [LFSR_LEN];
  logic [31:0] x0, x1, x2, x3, w, z;
  logic [30:0] s16;
  logic        step;

  // Bit reorganization
  always_comb begin
    x0 = {s[15][30:15], s[14][15:0]};
    x1 = {s[11][15:0],  s[9][30:15]};
    x2 = {s[7][15:0],   s[5][30:15]};
    x3 = {s[2][15:0],   s[0][30:15]};
    z  = w ^ x3;
  end

  always_comb
    step = (state == INIT) || (state == DISCARD) ||
           ((state == WORK) && (first || next));

  zuc_f u_f (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (load),
    .step  (step && !load),
    .x0    (x0),
    .x1    (x1),
    .x2    (x2),
    .w     (w)
  );

  zuc_lfsr_update u_fb (
    .s0   (s[0]),
    .s4   (s[4]),
    .s10  (s[10]),
    .s13  (s[13]),
    .s15  (s[15]),
    .w    (w),
    .init (state == INIT),
    .s16  (s16)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      round     <= '0;
      first     <= 1'b0;
      keystream <= '0;
      for (int i = 0; i < LFSR_LEN; i++) s[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < LFSR_LEN; i++)
        s[i] <= {key[127 - 8*i -: 8], ZUC_D[i], iv[127 - 8*i -: 8]};
      state <= INIT;
      round <= '0;
      first <= 1'b0;
    end else begin
      if (step) begin
        for (int i = 0; i < LFSR_LEN - 1; i++) s[i] <= s[i+1];
        s[LFSR_LEN-1] <= s16;
      end
      unique case (state)
        IDLE: ;
        INIT: begin
          round <= round + 5'd1;
          if (round == 5'd31) state <= DISCARD;
        end
        DISCARD: begin
          state <= WORK;
          first <= 1'b1;
        end
        WORK: begin
          if (first || next) keystream <= z;
          first <= 1'b0;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign ready = (state == WORK) && !first;
endmodule
