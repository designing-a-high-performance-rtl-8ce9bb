// Nonlinear function F of the ZUC stream cipher, with its two 32-bit
// memory cells R1 and R2.
//
// From the three bit-reorganized words X0, X1, X2 it forms, in the same
// cycle, the output W = (X0 ^ R1) + R2 (mod 2^32). On a clock edge with
// step=1 it updates the memory cells:
//   W1 = R1 + X1 (mod 2^32),  W2 = R2 ^ X2,
//   R1 <= S(L1(W1[15:0] || W2[31:16])),  R2 <= S(L2(W2[15:0] || W1[31:16])).
// S applies the S-boxes S0,S1,S0,S1 byte by byte; L1 and L2 are the
// rotate-and-XOR linear transforms. clear=1 zeroes R1 and R2, which the
// key loader does before initialization. The structure follows the F
// layer of the ZUC architecture; the S-boxes are lookup tables.
module zuc_f
  import crypto_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        step,
  input  logic [31:0] x0,
  input  logic [31:0] x1,
  input  logic [31:0] x2,
  output logic [31:0] w
);
  logic [31:0] r1, r2, w1, w2, u, v;

  always_comb begin
    w  = (x0 ^ r1) + r2;
    w1 = r1 + x1;
    w2 = r2 ^ x2;
    u  = zuc_l1({w1[15:0], w2[31:16]});
    v  = zuc_l2({w2[15:0], w1[31:16]});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
    end else if (clear) begin
      r1 <= '0;
      r2 <= '0;
    end else if (step) begin
      r1 <= zuc_sbox(u);
      r2 <= zuc_sbox(v);
    end
  end
endmodule
