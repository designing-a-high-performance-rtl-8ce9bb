// Feedback value s16 of the ZUC LFSR, computed by a hierarchical carry-save
// adder tree modulo 2^31-1.
//
// s16 = 2^15 s15 + 2^17 s13 + 2^21 s10 + 2^20 s4 + (1+2^8) s0 [+ (W>>1)]
// modulo 2^31-1. The five weighted taps become six 31-bit operands
// (A..F = s15<<<15, s13<<<17, s10<<<21, s4<<<20, s0<<<8, s0), as
// multiplication by 2^k modulo 2^31-1 is a rotation. Two carry-save adders
// reduce A,B,C and D,E,F in parallel, two more merge the partial results,
// and a fourth takes the mode multiplexer's output: W[31:1] in
// initialization mode, 0 in working mode. Each carry-save adder rotates its
// carry vector left by one bit, so every stage stays modulo 2^31-1 and
// costs one full-adder delay. A single end-around-carry adder turns the
// final sum/carry pair into s16; a zero result is replaced by 2^31-1.
//
// The tree shape, the multiplexer and the final adder follow the
// hierarchical CSA tree of the design; the assignment of taps to the
// letters A..F is this implementation's choice. Purely combinational.
module zuc_lfsr_update
  import crypto_pkg::*;
(
  input  logic [30:0] s0,
  input  logic [30:0] s4,
  input  logic [30:0] s10,
  input  logic [30:0] s13,
  input  logic [30:0] s15,
  input  logic [31:0] w,      // output W of the nonlinear function F
  input  logic        init,   // 1: initialization mode, 0: working mode
  output logic [30:0] s16
);
  logic [30:0] a, b, c, d, e, f, u;
  csa31_t l1a, l1b, l2, l3, l4;

  always_comb begin
    a = rotl31(s15, 15);
    b = rotl31(s13, 17);
    c = rotl31(s10, 21);
    d = rotl31(s4, 20);
    e = rotl31(s0, 8);
    f = s0;
    u = init ? w[31:1] : 31'd0;
    l1a = csa_mod31(a, b, c);
    l1b = csa_mod31(d, e, f);
    l2  = csa_mod31(l1a.s, l1a.c, l1b.c);
    l3  = csa_mod31(l2.s, l2.c, l1b.s);
    l4  = csa_mod31(l3.s, l3.c, u);
    s16 = add_mod31(l4.s, l4.c);
  end
endmodule
