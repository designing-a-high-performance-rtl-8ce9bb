// Shared constants, types and helper functions of the hybrid RSA/ZUC video
// decryptor.
//
// The ZUC part holds the two 8-bit S-boxes S0 and S1, the sixteen 15-bit
// key-loading constants d0..d15 (the 240-bit constant D of the key loader),
// the linear transforms L1/L2 and the arithmetic used by the LFSR update:
// a carry-save step modulo 2^31-1, in which the carry vector is rotated left
// by one bit instead of shifted, and an end-around-carry adder. The tables
// and constants are those of the published ZUC algorithm (version 1.6);
// they are checked against its standard test vectors by the testbenches.
//
// The packet part defines the signaling word carried in each packet header:
// bit 0 says that an encrypted key follows, bit 1 says that the most
// recently decrypted key is to be applied before this packet's video.
package crypto_pkg;

  // ------------------------------------------------------------------ ZUC
  localparam int unsigned LFSR_LEN = 16;
  localparam logic [30:0] MOD31    = 31'h7FFF_FFFF;   // 2^31 - 1

  localparam logic [7:0] ZUC_S0 [256] = '{
    8'h3E, 8'h72, 8'h5B, 8'h47, 8'hCA, 8'hE0, 8'h00, 8'h33, 8'h04, 8'hD1, 8'h54, 8'h98, 8'h09, 8'hB9, 8'h6D, 8'hCB,
    8'h7B, 8'h1B, 8'hF9, 8'h32, 8'hAF, 8'h9D, 8'h6A, 8'hA5, 8'hB8, 8'h2D, 8'hFC, 8'h1D, 8'h08, 8'h53, 8'h03, 8'h90,
    8'h4D, 8'h4E, 8'h84, 8'h99, 8'hE4, 8'hCE, 8'hD9, 8'h91, 8'hDD, 8'hB6, 8'h85, 8'h48, 8'h8B, 8'h29, 8'h6E, 8'hAC,
    8'hCD, 8'hC1, 8'hF8, 8'h1E, 8'h73, 8'h43, 8'h69, 8'hC6, 8'hB5, 8'hBD, 8'hFD, 8'h39, 8'h63, 8'h20, 8'hD4, 8'h38,
    8'h76, 8'h7D, 8'hB2, 8'hA7, 8'hCF, 8'hED, 8'h57, 8'hC5, 8'hF3, 8'h2C, 8'hBB, 8'h14, 8'h21, 8'h06, 8'h55, 8'h9B,
    8'hE3, 8'hEF, 8'h5E, 8'h31, 8'h4F, 8'h7F, 8'h5A, 8'hA4, 8'h0D, 8'h82, 8'h51, 8'h49, 8'h5F, 8'hBA, 8'h58, 8'h1C,
    8'h4A, 8'h16, 8'hD5, 8'h17, 8'hA8, 8'h92, 8'h24, 8'h1F, 8'h8C, 8'hFF, 8'hD8, 8'hAE, 8'h2E, 8'h01, 8'hD3, 8'hAD,
    8'h3B, 8'h4B, 8'hDA, 8'h46, 8'hEB, 8'hC9, 8'hDE, 8'h9A, 8'h8F, 8'h87, 8'hD7, 8'h3A, 8'h80, 8'h6F, 8'h2F, 8'hC8,
    8'hB1, 8'hB4, 8'h37, 8'hF7, 8'h0A, 8'h22, 8'h13, 8'h28, 8'h7C, 8'hCC, 8'h3C, 8'h89, 8'hC7, 8'hC3, 8'h96, 8'h56,
    8'h07, 8'hBF, 8'h7E, 8'hF0, 8'h0B, 8'h2B, 8'h97, 8'h52, 8'h35, 8'h41, 8'h79, 8'h61, 8'hA6, 8'h4C, 8'h10, 8'hFE,
    8'hBC, 8'h26, 8'h95, 8'h88, 8'h8A, 8'hB0, 8'hA3, 8'hFB, 8'hC0, 8'h18, 8'h94, 8'hF2, 8'hE1, 8'hE5, 8'hE9, 8'h5D,
    8'hD0, 8'hDC, 8'h11, 8'h66, 8'h64, 8'h5C, 8'hEC, 8'h59, 8'h42, 8'h75, 8'h12, 8'hF5, 8'h74, 8'h9C, 8'hAA, 8'h23,
    8'h0E, 8'h86, 8'hAB, 8'hBE, 8'h2A, 8'h02, 8'hE7, 8'h67, 8'hE6, 8'h44, 8'hA2, 8'h6C, 8'hC2, 8'h93, 8'h9F, 8'hF1,
    8'hF6, 8'hFA, 8'h36, 8'hD2, 8'h50, 8'h68, 8'h9E, 8'h62, 8'h71, 8'h15, 8'h3D, 8'hD6, 8'h40, 8'hC4, 8'hE2, 8'h0F,
    8'h8E, 8'h83, 8'h77, 8'h6B, 8'h25, 8'h05, 8'h3F, 8'h0C, 8'h30, 8'hEA, 8'h70, 8'hB7, 8'hA1, 8'hE8, 8'hA9, 8'h65,
    8'h8D, 8'h27, 8'h1A, 8'hDB, 8'h81, 8'hB3, 8'hA0, 8'hF4, 8'h45, 8'h7A, 8'h19, 8'hDF, 8'hEE, 8'h78, 8'h34, 8'h60
  };

  localparam logic [7:0] ZUC_S1 [256] = '{
    8'h55, 8'hC2, 8'h63, 8'h71, 8'h3B, 8'hC8, 8'h47, 8'h86, 8'h9F, 8'h3C, 8'hDA, 8'h5B, 8'h29, 8'hAA, 8'hFD, 8'h77,
    8'h8C, 8'hC5, 8'h94, 8'h0C, 8'hA6, 8'h1A, 8'h13, 8'h00, 8'hE3, 8'hA8, 8'h16, 8'h72, 8'h40, 8'hF9, 8'hF8, 8'h42,
    8'h44, 8'h26, 8'h68, 8'h96, 8'h81, 8'hD9, 8'h45, 8'h3E, 8'h10, 8'h76, 8'hC6, 8'hA7, 8'h8B, 8'h39, 8'h43, 8'hE1,
    8'h3A, 8'hB5, 8'h56, 8'h2A, 8'hC0, 8'h6D, 8'hB3, 8'h05, 8'h22, 8'h66, 8'hBF, 8'hDC, 8'h0B, 8'hFA, 8'h62, 8'h48,
    8'hDD, 8'h20, 8'h11, 8'h06, 8'h36, 8'hC9, 8'hC1, 8'hCF, 8'hF6, 8'h27, 8'h52, 8'hBB, 8'h69, 8'hF5, 8'hD4, 8'h87,
    8'h7F, 8'h84, 8'h4C, 8'hD2, 8'h9C, 8'h57, 8'hA4, 8'hBC, 8'h4F, 8'h9A, 8'hDF, 8'hFE, 8'hD6, 8'h8D, 8'h7A, 8'hEB,
    8'h2B, 8'h53, 8'hD8, 8'h5C, 8'hA1, 8'h14, 8'h17, 8'hFB, 8'h23, 8'hD5, 8'h7D, 8'h30, 8'h67, 8'h73, 8'h08, 8'h09,
    8'hEE, 8'hB7, 8'h70, 8'h3F, 8'h61, 8'hB2, 8'h19, 8'h8E, 8'h4E, 8'hE5, 8'h4B, 8'h93, 8'h8F, 8'h5D, 8'hDB, 8'hA9,
    8'hAD, 8'hF1, 8'hAE, 8'h2E, 8'hCB, 8'h0D, 8'hFC, 8'hF4, 8'h2D, 8'h46, 8'h6E, 8'h1D, 8'h97, 8'hE8, 8'hD1, 8'hE9,
    8'h4D, 8'h37, 8'hA5, 8'h75, 8'h5E, 8'h83, 8'h9E, 8'hAB, 8'h82, 8'h9D, 8'hB9, 8'h1C, 8'hE0, 8'hCD, 8'h49, 8'h89,
    8'h01, 8'hB6, 8'hBD, 8'h58, 8'h24, 8'hA2, 8'h5F, 8'h38, 8'h78, 8'h99, 8'h15, 8'h90, 8'h50, 8'hB8, 8'h95, 8'hE4,
    8'hD0, 8'h91, 8'hC7, 8'hCE, 8'hED, 8'h0F, 8'hB4, 8'h6F, 8'hA0, 8'hCC, 8'hF0, 8'h02, 8'h4A, 8'h79, 8'hC3, 8'hDE,
    8'hA3, 8'hEF, 8'hEA, 8'h51, 8'hE6, 8'h6B, 8'h18, 8'hEC, 8'h1B, 8'h2C, 8'h80, 8'hF7, 8'h74, 8'hE7, 8'hFF, 8'h21,
    8'h5A, 8'h6A, 8'h54, 8'h1E, 8'h41, 8'h31, 8'h92, 8'h35, 8'hC4, 8'h33, 8'h07, 8'h0A, 8'hBA, 8'h7E, 8'h0E, 8'h34,
    8'h88, 8'hB1, 8'h98, 8'h7C, 8'hF3, 8'h3D, 8'h60, 8'h6C, 8'h7B, 8'hCA, 8'hD3, 8'h1F, 8'h32, 8'h65, 8'h04, 8'h28,
    8'h64, 8'hBE, 8'h85, 8'h9B, 8'h2F, 8'h59, 8'h8A, 8'hD7, 8'hB0, 8'h25, 8'hAC, 8'hAF, 8'h12, 8'h03, 8'hE2, 8'hF2
  };

  localparam logic [14:0] ZUC_D [16] = '{
    15'h44D7, 15'h26BC, 15'h626B, 15'h135E, 15'h5789, 15'h35E2, 15'h7135, 15'h09AF,
    15'h4D78, 15'h2F13, 15'h6BC4, 15'h1AF1, 15'h5E26, 15'h3C4D, 15'h789A, 15'h47AC
  };

  // 32-bit S layer: S0, S1, S0, S1 from the most significant byte down.
  function automatic logic [31:0] zuc_sbox(input logic [31:0] x);
    return {ZUC_S0[x[31:24]], ZUC_S1[x[23:16]], ZUC_S0[x[15:8]], ZUC_S1[x[7:0]]};
  endfunction

  function automatic logic [31:0] rotl32(input logic [31:0] x, input int unsigned k);
    return (x << k) | (x >> (32 - k));
  endfunction

  function automatic logic [31:0] zuc_l1(input logic [31:0] x);
    return x ^ rotl32(x, 2) ^ rotl32(x, 10) ^ rotl32(x, 18) ^ rotl32(x, 24);
  endfunction

  function automatic logic [31:0] zuc_l2(input logic [31:0] x);
    return x ^ rotl32(x, 8) ^ rotl32(x, 14) ^ rotl32(x, 22) ^ rotl32(x, 30);
  endfunction

  // Multiplication by 2^k modulo 2^31-1 is a 31-bit left rotation by k.
  function automatic logic [30:0] rotl31(input logic [30:0] x, input int unsigned k);
    return (x << k) | (x >> (31 - k));
  endfunction

  // Result of a 31-bit carry-save adder whose carry wraps around (mod 2^31-1).
  typedef struct packed {
    logic [30:0] s;
    logic [30:0] c;
  } csa31_t;

  function automatic csa31_t csa_mod31(input logic [30:0] a, input logic [30:0] b,
                                       input logic [30:0] c);
    csa31_t r;
    logic [30:0] maj;
    r.s = a ^ b ^ c;
    maj = (a & b) | (a & c) | (b & c);
    r.c = {maj[29:0], maj[30]};                      // cyclic left shift by one
    return r;
  endfunction

  // a + b modulo 2^31-1 by end-around carry. A zero result stands for 2^31-1,
  // as the ZUC specification requires of the LFSR.
  function automatic logic [30:0] add_mod31(input logic [30:0] a, input logic [30:0] b);
    logic [31:0] t;
    logic [30:0] r;
    t = {1'b0, a} + {1'b0, b};
    r = t[30:0] + {30'd0, t[31]};
    return (r == 31'd0) ? MOD31 : r;
  endfunction

  // --------------------------------------------------------------- packets
  typedef struct packed {
    logic [29:0] reserved;
    logic        apply_key;   // bit 1: switch ZUC to the newly decrypted key
    logic        key_follows; // bit 0: an encrypted key follows the header
  } signaling_t;

endpackage
