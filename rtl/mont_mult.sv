// Carry-save Montgomery multiplier: z = x * y * 2^-(K+2) mod n, with the
// result left in the redundant range 0 <= z < 2n.
//
// Radix-2 Montgomery multiplication with r = 2^(K+2) and no final
// subtraction: with 4n < r, operands below 2n give a result below 2n, so
// results can be fed straight back as operands. The partial product is
// kept as a sum/carry pair (ps, pc). Each of the K+2 iterations i takes
// one bit x(i) from the x shift register and does two 3-to-2 carry-save
// additions:
//   (sc, ss) = ps + pc + x(i)*y
//   (pc, ps) = (ss + sc + ss(0)*n) / 2
// The second sum is even because n is odd, so halving is a plain shift.
// The final ps + pc is then formed by one 32-bit ripple-carry adder over
// K/32 cycles, least significant word first, with the pair shifted right
// 32 bits per cycle; the last cycle also adds the few bits above bit K-1.
//
// Timing: start is accepted when busy is low (also in the cycle done is
// high). One cycle loads the operands, K+2 cycles iterate and K/32 cycles
// add, so done is high for one cycle K+3+K/32 cycles after the start cycle,
// and z holds until the next start. Operands are sampled at start.
// Requirements: n odd, n < 2^K, x and y < 2n, K a multiple of 32.
//
// The algorithm, the two CSAs with the ss(0)-gated n, the x shift register
// and the 32-bit RCA final addition with its cycle count follow the design;
// the start/done/busy handshake is this implementation's choice.
module mont_mult #(
  parameter int unsigned K = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K:0]   x,      // < 2n
  input  logic [K:0]   y,      // < 2n
  input  logic [K-1:0] n,      // odd modulus
  output logic [K:0]   z,      // < 2n
  output logic         busy,
  output logic         done
);
  localparam int unsigned W      = K + 3;          // width of the CSA vectors
  localparam int unsigned ITERS  = K + 2;
  localparam int unsigned CHUNKS = K / 32;
  localparam int unsigned CW     = $clog2(ITERS + 1);

  typedef enum logic [1:0] {IDLE, ITER, ADD} mm_state_t;

  mm_state_t    state;
  logic [CW-1:0] cnt;
  logic [K+1:0] xs;                 // x shift register, x(i) = xs[0]
  logic [W-1:0] yr, nr;
  logic [W-1:0] ps, pc;
  logic [W-1:0] c1, ss, sc, s2, c2, t1, t2;
  logic         carry;
  logic [K-1:0] res;
  logic [32:0]  rca;
  logic [2:0]   top;               // bits K+2..K of ps + pc

  always_comb begin
    // first CSA: ps + pc + x(i)*y
    t1 = xs[0] ? yr : '0;
    ss = ps ^ pc ^ t1;
    c1 = (ps & pc) | (ps & t1) | (pc & t1);
    sc = {c1[W-2:0], 1'b0};
    // second CSA: ss + sc + ss(0)*n, then /2
    t2 = ss[0] ? nr : '0;
    s2 = ss ^ sc ^ t2;
    c2 = (ss & sc) | (ss & t2) | (sc & t2);  // weight 2, i.e. already halved
    // final addition, one 32-bit word per cycle
    rca = {1'b0, ps[31:0]} + {1'b0, pc[31:0]} + {32'd0, carry};
    top = ps[34:32] + pc[34:32] + {2'd0, rca[32]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      xs    <= '0;
      yr    <= '0;
      nr    <= '0;
      ps    <= '0;
      pc    <= '0;
      carry <= 1'b0;
      res   <= '0;
      z     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          xs    <= {1'b0, x};
          yr    <= {2'b00, y};
          nr    <= {3'b000, n};
          ps    <= '0;
          pc    <= '0;
          cnt   <= '0;
          state <= ITER;
        end
        ITER: begin
          ps  <= s2 >> 1;
          pc  <= c2;
          xs  <= xs >> 1;
          cnt <= cnt + 1'b1;
          if (cnt == CW'(ITERS - 1)) begin
            cnt   <= '0;
            carry <= 1'b0;
            state <= ADD;
          end
        end
        ADD: begin
          res   <= {rca[31:0], res[K-1:32]};
          carry <= rca[32];
          cnt   <= cnt + 1'b1;
          if (cnt == CW'(CHUNKS - 1)) begin
            // after K/32-1 shifts, bits 34..32 of the pair are the
            // original bits K+2..K; the result is below 2^(K+1)
            z     <= {top[0], rca[31:0], res[K-1:32]};
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            ps <= ps >> 32;
            pc <= pc >> 32;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
