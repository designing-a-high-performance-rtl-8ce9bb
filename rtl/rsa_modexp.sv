// Modular exponentiation m = c^d mod n, left-to-right binary method, on a
// single carry-save Montgomery multiplier (mont_mult, r = 2^(K+2)).
//
// Sequence of Montgomery products MP(u,v) = u*v/r mod n:
//   a = MP(c, r^2 mod n)             c brought into the Montgomery domain
//   x = b (= r mod n)                the Montgomery form of 1
//   for i = K-1 downto 0:
//     x = MP(x, x)                   square
//     if d_i == 1: x = MP(x, a)      multiply
//   x = MP(x, 1)                     back out of the Montgomery domain
// Two multiplexers pick the multiplier operands: sel_2 chooses b (first
// squaring) or the x register for operand x, and sel_1 chooses x (00),
// a (01), the constant 1 (10) or r^2 mod n (11) for operand y. The exponent
// sits in a shift register whose top bit d_i steers the controller. The
// controller starts each product in the cycle the previous one finishes,
// feeding the finished product straight to the operand multiplexers, so
// the multiplier never idles.
//
// Timing: with T = K+3+K/32 cycles per product and P = K + popcount(d) + 2
// products, done pulses (and m becomes valid) T*P + 1 cycles after the
// start cycle; at most T*(2K+2) + 1 cycles for a full-length exponent.
// Inputs are sampled at start and must then be held (c, n, d, b, r2 are
// read while busy). Requirements: n odd, c < n, 4n < 2^(K+2).
//
// The single multiplier, the operand multiplexers with sel_1/sel_2, the
// result register starting at b, the exponent shift register and the
// left-to-right loop follow the design. Computing a = c*r mod n on the same
// multiplier, with r^2 mod n supplied as key material on the spare code of
// the sel_1 multiplexer and c on a third input of the sel_2 multiplexer,
// is this implementation's choice; it costs one product more than the
// design's count of (2k_d + 1) products.
module rsa_modexp #(
  parameter int unsigned K = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] c,      // ciphertext, c < n
  input  logic [K-1:0] n,      // modulus, odd
  input  logic [K-1:0] d,      // exponent
  input  logic [K-1:0] b,      // r mod n
  input  logic [K-1:0] r2,     // r^2 mod n
  output logic [K-1:0] m,
  output logic         busy,
  output logic         done
);
  localparam int unsigned IW = $clog2(K + 1);

  typedef enum logic [2:0] {IDLE, PRE, SQ, MUL, FIN} me_state_t;
  typedef enum logic [1:0] {Y_X = 2'b00, Y_A = 2'b01, Y_ONE = 2'b10, Y_R2 = 2'b11} sel1_t;

  me_state_t    state;
  logic [IW-1:0] bits_left;
  logic [K-1:0] dreg;
  logic [K:0]   xreg, areg, mm_z, x_cur, op_x, op_y;
  logic         mm_start, mm_done, mm_busy;
  logic         sel_2, pre_sel;
  sel1_t        sel_1;
  logic         next_is_mul, last_bit;

  // finished product bypasses the x register so the next product can start
  assign x_cur = (mm_done && (state == SQ || state == MUL)) ? mm_z : xreg;

  always_comb begin
    op_x = pre_sel ? {1'b0, c} : (sel_2 ? x_cur : {1'b0, b});
    unique case (sel_1)
      Y_X:   op_y = x_cur;
      Y_A:   op_y = areg;
      Y_ONE: op_y = {{K{1'b0}}, 1'b1};
      default: op_y = {1'b0, r2};
    endcase
  end

  // d_i after a square is the current top bit; after a multiply, the
  // register has already moved on to the next bit
  assign next_is_mul = (state == SQ) && dreg[K-1];
  assign last_bit    = (bits_left == IW'(1));

  // Controller: operand selects and start for the next product
  always_comb begin
    mm_start = 1'b0;
    pre_sel  = 1'b0;
    sel_2    = 1'b1;
    sel_1    = Y_X;
    unique case (state)
      IDLE: if (start) begin
        mm_start = 1'b1;
        pre_sel  = 1'b1;
        sel_1    = Y_R2;
      end
      PRE: if (mm_done) begin                // first square of b
        mm_start = 1'b1;
        sel_2    = 1'b0;
        sel_1    = Y_X;
      end
      SQ, MUL: if (mm_done) begin
        mm_start = 1'b1;
        if (next_is_mul)                     sel_1 = Y_A;
        else if (last_bit)                   sel_1 = Y_ONE;
        else                                 sel_1 = Y_X;
      end
      default: ;
    endcase
  end

  mont_mult #(.K(K)) u_mm (
    .clk   (clk),
    .rst_n (rst_n),
    .start (mm_start),
    .x     (op_x),
    .y     (op_y),
    .n     (n),
    .z     (mm_z),
    .busy  (mm_busy),
    .done  (mm_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      bits_left <= '0;
      dreg      <= '0;
      xreg      <= '0;
      areg      <= '0;
      m         <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          dreg      <= d;
          bits_left <= IW'(K);
          xreg      <= {1'b0, b};            // register initial value = b
          state     <= PRE;
        end
        PRE: if (mm_done) begin
          areg  <= mm_z;
          state <= SQ;
        end
        SQ: if (mm_done) begin
          xreg <= mm_z;
          if (dreg[K-1]) state <= MUL;
          else begin
            dreg      <= dreg << 1;
            bits_left <= bits_left - 1'b1;
            state     <= last_bit ? FIN : SQ;
          end
        end
        MUL: if (mm_done) begin
          xreg      <= mm_z;
          dreg      <= dreg << 1;
          bits_left <= bits_left - 1'b1;
          state     <= last_bit ? FIN : SQ;
        end
        FIN: if (mm_done) begin
          m     <= mm_z[K-1:0];
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
