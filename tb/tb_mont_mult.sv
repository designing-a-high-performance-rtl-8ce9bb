// Self-checking testbench of mont_mult at K = 64.
//
// Random operands x, y below 2n (plus the corner values 0, 1 and 2n-1) are
// multiplied; the result must satisfy z < 2n and z * 2^(K+2) = x * y
// (mod n), checked with wide integer arithmetic in the testbench. The
// latency from start to done must be K+3+K/32 cycles, and back-to-back
// products started in the done cycle must work.
module tb_mont_mult;
  localparam int K = 64;
  localparam logic [K-1:0] N = 64'hc44a92944d3087f3;
  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K:0]   x = '0, y = '0, z;
  logic         busy, done;
  int           checks = 0, failures = 0;

  mont_mult #(.K(K)) dut (.clk, .rst_n, .start, .x, .y, .n(N), .z, .busy, .done);

  always #5 clk = ~clk;

  function automatic logic [K:0] rnd_below_2n();
    logic [2*K+1:0] r;
    r = {$urandom, $urandom, $urandom, $urandom, $urandom};
    return (K+1)'(r % ({1'b0, N} << 1));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic verify(input logic [K:0] a, input logic [K:0] b);
    logic [3*K:0] lhs, rhs;
    lhs = ((3*K+1)'(z) << (K + 2)) % (3*K+1)'(N);
    rhs = ((3*K+1)'(a) * (3*K+1)'(b)) % (3*K+1)'(N);
    checks += 2;
    if (lhs != rhs) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0h y=%0h z=%0h", a, b, z);
    end
    if (z >= ({1'b0, N} << 1)) begin
      failures++;
      $display("FAIL z=%0h not below 2n", z);
    end
  endtask

  initial begin
    int lat;
    logic [K:0] px, py;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      case (t)
        0: begin x = '0; y = rnd_below_2n(); end
        1: begin x = 1; y = 1; end
        2: begin x = ({1'b0, N} << 1) - 1; y = ({1'b0, N} << 1) - 1; end
        default: begin x = rnd_below_2n(); y = rnd_below_2n(); end
      endcase
      px = x; py = y;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      x = '0; y = '0;                  // operands are sampled at start
      lat = 1;
      while (!done) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != K + 3 + K / 32) begin
        failures++;
        $display("FAIL latency %0d expected %0d", lat, K + 3 + K / 32);
      end
      verify(px, py);
      // odd products start in the done cycle, even ones one cycle later
      if (t[0]) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
