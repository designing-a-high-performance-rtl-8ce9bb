// Self-checking testbench of zuc_f.
//
// Steps the F function with random X0, X1, X2 words and compares W every
// cycle with a reference model kept in the testbench, which updates its own
// R1/R2 from the ZUC definition (W1 = R1 + X1, W2 = R2 ^ X2, then the
// L1/L2 transforms, written out here as rotate-and-XOR, and the S-box
// tables). Also checks clear and that R1/R2 hold while step is low.
module tb_zuc_f;
  import crypto_pkg::ZUC_S0;
  import crypto_pkg::ZUC_S1;
  logic        clk = 1'b0, rst_n = 1'b0, clear = 1'b0, step = 1'b0;
  logic [31:0] x0 = '0, x1 = '0, x2 = '0, w;
  logic [31:0] r1 = '0, r2 = '0;
  int          checks = 0, failures = 0;

  zuc_f dut (.clk, .rst_n, .clear, .step, .x0, .x1, .x2, .w);

  always #5 clk = ~clk;

  function automatic logic [31:0] rl(input logic [31:0] x, input int k);
    return {x, x} >> (32 - k);
  endfunction
  function automatic logic [31:0] sb(input logic [31:0] x);
    return {ZUC_S0[x[31:24]], ZUC_S1[x[23:16]], ZUC_S0[x[15:8]], ZUC_S1[x[7:0]]};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, u, v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      x0 = $urandom; x1 = $urandom; x2 = $urandom;
      step = ($urandom % 4) != 0;
      clear = ($urandom % 97) == 0;
      #1;
      checks++;
      if (w !== ((x0 ^ r1) + r2)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d w=%08h exp=%08h", t, w, (x0 ^ r1) + r2);
      end
      a = r1 + x1; b = r2 ^ x2;
      u = {a[15:0], b[31:16]};
      v = {b[15:0], a[31:16]};
      @(negedge clk);
      if (clear) begin
        r1 = '0; r2 = '0;
      end else if (step) begin
        r1 = sb(u ^ rl(u, 2) ^ rl(u, 10) ^ rl(u, 18) ^ rl(u, 24));
        r2 = sb(v ^ rl(v, 8) ^ rl(v, 14) ^ rl(v, 22) ^ rl(v, 30));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
