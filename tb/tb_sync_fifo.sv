// Self-checking testbench of sync_fifo.
//
// A small FIFO (DEPTH 8, almost full at 6, almost empty at 1) is driven
// with random writes and reads, never writing when full nor reading when
// empty; data, count and all four flags are compared every cycle with a
// queue model. Phases with mostly writes and mostly reads make the FIFO
// fill and drain completely.
module tb_sync_fifo;
  localparam int DEPTH = 8, AF = 6, AE = 1;
  logic        clk = 1'b0, rst_n = 1'b0, wr_req = 1'b0, rd_req = 1'b0;
  logic [31:0] wr_data = '0, rd_data;
  logic        full, empty, almost_full, almost_empty;
  logic [3:0]  count;
  logic [31:0] q [$];
  int          checks = 0, failures = 0, fulls = 0, empties = 0;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH), .AF_LEVEL(AF), .AE_LEVEL(AE)) dut (
    .clk, .rst_n, .wr_req, .wr_data, .rd_req, .rd_data, .full, .empty,
    .almost_full, .almost_empty, .count);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      bias = ((t / 200) % 2) ? 80 : 20;       // percent chance of a write
      check("count", 32'(count), 32'(q.size()));
      check("full", 32'(full), 32'(q.size() == DEPTH));
      check("empty", 32'(empty), 32'(q.size() == 0));
      check("almost_full", 32'(almost_full), 32'(q.size() >= AF));
      check("almost_empty", 32'(almost_empty), 32'(q.size() <= AE));
      if (q.size() > 0) check("data", rd_data, q[0]);
      if (full) fulls++;
      if (empty) empties++;
      wr_req  = !full && (($urandom % 100) < bias);
      rd_req  = !empty && (($urandom % 100) >= bias);
      wr_data = $urandom;
      @(negedge clk);
      if (rd_req) void'(q.pop_front());
      if (wr_req) q.push_back(wr_data);
    end
    wr_req = 1'b0; rd_req = 1'b0;
    checks++;
    if (fulls == 0 || empties == 0) begin
      failures++;
      $display("FAIL FIFO never reached full (%0d) or empty (%0d)", fulls, empties);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
