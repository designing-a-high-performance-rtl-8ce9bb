// Self-checking testbench of zuc_core.
//
// Runs the published ZUC test sets 1-4 (first two keystream words, and word
// 2000 of set 4) and a second key with set 3's IV, whose first six words
// are a known reference sequence. It
// also checks the initialization latency (ready 34 edges after the edge that samples load), that
// the keystream register holds while next is low, one word per clock while
// next is high, and a re-key in the middle of a stream.
module tb_zuc_core;
  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         load = 1'b0, next = 1'b0;
  logic [127:0] key = '0, iv = '0;
  logic [31:0]  ks;
  logic         ready;
  int           checks = 0, failures = 0;

  localparam logic [127:0] IV3 = 128'h84319aa8de6915ca1f6bda6bfbd8c766;

  zuc_core dut (.clk, .rst_n, .load, .key, .iv, .next, .keystream(ks), .ready);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // load a key and wait for the first word, checking the latency
  task automatic start(input logic [127:0] k, input logic [127:0] v);
    int lat;
    @(negedge clk);
    key = k; iv = v; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    lat = 1;
    while (!ready) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 35) begin
      failures++;
      $display("FAIL init latency %0d, expected 35", lat);
    end
  endtask

  // compare the next words, one per clock
  task automatic expect_words(input string name, input logic [31:0] exp [$]);
    foreach (exp[i]) begin
      check($sformatf("%s word %0d", name, i + 1), ks, exp[i]);
      next = 1'b1;
      @(negedge clk);
      next = 1'b0;
    end
  endtask

  initial begin
    logic [31:0] w;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    start('0, '0);
    expect_words("set1", '{32'h27bede74, 32'h018082da});

    start({128{1'b1}}, {128{1'b1}});
    expect_words("set2", '{32'h0657cfa0, 32'h7096398b});

    // set 3 (also the first key of the end-to-end test)
    start(128'h3d4c4be96a82fdaeb58f641db17b455b, IV3);
    check("hold", ks, 32'h14f1c272);
    repeat (3) @(negedge clk);                   // next low: word must stay
    check("hold after idle", ks, 32'h14f1c272);
    expect_words("set3", '{32'h14f1c272, 32'h3279c419, 32'h4b8ea41d, 32'h0cc80863,
                           32'hd28062e1, 32'he71d3dda});

    // re-key in the middle of the stream (second key of the end-to-end test)
    start(128'h444c4be96a82fdaeb58f641db17b4544, IV3);
    expect_words("key2", '{32'h038137ab, 32'h6e28dc7d, 32'h42fba1ab, 32'h6f596aec,
                           32'hfc7a0076, 32'h480691fa});

    // set 4, continuous next, word 2000
    start(128'h4d320bfad4c285bfd6b8bd00f39d8b41, 128'h52959daba0bf176ece2dc315049eb574);
    expect_words("set4", '{32'hed4400e7, 32'h0633e5c5});
    next = 1'b1;
    repeat (1997) @(negedge clk);
    next = 1'b0;
    check("set4 word 2000", ks, 32'h7a574cdb);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
