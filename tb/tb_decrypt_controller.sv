// Self-checking testbench of decrypt_controller (VIDEO_WORDS 8,
// KEY_WORDS 4).
//
// The FIFOs, the RSA coprocessor and the ZUC core are modelled in the
// testbench: the input FIFO is a queue of tagged words (header, key word,
// video word), the output FIFO's almost-full flag toggles at random, RSA
// stays busy a random time after each start, and ZUC becomes ready a few
// cycles after each load. Every word the controller reads is checked
// against its tag: headers produce no write, key words produce exactly one
// ciphertext write each, video words produce an output write and, once a
// key has been applied, a keystream advance. Also checked: no read while
// the input is almost empty, no write while the output is almost full, one
// RSA start per key and never while RSA is busy, and that a packet asking
// for the new key gets a ZUC load, with the key valid, before its video.
// Counts that the stalls (RSA busy at a new key or at an apply, output
// full, input empty) and video decrypted during an RSA decryption occur.
module tb_decrypt_controller;
  localparam int VW = 8, KW = 4;
  typedef enum logic [1:0] {T_HDR, T_KEY, T_VID} tag_t;
  typedef struct { tag_t tag; logic [31:0] data; int pkt; } word_t;

  logic        clk = 1'b0, reset_n = 1'b0, enable = 1'b0;
  logic [31:0] data_fr_fifo;
  logic        fifo_almost_empty, fifo_rd_req, fifo_almost_full = 1'b0, fifo_wr_req;
  logic        rsa_ct_wr, rsa_start, rsa_busy = 1'b0, zuc_key_valid = 1'b0;
  logic        zuc_load, zuc_next, zuc_ready = 1'b0;
  word_t       q [$];
  int          checks = 0, failures = 0;
  int          n_pkts, key_words_seen, rsa_starts, keys_sent, zuc_loads, applies;
  int          st_key_busy, st_apply_wait, st_out_full, st_in_empty, vid_during_rsa;
  int          rsa_timer, zuc_timer, cur_pkt, last_load_pkt, pending_apply;
  bit          keyed;
  logic [1:0]  sig_of [int];

  decrypt_controller #(.VIDEO_WORDS(VW), .KEY_WORDS(KW)) dut (.*);

  always #5 clk = ~clk;

  // input FIFO model outputs, refreshed every cycle from the queue
  initial begin
    fifo_almost_empty = 1'b1;
    data_fr_fifo      = '0;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t) state=%0d rd=%b wr=%b ct=%b q=%0d", what, $time, dut.state, fifo_rd_req, fifo_wr_req, rsa_ct_wr, q.size());
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // packet generator: signaling values 3 (key + apply), 1 (key), 2 (apply), 0
  // slow packets arrive one word every 40 cycles, starving the controller
  task automatic add_packet(input int p, input logic [1:0] sig, input bit slow);
    sig_of[p] = sig;
    q.push_back('{T_HDR, {30'd0, sig}, p});
    if (sig[0]) for (int i = 0; i < KW; i++) q.push_back('{T_KEY, $urandom, p});
    for (int i = 0; i < VW; i++) begin
      q.push_back('{T_VID, $urandom, p});
      if (slow) repeat (40) @(negedge clk);
    end
  endtask

  // environment models and checks, evaluated just before each rising edge
  always @(negedge clk) if (reset_n) begin
    #1;
    fifo_almost_empty = (q.size() == 0);
    data_fr_fifo      = (q.size() != 0) ? q[0].data : 32'hdead_beef;
    #3;
    if (fifo_rd_req) check("read while input almost empty", !fifo_almost_empty);
    if (fifo_wr_req) check("write while output almost full", !fifo_almost_full);
    if (rsa_start)   check("RSA start while busy", !rsa_busy);
    if (zuc_load)    check("ZUC load without valid key", zuc_key_valid && !rsa_busy);
    if (dut.state == 3'd1 && rsa_busy) st_key_busy++;
    if (dut.state == 3'd4 && !zuc_key_valid) st_apply_wait++;
    if (dut.state == 3'd6 && fifo_almost_full && !fifo_almost_empty) st_out_full++;
    if (dut.state == 3'd6 && fifo_almost_empty) st_in_empty++;
    if (fifo_rd_req && !fifo_almost_empty) begin
      word_t w;
      w = q.pop_front();
      cur_pkt = w.pkt;
      unique case (w.tag)
        T_HDR: check("header must not write", !fifo_wr_req && !rsa_ct_wr);
        T_KEY: begin
          check("key word goes to RSA only", rsa_ct_wr && !fifo_wr_req);
          key_words_seen++;
        end
        T_VID: begin
          check("video word written", fifo_wr_req && !rsa_ct_wr);
          check("keystream advance", zuc_next == keyed);
          if (keyed) check("ZUC ready for video", zuc_ready);
          if (sig_of[w.pkt][1]) check("apply before video", last_load_pkt == w.pkt);
          if (rsa_busy) vid_during_rsa++;
        end
        default: ;
      endcase
    end else begin
      check("no strobes without a read", !fifo_wr_req && !rsa_ct_wr && !zuc_next);
    end
    if (rsa_start) begin
      rsa_starts++;
      check("all key words before start", key_words_seen == KW * rsa_starts);
    end
    if (zuc_load) begin
      zuc_loads++;
      last_load_pkt = cur_pkt;
    end
  end

  // RSA and ZUC models
  always @(posedge clk) begin
    if (rsa_start) begin
      rsa_busy <= 1'b1; zuc_key_valid <= 1'b0; rsa_timer <= 20 + ($urandom % 120);
    end else if (rsa_busy) begin
      rsa_timer <= rsa_timer - 1;
      if (rsa_timer == 0) begin rsa_busy <= 1'b0; zuc_key_valid <= 1'b1; end
    end
    if (zuc_load) begin
      zuc_ready <= 1'b0; zuc_timer <= 6; keyed <= 1'b1;
    end else if (zuc_timer > 0) begin
      zuc_timer <= zuc_timer - 1;
      if (zuc_timer == 1) zuc_ready <= 1'b1;
    end
    fifo_almost_full <= (($urandom % 8) == 0);
  end

  initial begin
    static logic [1:0] pattern [12] = '{2'd0, 2'd3, 2'd0, 2'd1, 2'd0, 2'd2, 2'd1, 2'd1, 2'd2, 2'd3, 2'd0, 2'd2};
    keyed = 0; last_load_pkt = -1; rsa_timer = 0; zuc_timer = 0;
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    enable = 1'b1;
    n_pkts = 0;
    foreach (pattern[i]) begin
      add_packet(n_pkts++, pattern[i], i == 2 || i == 10);
      if (pattern[i][0]) keys_sent++;
      if (pattern[i][1]) applies++;
      // starve the input now and then
      if (i % 4 == 3) while (q.size() != 0) @(negedge clk);
      if (i == 6) begin
        enable = 1'b0;
        repeat (10) @(negedge clk);
        enable = 1'b1;
      end
    end
    while (q.size() != 0) @(negedge clk);
    repeat (200) @(negedge clk);
    check("one RSA start per key", rsa_starts == keys_sent);
    check("one ZUC load per apply", zuc_loads == applies);
    check("back in header state", dut.state == 3'd0);
    $display("stalls: key while RSA busy %0d, apply wait %0d, output full %0d, input empty %0d; video words during RSA %0d",
             st_key_busy, st_apply_wait, st_out_full, st_in_empty, vid_during_rsa);
    check("key-while-busy stall happened", st_key_busy > 0);
    check("apply-wait stall happened", st_apply_wait > 0);
    check("output-full stall happened", st_out_full > 0);
    check("input-empty stall happened", st_in_empty > 0);
    check("video decrypted during RSA", vid_during_rsa > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
