// Synchronous first-word-fall-through FIFO with almost-full and
// almost-empty flags, used as the input FIFO (encrypted stream) and the
// output FIFO (decrypted video) of the decryptor.
//
// A circular buffer of DEPTH words with read and write pointers and an
// occupancy counter. rd_data always shows the oldest word while the FIFO is
// not empty; rd_req removes it at the clock edge. wr_req stores wr_data at
// the edge. A write to a full FIFO and a read from an empty one are ignored
// (and flagged by assertions). Simultaneous read and write keep the count.
// almost_full is high when at least AF_LEVEL words are stored, almost_empty
// when at most AE_LEVEL are stored (AE_LEVEL = 0 makes it an empty flag).
// The flags come from registers, one cycle after the access.
//
// The design places a FIFO on each side of the cryptosystem and uses an
// almost-full and an almost-empty flag; depth, levels and the
// first-word-fall-through read are this implementation's choices.
module sync_fifo #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned AF_LEVEL = DEPTH - 4,
  parameter int unsigned AE_LEVEL = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_req,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_req,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic             almost_full,
  output logic             almost_empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign do_wr = wr_req && !full;
  assign do_rd = rd_req && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  assign rd_data      = mem[rp];
  assign full         = (count == CW'(DEPTH));
  assign empty        = (count == '0);
  assign almost_full  = (count >= CW'(AF_LEVEL));
  assign almost_empty = (count <= CW'(AE_LEVEL));

  no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_req |-> !full);
  no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_req |-> !empty);
endmodule
