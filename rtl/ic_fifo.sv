// ic_fifo - FIFO of intermediate convolution (IC) results, with its write
// and read control, for the pipelined separable convolution.
//
// The vertical pass delivers IC pixels in raster order, one per clock. This
// FIFO keeps the last T of them and, each time a pixel is pushed, presents
// the horizontal window centred on the pixel pushed R = (T-1)/2 pushes
// earlier: its R left neighbours, itself and its R right neighbours. Taps that
// belong to another row (at the left and right image borders) are flagged not
// ok so that they are zero-padded. After the pixel tagged last, R bubbles are
// pushed on their own so that the final R windows of the frame come out too.
// Every entry carries its tag, so gaps in the input stream are harmless.
//
// Timing: out_valid is high in the clock after the push that completed the
// window; out_win[i] is the pixel at offset i - R. Keeping only a window's
// worth of IC results in a FIFO, instead of a whole intermediate image in
// BRAM, is what the document's pipelined method does; the row tags and the
// flush are this design's choices.
module ic_fifo
  import sgs_pkg::*;
#(
  parameter int T = 7
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  tag_t in_tag,
  input  pix_t in_pix,
  output logic out_valid,
  output tag_t out_tag,
  output pix_t out_win [T],
  output logic out_ok  [T]
);
  localparam int R  = (T - 1) / 2;
  localparam int FW = $clog2(R + 2);

  typedef struct packed {
    logic valid;
    tag_t tag;
    pix_t pix;
  } entry_t;

  entry_t          sr [T];      // sr[0] is the newest entry
  logic [FW-1:0]   flush_cnt;
  logic            pushed;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < T; i++) sr[i].valid <= 1'b0;
      flush_cnt <= '0;
      pushed    <= 1'b0;
    end else begin
      pushed <= 1'b0;
      if (in_valid || flush_cnt != '0) begin
        for (int i = T - 1; i > 0; i--) sr[i] <= sr[i-1];
        sr[0].valid <= in_valid;
        sr[0].tag   <= in_tag;
        sr[0].pix   <= in_pix;
        pushed      <= 1'b1;
        if (in_valid && in_tag.last) flush_cnt <= FW'(R);
        else if (!in_valid)          flush_cnt <= flush_cnt - 1'b1;
      end
    end
  end

  assign out_valid = pushed && sr[R].valid;
  assign out_tag   = sr[R].tag;
  always_comb
    for (int i = 0; i < T; i++) begin
      out_win[i] = sr[T-1-i].pix;
      out_ok[i]  = sr[T-1-i].valid && (sr[T-1-i].tag.row == sr[R].tag.row);
    end
endmodule
