// pixel_mask_ctrl - pixel & mask controller of one 1-D filter pass.
//
// Holds the T coefficients of a 1-D Gaussian mask, captured from mask_in
// when mask_load is high (the mask then stays fixed for the whole frame), and
// pairs every pixel of an incoming T-tap window with its coefficient for the
// multiplier & adder. Taps that fall outside the image (in_ok low) are
// replaced by zero, i.e. the image is zero-padded at its borders. The window,
// its tag and valid are registered: one clock of latency, one window per
// clock. The document names this controller; the border treatment and the
// mask capture are this design's choices.
module pixel_mask_ctrl
  import sgs_pkg::*;
#(
  parameter int T = 7
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  mask_load,
  input  coef_t mask_in  [T],
  input  logic  in_valid,
  input  tag_t  in_tag,
  input  pix_t  in_win   [T],
  input  logic  in_ok    [T],
  output logic  out_valid,
  output tag_t  out_tag,
  output pix_t  out_pix  [T],
  output coef_t out_coef [T],
  output logic  out_padded   // at least one tap of this window was padded
);
  coef_t mask_q [T];

  always_ff @(posedge clk) begin
    if (mask_load)
      for (int i = 0; i < T; i++) mask_q[i] <= mask_in[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      logic pad;
      pad = 1'b0;
      out_tag <= in_tag;
      for (int i = 0; i < T; i++) begin
        out_pix[i] <= in_ok[i] ? in_win[i] : '0;
        pad = pad | !in_ok[i];
      end
      out_padded <= pad;
    end
  end

  assign out_coef = mask_q;
endmodule
