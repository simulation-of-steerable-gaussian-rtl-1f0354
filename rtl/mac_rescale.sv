// mac_rescale - multiplier & adder of one 1-D filter pass, with rescaling.
//
// Multiplies the T window pixels by their T mask coefficients, adds the
// products, and rescales the sum back to an 8-bit intensity: the coefficients
// carry COEF_FRAC fraction bits, so the sum is rounded to nearest and shifted
// right by COEF_FRAC, then clamped at 255 so that the output never exceeds the
// 8-bit range. out_sat flags a clamped result. Registered output: one clock
// of latency, one result per clock. The rescale at every adder stage follows
// the document; rounding to nearest is this design's choice.
module mac_rescale
  import sgs_pkg::*;
#(
  parameter int T = 7
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  tag_t  in_tag,
  input  pix_t  in_pix  [T],
  input  coef_t in_coef [T],
  output logic  out_valid,
  output tag_t  out_tag,
  output pix_t  out_pix,
  output logic  out_sat
);
  localparam int ACC_W = PIX_W + COEF_W + $clog2(T + 1) + 1;
  typedef logic [ACC_W-1:0] acc_t;

  acc_t sum, scaled;
  logic sat;

  always_comb begin
    sum = '0;
    for (int i = 0; i < T; i++) sum += acc_t'(in_pix[i]) * acc_t'(in_coef[i]);
    scaled = (sum + (acc_t'(1) << (COEF_FRAC - 1))) >> COEF_FRAC;
    sat    = (scaled > acc_t'(PIX_MAX));
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_tag <= in_tag;
      out_pix <= sat ? pix_t'(PIX_MAX) : pix_t'(scaled);
      out_sat <= sat;
    end
  end
endmodule
