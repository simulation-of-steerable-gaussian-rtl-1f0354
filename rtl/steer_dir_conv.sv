// steer_dir_conv - directional (steerable) 1-D Gaussian stage.
//
// The smoothed image from the separable convolution streams in (in_valid,
// in_tag, in_pix) and is written to BRAM1, a banked frame store with two read
// ports. When its last pixel has been written, the SC results read controller
// scans BRAM1 once, one pixel per clock. At every position one read port
// returns the KD-pixel window along the row and the other the KD-pixel window
// along the column. Each window has its own pixel & mask controller and
// multiplier & adder with the same 1 x KD directional mask, so every clock
// yields the steerable result in the horizontal direction (out_h) and in the
// vertical direction (out_v) of the same pixel.
//
// Interface: mask_load captures mask_d (hold it while a frame is in flight
// through this stage). Outputs stream in raster order with out_valid and
// out_tag; done pulses with the last pixel. Timing: about img_w * img_h + 3 clocks
// from the last input pixel to done, one clock per pixel, which adds one
// clock per pixel to the separable stage in front. The image border is
// zero-padded; results are rescaled to 8 bits and clamped at 255.
module steer_dir_conv
  import sgs_pkg::*;
#(
  parameter int KD    = 9,
  parameter int MAX_W = 158,
  parameter int MAX_H = 158
) (
  input  logic  clk,
  input  logic  rst,
  input  col_t  img_w,
  input  row_t  img_h,
  input  logic  mask_load,
  input  coef_t mask_d [KD],
  input  logic  in_valid,
  input  tag_t  in_tag,
  input  pix_t  in_pix,
  output logic  busy,
  output logic  done,
  output logic  out_valid,
  output tag_t  out_tag,
  output pix_t  out_h,
  output pix_t  out_v,
  output logic  sat
);
  logic in_done;
  assign in_done = in_valid && in_tag.last;

  // ---- SC results read controller -----------------------------------------
  logic s_busy, s_valid, s_done;
  tag_t s_tag;
  raster_scan u_scan (
    .clk(clk), .rst(rst), .start(in_done), .img_w(img_w), .img_h(img_h),
    .busy(s_busy), .valid(s_valid), .tag(s_tag), .done(s_done)
  );

  // ---- BRAM1: port 0 reads rows, port 1 reads columns -------------------------
  logic rd_en  [2];
  row_t rd_row [2];
  col_t rd_col [2];
  dir_e rd_dir [2];
  pix_t rd_win [2][KD];
  logic rd_ok  [2][KD];
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      rd_en[p]  = s_valid;
      rd_row[p] = s_tag.row;
      rd_col[p] = s_tag.col;
    end
    rd_dir[0] = DIR_HORIZONTAL;
    rd_dir[1] = DIR_VERTICAL;
  end

  banked_frame_ram #(.B(KD), .MAX_W(MAX_W), .MAX_H(MAX_H), .N_RD(2)) u_bram1 (
    .clk(clk), .img_w(img_w), .img_h(img_h),
    .wr_en(in_valid), .wr_row(in_tag.row), .wr_col(in_tag.col), .wr_data(in_pix),
    .rd_en(rd_en), .rd_row(rd_row), .rd_col(rd_col), .rd_dir(rd_dir),
    .rd_win(rd_win), .rd_ok(rd_ok)
  );

  logic r_valid;
  tag_t r_tag;
  always_ff @(posedge clk) begin
    if (rst) r_valid <= 1'b0;
    else     r_valid <= s_valid;
    r_tag <= s_tag;
  end

  // ---- two directions ---------------------------------------------------------
  logic  p_valid [2];
  tag_t  p_tag   [2];
  pix_t  p_pix   [2][KD];
  coef_t p_coef  [2][KD];
  logic  p_pad   [2];
  logic  m_valid [2];
  tag_t  m_tag   [2];
  pix_t  m_pix   [2];
  logic  m_sat   [2];

  for (genvar d = 0; d < 2; d++) begin : g_dir
    pixel_mask_ctrl #(.T(KD)) u_pmc (
      .clk(clk), .rst(rst), .mask_load(mask_load), .mask_in(mask_d),
      .in_valid(r_valid), .in_tag(r_tag), .in_win(rd_win[d]), .in_ok(rd_ok[d]),
      .out_valid(p_valid[d]), .out_tag(p_tag[d]), .out_pix(p_pix[d]),
      .out_coef(p_coef[d]), .out_padded(p_pad[d])
    );
    mac_rescale #(.T(KD)) u_mac (
      .clk(clk), .rst(rst), .in_valid(p_valid[d]), .in_tag(p_tag[d]),
      .in_pix(p_pix[d]), .in_coef(p_coef[d]),
      .out_valid(m_valid[d]), .out_tag(m_tag[d]), .out_pix(m_pix[d]), .out_sat(m_sat[d])
    );
  end

  // Both directions run in lock step, so one valid and tag serve both.
  assign out_valid = m_valid[0];
  assign out_tag   = m_tag[0];
  assign out_h     = m_pix[0];
  assign out_v     = m_pix[1];
  assign sat       = m_valid[0] && (m_sat[0] || m_sat[1]);
  assign done      = out_valid && out_tag.last;

  always_ff @(posedge clk) begin
    if (rst)          busy <= 1'b0;
    else if (in_done) busy <= 1'b1;
    else if (done)    busy <= 1'b0;
  end
endmodule
