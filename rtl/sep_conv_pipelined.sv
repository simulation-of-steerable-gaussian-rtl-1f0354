// sep_conv_pipelined - pipelined separable Gaussian convolution.
//
// Smooths an image with a K x K Gaussian by two 1-D passes that run at the
// same time: a vertical K x 1 pass and a horizontal 1 x K pass. The image
// sits in a banked frame store ("image BRAM"), loaded through the load_*
// port while the engine is idle. A raster read controller visits each pixel
// once per clock; the store returns its K-pixel column window in one clock; a
// pixel & mask controller and a multiplier & adder produce the intermediate
// convolution (IC) result, rescaled to 8 bits. IC results go straight into a
// short FIFO that supplies the horizontal window to the second pixel & mask
// controller and multiplier & adder, whose result is rescaled again.
//
// Interface: pulse start (with mask_v, mask_h valid in that clock, image
// size held steady) and the smoothed image streams out on out_valid/out_tag/
// out_pix in raster order, one pixel per clock; done pulses with the last
// pixel. Timing: img_w * img_h + 6 + (K-1)/2 clocks from start to done (9 extra for K = 7), i.e.
// one clock per pixel. The image border is zero-padded.
// sat_v/sat_h pulse when a pass had to clamp a result at 255.
module sep_conv_pipelined
  import sgs_pkg::*;
#(
  parameter int K     = 7,
  parameter int MAX_W = 158,
  parameter int MAX_H = 158
) (
  input  logic  clk,
  input  logic  rst,
  input  col_t  img_w,
  input  row_t  img_h,
  // image load port
  input  logic  load_we,
  input  row_t  load_row,
  input  col_t  load_col,
  input  pix_t  load_pix,
  // control
  input  logic  start,
  input  coef_t mask_v [K],
  input  coef_t mask_h [K],
  output logic  busy,
  output logic  done,
  // smoothed image
  output logic  out_valid,
  output tag_t  out_tag,
  output pix_t  out_pix,
  output logic  sat_v,
  output logic  sat_h
);
  // ---- read controller ----------------------------------------------------
  logic scan_busy, scan_valid, scan_done;
  tag_t scan_tag;
  raster_scan u_scan (
    .clk(clk), .rst(rst), .start(start && !busy), .img_w(img_w), .img_h(img_h),
    .busy(scan_busy), .valid(scan_valid), .tag(scan_tag), .done(scan_done)
  );

  // ---- image BRAM ---------------------------------------------------------
  logic rd_en  [1];
  row_t rd_row [1];
  col_t rd_col [1];
  dir_e rd_dir [1];
  pix_t rd_win [1][K];
  logic rd_ok  [1][K];
  assign rd_en[0]  = scan_valid;
  assign rd_row[0] = scan_tag.row;
  assign rd_col[0] = scan_tag.col;
  assign rd_dir[0] = DIR_VERTICAL;

  banked_frame_ram #(.B(K), .MAX_W(MAX_W), .MAX_H(MAX_H), .N_RD(1)) u_img (
    .clk(clk), .img_w(img_w), .img_h(img_h),
    .wr_en(load_we && !busy), .wr_row(load_row), .wr_col(load_col), .wr_data(load_pix),
    .rd_en(rd_en), .rd_row(rd_row), .rd_col(rd_col), .rd_dir(rd_dir),
    .rd_win(rd_win), .rd_ok(rd_ok)
  );

  logic rd_valid;
  tag_t rd_tag;
  always_ff @(posedge clk) begin
    if (rst) rd_valid <= 1'b0;
    else     rd_valid <= scan_valid;
    rd_tag <= scan_tag;
  end

  // ---- vertical pass: pixel & mask read controller, multiplier & adder ----
  logic  pv_valid;
  tag_t  pv_tag;
  pix_t  pv_pix  [K];
  coef_t pv_coef [K];
  logic  pv_pad;
  pixel_mask_ctrl #(.T(K)) u_pmc_v (
    .clk(clk), .rst(rst), .mask_load(start && !busy), .mask_in(mask_v),
    .in_valid(rd_valid), .in_tag(rd_tag), .in_win(rd_win[0]), .in_ok(rd_ok[0]),
    .out_valid(pv_valid), .out_tag(pv_tag), .out_pix(pv_pix), .out_coef(pv_coef),
    .out_padded(pv_pad)
  );

  logic ic_valid, ic_sat;
  tag_t ic_tag;
  pix_t ic_pix;
  mac_rescale #(.T(K)) u_mac_v (
    .clk(clk), .rst(rst), .in_valid(pv_valid), .in_tag(pv_tag),
    .in_pix(pv_pix), .in_coef(pv_coef),
    .out_valid(ic_valid), .out_tag(ic_tag), .out_pix(ic_pix), .out_sat(ic_sat)
  );

  // ---- IC results FIFO ----------------------------------------------------
  logic fw_valid;
  tag_t fw_tag;
  pix_t fw_win [K];
  logic fw_ok  [K];
  ic_fifo #(.T(K)) u_fifo (
    .clk(clk), .rst(rst), .in_valid(ic_valid), .in_tag(ic_tag), .in_pix(ic_pix),
    .out_valid(fw_valid), .out_tag(fw_tag), .out_win(fw_win), .out_ok(fw_ok)
  );

  // ---- horizontal pass ------------------------------------------------------
  logic  ph_valid;
  tag_t  ph_tag;
  pix_t  ph_pix  [K];
  coef_t ph_coef [K];
  logic  ph_pad;
  pixel_mask_ctrl #(.T(K)) u_pmc_h (
    .clk(clk), .rst(rst), .mask_load(start && !busy), .mask_in(mask_h),
    .in_valid(fw_valid), .in_tag(fw_tag), .in_win(fw_win), .in_ok(fw_ok),
    .out_valid(ph_valid), .out_tag(ph_tag), .out_pix(ph_pix), .out_coef(ph_coef),
    .out_padded(ph_pad)
  );

  logic h_sat;
  mac_rescale #(.T(K)) u_mac_h (
    .clk(clk), .rst(rst), .in_valid(ph_valid), .in_tag(ph_tag),
    .in_pix(ph_pix), .in_coef(ph_coef),
    .out_valid(out_valid), .out_tag(out_tag), .out_pix(out_pix), .out_sat(h_sat)
  );

  assign sat_v = ic_valid && ic_sat;
  assign sat_h = out_valid && h_sat;
  assign done  = out_valid && out_tag.last;

  always_ff @(posedge clk) begin
    if (rst)        busy <= 1'b0;
    else if (start) busy <= 1'b1;
    else if (done)  busy <= 1'b0;
  end
endmodule
