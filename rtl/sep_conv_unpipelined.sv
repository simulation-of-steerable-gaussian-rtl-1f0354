// sep_conv_unpipelined - unpipelined separable Gaussian convolution.
//
// Smooths an image with a K x K Gaussian by two 1-D passes run one after the
// other. Pass 1 (vertical): the image read controller scans the image BRAM,
// which returns a K-pixel column window per clock; a pixel & mask read
// controller and a multiplier & adder compute the intermediate convolution
// (IC) result, rescaled to 8 bits, and it is written to a second banked
// frame store, the IC BRAM. When the last IC result is written, pass 2
// (horizontal) starts: the IC read controller scans the IC BRAM by K-pixel
// row windows, and a second pixel & mask controller and multiplier & adder
// produce the smoothed image, rescaled again.
//
// Interface: as sep_conv_pipelined. Timing: each pass takes one clock per
// pixel, so a frame takes 2 * img_w * img_h + 6 clocks from start to done,
// two clocks per output pixel; it needs a whole second frame store where the
// pipelined version needs only a K-entry FIFO. The image border is
// zero-padded.
module sep_conv_unpipelined
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
  input  logic  load_we,
  input  row_t  load_row,
  input  col_t  load_col,
  input  pix_t  load_pix,
  input  logic  start,
  input  coef_t mask_v [K],
  input  coef_t mask_h [K],
  output logic  busy,
  output logic  done,
  output logic  out_valid,
  output tag_t  out_tag,
  output pix_t  out_pix,
  output logic  sat_v,
  output logic  sat_h
);
  typedef enum logic [1:0] {S_IDLE, S_VPASS, S_HPASS} state_e;
  state_e state;

  logic go;
  assign go = start && (state == S_IDLE);

  // ---- pass 1: image controller -> image BRAM -> vertical filter ----------
  logic s1_busy, s1_valid, s1_done;
  tag_t s1_tag;
  raster_scan u_scan_img (
    .clk(clk), .rst(rst), .start(go), .img_w(img_w), .img_h(img_h),
    .busy(s1_busy), .valid(s1_valid), .tag(s1_tag), .done(s1_done)
  );

  logic i_rd_en  [1];
  row_t i_rd_row [1];
  col_t i_rd_col [1];
  dir_e i_rd_dir [1];
  pix_t i_rd_win [1][K];
  logic i_rd_ok  [1][K];
  assign i_rd_en[0]  = s1_valid;
  assign i_rd_row[0] = s1_tag.row;
  assign i_rd_col[0] = s1_tag.col;
  assign i_rd_dir[0] = DIR_VERTICAL;

  banked_frame_ram #(.B(K), .MAX_W(MAX_W), .MAX_H(MAX_H), .N_RD(1)) u_img (
    .clk(clk), .img_w(img_w), .img_h(img_h),
    .wr_en(load_we && (state == S_IDLE)), .wr_row(load_row), .wr_col(load_col),
    .wr_data(load_pix),
    .rd_en(i_rd_en), .rd_row(i_rd_row), .rd_col(i_rd_col), .rd_dir(i_rd_dir),
    .rd_win(i_rd_win), .rd_ok(i_rd_ok)
  );

  logic r1_valid;
  tag_t r1_tag;
  always_ff @(posedge clk) begin
    if (rst) r1_valid <= 1'b0;
    else     r1_valid <= s1_valid;
    r1_tag <= s1_tag;
  end

  logic  pv_valid, pv_pad;
  tag_t  pv_tag;
  pix_t  pv_pix  [K];
  coef_t pv_coef [K];
  pixel_mask_ctrl #(.T(K)) u_pmc_v (
    .clk(clk), .rst(rst), .mask_load(go), .mask_in(mask_v),
    .in_valid(r1_valid), .in_tag(r1_tag), .in_win(i_rd_win[0]), .in_ok(i_rd_ok[0]),
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

  // ---- IC BRAM with its write & read controller -----------------------------
  logic ic_done;
  assign ic_done = ic_valid && ic_tag.last;

  logic s2_busy, s2_valid, s2_done;
  tag_t s2_tag;
  raster_scan u_scan_ic (
    .clk(clk), .rst(rst), .start(ic_done), .img_w(img_w), .img_h(img_h),
    .busy(s2_busy), .valid(s2_valid), .tag(s2_tag), .done(s2_done)
  );

  logic c_rd_en  [1];
  row_t c_rd_row [1];
  col_t c_rd_col [1];
  dir_e c_rd_dir [1];
  pix_t c_rd_win [1][K];
  logic c_rd_ok  [1][K];
  assign c_rd_en[0]  = s2_valid;
  assign c_rd_row[0] = s2_tag.row;
  assign c_rd_col[0] = s2_tag.col;
  assign c_rd_dir[0] = DIR_HORIZONTAL;

  banked_frame_ram #(.B(K), .MAX_W(MAX_W), .MAX_H(MAX_H), .N_RD(1)) u_icr (
    .clk(clk), .img_w(img_w), .img_h(img_h),
    .wr_en(ic_valid), .wr_row(ic_tag.row), .wr_col(ic_tag.col), .wr_data(ic_pix),
    .rd_en(c_rd_en), .rd_row(c_rd_row), .rd_col(c_rd_col), .rd_dir(c_rd_dir),
    .rd_win(c_rd_win), .rd_ok(c_rd_ok)
  );

  logic r2_valid;
  tag_t r2_tag;
  always_ff @(posedge clk) begin
    if (rst) r2_valid <= 1'b0;
    else     r2_valid <= s2_valid;
    r2_tag <= s2_tag;
  end

  // ---- pass 2: horizontal filter --------------------------------------------
  logic  ph_valid, ph_pad;
  tag_t  ph_tag;
  pix_t  ph_pix  [K];
  coef_t ph_coef [K];
  pixel_mask_ctrl #(.T(K)) u_pmc_h (
    .clk(clk), .rst(rst), .mask_load(go), .mask_in(mask_h),
    .in_valid(r2_valid), .in_tag(r2_tag), .in_win(c_rd_win[0]), .in_ok(c_rd_ok[0]),
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
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else case (state)
      S_IDLE:  if (start)   state <= S_VPASS;
      S_VPASS: if (ic_done) state <= S_HPASS;
      S_HPASS: if (done)    state <= S_IDLE;
      default:              state <= S_IDLE;
    endcase
  end
endmodule
