// steerable_gaussian_top - steerable Gaussian smoother.
//
// A directional Gaussian smoother at an arbitrary orientation can be built
// from an isotropic Gaussian followed by one more 1-D Gaussian along the
// wanted direction. The isotropic part is separable, so the whole filter is
// three 1-D passes: vertical K x 1, horizontal 1 x K, then the directional
// 1 x KD pass. This top wires the separable stage (pipelined by default,
// PIPELINED = 1, or the unpipelined variant, PIPELINED = 0) into the
// directional stage, which produces the horizontal and the vertical
// directional results of every pixel at once.
//
// Use: load the image, pixel by pixel, through load_we/load_row/load_col/
// load_pix while busy is low. Pulse start with the image size (img_cols x
// img_lines, at most MAX_W x MAX_H) and the three masks valid; the size is
// captured then and the masks are held inside. The separable result streams
// out on sc_* and the directional results on st_*, both in raster order, one
// pixel per clock; done pulses with the last directional pixel.
//
// Timing, from start to done: about 2 clocks per pixel with the pipelined
// separable stage and 3 with the unpipelined one (each 1-D pass that keeps
// its intermediate image in a frame store costs one full frame of clocks).
// Coefficients are unsigned with 16 fraction bits; every pass rounds, drops
// the fraction and clamps at 255. Image borders are zero-padded.
module steerable_gaussian_top
  import sgs_pkg::*;
#(
  parameter int MAX_W     = 158,
  parameter int MAX_H     = 158,
  parameter int K         = 7,
  parameter int KD        = 9,
  parameter bit PIPELINED = 1'b1
) (
  input  logic  clk,
  input  logic  reset,
  // image size, captured at start (port widths as the filter's port diagram)
  input  logic [COL_W-1:0] img_cols,
  input  logic [ROW_W-1:0] img_lines,
  // image load port into the image BRAM
  input  logic  load_we,
  input  logic [ROW_W-1:0] load_row,
  input  logic [COL_W-1:0] load_col,
  input  logic [PIX_W-1:0] load_pix,
  // control and masks
  input  logic  start,
  input  logic [COEF_W-1:0] mask_v [K],
  input  logic [COEF_W-1:0] mask_h [K],
  input  logic [COEF_W-1:0] mask_d [KD],
  output logic  busy,
  output logic  done,
  // separable (isotropic) smoothing result
  output logic  sc_valid,
  output logic [ROW_W-1:0] sc_row,
  output logic [COL_W-1:0] sc_col,
  output logic [PIX_W-1:0] sc_pix,
  // steerable results in horizontal and vertical direction
  output logic  st_valid,
  output logic [ROW_W-1:0] st_row,
  output logic [COL_W-1:0] st_col,
  output logic [PIX_W-1:0] st_h,
  output logic [PIX_W-1:0] st_v,
  // a pass clamped a result at 255 (separable stage / directional stage)
  output logic  sc_sat,
  output logic  st_sat
);
  col_t img_w;
  row_t img_h;
  logic go;
  logic sep_busy, sep_done, sep_valid, sat_v, sat_h;
  tag_t sep_tag;
  pix_t sep_pix;
  logic st_busy;
  tag_t st_tag;

  assign go = start && !busy;

  always_ff @(posedge clk) begin
    if (reset) begin
      img_w <= col_t'(MAX_W);
      img_h <= row_t'(MAX_H);
    end else if (go) begin
      img_w <= img_cols;
      img_h <= img_lines;
    end
  end

  // The size registers are loaded in the start clock; the engines first use
  // the size one clock later.
  if (PIPELINED) begin : g_sep
    sep_conv_pipelined #(.K(K), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_sep (
      .clk(clk), .rst(reset), .img_w(img_w), .img_h(img_h),
      .load_we(load_we), .load_row(load_row), .load_col(load_col), .load_pix(load_pix),
      .start(go), .mask_v(mask_v), .mask_h(mask_h),
      .busy(sep_busy), .done(sep_done),
      .out_valid(sep_valid), .out_tag(sep_tag), .out_pix(sep_pix),
      .sat_v(sat_v), .sat_h(sat_h)
    );
  end else begin : g_sep
    sep_conv_unpipelined #(.K(K), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_sep (
      .clk(clk), .rst(reset), .img_w(img_w), .img_h(img_h),
      .load_we(load_we), .load_row(load_row), .load_col(load_col), .load_pix(load_pix),
      .start(go), .mask_v(mask_v), .mask_h(mask_h),
      .busy(sep_busy), .done(sep_done),
      .out_valid(sep_valid), .out_tag(sep_tag), .out_pix(sep_pix),
      .sat_v(sat_v), .sat_h(sat_h)
    );
  end

  steer_dir_conv #(.KD(KD), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_steer (
    .clk(clk), .rst(reset), .img_w(img_w), .img_h(img_h),
    .mask_load(go), .mask_d(mask_d),
    .in_valid(sep_valid), .in_tag(sep_tag), .in_pix(sep_pix),
    .busy(st_busy), .done(done),
    .out_valid(st_valid), .out_tag(st_tag), .out_h(st_h), .out_v(st_v),
    .sat(st_sat)
  );

  // Busy from start until the directional stage has delivered its last pixel.
  logic run;
  always_ff @(posedge clk) begin
    if (reset)     run <= 1'b0;
    else if (go)   run <= 1'b1;
    else if (done) run <= 1'b0;
  end
  assign busy = run || sep_busy || st_busy;

  assign sc_valid = sep_valid;
  assign sc_row   = sep_tag.row;
  assign sc_col   = sep_tag.col;
  assign sc_pix   = sep_pix;
  assign sc_sat   = sat_v || sat_h;
  assign st_row   = st_tag.row;
  assign st_col   = st_tag.col;

  // The directional stage only starts reading BRAM1 once the separable
  // stage has delivered its whole frame, so the two streams never overlap.
  always_ff @(posedge clk)
    if (!reset) assert (!(sc_valid && st_valid))
      else $error("separable and directional results overlap");
endmodule
