// tb_sep_conv_unpipelined - checks the unpipelined separable convolution on
// its own, at a reduced maximum size of 40 x 30: a 40 x 30 frame with
// unity-gain 7-tap Gaussian masks (sigma 3 vertical, sigma 1.5 horizontal), a
// 17 x 9 frame with gain 1.6 so that both passes clamp, every output pixel
// against the reference model, and the frame time of 2 clock(s) per
// pixel plus a short latency.
module tb_sep_conv_unpipelined;
  import sgs_pkg::*;
  import sgs_ref_pkg::*;
  localparam int K = 7, MW = 40, MH = 30, RATE = 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic  rst = 1'b1;
  col_t  img_w = '0;
  row_t  img_h = '0;
  logic  load_we = 1'b0;
  row_t  load_row = '0;
  col_t  load_col = '0;
  pix_t  load_pix = '0;
  logic  start = 1'b0;
  coef_t mask_v [K];
  coef_t mask_h [K];
  logic  busy, done, out_valid, sat_v, sat_h;
  tag_t  out_tag;
  pix_t  out_pix;

  sep_conv_unpipelined #(.K(K), .MAX_W(MW), .MAX_H(MH)) dut (.*);

  frame_t img, ic, ref_o;
  int n_out, done_cycle, n_sat_v = 0, n_sat_h = 0;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      n_out++;
      if (out_pix != pix_t'(ref_o[int'(out_tag.row)][int'(out_tag.col)])) begin
        failures++;
        if (failures < 10)
          $display("(%0d,%0d): got %0d want %0d", out_tag.row, out_tag.col, out_pix,
                   ref_o[int'(out_tag.row)][int'(out_tag.col)]);
      end
    end
    if (!rst && done) done_cycle = cycle;
    if (!rst && sat_v) n_sat_v++;
    if (!rst && sat_h) n_sat_h++;
  end

  task automatic frame(input int w, input int h, input int seed, input coefs_t cv,
                       input coefs_t ch);
    int start_cycle, took;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) img[r][c] = test_pixel(r, c, seed);
    pass1d(img, ic, w, h, cv, 1'b1);
    pass1d(ic, ref_o, w, h, ch, 1'b0);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        @(negedge clk);
        load_we = 1'b1; load_row = row_t'(r); load_col = col_t'(c); load_pix = pix_t'(img[r][c]);
      end
    @(negedge clk);
    load_we = 1'b0;
    for (int i = 0; i < K; i++) begin mask_v[i] = coef_t'(cv[i]); mask_h[i] = coef_t'(ch[i]); end
    img_w = col_t'(w); img_h = row_t'(h);
    n_out = 0; done_cycle = -1;
    start = 1'b1;
    @(posedge clk);
    start_cycle = cycle;
    @(negedge clk);
    start = 1'b0;
    foreach (mask_v[i]) begin mask_v[i] = '1; mask_h[i] = '1; end  // captured at start
    while (done_cycle < 0) @(posedge clk);
    @(posedge clk);
    took = done_cycle - start_cycle;
    $display("%0dx%0d frame: %0d clocks", w, h, took);
    checks += 3;
    if (n_out != w * h) begin failures++; $display("%0d pixels out", n_out); end
    if (took < RATE * w * h || took > RATE * w * h + 16) failures++;
    if (busy) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    frame(MW, MH, 3, gauss(3.0, K, 65536), gauss(1.5, K, 65536));
    frame(17, 9, 150, gauss(3.0, K, 104858), gauss(1.5, K, 104858));
    checks += 2;
    if (n_sat_v == 0) failures++;
    if (n_sat_h == 0) failures++;
    $display("clamps: vertical %0d horizontal %0d", n_sat_v, n_sat_h);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
