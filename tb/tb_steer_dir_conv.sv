// tb_steer_dir_conv - checks the directional stage on its own, at a reduced
// maximum size of 40 x 30: a smoothed image is streamed in (with random
// gaps), and the horizontal and vertical 9-tap directional results of every
// pixel are compared with the reference model. Also checks one clock per
// pixel for the directional pass and the clamp at 255 with a gain-1.6 mask.
module tb_steer_dir_conv;
  import sgs_pkg::*;
  import sgs_ref_pkg::*;
  localparam int KD = 9, MW = 40, MH = 30;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic  rst = 1'b1;
  col_t  img_w = '0;
  row_t  img_h = '0;
  logic  mask_load = 1'b0;
  coef_t mask_d [KD];
  logic  in_valid = 1'b0;
  tag_t  in_tag = '0;
  pix_t  in_pix = '0;
  logic  busy, done, out_valid, sat;
  tag_t  out_tag;
  pix_t  out_h, out_v;

  steer_dir_conv #(.KD(KD), .MAX_W(MW), .MAX_H(MH)) dut (.*);

  frame_t img, ref_h, ref_v;
  int n_out, done_cycle, n_sat = 0;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks += 2;
      n_out++;
      if (out_h != pix_t'(ref_h[int'(out_tag.row)][int'(out_tag.col)])) failures++;
      if (out_v != pix_t'(ref_v[int'(out_tag.row)][int'(out_tag.col)])) begin
        failures++;
        if (failures < 10)
          $display("(%0d,%0d): v got %0d want %0d", out_tag.row, out_tag.col, out_v,
                   ref_v[int'(out_tag.row)][int'(out_tag.col)]);
      end
    end
    if (!rst && done) done_cycle = cycle;
    if (!rst && sat) n_sat++;
  end

  task automatic frame(input int w, input int h, input int seed, input coefs_t cd);
    int last_cycle, took;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) img[r][c] = test_pixel(r, c, seed);
    pass1d(img, ref_h, w, h, cd, 1'b0);
    pass1d(img, ref_v, w, h, cd, 1'b1);
    @(negedge clk);
    img_w = col_t'(w); img_h = row_t'(h);
    for (int i = 0; i < KD; i++) mask_d[i] = coef_t'(cd[i]);
    mask_load = 1'b1;
    @(negedge clk);
    mask_load = 1'b0;
    n_out = 0; done_cycle = -1;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        while ($urandom_range(0, 4) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_tag.row = row_t'(r); in_tag.col = col_t'(c); in_tag.last = (r == h - 1 && c == w - 1);
        in_pix = pix_t'(img[r][c]);
        @(negedge clk);
      end
    in_valid = 1'b0;
    last_cycle = cycle;
    checks++;
    if (!busy) failures++;
    while (done_cycle < 0) @(posedge clk);
    @(posedge clk);
    took = done_cycle - last_cycle;
    $display("%0dx%0d frame: %0d clocks after the last input pixel", w, h, took);
    checks += 3;
    if (n_out != w * h) begin failures++; $display("%0d pixels out", n_out); end
    if (took < w * h || took > w * h + 8) failures++;
    if (busy) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    frame(MW, MH, 7, gauss(4.0, KD, 65536));
    frame(11, 19, 150, gauss(2.0, KD, 104858));
    checks++;
    if (n_sat == 0) failures++;
    $display("clamps: %0d", n_sat);
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
