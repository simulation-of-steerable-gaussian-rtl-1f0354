// tb_sgs_full_size - one complete 158 x 158 frame through the steerable
// Gaussian smoother with every parameter at its default (pipelined separable
// stage, 7-tap isotropic masks, 9-tap directional mask).
//
// Loads a test image, runs one frame with unity-gain Gaussian masks
// (isotropic sigma 3, directional sigma 4) and compares every separable,
// horizontal and vertical directional pixel with the reference model. Checks
// the frame time: two clocks per pixel plus a short pipeline latency.
module tb_sgs_full_size;
  import sgs_ref_pkg::*;

  localparam int K = 7, KD = 9, W = 158, H = 158;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [9:0]  img_cols = 10'(W);
  logic [8:0]  img_lines = 9'(H);
  logic        load_we = 1'b0;
  logic [8:0]  load_row = '0;
  logic [9:0]  load_col = '0;
  logic [7:0]  load_pix = '0;
  logic        start = 1'b0;
  logic [15:0] mask_v [K];
  logic [15:0] mask_h [K];
  logic [15:0] mask_d [KD];
  logic        busy, done, sc_valid, st_valid, sc_sat, st_sat;
  logic [8:0]  sc_row, st_row;
  logic [9:0]  sc_col, st_col;
  logic [7:0]  sc_pix, st_h, st_v;

  steerable_gaussian_top dut (
    .clk, .reset, .img_cols, .img_lines, .load_we, .load_row, .load_col, .load_pix,
    .start, .mask_v, .mask_h, .mask_d, .busy, .done,
    .sc_valid, .sc_row, .sc_col, .sc_pix, .st_valid, .st_row, .st_col, .st_h, .st_v,
    .sc_sat, .st_sat
  );

  frame_t img, ic, ref_sc, ref_h, ref_v;
  int n_sc = 0, n_st = 0, done_cycle = -1;

  always @(posedge clk) begin
    if (!reset && sc_valid) begin
      checks++;
      n_sc++;
      if (sc_pix != 8'(ref_sc[int'(sc_row)][int'(sc_col)])) failures++;
    end
    if (!reset && st_valid) begin
      checks += 2;
      n_st++;
      if (st_h != 8'(ref_h[int'(st_row)][int'(st_col)])) failures++;
      if (st_v != 8'(ref_v[int'(st_row)][int'(st_col)])) failures++;
    end
    if (!reset && done) done_cycle = cycle;
  end

  initial begin
    coefs_t g3, g4;
    int start_cycle, took;
    g3 = gauss(3.0, K, 65536);
    g4 = gauss(4.0, KD, 65536);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) img[r][c] = test_pixel(r, c, 42);
    pass1d(img, ic, W, H, g3, 1'b1);
    pass1d(ic, ref_sc, W, H, g3, 1'b0);
    pass1d(ref_sc, ref_h, W, H, g4, 1'b0);
    pass1d(ref_sc, ref_v, W, H, g4, 1'b1);
    for (int i = 0; i < K; i++) begin mask_v[i] = 16'(g3[i]); mask_h[i] = 16'(g3[i]); end
    for (int i = 0; i < KD; i++) mask_d[i] = 16'(g4[i]);
    repeat (4) @(posedge clk);
    reset = 1'b0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        load_we = 1'b1; load_row = 9'(r); load_col = 10'(c); load_pix = 8'(img[r][c]);
      end
    @(negedge clk);
    load_we = 1'b0;
    start = 1'b1;
    @(posedge clk);
    start_cycle = cycle;
    @(negedge clk);
    start = 1'b0;
    wait (done_cycle >= 0);
    @(posedge clk);
    took = done_cycle - start_cycle;
    $display("frame %0dx%0d: %0d clocks, %0.3f clocks per pixel", W, H, took,
             real'(took) / real'(W * H));
    checks += 2;
    if (n_sc != W * H || n_st != W * H) failures++;
    if (took < 2 * W * H || took > 2 * W * H + 32) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
