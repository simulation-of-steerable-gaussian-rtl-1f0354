// tb_steerable_gaussian_top - end-to-end test of the steerable Gaussian
// smoother, in both of its configurations side by side: the pipelined
// separable stage (default) and the unpipelined one.
//
// Three frames go through both: a full 158 x 158 image with unity-gain
// Gaussian masks (isotropic sigma 3, 7 taps; directional sigma 4, 9 taps),
// a small 23 x 11 image with masks of gain 1.6 so that both stages must clamp
// at 255, and the 7 x 7 test image with a 3 x 3 Gaussian (sigma 1, zero taps
// around it). Every separable pixel and every horizontal and vertical
// directional pixel is compared with the reference model, and the clocks from
// start to done are checked against 2 clocks per pixel (pipelined) and 3
// (unpipelined). The testbench counts how often each mechanism happened and
// fails if one never did.
module tb_steerable_gaussian_top;
  import sgs_ref_pkg::*;

  localparam int K = 7, KD = 9, MW = 158, MH = 158;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [9:0]  img_cols = '0;
  logic [8:0]  img_lines = '0;
  logic        load_we = 1'b0;
  logic [8:0]  load_row = '0;
  logic [9:0]  load_col = '0;
  logic [7:0]  load_pix = '0;
  logic        start = 1'b0;
  logic [15:0] mask_v [K];
  logic [15:0] mask_h [K];
  logic [15:0] mask_d [KD];

  // outputs, index 0 = pipelined, 1 = unpipelined
  logic       busy [2], done [2], sc_valid [2], st_valid [2], sc_sat [2], st_sat [2];
  logic [8:0] sc_row [2], st_row [2];
  logic [9:0] sc_col [2], st_col [2];
  logic [7:0] sc_pix [2], st_h [2], st_v [2];

  steerable_gaussian_top dut_p (
    .clk, .reset, .img_cols, .img_lines, .load_we, .load_row, .load_col, .load_pix,
    .start, .mask_v, .mask_h, .mask_d, .busy(busy[0]), .done(done[0]),
    .sc_valid(sc_valid[0]), .sc_row(sc_row[0]), .sc_col(sc_col[0]), .sc_pix(sc_pix[0]),
    .st_valid(st_valid[0]), .st_row(st_row[0]), .st_col(st_col[0]),
    .st_h(st_h[0]), .st_v(st_v[0]), .sc_sat(sc_sat[0]), .st_sat(st_sat[0])
  );

  steerable_gaussian_top #(.PIPELINED(1'b0)) dut_u (
    .clk, .reset, .img_cols, .img_lines, .load_we, .load_row, .load_col, .load_pix,
    .start, .mask_v, .mask_h, .mask_d, .busy(busy[1]), .done(done[1]),
    .sc_valid(sc_valid[1]), .sc_row(sc_row[1]), .sc_col(sc_col[1]), .sc_pix(sc_pix[1]),
    .st_valid(st_valid[1]), .st_row(st_row[1]), .st_col(st_col[1]),
    .st_h(st_h[1]), .st_v(st_v[1]), .sc_sat(sc_sat[1]), .st_sat(st_sat[1])
  );

  frame_t img, ic, ref_sc, ref_h, ref_v;
  int n_sc [2], n_st [2], done_cycle [2];
  int n_sc_sat [2], n_st_sat [2], n_frames [2], n_small_frames;

  // ---- output monitors --------------------------------------------------------
  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(posedge clk) begin
      if (!reset && sc_valid[d]) begin
        checks++;
        n_sc[d]++;
        if (sc_pix[d] != 8'(ref_sc[int'(sc_row[d])][int'(sc_col[d])])) begin
          failures++;
          if (failures < 10)
            $display("dut %0d sc (%0d,%0d) got %0d want %0d", d, sc_row[d], sc_col[d],
                     sc_pix[d], ref_sc[int'(sc_row[d])][int'(sc_col[d])]);
        end
      end
      if (!reset && st_valid[d]) begin
        checks += 2;
        n_st[d]++;
        if (st_h[d] != 8'(ref_h[int'(st_row[d])][int'(st_col[d])]) ||
            st_v[d] != 8'(ref_v[int'(st_row[d])][int'(st_col[d])])) begin
          failures++;
          if (failures < 10)
            $display("dut %0d st (%0d,%0d) got h%0d v%0d want h%0d v%0d", d,
                     st_row[d], st_col[d], st_h[d], st_v[d],
                     ref_h[int'(st_row[d])][int'(st_col[d])], ref_v[int'(st_row[d])][int'(st_col[d])]);
        end
      end
      if (!reset && sc_sat[d]) n_sc_sat[d]++;
      if (!reset && st_sat[d]) n_st_sat[d]++;
      if (!reset && done[d]) done_cycle[d] = cycle;
    end
  end

  task automatic run_frame(input int w, input int h, input int seed,
                           input coefs_t cv, input coefs_t ch, input coefs_t cd);
    int start_cycle, t;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) img[r][c] = test_pixel(r, c, seed);
    pass1d(img, ic, w, h, cv, 1'b1);
    pass1d(ic, ref_sc, w, h, ch, 1'b0);
    pass1d(ref_sc, ref_h, w, h, cd, 1'b0);
    pass1d(ref_sc, ref_v, w, h, cd, 1'b1);
    // load the image into both image BRAMs
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        @(negedge clk);
        load_we = 1'b1; load_row = 9'(r); load_col = 10'(c); load_pix = 8'(img[r][c]);
      end
    @(negedge clk);
    load_we = 1'b0;
    for (int i = 0; i < K; i++) begin mask_v[i] = 16'(cv[i]); mask_h[i] = 16'(ch[i]); end
    for (int i = 0; i < KD; i++) mask_d[i] = 16'(cd[i]);
    img_cols = 10'(w); img_lines = 9'(h);
    for (int d = 0; d < 2; d++) begin n_sc[d] = 0; n_st[d] = 0; done_cycle[d] = -1; end
    start = 1'b1;
    @(posedge clk);
    start_cycle = cycle;
    @(negedge clk);
    start = 1'b0;
    // scramble the inputs: they must have been captured at start
    img_cols = 10'd3; img_lines = 9'd2;
    foreach (mask_v[i]) begin mask_v[i] = 16'hFFFF; mask_h[i] = 16'h1234; end
    t = 0;
    while ((done_cycle[0] < 0 || done_cycle[1] < 0) && t < 4 * w * h + 200) begin
      @(posedge clk);
      t++;
    end
    @(posedge clk);
    for (int d = 0; d < 2; d++) begin
      int lo, hi, took;
      lo = (2 + d) * w * h;
      hi = lo + 32;
      took = done_cycle[d] - start_cycle;
      checks += 3;
      if (n_sc[d] != w * h || n_st[d] != w * h) begin
        failures++;
        $display("dut %0d frame %0dx%0d: %0d sc and %0d st pixels, want %0d", d, w, h,
                 n_sc[d], n_st[d], w * h);
      end
      if (done_cycle[d] < 0 || took < lo || took > hi) begin
        failures++;
        $display("dut %0d frame %0dx%0d took %0d clocks, want %0d..%0d", d, w, h, took, lo, hi);
      end else begin
        n_frames[d]++;
        $display("dut %0d frame %0dx%0d: %0d clocks, %0.2f clocks per pixel", d, w, h, took,
                 real'(took) / real'(w * h));
      end
      if (busy[d]) begin
        failures++;
        $display("dut %0d still busy after done", d);
      end
    end
    if (w < MW || h < MH) n_small_frames++;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    coefs_t g3, g4, gh3, gh4, g1, g1d;
    for (int d = 0; d < 2; d++) begin
      n_sc_sat[d] = 0; n_st_sat[d] = 0; n_frames[d] = 0; done_cycle[d] = -1;
    end
    n_small_frames = 0;
    foreach (mask_v[i]) begin mask_v[i] = '0; mask_h[i] = '0; end
    foreach (mask_d[i]) mask_d[i] = '0;
    repeat (4) @(posedge clk);
    reset = 1'b0;

    g3  = gauss(3.0, K, 65536);
    g4  = gauss(4.0, KD, 65536);
    run_frame(MW, MH, 1, g3, g3, g4);

    gh3 = gauss(3.0, K, 104858);
    gh4 = gauss(4.0, KD, 104858);
    run_frame(23, 11, 150, gh3, gh3, gh4);

    g1 = new[K];
    begin
      coefs_t s1;
      s1 = gauss(1.0, 3, 65536);
      foreach (g1[i]) g1[i] = 0;
      for (int i = 0; i < 3; i++) g1[2 + i] = s1[i];
    end
    g1d = gauss(1.0, KD, 65536);
    run_frame(7, 7, 9, g1, g1, g1d);

    // every mechanism must have happened
    for (int d = 0; d < 2; d++) begin
      checks += 3;
      if (n_frames[d] != 3)  begin failures++; $display("dut %0d: %0d good frames", d, n_frames[d]); end
      if (n_sc_sat[d] == 0)  begin failures++; $display("dut %0d: separable clamp never seen", d); end
      if (n_st_sat[d] == 0)  begin failures++; $display("dut %0d: directional clamp never seen", d); end
      $display("dut %0d: frames %0d, separable clamps %0d, directional clamps %0d", d,
               n_frames[d], n_sc_sat[d], n_st_sat[d]);
    end
    checks++;
    if (n_small_frames == 0) failures++;
    $display("frames smaller than the maximum size: %0d", n_small_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
