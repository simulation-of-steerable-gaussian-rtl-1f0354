// tb_pixel_mask_ctrl - checks the pixel & mask controller: the mask is
// captured only on mask_load, taps outside the image become zero, the
// window and tag come out one clock later.
module tb_pixel_mask_ctrl;
  import sgs_pkg::*;
  localparam int T = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_pad = 0;

  logic  rst = 1'b1, mask_load = 1'b0, in_valid = 1'b0;
  coef_t mask_in [T];
  tag_t  in_tag = '0;
  pix_t  in_win [T];
  logic  in_ok  [T];
  logic  out_valid, out_padded;
  tag_t  out_tag;
  pix_t  out_pix  [T];
  coef_t out_coef [T];
  coef_t mask_model [T];

  pixel_mask_ctrl #(.T(T)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      pix_t win_q [T];
      logic ok_q [T];
      logic pad;
      @(negedge clk);
      if (n % 50 == 0) begin
        mask_load = 1'b1;
        for (int i = 0; i < T; i++) begin
          mask_in[i] = coef_t'($urandom);
          mask_model[i] = mask_in[i];
        end
      end else begin
        mask_load = 1'b0;
        for (int i = 0; i < T; i++) mask_in[i] = coef_t'($urandom);  // must be ignored
      end
      pad = 1'b0;
      for (int i = 0; i < T; i++) begin
        in_win[i] = pix_t'($urandom);
        in_ok[i]  = ($urandom_range(0, 3) != 0);
        win_q[i]  = in_win[i];
        ok_q[i]   = in_ok[i];
        pad |= !in_ok[i];
      end
      in_tag = tag_t'($urandom);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      mask_load = 1'b0;
      checks += 3;
      if (!out_valid) failures++;
      if (out_tag != in_tag) failures++;
      if (out_padded != pad) failures++;
      if (out_padded) n_pad++;
      for (int i = 0; i < T; i++) begin
        checks += 2;
        if (out_pix[i] != (ok_q[i] ? win_q[i] : pix_t'(0))) begin
          failures++;
          $display("tap %0d: got %0d ok %0d win %0d", i, out_pix[i], ok_q[i], win_q[i]);
        end
        if (out_coef[i] != mask_model[i]) failures++;
      end
    end
    checks++;
    if (n_pad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
