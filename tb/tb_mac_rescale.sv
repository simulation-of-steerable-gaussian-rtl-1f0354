// tb_mac_rescale - checks the multiplier & adder: sum of products rounded to
// nearest after dropping 16 fraction bits, clamped at 255, one clock of
// latency, tag carried along. Random windows and masks, including gains
// above one so that the clamp is exercised.
module tb_mac_rescale;
  import sgs_pkg::*;
  localparam int T = 7;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_sat = 0;

  logic  rst = 1'b1, in_valid = 1'b0;
  tag_t  in_tag = '0;
  pix_t  in_pix  [T];
  coef_t in_coef [T];
  logic  out_valid, out_sat;
  tag_t  out_tag;
  pix_t  out_pix;

  mac_rescale #(.T(T)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      longint sum;
      int want;
      @(negedge clk);
      sum = 0;
      for (int i = 0; i < T; i++) begin
        in_pix[i]  = pix_t'($urandom_range(0, 255));
        in_coef[i] = coef_t'((n % 3 == 0) ? $urandom_range(0, 65535) : $urandom_range(0, 12000));
        sum += longint'(in_pix[i]) * longint'(in_coef[i]);
      end
      in_valid = 1'b1;
      in_tag   = tag_t'($urandom);
      want = int'((sum + 32768) >>> 16);
      if (want > 255) want = 255;
      @(negedge clk);
      in_valid = 1'b0;
      checks += 3;
      if (!out_valid) failures++;
      if (out_pix != pix_t'(want)) begin
        failures++;
        $display("sum %0d: got %0d want %0d", sum, out_pix, want);
      end
      if (out_tag != in_tag) failures++;
      if (out_sat) n_sat++;
      if (out_sat != (((sum + 32768) >>> 16) > 255)) failures++;
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("clamped results: %0d", n_sat);
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
