// tb_ic_fifo - checks the IC results FIFO: a 10 x 4 frame is pushed in
// raster order with random gaps; for every pixel exactly one window comes
// out, centred on it, with the neighbours of the same row ok and the taps
// beyond the row ends not ok. The final windows come out after the last push.
module tb_ic_fifo;
  import sgs_pkg::*;
  localparam int T = 7, R = (T - 1) / 2, W = 10, H = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_out = 0, n_gap = 0;

  logic rst = 1'b1, in_valid = 1'b0;
  tag_t in_tag = '0;
  pix_t in_pix = '0;
  logic out_valid;
  tag_t out_tag;
  pix_t out_win [T];
  logic out_ok  [T];

  ic_fifo #(.T(T)) dut (.*);

  function automatic pix_t pat(input int r, input int c);
    return pix_t'(r * 40 + c * 3 + 1);
  endfunction

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int r, c;
      r = int'(out_tag.row);
      c = int'(out_tag.col);
      checks++;
      if (r * W + c != n_out) begin
        failures++;
        $display("window %0d centred on (%0d,%0d)", n_out, r, c);
      end
      for (int i = 0; i < T; i++) begin
        logic ok;
        ok = (c + i - R >= 0) && (c + i - R < W);
        checks++;
        if (out_ok[i] != ok) failures++;
        if (ok) begin
          checks++;
          if (out_win[i] != pat(r, c + i - R)) failures++;
        end
      end
      n_out++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          n_gap++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_tag.row = row_t'(r); in_tag.col = col_t'(c); in_tag.last = (r == H - 1 && c == W - 1);
        in_pix = pat(r, c);
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (T + 3) @(negedge clk);
    checks += 2;
    if (n_out != W * H) begin failures++; $display("%0d windows, want %0d", n_out, W * H); end
    if (n_gap == 0) failures++;
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
