// tb_raster_scan - checks the read controller: every position of a frame in
// raster order, one per clock, last on the final one, done one clock later,
// and a start while busy ignored. Runs a 5 x 3 and a 1 x 4 frame.
module tb_raster_scan;
  import sgs_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst = 1'b1, start = 1'b0;
  col_t img_w = '0;
  row_t img_h = '0;
  logic busy, valid, done;
  tag_t tag;

  raster_scan dut (.*);

  task automatic run(input int w, input int h);
    int n;
    @(negedge clk);
    img_w = col_t'(w); img_h = row_t'(h); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    while (valid) begin
      checks += 2;
      if (tag.row != row_t'(n / w) || tag.col != col_t'(n % w)) begin
        failures++;
        $display("position %0d: got (%0d,%0d)", n, tag.row, tag.col);
      end
      if (tag.last != (n == w * h - 1)) failures++;
      if (n == 2) start = 1'b1;   // ignored while busy
      n++;
      @(negedge clk);
      start = 1'b0;
    end
    checks += 3;
    if (n != w * h) begin failures++; $display("%0d positions, want %0d", n, w * h); end
    if (!done) failures++;
    @(negedge clk);
    if (done || valid) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(5, 3);
    run(1, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
