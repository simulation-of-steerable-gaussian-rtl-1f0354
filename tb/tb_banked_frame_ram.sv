// tb_banked_frame_ram - checks the banked frame store: after a frame has
// been written pixel by pixel, random row and column windows on two read
// ports at once return the right pixels one clock later, with taps outside
// the (run-time) image size flagged not ok.
module tb_banked_frame_ram;
  import sgs_pkg::*;
  localparam int B = 7, MW = 20, MH = 12, R = (B - 1) / 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_out = 0;

  col_t img_w = col_t'(MW);
  row_t img_h = row_t'(MH);
  logic wr_en = 1'b0;
  row_t wr_row = '0;
  col_t wr_col = '0;
  pix_t wr_data = '0;
  logic rd_en  [2];
  row_t rd_row [2];
  col_t rd_col [2];
  dir_e rd_dir [2];
  pix_t rd_win [2][B];
  logic rd_ok  [2][B];

  banked_frame_ram #(.B(B), .MAX_W(MW), .MAX_H(MH), .N_RD(2)) dut (.*);

  function automatic pix_t pat(input int r, input int c);
    return pix_t'(r * 21 + c * 5 + 3);
  endfunction

  task automatic frame(input int w, input int h, input int n);
    img_w = col_t'(w); img_h = row_t'(h);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_row = row_t'(r); wr_col = col_t'(c); wr_data = pat(r, c);
      end
    @(negedge clk);
    wr_en = 1'b0;
    for (int k = 0; k < n; k++) begin
      int rr [2], cc [2];
      dir_e dd [2];
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        rr[p] = $urandom_range(0, h - 1);
        cc[p] = $urandom_range(0, w - 1);
        dd[p] = dir_e'($urandom_range(0, 1));
        rd_en[p] = 1'b1; rd_row[p] = row_t'(rr[p]); rd_col[p] = col_t'(cc[p]); rd_dir[p] = dd[p];
      end
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        rd_en[p] = 1'b0;
        for (int i = 0; i < B; i++) begin
          int tr, tc;
          logic ok;
          tr = rr[p] + ((dd[p] == DIR_VERTICAL) ? i - R : 0);
          tc = cc[p] + ((dd[p] == DIR_HORIZONTAL) ? i - R : 0);
          ok = tr >= 0 && tr < h && tc >= 0 && tc < w;
          checks++;
          if (rd_ok[p][i] != ok) failures++;
          if (ok) begin
            checks++;
            if (rd_win[p][i] != pat(tr, tc)) begin
              failures++;
              $display("port %0d (%0d,%0d) dir %0d tap %0d: got %0d want %0d", p, rr[p],
                       cc[p], dd[p], i, rd_win[p][i], pat(tr, tc));
            end
          end else n_out++;
        end
      end
    end
  endtask

  initial begin
    for (int p = 0; p < 2; p++) begin
      rd_en[p] = 1'b0; rd_row[p] = '0; rd_col[p] = '0; rd_dir[p] = DIR_HORIZONTAL;
    end
    frame(MW, MH, 400);
    frame(13, 9, 200);
    checks++;
    if (n_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
