// raster_scan - read controller: walks a frame in raster order.
//
// After a one-clock start pulse it issues every pixel position of an
// img_w x img_h frame, row by row and left to right within a row, one
// position per clock (valid high), flagging the final one with tag.last.
// done pulses in the clock after the last position. A start while busy is
// ignored. The one-position-per-clock rate is what gives each 1-D filter pass
// its throughput of one pixel per clock.
module raster_scan
  import sgs_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  col_t img_w,
  input  row_t img_h,
  output logic busy,
  output logic valid,
  output tag_t tag,
  output logic done
);
  row_t row;
  col_t col;
  logic last_col, last_row;

  assign last_col = (col == col_t'(img_w - 1'b1));
  assign last_row = (row == row_t'(img_h - 1'b1));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      row  <= '0;
      col  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          row  <= '0;
          col  <= '0;
        end
      end else if (last_col) begin
        col <= '0;
        if (last_row) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          row <= row + 1'b1;
        end
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  assign valid    = busy;
  assign tag.row  = row;
  assign tag.col  = col;
  assign tag.last = busy && last_col && last_row;
endmodule
