// sgs_pkg - shared widths and types of the steerable Gaussian smoother.
//
// Pixels are 8-bit intensities (0..255); mask coefficients are 16-bit
// unsigned fixed-point numbers with 16 fraction bits, so a mask whose
// coefficients add up to 65536 has unity gain. Row and column indices are
// 9 and 10 bits wide, the widths of the image-size inputs (lines 8:0,
// columns 9:0) of the filter's port diagram. Every pixel that travels through
// the pipelines carries a tag with its row, column and an end-of-frame flag.
package sgs_pkg;
  localparam int PIX_W     = 8;    // intensity bits after each rescaling step
  localparam int COEF_W    = 16;   // mask coefficient bits
  localparam int COEF_FRAC = 16;   // fraction bits of a coefficient
  localparam int ROW_W     = 9;    // image lines index
  localparam int COL_W     = 10;   // image columns index
  localparam int PIX_MAX   = (1 << PIX_W) - 1;

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [COEF_W-1:0] coef_t;
  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [COL_W-1:0]  col_t;

  // Window direction for a 1-D read of a frame store.
  typedef enum logic {DIR_HORIZONTAL = 1'b0, DIR_VERTICAL = 1'b1} dir_e;

  // Position of a pixel in the frame, travelling alongside its data.
  typedef struct packed {
    row_t row;
    col_t col;
    logic last;   // last pixel of the frame
  } tag_t;
endpackage
