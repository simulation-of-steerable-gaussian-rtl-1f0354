// banked_frame_ram - frame store built from several block RAMs, read one
// 1-D window per clock.
//
// A whole row window or column window of B pixels, centred on (rd_row,
// rd_col), is read in a single clock. The frame is split over B banks with a
// diagonal interleave: pixel (r, c) lives in bank (r + c) mod B at address
// r * ceil(MAX_W / B) + c / B. Any B consecutive pixels of one row, and any B
// consecutive pixels of one column, then fall into B different banks, so the
// same store serves both the horizontal and the vertical read directions.
// Splitting the frame over several BRAMs so that a window comes out at once
// follows the "multiple BRAMs" method; the diagonal interleave is this
// design's own choice.
//
// Write port: one pixel per clock at (wr_row, wr_col).
// Read ports: N_RD independent ports; each has its own copy of the banks
// (every write goes to all copies). rd_win[p][i] is the pixel at offset
// i - (B-1)/2 from the centre along rd_dir, valid one clock after rd_en;
// rd_ok[p][i] says whether that tap lies inside the img_w x img_h image. The
// data of a tap outside the image is meaningless and must be ignored.
module banked_frame_ram
  import sgs_pkg::*;
#(
  parameter int B     = 7,     // banks = window length, odd
  parameter int MAX_W = 158,
  parameter int MAX_H = 158,
  parameter int N_RD  = 1
) (
  input  logic clk,
  input  col_t img_w,          // image columns in use, <= MAX_W
  input  row_t img_h,          // image lines in use, <= MAX_H
  // write port
  input  logic wr_en,
  input  row_t wr_row,
  input  col_t wr_col,
  input  pix_t wr_data,
  // read ports
  input  logic rd_en  [N_RD],
  input  row_t rd_row [N_RD],
  input  col_t rd_col [N_RD],
  input  dir_e rd_dir [N_RD],
  output pix_t rd_win [N_RD][B],
  output logic rd_ok  [N_RD][B]
);
  localparam int R     = (B - 1) / 2;
  localparam int CW    = (MAX_W + B - 1) / B;
  localparam int DEPTH = MAX_H * CW;
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int BW    = (B > 1) ? $clog2(B) : 1;

  // ---- write address -------------------------------------------------------
  logic [BW-1:0] wr_bank;
  logic [AW-1:0] wr_addr;
  always_comb begin
    wr_bank = BW'((int'(wr_row) + int'(wr_col)) % B);
    wr_addr = AW'(int'(wr_row) * CW + int'(wr_col) / B);
  end

  for (genvar p = 0; p < N_RD; p++) begin : g_port
    logic [BW-1:0] tap_bank   [B];
    logic [AW-1:0] tap_addr   [B];
    logic          tap_ok     [B];
    logic [AW-1:0] bank_addr  [B];
    logic [BW-1:0] tap_bank_q [B];
    pix_t          bank_q     [B];

    // Position, bank and bank address of every tap of the window.
    always_comb begin
      for (int i = 0; i < B; i++) begin
        int rr, cc;
        rr = int'(rd_row[p]) + ((rd_dir[p] == DIR_VERTICAL)   ? i - R : 0);
        cc = int'(rd_col[p]) + ((rd_dir[p] == DIR_HORIZONTAL) ? i - R : 0);
        tap_ok[i] = (rr >= 0) && (rr < int'(img_h)) && (rr < MAX_H) &&
                    (cc >= 0) && (cc < int'(img_w)) && (cc < MAX_W);
        if (tap_ok[i]) begin
          tap_bank[i] = BW'((rr + cc) % B);
          tap_addr[i] = AW'(rr * CW + cc / B);
        end else begin
          tap_bank[i] = '0;
          tap_addr[i] = '0;
        end
      end
      // Route each tap's address to its bank. Taps inside the image hit
      // distinct banks, so at most one tap drives any bank.
      for (int b = 0; b < B; b++) begin
        bank_addr[b] = '0;
        for (int i = 0; i < B; i++)
          if (tap_ok[i] && (int'(tap_bank[i]) == b)) bank_addr[b] = tap_addr[i];
      end
    end

    for (genvar b = 0; b < B; b++) begin : g_bank
      bram_sdp #(.DEPTH(DEPTH), .W(PIX_W)) u_bank (
        .clk     (clk),
        .wr_en   (wr_en && (int'(wr_bank) == b)),
        .wr_addr (wr_addr),
        .wr_data (wr_data),
        .rd_en   (rd_en[p]),
        .rd_addr (bank_addr[b]),
        .rd_data (bank_q[b])
      );
    end

    always_ff @(posedge clk) begin
      if (rd_en[p]) begin
        for (int i = 0; i < B; i++) begin
          tap_bank_q[i]  <= tap_bank[i];
          rd_ok[p][i]    <= tap_ok[i];
        end
      end
    end

    // Undo the interleave: tap i comes from the bank it was routed to.
    always_comb
      for (int i = 0; i < B; i++) rd_win[p][i] = bank_q[tap_bank_q[i]];
  end
endmodule
