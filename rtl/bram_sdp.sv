// bram_sdp - one block RAM bank: one write port, one read port.
//
// A plain synchronous memory of DEPTH words of W bits, written as an array so
// that synthesis maps it onto a block RAM. Writes take effect at the clock
// edge; a read returns the addressed word one clock after rd_en. A read and a
// write of the same address in the same clock return the old word. The
// contents are not reset, as in a real block RAM; every word is written before
// it is read by the frame stores built on it.
module bram_sdp #(
  parameter int DEPTH = 1024,
  parameter int W     = 8,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
