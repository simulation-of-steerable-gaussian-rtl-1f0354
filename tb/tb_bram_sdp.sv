// tb_bram_sdp - checks the block RAM bank: written words read back one clock
// after the read, and a read of the address being written returns the old word.
module tb_bram_sdp;
  localparam int DEPTH = 48, W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         wr_en = 1'b0, rd_en = 1'b0;
  logic [5:0]   wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] model [DEPTH];

  bram_sdp #(.DEPTH(DEPTH), .W(W)) dut (.*);

  task automatic check(input logic [W-1:0] want, input string what);
    checks++;
    if (rd_data !== want) begin
      failures++;
      $display("%s: got %0h want %0h", what, rd_data, want);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 6'(a); wr_data = W'((a * 37 + 11) & 8'hFF);
      model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      @(negedge clk);
      rd_en = 1'b1; rd_addr = 6'(a);
      @(negedge clk);
      rd_en = 1'b0;
      check(model[a], "read back");
      // data must hold while rd_en is low
      @(negedge clk);
      check(model[a], "hold");
    end
    // read and write the same address in one clock: old data comes out
    @(negedge clk);
    wr_en = 1'b1; wr_addr = 6'd5; wr_data = 8'hA5;
    rd_en = 1'b1; rd_addr = 6'd5;
    @(negedge clk);
    wr_en = 1'b0;
    check(model[5], "read during write");
    @(negedge clk);
    check(8'hA5, "new data");
    rd_en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
