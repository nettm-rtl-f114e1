// tb_signature_table: random reads and writes against a reference array,
// including same-cycle read/write of one row (the new value must be
// returned) and the all-zero initial contents.
module tb_signature_table;
  import nettm_pkg::*;
  localparam int unsigned ROWS = 64;
  localparam int unsigned IW   = 6;
  logic clk = 0;
  logic rd_en, wr_en;
  logic [IW-1:0] rd_index, wr_index;
  sig_row_t rd_row, wr_row;
  sig_row_t ref_mem [ROWS];
  int checks = 0, failures = 0;

  signature_table #(.ROWS(ROWS), .INDEX_W(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < ROWS; r++) ref_mem[r] = '0;
    rd_en = 0; wr_en = 0; rd_index = 0; wr_index = 0; wr_row = 0;
    @(negedge clk);
    // initial contents are zero
    for (int r = 0; r < ROWS; r++) begin
      rd_en = 1; rd_index = IW'(r);
      @(negedge clk);
      checks++; if (rd_row !== '0) failures++;
    end
    for (int n = 0; n < 3000; n++) begin
      automatic sig_row_t expect_row;
      rd_en    = 1;
      rd_index = IW'($urandom_range(0, ROWS-1));
      wr_en    = ($urandom_range(0, 1) == 1);
      wr_index = ($urandom_range(0, 3) == 0) ? rd_index : IW'($urandom_range(0, ROWS-1));
      wr_row   = $urandom;
      expect_row = (wr_en && wr_index == rd_index) ? wr_row : ref_mem[rd_index];
      @(posedge clk);
      if (wr_en) ref_mem[wr_index] = wr_row;
      @(negedge clk);
      checks++;
      if (rd_row !== expect_row) begin
        failures++;
        $display("FAIL row %0d got %h expected %h", rd_index, rd_row, expect_row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
