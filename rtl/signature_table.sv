// signature_table: the block RAM holding every transaction's read and write
// signatures.
//
// One row per hash index. A row holds, for each of the NUM_THREADS thread
// contexts, a read bit, a write bit and a VER_W-bit version number (see
// nettm_pkg::sig_row_t), so a single read returns the signature bits of all
// transactions for one address. Simple dual-port: the read port is
// synchronous (address in cycle 0, row out in cycle 1); the write port writes
// at the clock edge. When the same row is read and written in one cycle the
// new value is forwarded, so the access that follows an update always sees it.
// ROWS defaults to 1024: two 512-row block RAMs stacked, this implementation's
// reading of the design's two-BRAM vertical organisation. All rows start at
// zero (the FPGA's configuration-time initialisation), which with all version
// registers at zero means "no address in any set".
module signature_table
  import nettm_pkg::*;
#(
  parameter int unsigned ROWS    = 1024,
  parameter int unsigned INDEX_W = $clog2(ROWS)
) (
  input  logic               clk,
  input  logic               rd_en,
  input  logic [INDEX_W-1:0] rd_index,
  output sig_row_t           rd_row,
  input  logic               wr_en,
  input  logic [INDEX_W-1:0] wr_index,
  input  sig_row_t           wr_row
);
  sig_row_t mem [ROWS];

  initial begin
    for (int r = 0; r < ROWS; r++) mem[r] = '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_index] <= wr_row;
    if (rd_en) rd_row <= (wr_en && wr_index == rd_index) ? wr_row : mem[rd_index];
  end
endmodule
