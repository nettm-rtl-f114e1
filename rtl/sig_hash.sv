// sig_hash: maps a byte address to a row of the signature table.
//
// Conflicts are tracked at word granularity, so the two byte-offset bits are
// dropped and the remaining word address is XOR-folded down to INDEX_W bits.
// The design this follows uses application-specific hash functions built from
// small AND/OR trees over chosen address bits; their bit selections depend on
// each application's profile and are not given, so this module uses a plain
// XOR fold, which spreads any address range evenly over all rows. Purely
// combinational: the index is valid in the same cycle as the address
// (cycle 0 of the memory-access pipeline).
module sig_hash #(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned INDEX_W = 10
) (
  input  logic [ADDR_W-1:0]  addr,
  output logic [INDEX_W-1:0] index
);
  localparam int unsigned WORD_W = ADDR_W - 2;
  localparam int unsigned CHUNKS = (WORD_W + INDEX_W - 1) / INDEX_W;

  logic [CHUNKS*INDEX_W-1:0] word_ext;

  always_comb begin
    word_ext = '0;
    word_ext[WORD_W-1:0] = addr[ADDR_W-1:2];
    index = '0;
    for (int c = 0; c < CHUNKS; c++)
      index ^= word_ext[c*INDEX_W +: INDEX_W];
  end
endmodule
