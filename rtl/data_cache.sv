// data_cache: the data cache shared by all processors, direct-mapped with
// one 32-bit word per line, write-through to the load/store queue.
//
// Lookup: address in cycle 0 (lk_en), hit flag and word in cycle 1. Writes
// (wr_en: a store that hit, or an undo-log rollback write) update the word
// in place when the line holds that address, and are always forwarded to the
// load/store queue; a rollback write to an address that is not cached does
// not allocate. A miss (miss_en, in cycle 1) sends a read to the queue unless
// a fill for that line is already outstanding; the requester replays and hits
// once the fill has arrived. A write to a line whose fill is outstanding marks
// the fill stale, so data read from memory before that write is never
// installed; the next miss fetches again. Fills use the single write port and
// wait (fill_ready low) while a write is performed. A lookup of a line written
// in the same cycle sees the new contents. The 16KB size and 32-bit lines
// follow the reference design; direct mapping, write-through and the fill
// bookkeeping are this implementation's choices.
module data_cache
  import nettm_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup
  input  logic               lk_en,
  input  logic [ADDR_W-1:0]  lk_addr,
  output logic               lk_hit,
  output logic [DATA_W-1:0]  lk_rdata,
  // write (store hit or rollback)
  input  logic               wr_en,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  logic [3:0]         wr_be,
  input  logic [DATA_W-1:0]  wr_data,
  // miss
  input  logic               miss_en,
  input  logic [ADDR_W-1:0]  miss_addr,
  output logic               op_ready,
  // to the load/store queue
  output logic               enq_valid,
  output logic               enq_store,
  output logic [ADDR_W-1:0]  enq_addr,
  output logic [3:0]         enq_be,
  output logic [DATA_W-1:0]  enq_data,
  input  logic               enq_ready,
  // fills from the load/store queue
  input  logic               fill_valid,
  input  logic [ADDR_W-1:0]  fill_addr,
  input  logic [DATA_W-1:0]  fill_data,
  output logic               fill_ready
);
  localparam int unsigned LINES = SIZE_BYTES / 4;
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = ADDR_W - 2 - IDX_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  function automatic idx_t idx_of(input logic [ADDR_W-1:0] a);
    return a[IDX_W+1:2];
  endfunction
  function automatic tag_t tag_of(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1:IDX_W+2];
  endfunction

  logic [3:0][7:0] data_mem [LINES];
  tag_t            tag_mem  [LINES];
  logic [LINES-1:0] line_valid, fill_pending, fill_stale;

  // write port: the single port is shared by writes and fills
  logic wr_hit, do_fill, fill_install;
  assign wr_hit       = wr_en && line_valid[idx_of(wr_addr)] &&
                        tag_mem[idx_of(wr_addr)] == tag_of(wr_addr);
  assign fill_ready   = !wr_en;
  assign do_fill      = fill_valid && fill_ready;
  assign fill_install = do_fill && !fill_stale[idx_of(fill_addr)];

  logic miss_send;
  assign miss_send = miss_en && !wr_en && !fill_pending[idx_of(miss_addr)];

  assign op_ready  = enq_ready;
  assign enq_valid = wr_en || miss_send;
  assign enq_store = wr_en;
  assign enq_addr  = wr_en ? wr_addr : miss_addr;
  assign enq_be    = wr_en ? wr_be : 4'hF;
  assign enq_data  = wr_data;

  always_ff @(posedge clk) begin
    if (wr_hit) begin
      for (int b = 0; b < 4; b++)
        if (wr_be[b]) data_mem[idx_of(wr_addr)][b] <= wr_data[8*b +: 8];
    end else if (fill_install) begin
      data_mem[idx_of(fill_addr)] <= fill_data;
      tag_mem[idx_of(fill_addr)]  <= tag_of(fill_addr);
    end
  end

  // lookup, with the same-cycle write forwarded
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_hit   <= 1'b0;
      lk_rdata <= '0;
    end else if (lk_en) begin
      if (fill_install && idx_of(fill_addr) == idx_of(lk_addr)) begin
        lk_hit   <= tag_of(fill_addr) == tag_of(lk_addr);
        lk_rdata <= fill_data;
      end else begin
        lk_hit <= line_valid[idx_of(lk_addr)] &&
                  tag_mem[idx_of(lk_addr)] == tag_of(lk_addr);
        for (int b = 0; b < 4; b++)
          lk_rdata[8*b +: 8] <= (wr_hit && wr_be[b] && idx_of(wr_addr) == idx_of(lk_addr))
                                ? wr_data[8*b +: 8] : data_mem[idx_of(lk_addr)][b];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_valid   <= '0;
      fill_pending <= '0;
      fill_stale   <= '0;
    end else begin
      if (miss_send && enq_ready) fill_pending[idx_of(miss_addr)] <= 1'b1;
      if (wr_en && enq_ready && fill_pending[idx_of(wr_addr)])
        fill_stale[idx_of(wr_addr)] <= 1'b1;
      if (fill_install) line_valid[idx_of(fill_addr)] <= 1'b1;
      if (do_fill) begin
        fill_pending[idx_of(fill_addr)] <= 1'b0;
        fill_stale[idx_of(fill_addr)]   <= 1'b0;
      end
    end
  end

  a_write_needs_room: assert property (@(posedge clk) disable iff (!rst_n)
                                       wr_en |-> enq_ready);
endmodule
