// input_buffer: the packet input memory. Received packets are written into
// one of SLOTS fixed-size slots of a SIZE_BYTES memory and handed to the
// processors in arrival order.
//
// Receive side: a 32-bit word stream (rx_valid/rx_ready, rx_last marks a
// packet's final word). A packet is written into a free slot; when its last
// word arrives the slot, with the packet length in words, joins the ready
// queue. While no slot is free rx_ready is low. A packet longer than a slot
// keeps its first SLOT_WORDS words.
// Processor side: one request per cycle (after arbitration), answered on the
// next cycle:
//   IB_READ  read the word at byte address req_addr of the buffer memory
//   IB_TAKE  remove the oldest ready packet: resp_data = {valid, slot, length}
//            in bits [31], [19:16] and [15:0]; valid = 0 if none is ready
//   IB_FREE  return slot req_addr[3:0] to the free pool
// Slot i starts at byte address i*SLOT_BYTES. The 16KB size and the ten
// slots follow the reference design; the slot size, the stream and request
// formats are this implementation's choices.
module input_buffer
  import nettm_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned SLOTS      = 10,
  parameter int unsigned SLOT_BYTES = 1536
) (
  input  logic               clk,
  input  logic               rst_n,
  // receive stream
  input  logic               rx_valid,
  output logic               rx_ready,
  input  logic [31:0]        rx_data,
  input  logic               rx_last,
  // processor side
  input  logic               req_valid,
  input  logic [1:0]         req_op,
  input  logic [13:0]        req_addr,
  output logic               resp_valid,
  output logic [31:0]        resp_data
);
  localparam int unsigned WORDS      = SIZE_BYTES / 4;
  localparam int unsigned SLOT_WORDS = SLOT_BYTES / 4;
  localparam int unsigned WA_W       = $clog2(WORDS);
  localparam int unsigned SL_W       = $clog2(SLOTS);
  localparam int unsigned LEN_W      = $clog2(SLOT_WORDS + 1);
  localparam logic [1:0]  IB_READ = 2'd0, IB_TAKE = 2'd1, IB_FREE = 2'd2;

  logic [31:0] mem [WORDS];

  logic [SLOTS-1:0]  free_slot;
  logic              filling;
  logic [SL_W-1:0]   fill_slot;
  logic [LEN_W-1:0]  fill_len;

  // ready queue of slots, in arrival order
  logic [SLOTS-1:0][SL_W-1:0]  rq_slot;
  logic [SLOTS-1:0][LEN_W-1:0] rq_len;
  logic [SL_W:0]               rq_count;

  logic             have_free;
  logic [SL_W-1:0]  first_free;
  always_comb begin
    have_free  = 1'b0;
    first_free = '0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (free_slot[i]) begin
        have_free  = 1'b1;
        first_free = SL_W'(i);
      end
  end

  logic [SL_W-1:0] cur_slot;
  assign cur_slot = filling ? fill_slot : first_free;
  assign rx_ready = filling || have_free;

  logic rx_fire, take;
  assign rx_fire = rx_valid && rx_ready;
  assign take    = req_valid && req_op == IB_TAKE && rq_count != '0;

  always_ff @(posedge clk) begin
    if (rx_fire && fill_len < LEN_W'(SLOT_WORDS))
      mem[WA_W'(int'(cur_slot) * SLOT_WORDS) + WA_W'(fill_len)] <= rx_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_slot  <= '1;
      filling    <= 1'b0;
      fill_slot  <= '0;
      fill_len   <= '0;
      rq_slot    <= '0;
      rq_len     <= '0;
      rq_count   <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
    end else begin
      automatic logic [SL_W:0] cnt = rq_count;
      resp_valid <= req_valid;
      if (req_valid) begin
        unique case (req_op)
          IB_READ: resp_data <= mem[WA_W'(req_addr[13:2])];
          IB_TAKE: resp_data <= take ? {1'b1, 11'd0, 4'(rq_slot[0]), 16'(rq_len[0])} : '0;
          default: resp_data <= '0;
        endcase
        if (req_op == IB_FREE) free_slot[req_addr[SL_W-1:0]] <= 1'b1;
      end
      if (take) begin
        for (int i = 0; i < SLOTS - 1; i++) begin
          rq_slot[i] <= rq_slot[i+1];
          rq_len[i]  <= rq_len[i+1];
        end
        cnt = cnt - 1'b1;
      end
      if (rx_fire) begin
        if (!filling) begin
          filling             <= 1'b1;
          fill_slot           <= first_free;
          free_slot[first_free] <= 1'b0;
        end
        if (fill_len < LEN_W'(SLOT_WORDS)) fill_len <= fill_len + 1'b1;
        if (rx_last) begin
          filling       <= 1'b0;
          fill_len      <= '0;
          rq_slot[cnt]  <= cur_slot;
          rq_len[cnt]   <= (fill_len < LEN_W'(SLOT_WORDS)) ? fill_len + 1'b1 : fill_len;
          cnt = cnt + 1'b1;
        end
      end
      rq_count <= cnt;
    end
  end
endmodule
