// output_buffer: the packet output memory. Processors write packets into a
// SIZE_BYTES memory and then ask for them to be sent; the buffer streams the
// words out in the order the send requests were made.
//
// Processor side: one request per cycle (after arbitration), answered on the
// next cycle:
//   OB_WRITE  write req_data to the word at byte address req_addr
//   OB_SEND   queue the packet starting at byte address req_addr, of
//             req_data[15:0] words (at least 1); resp_ok = 1 if queued,
//             0 if the send queue is full
// Transmit side: a 32-bit word stream (tx_valid/tx_ready, tx_last on a
// packet's final word); sent_pulse marks the end of each packet, after which
// its memory may be reused. Allocating output memory is left to software
// (under a lock), as in the reference design; its 16KB size follows it too.
// The send queue depth and request formats are this implementation's choices.
module output_buffer
  import nettm_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned SEND_Q     = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  input  logic               req_op,      // 0 write, 1 send
  input  logic [13:0]        req_addr,
  input  logic [31:0]        req_data,
  output logic               resp_valid,
  output logic               resp_ok,
  output logic               tx_valid,
  input  logic               tx_ready,
  output logic [31:0]        tx_data,
  output logic               tx_last,
  output logic               sent_pulse
);
  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned WA_W  = $clog2(WORDS);
  localparam int unsigned Q_W   = $clog2(SEND_Q);

  logic [31:0] mem [WORDS];

  logic [SEND_Q-1:0][WA_W-1:0] q_start;
  logic [SEND_Q-1:0][15:0]     q_len;
  logic [Q_W-1:0]              q_head, q_tail;
  logic [Q_W:0]                q_count;

  // transmit state: word address being read and words still to send
  logic            busy;
  logic [WA_W-1:0] rd_ptr;
  logic [15:0]     left;
  logic            out_vld;      // tx_data holds a word
  logic            out_last;

  logic send_req, send_ok, adv, start;
  assign send_req = req_valid && req_op;
  assign send_ok  = send_req && q_count != (Q_W+1)'(SEND_Q) && req_data[15:0] != '0;
  assign adv      = busy && left != '0 && (!out_vld || tx_ready);
  assign start    = !busy && q_count != '0;

  always_ff @(posedge clk) begin
    if (req_valid && !req_op) mem[WA_W'(req_addr[13:2])] <= req_data;
    if (adv) tx_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_start <= '0; q_len <= '0; q_head <= '0; q_tail <= '0; q_count <= '0;
      busy <= 1'b0; rd_ptr <= '0; left <= '0; out_vld <= 1'b0; out_last <= 1'b0;
      resp_valid <= 1'b0; resp_ok <= 1'b0; sent_pulse <= 1'b0;
    end else begin
      automatic logic [Q_W:0] cnt = q_count;
      resp_valid <= req_valid;
      resp_ok    <= send_ok;
      sent_pulse <= 1'b0;
      if (send_ok) begin
        q_start[q_tail] <= WA_W'(req_addr[13:2]);
        q_len[q_tail]   <= req_data[15:0];
        q_tail          <= q_tail + 1'b1;
        cnt = cnt + 1'b1;
      end
      if (start) begin
        busy   <= 1'b1;
        rd_ptr <= q_start[q_head];
        left   <= q_len[q_head];
        q_head <= q_head + 1'b1;
        cnt = cnt - 1'b1;
      end
      q_count <= cnt;
      if (out_vld && tx_ready) out_vld <= 1'b0;
      if (adv) begin
        out_vld  <= 1'b1;
        out_last <= (left == 16'd1);
        rd_ptr   <= rd_ptr + 1'b1;
        left     <= left - 1'b1;
      end
      if (out_vld && tx_ready && out_last) begin
        busy       <= 1'b0;
        sent_pulse <= 1'b1;
      end
    end
  end

  assign tx_valid = out_vld;
  assign tx_last  = out_last;
endmodule
