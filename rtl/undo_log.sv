// undo_log: backup copies of the words a transaction overwrites, used to roll
// memory back when the transaction aborts (eager version management).
//
// One physical memory of NUM_THREADS*DEPTH entries (word address + old data)
// is split evenly into one partition per thread context, each with its own
// write pointer. A logged store appends at the pointer. Commit empties the
// partition in one cycle by zeroing the pointer. Abort (one bit per thread, several at once allowed) marks the
// partition for rollback: the log then raises flush_req (a request for exclusive use of
// the shared data cache); once flush_grant is seen it reads the partition from
// the newest entry down to the oldest and presents each entry on the flush
// write port, one per cycle while flush_wr_ready is high. Reverse order means
// a word logged twice ends with its oldest (pre-transaction) value. When the
// last entry has been written, flush_done pulses with the thread number and
// the pointer is zeroed. Several pending rollbacks are served one at a time,
// lowest thread first. An entry pushed into a full partition is dropped and
// sets that thread's sticky overflow bit: the log must be sized for the
// longest transaction. DEPTH = 128 gives the 1024 entries of the reference
// design over 8 threads. The memory read is synchronous, so a flush issues its
// first write two cycles after the grant.
module undo_log
  import nettm_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // append (from the conflict-detection stage)
  input  logic                    push_valid,
  input  logic [TID_W-1:0]        push_tid,
  input  log_entry_t              push_entry,
  // transaction outcome (from the sync unit)
  input  logic                    commit_valid,
  input  logic [TID_W-1:0]        commit_tid,
  input  logic [NUM_THREADS-1:0]  abort_mask,
  // rollback
  output logic                    flush_req,
  input  logic                    flush_grant,
  output logic                    flush_wr_valid,
  output log_entry_t              flush_wr_entry,
  input  logic                    flush_wr_ready,
  output logic                    flush_done,
  output logic [TID_W-1:0]        flush_done_tid,
  output logic [NUM_THREADS-1:0]  overflow
);
  localparam int unsigned PTR_W = $clog2(DEPTH + 1);
  localparam int unsigned IDX_W = $clog2(DEPTH);

  log_entry_t mem [NUM_THREADS*DEPTH];

  logic [NUM_THREADS-1:0][PTR_W-1:0] wptr;
  logic [NUM_THREADS-1:0]            pending;

  typedef enum logic [1:0] {F_IDLE, F_WAIT, F_READ} fstate_t;
  fstate_t            fstate;
  logic [TID_W-1:0]   ftid;
  logic [PTR_W-1:0]   rd_left;     // entries not yet read
  logic               rd_vld;      // mem output register holds an entry
  log_entry_t         rd_q;

  // next thread to roll back
  logic               any_pending;
  logic [TID_W-1:0]   pick;
  always_comb begin
    any_pending = |pending;
    pick = '0;
    for (int i = NUM_THREADS - 1; i >= 0; i--)
      if (pending[i]) pick = TID_W'(i);
  end

  logic push_ok;
  assign push_ok = push_valid && (wptr[push_tid] != PTR_W'(DEPTH));

  // the output register is consumed when the write is accepted
  logic consume, rd_fire;
  assign consume = rd_vld && flush_wr_ready;
  assign rd_fire = (fstate == F_READ) && (rd_left != '0) && (!rd_vld || consume);

  always_ff @(posedge clk) begin
    if (push_ok) mem[{push_tid, wptr[push_tid][IDX_W-1:0]}] <= push_entry;
    if (rd_fire) rd_q <= mem[{ftid, IDX_W'(rd_left - 1'b1)}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      pending  <= '0;
      overflow <= '0;
      fstate   <= F_IDLE;
      ftid     <= '0;
      rd_left  <= '0;
      rd_vld   <= 1'b0;
      flush_done     <= 1'b0;
      flush_done_tid <= '0;
    end else begin
      flush_done <= 1'b0;
      if (push_ok) wptr[push_tid] <= wptr[push_tid] + 1'b1;
      if (push_valid && !push_ok) overflow[push_tid] <= 1'b1;
      if (commit_valid) wptr[commit_tid] <= '0;
      pending <= pending | abort_mask;

      unique case (fstate)
        F_IDLE: if (any_pending) begin
          ftid   <= pick;
          fstate <= F_WAIT;
        end
        F_WAIT: if (flush_grant) begin
          rd_left <= wptr[ftid];
          fstate  <= F_READ;
        end
        F_READ: begin
          if (rd_fire) rd_left <= rd_left - 1'b1;
          if (rd_fire) rd_vld <= 1'b1;
          else if (consume) rd_vld <= 1'b0;
          if (rd_left == '0 && (!rd_vld || consume)) begin
            fstate         <= F_IDLE;
            rd_vld         <= 1'b0;
            pending[ftid]  <= abort_mask[ftid];
            wptr[ftid]     <= '0;
            overflow[ftid] <= 1'b0;
            flush_done     <= 1'b1;
            flush_done_tid <= ftid;
          end
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  assign flush_req      = (fstate == F_WAIT) || (fstate == F_READ);
  assign flush_wr_valid = rd_vld;
  assign flush_wr_entry = rd_q;

// entries are only presented while the rollback owns the data cache
  a_flush_owned: assert property (@(posedge clk) disable iff (!rst_n)
                                  flush_wr_valid |-> flush_req);
endmodule
