// log_filter: keeps stores to freshly allocated stack space out of the undo-log.
//
// For each thread context it keeps two stack pointers: the last value the
// processor wrote to its stack-pointer register, and a checkpoint taken when
// the thread begins a transaction. The stack grows downward, so the words in
// [last, checkpoint) were allocated after the transaction began and held no
// live data before it: restoring them on abort is pointless, and a store there
// is not logged. Query is combinational (used in cycle 1 of the access
// pipeline); updates take effect at the clock edge. Which pointers are kept
// follows the reference design; the exact range test and the downward-growing
// stack are this implementation's choices.
module log_filter
  import nettm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // one stack-pointer write port per processor; tid is the processor's
  // local thread number
  input  logic [NUM_PROCS-1:0]                        sp_wr_valid,
  input  logic [NUM_PROCS-1:0][$clog2(THREADS_PER_PROC)-1:0] sp_wr_tid,
  input  logic [NUM_PROCS-1:0][ADDR_W-1:0]            sp_wr_value,
  input  logic               tx_begin_valid,
  input  logic [TID_W-1:0]   tx_begin_tid,
  input  logic [TID_W-1:0]   q_tid,
  input  logic [ADDR_W-1:0]  q_addr,
  output logic               q_skip
);
  logic [NUM_THREADS-1:0][ADDR_W-1:0] last_sp, ckpt_sp;

  function automatic logic [TID_W-1:0] gtid(input int p, input logic [$clog2(THREADS_PER_PROC)-1:0] t);
    return TID_W'(p * THREADS_PER_PROC + int'(t));
  endfunction

  // stack pointers including this cycle's writes
  logic [NUM_THREADS-1:0][ADDR_W-1:0] last_sp_n;
  always_comb begin
    last_sp_n = last_sp;
    for (int p = 0; p < NUM_PROCS; p++)
      if (sp_wr_valid[p]) last_sp_n[gtid(p, sp_wr_tid[p])] = sp_wr_value[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_sp <= '0;
      ckpt_sp <= '0;
    end else begin
      last_sp <= last_sp_n;
      if (tx_begin_valid) ckpt_sp[tx_begin_tid] <= last_sp_n[tx_begin_tid];
    end
  end

  assign q_skip = (q_addr >= last_sp[q_tid]) && (q_addr < ckpt_sp[q_tid]);
endmodule
