// tb_log_filter: stack-pointer tracking and the [current SP, checkpoint SP)
// filter range, for threads on both processors. A directed part covers the
// corner cases (range ends, heap, a checkpoint taken in the same cycle as a
// stack-pointer write); a random part then drives writes on both processor
// ports, transaction begins and queries for 2000 cycles and compares every
// answer with a model that keeps the two pointers per thread.
module tb_log_filter;
  import nettm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NUM_PROCS-1:0] sp_wr_valid = 0;
  logic [NUM_PROCS-1:0][1:0] sp_wr_tid = 0;
  logic [NUM_PROCS-1:0][31:0] sp_wr_value = 0;
  logic tx_begin_valid = 0;
  logic [TID_W-1:0] tx_begin_tid = 0, q_tid = 0;
  logic [31:0] q_addr = 0;
  logic q_skip;
  int checks = 0, failures = 0;

  log_filter dut (.*);
  always #5 clk = ~clk;

  task automatic sp(input int p, input int t, input logic [31:0] v);
    sp_wr_valid[p] = 1; sp_wr_tid[p] = 2'(t); sp_wr_value[p] = v;
    @(negedge clk); sp_wr_valid[p] = 0;
  endtask
  task automatic q(input int t, input logic [31:0] a, input logic e);
    q_tid = TID_W'(t); q_addr = a; #1;
    checks++;
    if (q_skip !== e) begin
      failures++; $display("FAIL t%0d addr %h skip=%b", t, a, q_skip);
    end
  endtask

  // reference model: last and checkpoint pointer per thread
  logic [31:0] m_last [NUM_THREADS], m_ckpt [NUM_THREADS];
  logic [31:0] m_base [NUM_THREADS];
  task automatic random_phase();
    int tb_t, p, lt, a;
    logic [31:0] lo, hi, qa;
    // bring model and design to a known state: every thread's SP set and checkpointed
    for (int t = 0; t < NUM_THREADS; t++) begin
      m_base[t] = 32'h0001_0000 + 32'(t) * 32'h1000;
      sp(t / THREADS_PER_PROC, t % THREADS_PER_PROC, m_base[t]);
      tx_begin_valid = 1; tx_begin_tid = TID_W'(t); @(negedge clk); tx_begin_valid = 0;
      m_last[t] = m_base[t]; m_ckpt[t] = m_base[t];
    end
    for (int c = 0; c < 2000; c++) begin
      // stimulus for this cycle
      for (p = 0; p < NUM_PROCS; p++) begin
        sp_wr_valid[p] = ($urandom_range(0, 2) == 0);
        lt = $urandom_range(0, THREADS_PER_PROC - 1);
        sp_wr_tid[p] = 2'(lt);
        sp_wr_value[p] = m_base[p * THREADS_PER_PROC + lt] - 32'(4 * $urandom_range(0, 64));
      end
      tx_begin_valid = ($urandom_range(0, 7) == 0);
      tx_begin_tid = TID_W'($urandom_range(0, NUM_THREADS - 1));
      // query against the state before this cycle's edge
      tb_t = $urandom_range(0, NUM_THREADS - 1);
      lo = m_last[tb_t]; hi = m_ckpt[tb_t];
      a = $urandom_range(0, 3);
      if (a == 0)      qa = lo;
      else if (a == 1) qa = hi - 4;
      else if (a == 2) qa = hi;
      else             qa = m_base[tb_t] - 32'(4 * $urandom_range(0, 70));
      q(tb_t, qa, (qa >= lo) && (qa < hi));
      // model update at the edge
      for (p = 0; p < NUM_PROCS; p++)
        if (sp_wr_valid[p]) m_last[p * THREADS_PER_PROC + int'(sp_wr_tid[p])] = sp_wr_value[p];
      if (tx_begin_valid) m_ckpt[tx_begin_tid] = m_last[tx_begin_tid];
      @(negedge clk);
    end
    sp_wr_valid = '0; tx_begin_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    sp(1, 2, 32'h0000_8000);            // thread 6
    sp(0, 1, 32'h0000_4000);            // thread 1
    tx_begin_valid = 1; tx_begin_tid = 6; @(negedge clk); tx_begin_valid = 0;
    q(6, 32'h7FFC, 0);                  // nothing allocated yet
    sp(1, 2, 32'h0000_7F00);            // frame of 256 bytes pushed
    q(6, 32'h7F00, 1);
    q(6, 32'h7FFC, 1);
    q(6, 32'h8000, 0);                  // pre-existing frame
    q(6, 32'h7EFC, 0);                  // below the stack pointer
    q(6, 32'h0000_1000, 0);             // heap
    q(1, 32'h3FFC, 0);                  // thread 1 has no transaction
    @(negedge clk);
    // a new transaction on thread 1, begun in the same cycle as an SP write
    sp_wr_valid[0] = 1; sp_wr_tid[0] = 1; sp_wr_value[0] = 32'h3000;
    tx_begin_valid = 1; tx_begin_tid = 1; @(negedge clk);
    sp_wr_valid[0] = 0; tx_begin_valid = 0;
    sp(0, 1, 32'h2F00);
    q(1, 32'h2F80, 1);
    q(1, 32'h3000, 0);
    random_phase();
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
