// tb_undo_log: fills partitions of several threads, commits one (its entries
// must never be replayed), aborts two at once and checks that each rollback
// writes exactly that thread's entries, newest first, only after the grant,
// with back-pressure on the write port; then checks overflow. A random part
// follows: 60 rounds of random appends (some past a partition's end), random
// commits, and an abort of a random set of threads served with random
// back-pressure; every write, the order of the rollbacks (lowest thread
// first) and the overflow flags are compared with per-thread reference lists.
module tb_undo_log;
  import nettm_pkg::*;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push_valid = 0, commit_valid = 0;
  logic [TID_W-1:0] push_tid = 0, commit_tid = 0;
  log_entry_t push_entry = '0;
  logic [NUM_THREADS-1:0] abort_mask = '0;
  logic flush_req, flush_grant = 0, flush_wr_valid, flush_wr_ready = 0;
  log_entry_t flush_wr_entry;
  logic flush_done;
  logic [TID_W-1:0] flush_done_tid;
  logic [NUM_THREADS-1:0] overflow;
  int checks = 0, failures = 0;

  undo_log #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  // reference: per-thread lists
  log_entry_t refq [NUM_THREADS][$];
  int nwrites = 0, done_seen = 0;
  logic [TID_W-1:0] expect_tid;

  int order [$];                         // rollbacks still expected, in order
  logic [NUM_THREADS-1:0] m_ovf = '0;    // expected overflow flags

  task automatic push(input int t, input logic [31:0] a, input logic [31:0] d);
    push_valid = 1; push_tid = TID_W'(t); push_entry = '{addr: a, data: d};
    if (refq[t].size() < DEPTH) refq[t].push_back(push_entry);
    else m_ovf[t] = 1;
    @(negedge clk); push_valid = 0;
  endtask

  // check each rollback write against the newest remaining entry
  always @(posedge clk) if (rst_n) begin
    if (flush_wr_valid && flush_wr_ready) begin
      automatic log_entry_t e;
      checks++;
      if (refq[expect_tid].size() == 0) begin
        failures++; $display("FAIL unexpected write %h", flush_wr_entry);
      end else begin
        e = refq[expect_tid].pop_back();
        if (e !== flush_wr_entry) begin
          failures++; $display("FAIL write %h expected %h", flush_wr_entry, e);
        end
      end
      nwrites++;
    end
    if (flush_wr_valid && !flush_grant) begin
      failures++; $display("FAIL write without grant");
    end
    if (flush_done) begin
      checks++; done_seen++;
      if (flush_done_tid !== expect_tid || refq[expect_tid].size() != 0) begin
        failures++; $display("FAIL done tid %0d left %0d", flush_done_tid, refq[expect_tid].size());
      end
      m_ovf[expect_tid] = 0;
      if (order.size() != 0) begin
        void'(order.pop_front());
        if (order.size() != 0) expect_tid = TID_W'(order[0]);
      end
    end
  end

  task automatic random_phase();
    logic [NUM_THREADS-1:0] m;
    int t, n0;
    for (int r = 0; r < 60; r++) begin
      for (int i = 0; i < 30; i++) begin
        t = $urandom_range(0, NUM_THREADS - 1);
        push(t, $urandom, $urandom);
        if ($urandom_range(0, 19) == 0) begin
          t = $urandom_range(0, NUM_THREADS - 1);
          commit_valid = 1; commit_tid = TID_W'(t); @(negedge clk); commit_valid = 0;
          refq[t].delete();
        end
      end
      checks++;
      if (overflow !== m_ovf) begin failures++; $display("FAIL overflow %b expected %b", overflow, m_ovf); end
      m = 8'($urandom);
      if (m == 0) continue;
      for (int k = 0; k < NUM_THREADS; k++) if (m[k]) order.push_back(k);
      expect_tid = TID_W'(order[0]);
      n0 = done_seen;
      abort_mask = m; @(negedge clk); abort_mask = 0;
      flush_grant = 1;
      for (int c = 0; c < 4000 && order.size() != 0; c++) begin
        flush_wr_ready = ($urandom_range(0, 3) != 0);
        @(negedge clk);
      end
      flush_grant = 0; flush_wr_ready = 0;
      checks++;
      if (order.size() != 0 || done_seen != n0 + $countones(m)) begin
        failures++; $display("FAIL round %0d: %0d rollbacks missing", r, order.size());
        order.delete();
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5; i++) push(2, 32'h1000 + 4*i, 32'hA000 + i);
    for (int i = 0; i < 3; i++) push(5, 32'h2000 + 4*i, 32'hB000 + i);
    for (int i = 0; i < 4; i++) push(6, 32'h3000 + 4*i, 32'hC000 + i);
    // commit thread 6: its entries are discarded
    commit_valid = 1; commit_tid = 6; @(negedge clk); commit_valid = 0;
    refq[6].delete();
    // abort threads 2 and 5 together; 2 is served first
    abort_mask = 8'b0010_0100; @(negedge clk); abort_mask = 0;
    repeat (3) @(negedge clk);
    checks++; if (!flush_req) failures++;
    checks++; if (flush_wr_valid) failures++;   // nothing before the grant
    expect_tid = 2;
    flush_grant = 1;
    for (int c = 0; c < 40 && done_seen < 1; c++) begin
      flush_wr_ready = ($urandom_range(0, 2) != 0);
      @(negedge clk);
    end
    flush_grant = 0; flush_wr_ready = 0;
    @(negedge clk);
    expect_tid = 5; flush_grant = 1; flush_wr_ready = 1;
    for (int c = 0; c < 40 && done_seen < 2; c++) @(negedge clk);
    flush_grant = 0;
    checks++; if (nwrites != 8 || done_seen != 2) begin
      failures++; $display("FAIL writes=%0d done=%0d", nwrites, done_seen);
    end
    @(negedge clk);
    checks++; if (flush_req) failures++;
    // aborting thread 6 after its commit: empty rollback
    abort_mask = 8'b0100_0000; @(negedge clk); abort_mask = 0;
    expect_tid = 6; flush_grant = 1; flush_wr_ready = 1;
    for (int c = 0; c < 20 && done_seen < 3; c++) @(negedge clk);
    flush_grant = 0;
    checks++; if (done_seen != 3 || nwrites != 8) failures++;
    // overflow
    for (int i = 0; i < DEPTH + 1; i++) push(1, 32'h4000 + 4*i, i);
    checks++; if (overflow != 8'b0000_0010) failures++;
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
