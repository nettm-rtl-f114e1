// tb_sync_unit: mutex grant, blocking and round-robin hand-over; nested
// transactions and commit with version increment; abort, rollback completion
// and restart held back until the winning transaction has ended. A random
// part then runs 3000 lock/unlock requests from all eight threads on mutexes
// 1-4 (taken in increasing order, so no deadlock) and on the transaction
// identifier 0 (nested up to depth 2), and after each one compares the grant,
// the blocked and live flags, the hand-over target and the version numbers
// with a model.
module tb_sync_unit;
  import nettm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_unlock = 0;
  logic [TID_W-1:0] req_tid = 0;
  logic [LOCK_ID_W-1:0] req_id = 0;
  logic resp_valid, resp_granted;
  logic [TID_W-1:0] resp_tid;
  logic [NUM_THREADS-1:0] abort_req = 0, abort_wait = 0;
  logic flush_done = 0;
  logic [TID_W-1:0] flush_done_tid = 0;
  logic [NUM_THREADS-1:0] live, aborting, blocked, awaiting_restart, abort_pulse, restart;
  logic [NUM_THREADS-1:0][VER_W-1:0] cur_ver;
  logic [NUM_THREADS-1:0][NUM_THREADS-1:0] older;
  logic tx_begin_valid, commit_valid;
  logic [TID_W-1:0] tx_begin_tid, commit_tid;
  int checks = 0, failures = 0;
  int n_restart5 = 0, n_abort5 = 0, n_commit = 0, n_begin = 0;

  sync_unit #(.TX_ID_MASK(16'h0001)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (restart[5]) n_restart5++;
    if (abort_pulse[5]) n_abort5++;
    if (commit_valid) n_commit++;
    if (tx_begin_valid) n_begin++;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s live=%b ab=%b nb=%0d nc=%0d na=%0d", msg, live, aborting, n_begin, n_commit, n_abort5); end
  endtask

  // one request; returns the grant flag of the reply
  task automatic op(input int t, input logic unl, input int id, output logic g);
    req_valid = 1; req_tid = TID_W'(t); req_unlock = unl; req_id = LOCK_ID_W'(id);
    @(negedge clk);
    req_valid = 0;
    g = resp_granted;
    chk(resp_valid && resp_tid == TID_W'(t), "reply");
    @(negedge clk);
  endtask

  // ---------------- random part ----------------
  int m_owner [5];                       // -1 free
  int m_wait [NUM_THREADS];              // mutex a thread waits for, -1 none
  int m_top [NUM_THREADS];               // highest mutex held, 0 none
  int m_depth [NUM_THREADS];
  logic [NUM_MUTEX-1:0] m_held [NUM_THREADS];
  logic [NUM_THREADS-1:0][VER_W-1:0] m_ver;

  task automatic random_phase();
    int t, id, c, n_hand = 0, n_blk = 0, n_cm = 0;
    logic exp_g, ok;
    logic [NUM_THREADS-1:0] m_blocked, m_live;
    for (int i = 1; i < 5; i++) m_owner[i] = -1;
    for (int i = 0; i < NUM_THREADS; i++) begin
      m_wait[i] = -1; m_top[i] = 0; m_depth[i] = 0; m_held[i] = 0;
    end
    m_ver = cur_ver;
    chk(live == 0 && blocked == 0, "idle before random part");
    for (int n = 0; n < 3000; n++) begin
      // pick a thread that is not blocked
      do t = $urandom_range(0, NUM_THREADS - 1); while (m_wait[t] != -1);
      c = $urandom_range(0, 3);
      if (c == 0 && m_depth[t] < 2) begin                // begin / nest
        op(t, 0, 0, g);
        exp_g = 1; m_depth[t]++;
      end else if (c == 1 && m_depth[t] > 0) begin       // end / commit
        op(t, 1, 0, g);
        exp_g = g;                                       // reply value not defined for unlock
        m_depth[t]--;
        if (m_depth[t] == 0) begin m_ver[t] = m_ver[t] + 1'b1; n_cm++; end
      end else if (c == 2 && m_top[t] != 0) begin        // release the highest mutex held
        id = m_top[t];
        op(t, 1, id, g);
        exp_g = g;
        m_held[t][id] = 0;
        m_top[t] = 0;
        for (int k = 1; k < 5; k++) if (m_held[t][k]) m_top[t] = k;
        m_owner[id] = -1;
        for (int k = 1; k < NUM_THREADS && m_owner[id] == -1; k++)
          if (m_wait[(t + k) % NUM_THREADS] == id) begin
            m_owner[id] = (t + k) % NUM_THREADS; m_wait[(t + k) % NUM_THREADS] = -1;
            m_held[m_owner[id]][id] = 1;
            if (m_top[m_owner[id]] < id) m_top[m_owner[id]] = id;
            n_hand++;
          end
      end else if (m_top[t] < 4) begin                  // take a higher mutex
        id = $urandom_range(m_top[t] + 1, 4);
        op(t, 0, id, g);
        exp_g = (m_owner[id] == -1);
        if (exp_g) begin m_owner[id] = t; m_held[t][id] = 1; m_top[t] = id; end
        else begin m_wait[t] = id; n_blk++; end
      end else continue;
      for (int i = 0; i < NUM_THREADS; i++) begin
        m_blocked[i] = (m_wait[i] != -1);
        m_live[i] = (m_depth[i] != 0);
      end
      checks++;
      if (g !== exp_g || blocked !== m_blocked || live !== m_live || cur_ver !== m_ver) begin
        failures++;
        $display("FAIL random step %0d t%0d: grant %b/%b blocked %b/%b live %b/%b", n, t,
                 g, exp_g, blocked, m_blocked, live, m_live);
      end
    end
    $display("random: hand-overs=%0d blocks=%0d commits=%0d", n_hand, n_blk, n_cm);
    chk(n_hand > 20 && n_blk > 20 && n_cm > 20, "random mechanisms seen");
  endtask

  logic g;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // ---- mutexes ----
    op(0, 0, 3, g); chk(g, "t0 gets mutex 3");
    op(1, 0, 3, g); chk(!g && blocked[1], "t1 blocks");
    op(2, 0, 3, g); chk(!g && blocked[2], "t2 blocks");
    op(7, 0, 4, g); chk(g, "mutex 4 is independent");
    op(0, 1, 3, g); chk(!blocked[1] && blocked[2], "hand-over to t1");
    op(1, 1, 3, g); chk(!blocked[2], "hand-over to t2");
    op(2, 1, 3, g);
    op(3, 0, 3, g); chk(g, "mutex 3 free again");
    op(3, 1, 3, g);
    op(7, 1, 4, g);
    chk(live == 0, "no transaction from mutexes");
    // ---- nested transaction and commit ----
    op(4, 0, 0, g); chk(g && live[4] && n_begin == 1, "t4 begins");
    op(4, 0, 0, g); chk(live[4] && n_begin == 1, "nested begin");
    op(4, 1, 0, g); chk(live[4] && n_commit == 0, "inner end");
    op(4, 1, 0, g); chk(!live[4] && n_commit == 1 && cur_ver[4] == 2'd1, "commit");
    // ---- two transactions may run at once ----
    op(5, 0, 0, g); op(6, 0, 0, g);
    chk(live[5] && live[6], "optimistic concurrency");
    chk(older[5][6] && !older[6][5] && older[4][5], "age order");
    // ---- t5 loses a conflict to t6 ----
    abort_req = 8'b0010_0000; abort_wait = 8'b0100_0000;
    @(negedge clk); abort_req = 0; abort_wait = 0;
    @(negedge clk);
    chk(aborting[5] && live[5] && n_abort5 == 1, "t5 aborting, signatures kept");
    repeat (3) @(negedge clk);
    flush_done = 1; flush_done_tid = 5; @(negedge clk); flush_done = 0;
    chk(!live[5] && !aborting[5] && awaiting_restart[5] && cur_ver[5] == 2'd1, "rollback done");
    repeat (4) @(negedge clk);
    chk(n_restart5 == 0, "restart waits for the winner");
    op(6, 1, 0, g);
    repeat (3) @(negedge clk);
    chk(n_restart5 == 1 && !awaiting_restart[5], "restart after winner commits");
    op(2, 0, 0, g);                     // a new transaction
    op(5, 0, 0, g);                     // t5 restarts: keeps its age
    chk(older[5][2] && !older[2][5], "restarted transaction keeps its age");
    op(5, 1, 0, g); op(2, 1, 0, g);
    // repeated abort request of a non-running thread is ignored
    abort_req = 8'b0010_0000; @(negedge clk); abort_req = 0; @(negedge clk);
    chk(n_abort5 == 1 && !aborting[5], "no abort outside a transaction");
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
