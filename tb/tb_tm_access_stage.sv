// tb_tm_access_stage: drives the conflict-detection pipeline with directed
// access sequences against a simple cache model and checks the outcome of
// each access (DONE / REPLAY / ABORT), the abort requests, undo-log appends
// and their old data, the two-cycle latency, back-to-back conflicts (the
// second access must see the first one's signature update), lazy clearing
// after commit, the log filter, misses, a full queue, and the rollback
// hand-over of the cache write port. A random part then issues 3000 accesses
// from six transactional and two non-transactional threads to 64 words that
// map to 64 distinct signature rows, with random commits in between, and
// compares every outcome, abort request, wait set, load value and undo-log
// append with a model of the signature rows (read bit, write bit and version
// per thread, valid only at the thread's current version, lazily cleared on
// each performed access) and of the age-based outcome rules.
module tb_tm_access_stage;
  import nettm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_store = 0;
  logic [TID_W-1:0] req_tid = 0;
  logic [31:0] req_addr = 0, req_wdata = 0;
  logic [3:0] req_be = 4'hF;
  logic resp_valid;
  logic [TID_W-1:0] resp_tid;
  resp_t resp_code;
  logic [31:0] resp_rdata;
  logic [NUM_THREADS-1:0] live = 0, aborting = 0, abort_req, abort_wait;
  logic [NUM_THREADS-1:0][VER_W-1:0] cur_ver = 0;
  logic [NUM_THREADS-1:0][NUM_THREADS-1:0] older = 0;
  logic dc_lk_en, dc_lk_hit, dc_wr_en, dc_miss_en, dc_op_ready = 1;
  logic [31:0] dc_lk_addr, dc_lk_rdata, dc_wr_addr, dc_wr_data, dc_miss_addr;
  logic [3:0] dc_wr_be;
  logic [TID_W-1:0] lf_tid, log_tid;
  logic [31:0] lf_addr;
  logic lf_skip = 0, log_push;
  log_entry_t log_entry, flush_wr_entry = '0;
  logic flush_req = 0, flush_grant, flush_wr_valid = 0, flush_wr_ready;
  logic ev_conflict, ev_filtered;
  int checks = 0, failures = 0;

  tm_access_stage #(.SIG_ROWS(64)) dut (.*);
  always #5 clk = ~clk;

  // cache model: 64 words, miss on addresses with bit 12 set
  logic [31:0] cmem [64];
  always @(posedge clk) begin
    if (dc_lk_en) begin
      dc_lk_hit   <= !dc_lk_addr[12];
      dc_lk_rdata <= (dc_wr_en && dc_wr_addr[7:2] == dc_lk_addr[7:2]) ? dc_wr_data : cmem[dc_lk_addr[7:2]];
    end
    if (dc_wr_en) cmem[dc_wr_addr[7:2]] <= dc_wr_data;
  end

  // observe cycle-1 side effects of the access in flight
  logic [NUM_THREADS-1:0] seen_abort_req, seen_abort_wait;
  logic seen_push, seen_miss;
  log_entry_t seen_entry;
  always @(posedge clk) begin
    if (abort_req != 0) begin seen_abort_req <= abort_req; seen_abort_wait <= abort_wait; end
    if (log_push) begin seen_push <= 1; seen_entry <= log_entry; end
    if (dc_miss_en) seen_miss <= 1;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (code %0d)", msg, resp_code); end
  endtask

  // issue one access and wait exactly two cycles for its response
  task automatic acc(input int t, input logic st, input logic [31:0] a, input logic [31:0] d,
                     input resp_t exp, input string msg);
    seen_abort_req = 0; seen_abort_wait = 0; seen_push = 0; seen_miss = 0;
    req_valid = 1; req_tid = TID_W'(t); req_store = st; req_addr = a; req_wdata = d;
    @(negedge clk); req_valid = 0;
    chk(!resp_valid, "no response after one cycle");
    @(negedge clk);
    chk(resp_valid && resp_tid == TID_W'(t) && resp_code == exp, msg);
  endtask

  // ---------------- random part ----------------
  logic       m_rd  [64][NUM_THREADS];
  logic       m_wr  [64][NUM_THREADS];
  logic [1:0] m_ver [64][NUM_THREADS];
  logic [31:0] V [64];
  int rank [NUM_THREADS];

  task automatic sweep();
    for (int w = 0; w < 64; w++) begin
      req_valid = 1; req_tid = 7; req_store = 0; req_addr = 32'(4 * w);
      @(negedge clk); req_valid = 0; @(negedge clk);
    end
  endtask

  task automatic bump(input int t);
    cur_ver[t] = cur_ver[t] + 2'd1;
  endtask

  task automatic random_phase();
    int t, w, n_done = 0, n_abort = 0, n_replay = 0, n_wait = 0;
    logic st, tx;
    logic [31:0] d;
    logic [NUM_THREADS-1:0] others, cm;
    resp_t exp;
    logic [NUM_THREADS-1:0] exp_areq, exp_await;
    // known state: every slice cleared and stamped with the current version
    live = 0; aborting = 0; lf_skip = 0; dc_op_ready = 1;
    for (int i = 0; i < NUM_THREADS; i++) cur_ver[i] = 2'd2;
    sweep();
    for (int i = 0; i < NUM_THREADS; i++) cur_ver[i] = 2'd3;
    sweep();
    for (int r = 0; r < 64; r++)
      for (int i = 0; i < NUM_THREADS; i++) begin m_rd[r][i] = 0; m_wr[r][i] = 0; m_ver[r][i] = 2'd3; end
    for (int r = 0; r < 64; r++) V[r] = cmem[r];
    // a fixed age order among the six transactional threads
    for (int i = 0; i < NUM_THREADS; i++) rank[i] = i;
    for (int i = NUM_THREADS - 1; i > 0; i--) begin
      int j, k;
      j = $urandom_range(0, i); k = rank[i]; rank[i] = rank[j]; rank[j] = k;
    end
    for (int i = 0; i < NUM_THREADS; i++)
      for (int j = 0; j < NUM_THREADS; j++) older[i][j] = rank[i] < rank[j];
    live = 8'b0011_1111;
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 24) == 0) bump($urandom_range(0, 5));   // a commit
      t  = $urandom_range(0, NUM_THREADS - 1);
      w  = $urandom_range(0, 15) + 16 * $urandom_range(0, 3);
      st = $urandom_range(0, 2) == 0;
      d  = $urandom;
      tx = live[t];
      // model decision
      others = live & ~(8'b1 << t);
      cm = 0;
      for (int i = 0; i < NUM_THREADS; i++)
        if (others[i] && m_ver[w][i] == cur_ver[i] && (m_wr[w][i] || (st && m_rd[w][i]))) cm[i] = 1;
      exp_areq = 0; exp_await = 0;
      if (cm == 0)                        exp = RESP_DONE;
      else if (tx && (older[t] & cm) == cm) exp = RESP_REPLAY;
      else if (tx) begin exp = RESP_ABORT; exp_areq = 8'b1 << t; exp_await = cm; end
      else begin exp = RESP_REPLAY; exp_areq = cm; end
      acc(t, st, 32'(4 * w), d, exp, "random outcome");
      checks++;
      if (seen_abort_req !== exp_areq || (exp == RESP_ABORT && seen_abort_wait !== exp_await)) begin
        failures++; $display("FAIL random abort req %b/%b expected %b/%b", seen_abort_req,
                             seen_abort_wait, exp_areq, exp_await);
      end
      if (exp == RESP_DONE) begin
        n_done++;
        checks++;
        if (st && tx) begin
          if (!seen_push || seen_entry.addr != 32'(4 * w) || seen_entry.data != V[w]) begin
            failures++; $display("FAIL random log append");
          end
        end else if (seen_push) begin
          failures++; $display("FAIL random unexpected log append");
        end
        if (!st) begin
          checks++;
          if (resp_rdata != V[w]) begin failures++; $display("FAIL random load %h expected %h", resp_rdata, V[w]); end
        end
        for (int i = 0; i < NUM_THREADS; i++)
          if (m_ver[w][i] != cur_ver[i]) begin m_rd[w][i] = 0; m_wr[w][i] = 0; m_ver[w][i] = cur_ver[i]; end
        if (tx) begin if (st) m_wr[w][t] = 1; else m_rd[w][t] = 1; end
        if (st) V[w] = d;
      end else if (exp == RESP_ABORT) begin
        n_abort++;
        bump(t);                               // its rollback has ended
      end else begin
        n_replay++;
        if (exp_areq != 0) begin
          n_wait++;
          for (int i = 0; i < NUM_THREADS; i++) if (exp_areq[i]) bump(i);
        end
      end
    end
    $display("random: done=%0d abort=%0d replay=%0d non-tx wins=%0d", n_done, n_abort, n_replay, n_wait);
    chk(n_abort > 20 && n_replay > 20 && n_wait > 5, "random outcomes all seen");
  endtask

  initial begin
    for (int i = 0; i < 64; i++) cmem[i] = 32'h1000 + i;
    repeat (2) @(negedge clk); rst_n = 1;
    live = 8'b0000_0011;   // threads 0 and 1 in transactions
    acc(0, 1, 32'h10, 32'hAAAA, RESP_DONE, "tx store");
    chk(seen_push && seen_entry.addr == 32'h10 && seen_entry.data == 32'h1004, "old word logged");
    acc(0, 0, 32'h10, 0, RESP_DONE, "own load");
    chk(resp_rdata == 32'hAAAA, "load sees store");
    acc(1, 0, 32'h10, 0, RESP_ABORT, "reader loses to writer");
    chk(seen_abort_req == 8'b10 && seen_abort_wait == 8'b01, "abort self, wait for t0");
    acc(2, 0, 32'h10, 0, RESP_REPLAY, "non-tx replays");
    chk(seen_abort_req == 8'b01, "non-tx aborts the writer");
    older[1] = 8'hFF;   // t1 is the oldest transaction: it waits instead
    acc(1, 0, 32'h10, 0, RESP_REPLAY, "oldest waits");
    chk(seen_abort_req == 0, "no abort when the oldest waits");
    older[1] = 8'h00;
    acc(1, 0, 32'h20, 0, RESP_DONE, "t1 reads 0x20");
    acc(0, 0, 32'h20, 0, RESP_DONE, "readers share");
    acc(0, 1, 32'h20, 32'h5, RESP_ABORT, "writer loses to reader");
    // back-to-back: t1 store then t0 load of the same word
    req_valid = 1; req_tid = 1; req_store = 1; req_addr = 32'h30; req_wdata = 32'h77;
    @(negedge clk);
    req_tid = 0; req_store = 0;
    @(negedge clk); req_valid = 0;
    chk(resp_valid && resp_code == RESP_DONE, "first of pair");
    @(negedge clk);
    chk(resp_valid && resp_tid == 0 && resp_code == RESP_ABORT, "back-to-back conflict seen");
    // t0 ends (version advances): its bits become stale
    live[0] = 0; cur_ver[0] = 2'd1;
    acc(2, 1, 32'h10, 32'h9, RESP_DONE, "after commit no conflict");
    chk(!seen_push, "non-tx store is not logged");
    // conflict only with a transaction that is rolling back
    aborting[1] = 1;
    acc(2, 0, 32'h30, 0, RESP_REPLAY, "wait for rollback");
    chk(seen_abort_req == 0, "no new abort");
    acc(1, 0, 32'h40, 0, RESP_ABORT, "aborting requester");
    aborting[1] = 0; live[1] = 0; cur_ver[1] = 2'd1;
    // misses, full queue, filter
    acc(2, 0, 32'h1010, 0, RESP_REPLAY, "miss replays");
    chk(seen_miss, "miss request");
    live[3] = 1;
    dc_op_ready = 0;
    acc(3, 1, 32'h44, 1, RESP_REPLAY, "queue full");
    dc_op_ready = 1;
    lf_skip = 1;
    acc(3, 1, 32'h44, 1, RESP_DONE, "stack store");
    chk(!seen_push, "filtered store not logged");
    lf_skip = 0;
    // rollback takes the write port once the pipeline is empty
    req_valid = 1; req_tid = 2; req_store = 0; req_addr = 32'h48;
    @(negedge clk);
    flush_req = 1; #1;
    chk(!req_ready && !flush_grant, "drain before grant");
    @(negedge clk); req_valid = 0;
    chk(flush_grant, "grant");
    flush_wr_valid = 1; flush_wr_entry = '{addr: 32'h10, data: 32'h1004};
    @(negedge clk); flush_wr_valid = 0; flush_req = 0;
    chk(cmem[4] == 32'h1004, "rollback write");
    @(negedge clk);
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
