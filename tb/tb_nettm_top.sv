// tb_nettm_top: end-to-end test of the whole memory/synchronisation side at
// its default sizes, driven by eight behavioural threads on two processors
// and a behavioural SDRAM with random latency and back-pressure.
//
// Threads 0-5 repeatedly run a transaction (lock/unlock with the transaction
// identifier 0) that increments a shared counter and a private word, stores
// to freshly allocated stack space, and (thread 0) nests a second level.
// Threads 6 and 7 increment a word under mutex 3 and read the shared counter
// outside any critical section, which aborts running transactions. A thread
// whose access is answered ABORT, or which sees its abort pulse, waits for
// its restart pulse and re-executes the transaction from the start. At the end
// memory must hold exactly one increment per committed transaction or
// critical section: every rolled-back store has been undone. Counted, and
// required at least once: commits, aborts, restarts, rollback writes,
// conflicts, replays, cache misses, filtered stack stores, mutex blocking,
// nested transactions, and a full load/store queue. Alongside, a packet
// stream is received into the input memory, copied by processor 1 into the
// output memory and sent; the sent stream must equal the received one.
module tb_nettm_top;
  import nettm_pkg::*;
  localparam int ITER   = 12;
  localparam int ITER_M = 12;
  localparam logic [31:0] CNT  = 32'h0000_0000;
  localparam logic [31:0] XW   = 32'h0000_0100;
  localparam logic [31:0] PRIV = 32'h0000_4000;  // same cache lines as CNT/XW
  localparam logic [31:0] STK  = 32'h0000_7000;  // thread t's stack top: STK + t*0x100

  logic clk = 0, rst_n = 0;
  logic [NUM_PROCS-1:0] mem_req_valid = 0, mem_req_ready, mem_req_store = 0;
  logic [NUM_PROCS-1:0][1:0] mem_req_tid = 0;
  logic [NUM_PROCS-1:0][31:0] mem_req_addr = 0, mem_req_wdata = 0;
  logic [NUM_PROCS-1:0][3:0] mem_req_be = '1;
  logic mem_resp_valid;
  logic [TID_W-1:0] mem_resp_tid;
  resp_t mem_resp_code;
  logic [31:0] mem_resp_rdata;
  logic [NUM_PROCS-1:0] sync_req_valid = 0, sync_req_ready, sync_req_unlock = 0;
  logic [NUM_PROCS-1:0][1:0] sync_req_tid = 0;
  logic [NUM_PROCS-1:0][3:0] sync_req_id = 0;
  logic sync_resp_valid, sync_resp_granted;
  logic [TID_W-1:0] sync_resp_tid;
  logic [NUM_PROCS-1:0] sp_wr_valid = 0;
  logic [NUM_PROCS-1:0][1:0] sp_wr_tid = 0;
  logic [NUM_PROCS-1:0][31:0] sp_wr_value = 0;
  logic [NUM_THREADS-1:0] thread_blocked, thread_in_tx, thread_abort,
                          thread_awaiting_restart, thread_restart, log_overflow;
  logic sdram_req_valid, sdram_req_ready = 0, sdram_req_store, sdram_rvalid = 0;
  logic [31:0] sdram_req_addr, sdram_req_wdata, sdram_rdata = 0;
  logic [3:0] sdram_req_be;
  logic ev_conflict, ev_log_filtered, ev_flush_write;
  logic rx_valid = 0, rx_ready, rx_last = 0, tx_valid, tx_ready = 1, tx_last, tx_sent;
  logic [31:0] rx_data = 0, tx_data;
  logic [NUM_PROCS-1:0] ib_req_valid = 0, ib_req_ready, ob_req_valid = 0, ob_req_ready, ob_req_op = 0;
  logic [NUM_PROCS-1:0][1:0] ib_req_op = 0;
  logic [NUM_PROCS-1:0][13:0] ib_req_addr = 0, ob_req_addr = 0;
  logic [NUM_PROCS-1:0][31:0] ob_req_data = 0;
  logic ib_resp_valid, ob_resp_valid;
  logic [0:0] ib_resp_pid, ob_resp_pid;
  logic [31:0] ib_resp_data;
  logic        ob_resp_ok;

  nettm_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_commit = 0, n_abort = 0, n_restart = 0, n_flushw = 0, n_conflict = 0,
      n_replay = 0, n_miss = 0, n_filtered = 0, n_blocked = 0, n_nested = 0,
      n_lsq_full = 0, n_cs = 0;

  // ---------------- SDRAM model ----------------
  logic [31:0] sdram [8192];
  int rd_wait = -1;
  logic [31:0] rd_word;
  always @(posedge clk) if (rst_n) begin
    sdram_rvalid <= 0;
    if (rd_wait == 0) begin sdram_rvalid <= 1; sdram_rdata <= rd_word; end
    if (rd_wait >= 0) rd_wait--;
    if (sdram_req_valid && sdram_req_ready) begin
      if (sdram_req_store) begin
        for (int b = 0; b < 4; b++)
          if (sdram_req_be[b]) sdram[sdram_req_addr[14:2]][8*b +: 8] <= sdram_req_wdata[8*b +: 8];
      end else begin
        rd_word = sdram[sdram_req_addr[14:2]];
        rd_wait = $urandom_range(2, 8);
      end
    end
  end
  // back-pressure: long stalls now and then fill the queue
  int stall = 0, cycle = 0;
  always @(posedge clk) cycle++;
  always @(negedge clk) begin
    if (stall > 0) stall--;
    else if ($urandom_range(0, 400) == 0) stall = 150;
    sdram_req_ready = (stall == 0) && (rd_wait < 0) && ($urandom_range(0, 3) != 0);
  end

  // ---------------- thread <-> port plumbing ----------------
  logic [NUM_THREADS-1:0] want = 0, got = 0, aborted = 0, restarted = 0;
  logic [NUM_THREADS-1:0] w_store = 0;
  logic [31:0] w_addr [NUM_THREADS], w_data [NUM_THREADS], r_data [NUM_THREADS];
  resp_t r_code [NUM_THREADS];
  logic [NUM_THREADS-1:0] s_want = 0, s_got = 0, s_unl = 0, s_grant = 0;
  logic [3:0] s_id [NUM_THREADS];
  logic [NUM_THREADS-1:0] sp_want = 0;
  logic [31:0] sp_val [NUM_THREADS];
  int cur [NUM_PROCS], scur [NUM_PROCS];

  // ports are driven only at the falling edge; what the rising edge
  // accepted is noted in acc/sacc and acted on at the next falling edge
  logic [NUM_PROCS-1:0] acc = 0, sacc = 0;
  always @(posedge clk) if (rst_n) begin
    acc  = mem_req_valid & mem_req_ready;
    sacc = sync_req_valid & sync_req_ready;
    if (mem_resp_valid) begin
      r_code[mem_resp_tid] = mem_resp_code; r_data[mem_resp_tid] = mem_resp_rdata;
      got[mem_resp_tid] = 1;
      if (mem_resp_code == RESP_REPLAY) n_replay++;
    end
    if (sync_resp_valid) begin
      s_grant[sync_resp_tid] = sync_resp_granted; s_got[sync_resp_tid] = 1;
      if (!sync_resp_granted) n_blocked++;
    end
    for (int k = 0; k < NUM_THREADS; k++) begin
      if (thread_abort[k]) begin aborted[k] = 1; n_abort++; end
      if (thread_restart[k]) begin restarted[k] = 1; n_restart++; end
    end
    if (ev_flush_write) n_flushw++;
    if (ev_conflict) n_conflict++;
    if (ev_log_filtered) n_filtered++;
    if (dut.u_dcache.miss_send && dut.u_dcache.enq_ready) n_miss++;
    if (!dut.u_lsq.enq_ready) n_lsq_full++;
    if (dut.u_sync.commit_valid) n_commit++;
  end

  int t;
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NUM_PROCS; p++) begin
      if (acc[p])  begin want[cur[p]] = 0;    mem_req_valid[p] = 0;  end
      if (sacc[p]) begin s_want[scur[p]] = 0; sync_req_valid[p] = 0; end
      acc[p] = 0; sacc[p] = 0;
      sp_wr_valid[p] = 0;
      if (!mem_req_valid[p])
        for (int k = 0; k < THREADS_PER_PROC; k++) begin
          t = p * THREADS_PER_PROC + (cur[p] + 1 + k) % THREADS_PER_PROC;
          if (want[t] && !mem_req_valid[p]) begin
            cur[p] = t;
            mem_req_valid[p] = 1; mem_req_tid[p] = 2'(t); mem_req_store[p] = w_store[t];
            mem_req_addr[p] = w_addr[t]; mem_req_wdata[p] = w_data[t];
          end
        end
      if (!sync_req_valid[p])
        for (int k = 0; k < THREADS_PER_PROC; k++) begin
          t = p * THREADS_PER_PROC + (scur[p] + 1 + k) % THREADS_PER_PROC;
          if (s_want[t] && !sync_req_valid[p]) begin
            scur[p] = t;
            sync_req_valid[p] = 1; sync_req_tid[p] = 2'(t); sync_req_unlock[p] = s_unl[t];
            sync_req_id[p] = s_id[t];
          end
        end
      for (int k = 0; k < THREADS_PER_PROC; k++) begin
        t = p * THREADS_PER_PROC + k;
        if (sp_want[t] && !sp_wr_valid[p]) begin
          sp_wr_valid[p] = 1; sp_wr_tid[p] = 2'(k); sp_wr_value[p] = sp_val[t]; sp_want[t] = 0;
        end
      end
    end
  end

  // one memory access; returns 0 if the transaction was aborted
  task automatic access(input int t, input logic st, input logic [31:0] a,
                        input logic [31:0] d, output logic [31:0] rd, output logic ok);
    ok = 1;
    forever begin
      if (aborted[t]) begin ok = 0; return; end
      w_store[t] = st; w_addr[t] = a; w_data[t] = d; got[t] = 0; want[t] = 1;
      wait (got[t]);
      if (r_code[t] == RESP_DONE) begin rd = r_data[t]; return; end
      if (r_code[t] == RESP_ABORT) begin ok = 0; return; end
      repeat ($urandom_range(1, 4)) @(negedge clk);
    end
  endtask

  task automatic sync(input int t, input logic unl, input int id);
    s_unl[t] = unl; s_id[t] = 4'(id); s_got[t] = 0; s_want[t] = 1;
    wait (s_got[t]);
    if (!s_grant[t]) begin
      @(negedge clk);
      wait (!thread_blocked[t]);
    end
  endtask

  task automatic set_sp(input int t, input logic [31:0] v);
    sp_val[t] = v; sp_want[t] = 1;
    wait (!sp_want[t]);
    @(negedge clk);
  endtask

  // one transaction; returns 0 if it was aborted
  task automatic tx_body(input int t, output logic ok);
    logic [31:0] v;
    sync(t, 0, 0);
    if (t == 0) begin sync(t, 0, 0); n_nested++; end
    access(t, 0, CNT, 0, v, ok);                    if (!ok) return;
    access(t, 1, CNT, v + 1, v, ok);                if (!ok) return;
    access(t, 0, PRIV + 32'(4 * t), 0, v, ok);      if (!ok) return;
    access(t, 1, PRIV + 32'(4 * t), v + 1, v, ok);  if (!ok) return;
    set_sp(t, STK + 32'(t * 256) - 32'h20);         // allocate a frame
    access(t, 1, STK + 32'(t * 256) - 32'h10, 32'(t), v, ok); if (!ok) return;
    set_sp(t, STK + 32'(t * 256));                  // release it
    if (t == 0) sync(t, 1, 0);
    repeat ($urandom_range(0, 6)) @(negedge clk);
    if (aborted[t]) begin ok = 0; return; end
    sync(t, 1, 0);
  endtask

  task automatic tx_thread(input int t);
    logic ok;
    set_sp(t, STK + 32'(t * 256));
    for (int i = 0; i < ITER; i++) begin
      forever begin
        tx_body(t, ok);
        if (ok && !aborted[t]) break;
        wait (restarted[t]);
        aborted[t] = 0; restarted[t] = 0;
        set_sp(t, STK + 32'(t * 256));              // checkpoint restored
      end
      repeat ($urandom_range(0, 10)) @(negedge clk);
    end
  endtask

  task automatic lock_thread(input int t);
    logic [31:0] v;
    logic ok;
    for (int i = 0; i < ITER_M; i++) begin
      sync(t, 0, 3);
      access(t, 0, XW, 0, v, ok);
      access(t, 1, XW, v + 1, v, ok);
      sync(t, 1, 3);
      n_cs++;
      access(t, 0, CNT, 0, v, ok);                  // unsynchronised read
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
  endtask

  // ---------------- packet path ----------------
  // The receive side sends NPKT packets; processor 1's packet-handling code
  // (modelled here) takes each one, copies it into the output memory and
  // sends it. The transmitted stream must equal the received one.
  localparam int NPKT = 4;
  logic [31:0] pkt_exp [$];
  int n_pkt_tx = 0, n_pkt_words = 0, pkt_done = 0;

  initial begin
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      automatic int len = 3 + 5 * p;
      for (int w = 0; w < len; w++) begin
        @(negedge clk);
        rx_valid = 1; rx_data = {8'hA0 + 8'(p), 24'(w)}; rx_last = (w == len - 1);
        pkt_exp.push_back(rx_data);
        @(posedge clk); while (!rx_ready) @(posedge clk);
      end
      @(negedge clk); rx_valid = 0;
    end
  end

  task automatic ib(input logic [1:0] op, input logic [13:0] a, output logic [31:0] d);
    @(negedge clk);
    ib_req_valid[1] = 1; ib_req_op[1] = op; ib_req_addr[1] = a;
    @(posedge clk); while (!ib_req_ready[1]) @(posedge clk);
    @(negedge clk); ib_req_valid[1] = 0;
    while (!(ib_resp_valid && ib_resp_pid == 1)) @(negedge clk);
    d = ib_resp_data;
  endtask
  task automatic ob(input logic op, input logic [13:0] a, input logic [31:0] dd, output logic [31:0] d);
    @(negedge clk);
    ob_req_valid[1] = 1; ob_req_op[1] = op; ob_req_addr[1] = a; ob_req_data[1] = dd;
    @(posedge clk); while (!ob_req_ready[1]) @(posedge clk);
    @(negedge clk); ob_req_valid[1] = 0;
    while (!(ob_resp_valid && ob_resp_pid == 1)) @(negedge clk);
    d = {31'd0, ob_resp_ok};
  endtask

  initial begin
    logic [31:0] d, w;
    int slot, len;
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      do ib(2'd1, 0, d); while (!d[31]);
      slot = d[19:16]; len = d[15:0];
      for (int k = 0; k < len; k++) begin
        ib(2'd0, 14'(slot * 1536 + 4 * k), w);
        ob(1'b0, 14'(p * 256 + 4 * k), w, d);
      end
      ib(2'd2, 14'(slot), d);
      do ob(1'b1, 14'(p * 256), 32'(len), d); while (!d[0]);
    end
    pkt_done = 1;
  end

  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) begin
      checks++; n_pkt_words++;
      if (pkt_exp.size() == 0 || tx_data !== pkt_exp[0]) begin
        failures++; $display("FAIL packet word %h", tx_data);
      end
      if (pkt_exp.size() != 0) void'(pkt_exp.pop_front());
    end
    if (tx_sent) n_pkt_tx++;
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 3) != 0);

  int finished = 0;
  initial begin
    for (int i = 0; i < 8192; i++) sdram[i] = 0;
    for (int p = 0; p < NUM_PROCS; p++) begin cur[p] = 0; scur[p] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    fork
      begin tx_thread(0); finished++; end
      begin tx_thread(1); finished++; end
      begin tx_thread(2); finished++; end
      begin tx_thread(3); finished++; end
      begin tx_thread(4); finished++; end
      begin tx_thread(5); finished++; end
      begin lock_thread(6); finished++; end
      begin lock_thread(7); finished++; end
    join_none
    wait (finished == NUM_THREADS && pkt_done == 1);
    // memory stalled while one thread keeps storing to a cached word: the
    // queue fills and further stores are replayed until it drains
    stall = 1000;
    for (int i = 0; i < 80; i++) begin
      automatic logic [31:0] v;
      automatic logic ok;
      access(6, 1, XW, 32'(2 * ITER_M), v, ok);
    end
    // let the queue drain to memory
    repeat (2000) @(negedge clk);
    checks++; if (dut.u_lsq.count != 0) begin failures++; $display("FAIL queue not drained"); end
    checks++; if (sdram[CNT[14:2]] != 32'(6 * ITER)) begin
      failures++; $display("FAIL counter %0d expected %0d", sdram[CNT[14:2]], 6 * ITER);
    end
    for (int t = 0; t < 6; t++) begin
      checks++;
      if (sdram[(PRIV[14:2]) + t] != 32'(ITER)) begin
        failures++; $display("FAIL private word of %0d = %0d", t, sdram[(PRIV[14:2]) + t]);
      end
    end
    checks++; if (sdram[XW[14:2]] != 32'(2 * ITER_M)) begin
      failures++; $display("FAIL mutex word %0d", sdram[XW[14:2]]);
    end
    checks++; if (n_pkt_tx != NPKT || pkt_exp.size() != 0) begin
      failures++; $display("FAIL packets sent %0d, words left %0d", n_pkt_tx, pkt_exp.size());
    end
    checks++; if (n_commit != 6 * ITER) begin failures++; $display("FAIL commits %0d", n_commit); end
    checks++; if (log_overflow != 0) failures++;
    checks++; if (thread_in_tx != 0 || thread_blocked != 0) failures++;
    $display("cycles=%0d", cycle);
    $display("events: commit=%0d abort=%0d restart=%0d rollback_writes=%0d conflict=%0d replay=%0d miss=%0d filtered=%0d blocked=%0d nested=%0d lsq_full=%0d cs=%0d",
             n_commit, n_abort, n_restart, n_flushw, n_conflict, n_replay, n_miss, n_filtered,
             n_blocked, n_nested, n_lsq_full, n_cs);
    $display("packets forwarded=%0d words=%0d", n_pkt_tx, n_pkt_words);
    ev(n_commit, "commit"); ev(n_abort, "abort"); ev(n_restart, "restart");
    ev(n_flushw, "rollback write"); ev(n_conflict, "conflict"); ev(n_replay, "replay");
    ev(n_miss, "cache miss"); ev(n_filtered, "filtered store"); ev(n_blocked, "mutex block");
    ev(n_nested, "nested transaction"); ev(n_lsq_full, "queue full"); ev(n_cs, "critical section");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ev(input int n, input string name);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: finished=%0d want=%b swant=%b ab=%b rs=%b awr=%b intx=%b blk=%b aborting=%b pend=%b fst=%0d cnt=%0d", finished, want, s_want, aborted, restarted, thread_awaiting_restart, thread_in_tx, thread_blocked, dut.aborting, dut.u_log.pending, dut.u_log.fstate, dut.u_lsq.count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
