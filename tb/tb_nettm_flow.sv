// tb_nettm_flow: a stateful packet-processing workload run end to end on the
// whole design at its default sizes. It models the kind of application the
// design is meant for: every packet updates a shared, persistent flow table,
// and the output path is protected by an ordinary lock because I/O cannot be
// undone.
//
// NPKT packets of 2 to 8 words, each belonging to one of NFLOW flows, are
// streamed into the input memory. All eight threads (four per processor) loop:
// take a packet from the input memory; run a transaction (lock identifier 0)
// that either updates the packet's flow entry (packet count, word count) and
// a global packet counter, or, for every fourth packet, only reads the flow
// entry (a read-only transaction); then, under mutex 1, allocate output memory
// from a shared pointer, copy the packet there and queue it for sending;
// finally free the input slot. Aborted transactions are re-executed after the
// restart pulse; the packet I/O around them is not repeated.
//
// Checked: every packet leaves exactly once and unchanged; the flow table,
// the global counter and the allocation pointer in memory end exactly as the
// packet list predicts; one commit per packet; no log overflow; the queue
// drains. Counted, and required at least once: aborts, restarts, conflicts,
// replays, read-only commits, and a thread blocked on the output mutex.
// Ports are driven at the falling clock edge, as a processor would present
// them after its own register stage.
module tb_nettm_flow;
  import nettm_pkg::*;
  localparam logic [31:0] STK  = 32'h0000_7000;

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

  // ---------------- workload ----------------
  localparam int NPKT     = 40;
  localparam int NFLOW    = 6;
  localparam int OUT_LOCK = 1;
  localparam logic [31:0] TOTAL = 32'h0000_0200;  // packets counted, all flows
  localparam logic [31:0] FLOWS = 32'h0000_0400;  // flow f: packets at +8f, words at +8f+4
  localparam logic [31:0] ALLOC = 32'h0000_0600;  // next free output-memory byte

  int pkt_len [NPKT], pkt_flow [NPKT];
  int exp_pkts [NFLOW], exp_words [NFLOW];
  int exp_total = 0, exp_alloc = 0;
  int n_taken = 0, n_ro = 0, n_sent = 0, n_out_cs = 0, n_out_blocked = 0;
  logic [NPKT-1:0] seen = 0;

  function automatic logic [31:0] pkt_word(input int id, input int w);
    if (w == 0) return {8'hC0, 8'(id), 16'(pkt_flow[id])};
    return {8'hD0 + 8'(w), 8'(id), 16'(id * 37 + w)};
  endfunction

  initial begin
    for (int f = 0; f < NFLOW; f++) begin exp_pkts[f] = 0; exp_words[f] = 0; end
    for (int p = 0; p < NPKT; p++) begin
      pkt_len[p]  = $urandom_range(2, 8);
      pkt_flow[p] = $urandom_range(0, NFLOW - 1);
      exp_alloc += 4 * pkt_len[p];
      if (p % 4 != 3) begin
        exp_pkts[pkt_flow[p]]++; exp_words[pkt_flow[p]] += pkt_len[p]; exp_total++;
      end
    end
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      for (int w = 0; w < pkt_len[p]; w++) begin
        @(negedge clk);
        rx_valid = 1; rx_data = pkt_word(p, w); rx_last = (w == pkt_len[p] - 1);
        @(posedge clk); while (!rx_ready) @(posedge clk);
      end
      @(negedge clk); rx_valid = 0;
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
  end

  // one request port per processor for each packet memory, shared by its threads
  logic [NUM_PROCS-1:0] ib_busy = 0, ob_busy = 0;
  task automatic ib(input int p, input logic [1:0] op, input logic [13:0] a, output logic [31:0] d);
    while (ib_busy[p]) @(negedge clk);
    ib_busy[p] = 1;
    @(negedge clk);
    ib_req_valid[p] = 1; ib_req_op[p] = op; ib_req_addr[p] = a;
    @(posedge clk); while (!ib_req_ready[p]) @(posedge clk);
    @(negedge clk); ib_req_valid[p] = 0;
    while (!(ib_resp_valid && ib_resp_pid == 1'(p))) @(negedge clk);
    d = ib_resp_data;
    ib_busy[p] = 0;
  endtask
  task automatic ob(input int p, input logic op, input logic [13:0] a, input logic [31:0] dd,
                    output logic ok);
    while (ob_busy[p]) @(negedge clk);
    ob_busy[p] = 1;
    @(negedge clk);
    ob_req_valid[p] = 1; ob_req_op[p] = op; ob_req_addr[p] = a; ob_req_data[p] = dd;
    @(posedge clk); while (!ob_req_ready[p]) @(posedge clk);
    @(negedge clk); ob_req_valid[p] = 0;
    while (!(ob_resp_valid && ob_resp_pid == 1'(p))) @(negedge clk);
    ok = ob_resp_ok;
    ob_busy[p] = 0;
  endtask

  // the flow-table transaction; returns 0 if it was aborted
  task automatic flow_tx(input int t, input int flow, input int len, input logic ro,
                         output logic ok);
    logic [31:0] v, e;
    e = FLOWS + 32'(8 * flow);
    sync(t, 0, 0);
    access(t, 0, e, 0, v, ok);                     if (!ok) return;
    if (!ro) begin
      access(t, 1, e, v + 1, v, ok);               if (!ok) return;
    end
    access(t, 0, e + 4, 0, v, ok);                 if (!ok) return;
    if (!ro) begin
      access(t, 1, e + 4, v + 32'(len), v, ok);    if (!ok) return;
      access(t, 0, TOTAL, 0, v, ok);               if (!ok) return;
      access(t, 1, TOTAL, v + 1, v, ok);           if (!ok) return;
    end
    repeat ($urandom_range(0, 4)) @(negedge clk);
    if (aborted[t]) begin ok = 0; return; end
    sync(t, 1, 0);
    if (ro) n_ro++;
  endtask

  task automatic flow_thread(input int t);
    int p, slot, len, id, flow;
    logic [31:0] d, w, v, base;
    logic ok, ro;
    p = t / THREADS_PER_PROC;
    while (n_taken < NPKT) begin
      ib(p, 2'd1, 0, d);
      if (!d[31]) begin
        repeat ($urandom_range(5, 20)) @(negedge clk);
        continue;
      end
      n_taken++;
      slot = 32'(d[19:16]); len = 32'(d[15:0]);
      ib(p, 2'd0, 14'(slot * 1536), w);
      id = 32'(w[23:16]); flow = 32'(w[15:0]);
      ro = (id % 4 == 3);
      forever begin
        flow_tx(t, flow, len, ro, ok);
        if (ok && !aborted[t]) break;
        wait (restarted[t]);
        aborted[t] = 0; restarted[t] = 0;
      end
      // output memory is allocated and the packet sent under an ordinary lock
      sync(t, 0, OUT_LOCK);
      if (!s_grant[t]) n_out_blocked++;
      access(t, 0, ALLOC, 0, base, ok);
      access(t, 1, ALLOC, base + 32'(4 * len), v, ok);
      for (int k = 0; k < len; k++) begin
        ib(p, 2'd0, 14'(slot * 1536 + 4 * k), w);
        ob(p, 1'b0, 14'(base) + 14'(4 * k), w, ok);
      end
      do ob(p, 1'b1, 14'(base), 32'(len), ok); while (!ok);
      sync(t, 1, OUT_LOCK);
      n_out_cs++;
      ib(p, 2'd2, 14'(slot), d);
    end
  endtask

  // transmit side: reassemble each packet and match it against the list
  logic [31:0] txq [$];
  int tid_pkt;
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) begin
      txq.push_back(tx_data);
      if (tx_last) begin
        checks++;
        tid_pkt = 32'(txq[0][23:16]);
        if (tid_pkt >= NPKT || seen[tid_pkt] || txq.size() != pkt_len[tid_pkt]) begin
          failures++; $display("FAIL sent packet %0d, %0d words", tid_pkt, txq.size());
        end else begin
          seen[tid_pkt] = 1;
          for (int k = 0; k < txq.size(); k++)
            if (txq[k] != pkt_word(tid_pkt, k)) begin
              failures++; $display("FAIL packet %0d word %0d = %h", tid_pkt, k, txq[k]);
            end
        end
        n_sent++;
        txq.delete();
      end
    end
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 3) != 0);

  int finished = 0;
  initial begin
    for (int i = 0; i < 8192; i++) sdram[i] = 0;
    for (int p = 0; p < NUM_PROCS; p++) begin cur[p] = 0; scur[p] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    fork
      begin flow_thread(0); finished++; end
      begin flow_thread(1); finished++; end
      begin flow_thread(2); finished++; end
      begin flow_thread(3); finished++; end
      begin flow_thread(4); finished++; end
      begin flow_thread(5); finished++; end
      begin flow_thread(6); finished++; end
      begin flow_thread(7); finished++; end
    join_none
    wait (finished == NUM_THREADS);
    repeat (3000) @(negedge clk);
    checks++; if (dut.u_lsq.count != 0) begin failures++; $display("FAIL queue not drained"); end
    checks++; if (n_sent != NPKT || seen != '1) begin
      failures++; $display("FAIL packets sent %0d of %0d", n_sent, NPKT);
    end
    for (int f = 0; f < NFLOW; f++) begin
      checks += 2;
      if (sdram[FLOWS[14:2] + 13'(2 * f)] != 32'(exp_pkts[f])) begin
        failures++; $display("FAIL flow %0d packets %0d expected %0d", f,
                             sdram[FLOWS[14:2] + 13'(2 * f)], exp_pkts[f]);
      end
      if (sdram[FLOWS[14:2] + 13'(2 * f + 1)] != 32'(exp_words[f])) begin
        failures++; $display("FAIL flow %0d words %0d expected %0d", f,
                             sdram[FLOWS[14:2] + 13'(2 * f + 1)], exp_words[f]);
      end
    end
    checks++; if (sdram[TOTAL[14:2]] != 32'(exp_total)) begin
      failures++; $display("FAIL total %0d expected %0d", sdram[TOTAL[14:2]], exp_total);
    end
    checks++; if (sdram[ALLOC[14:2]] != 32'(exp_alloc)) begin
      failures++; $display("FAIL allocation pointer %0d expected %0d", sdram[ALLOC[14:2]], exp_alloc);
    end
    checks++; if (n_commit != NPKT) begin failures++; $display("FAIL commits %0d", n_commit); end
    checks++; if (n_out_cs != NPKT) failures++;
    checks++; if (log_overflow != 0) failures++;
    checks++; if (thread_in_tx != 0 || thread_blocked != 0) failures++;
    $display("cycles=%0d packets=%0d commit=%0d read_only=%0d abort=%0d restart=%0d conflict=%0d replay=%0d out_blocked=%0d rollback_writes=%0d",
             cycle, n_sent, n_commit, n_ro, n_abort, n_restart, n_conflict, n_replay,
             n_out_blocked, n_flushw);
    ev(n_abort, "abort"); ev(n_restart, "restart"); ev(n_conflict, "conflict");
    ev(n_replay, "replay"); ev(n_ro, "read-only commit"); ev(n_out_blocked, "output lock wait");
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
    $display("FAIL watchdog: finished=%0d taken=%0d sent=%0d", finished, n_taken, n_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
