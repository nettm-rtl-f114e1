// nettm_top: the memory and synchronisation side of a NetTM soft multicore:
// everything that lies between the multithreaded processors and off-chip
// memory, with hardware transactional memory added.
//
// The processors themselves (NUM_PROCS cores of THREADS_PER_PROC threads) are
// outside this module; each connects through three ports:
//   data bus    mem_req_* (one access per cycle per processor, local thread
//               number) and the shared response mem_resp_* (global thread
//               number {processor, local thread}): DONE with load data, REPLAY
//               or ABORT, two cycles after acceptance.
//   sync bus    sync_req_* lock/unlock with a 4-bit identifier, answered one
//               cycle later on sync_resp_*; identifiers set in TX_ID_MASK start
//               and end transactions, the others are mutexes.
//   stack ptr   sp_wr_* reports each write of a thread's stack pointer.
// Per thread: thread_blocked (waiting for a mutex), thread_in_tx, a pulse
// thread_abort when the thread's transaction is aborted (the processor then
// discards the transaction's work), thread_awaiting_restart and a pulse
// thread_restart when it may re-execute the transaction from its start.
// Off-chip memory is reached through sdram_* (in-order requests, read data
// returned with sdram_rvalid).
//
// Inside: round-robin arbiters for the two busses, the conflict-detection
// access pipeline (hash, signature table, conflict check), the shared data
// cache and load/store queue, the sync unit (mutexes, transaction state and
// version numbers), the undo-log and the stack-pointer log filter, and the
// packet input and output memories with their own request busses (ib_*, ob_*:
// one request per cycle per processor, answered a cycle after the grant with
// the processor's number in *_resp_pid). Instruction caches belong to the
// processors and are not part of this module.
module nettm_top
  import nettm_pkg::*;
#(
  parameter logic [NUM_MUTEX-1:0] TX_ID_MASK   = 16'h0001,
  parameter int unsigned          SIG_ROWS     = 1024,
  parameter int unsigned          LOG_DEPTH    = 128,
  parameter int unsigned          DCACHE_BYTES = 16384,
  parameter int unsigned          LSQ_DEPTH    = 64
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  // data bus, per processor
  input  logic [NUM_PROCS-1:0]                         mem_req_valid,
  output logic [NUM_PROCS-1:0]                         mem_req_ready,
  input  logic [NUM_PROCS-1:0][$clog2(THREADS_PER_PROC)-1:0] mem_req_tid,
  input  logic [NUM_PROCS-1:0][ADDR_W-1:0]             mem_req_addr,
  input  logic [NUM_PROCS-1:0]                         mem_req_store,
  input  logic [NUM_PROCS-1:0][3:0]                    mem_req_be,
  input  logic [NUM_PROCS-1:0][DATA_W-1:0]             mem_req_wdata,
  output logic                                         mem_resp_valid,
  output logic [TID_W-1:0]                             mem_resp_tid,
  output resp_t                                        mem_resp_code,
  output logic [DATA_W-1:0]                            mem_resp_rdata,
  // sync bus, per processor
  input  logic [NUM_PROCS-1:0]                         sync_req_valid,
  output logic [NUM_PROCS-1:0]                         sync_req_ready,
  input  logic [NUM_PROCS-1:0][$clog2(THREADS_PER_PROC)-1:0] sync_req_tid,
  input  logic [NUM_PROCS-1:0]                         sync_req_unlock,
  input  logic [NUM_PROCS-1:0][LOCK_ID_W-1:0]          sync_req_id,
  output logic                                         sync_resp_valid,
  output logic [TID_W-1:0]                             sync_resp_tid,
  output logic                                         sync_resp_granted,
  // stack-pointer writes, per processor
  input  logic [NUM_PROCS-1:0]                         sp_wr_valid,
  input  logic [NUM_PROCS-1:0][$clog2(THREADS_PER_PROC)-1:0] sp_wr_tid,
  input  logic [NUM_PROCS-1:0][ADDR_W-1:0]             sp_wr_value,
  // per-thread status
  output logic [NUM_THREADS-1:0]                       thread_blocked,
  output logic [NUM_THREADS-1:0]                       thread_in_tx,
  output logic [NUM_THREADS-1:0]                       thread_abort,
  output logic [NUM_THREADS-1:0]                       thread_awaiting_restart,
  output logic [NUM_THREADS-1:0]                       thread_restart,
  output logic [NUM_THREADS-1:0]                       log_overflow,
  // off-chip memory (SDRAM controller side)
  output logic                                         sdram_req_valid,
  input  logic                                         sdram_req_ready,
  output logic                                         sdram_req_store,
  output logic [ADDR_W-1:0]                            sdram_req_addr,
  output logic [3:0]                                   sdram_req_be,
  output logic [DATA_W-1:0]                            sdram_req_wdata,
  input  logic                                         sdram_rvalid,
  input  logic [DATA_W-1:0]                            sdram_rdata,
  // packet input: receive stream and per-processor requests
  input  logic                                         rx_valid,
  output logic                                         rx_ready,
  input  logic [31:0]                                  rx_data,
  input  logic                                         rx_last,
  input  logic [NUM_PROCS-1:0]                         ib_req_valid,
  output logic [NUM_PROCS-1:0]                         ib_req_ready,
  input  logic [NUM_PROCS-1:0][1:0]                    ib_req_op,
  input  logic [NUM_PROCS-1:0][13:0]                   ib_req_addr,
  output logic                                         ib_resp_valid,
  output logic [((NUM_PROCS > 1) ? $clog2(NUM_PROCS) : 1)-1:0] ib_resp_pid,
  output logic [31:0]                                  ib_resp_data,
  // packet output: per-processor requests and transmit stream
  input  logic [NUM_PROCS-1:0]                         ob_req_valid,
  output logic [NUM_PROCS-1:0]                         ob_req_ready,
  input  logic [NUM_PROCS-1:0]                         ob_req_op,
  input  logic [NUM_PROCS-1:0][13:0]                   ob_req_addr,
  input  logic [NUM_PROCS-1:0][31:0]                   ob_req_data,
  output logic                                         ob_resp_valid,
  output logic [((NUM_PROCS > 1) ? $clog2(NUM_PROCS) : 1)-1:0] ob_resp_pid,
  output logic                                         ob_resp_ok,
  output logic                                         tx_valid,
  input  logic                                         tx_ready,
  output logic [31:0]                                  tx_data,
  output logic                                         tx_last,
  output logic                                         tx_sent,
  // event strobes, for monitoring
  output logic                                         ev_conflict,
  output logic                                         ev_log_filtered,
  output logic                                         ev_flush_write
);
  localparam int unsigned LTID_W = $clog2(THREADS_PER_PROC);
  localparam int unsigned PID_W  = (NUM_PROCS > 1) ? $clog2(NUM_PROCS) : 1;

  typedef struct packed {
    logic [LTID_W-1:0] tid;
    logic [ADDR_W-1:0] addr;
    logic              store;
    logic [3:0]        be;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic [LTID_W-1:0]    tid;
    logic                 unlock;
    logic [LOCK_ID_W-1:0] id;
  } sync_req_t;

  // ---------------- data bus ----------------
  mem_req_t [NUM_PROCS-1:0] mreq;
  mem_req_t                 mreq_w;
  logic                     m_valid, m_ready;
  logic [PID_W-1:0]         m_pid;

  for (genvar p = 0; p < NUM_PROCS; p++) begin : g_mreq
    assign mreq[p] = '{tid: mem_req_tid[p], addr: mem_req_addr[p], store: mem_req_store[p],
                       be: mem_req_be[p], wdata: mem_req_wdata[p]};
  end

  bus_arbiter #(.N(NUM_PROCS), .W($bits(mem_req_t))) u_mem_arb (
    .clk, .rst_n,
    .in_valid (mem_req_valid),
    .in_ready (mem_req_ready),
    .in_data  (mreq),
    .out_valid(m_valid),
    .out_ready(m_ready),
    .out_data (mreq_w),
    .out_idx  (m_pid)
  );

  // ---------------- sync bus ----------------
  sync_req_t [NUM_PROCS-1:0] sreq;
  sync_req_t                 sreq_w;
  logic                      s_valid;
  logic [PID_W-1:0]          s_pid;

  for (genvar p = 0; p < NUM_PROCS; p++) begin : g_sreq
    assign sreq[p] = '{tid: sync_req_tid[p], unlock: sync_req_unlock[p], id: sync_req_id[p]};
  end

  bus_arbiter #(.N(NUM_PROCS), .W($bits(sync_req_t))) u_sync_arb (
    .clk, .rst_n,
    .in_valid (sync_req_valid),
    .in_ready (sync_req_ready),
    .in_data  (sreq),
    .out_valid(s_valid),
    .out_ready(1'b1),
    .out_data (sreq_w),
    .out_idx  (s_pid)
  );

  // ---------------- sync unit ----------------
  logic [NUM_THREADS-1:0]            live, aborting, abort_req, abort_wait;
  logic [NUM_THREADS-1:0][VER_W-1:0] cur_ver;
  logic [NUM_THREADS-1:0][NUM_THREADS-1:0] older;
  logic                              tx_begin_valid, commit_valid, flush_done;
  logic [TID_W-1:0]                  tx_begin_tid, commit_tid, flush_done_tid;

  sync_unit #(.TX_ID_MASK(TX_ID_MASK)) u_sync (
    .clk, .rst_n,
    .req_valid       (s_valid),
    .req_tid         (TID_W'({s_pid, sreq_w.tid})),
    .req_unlock      (sreq_w.unlock),
    .req_id          (sreq_w.id),
    .resp_valid      (sync_resp_valid),
    .resp_tid        (sync_resp_tid),
    .resp_granted    (sync_resp_granted),
    .abort_req       (abort_req),
    .abort_wait      (abort_wait),
    .flush_done      (flush_done),
    .flush_done_tid  (flush_done_tid),
    .live            (live),
    .aborting        (aborting),
    .cur_ver         (cur_ver),
    .blocked         (thread_blocked),
    .awaiting_restart(thread_awaiting_restart),
    .abort_pulse     (thread_abort),
    .restart         (thread_restart),
    .older           (older),
    .tx_begin_valid  (tx_begin_valid),
    .tx_begin_tid    (tx_begin_tid),
    .commit_valid    (commit_valid),
    .commit_tid      (commit_tid)
  );
  assign thread_in_tx = live;

  // ---------------- access pipeline ----------------
  logic              dc_lk_en, dc_lk_hit, dc_wr_en, dc_miss_en, dc_op_ready;
  logic [ADDR_W-1:0] dc_lk_addr, dc_wr_addr, dc_miss_addr;
  logic [DATA_W-1:0] dc_lk_rdata, dc_wr_data;
  logic [3:0]        dc_wr_be;
  logic [TID_W-1:0]  lf_tid, log_tid;
  logic [ADDR_W-1:0] lf_addr;
  logic              lf_skip, log_push;
  log_entry_t        log_entry, flush_wr_entry;
  logic              flush_req, flush_grant, flush_wr_valid, flush_wr_ready;

  tm_access_stage #(.SIG_ROWS(SIG_ROWS)) u_stage (
    .clk, .rst_n,
    .req_valid     (m_valid),
    .req_ready     (m_ready),
    .req_tid       (TID_W'({m_pid, mreq_w.tid})),
    .req_addr      (mreq_w.addr),
    .req_store     (mreq_w.store),
    .req_be        (mreq_w.be),
    .req_wdata     (mreq_w.wdata),
    .resp_valid    (mem_resp_valid),
    .resp_tid      (mem_resp_tid),
    .resp_code     (mem_resp_code),
    .resp_rdata    (mem_resp_rdata),
    .live          (live),
    .aborting      (aborting),
    .cur_ver       (cur_ver),
    .older         (older),
    .abort_req     (abort_req),
    .abort_wait    (abort_wait),
    .dc_lk_en, .dc_lk_addr, .dc_lk_hit, .dc_lk_rdata,
    .dc_wr_en, .dc_wr_addr, .dc_wr_be, .dc_wr_data,
    .dc_miss_en, .dc_miss_addr, .dc_op_ready,
    .lf_tid, .lf_addr, .lf_skip,
    .log_push, .log_tid, .log_entry,
    .flush_req, .flush_grant, .flush_wr_valid, .flush_wr_entry, .flush_wr_ready,
    .ev_conflict   (ev_conflict),
    .ev_filtered   (ev_log_filtered)
  );
  assign ev_flush_write = flush_wr_valid && flush_wr_ready;

  log_filter u_filter (
    .clk, .rst_n,
    .sp_wr_valid, .sp_wr_tid, .sp_wr_value,
    .tx_begin_valid, .tx_begin_tid,
    .q_tid (lf_tid),
    .q_addr(lf_addr),
    .q_skip(lf_skip)
  );

  undo_log #(.DEPTH(LOG_DEPTH)) u_log (
    .clk, .rst_n,
    .push_valid    (log_push),
    .push_tid      (log_tid),
    .push_entry    (log_entry),
    .commit_valid, .commit_tid,
    .abort_mask    (thread_abort),
    .flush_req, .flush_grant, .flush_wr_valid, .flush_wr_entry, .flush_wr_ready,
    .flush_done, .flush_done_tid,
    .overflow      (log_overflow)
  );

  // ---------------- data cache and memory queue ----------------
  logic              enq_valid, enq_ready, enq_store, fill_valid, fill_ready;
  logic [ADDR_W-1:0] enq_addr, fill_addr;
  logic [3:0]        enq_be;
  logic [DATA_W-1:0] enq_data, fill_data;

  data_cache #(.SIZE_BYTES(DCACHE_BYTES)) u_dcache (
    .clk, .rst_n,
    .lk_en   (dc_lk_en),
    .lk_addr (dc_lk_addr),
    .lk_hit  (dc_lk_hit),
    .lk_rdata(dc_lk_rdata),
    .wr_en   (dc_wr_en),
    .wr_addr (dc_wr_addr),
    .wr_be   (dc_wr_be),
    .wr_data (dc_wr_data),
    .miss_en (dc_miss_en),
    .miss_addr(dc_miss_addr),
    .op_ready(dc_op_ready),
    .enq_valid, .enq_store, .enq_addr, .enq_be, .enq_data, .enq_ready,
    .fill_valid, .fill_addr, .fill_data, .fill_ready
  );

  load_store_queue #(.DEPTH(LSQ_DEPTH)) u_lsq (
    .clk, .rst_n,
    .enq_valid, .enq_ready, .enq_store, .enq_addr, .enq_be, .enq_data,
    .mem_req_valid(sdram_req_valid),
    .mem_req_ready(sdram_req_ready),
    .mem_req_store(sdram_req_store),
    .mem_req_addr (sdram_req_addr),
    .mem_req_be   (sdram_req_be),
    .mem_req_wdata(sdram_req_wdata),
    .mem_rvalid   (sdram_rvalid),
    .mem_rdata    (sdram_rdata),
    .fill_valid, .fill_addr, .fill_data, .fill_ready,
    .count        ()
  );

  // ---------------- packet input / output memories ----------------
  typedef struct packed {
    logic [1:0]  op;
    logic [13:0] addr;
  } ib_req_t;
  typedef struct packed {
    logic        op;
    logic [13:0] addr;
    logic [31:0] data;
  } ob_req_t;

  ib_req_t [NUM_PROCS-1:0] ibr;
  ob_req_t [NUM_PROCS-1:0] obr;
  ib_req_t                 ibr_w;
  ob_req_t                 obr_w;
  logic                    ib_v, ob_v;
  logic [PID_W-1:0]        ib_pid, ob_pid;

  for (genvar p = 0; p < NUM_PROCS; p++) begin : g_bufreq
    assign ibr[p] = '{op: ib_req_op[p], addr: ib_req_addr[p]};
    assign obr[p] = '{op: ob_req_op[p], addr: ob_req_addr[p], data: ob_req_data[p]};
  end

  bus_arbiter #(.N(NUM_PROCS), .W($bits(ib_req_t))) u_ib_arb (
    .clk, .rst_n,
    .in_valid (ib_req_valid),
    .in_ready (ib_req_ready),
    .in_data  (ibr),
    .out_valid(ib_v),
    .out_ready(1'b1),
    .out_data (ibr_w),
    .out_idx  (ib_pid)
  );

  bus_arbiter #(.N(NUM_PROCS), .W($bits(ob_req_t))) u_ob_arb (
    .clk, .rst_n,
    .in_valid (ob_req_valid),
    .in_ready (ob_req_ready),
    .in_data  (obr),
    .out_valid(ob_v),
    .out_ready(1'b1),
    .out_data (obr_w),
    .out_idx  (ob_pid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ib_resp_pid <= '0;
      ob_resp_pid <= '0;
    end else begin
      if (ib_v) ib_resp_pid <= ib_pid;
      if (ob_v) ob_resp_pid <= ob_pid;
    end
  end

  input_buffer u_inbuf (
    .clk, .rst_n,
    .rx_valid, .rx_ready, .rx_data, .rx_last,
    .req_valid (ib_v),
    .req_op    (ibr_w.op),
    .req_addr  (ibr_w.addr),
    .resp_valid(ib_resp_valid),
    .resp_data (ib_resp_data)
  );

  output_buffer u_outbuf (
    .clk, .rst_n,
    .req_valid (ob_v),
    .req_op    (obr_w.op),
    .req_addr  (obr_w.addr),
    .req_data  (obr_w.data),
    .resp_valid(ob_resp_valid),
    .resp_ok   (ob_resp_ok),
    .tx_valid, .tx_ready, .tx_data, .tx_last,
    .sent_pulse(tx_sent)
  );
endmodule
