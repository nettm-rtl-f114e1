// tm_access_stage: the pipeline every data-memory access passes through, with
// conflict detection done alongside the data-cache access.
//
//   cycle 0  the request is accepted; its address is hashed and the
//            signature-table row is read, while the data cache is looked up.
//   cycle 1  the row's signature bits are checked against the requester's
//            access (conflict_detector) and the cache hit is known; the
//            outcome is decided. A performed access writes back the updated
//            signature row, performs its store and, for a transactional store
//            outside the filtered stack range, appends (address, old word) to
//            the undo-log: these writes land at the end of cycle 1.
//   cycle 2  the response (resp_*) is presented: DONE with the load data,
//            REPLAY (issue again later) or ABORT.
//
// Outcomes, in priority order: requester's transaction is being rolled back
// -> ABORT. Conflict with a running transaction: a transactional requester
// aborts itself (ABORT; abort_wait names the winners); a non-transactional
// requester gets REPLAY and the conflicting transactions are aborted, so that
// their writes are undone before it proceeds. Conflict only with transactions
// already rolling back -> REPLAY. Cache miss -> REPLAY (the cache fetches the
// word). Store with the load/store queue full -> REPLAY. Otherwise DONE.
// The aborting/commit policy details are this implementation's choices; the
// three-cycle organisation follows the reference design.
//
// Rollback: while the undo-log asks for exclusive access (flush_req) no new
// request is accepted; once the pipeline is empty flush_grant is raised and
// the log's writes are passed to the data cache's write port.
module tm_access_stage
  import nettm_pkg::*;
#(
  parameter int unsigned SIG_ROWS = 1024
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // access request (cycle 0)
  input  logic                              req_valid,
  output logic                              req_ready,
  input  logic [TID_W-1:0]                  req_tid,
  input  logic [ADDR_W-1:0]                 req_addr,
  input  logic                              req_store,
  input  logic [3:0]                        req_be,
  input  logic [DATA_W-1:0]                 req_wdata,
  // response (cycle 2)
  output logic                              resp_valid,
  output logic [TID_W-1:0]                  resp_tid,
  output resp_t                             resp_code,
  output logic [DATA_W-1:0]                 resp_rdata,
  // transaction state from the sync unit
  input  logic [NUM_THREADS-1:0]            live,
  input  logic [NUM_THREADS-1:0]            aborting,
  input  logic [NUM_THREADS-1:0][VER_W-1:0] cur_ver,
  input  logic [NUM_THREADS-1:0][NUM_THREADS-1:0] older,
  output logic [NUM_THREADS-1:0]            abort_req,
  output logic [NUM_THREADS-1:0]            abort_wait,
  // data cache
  output logic                              dc_lk_en,
  output logic [ADDR_W-1:0]                 dc_lk_addr,
  input  logic                              dc_lk_hit,
  input  logic [DATA_W-1:0]                 dc_lk_rdata,
  output logic                              dc_wr_en,
  output logic [ADDR_W-1:0]                 dc_wr_addr,
  output logic [3:0]                        dc_wr_be,
  output logic [DATA_W-1:0]                 dc_wr_data,
  output logic                              dc_miss_en,
  output logic [ADDR_W-1:0]                 dc_miss_addr,
  input  logic                              dc_op_ready,
  // log filter query
  output logic [TID_W-1:0]                  lf_tid,
  output logic [ADDR_W-1:0]                 lf_addr,
  input  logic                              lf_skip,
  // undo-log append
  output logic                              log_push,
  output logic [TID_W-1:0]                  log_tid,
  output log_entry_t                        log_entry,
  // undo-log rollback
  input  logic                              flush_req,
  output logic                              flush_grant,
  input  logic                              flush_wr_valid,
  input  log_entry_t                        flush_wr_entry,
  output logic                              flush_wr_ready,
  // event strobes (cycle 1), for monitoring
  output logic                              ev_conflict,
  output logic                              ev_filtered
);
  localparam int unsigned INDEX_W = $clog2(SIG_ROWS);

  // ---------------- cycle 0 ----------------
  logic [INDEX_W-1:0] idx0;
  logic               accept;

  sig_hash #(.ADDR_W(ADDR_W), .INDEX_W(INDEX_W)) u_hash (
    .addr (req_addr),
    .index(idx0)
  );

  assign req_ready = !flush_req;
  assign accept    = req_valid && req_ready;

  // ---------------- cycle 1 ----------------
  logic               s1_valid;
  logic [TID_W-1:0]   s1_tid;
  logic [ADDR_W-1:0]  s1_addr;
  logic               s1_store;
  logic [3:0]         s1_be;
  logic [DATA_W-1:0]  s1_wdata;
  logic [INDEX_W-1:0] s1_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_tid <= '0; s1_addr <= '0; s1_store <= 1'b0; s1_be <= '0;
      s1_wdata <= '0; s1_idx <= '0;
    end else begin
      s1_valid <= accept;
      if (accept) begin
        s1_tid   <= req_tid;
        s1_addr  <= req_addr;
        s1_store <= req_store;
        s1_be    <= req_be;
        s1_wdata <= req_wdata;
        s1_idx   <= idx0;
      end
    end
  end

  sig_row_t row1, new_row;
  logic     sig_wr;

  signature_table #(.ROWS(SIG_ROWS), .INDEX_W(INDEX_W)) u_sigtab (
    .clk     (clk),
    .rd_en   (accept),
    .rd_index(idx0),
    .rd_row  (row1),
    .wr_en   (sig_wr),
    .wr_index(s1_idx),
    .wr_row  (new_row)
  );

  logic                   req_tx;
  logic [NUM_THREADS-1:0] valid_bits, cmask, cmask_run;
  logic                   conflict;

  assign req_tx = live[s1_tid] && !aborting[s1_tid];

  conflict_detector u_cd (
    .row          (row1),
    .cur_ver      (cur_ver),
    .live         (live),
    .req_tid      (s1_tid),
    .req_store    (s1_store),
    .req_tx       (req_tx),
    .valid        (valid_bits),
    .conflict_mask(cmask),
    .conflict     (conflict),
    .new_row      (new_row)
  );

  assign cmask_run = cmask & ~aborting;
  assign lf_tid    = s1_tid;
  assign lf_addr   = {s1_addr[ADDR_W-1:2], 2'b00};

  resp_t d_code;
  logic  d_done, d_log;

  always_comb begin
    d_code     = RESP_DONE;
    abort_req  = '0;
    abort_wait = '0;
    dc_miss_en = 1'b0;
    if (aborting[s1_tid]) begin
      d_code = RESP_ABORT;
    end else if (cmask_run != '0) begin
      if (req_tx && (older[s1_tid] | ~cmask_run) == '1) begin
        d_code = RESP_REPLAY;          // oldest: wait for the younger ones
      end else if (req_tx) begin
        d_code              = RESP_ABORT;
        abort_req[s1_tid]   = s1_valid;
        abort_wait          = cmask_run;
      end else begin
        d_code    = RESP_REPLAY;
        abort_req = s1_valid ? cmask_run : '0;
      end
    end else if (conflict) begin
      d_code = RESP_REPLAY;
    end else if (!dc_lk_hit) begin
      d_code     = RESP_REPLAY;
      dc_miss_en = s1_valid;
    end else if (s1_store && !dc_op_ready) begin
      d_code = RESP_REPLAY;
    end
    d_done = s1_valid && d_code == RESP_DONE;
    d_log  = d_done && s1_store && req_tx && !lf_skip;
  end

  assign sig_wr       = d_done;
  assign dc_miss_addr = s1_addr;
  assign log_push     = d_log;
  assign log_tid      = s1_tid;
  assign log_entry    = '{addr: {s1_addr[ADDR_W-1:2], 2'b00}, data: dc_lk_rdata};
  assign ev_conflict  = s1_valid && conflict;
  assign ev_filtered  = d_done && s1_store && req_tx && lf_skip;

  // data-cache lookup (cycle 0) and write port (stores, or rollback writes)
  assign dc_lk_en    = accept;
  assign dc_lk_addr  = req_addr;
  assign flush_grant = flush_req && !s1_valid;
  assign flush_wr_ready = flush_grant && dc_op_ready;

  always_comb begin
    if (flush_grant) begin
      dc_wr_en   = flush_wr_valid && dc_op_ready;
      dc_wr_addr = flush_wr_entry.addr;
      dc_wr_be   = 4'hF;
      dc_wr_data = flush_wr_entry.data;
    end else begin
      dc_wr_en   = d_done && s1_store;
      dc_wr_addr = s1_addr;
      dc_wr_be   = s1_be;
      dc_wr_data = s1_wdata;
    end
  end

  // ---------------- cycle 2 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      resp_tid   <= '0;
      resp_code  <= RESP_DONE;
      resp_rdata <= '0;
    end else begin
      resp_valid <= s1_valid;
      resp_tid   <= s1_tid;
      resp_code  <= d_code;
      resp_rdata <= dc_lk_rdata;
    end
  end

  a_grant_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                      flush_grant |-> !accept && !s1_valid);
endmodule
