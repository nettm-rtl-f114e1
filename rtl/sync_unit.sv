// sync_unit: the shared synchronisation unit: hardware mutexes and
// transaction state for all thread contexts.
//
// Programs use one pair of operations, lock(ID) and unlock(ID), with ID one
// of NUM_MUTEX identifiers. The TX_ID_MASK parameter says which identifiers
// mean "transaction": for those, lock begins (or nests into) a transaction
// and unlock ends it, committing when the outermost level ends. All other
// identifiers are ordinary mutexes: lock grants a free mutex at once and
// otherwise blocks the thread (blocked[t]) until the owner's unlock hands the
// mutex over to the next waiting thread in round-robin order.
//
// Per thread the unit keeps a VER_W-bit version number, incremented when a
// transaction commits and when a rollback finishes, so that the signature bits
// of a finished transaction stop being Valid without being cleared. live[t]
// is high while thread t's signatures must be honoured: from transaction
// begin until commit, or until its rollback has restored memory.
// An abort (abort_req from the conflict-detection stage) pulses abort_pulse[t] to
// the processor and to the undo-log, and the thread waits (awaiting_restart)
// until its rollback is done and the transactions it lost to (abort_wait)
// have ended; then restart[t] pulses and the processor re-executes the
// transaction from its start. The unit also keeps the age order of the
// transactions (older), in which a restarted transaction keeps its place, so
// that the access stage can let the oldest transaction wait instead of abort.
// That contention policy is this implementation's choice. Requests are accepted every cycle; the reply (resp_valid, granted
// or blocked) comes one cycle later. Assumes mutexes are not taken inside a
// transaction (a rolled-back transaction does not release them).
module sync_unit
  import nettm_pkg::*;
#(
  parameter logic [NUM_MUTEX-1:0] TX_ID_MASK = 16'h0001,
  parameter int unsigned          NEST_W     = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // lock / unlock requests
  input  logic                              req_valid,
  input  logic [TID_W-1:0]                  req_tid,
  input  logic                              req_unlock,
  input  logic [LOCK_ID_W-1:0]              req_id,
  output logic                              resp_valid,
  output logic [TID_W-1:0]                  resp_tid,
  output logic                              resp_granted,
  // conflicts and rollback
  input  logic [NUM_THREADS-1:0]            abort_req,
  input  logic [NUM_THREADS-1:0]            abort_wait,
  input  logic                              flush_done,
  input  logic [TID_W-1:0]                  flush_done_tid,
  // per-thread state
  output logic [NUM_THREADS-1:0]            live,
  output logic [NUM_THREADS-1:0]            aborting,
  output logic [NUM_THREADS-1:0][VER_W-1:0] cur_ver,
  output logic [NUM_THREADS-1:0]            blocked,
  output logic [NUM_THREADS-1:0]            awaiting_restart,
  output logic [NUM_THREADS-1:0]            abort_pulse,
  output logic [NUM_THREADS-1:0]            restart,
  // age order of transactions: older[i][j] = thread i's transaction began
  // before thread j's (a restarted transaction keeps its age)
  output logic [NUM_THREADS-1:0][NUM_THREADS-1:0] older,
  // events for the undo-log and the log filter
  output logic                              tx_begin_valid,
  output logic [TID_W-1:0]                  tx_begin_tid,
  output logic                              commit_valid,
  output logic [TID_W-1:0]                  commit_tid
);
  logic [NUM_MUTEX-1:0]                  held;
  logic [NUM_MUTEX-1:0][TID_W-1:0]       owner;
  logic [NUM_THREADS-1:0][LOCK_ID_W-1:0] wait_id;
  logic [NUM_THREADS-1:0][NEST_W-1:0]    depth;
  logic [NUM_THREADS-1:0][NUM_THREADS-1:0] wait_mask;
  logic [NUM_THREADS-1:0]                  retry;   // next begin is a restart

  logic is_tx_id;
  assign is_tx_id = TX_ID_MASK[req_id];

  // next waiter on the released mutex, searched round-robin after the owner
  logic             hand_off;
  logic [TID_W-1:0] next_owner;
  logic [TID_W-1:0] c;
  always_comb begin
    hand_off   = 1'b0;
    next_owner = '0;
    c          = '0;
    for (int k = NUM_THREADS; k >= 1; k--) begin
      c = TID_W'(int'(req_tid) + k);
      if (blocked[c] && wait_id[c] == req_id && !abort_req[c]) begin
        hand_off   = 1'b1;
        next_owner = c;
      end
    end
  end

  // aborts that take effect: only running, not yet aborting, transactions
  logic [NUM_THREADS-1:0] abort_now;
  assign abort_now = abort_req & live & ~aborting;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      older <= '0; retry <= '0;
      held <= '0; owner <= '0; wait_id <= '0; depth <= '0; wait_mask <= '0;
      live <= '0; aborting <= '0; cur_ver <= '0; blocked <= '0;
      awaiting_restart <= '0; abort_pulse <= '0; restart <= '0;
      resp_valid <= 1'b0; resp_tid <= '0; resp_granted <= 1'b0;
      tx_begin_valid <= 1'b0; tx_begin_tid <= '0;
      commit_valid <= 1'b0; commit_tid <= '0;
    end else begin
      resp_valid     <= 1'b0;
      tx_begin_valid <= 1'b0;
      commit_valid   <= 1'b0;
      abort_pulse    <= abort_now;
      restart        <= '0;

      if (req_valid) begin
        resp_valid   <= 1'b1;
        resp_tid     <= req_tid;
        resp_granted <= 1'b1;
        if (is_tx_id) begin
          if (!req_unlock) begin
            if (!live[req_tid]) begin
              if (!retry[req_tid]) begin
                // a new transaction is younger than every other
                for (int k = 0; k < NUM_THREADS; k++) begin
                  older[k][req_tid] <= (k != int'(req_tid));
                  older[req_tid][k] <= 1'b0;
                end
              end
              live[req_tid]  <= 1'b1;
              depth[req_tid] <= NEST_W'(1);
              tx_begin_valid <= 1'b1;
              tx_begin_tid   <= req_tid;
            end else begin
              depth[req_tid] <= depth[req_tid] + 1'b1;
            end
          end else if (live[req_tid] && !aborting[req_tid] && !abort_now[req_tid]) begin
            if (depth[req_tid] == NEST_W'(1)) begin
              live[req_tid]    <= 1'b0;
              retry[req_tid]   <= 1'b0;
              cur_ver[req_tid] <= cur_ver[req_tid] + 1'b1;
              commit_valid     <= 1'b1;
              commit_tid       <= req_tid;
            end
            depth[req_tid] <= depth[req_tid] - 1'b1;
          end
        end else if (!req_unlock) begin
          if (!held[req_id] || owner[req_id] == req_tid) begin
            held[req_id]  <= 1'b1;
            owner[req_id] <= req_tid;
          end else begin
            blocked[req_tid] <= 1'b1;
            wait_id[req_tid] <= req_id;
            resp_granted     <= 1'b0;
          end
        end else if (held[req_id] && owner[req_id] == req_tid) begin
          if (hand_off) begin
            owner[req_id]       <= next_owner;
            blocked[next_owner] <= 1'b0;
          end else begin
            held[req_id] <= 1'b0;
          end
        end
      end

      // contention management: wait for the transactions we lost to
      for (int t = 0; t < NUM_THREADS; t++) begin
        for (int j = 0; j < NUM_THREADS; j++)
          if (!live[j]) wait_mask[t][j] <= 1'b0;
        if (abort_now[t]) begin
          aborting[t]  <= 1'b1;
          retry[t]     <= 1'b1;
          blocked[t]   <= 1'b0;
          depth[t]     <= '0;
          wait_mask[t] <= abort_wait & live & ~(NUM_THREADS'(1) << t);
        end
        if (awaiting_restart[t] && wait_mask[t] == '0) begin
          awaiting_restart[t] <= 1'b0;
          restart[t]          <= 1'b1;
        end
      end

      if (flush_done) begin
        live[flush_done_tid]             <= 1'b0;
        aborting[flush_done_tid]         <= 1'b0;
        cur_ver[flush_done_tid]          <= cur_ver[flush_done_tid] + 1'b1;
        awaiting_restart[flush_done_tid] <= 1'b1;
      end
    end
  end

  // a blocked thread cannot issue; a thread whose rollback is pending cannot
  // commit
  a_no_req_when_blocked: assert property (@(posedge clk) disable iff (!rst_n)
                                          req_valid |-> !blocked[req_tid]);
endmodule
