// conflict_detector: cycle-1 logic of the memory-access pipeline.
//
// Given the signature-table row of the accessed address, it works out for
// each thread context whether its bits are Valid (row version equals the
// thread's current version, and the thread has a live transaction), and
// whether the access conflicts with another transaction: a load conflicts
// with a valid write bit of any other thread; a store conflicts with a valid
// read or write bit of any other thread. The requester's own bits never
// conflict. It also produces the row to write back: every slice whose version
// is stale is cleared and stamped with the current version (lazy clear), and,
// when the access is transactional and conflict-free, the requester's read bit
// (load) or write bit (store) is set. Purely combinational.
module conflict_detector
  import nettm_pkg::*;
(
  input  sig_row_t                      row,
  input  logic [NUM_THREADS-1:0][VER_W-1:0] cur_ver,
  input  logic [NUM_THREADS-1:0]        live,       // transaction running or rolling back
  input  logic [TID_W-1:0]              req_tid,
  input  logic                          req_store,
  input  logic                          req_tx,     // requester is inside a transaction
  output logic [NUM_THREADS-1:0]        valid,
  output logic [NUM_THREADS-1:0]        conflict_mask,
  output logic                          conflict,
  output sig_row_t                      new_row
);
  always_comb begin
    for (int i = 0; i < NUM_THREADS; i++) begin
      valid[i] = live[i] && (row[i].ver == cur_ver[i]);
      conflict_mask[i] = (i != int'(req_tid)) && valid[i] &&
                         (row[i].wr || (req_store && row[i].rd));
    end
    conflict = |conflict_mask;

    for (int i = 0; i < NUM_THREADS; i++) begin
      if (row[i].ver != cur_ver[i]) begin
        new_row[i].rd  = 1'b0;
        new_row[i].wr  = 1'b0;
        new_row[i].ver = cur_ver[i];
      end else begin
        new_row[i] = row[i];
      end
    end
    if (req_tx && !conflict) begin
      if (req_store) new_row[req_tid].wr = 1'b1;
      else           new_row[req_tid].rd = 1'b1;
    end
  end
endmodule
