// nettm_pkg: sizes, types and constants shared by the NetTM memory-side blocks.
//
// The system has two processors with four hardware threads each (eight thread
// contexts, each able to run one transaction). Thread contexts are numbered
// {processor, local thread}. The signature table row holds, for every thread
// context, a read bit, a write bit and a two-bit version number: 4 bits x 8 =
// 32 bits, as the design uses a 36-bit wide block RAM. Sizes that follow the
// design description: 2 x 4 threads, 16 mutexes, 2-bit versions, 1024-entry
// undo-log, 16KB data cache, 64-entry load/store queue. The 1024-row signature
// table (two 512x36 block RAMs stacked) is this implementation's reading of
// "two block RAMs combined vertically".
package nettm_pkg;

  localparam int unsigned NUM_PROCS        = 2;
  localparam int unsigned THREADS_PER_PROC = 4;
  localparam int unsigned NUM_THREADS      = NUM_PROCS * THREADS_PER_PROC;
  localparam int unsigned TID_W            = $clog2(NUM_THREADS);
  localparam int unsigned NUM_MUTEX        = 16;
  localparam int unsigned LOCK_ID_W        = $clog2(NUM_MUTEX);
  localparam int unsigned VER_W            = 2;
  localparam int unsigned ADDR_W           = 32;
  localparam int unsigned DATA_W           = 32;

  // One thread context's slice of a signature-table row.
  typedef struct packed {
    logic             rd;
    logic             wr;
    logic [VER_W-1:0] ver;
  } sig_bits_t;

  // A full signature-table row: one slice per thread context, slice i at
  // bits [4*i +: 4].
  typedef sig_bits_t [NUM_THREADS-1:0] sig_row_t;

  // One undo-log entry: word address and the word's value before the store.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } log_entry_t;

  // Outcome of a memory access leaving the conflict-detection stage.
  typedef enum logic [1:0] {
    RESP_DONE   = 2'd0,  // load/store performed
    RESP_REPLAY = 2'd1,  // not performed; issue it again (miss, conflict with a
                         // non-transactional access, log flush in progress)
    RESP_ABORT  = 2'd2   // not performed; the requester's transaction aborted
  } resp_t;

endpackage
