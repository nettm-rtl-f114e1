// load_store_queue: the merged, in-order queue of loads and stores between the
// shared data cache and the off-chip SDRAM controller.
//
// Up to DEPTH requests (default 64) wait in one FIFO and are sent to memory
// strictly in arrival order, so it is the single point where all processors'
// memory operations are ordered. A store leaves the queue as soon as memory
// accepts it. A load is sent, the queue then waits for its read data
// (mem_rvalid), hands the word to the cache as a fill (fill_valid until
// fill_ready) and only then moves on: one read is outstanding at a time.
// The depth and the in-order service follow the reference design; the
// memory-side handshake is this implementation's choice.
module load_store_queue
  import nettm_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // enqueue
  input  logic               enq_valid,
  output logic               enq_ready,
  input  logic               enq_store,
  input  logic [ADDR_W-1:0]  enq_addr,
  input  logic [3:0]         enq_be,
  input  logic [DATA_W-1:0]  enq_data,
  // to memory
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_store,
  output logic [ADDR_W-1:0]  mem_req_addr,
  output logic [3:0]         mem_req_be,
  output logic [DATA_W-1:0]  mem_req_wdata,
  input  logic               mem_rvalid,
  input  logic [DATA_W-1:0]  mem_rdata,
  // fill to the cache
  output logic               fill_valid,
  output logic [ADDR_W-1:0]  fill_addr,
  output logic [DATA_W-1:0]  fill_data,
  input  logic               fill_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PTR_W = $clog2(DEPTH);
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  typedef struct packed {
    logic              store;
    logic [ADDR_W-1:0] addr;
    logic [3:0]        be;
    logic [DATA_W-1:0] data;
  } lsq_entry_t;

  lsq_entry_t       q [DEPTH];
  logic [PTR_W-1:0] head, tail;

  typedef enum logic [1:0] {H_SEND, H_WAIT, H_FILL} hstate_t;
  hstate_t          hstate;
  logic [DATA_W-1:0] rdata_q;

  lsq_entry_t hd;
  assign hd = q[head];

  logic empty, pop, push;
  assign empty     = (count == '0);
  assign enq_ready = (count != CNT_W'(DEPTH));
  assign push      = enq_valid && enq_ready;

  assign mem_req_valid = !empty && hstate == H_SEND;
  assign mem_req_store = hd.store;
  assign mem_req_addr  = hd.addr;
  assign mem_req_be    = hd.be;
  assign mem_req_wdata = hd.data;

  assign fill_valid = (hstate == H_FILL);
  assign fill_addr  = hd.addr;
  assign fill_data  = rdata_q;

  assign pop = (mem_req_valid && mem_req_ready && hd.store) ||
               (fill_valid && fill_ready);

  always_ff @(posedge clk) begin
    if (push) q[tail] <= '{store: enq_store, addr: enq_addr, be: enq_be, data: enq_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; count <= '0;
      hstate <= H_SEND; rdata_q <= '0;
    end else begin
      if (push) tail <= tail + 1'b1;
      if (pop)  head <= head + 1'b1;
      count <= count + CNT_W'(push) - CNT_W'(pop);
      unique case (hstate)
        H_SEND: if (mem_req_valid && mem_req_ready && !hd.store) hstate <= H_WAIT;
        H_WAIT: if (mem_rvalid) begin
          rdata_q <= mem_rdata;
          hstate  <= H_FILL;
        end
        H_FILL: if (fill_ready) hstate <= H_SEND;
        default: hstate <= H_SEND;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= CNT_W'(DEPTH));
endmodule
