// tb_load_store_queue: a stream of random loads and stores through a memory
// model with random back-pressure and read latency; checks in-order service,
// that every load's fill carries the value of all earlier stores, that the
// queue holds exactly DEPTH entries, and the cycle timing of a single load.
module tb_load_store_queue;
  import nettm_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic enq_valid = 0, enq_ready, enq_store = 0;
  logic [31:0] enq_addr = 0, enq_data = 0;
  logic [3:0] enq_be = 0;
  logic mem_req_valid, mem_req_ready = 0, mem_req_store, mem_rvalid = 0;
  logic [31:0] mem_req_addr, mem_req_wdata, mem_rdata = 0;
  logic [3:0] mem_req_be;
  logic fill_valid, fill_ready = 1;
  logic [31:0] fill_addr, fill_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;

  load_store_queue #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] mem [16];     // model memory (word address bits [5:2])
  logic [31:0] shadow [16];  // program-order view, for expected fill data
  logic [31:0] expq [$];     // expected fills, in order
  logic [31:0] expa [$];
  int pend = -1, lat = 0;

  // memory model
  always @(posedge clk) if (rst_n) begin
    mem_rvalid <= 0;
    if (pend >= 0) begin
      if (lat == 0) begin mem_rvalid <= 1; mem_rdata <= mem[pend]; pend = -1; end
      else lat--;
    end
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_store) begin
        for (int b = 0; b < 4; b++)
          if (mem_req_be[b]) mem[mem_req_addr[5:2]][8*b +: 8] <= mem_req_wdata[8*b +: 8];
      end else begin
        pend = mem_req_addr[5:2]; lat = $urandom_range(0, 4);
      end
    end
    if (fill_valid && fill_ready) begin
      checks++;
      if (expq.size() == 0 || fill_data !== expq[0] || fill_addr !== expa[0]) begin
        failures++; $display("FAIL fill %h @%h", fill_data, fill_addr);
      end
      if (expq.size() != 0) begin void'(expq.pop_front()); void'(expa.pop_front()); end
    end
  end

  initial begin
    for (int i = 0; i < 16; i++) begin mem[i] = 32'(i * 3); shadow[i] = 32'(i * 3); end
    repeat (2) @(negedge clk); rst_n = 1;
    // single load timing: request visible the cycle after enqueue
    mem_req_ready = 1;
    enq_valid = 1; enq_store = 0; enq_addr = 32'h8; @(negedge clk); enq_valid = 0;
    expq.push_back(shadow[2]); expa.push_back(32'h8);
    chk_now(mem_req_valid && !mem_req_store && mem_req_addr == 32'h8);
    repeat (8) @(negedge clk);
    // capacity: memory stalled, exactly DEPTH entries fit
    mem_req_ready = 0;
    for (int i = 0; i < DEPTH + 2; i++) begin
      enq_valid = 1; enq_store = 1; enq_addr = 32'(4 * (i % 16)); enq_be = 4'hF; enq_data = 32'h100 + i;
      #1;
      if (i == DEPTH) chk_now(!enq_ready);
      if (enq_ready) shadow[i % 16] = enq_data;
      @(negedge clk);
    end
    enq_valid = 0;
    chk_now(count == DEPTH);
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      mem_req_ready = ($urandom_range(0, 2) != 0);
      fill_ready    = ($urandom_range(0, 3) != 0);
      enq_valid = ($urandom_range(0, 1) == 1);
      enq_store = 1'($urandom); enq_addr = {26'd0, 4'($urandom), 2'b00};
      enq_be = 4'($urandom); enq_data = $urandom;
      #1;
      if (enq_valid && enq_ready) begin
        if (enq_store) begin
          for (int b = 0; b < 4; b++)
            if (enq_be[b]) shadow[enq_addr[5:2]][8*b +: 8] = enq_data[8*b +: 8];
        end else begin
          expq.push_back(shadow[enq_addr[5:2]]); expa.push_back(enq_addr);
        end
      end
      @(negedge clk);
    end
    enq_valid = 0; mem_req_ready = 1; fill_ready = 1;
    repeat (DEPTH * 10) @(negedge clk);
    chk_now(expq.size() == 0 && count == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk_now(input logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL at %0t", $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
