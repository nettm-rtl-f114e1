// tb_data_cache: directed checks of the shared data cache with a small size:
// miss and single outstanding fill per line, hit after fill, byte-enabled
// store hits with write-through, same-cycle write forwarding to a lookup,
// eviction by a conflicting address, no allocation by a write miss, and a
// fill made stale by a write while it was outstanding. A random part then
// runs lookups, byte-enabled writes and misses for 4000 cycles against a
// model of the in-order queue and of memory, with random back-pressure and
// fill timing; every hit must return the newest value written to that
// address, and after draining, memory must hold every write.
module tb_data_cache;
  import nettm_pkg::*;
  localparam int SIZE = 64;   // 16 lines
  logic clk = 0, rst_n = 0;
  logic lk_en = 0, lk_hit, wr_en = 0, miss_en = 0, op_ready;
  logic [31:0] lk_addr = 0, lk_rdata, wr_addr = 0, wr_data = 0, miss_addr = 0;
  logic [3:0] wr_be = 0;
  logic enq_valid, enq_store, enq_ready = 1;
  logic [31:0] enq_addr, enq_data;
  logic [3:0] enq_be;
  logic fill_valid = 0, fill_ready;
  logic [31:0] fill_addr = 0, fill_data = 0;
  int checks = 0, failures = 0;
  int n_enq_ld = 0, n_enq_st = 0;

  data_cache #(.SIZE_BYTES(SIZE)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && enq_valid && enq_ready) begin
    if (enq_store) n_enq_st++; else n_enq_ld++;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic lookup(input logic [31:0] a);
    lk_en = 1; lk_addr = a; @(negedge clk); lk_en = 0;
  endtask
  task automatic miss(input logic [31:0] a);
    miss_en = 1; miss_addr = a; @(negedge clk); miss_en = 0;
  endtask
  task automatic fill(input logic [31:0] a, input logic [31:0] d);
    fill_valid = 1; fill_addr = a; fill_data = d;
    @(negedge clk); fill_valid = 0;
  endtask
  task automatic write(input logic [31:0] a, input logic [3:0] be, input logic [31:0] d);
    wr_en = 1; wr_addr = a; wr_be = be; wr_data = d; @(negedge clk); wr_en = 0;
  endtask

  // ---------------- random part ----------------
  typedef struct packed { logic st; logic [31:0] a; logic [3:0] be; logic [31:0] d; } qe_t;
  qe_t q [$];
  logic [31:0] V [64];          // newest value written, per word of 0x000-0x0FF
  logic [31:0] M [64];          // memory behind the queue
  logic rnd = 0, fill_taken = 0, exp_valid = 0;
  logic [31:0] exp_data;
  int n_hits = 0;

  always @(posedge clk) if (rnd) begin
    if (wr_en)
      for (int b = 0; b < 4; b++) if (wr_be[b]) V[wr_addr[7:2]][8*b +: 8] = wr_data[8*b +: 8];
    exp_valid = lk_en;
    exp_data  = V[lk_addr[7:2]];
    if (enq_valid && enq_ready) q.push_back('{st: enq_store, a: enq_addr, be: enq_be, d: enq_data});
    fill_taken = fill_valid && fill_ready;
  end

  task automatic random_phase();
    qe_t e;
    for (int i = 0; i < 64; i++) begin V[i] = 0; M[i] = 0; end
    // write every word once (through the cache) so that V and M agree
    for (int i = 0; i < 64; i++) write(32'(4 * i), 4'hF, 32'h0);
    while (q.size() != 0) begin e = q.pop_front(); if (e.st) M[e.a[7:2]] = e.d; end
    rnd = 1;
    for (int c = 0; c < 4000; c++) begin
      // results of the lookup made in the previous cycle
      if (exp_valid && lk_hit) begin
        n_hits++; checks++;
        if (lk_rdata != exp_data) begin
          failures++; $display("FAIL random hit %h expected %h", lk_rdata, exp_data);
        end
      end
      // memory side: retire a taken fill, then maybe serve the queue head
      if (fill_taken) begin fill_valid = 0; fill_taken = 0; end
      if (!fill_valid && q.size() != 0 && $urandom_range(0, 2) == 0) begin
        e = q.pop_front();
        if (e.st) begin
          for (int b = 0; b < 4; b++) if (e.be[b]) M[e.a[7:2]][8*b +: 8] = e.d[8*b +: 8];
        end else begin
          fill_valid = 1; fill_addr = e.a; fill_data = M[e.a[7:2]];
        end
      end
      enq_ready = (q.size() < 8) && ($urandom_range(0, 5) != 0);
      lk_en   = ($urandom_range(0, 1) == 0); lk_addr = 32'(4 * $urandom_range(0, 63));
      wr_en   = enq_ready && ($urandom_range(0, 3) == 0);
      wr_addr = 32'(4 * $urandom_range(0, 63)); wr_be = 4'($urandom_range(1, 15)); wr_data = $urandom;
      miss_en = ($urandom_range(0, 2) == 0); miss_addr = 32'(4 * $urandom_range(0, 63));
      @(negedge clk);
    end
    lk_en = 0; wr_en = 0; miss_en = 0; enq_ready = 1;
    @(negedge clk);
    if (fill_taken) fill_valid = 0;
    while (q.size() != 0 || fill_valid) begin
      if (fill_taken) begin fill_valid = 0; fill_taken = 0; end
      if (!fill_valid && q.size() != 0) begin
        e = q.pop_front();
        if (e.st) begin
          for (int b = 0; b < 4; b++) if (e.be[b]) M[e.a[7:2]][8*b +: 8] = e.d[8*b +: 8];
        end else begin
          fill_valid = 1; fill_addr = e.a; fill_data = M[e.a[7:2]];
        end
      end
      @(negedge clk);
    end
    rnd = 0;
    for (int i = 0; i < 64; i++) chk(M[i] == V[i], "memory holds every write");
    chk(n_hits > 200, "random lookups hit");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    lookup(32'h100); chk(!lk_hit, "cold miss");
    miss(32'h100);   chk(n_enq_ld == 1, "read sent");
    miss(32'h100);   chk(n_enq_ld == 1, "no second read while pending");
    fill(32'h100, 32'hDEAD_BEEF);
    lookup(32'h100); chk(lk_hit && lk_rdata == 32'hDEAD_BEEF, "hit after fill");
    // store hit, byte lanes 0 and 2
    write(32'h100, 4'b0101, 32'h1122_3344);
    chk(n_enq_st == 1, "write-through");
    lookup(32'h100); chk(lk_hit && lk_rdata == 32'hDE22_BE44, "byte merge");
    // same-cycle write and lookup of one line
    wr_en = 1; wr_addr = 32'h100; wr_be = 4'b1000; wr_data = 32'h7700_0000;
    lk_en = 1; lk_addr = 32'h100; @(negedge clk); wr_en = 0; lk_en = 0;
    chk(lk_hit && lk_rdata == 32'h7722_BE44, "write forwarded to lookup");
    // conflicting address (same index, other tag) evicts
    miss(32'h140); fill(32'h140, 32'h5555_0000);
    lookup(32'h140); chk(lk_hit && lk_rdata == 32'h5555_0000, "new line");
    lookup(32'h100); chk(!lk_hit, "old line evicted");
    // write miss does not allocate but is written through
    write(32'h104, 4'hF, 32'h0BAD_0BAD);
    lookup(32'h104); chk(!lk_hit && n_enq_st == 3, "no write allocate");
    // a fill made stale by a write while outstanding is dropped
    miss(32'h108);
    write(32'h108, 4'hF, 32'h0000_0123);
    fill(32'h108, 32'hFFFF_FFFF);
    lookup(32'h108); chk(!lk_hit, "stale fill dropped");
    miss(32'h108); chk(n_enq_ld == 4, "fetched again");
    fill(32'h108, 32'h0000_0123);
    lookup(32'h108); chk(lk_hit && lk_rdata == 32'h123, "fresh fill installed");
    // fill waits while a write uses the port
    wr_en = 1; wr_addr = 32'h108; wr_be = 4'hF; wr_data = 1; fill_valid = 1;
    #1; chk(!fill_ready, "fill yields to write");
    @(negedge clk); wr_en = 0; fill_valid = 0;
    // queue full: op_ready follows the queue
    enq_ready = 0; #1; chk(!op_ready, "op_ready"); enq_ready = 1;
    @(negedge clk);
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
