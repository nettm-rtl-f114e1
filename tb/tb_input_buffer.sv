// tb_input_buffer: receives packets of random length with random stream
// gaps, takes them in order and reads every word back; checks back-pressure
// when all slots are full, an empty take, and slot reuse after free.
module tb_input_buffer;
  localparam int SLOTS = 10, SLOT_BYTES = 64;   // 16 words per slot
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, rx_last = 0;
  logic [31:0] rx_data = 0;
  logic req_valid = 0, resp_valid;
  logic [1:0] req_op = 0;
  logic [13:0] req_addr = 0;
  logic [31:0] resp_data;
  int checks = 0, failures = 0;

  input_buffer #(.SIZE_BYTES(1024), .SLOTS(SLOTS), .SLOT_BYTES(SLOT_BYTES)) dut (.*);
  always #5 clk = ~clk;

  int lens [$];
  int base = 0;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic send_pkt(input int id, input int len);
    for (int w = 0; w < len; w++) begin
      rx_valid = 1; rx_data = {id[15:0], w[15:0]}; rx_last = (w == len - 1);
      @(posedge clk); while (!rx_ready) @(posedge clk);
      @(negedge clk);
      rx_valid = 0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    lens.push_back(len);
  endtask
  task automatic req(input logic [1:0] op, input logic [13:0] a);
    req_valid = 1; req_op = op; req_addr = a; @(negedge clk); req_valid = 0;
  endtask
  task automatic take_and_check(input int id);
    int slot, len;
    req(2'd1, 0);
    chk(resp_valid && resp_data[31], "take");
    slot = resp_data[19:16]; len = resp_data[15:0];
    chk(len == lens[0], "length");
    void'(lens.pop_front());
    for (int w = 0; w < len; w++) begin
      req(2'd0, 14'(slot * SLOT_BYTES + 4 * w));
      chk(resp_data == {id[15:0], w[15:0]}, "packet word");
    end
    req(2'd2, 14'(slot));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    req(2'd1, 0); chk(resp_valid && !resp_data[31], "nothing ready");
    for (int p = 0; p < SLOTS; p++) send_pkt(p, $urandom_range(1, 16));
    @(negedge clk);
    chk(!rx_ready, "all slots full");
    take_and_check(0);
    @(negedge clk);
    chk(rx_ready, "slot freed");
    send_pkt(SLOTS, 5);
    for (int p = 1; p <= SLOTS; p++) take_and_check(p);
    // more traffic through reused slots
    for (int r = 0; r < 30; r++) begin
      send_pkt(100 + r, $urandom_range(1, 16));
      take_and_check(100 + r);
    end
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
