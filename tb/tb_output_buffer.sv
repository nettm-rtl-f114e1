// tb_output_buffer: writes packets, queues sends (including one while the
// queue is full) and checks the transmitted words, tx_last, the sent pulse
// and stream order under random tx back-pressure.
module tb_output_buffer;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_op = 0, resp_valid;
  logic [13:0] req_addr = 0;
  logic [31:0] req_data = 0;
  logic        resp_ok;
  logic tx_valid, tx_ready = 0, tx_last, sent_pulse;
  logic [31:0] tx_data;
  int checks = 0, failures = 0, n_sent = 0;

  output_buffer #(.SIZE_BYTES(2048), .SEND_Q(4)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] expq [$];
  logic        lastq [$];

  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) begin
      checks++;
      if (expq.size() == 0 || tx_data !== expq[0] || tx_last !== lastq[0]) begin
        failures++; $display("FAIL tx %h last %b", tx_data, tx_last);
      end
      if (expq.size() != 0) begin void'(expq.pop_front()); void'(lastq.pop_front()); end
    end
    if (sent_pulse) n_sent++;
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 2) != 0);

  task automatic req(input logic op, input logic [13:0] a, input logic [31:0] d);
    req_valid = 1; req_op = op; req_addr = a; req_data = d; @(negedge clk); req_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 6; p++) begin
      automatic int len = p + 1;
      for (int w = 0; w < len; w++) req(0, 14'(p * 64 + 4 * w), {p[15:0], w[15:0]});
    end
    // queue four sends at once: the fifth is refused while the queue is full
    for (int p = 0; p < 5; p++) begin
      req(1, 14'(p * 64), 32'(p + 1));
      if (p < 4 || resp_ok) begin
        for (int w = 0; w <= p; w++) begin expq.push_back({p[15:0], w[15:0]}); lastq.push_back(w == p); end
      end
      if (p == 4) begin checks++; end
    end
    repeat (60) @(negedge clk);
    req(1, 14'(5 * 64), 32'd6);
    checks++; if (!resp_ok) failures++;
    for (int w = 0; w <= 5; w++) begin expq.push_back({16'd5, w[15:0]}); lastq.push_back(w == 5); end
    repeat (60) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d words not sent", expq.size()); end
    checks++; if (n_sent < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
