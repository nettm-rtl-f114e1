// tb_bus_arbiter: random requests from three requesters; checks one grant at
// a time, that the granted payload is passed through, and that a waiting
// requester is granted within N grants (round robin).
module tb_bus_arbiter;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid = 0, in_ready;
  logic [N-1:0][7:0] in_data;
  logic out_valid, out_ready = 1;
  logic [7:0] out_data;
  logic [1:0] out_idx;
  int checks = 0, failures = 0;
  int waitc [N];
  logic [N-1:0] granted;

  bus_arbiter #(.N(N), .W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < N; i++) begin in_data[i] = 8'(8'h10 * (i + 1)); waitc[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // requests stay up until granted
      for (int i = 0; i < N; i++) if (!in_valid[i]) in_valid[i] = 1'($urandom);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if ($countones(in_ready) > 1 || (in_valid != 0 && out_ready && $countones(in_ready) != 1)
          || (in_ready & ~in_valid) != 0) failures++;
      if (out_valid && out_data !== in_data[out_idx]) failures++;
      granted = in_ready;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && granted[i]) begin in_valid[i] = 0; waitc[i] = 0; end
        else if (in_valid[i] && out_ready) begin
          waitc[i]++;
          if (waitc[i] >= N) begin failures++; $display("FAIL starvation of %0d", i); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
