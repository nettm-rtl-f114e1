// tb_sig_hash: checks the signature hash against a bit-by-bit model: index
// bit j is the XOR of every word-address bit k with k mod INDEX_W == j.
module tb_sig_hash;
  localparam int unsigned IW = 10;
  logic [31:0]   addr;
  logic [IW-1:0] index;
  int checks = 0, failures = 0;

  sig_hash #(.ADDR_W(32), .INDEX_W(IW)) dut (.addr, .index);

  function automatic logic [IW-1:0] model(input logic [31:0] a);
    logic [IW-1:0] r = '0;
    for (int k = 2; k < 32; k++) r[(k-2) % IW] ^= a[k];
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      addr = (n < 1024) ? 32'(n) << 2 : $urandom;
      #1;
      checks++;
      if (index !== model(addr)) begin
        failures++;
        $display("FAIL addr=%h index=%h expected=%h", addr, index, model(addr));
      end
    end
    // byte offsets within a word map to the same row
    addr = 32'h1234_5670; #1; begin
      automatic logic [IW-1:0] i0 = index;
      addr = 32'h1234_5673; #1;
      checks++; if (index !== i0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
