// bus_arbiter: round-robin arbiter that lets one of N requesters use a shared
// bus per cycle (the processors' data-memory bus and their lock/unlock path
// to the sync unit).
//
// Requester i presents in_valid[i] with its payload; the one granted gets
// in_ready[i] high in the same cycle, when the output side is ready. After
// requester i wins, the search for the next winner starts at i+1, so every
// waiting requester is served within N grants. Purely combinational except
// for the round-robin pointer. The reference design shares these busses
// among its processors; the round-robin policy is this implementation's.
module bus_arbiter #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0]              in_valid,
  output logic [N-1:0]              in_ready,
  input  logic [N-1:0][W-1:0]       in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [W-1:0]              out_data,
  output logic [((N > 1) ? $clog2(N) : 1)-1:0] out_idx
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;
  logic [IW-1:0] win;
  logic          any;

  int unsigned c;
  always_comb begin
    any = 1'b0;
    win = '0;
    c   = 0;
    for (int k = N; k >= 1; k--) begin
      c = (int'(last) + k) % N;
      if (in_valid[c]) begin
        any = 1'b1;
        win = IW'(c);
      end
    end
    out_valid = any;
    out_data  = in_data[win];
    out_idx   = win;
    in_ready  = '0;
    in_ready[win] = any && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= IW'(N - 1);
    else if (any && out_ready) last <= win;
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in_ready));
endmodule
