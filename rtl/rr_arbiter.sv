// rr_arbiter: round-robin arbiter.
//
// Picks one of the N request lines, starting the search one position after the
// requester that won the last accepted transfer, so every requester is served
// within N transfers. The choice is combinational (gnt_o one-hot, idx_o its
// index, valid_o when any request is present); the priority pointer moves only
// in a cycle with ack_i high, i.e. when the downstream side took the winner.
module rr_arbiter #(
  parameter int unsigned N = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic [N-1:0]  req_i,
  input  logic          ack_i,
  output logic [N-1:0]  gnt_o,
  output logic [IW-1:0] idx_o,
  output logic          valid_o
);

  logic [IW-1:0] last_q;   // index of the last winner

  always_comb begin
    gnt_o = '0;
    idx_o = '0;
    for (int k = N; k >= 1; k--) begin
      // candidate k positions after the last winner; the closest one wins
      logic [IW-1:0] c;
      c = IW'((int'(last_q) + k) % N);
      if (req_i[c]) begin
        gnt_o = '0;
        gnt_o[c] = 1'b1;
        idx_o = c;
      end
    end
  end

  assign valid_o = |req_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                 last_q <= IW'(N - 1);
    else if (valid_o && ack_i)   last_q <= idx_o;
  end

endmodule
