// prand_lfsr: pseudo-random source for the cache replacement policy.
//
// A 16-bit maximal-length Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1,
// period 65535). The state moves one step in every cycle with en_i high; the
// caches step it on each miss and take the low bits as the victim way. The
// caches use pseudo-random replacement; the polynomial, width and seed are
// this design's choice.
module prand_lfsr #(
  parameter int unsigned  WIDTH = 16,
  parameter logic [15:0]  SEED  = 16'hACE1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             en_i,
  output logic [WIDTH-1:0] value_o
);

  logic [15:0] state_q;
  logic        fb;

  assign fb = state_q[15] ^ state_q[13] ^ state_q[12] ^ state_q[10];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   state_q <= (SEED == '0) ? 16'h1 : SEED;
    else if (en_i) state_q <= {state_q[14:0], fb};
  end

  assign value_o = WIDTH'(state_q);

  initial assert (WIDTH <= 16) else $error("prand_lfsr: WIDTH above 16");

endmodule
