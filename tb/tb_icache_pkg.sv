// tb_icache_pkg: reference memory contents shared by the cache testbenches.
//
// The L2 memory seen by the caches holds, at every 8-byte aligned address a,
// the 64-bit word {~a, a}. Every line is therefore different and its expected
// value can be computed from its address alone, independently of the caches.
package tb_icache_pkg;

  function automatic logic [63:0] exp_beat(input logic [31:0] a);
    logic [31:0] b;
    b = {a[31:3], 3'b000};
    return {~b, b};
  endfunction

  // 16-byte line at line address a: beat 0 in the low half
  function automatic logic [127:0] exp_line(input logic [31:0] a);
    logic [31:0] b;
    b = {a[31:4], 4'h0};
    return {exp_beat(b + 32'd8), exp_beat(b)};
  endfunction

endpackage
