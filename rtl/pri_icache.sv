// pri_icache: private (L1) instruction cache of one core.
//
// A small set-associative cache (default 512 bytes, 4 ways, 16-byte lines, so
// 8 sets) that sits right next to the core's prefetch interface and fetches a
// whole line per request. Tags and data are kept in one SCM array per way; the
// valid bits are flip-flops cleared at reset. Misses are refilled one line at a
// time from the shared L1.5 cache; the victim is the first invalid way of the
// set, otherwise a pseudo-random way.
//
// Interface and timing (both ports are request/grant, the response is a single
// rvalid pulse per granted request):
//   * core side: fetch_req_i/fetch_addr_i are held until fetch_gnt_o. The tag
//     and data arrays are read in the grant cycle and compared in the next one;
//     on a hit fetch_rvalid_o/fetch_rdata_o come one cycle after the grant and a
//     new request can be granted in that same cycle, so back-to-back hits give
//     one line per cycle.
//   * on a miss the cache stops granting, raises refill_req_o with the line
//     address in the following cycle, and holds it until refill_gnt_i. When
//     refill_rvalid_i arrives the line is written into the victim way and
//     passed to the core in the same cycle.
//   * hit_cnt_o and miss_cnt_o count tag checks that hit and missed.
//
// The geometry, the SCM arrays, the request/grant handshake and pseudo-random
// replacement follow the cluster this cache was designed for; the blocking
// single-miss controller, the forwarding of the refilled line, the
// invalid-way-first victim choice and the counters' width are this design's own.
module pri_icache
  import icache_pkg::*;
#(
  parameter int unsigned CACHE_SIZE = 512,
  parameter int unsigned NB_WAYS    = 4,
  parameter int unsigned LINE_BYTES = 16,
  parameter int unsigned ADDR_W     = 32,
  localparam int unsigned LINE_W    = 8 * LINE_BYTES
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // core fetch port
  input  logic              fetch_req_i,
  input  logic [ADDR_W-1:0] fetch_addr_i,
  output logic              fetch_gnt_o,
  output logic              fetch_rvalid_o,
  output logic [LINE_W-1:0] fetch_rdata_o,
  // refill port towards the L1.5
  output logic              refill_req_o,
  output logic [ADDR_W-1:0] refill_addr_o,
  input  logic              refill_gnt_i,
  input  logic              refill_rvalid_i,
  input  logic [LINE_W-1:0] refill_rdata_i,
  // hardware counters
  output logic [31:0]       hit_cnt_o,
  output logic [31:0]       miss_cnt_o
);

  localparam int unsigned NB_SETS = CACHE_SIZE / (LINE_BYTES * NB_WAYS);
  localparam int unsigned OFF_W   = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W   = (NB_SETS > 1) ? $clog2(NB_SETS) : 1;
  localparam int unsigned IDX_BITS = $clog2(NB_SETS);
  localparam int unsigned TAG_W   = ADDR_W - OFF_W - IDX_BITS;
  localparam int unsigned WAY_W   = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1;

  pri_state_e          state_q, state_d;
  logic                s1_valid_q;
  logic [ADDR_W-1:0]   s1_addr_q;
  logic [WAY_W-1:0]    victim_q;
  logic [NB_SETS-1:0]  valid_q [NB_WAYS];

  logic [IDX_W-1:0]    rd_idx, s1_idx;
  logic [TAG_W-1:0]    s1_tag;
  logic [TAG_W-1:0]    tag_rdata  [NB_WAYS];
  logic [LINE_W-1:0]   data_rdata [NB_WAYS];
  logic [NB_WAYS-1:0]  hit_way, way_we;
  logic                hit, miss, accept, refill_done;
  logic [WAY_W-1:0]    victim;
  logic [WAY_W-1:0]    rand_val;
  logic [LINE_W-1:0]   hit_data;

  assign rd_idx = (NB_SETS > 1) ? IDX_W'(fetch_addr_i >> OFF_W) : '0;
  assign s1_idx = (NB_SETS > 1) ? IDX_W'(s1_addr_q >> OFF_W) : '0;
  assign s1_tag = TAG_W'(s1_addr_q >> (OFF_W + IDX_BITS));

  // ---------------------------------------------------------------- arrays
  for (genvar w = 0; w < NB_WAYS; w++) begin : g_way
    scm_array #(.WIDTH(TAG_W), .DEPTH(NB_SETS)) i_tag (
      .clk_i, .we_i(way_we[w]), .waddr_i(s1_idx), .wdata_i(s1_tag),
      .re_i(accept), .raddr_i(rd_idx), .rdata_o(tag_rdata[w]));
    scm_array #(.WIDTH(LINE_W), .DEPTH(NB_SETS)) i_data (
      .clk_i, .we_i(way_we[w]), .waddr_i(s1_idx), .wdata_i(refill_rdata_i),
      .re_i(accept), .raddr_i(rd_idx), .rdata_o(data_rdata[w]));
    assign hit_way[w] = valid_q[w][s1_idx] && (tag_rdata[w] == s1_tag);
    assign way_we[w]  = refill_done && (victim_q == WAY_W'(w));
  end

  always_comb begin
    hit_data = '0;
    for (int w = 0; w < NB_WAYS; w++) if (hit_way[w]) hit_data = data_rdata[w];
  end

  // ---------------------------------------------------------------- control
  assign hit         = (state_q == PRI_RUN) && s1_valid_q && (|hit_way);
  assign miss        = (state_q == PRI_RUN) && s1_valid_q && !(|hit_way);
  assign fetch_gnt_o = (state_q == PRI_RUN) && !miss;
  assign accept      = fetch_req_i && fetch_gnt_o;
  assign refill_done = (state_q == PRI_REFILL_WAIT) && refill_rvalid_i;

  assign fetch_rvalid_o = hit || refill_done;
  assign fetch_rdata_o  = refill_done ? refill_rdata_i : hit_data;

  assign refill_req_o  = (state_q == PRI_REFILL_REQ);
  assign refill_addr_o = {s1_addr_q[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};

  // victim: first invalid way of the set, otherwise pseudo-random
  always_comb begin
    victim = rand_val;
    for (int w = NB_WAYS - 1; w >= 0; w--) if (!valid_q[w][s1_idx]) victim = WAY_W'(w);
  end

  prand_lfsr #(.WIDTH(WAY_W)) i_prand (
    .clk_i, .rst_ni, .en_i(miss), .value_o(rand_val));

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      PRI_RUN:         if (miss)            state_d = PRI_REFILL_REQ;
      PRI_REFILL_REQ:  if (refill_gnt_i)    state_d = PRI_REFILL_WAIT;
      PRI_REFILL_WAIT: if (refill_rvalid_i) state_d = PRI_RUN;
      default:                              state_d = PRI_RUN;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q    <= PRI_RUN;
      s1_valid_q <= 1'b0;
      s1_addr_q  <= '0;
      victim_q   <= '0;
      hit_cnt_o  <= '0;
      miss_cnt_o <= '0;
      for (int w = 0; w < NB_WAYS; w++) valid_q[w] <= '0;
    end else begin
      state_q <= state_d;
      if (accept) begin
        s1_valid_q <= 1'b1;
        s1_addr_q  <= fetch_addr_i;
      end else if (hit || refill_done) begin
        s1_valid_q <= 1'b0;
      end
      if (miss) begin
        victim_q   <= victim;
        miss_cnt_o <= miss_cnt_o + 32'd1;
      end
      if (hit) hit_cnt_o <= hit_cnt_o + 32'd1;
      for (int w = 0; w < NB_WAYS; w++)
        if (way_we[w]) valid_q[w][s1_idx] <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- protocol
  // A request is held, with a stable address, until it is granted.
  a_fetch_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    fetch_req_i && !fetch_gnt_o |=> fetch_req_i && $stable(fetch_addr_i));
  // A refill response only comes for an accepted refill request.
  a_refill_resp: assert property (@(posedge clk_i) disable iff (!rst_ni)
    refill_rvalid_i |-> state_q == PRI_REFILL_WAIT);

endmodule
