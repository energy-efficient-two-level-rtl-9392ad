// sh_icache_bank: one bank of the shared (L1.5) instruction cache.
//
// A set-associative bank (default 4 KiB, 4 ways, 16-byte lines, 64 sets) that
// serves the line requests of all private caches through the interconnect and
// keeps serving them while refills from L2 are outstanding.
//
// How it works:
//   * Two pipeline stages. In the grant cycle the tag and data SCM arrays of
//     all ways are read; in the next cycle the tags are compared. A hit returns
//     the line in that cycle, so a bank hit costs one cycle and the bank can
//     take one request per cycle.
//   * A miss does not block the bank. It takes one of NB_MSHR pending-refill
//     slots (miss status holding registers), which holds the line address, the
//     victim way, the set of cores waiting for the line and room for the line
//     itself. The victim is the first invalid way of the set that no other
//     pending refill has claimed, otherwise a pseudo-random way. A miss to a line that already has a slot only adds its core to
//     that slot's waiters, so cores that miss on the same line cause a single
//     L2 refill.
//   * Slots ask the instruction bus for their line (refill_req_o, held until
//     refill_gnt_i) and collect the AXI beats tagged with their slot number.
//     A complete slot is written into the arrays in a cycle with no tag check
//     in flight; in that cycle no request is granted and the line goes out to
//     every waiting core at once.
//
// Interface: req_i/addr_i/core_id_i with gnt_o (request/grant, held until
// granted). rvalid_o has one bit per core: a single bit for a hit, one bit per
// waiter when a refill completes; rdata_o is the line. Grant is withheld while
// a completed refill waits to be written or when a miss could find no free
// slot. hit_cnt_o, miss_cnt_o (refills started) and merge_cnt_o (misses merged
// into a pending refill) are hardware counters.
//
// The geometry, the non-blocking behaviour with several pending refills and
// the merging of refills follow the cache this bank was designed for. The
// pipeline split, the per-core response vector, the slot count, line
// interleaving across banks and pseudo-random replacement with invalid ways
// first are this design's own choices.
module sh_icache_bank
  import icache_pkg::*;
#(
  parameter int unsigned BANK_SIZE  = 4096,
  parameter int unsigned NB_WAYS    = 4,
  parameter int unsigned LINE_BYTES = 16,
  parameter int unsigned NB_CORES   = 8,
  parameter int unsigned NB_BANKS   = 2,
  parameter int unsigned NB_MSHR    = 4,
  parameter int unsigned AXI_DATA_W = 64,
  parameter int unsigned ADDR_W     = 32,
  localparam int unsigned LINE_W    = 8 * LINE_BYTES,
  localparam int unsigned CORE_W    = (NB_CORES > 1) ? $clog2(NB_CORES) : 1,
  localparam int unsigned MSHR_W    = (NB_MSHR > 1) ? $clog2(NB_MSHR) : 1
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  // request from the interconnect
  input  logic                  req_i,
  input  logic [ADDR_W-1:0]     addr_i,
  input  logic [CORE_W-1:0]     core_id_i,
  output logic                  gnt_o,
  // response to the cores
  output logic [NB_CORES-1:0]   rvalid_o,
  output logic [LINE_W-1:0]     rdata_o,
  // refill towards the instruction bus
  output logic                  refill_req_o,
  output logic [ADDR_W-1:0]     refill_addr_o,
  output logic [MSHR_W-1:0]     refill_id_o,
  input  logic                  refill_gnt_i,
  input  logic                  refill_rvalid_i,
  input  logic [AXI_DATA_W-1:0] refill_rdata_i,
  input  logic [MSHR_W-1:0]     refill_rid_i,
  input  logic                  refill_rlast_i,
  // hardware counters
  output logic [31:0]           hit_cnt_o,
  output logic [31:0]           miss_cnt_o,
  output logic [31:0]           merge_cnt_o
);

  localparam int unsigned NB_SETS   = BANK_SIZE / (LINE_BYTES * NB_WAYS);
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES);
  localparam int unsigned BANK_BITS = $clog2(NB_BANKS);
  localparam int unsigned IDX_BITS  = $clog2(NB_SETS);
  localparam int unsigned IDX_W     = (IDX_BITS > 0) ? IDX_BITS : 1;
  localparam int unsigned LADDR_W   = ADDR_W - OFF_W;              // line address
  localparam int unsigned TAG_W     = LADDR_W - BANK_BITS - IDX_BITS;
  localparam int unsigned WAY_W     = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1;
  localparam int unsigned NB_BEATS  = LINE_W / AXI_DATA_W;
  localparam int unsigned BEAT_W    = (NB_BEATS > 1) ? $clog2(NB_BEATS) : 1;

  function automatic logic [IDX_W-1:0] idx_of(input logic [LADDR_W-1:0] la);
    return (IDX_BITS > 0) ? IDX_W'(la >> BANK_BITS) : '0;
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [LADDR_W-1:0] la);
    return TAG_W'(la >> (BANK_BITS + IDX_BITS));
  endfunction

  // ---------------------------------------------------------------- state
  logic                s1_valid_q;
  logic [LADDR_W-1:0]  s1_line_q;
  logic [CORE_W-1:0]   s1_core_q;
  logic [NB_SETS-1:0]  valid_q [NB_WAYS];

  mshr_state_e         m_state_q  [NB_MSHR];
  logic [LADDR_W-1:0]  m_line_q   [NB_MSHR];
  logic [WAY_W-1:0]    m_way_q    [NB_MSHR];
  logic [NB_CORES-1:0] m_wait_q   [NB_MSHR];
  logic [BEAT_W-1:0]   m_beat_q   [NB_MSHR];
  logic [LINE_W-1:0]   m_data_q   [NB_MSHR];

  // ---------------------------------------------------------------- slot summary
  logic [NB_MSHR-1:0]  m_free, m_issue, m_done, m_match;
  logic [MSHR_W-1:0]   free_sel, issue_sel, done_sel, match_sel;
  logic [MSHR_W:0]     nb_free;

  always_comb begin
    nb_free   = '0;
    free_sel  = '0;
    issue_sel = '0;
    done_sel  = '0;
    match_sel = '0;
    for (int m = 0; m < NB_MSHR; m++) begin
      m_free[m]  = (m_state_q[m] == MSHR_FREE);
      m_issue[m] = (m_state_q[m] == MSHR_ISSUE);
      m_done[m]  = (m_state_q[m] == MSHR_DONE);
      m_match[m] = !m_free[m] && (m_line_q[m] == s1_line_q);
      nb_free    = nb_free + (MSHR_W+1)'(m_free[m]);
    end
    for (int m = NB_MSHR - 1; m >= 0; m--) begin
      if (m_free[m])  free_sel  = MSHR_W'(m);
      if (m_issue[m]) issue_sel = MSHR_W'(m);
      if (m_done[m])  done_sel  = MSHR_W'(m);
      if (m_match[m]) match_sel = MSHR_W'(m);
    end
  end

  // ---------------------------------------------------------------- pipeline
  logic                accept, s1_hit, s1_miss, do_merge, do_alloc, do_write;
  logic [NB_WAYS-1:0]  hit_way, way_we;
  logic [TAG_W-1:0]    tag_rdata  [NB_WAYS];
  logic [LINE_W-1:0]   data_rdata [NB_WAYS];
  logic [LINE_W-1:0]   hit_data;
  logic [IDX_W-1:0]    rd_idx, s1_idx, wr_idx;
  logic [LADDR_W-1:0]  req_line;
  logic [WAY_W-1:0]    victim, rand_val;

  assign req_line = addr_i[ADDR_W-1:OFF_W];
  assign rd_idx   = idx_of(req_line);
  assign s1_idx   = idx_of(s1_line_q);
  assign wr_idx   = idx_of(m_line_q[done_sel]);

  assign do_write = (|m_done) && !s1_valid_q;
  assign gnt_o    = !(|m_done) && (nb_free > (s1_valid_q ? (MSHR_W+1)'(1) : '0));
  assign accept   = req_i && gnt_o;

  for (genvar w = 0; w < NB_WAYS; w++) begin : g_way
    scm_array #(.WIDTH(TAG_W), .DEPTH(NB_SETS)) i_tag (
      .clk_i, .we_i(way_we[w]), .waddr_i(wr_idx), .wdata_i(tag_of(m_line_q[done_sel])),
      .re_i(accept), .raddr_i(rd_idx), .rdata_o(tag_rdata[w]));
    scm_array #(.WIDTH(LINE_W), .DEPTH(NB_SETS)) i_data (
      .clk_i, .we_i(way_we[w]), .waddr_i(wr_idx), .wdata_i(m_data_q[done_sel]),
      .re_i(accept), .raddr_i(rd_idx), .rdata_o(data_rdata[w]));
    assign hit_way[w] = valid_q[w][s1_idx] && (tag_rdata[w] == tag_of(s1_line_q));
    assign way_we[w]  = do_write && (m_way_q[done_sel] == WAY_W'(w));
  end

  always_comb begin
    hit_data = '0;
    for (int w = 0; w < NB_WAYS; w++) if (hit_way[w]) hit_data = data_rdata[w];
  end

  assign s1_hit   = s1_valid_q && (|hit_way);
  assign s1_miss  = s1_valid_q && !(|hit_way);
  assign do_merge = s1_miss && (|m_match);
  assign do_alloc = s1_miss && !(|m_match);

  // victim: first way of the set that is invalid and not already promised to
  // another pending refill of the same set, otherwise pseudo-random
  logic [NB_WAYS-1:0] reserved;
  always_comb begin
    reserved = '0;
    for (int m = 0; m < NB_MSHR; m++)
      if (!m_free[m] && idx_of(m_line_q[m]) == s1_idx) reserved[m_way_q[m]] = 1'b1;
    victim = rand_val;
    for (int w = NB_WAYS - 1; w >= 0; w--)
      if (!valid_q[w][s1_idx] && !reserved[w]) victim = WAY_W'(w);
  end

  prand_lfsr #(.WIDTH(WAY_W), .SEED(16'h1D0F)) i_prand (
    .clk_i, .rst_ni, .en_i(do_alloc), .value_o(rand_val));

  // ---------------------------------------------------------------- responses
  always_comb begin
    rvalid_o = '0;
    rdata_o  = hit_data;
    if (s1_hit) begin
      rvalid_o[s1_core_q] = 1'b1;
    end else if (do_write) begin
      rvalid_o = m_wait_q[done_sel];
      rdata_o  = m_data_q[done_sel];
    end
  end

  assign refill_req_o  = |m_issue;
  assign refill_addr_o = {m_line_q[issue_sel], {OFF_W{1'b0}}};
  assign refill_id_o   = issue_sel;

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      s1_valid_q  <= 1'b0;
      s1_line_q   <= '0;
      s1_core_q   <= '0;
      hit_cnt_o   <= '0;
      miss_cnt_o  <= '0;
      merge_cnt_o <= '0;
      for (int w = 0; w < NB_WAYS; w++) valid_q[w] <= '0;
      for (int m = 0; m < NB_MSHR; m++) begin
        m_state_q[m] <= MSHR_FREE;
        m_line_q[m]  <= '0;
        m_way_q[m]   <= '0;
        m_wait_q[m]  <= '0;
        m_beat_q[m]  <= '0;
        m_data_q[m]  <= '0;
      end
    end else begin
      s1_valid_q <= accept;
      if (accept) begin
        s1_line_q <= req_line;
        s1_core_q <= core_id_i;
      end
      if (s1_hit)   hit_cnt_o   <= hit_cnt_o + 32'd1;
      if (do_alloc) miss_cnt_o  <= miss_cnt_o + 32'd1;
      if (do_merge) merge_cnt_o <= merge_cnt_o + 32'd1;

      // new miss: take a free slot
      if (do_alloc) begin
        m_state_q[free_sel] <= MSHR_ISSUE;
        m_line_q[free_sel]  <= s1_line_q;
        m_way_q[free_sel]   <= victim;
        m_wait_q[free_sel]  <= NB_CORES'(1) << s1_core_q;
        m_beat_q[free_sel]  <= '0;
      end
      // miss on a line already pending: add the core to the waiters
      if (do_merge) m_wait_q[match_sel][s1_core_q] <= 1'b1;
      // refill request accepted by the bus
      if (refill_req_o && refill_gnt_i) m_state_q[issue_sel] <= MSHR_WAIT;
      // refill beat from L2
      if (refill_rvalid_i) begin
        m_data_q[refill_rid_i][m_beat_q[refill_rid_i]*AXI_DATA_W +: AXI_DATA_W] <= refill_rdata_i;
        m_beat_q[refill_rid_i] <= m_beat_q[refill_rid_i] + BEAT_W'(1);
        if (refill_rlast_i) m_state_q[refill_rid_i] <= MSHR_DONE;
      end
      // completed line written into the arrays and returned
      if (do_write) begin
        m_state_q[done_sel] <= MSHR_FREE;
        valid_q[m_way_q[done_sel]][wr_idx] <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- protocol
  a_req_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    req_i && !gnt_o |=> req_i);
  a_beat_slot: assert property (@(posedge clk_i) disable iff (!rst_ni)
    refill_rvalid_i |-> m_state_q[refill_rid_i] == MSHR_WAIT);
  a_beat_count: assert property (@(posedge clk_i) disable iff (!rst_ni)
    refill_rvalid_i && refill_rlast_i |-> m_beat_q[refill_rid_i] == BEAT_W'(NB_BEATS - 1));
  a_one_resp_source: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(s1_hit && do_write));

endmodule
