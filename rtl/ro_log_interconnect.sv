// ro_log_interconnect: read-only interconnect between the private caches and
// the banks of the shared L1.5 cache.
//
// Each core's refill request goes to the bank selected by the address bits just
// above the line offset (consecutive lines sit in consecutive banks). Each bank
// has a round-robin arbiter: when several cores want the same bank in the same
// cycle one of them is granted and the others see no grant and keep their
// request up, i.e. they stall. Requests to different banks are granted in the
// same cycle. The request path is combinational (a bank's grant reaches the
// core in the cycle of the request); responses come back from the banks as a
// per-core valid vector and are steered to the core whose bit is set, so a bank
// can answer several cores with one line at once.
//
// Each bank's arbiter is a binary tree of two-input round-robin nodes
// (rr_tree_arbiter), so the arbitration depth grows with log2 of the core
// count. Round-robin arbitration per bank follows the described design; the
// node priority rule and the bank selection by address are this design's
// choice.
module ro_log_interconnect #(
  parameter int unsigned NB_CORES   = 8,
  parameter int unsigned NB_BANKS   = 2,
  parameter int unsigned LINE_BYTES = 16,
  parameter int unsigned ADDR_W     = 32,
  localparam int unsigned LINE_W    = 8 * LINE_BYTES,
  localparam int unsigned CORE_W    = (NB_CORES > 1) ? $clog2(NB_CORES) : 1
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  // core side
  input  logic [NB_CORES-1:0] core_req_i,
  input  logic [ADDR_W-1:0]   core_addr_i    [NB_CORES],
  output logic [NB_CORES-1:0] core_gnt_o,
  output logic [NB_CORES-1:0] core_rvalid_o,
  output logic [LINE_W-1:0]   core_rdata_o   [NB_CORES],
  // bank side
  output logic [NB_BANKS-1:0] bank_req_o,
  output logic [ADDR_W-1:0]   bank_addr_o    [NB_BANKS],
  output logic [CORE_W-1:0]   bank_core_id_o [NB_BANKS],
  input  logic [NB_BANKS-1:0] bank_gnt_i,
  input  logic [NB_CORES-1:0] bank_rvalid_i  [NB_BANKS],
  input  logic [LINE_W-1:0]   bank_rdata_i   [NB_BANKS]
);

  localparam int unsigned OFF_W     = $clog2(LINE_BYTES);
  localparam int unsigned BANK_BITS = $clog2(NB_BANKS);

  // which bank each core addresses
  logic [NB_CORES-1:0] to_bank [NB_BANKS];
  logic [NB_CORES-1:0] bank_win [NB_BANKS];

  always_comb begin
    for (int b = 0; b < NB_BANKS; b++)
      for (int c = 0; c < NB_CORES; c++)
        to_bank[b][c] = core_req_i[c] &&
          ((BANK_BITS == 0) || (((core_addr_i[c] >> OFF_W) % NB_BANKS) == b));
  end

  for (genvar b = 0; b < NB_BANKS; b++) begin : g_bank
    rr_tree_arbiter #(.N(NB_CORES)) i_arb (
      .clk_i, .rst_ni,
      .req_i   (to_bank[b]),
      .ack_i   (bank_gnt_i[b]),
      .gnt_o   (bank_win[b]),
      .idx_o   (bank_core_id_o[b]),
      .valid_o (bank_req_o[b]));
    assign bank_addr_o[b] = core_addr_i[bank_core_id_o[b]];
  end

  always_comb begin
    core_gnt_o    = '0;
    core_rvalid_o = '0;
    for (int c = 0; c < NB_CORES; c++) core_rdata_o[c] = '0;
    for (int b = 0; b < NB_BANKS; b++) begin
      core_gnt_o = core_gnt_o | (bank_gnt_i[b] ? bank_win[b] : '0);
      for (int c = 0; c < NB_CORES; c++)
        if (bank_rvalid_i[b][c]) begin
          core_rvalid_o[c] = 1'b1;
          core_rdata_o[c]  = bank_rdata_i[b];
        end
    end
  end

  // A core has one outstanding request, so only one bank answers it at a time.
  for (genvar c = 0; c < NB_CORES; c++) begin : g_chk
    logic [NB_BANKS-1:0] resp_from;
    for (genvar b = 0; b < NB_BANKS; b++) begin : g_b
      assign resp_from[b] = bank_rvalid_i[b][c];
    end
    a_one_bank: assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(resp_from));
  end

endmodule
