// axi_refill_bus: the instruction bus that carries L1.5 refills to L2.
//
// Collects the refill requests of the shared-cache banks, picks one per cycle
// round-robin and issues it as an AXI4 read burst of one cache line
// (ARLEN = LINE_BYTES*8/AXI_DATA_W - 1 beats of AXI_DATA_W bits, INCR, full
// width). The AXI ID is {bank, refill slot}, so several refills of several
// banks can be outstanding and L2 may return them in any order; each read beat
// is steered back to its bank by the upper ID bits, with the slot number in the
// lower bits.
//
// The AR channel is driven from a register that holds ARVALID and the payload
// stable until ARREADY, as AXI requires. A bank's request is granted in the
// cycle it is copied into that register. RREADY is always high: every bank has
// room for all beats of its pending refills. Write channels are not present;
// the cache only reads. RRESP is not acted on: an error response is flagged by
// an assertion.
//
// A 64-bit AXI4 instruction bus behind the shared banks is part of the cluster
// design; the arbitration, the ID layout and the register slice are this
// design's choices.
module axi_refill_bus
  import icache_pkg::*;
#(
  parameter int unsigned NB_BANKS   = 2,
  parameter int unsigned NB_MSHR    = 4,
  parameter int unsigned AXI_DATA_W = 64,
  parameter int unsigned LINE_BYTES = 16,
  parameter int unsigned ADDR_W     = 32,
  localparam int unsigned BANK_W    = (NB_BANKS > 1) ? $clog2(NB_BANKS) : 1,
  localparam int unsigned MSHR_W    = (NB_MSHR > 1) ? $clog2(NB_MSHR) : 1,
  localparam int unsigned ID_W      = BANK_W + MSHR_W
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  // bank side
  input  logic [NB_BANKS-1:0]   bank_req_i,
  input  logic [ADDR_W-1:0]     bank_addr_i   [NB_BANKS],
  input  logic [MSHR_W-1:0]     bank_id_i     [NB_BANKS],
  output logic [NB_BANKS-1:0]   bank_gnt_o,
  output logic [NB_BANKS-1:0]   bank_rvalid_o,
  output logic [AXI_DATA_W-1:0] bank_rdata_o,
  output logic [MSHR_W-1:0]     bank_rid_o,
  output logic                  bank_rlast_o,
  // AXI4 read address channel
  output logic                  axi_ar_valid_o,
  input  logic                  axi_ar_ready_i,
  output logic [ADDR_W-1:0]     axi_ar_addr_o,
  output logic [ID_W-1:0]       axi_ar_id_o,
  output logic [7:0]            axi_ar_len_o,
  output logic [2:0]            axi_ar_size_o,
  output logic [1:0]            axi_ar_burst_o,
  // AXI4 read data channel
  input  logic                  axi_r_valid_i,
  output logic                  axi_r_ready_o,
  input  logic [AXI_DATA_W-1:0] axi_r_data_i,
  input  logic [ID_W-1:0]       axi_r_id_i,
  input  logic                  axi_r_last_i,
  input  logic [1:0]            axi_r_resp_i
);

  localparam int unsigned NB_BEATS = (LINE_BYTES * 8) / AXI_DATA_W;

  logic [NB_BANKS-1:0] win;
  logic [BANK_W-1:0]   win_idx;
  logic                any_req, load;
  logic                ar_full_q;

  rr_arbiter #(.N(NB_BANKS)) i_arb (
    .clk_i, .rst_ni,
    .req_i (bank_req_i), .ack_i(load),
    .gnt_o (win), .idx_o(win_idx), .valid_o(any_req));

  assign load       = any_req && (!ar_full_q || axi_ar_ready_i);
  assign bank_gnt_o = load ? win : '0;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ar_full_q     <= 1'b0;
      axi_ar_addr_o <= '0;
      axi_ar_id_o   <= '0;
    end else begin
      if (load) begin
        ar_full_q     <= 1'b1;
        axi_ar_addr_o <= bank_addr_i[win_idx];
        axi_ar_id_o   <= {win_idx, bank_id_i[win_idx]};
      end else if (axi_ar_ready_i) begin
        ar_full_q     <= 1'b0;
      end
    end
  end

  assign axi_ar_valid_o = ar_full_q;
  assign axi_ar_len_o   = 8'(NB_BEATS - 1);
  assign axi_ar_size_o  = 3'($clog2(AXI_DATA_W / 8));
  assign axi_ar_burst_o = AXI_BURST_INCR;

  // read data back to the bank named by the upper ID bits
  logic [BANK_W-1:0] r_bank;
  assign r_bank        = axi_r_id_i[ID_W-1 -: BANK_W];
  assign axi_r_ready_o = 1'b1;
  assign bank_rdata_o  = axi_r_data_i;
  assign bank_rid_o    = axi_r_id_i[MSHR_W-1:0];
  assign bank_rlast_o  = axi_r_last_i;
  always_comb begin
    bank_rvalid_o = '0;
    if (axi_r_valid_i) bank_rvalid_o[r_bank] = 1'b1;
  end

  // AXI rules
  a_ar_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_ar_valid_o && !axi_ar_ready_i |=> axi_ar_valid_o && $stable(axi_ar_addr_o) && $stable(axi_ar_id_o));
  a_r_okay: assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_r_valid_i |-> axi_r_resp_i == AXI_RESP_OKAY);

endmodule
