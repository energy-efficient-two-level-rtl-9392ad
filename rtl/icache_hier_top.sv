// icache_hier_top: two-level instruction cache of an 8-core cluster.
//
// Every core fetches 16-byte lines from its own small private cache (L1,
// 512 bytes by default). An L1 miss goes, through an optional request buffer
// and the read-only interconnect, to one of the banks of a shared cache (L1.5,
// two 4 KiB banks by default) and comes back through a response buffer. L1.5
// misses are refilled from L2 over a 64-bit AXI4 read port. The private caches
// keep the core's fetch path short and cheap; the shared level gives the
// cluster the capacity of a shared cache without replicating code per core;
// the buffers keep the interconnect off the core's critical path.
//
//   core c --fetch--> pri_icache --refill--> req_buffer --> ro_log_interconnect
//          <--------            <---------- resp_buffer <--        |
//                                                          sh_icache_bank x SH_NB_BANKS
//                                                                  |
//                                                           axi_refill_bus --> AXI4 (L2)
//
// Timing with the default buffers (request buffer off, response buffer on) and
// no contention: an L1 hit returns one cycle after the grant; an L1 miss that
// hits in the L1.5 returns four cycles after the grant; an L1.5 miss adds the
// AXI round trip plus two cycles (AR register and array write). Every pipeline
// buffer enabled adds one cycle to the L1.5 path.
//
// Ports: per core a request/grant fetch port with one rvalid per granted
// request; the AXI4 read address and read data channels of the refill master;
// the hit and miss counters of every cache, and the merged-refill counter of
// every bank.
//
// The structure, the sizes, the 4-way 16-byte-line organisation, the bus widths
// and the buffer configuration are those of the two-level cache this RTL
// implements; the number of pending refills per bank is this design's choice.
module icache_hier_top #(
  parameter int unsigned NB_CORES       = 8,
  parameter int unsigned PRI_CACHE_SIZE = 512,
  parameter int unsigned SH_NB_BANKS    = 2,
  parameter int unsigned SH_BANK_SIZE   = 4096,
  parameter int unsigned NB_WAYS        = 4,
  parameter int unsigned LINE_BYTES     = 16,
  parameter int unsigned AXI_DATA_W     = 64,
  parameter int unsigned SH_NB_MSHR     = 4,
  parameter bit          USE_REQ_BUF    = 1'b0,
  parameter bit          USE_RESP_BUF   = 1'b1,
  parameter int unsigned ADDR_W         = 32,
  localparam int unsigned LINE_W        = 8 * LINE_BYTES,
  localparam int unsigned AXI_ID_W      = ((SH_NB_BANKS > 1) ? $clog2(SH_NB_BANKS) : 1)
                                        + ((SH_NB_MSHR > 1) ? $clog2(SH_NB_MSHR) : 1)
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  // core fetch ports
  input  logic [NB_CORES-1:0]   fetch_req_i,
  input  logic [ADDR_W-1:0]     fetch_addr_i   [NB_CORES],
  output logic [NB_CORES-1:0]   fetch_gnt_o,
  output logic [NB_CORES-1:0]   fetch_rvalid_o,
  output logic [LINE_W-1:0]     fetch_rdata_o  [NB_CORES],
  // AXI4 refill master, read channels
  output logic                  axi_ar_valid_o,
  input  logic                  axi_ar_ready_i,
  output logic [ADDR_W-1:0]     axi_ar_addr_o,
  output logic [AXI_ID_W-1:0]   axi_ar_id_o,
  output logic [7:0]            axi_ar_len_o,
  output logic [2:0]            axi_ar_size_o,
  output logic [1:0]            axi_ar_burst_o,
  input  logic                  axi_r_valid_i,
  output logic                  axi_r_ready_o,
  input  logic [AXI_DATA_W-1:0] axi_r_data_i,
  input  logic [AXI_ID_W-1:0]   axi_r_id_i,
  input  logic                  axi_r_last_i,
  input  logic [1:0]            axi_r_resp_i,
  // hardware counters
  output logic [31:0]           pri_hit_cnt_o  [NB_CORES],
  output logic [31:0]           pri_miss_cnt_o [NB_CORES],
  output logic [31:0]           sh_hit_cnt_o   [SH_NB_BANKS],
  output logic [31:0]           sh_miss_cnt_o  [SH_NB_BANKS],
  output logic [31:0]           sh_merge_cnt_o [SH_NB_BANKS]
);

  localparam int unsigned CORE_W = (NB_CORES > 1) ? $clog2(NB_CORES) : 1;
  localparam int unsigned MSHR_W = (SH_NB_MSHR > 1) ? $clog2(SH_NB_MSHR) : 1;

  // L1 -> request buffer
  logic [NB_CORES-1:0]   l1_req, l1_gnt, l1_rvalid;
  logic [ADDR_W-1:0]     l1_addr   [NB_CORES];
  logic [LINE_W-1:0]     l1_rdata  [NB_CORES];
  // buffers <-> interconnect
  logic [NB_CORES-1:0]   ic_req, ic_gnt, ic_rvalid;
  logic [ADDR_W-1:0]     ic_addr   [NB_CORES];
  logic [LINE_W-1:0]     ic_rdata  [NB_CORES];
  // interconnect <-> banks
  logic [SH_NB_BANKS-1:0] bk_req, bk_gnt;
  logic [ADDR_W-1:0]      bk_addr    [SH_NB_BANKS];
  logic [CORE_W-1:0]      bk_core    [SH_NB_BANKS];
  logic [NB_CORES-1:0]    bk_rvalid  [SH_NB_BANKS];
  logic [LINE_W-1:0]      bk_rdata   [SH_NB_BANKS];
  // banks <-> instruction bus
  logic [SH_NB_BANKS-1:0] rf_req, rf_gnt, rf_rvalid;
  logic [ADDR_W-1:0]      rf_addr    [SH_NB_BANKS];
  logic [MSHR_W-1:0]      rf_id      [SH_NB_BANKS];
  logic [AXI_DATA_W-1:0]  rf_rdata;
  logic [MSHR_W-1:0]      rf_rid;
  logic                   rf_rlast;

  for (genvar c = 0; c < NB_CORES; c++) begin : g_core
    pri_icache #(
      .CACHE_SIZE (PRI_CACHE_SIZE),
      .NB_WAYS    (NB_WAYS),
      .LINE_BYTES (LINE_BYTES),
      .ADDR_W     (ADDR_W)
    ) i_l1 (
      .clk_i, .rst_ni,
      .fetch_req_i     (fetch_req_i[c]),
      .fetch_addr_i    (fetch_addr_i[c]),
      .fetch_gnt_o     (fetch_gnt_o[c]),
      .fetch_rvalid_o  (fetch_rvalid_o[c]),
      .fetch_rdata_o   (fetch_rdata_o[c]),
      .refill_req_o    (l1_req[c]),
      .refill_addr_o   (l1_addr[c]),
      .refill_gnt_i    (l1_gnt[c]),
      .refill_rvalid_i (l1_rvalid[c]),
      .refill_rdata_i  (l1_rdata[c]),
      .hit_cnt_o       (pri_hit_cnt_o[c]),
      .miss_cnt_o      (pri_miss_cnt_o[c]));

    req_buffer #(.ENABLE(USE_REQ_BUF), .ADDR_W(ADDR_W)) i_req_buf (
      .clk_i, .rst_ni,
      .in_req_i   (l1_req[c]),  .in_addr_i (l1_addr[c]), .in_gnt_o  (l1_gnt[c]),
      .out_req_o  (ic_req[c]),  .out_addr_o(ic_addr[c]), .out_gnt_i (ic_gnt[c]));

    resp_buffer #(.ENABLE(USE_RESP_BUF), .DATA_W(LINE_W)) i_resp_buf (
      .clk_i, .rst_ni,
      .in_rvalid_i  (ic_rvalid[c]), .in_rdata_i (ic_rdata[c]),
      .out_rvalid_o (l1_rvalid[c]), .out_rdata_o(l1_rdata[c]));
  end

  ro_log_interconnect #(
    .NB_CORES (NB_CORES), .NB_BANKS (SH_NB_BANKS),
    .LINE_BYTES (LINE_BYTES), .ADDR_W (ADDR_W)
  ) i_xbar (
    .clk_i, .rst_ni,
    .core_req_i    (ic_req),    .core_addr_i  (ic_addr),  .core_gnt_o (ic_gnt),
    .core_rvalid_o (ic_rvalid), .core_rdata_o (ic_rdata),
    .bank_req_o    (bk_req),    .bank_addr_o  (bk_addr),  .bank_core_id_o (bk_core),
    .bank_gnt_i    (bk_gnt),    .bank_rvalid_i(bk_rvalid), .bank_rdata_i (bk_rdata));

  for (genvar b = 0; b < SH_NB_BANKS; b++) begin : g_bank
    sh_icache_bank #(
      .BANK_SIZE (SH_BANK_SIZE), .NB_WAYS (NB_WAYS), .LINE_BYTES (LINE_BYTES),
      .NB_CORES (NB_CORES), .NB_BANKS (SH_NB_BANKS), .NB_MSHR (SH_NB_MSHR),
      .AXI_DATA_W (AXI_DATA_W), .ADDR_W (ADDR_W)
    ) i_l15 (
      .clk_i, .rst_ni,
      .req_i (bk_req[b]), .addr_i (bk_addr[b]), .core_id_i (bk_core[b]), .gnt_o (bk_gnt[b]),
      .rvalid_o (bk_rvalid[b]), .rdata_o (bk_rdata[b]),
      .refill_req_o (rf_req[b]), .refill_addr_o (rf_addr[b]), .refill_id_o (rf_id[b]),
      .refill_gnt_i (rf_gnt[b]),
      .refill_rvalid_i (rf_rvalid[b]), .refill_rdata_i (rf_rdata),
      .refill_rid_i (rf_rid), .refill_rlast_i (rf_rlast),
      .hit_cnt_o (sh_hit_cnt_o[b]), .miss_cnt_o (sh_miss_cnt_o[b]),
      .merge_cnt_o (sh_merge_cnt_o[b]));
  end

  axi_refill_bus #(
    .NB_BANKS (SH_NB_BANKS), .NB_MSHR (SH_NB_MSHR), .AXI_DATA_W (AXI_DATA_W),
    .LINE_BYTES (LINE_BYTES), .ADDR_W (ADDR_W)
  ) i_ibus (
    .clk_i, .rst_ni,
    .bank_req_i (rf_req), .bank_addr_i (rf_addr), .bank_id_i (rf_id), .bank_gnt_o (rf_gnt),
    .bank_rvalid_o (rf_rvalid), .bank_rdata_o (rf_rdata), .bank_rid_o (rf_rid),
    .bank_rlast_o (rf_rlast),
    .axi_ar_valid_o, .axi_ar_ready_i, .axi_ar_addr_o, .axi_ar_id_o,
    .axi_ar_len_o, .axi_ar_size_o, .axi_ar_burst_o,
    .axi_r_valid_i, .axi_r_ready_o, .axi_r_data_i, .axi_r_id_i,
    .axi_r_last_i, .axi_r_resp_i);

endmodule
