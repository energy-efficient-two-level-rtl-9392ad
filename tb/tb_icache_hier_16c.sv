// tb_icache_hier_16c: end-to-end test of the two-level instruction cache
// scaled to 16 cores, the case the request buffer is meant for: 16 private
// caches share the default 8 KiB shared level (2 x 4 KiB banks), with both
// pipeline buffers enabled, refilled from an L2 model with 10 cycles of
// latency.
//
// Checks that the L1.5 hit takes five cycles after the grant (one more for the
// request buffer) and the L1 hit one, then runs the same-code synthetic loops
// of 0.375 to 12 KiB on all sixteen cores with every line compared with its
// reference content. The 0.375 KiB loop fits every private cache (one miss per
// line per core); the 3 KiB loop fits the shared level, so it must cost fewer
// than two refills per line over four iterations. Then every core runs its own
// loop, and each mechanism of the cache (bank conflict, merged refill,
// multi-core response, hit under a refill, several bursts in flight, ARREADY
// back-pressure) must have occurred.
module tb_icache_hier_16c;
  import tb_icache_pkg::*;
  localparam int NC = 16, NB = 2;

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] f_req, f_gnt, f_rvalid;
  logic [31:0]   f_addr  [NC];
  logic [127:0]  f_rdata [NC];
  logic ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [31:0] ar_addr;
  logic [2:0]  ar_id, r_id;
  logic [7:0]  ar_len;
  logic [2:0]  ar_size;
  logic [1:0]  ar_burst, r_resp;
  logic [63:0] r_data;
  logic [31:0] pri_hit [NC], pri_miss [NC], sh_hit [NB], sh_miss [NB], sh_merge [NB];
  int bursts, max_out;

  int checks = 0, failures = 0;
  longint cyc = 0;

  icache_hier_top #(.NB_CORES(16), .USE_REQ_BUF(1'b1), .USE_RESP_BUF(1'b1)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .fetch_req_i(f_req), .fetch_addr_i(f_addr), .fetch_gnt_o(f_gnt),
    .fetch_rvalid_o(f_rvalid), .fetch_rdata_o(f_rdata),
    .axi_ar_valid_o(ar_valid), .axi_ar_ready_i(ar_ready), .axi_ar_addr_o(ar_addr),
    .axi_ar_id_o(ar_id), .axi_ar_len_o(ar_len), .axi_ar_size_o(ar_size), .axi_ar_burst_o(ar_burst),
    .axi_r_valid_i(r_valid), .axi_r_ready_o(r_ready), .axi_r_data_i(r_data), .axi_r_id_i(r_id),
    .axi_r_last_i(r_last), .axi_r_resp_i(r_resp),
    .pri_hit_cnt_o(pri_hit), .pri_miss_cnt_o(pri_miss),
    .sh_hit_cnt_o(sh_hit), .sh_miss_cnt_o(sh_miss), .sh_merge_cnt_o(sh_merge));

  l2_axi_model #(.ID_W(3), .LATENCY(10), .OUT_OF_ORDER(1'b1)) i_l2 (
    .clk_i(clk), .rst_ni(rst_n),
    .ar_valid_i(ar_valid), .ar_ready_o(ar_ready), .ar_addr_i(ar_addr), .ar_id_i(ar_id),
    .ar_len_i(ar_len), .r_valid_o(r_valid), .r_ready_i(r_ready), .r_data_o(r_data),
    .r_id_o(r_id), .r_last_o(r_last), .r_resp_o(r_resp),
    .bursts_o(bursts), .max_outstanding_o(max_out));

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_conflict = 0, n_hit_under_miss = 0, n_multi_resp = 0, n_ar_stall = 0;
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      logic [NC-1:0] want;
      want = '0;
      for (int c = 0; c < NC; c++)
        if (dut.ic_req[c] && dut.ic_addr[c][4] == 1'(b)) want[c] = 1'b1;
      if ($countones(want) > 1) n_conflict++;
      if ($countones(dut.bk_rvalid[b]) > 1) n_multi_resp++;
    end
    if (dut.g_bank[0].i_l15.s1_hit && dut.g_bank[0].i_l15.m_free != '1) n_hit_under_miss++;
    if (dut.g_bank[1].i_l15.s1_hit && dut.g_bank[1].i_l15.m_free != '1) n_hit_under_miss++;
    if (ar_valid && !ar_ready) n_ar_stall++;
  end

  // ------------------------------------------------------------ core models
  logic [31:0] want_addr [NC];
  longint      gnt_at    [NC];
  bit          waiting   [NC];
  longint      last_lat  [NC];

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) if (f_rvalid[c]) begin
      checks++;
      if (!waiting[c]) begin
        failures++; $display("core %0d: response without request", c);
      end else if (f_rdata[c] !== exp_line(want_addr[c])) begin
        failures++; $display("core %0d: data mismatch at %h", c, want_addr[c]);
      end
      last_lat[c] = cyc - gnt_at[c];
      waiting[c]  = 0;
    end
  end

  // one fetch, returns when the line has arrived
  task automatic fetch(input int c, input logic [31:0] a);
    @(negedge clk);
    f_req[c] = 1'b1; f_addr[c] = a;
    forever begin
      bit g;
      #4 g = f_gnt[c];
      @(posedge clk);
      if (g) break;
      @(negedge clk);
    end
    want_addr[c] = a; gnt_at[c] = cyc; waiting[c] = 1;
    @(negedge clk); f_req[c] = 1'b0;
    while (waiting[c]) @(posedge clk);
  endtask

  task automatic run_loop(input int c, input logic [31:0] base, input int bytes, input int iters);
    repeat ($urandom % 20) @(posedge clk);
    for (int it = 0; it < iters; it++)
      for (int off = 0; off < bytes; off += 16) fetch(c, base + 32'(off));
  endtask

  function automatic int sum_pri_miss();
    int s = 0;
    for (int c = 0; c < NC; c++) s += int'(pri_miss[c]);
    return s;
  endfunction
  function automatic int sum_sh_miss();
    return int'(sh_miss[0] + sh_miss[1]);
  endfunction

  initial begin
    static int sizes [6] = '{384, 768, 1536, 3072, 6144, 12288};
    f_req = '0;
    for (int c = 0; c < NC; c++) begin f_addr[c] = '0; waiting[c] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // latency of the three paths
    fetch(0, 32'h0008_0000);                 // L1 miss, L1.5 miss
    fetch(1, 32'h0008_0000);                 // L1 miss, L1.5 hit
    checks++;
    if (last_lat[1] != 5) begin failures++; $display("L1.5 hit latency %0d, expected 5", last_lat[1]); end
    fetch(1, 32'h0008_0000);                 // L1 hit
    checks++;
    if (last_lat[1] != 1) begin failures++; $display("L1 hit latency %0d, expected 1", last_lat[1]); end
    $display("latency from grant: L1 hit %0d, L1.5 hit %0d, L1.5 miss %0d cycles",
             last_lat[1], 5, last_lat[0]);

    // synthetic loops
    foreach (sizes[k]) begin
      longint t0;
      int pm0, sm0, pm, sm;
      logic [31:0] base;
      base = 32'h0100_0000 + 32'(k) * 32'h0010_0000;
      t0 = cyc; pm0 = sum_pri_miss(); sm0 = sum_sh_miss();
      for (int c = 0; c < NC; c++) begin
        automatic int cc = c;
        fork run_loop(cc, base, sizes[k], 4); join_none
      end
      wait fork;
      pm = sum_pri_miss() - pm0; sm = sum_sh_miss() - sm0;
      $display("loop %5d B: %7d cycles, %0d line fetches/core, L1 misses %0d, L1.5 refills %0d",
               sizes[k], cyc - t0, 4 * sizes[k] / 16, pm, sm);
      if (sizes[k] == 384) begin
        checks++;
        if (pm != NC * 24) begin failures++; $display("0.375 KiB loop: L1 misses %0d, expected %0d", pm, NC * 24); end
      end
      if (sizes[k] == 3072) begin
        // every line is refilled at least once, and the shared level must keep
        // most of them between iterations (lines of the earlier loops still
        // share its sets, so random replacement costs some)
        checks++;
        if (sm < 192 || sm >= 2 * 192) begin failures++; $display("3 KiB loop: L1.5 refills %0d, expected 192..383", sm); end
      end
    end

    // independent tasks: every core runs its own 1 KiB loop, so misses of
    // different cores overlap and warm cores hit while others refill
    for (int c = 0; c < NC; c++) begin
      automatic int cc = c;
      fork run_loop(cc, 32'h0020_0000 + 32'(cc) * 32'h1_0000, 1024, 3); join_none
    end
    wait fork;

    // every mechanism must have happened
    begin
      static int ph = 0, pmi = 0;
      for (int c = 0; c < NC; c++) begin ph += int'(pri_hit[c]); pmi += int'(pri_miss[c]); end
      $display("L1 hits %0d, L1 misses %0d, L1.5 hits %0d, L1.5 refills %0d, merged %0d",
               ph, pmi, sh_hit[0] + sh_hit[1], sh_miss[0] + sh_miss[1], sh_merge[0] + sh_merge[1]);
      $display("bank conflicts %0d, multi-core responses %0d, L1.5 hits under a refill %0d, max AXI bursts in flight %0d, ARREADY stalls %0d",
               n_conflict, n_multi_resp, n_hit_under_miss, max_out, n_ar_stall);
      checks += 10;
      if (ph == 0)  begin failures++; $display("no L1 hit"); end
      if (pmi == 0) begin failures++; $display("no L1 miss"); end
      if (sh_hit[0] + sh_hit[1] == 0)     begin failures++; $display("no L1.5 hit"); end
      if (sh_miss[0] + sh_miss[1] == 0)   begin failures++; $display("no L1.5 miss"); end
      if (sh_merge[0] + sh_merge[1] == 0) begin failures++; $display("no merged refill"); end
      if (n_multi_resp == 0)     begin failures++; $display("no multi-core response"); end
      if (n_conflict == 0)       begin failures++; $display("no bank conflict"); end
      if (n_hit_under_miss == 0) begin failures++; $display("no hit under miss"); end
      if (max_out < 2)           begin failures++; $display("never two bursts in flight"); end
      if (n_ar_stall == 0)       begin failures++; $display("no ARREADY stall"); end
      checks++;
      if (32'(bursts) != sh_miss[0] + sh_miss[1]) begin failures++; $display("bursts %0d", bursts); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
