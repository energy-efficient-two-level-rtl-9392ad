// tb_icache_hier_apps: code-footprint test of the two-level instruction cache at
// its default configuration, for the code sizes of six embedded applications:
// two CNNs (7.1 and 3.5 KiB), colour tracking (2.9 KiB), image segmentation
// (26.1 KiB), histogram of oriented gradients (31.1 KiB) and speckle-reducing
// diffusion (31.7 KiB).
//
// The programs themselves are not available, so each is stood in for by its
// code size: all eight cores fetch the whole footprint as straight-line code,
// twice, starting from a freshly reset cache. Every line is compared with its
// reference content. A footprint that fits the 8 KiB shared level must be
// refilled from L2 exactly once per line; a larger one must refill more. The
// cycles and refill counts are printed.
module tb_icache_hier_apps;
  import tb_icache_pkg::*;
  localparam int NC = 8, NB = 2;

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

  icache_hier_top dut (
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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
    static string names [6] = '{"CIFAR10", "KWS", "CT", "SLIC", "HOG", "SRAD"};
    static int    sizes [6] = '{7270, 3584, 2970, 26726, 31846, 32461};   // bytes
    f_req = '0;
    for (int c = 0; c < NC; c++) begin f_addr[c] = '0; waiting[c] = 0; end
    foreach (sizes[k]) begin
      longint t0;
      int lines, sm;
      lines = (sizes[k] + 15) / 16;
      rst_n = 0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1;
      t0 = cyc;
      for (int c = 0; c < NC; c++) begin
        automatic int cc = c;
        automatic int bytes = lines * 16;
        fork run_loop(cc, 32'h0400_0000, bytes, 2); join_none
      end
      wait fork;
      sm = sum_sh_miss();
      $display("%-8s %6d B: %7d cycles, %0d lines, L1.5 refills %0d",
               names[k], sizes[k], cyc - t0, lines, sm);
      checks++;
      if (lines * 16 <= 8192) begin
        if (sm != lines) begin failures++; $display("%s fits the L1.5 but refilled %0d lines of %0d", names[k], sm, lines); end
      end else begin
        if (sm <= lines) begin failures++; $display("%s exceeds the L1.5 but refilled only %0d", names[k], sm); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
