// tb_axi_refill_bus: self-checking test of the AXI4 instruction bus.
//
// Two bank models each keep up to four refills (one per slot) in flight and
// request new ones at random; the L2 model accepts bursts with a random ARREADY
// and returns them out of order after 8 cycles. The test checks the AR
// encoding (two beats, 8-byte beats, INCR), that ARVALID and its payload stay
// stable until ARREADY, that every beat reaches the bank and slot that asked
// for it with the reference data and RLAST on the second beat, that both banks
// are served, and that several bursts are outstanding at once.
module tb_axi_refill_bus;
  import tb_icache_pkg::*;
  localparam int NB = 2, NM = 4;

  logic clk = 0, rst_n = 0;
  logic [NB-1:0] b_req, b_gnt, b_rvalid;
  logic [31:0]   b_addr [NB];
  logic [1:0]    b_id [NB];
  logic [63:0]   b_rdata;
  logic [1:0]    b_rid;
  logic          b_rlast;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [31:0] ar_addr;
  logic [2:0]  ar_id, r_id;
  logic [7:0]  ar_len;
  logic [2:0]  ar_size;
  logic [1:0]  ar_burst, r_resp;
  logic [63:0] r_data;
  int bursts, max_out;

  int checks = 0, failures = 0;
  int done_lines [NB];

  axi_refill_bus dut (
    .clk_i(clk), .rst_ni(rst_n),
    .bank_req_i(b_req), .bank_addr_i(b_addr), .bank_id_i(b_id), .bank_gnt_o(b_gnt),
    .bank_rvalid_o(b_rvalid), .bank_rdata_o(b_rdata), .bank_rid_o(b_rid), .bank_rlast_o(b_rlast),
    .axi_ar_valid_o(ar_valid), .axi_ar_ready_i(ar_ready), .axi_ar_addr_o(ar_addr),
    .axi_ar_id_o(ar_id), .axi_ar_len_o(ar_len), .axi_ar_size_o(ar_size), .axi_ar_burst_o(ar_burst),
    .axi_r_valid_i(r_valid), .axi_r_ready_o(r_ready), .axi_r_data_i(r_data), .axi_r_id_i(r_id),
    .axi_r_last_i(r_last), .axi_r_resp_i(r_resp));

  l2_axi_model #(.ID_W(3), .LATENCY(8), .OUT_OF_ORDER(1'b1)) i_l2 (
    .clk_i(clk), .rst_ni(rst_n),
    .ar_valid_i(ar_valid), .ar_ready_o(ar_ready), .ar_addr_i(ar_addr), .ar_id_i(ar_id),
    .ar_len_i(ar_len), .r_valid_o(r_valid), .r_ready_i(r_ready), .r_data_o(r_data),
    .r_id_o(r_id), .r_last_o(r_last), .r_resp_o(r_resp),
    .bursts_o(bursts), .max_outstanding_o(max_out));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bank models: slot state 0 free, 1 requesting, 2 waiting for data
  int          st   [NB][NM];
  logic [31:0] sa   [NB][NM];
  int          beat [NB][NM];
  int          next_line = 0;

  always @(negedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) begin
      if (!b_req[b]) begin
        for (int m = 0; m < NM; m++)
          if (st[b][m] == 0 && !b_req[b] && ($urandom % 3) == 0) begin
            st[b][m] = 1;
            sa[b][m] = 32'h0010_0000 + 32'(next_line) * 16;
            next_line++;
            b_req[b]  <= 1'b1;
            b_addr[b] <= sa[b][m];
            b_id[b]   <= 2'(m);
            break;
          end
      end
    end
  end

  logic        pv;
  logic [31:0] pa;
  logic [2:0]  pid;
  always @(posedge clk) if (rst_n) begin
    // AR rules and encoding
    if (pv) begin
      checks++;
      if (!ar_valid || ar_addr !== pa || ar_id !== pid) begin failures++; $display("AR changed before ARREADY"); end
    end
    pv <= ar_valid && !ar_ready; pa <= ar_addr; pid <= ar_id;
    if (ar_valid) begin
      checks++;
      if (ar_len != 8'd1 || ar_size != 3'd3 || ar_burst != 2'b01) begin failures++; $display("AR encoding"); end
    end
    // grants
    for (int b = 0; b < NB; b++) if (b_gnt[b]) begin
      checks++;
      if (!b_req[b]) begin failures++; $display("grant without request"); end
      st[b][b_id[b]] = 2; beat[b][b_id[b]] = 0;
      b_req[b] <= 1'b0;
    end
    // read beats
    checks++;
    if (!r_ready) begin failures++; $display("RREADY low"); end
    if (r_valid) begin
      int b, m;
      checks++;
      if ($countones(b_rvalid) != 1) begin failures++; $display("beat not routed to one bank"); end
      b = int'(r_id[2]); m = int'(r_id[1:0]);
      checks += 3;
      if (!b_rvalid[b] || b_rid !== 2'(m)) begin failures++; $display("beat routed wrong"); end
      if (st[b][m] != 2) begin failures++; $display("beat for a slot not waiting"); end
      if (b_rdata !== exp_beat(sa[b][m] + 32'(beat[b][m] * 8)) || b_rlast !== (beat[b][m] == 1)) begin
        failures++; $display("beat data bank %0d slot %0d", b, m);
      end
      beat[b][m]++;
      if (b_rlast) begin st[b][m] = 0; done_lines[b]++; end
    end
  end

  initial begin
    b_req = '0; pv = 0; pa = 0; pid = 0;
    for (int b = 0; b < NB; b++) begin b_addr[b] = 0; b_id[b] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (6000) @(posedge clk);
    checks += 3;
    if (done_lines[0] < 100 || done_lines[1] < 100) begin
      failures++; $display("lines done %0d %0d", done_lines[0], done_lines[1]);
    end
    if (max_out < 3) begin failures++; $display("max outstanding %0d", max_out); end
    if (bursts < done_lines[0] + done_lines[1]) begin failures++; $display("bursts %0d", bursts); end
    $display("lines %0d %0d, max outstanding bursts %0d", done_lines[0], done_lines[1], max_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
