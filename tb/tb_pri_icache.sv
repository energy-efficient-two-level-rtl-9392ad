// tb_pri_icache: self-checking test of the private (L1) instruction cache.
//
// A core model fetches lines over request/grant; an L1.5 model grants refill
// requests at random and answers each after 1 to 6 cycles with the line's
// reference content. Every returned line is compared with the reference.
//   Phase 1: four lines of one set, each fetched five times in random order.
//            They fit in the four ways, so there must be exactly four misses
//            and sixteen hits; every hit must return one cycle after its grant,
//            every miss must raise the refill request two cycles after it.
//   Phase 2: eight hits issued back to back must be granted in eight
//            consecutive cycles (one line per cycle).
//   Phase 3: a fifth line of the same set forces a replacement, then 3000
//            random fetches over 2 KiB check data under misses and evictions,
//            and the counters must add up to the number of fetches.
module tb_pri_icache;
  import tb_icache_pkg::*;

  logic clk = 0, rst_n = 0;
  logic fetch_req, fetch_gnt, fetch_rvalid;
  logic [31:0] fetch_addr;
  logic [127:0] fetch_rdata;
  logic refill_req, refill_gnt, refill_rvalid;
  logic [31:0] refill_addr;
  logic [127:0] refill_rdata;
  logic [31:0] hit_cnt, miss_cnt;

  int checks = 0, failures = 0;
  longint cyc = 0;

  pri_icache dut (
    .clk_i(clk), .rst_ni(rst_n),
    .fetch_req_i(fetch_req), .fetch_addr_i(fetch_addr), .fetch_gnt_o(fetch_gnt),
    .fetch_rvalid_o(fetch_rvalid), .fetch_rdata_o(fetch_rdata),
    .refill_req_o(refill_req), .refill_addr_o(refill_addr), .refill_gnt_i(refill_gnt),
    .refill_rvalid_i(refill_rvalid), .refill_rdata_i(refill_rdata),
    .hit_cnt_o(hit_cnt), .miss_cnt_o(miss_cnt));

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ L1.5 model
  bit     pend = 0;
  logic [31:0] pend_addr;
  longint pend_due;
  int     refills = 0;
  longint last_refill_req_rise = -1;
  logic   refill_req_q = 0;

  always @(negedge clk) begin
    refill_rvalid <= 1'b0;
    if (rst_n && pend && cyc >= pend_due) begin
      refill_rvalid <= 1'b1;
      refill_rdata  <= exp_line(pend_addr);
      pend = 0;
    end
    refill_gnt <= !pend && (($urandom % 2) == 1);
  end

  always @(posedge clk) if (rst_n) begin
    refill_req_q <= refill_req;
    if (refill_req && !refill_req_q) last_refill_req_rise = cyc;
    if (refill_req && refill_gnt) begin
      pend = 1; pend_addr = refill_addr; pend_due = cyc + 1 + longint'($urandom % 6);
      refills++;
      checks++;
      if (refill_addr[3:0] != 4'h0) begin failures++; $display("refill address not line aligned"); end
    end
  end

  // ------------------------------------------------------------ core model
  typedef struct { logic [31:0] addr; longint gnt_cyc; bit exp_hit; } fetch_t;
  fetch_t outstanding [$];
  int     responses = 0;
  int     late_hits = 0;
  longint gnt_cycles [$];

  always @(posedge clk) if (rst_n && fetch_rvalid) begin
    fetch_t f;
    checks++;
    if (outstanding.size() == 0) begin
      failures++; $display("response without request");
    end else begin
      f = outstanding.pop_front();
      if (fetch_rdata !== exp_line(f.addr)) begin
        failures++; $display("data mismatch addr %h", f.addr);
      end
      if (f.exp_hit) begin
        checks++;
        if (cyc - f.gnt_cyc != 1) begin
          failures++; $display("hit latency %0d for %h", cyc - f.gnt_cyc, f.addr);
        end
      end
    end
    responses++;
  end

  int gen = 0;   // number of requests issued; a request is dropped only if no newer one
  task automatic fetch(input logic [31:0] a, input bit exp_hit);
    fetch_t f;
    int my_gen;
    @(negedge clk);
    gen++;
    my_gen = gen;
    fetch_req  = 1'b1;
    fetch_addr = a;
    forever begin
      bit g;
      #4 g = fetch_gnt;
      @(posedge clk);
      if (g) break;
      @(negedge clk);
    end
    f.addr = a; f.gnt_cyc = cyc; f.exp_hit = exp_hit;
    outstanding.push_back(f);
    gnt_cycles.push_back(cyc);
    fork
      begin
        @(negedge clk);
        if (gen == my_gen) fetch_req = 1'b0;
      end
    join_none
  endtask

  task automatic drain();
    while (outstanding.size() != 0) @(posedge clk);
    @(negedge clk); fetch_req = 1'b0;
  endtask

  initial begin
    logic [31:0] set_lines [5];
    int order [$];
    bit fetched [4];
    fetch_req = 0; fetch_addr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // phase 1: four lines of set 2 (stride = 8 sets x 16 B)
    for (int i = 0; i < 5; i++) set_lines[i] = 32'h0000_2020 + 32'(i) * 32'h80;
    for (int k = 0; k < 20; k++) order.push_back(k % 4);
    order.shuffle();
    foreach (order[k]) begin
      int l;
      bit was;
      l = order[k];
      was = fetched[l];
      fetched[l] = 1;
      if (!was) begin
        // a miss: the refill request must rise two cycles after the grant
        fetch(set_lines[l], 1'b0);
        begin
          longint g;
          g = cyc;
          @(posedge clk); @(posedge clk); #1;
          checks++;
          if (last_refill_req_rise != g + 2) begin
            failures++; $display("refill request at %0d, grant at %0d", last_refill_req_rise, g);
          end
        end
      end else begin
        fetch(set_lines[l], 1'b1);
      end
    end
    drain();
    checks += 2;
    if (miss_cnt != 4) begin failures++; $display("phase 1 misses %0d", miss_cnt); end
    if (hit_cnt != 16) begin failures++; $display("phase 1 hits %0d", hit_cnt); end

    // phase 2: back-to-back hits
    gnt_cycles.delete();
    for (int k = 0; k < 8; k++) fetch(set_lines[k % 4], 1'b1);
    drain();
    checks++;
    if (gnt_cycles[7] - gnt_cycles[0] != 7) begin
      failures++; $display("8 hits took %0d cycles", gnt_cycles[7] - gnt_cycles[0] + 1);
    end

    // phase 3: replacement and random traffic
    fetch(set_lines[4], 1'b0);
    drain();
    checks++;
    if (miss_cnt != 5) begin failures++; $display("fifth line did not miss"); end
    for (int n = 0; n < 3000; n++) begin
      fetch(32'h0001_0000 + (($urandom % 128) << 4), 1'b0);
      if (($urandom % 4) == 0) drain();
    end
    drain();
    repeat (3) @(posedge clk);
    checks += 3;
    if (hit_cnt + miss_cnt != 32'(20 + 8 + 1 + 3000)) begin
      failures++; $display("counters %0d + %0d", hit_cnt, miss_cnt);
    end
    if (refills != int'(miss_cnt)) begin failures++; $display("refills %0d misses %0d", refills, miss_cnt); end
    if (responses != 20 + 8 + 1 + 3000) begin failures++; $display("responses %0d", responses); end
    $display("hits %0d misses %0d", hit_cnt, miss_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
