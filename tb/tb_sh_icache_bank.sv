// tb_sh_icache_bank: self-checking test of one shared (L1.5) cache bank.
//
// Eight core models share the bank's request port (each with at most one
// request in flight, as behind a private cache); a refill model grants refill
// requests at random and returns each line as two 64-bit beats after a chosen
// delay, out of order between slots. Every line delivered to a core is
// compared with its reference content.
//   Directed: two cores missing on the same line must cause one refill and both
//   receive the line (merge); a second miss must be refilled while the first is
//   outstanding; a hit must be served while a refill is outstanding
//   (non-blocking) and arrive one cycle after its grant.
//   Random: 4000 requests from random cores over 16 KiB of this bank's lines.
//   The counters must add up, and refills must equal started misses.
module tb_sh_icache_bank;
  import tb_icache_pkg::*;
  localparam int NC = 8, NM = 4;

  logic clk = 0, rst_n = 0;
  logic req, gnt;
  logic [31:0] addr;
  logic [2:0] core_id;
  logic [NC-1:0] rvalid;
  logic [127:0] rdata;
  logic rf_req, rf_gnt, rf_rvalid, rf_rlast;
  logic [31:0] rf_addr;
  logic [1:0] rf_id, rf_rid;
  logic [63:0] rf_rdata;
  logic [31:0] hit_cnt, miss_cnt, merge_cnt;

  int checks = 0, failures = 0;
  longint cyc = 0;

  sh_icache_bank dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_i(req), .addr_i(addr), .core_id_i(core_id), .gnt_o(gnt),
    .rvalid_o(rvalid), .rdata_o(rdata),
    .refill_req_o(rf_req), .refill_addr_o(rf_addr), .refill_id_o(rf_id), .refill_gnt_i(rf_gnt),
    .refill_rvalid_i(rf_rvalid), .refill_rdata_i(rf_rdata), .refill_rid_i(rf_rid),
    .refill_rlast_i(rf_rlast),
    .hit_cnt_o(hit_cnt), .miss_cnt_o(miss_cnt), .merge_cnt_o(merge_cnt));

  always #5 clk = ~clk;
  always @(negedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ refill model
  typedef struct { logic [31:0] addr; logic [1:0] id; longint due; } refill_t;
  refill_t rq [$];
  bit      streaming = 0;
  refill_t cur;
  int      beat = 0;
  int      refills = 0, max_pending = 0;
  int      lat_min = 3, lat_rand = 20;

  always @(negedge clk) begin
    rf_rvalid <= 1'b0;
    rf_rlast  <= 1'b0;
    if (rst_n) begin
      if (!streaming) begin
        int pick;
        pick = -1;
        for (int i = 0; i < rq.size(); i++)
          if (rq[i].due <= cyc && (pick < 0 || ($urandom % 2) == 0)) pick = i;
        if (pick >= 0) begin
          cur = rq[pick]; rq.delete(pick); streaming = 1; beat = 0;
        end
      end
      if (streaming) begin
        rf_rvalid <= 1'b1;
        rf_rdata  <= exp_beat(cur.addr + 32'(beat * 8));
        rf_rid    <= cur.id;
        rf_rlast  <= (beat == 1);
        beat++;
        if (beat == 2) streaming = 0;
      end
    end
    rf_gnt <= ($urandom % 3) != 0;
  end

  always @(posedge clk) if (rst_n && rf_req && rf_gnt) begin
    refill_t r;
    r.addr = rf_addr; r.id = rf_id; r.due = cyc + longint'(lat_min) + longint'($urandom % (lat_rand + 1));
    rq.push_back(r);
    refills++;
    if (rq.size() + (streaming ? 1 : 0) > max_pending) max_pending = rq.size() + (streaming ? 1 : 0);
  end

  // ------------------------------------------------------------ cores
  bit          busy     [NC];
  logic [31:0] want     [NC];
  longint      gnt_cyc  [NC];
  bit          exp_hit  [NC];
  int          responses = 0, merged_deliveries = 0, hits_under_miss = 0, lat1_hits = 0;

  always @(posedge clk) if (rst_n && rvalid != '0) begin
    if ($countones(rvalid) > 1) merged_deliveries++;
    for (int c = 0; c < NC; c++) if (rvalid[c]) begin
      checks++;
      if (!busy[c]) begin
        failures++; $display("response to idle core %0d", c);
      end else begin
        if (rdata !== exp_line(want[c])) begin
          failures++; $display("core %0d data mismatch addr %h", c, want[c]);
        end
        if (exp_hit[c]) begin
          checks++;
          if (cyc - gnt_cyc[c] != 1) begin failures++; $display("bank hit latency %0d", cyc - gnt_cyc[c]); end
          else lat1_hits++;
          if (rq.size() != 0 || streaming || rf_req) hits_under_miss++;
        end
        busy[c] = 0;
        responses++;
      end
    end
  end

  task automatic issue(input int c, input logic [31:0] a, input bit hit);
    @(negedge clk);
    req = 1'b1; addr = a; core_id = 3'(c);
    forever begin
      bit g;
      #4 g = gnt;
      @(posedge clk);
      if (g) break;
      @(negedge clk);
    end
    busy[c] = 1; want[c] = a; gnt_cyc[c] = cyc; exp_hit[c] = hit;
    @(negedge clk); req = 1'b0;
  endtask

  task automatic wait_idle();
    bit any;
    do begin
      @(posedge clk); #1;
      any = 0;
      for (int c = 0; c < NC; c++) any |= busy[c];
    end while (any || rq.size() != 0 || streaming);
    repeat (2) @(posedge clk);
  endtask

  // lines of bank 0 of 2 (address bit 4 clear)
  function automatic logic [31:0] bank_line(input int n);
    return 32'h0004_0000 + 32'(n) * 32;
  endfunction

  initial begin
    int c;
    req = 0; addr = 0; core_id = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // merge and several refills outstanding
    lat_min = 30; lat_rand = 0;
    issue(0, bank_line(1), 0);
    issue(1, bank_line(1), 0);          // same line, merged
    issue(2, bank_line(2), 0);          // second outstanding refill
    wait_idle();
    checks += 3;
    if (refills != 2) begin failures++; $display("refills %0d, expected 2", refills); end
    if (merge_cnt != 1) begin failures++; $display("merge count %0d", merge_cnt); end
    if (merged_deliveries != 1) begin failures++; $display("merged deliveries %0d", merged_deliveries); end

    // hit under miss
    issue(3, bank_line(3), 0);
    wait_idle();
    issue(4, bank_line(4), 0);          // miss, long refill
    issue(5, bank_line(3), 1);          // hit while it is pending
    issue(6, bank_line(1), 1);
    wait_idle();
    checks += 2;
    if (hits_under_miss < 2) begin failures++; $display("hits under miss %0d", hits_under_miss); end
    if (max_pending < 2) begin failures++; $display("max pending refills %0d", max_pending); end

    // random traffic
    lat_min = 2; lat_rand = 25;
    for (int n = 0; n < 4000; n++) begin
      do c = $urandom % NC; while (busy[c] && ($urandom % 16) != 0);
      if (busy[c]) begin
        // all chosen cores busy: wait for one to finish
        while (busy[c]) @(posedge clk);
      end
      issue(c, bank_line($urandom % 512), 0);
    end
    wait_idle();
    checks += 3;
    if (hit_cnt + miss_cnt + merge_cnt != 32'(responses)) begin
      failures++; $display("counters %0d+%0d+%0d vs %0d responses", hit_cnt, miss_cnt, merge_cnt, responses);
    end
    if (refills != int'(miss_cnt)) begin failures++; $display("refills %0d misses %0d", refills, miss_cnt); end
    if (responses != 4000 + 7) begin failures++; $display("responses %0d", responses); end
    $display("hits %0d misses %0d merges %0d max pending %0d latency-1 hits %0d",
             hit_cnt, miss_cnt, merge_cnt, max_pending, lat1_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
