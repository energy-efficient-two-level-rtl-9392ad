// tb_rr_tree_arbiter: self-checking test of the tree-shaped round-robin arbiter.
//
// Two arbiters run side by side, one with 8 requesters (a full tree) and one
// with 5 (a tree padded to 8 leaves). Requesters raise their request at random
// and hold it until they are granted and acknowledged; the acknowledge is
// random. Every cycle the test checks, for each arbiter, that valid is the OR
// of the requests, that the grant is one-hot, goes to a requesting line and
// matches the index output, and that no requester that holds its request sees
// more than 7 other transfers before its own (the tree bound for 8 leaves).
// It also checks that every requester was served and that contention occurred.
module tb_rr_tree_arbiter;
  localparam int NA = 8, NB = 5, BOUND = 7;

  logic clk = 0, rst_n = 0;
  logic          ack;
  logic [NA-1:0] req_a, gnt_a;
  logic [NB-1:0] req_b, gnt_b;
  logic [2:0]    idx_a, idx_b;
  logic          val_a, val_b;

  int checks = 0, failures = 0, contention = 0;
  int wait_a [NA], wait_b [NB];
  int served_a [NA], served_b [NB];
  logic       clr_a = 1'b0, clr_b = 1'b0;
  logic [2:0] clr_ia = '0, clr_ib = '0;

  rr_tree_arbiter #(.N(NA)) i_a (.clk_i(clk), .rst_ni(rst_n), .req_i(req_a), .ack_i(ack),
                                 .gnt_o(gnt_a), .idx_o(idx_a), .valid_o(val_a));
  rr_tree_arbiter #(.N(NB)) i_b (.clk_i(clk), .rst_ni(rst_n), .req_i(req_b), .ack_i(ack),
                                 .gnt_o(gnt_b), .idx_o(idx_b), .valid_o(val_b));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_a = '0; req_b = '0; ack = 1'b0;
    for (int i = 0; i < NA; i++) begin wait_a[i] = 0; served_a[i] = 0; end
    for (int i = 0; i < NB; i++) begin wait_b[i] = 0; served_b[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (int t = 0; t < 20000; t++) begin
      // drive: new requests at random, held ones stay up
      @(negedge clk);
      if (clr_a) req_a[clr_ia] = 1'b0;
      if (clr_b) req_b[clr_ib] = 1'b0;
      for (int i = 0; i < NA; i++) if (!req_a[i] && ($urandom % 3) == 0) req_a[i] = 1'b1;
      for (int i = 0; i < NB; i++) if (!req_b[i] && ($urandom % 3) == 0) req_b[i] = 1'b1;
      ack = ($urandom % 4) != 0;
      #1;
      // arbiter with 8 lines
      checks += 4;
      if (val_a != |req_a) begin failures++; $display("N=8: valid %0b for requests %b", val_a, req_a); end
      if (val_a && !$onehot(gnt_a)) begin failures++; $display("N=8: grant %b not one-hot", gnt_a); end
      if ((gnt_a & ~req_a) != '0) begin failures++; $display("N=8: grant %b to idle line, requests %b", gnt_a, req_a); end
      if (val_a && !gnt_a[idx_a]) begin failures++; $display("N=8: index %0d does not match grant %b", idx_a, gnt_a); end
      if ($countones(req_a) > 1) contention++;
      // arbiter with 5 lines
      checks += 4;
      if (val_b != |req_b) begin failures++; $display("N=5: valid %0b for requests %b", val_b, req_b); end
      if (val_b && !$onehot(gnt_b)) begin failures++; $display("N=5: grant %b not one-hot", gnt_b); end
      if ((gnt_b & ~req_b) != '0) begin failures++; $display("N=5: grant %b to idle line, requests %b", gnt_b, req_b); end
      if (val_b && (int'(idx_b) >= NB || !gnt_b[idx_b])) begin failures++; $display("N=5: index %0d does not match grant %b", idx_b, gnt_b); end
      // bookkeeping of accepted transfers
      if (ack && val_a) begin
        for (int i = 0; i < NA; i++)
          if (req_a[i] && !gnt_a[i]) begin
            wait_a[i]++;
            checks++;
            if (wait_a[i] > BOUND) begin failures++; $display("N=8: line %0d passed over %0d times", i, wait_a[i]); end
          end
        wait_a[idx_a] = 0; served_a[idx_a]++;
      end
      if (ack && val_b) begin
        for (int i = 0; i < NB; i++)
          if (req_b[i] && !gnt_b[i]) begin
            wait_b[i]++;
            checks++;
            if (wait_b[i] > BOUND) begin failures++; $display("N=5: line %0d passed over %0d times", i, wait_b[i]); end
          end
        wait_b[idx_b] = 0; served_b[idx_b]++;
      end
      // the winner drops its request after the clock edge, not at it
      clr_a = ack && val_a; clr_ia = idx_a;
      clr_b = ack && val_b; clr_ib = idx_b;
      @(posedge clk);
    end

    for (int i = 0; i < NA; i++) begin
      checks++;
      if (served_a[i] == 0) begin failures++; $display("N=8: line %0d never served", i); end
    end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (served_b[i] == 0) begin failures++; $display("N=5: line %0d never served", i); end
    end
    checks++;
    if (contention == 0) begin failures++; $display("no contention"); end
    $display("transfers N=8: %0d, N=5: %0d, cycles with contention: %0d",
             served_a.sum(), served_b.sum(), contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
