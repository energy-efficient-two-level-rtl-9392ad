// tb_ro_log_interconnect: self-checking test of the read-only interconnect.
//
// Eight cores request random lines over two banks; the bank models grant at
// random and answer one cycle later with a line tagged by bank and core. Each
// cycle the test recomputes, independently, which cores address which bank and
// checks that: every grant goes to a requesting core of a bank that granted,
// at most one core per bank is granted, the bank sees the granted core's
// address and number, and a core that keeps requesting a bank is granted
// within eight grants of that bank (round-robin). Responses must reach exactly
// the cores the banks name, with the bank's data. Also checks that conflicts
// (two cores on one bank) and parallel grants on both banks occur.
module tb_ro_log_interconnect;
  localparam int NC = 8, NB = 2;

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] core_req, core_gnt, core_rvalid;
  logic [31:0]   core_addr [NC];
  logic [127:0]  core_rdata [NC];
  logic [NB-1:0] bank_req, bank_gnt;
  logic [31:0]   bank_addr [NB];
  logic [2:0]    bank_core [NB];
  logic [NC-1:0] bank_rvalid [NB];
  logic [127:0]  bank_rdata [NB];

  int checks = 0, failures = 0;
  int conflicts = 0, parallel = 0;
  int wait_grants [NC];   // grants of the core's bank since it started waiting

  ro_log_interconnect dut (
    .clk_i(clk), .rst_ni(rst_n),
    .core_req_i(core_req), .core_addr_i(core_addr), .core_gnt_o(core_gnt),
    .core_rvalid_o(core_rvalid), .core_rdata_o(core_rdata),
    .bank_req_o(bank_req), .bank_addr_o(bank_addr), .bank_core_id_o(bank_core),
    .bank_gnt_i(bank_gnt), .bank_rvalid_i(bank_rvalid), .bank_rdata_i(bank_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus at the falling edge: cores hold requests until granted
  logic [NC-1:0] resp_next [NB];
  always @(negedge clk) begin
    for (int b = 0; b < NB; b++) begin
      bank_gnt[b]    <= ($urandom % 4) != 0;
      bank_rvalid[b] <= resp_next[b];
      bank_rdata[b]  <= {32'(b), 32'(resp_next[b]), $urandom, $urandom};
    end
    for (int c = 0; c < NC; c++)
      if (!core_req[c] && ($urandom % 2) == 1) begin
        core_req[c]  <= 1'b1;
        core_addr[c] <= $urandom & 32'h0000_fff0;
      end
  end

  // checks just before the rising edge
  always @(posedge clk) if (rst_n) begin
    logic [NC-1:0] want [NB];
    logic [NC-1:0] exp_gnt;
    exp_gnt = '0;
    for (int b = 0; b < NB; b++) begin
      want[b] = '0;
      for (int c = 0; c < NC; c++) if (core_req[c] && core_addr[c][4] == 1'(b)) want[b][c] = 1'b1;
      if ($countones(want[b]) > 1) conflicts++;
      checks++;
      if (bank_req[b] != (want[b] != '0)) begin failures++; $display("bank %0d request wrong", b); end
      if (bank_req[b]) begin
        checks += 2;
        if (!want[b][bank_core[b]]) begin failures++; $display("bank %0d offered core %0d", b, bank_core[b]); end
        if (bank_addr[b] !== core_addr[bank_core[b]]) begin failures++; $display("bank %0d address", b); end
        if (bank_gnt[b]) exp_gnt[bank_core[b]] = 1'b1;
      end
    end
    if (bank_req[0] && bank_req[1] && bank_gnt[0] && bank_gnt[1]) parallel++;
    checks++;
    if (core_gnt !== exp_gnt) begin failures++; $display("core grants %b exp %b", core_gnt, exp_gnt); end
    // fairness
    for (int c = 0; c < NC; c++) begin
      int b;
      b = int'(core_addr[c][4]);
      if (core_req[c] && !core_gnt[c] && bank_req[b] && bank_gnt[b]) begin
        wait_grants[c]++;
        checks++;
        if (wait_grants[c] > NC - 1) begin failures++; $display("core %0d starved", c); end
      end
      if (core_gnt[c]) wait_grants[c] = 0;
    end
    // responses: bank b answers the core it granted, one cycle later
    checks++;
    begin
      logic [NC-1:0] exp_rv;
      exp_rv = bank_rvalid[0] | bank_rvalid[1];
      if (core_rvalid !== exp_rv) begin failures++; $display("rvalid %b exp %b", core_rvalid, exp_rv); end
      for (int c = 0; c < NC; c++)
        for (int b = 0; b < NB; b++)
          if (bank_rvalid[b][c]) begin
            checks++;
            if (core_rdata[c] !== bank_rdata[b]) begin failures++; $display("core %0d rdata", c); end
          end
    end
    for (int b = 0; b < NB; b++)
      resp_next[b] <= (bank_req[b] && bank_gnt[b]) ? (NC'(1) << bank_core[b]) : '0;
    for (int c = 0; c < NC; c++) if (core_gnt[c]) core_req[c] <= 1'b0;
  end

  initial begin
    core_req = '0;
    for (int c = 0; c < NC; c++) core_addr[c] = '0;
    for (int b = 0; b < NB; b++) begin resp_next[b] = '0; bank_rvalid[b] = '0; bank_rdata[b] = '0; end
    bank_gnt = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5000) @(posedge clk);
    checks += 2;
    if (conflicts == 0) begin failures++; $display("no bank conflict happened"); end
    if (parallel == 0) begin failures++; $display("no parallel grants"); end
    $display("conflict cycles %0d, parallel grants %0d", conflicts, parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
