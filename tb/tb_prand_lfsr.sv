// tb_prand_lfsr: self-checking test of the replacement LFSR.
//
// Steps the generator with a random enable and compares every state with a
// reference LFSR computed here (x^16+x^14+x^13+x^11+1, seed 16'hACE1). Then
// checks that the state returns to the seed after exactly 65535 steps and not
// before, i.e. that the sequence has maximal length, and that the low two bits
// used for a 4-way victim take all four values.
module tb_prand_lfsr;
  logic clk = 0, rst_n = 0, en;
  logic [15:0] value, model;
  int checks = 0, failures = 0;
  int seen [4];

  prand_lfsr #(.WIDTH(16), .SEED(16'hACE1)) dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .value_o(value));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; model = 16'hACE1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (value !== 16'hACE1) begin failures++; $display("bad seed %h", value); end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk); en = ($urandom % 2) == 1;
      @(posedge clk); #1;
      if (en) model = {model[14:0], model[15] ^ model[13] ^ model[12] ^ model[10]};
      checks++;
      if (value !== model) begin failures++; $display("step %0d got %h exp %h", n, value, model); end
    end
    // period
    @(negedge clk); en = 1;
    begin
      logic [15:0] start;
      int period;
      start = value; period = 0;
      do begin
        @(posedge clk); #1; period++;
        seen[value[1:0]]++;
      end while (value !== start && period < 70000);
      checks++;
      if (period != 65535) begin failures++; $display("period %0d", period); end
    end
    for (int i = 0; i < 4; i++) begin
      checks++; if (seen[i] < 16000) begin failures++; $display("way %0d seen %0d", i, seen[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
