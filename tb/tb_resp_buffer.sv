// tb_resp_buffer: self-checking test of the response buffer.
//
// Drives random valid/data pairs into an enabled and a disabled buffer. The
// enabled one must reproduce each valid response exactly one cycle later and
// never invent one; the disabled one must pass it in the same cycle.
module tb_resp_buffer;
  logic clk = 0, rst_n = 0, in_v, out_v, out_v0;
  logic [127:0] in_d, out_d, out_d0;
  logic prev_v;
  logic [127:0] prev_d;
  int checks = 0, failures = 0;

  resp_buffer #(.ENABLE(1'b1), .DATA_W(128)) dut (
    .clk_i(clk), .rst_ni(rst_n), .in_rvalid_i(in_v), .in_rdata_i(in_d),
    .out_rvalid_o(out_v), .out_rdata_o(out_d));
  resp_buffer #(.ENABLE(1'b0), .DATA_W(128)) dut_off (
    .clk_i(clk), .rst_ni(rst_n), .in_rvalid_i(in_v), .in_rdata_i(in_d),
    .out_rvalid_o(out_v0), .out_rdata_o(out_d0));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_v = 0; in_d = '0; prev_v = 0; prev_d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // output of the enabled buffer is last cycle's input
      checks++;
      if (out_v !== prev_v || (prev_v && out_d !== prev_d)) begin
        failures++; $display("n=%0d got %b %h exp %b %h", n, out_v, out_d, prev_v, prev_d);
      end
      in_v = ($urandom % 2) == 1;
      in_d = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (out_v0 !== in_v || out_d0 !== in_d) begin failures++; $display("bypass wrong"); end
      prev_v = in_v; prev_d = in_d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
