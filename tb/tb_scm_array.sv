// tb_scm_array: self-checking test of the SCM array.
//
// Random writes and reads on a 16 x 24 array against a reference array kept in
// the testbench. Checks that a read returns the row one cycle later, that the
// output holds while no read is enabled, and that a read of the row being
// written in the same cycle returns the old content.
module tb_scm_array;
  localparam int W = 24, D = 16;
  logic clk = 0, we, re;
  logic [3:0] waddr, raddr;
  logic [W-1:0] wdata, rdata, ref_mem [D], expect_q;
  int checks = 0, failures = 0;

  scm_array #(.WIDTH(W), .DEPTH(D)) dut (
    .clk_i(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .re_i(re), .raddr_i(raddr), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every row first
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 4'(i); wdata = W'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic did_read;
      @(negedge clk);
      we = ($urandom % 2) == 1; waddr = 4'($urandom); wdata = W'($urandom);
      re = (n == 0) || (($urandom % 3) != 0); raddr = ($urandom % 4 == 0) ? waddr : 4'($urandom);
      did_read = re;
      if (re) expect_q = ref_mem[raddr];          // old content on a same-row write
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("mismatch n=%0d raddr=%0d got %h exp %h", n, raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
