// tb_req_buffer: self-checking test of the request buffer.
//
// A source sends a numbered stream of addresses over request/grant, holding
// each until granted; the sink grants at random. The test checks that the
// enabled buffer delivers every address once, in order, never in the cycle it
// was accepted (one cycle of latency), keeps its output stable while not
// granted, and that back-to-back transfers reach one per cycle when the sink
// always grants. The disabled buffer must behave as a wire.
module tb_req_buffer;
  logic clk = 0, rst_n = 0;
  logic in_req, in_gnt, out_req, out_gnt;
  logic [31:0] in_addr, out_addr;
  logic w_gnt, w_req;
  logic [31:0] w_addr;
  int checks = 0, failures = 0;
  int sent = 0, recv = 0;
  bit always_grant = 0;
  longint cyc = 0, accept_cyc [$];
  int full_rate_xfers = 0;

  req_buffer #(.ENABLE(1'b1), .ADDR_W(32)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .in_req_i(in_req), .in_addr_i(in_addr), .in_gnt_o(in_gnt),
    .out_req_o(out_req), .out_addr_o(out_addr), .out_gnt_i(out_gnt));
  req_buffer #(.ENABLE(1'b0), .ADDR_W(32)) dut_off (
    .clk_i(clk), .rst_ni(rst_n),
    .in_req_i(in_req), .in_addr_i(in_addr), .in_gnt_o(w_gnt),
    .out_req_o(w_req), .out_addr_o(w_addr), .out_gnt_i(out_gnt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink and checks, sampled just before the clock edge
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    checks++;
    if (w_req !== in_req || w_addr !== in_addr || w_gnt !== out_gnt) begin
      failures++; $display("disabled buffer is not a wire");
    end
    if (in_req && in_gnt) begin
      accept_cyc.push_back(cyc);
      sent <= sent + 1;
    end
    if (out_req && out_gnt) begin
      longint a;
      a = accept_cyc.pop_front();
      checks += 2;
      if (out_addr !== 32'h1000 + 32'(recv) * 16) begin
        failures++; $display("order: got %h exp %h", out_addr, 32'h1000 + 32'(recv) * 16);
      end
      if (a >= cyc) begin failures++; $display("no latency"); end
      if (always_grant && a == cyc - 1) full_rate_xfers <= full_rate_xfers + 1;
      recv <= recv + 1;
    end
  end

  initial begin
    in_req = 0; in_addr = 0; out_gnt = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      // source
      begin
        for (int n = 0; n < 600; n++) begin
          while (($urandom % 3) == 0 && n < 450) @(negedge clk);
          in_req = 1; in_addr = 32'h1000 + 32'(n) * 16;
          // the grant is sampled just before the rising edge
          forever begin
            bit g;
            #4 g = in_gnt;
            @(posedge clk);
            if (g) break;
            @(negedge clk);
          end
          @(negedge clk);
          in_req = 0;
        end
      end
      // sink: random grants, then always grant
      begin
        for (int n = 0; n < 4000; n++) begin
          @(negedge clk);
          out_gnt = always_grant || (($urandom % 2) == 1);
          if (sent >= 450) always_grant = 1;
        end
      end
    join
    repeat (3) @(posedge clk);
    checks++;
    if (recv != 600) begin failures++; $display("received %0d of 600", recv); end
    checks++;
    if (full_rate_xfers == 0) begin failures++; $display("never one-cycle pass-through"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
