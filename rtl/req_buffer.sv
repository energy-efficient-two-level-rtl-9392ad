// req_buffer: optional pipeline stage on the request path from a private cache
// to the interconnect.
//
// With ENABLE = 1 the stage is a one-entry register slot for a request/grant
// channel: it grants the upstream request whenever it is empty or its stored
// request is being granted downstream in the same cycle, and then presents the
// stored address downstream from its register, so no combinational path runs
// from the interconnect's grant to the private cache's request. That adds one
// cycle to every L1.5 access. With ENABLE = 0 the stage is a wire.
//
// The stage and its enable parameter are part of the two-level cache's design,
// which leaves it disabled in the main configuration (the top passes
// USE_REQ_BUF = 0); the slot structure is this design's own.
module req_buffer #(
  parameter bit          ENABLE = 1'b1,
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              in_req_i,
  input  logic [ADDR_W-1:0] in_addr_i,
  output logic              in_gnt_o,
  output logic              out_req_o,
  output logic [ADDR_W-1:0] out_addr_o,
  input  logic              out_gnt_i
);

  if (ENABLE) begin : g_slot
    logic              full_q;
    logic [ADDR_W-1:0] addr_q;

    assign in_gnt_o   = !full_q || out_gnt_i;
    assign out_req_o  = full_q;
    assign out_addr_o = addr_q;

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        full_q <= 1'b0;
        addr_q <= '0;
      end else if (in_gnt_o) begin
        full_q <= in_req_i;
        if (in_req_i) addr_q <= in_addr_i;
      end
    end

    a_out_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
      out_req_o && !out_gnt_i |=> out_req_o && $stable(out_addr_o));
  end else begin : g_wire
    assign in_gnt_o   = out_gnt_i;
    assign out_req_o  = in_req_i;
    assign out_addr_o = in_addr_i;
  end

endmodule
