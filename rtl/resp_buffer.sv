// resp_buffer: pipeline register on the response path from the interconnect to
// a private cache.
//
// With ENABLE = 1 the response valid bit and the 16-byte line are registered,
// so the path from an L1.5 bank's tag compare, through the interconnect, into
// the private cache and on to the core is cut in two; each response arrives one
// cycle later. With ENABLE = 0 the stage is a wire. The response path has no
// back-pressure: a private cache always takes the line it asked for.
//
// The stage, its enable parameter and its use in the main configuration
// (enabled) are part of the two-level cache's design; the data register only
// loads with a valid response, which is this design's choice.
module resp_buffer #(
  parameter bit          ENABLE = 1'b1,
  parameter int unsigned DATA_W = 128
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              in_rvalid_i,
  input  logic [DATA_W-1:0] in_rdata_i,
  output logic              out_rvalid_o,
  output logic [DATA_W-1:0] out_rdata_o
);

  if (ENABLE) begin : g_reg
    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        out_rvalid_o <= 1'b0;
        out_rdata_o  <= '0;
      end else begin
        out_rvalid_o <= in_rvalid_i;
        if (in_rvalid_i) out_rdata_o <= in_rdata_i;
      end
    end
  end else begin : g_wire
    assign out_rvalid_o = in_rvalid_i;
    assign out_rdata_o  = in_rdata_i;
  end

endmodule
