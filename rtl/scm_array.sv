// scm_array: standard-cell memory used for the TAG and DATA arrays of the caches.
//
// One write port and one read port. A read enabled in one cycle delivers its
// row in the next cycle and the output holds until the next read, so the
// caller can read in the grant cycle and compare in the following one. A row
// written and read in the same cycle returns its old content.
//
// The caches keep their arrays in standard-cell memories for low-voltage,
// low-energy operation. Here the array is written as a plain register array
// with a registered read; the latch-and-clock-gate arrangement of a real SCM is
// a physical-design choice of this code's user. The contents are not reset: the
// caches keep separate valid bits. Neither cache reads and writes an array in
// the same cycle, so a single-port memory can take the place of this one.
module scm_array #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk_i,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic             re_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  always_ff @(posedge clk_i) begin
    if (re_i) rdata_o <= mem[raddr_i];
  end

endmodule
