// l2_axi_model: behavioural model of the L2 memory behind an AXI4 read port.
//
// Accepts read bursts on AR (ARREADY is high in a random 3 of 4 cycles, or
// always with RANDOM_READY = 0), and returns each burst LATENCY cycles or more
// after it was accepted, beat by beat with RLAST on the last one. The data of
// every beat is tb_icache_pkg::exp_beat of its address. With OUT_OF_ORDER = 1
// the burst to return next is picked at random among those whose latency has
// elapsed, so responses to different IDs come back out of order; a burst, once
// started, is sent to the end. Counts accepted bursts and the largest number
// that were outstanding at once.
module l2_axi_model #(
  parameter int unsigned ID_W         = 3,
  parameter int unsigned LATENCY      = 10,
  parameter bit          OUT_OF_ORDER = 1'b1,
  parameter bit          RANDOM_READY = 1'b1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            ar_valid_i,
  output logic            ar_ready_o,
  input  logic [31:0]     ar_addr_i,
  input  logic [ID_W-1:0] ar_id_i,
  input  logic [7:0]      ar_len_i,
  output logic            r_valid_o,
  input  logic            r_ready_i,
  output logic [63:0]     r_data_o,
  output logic [ID_W-1:0] r_id_o,
  output logic            r_last_o,
  output logic [1:0]      r_resp_o,
  output int              bursts_o,
  output int              max_outstanding_o
);
  import tb_icache_pkg::*;

  typedef struct {
    logic [31:0]     addr;
    logic [ID_W-1:0] id;
    int              len;
    longint          due;
  } burst_t;

  burst_t q[$];
  longint cyc;
  bit     active;
  burst_t cur;
  int     beat;

  assign r_resp_o = 2'b00;

  // active, beat, cur and cyc are the model's own state, updated in place
  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cyc               = 0;
      active            = 1'b0;
      beat              = 0;
      ar_ready_o        <= 1'b0;
      r_valid_o         <= 1'b0;
      r_data_o          <= '0;
      r_id_o            <= '0;
      r_last_o          <= 1'b0;
      bursts_o          <= 0;
      max_outstanding_o <= 0;
    end else begin
      cyc = cyc + 1;
      // address channel
      if (ar_valid_i && ar_ready_o) begin
        burst_t nb;
        nb.addr = ar_addr_i; nb.id = ar_id_i; nb.len = int'(ar_len_i) + 1;
        nb.due  = cyc + longint'(LATENCY);
        q.push_back(nb);
        bursts_o <= bursts_o + 1;
        if (q.size() + (active ? 1 : 0) > max_outstanding_o)
          max_outstanding_o <= q.size() + (active ? 1 : 0);
      end
      ar_ready_o <= RANDOM_READY ? (($urandom % 4) != 0) : 1'b1;
      // data channel
      if (!r_valid_o || r_ready_i) begin
        r_valid_o <= 1'b0;
        if (active && beat >= cur.len) active = 1'b0;
        if (!active) begin
          int pick;
          pick = -1;
          for (int i = 0; i < q.size(); i++)
            if (q[i].due <= cyc && (pick < 0 || (OUT_OF_ORDER && ($urandom % 2) == 0))) pick = i;
          if (pick >= 0) begin
            cur = q[pick];
            q.delete(pick);
            active = 1'b1;
            beat   = 0;
          end
        end
        if (active) begin
          r_valid_o <= 1'b1;
          r_data_o  <= exp_beat(cur.addr + 32'(beat * 8));
          r_id_o    <= cur.id;
          r_last_o  <= (beat == cur.len - 1);
          beat      = beat + 1;
        end
      end
    end
  end

endmodule
