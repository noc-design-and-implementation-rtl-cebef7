// xp_link: network link with optional repeaters.
//
// A repeater is a clocked register placed along a long link so that a wire
// that cannot be crossed in one clock period is crossed in several. STAGES
// repeaters are placed on the forward path (valid, sequence number, flit) and
// the same number on the backward ACK/NACK path, so a pipelined link adds
// 2*STAGES cycles to the round trip. Because the ACK/NACK protocol of
// xp_out_buffer only needs responses in order, repeaters need no flow-control
// logic of their own and can be inserted transparently.
//
// The default, STAGES = 1, is the single pipeline stage that the long links
// of the larger reference topologies needed: such a link takes two cycles to
// cross, and no link there needed more. STAGES = 0 is a plain wire (a link
// crossed in one cycle, which the short links of the 4x4 mesh use). Reset
// clears the valid and ACK/NACK bits of every stage.
module xp_link
  import xp_pkg::*;
#(
  parameter int unsigned STAGES = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  link_fwd_t tx_fwd,   // from the sending output buffer
  output link_bwd_t tx_bwd,   // to the sending output buffer
  output link_fwd_t rx_fwd,   // to the receiver
  input  link_bwd_t rx_bwd    // from the receiver
);

  if (STAGES == 0) begin : g_wire
    assign rx_fwd = tx_fwd;
    assign tx_bwd = rx_bwd;
  end else begin : g_pipe
    link_fwd_t fwd_q [STAGES];
    link_bwd_t bwd_q [STAGES];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < STAGES; s++) begin
          fwd_q[s] <= '0;
          bwd_q[s] <= '0;
        end
      end else begin
        fwd_q[0] <= tx_fwd;
        bwd_q[0] <= rx_bwd;
        for (int s = 1; s < STAGES; s++) begin
          fwd_q[s] <= fwd_q[s-1];
          bwd_q[s] <= bwd_q[s-1];
        end
      end
    end

    assign rx_fwd = fwd_q[STAGES-1];
    assign tx_bwd = bwd_q[STAGES-1];
  end

endmodule
