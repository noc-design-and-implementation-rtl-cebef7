// xp_link_rx: receiving end of an ACK/NACK link.
//
// It tracks the sequence number it expects next. A flit is offered to the
// receiving logic (seq_ok) only when it carries that number; the receiving
// logic answers with accept in the same cycle when it has room for the flit.
// Every valid flit gets exactly one response: ACK when accepted, NACK
// otherwise. Once a flit has been refused, later flits carry other sequence
// numbers and are refused too, until the sender's retransmission of the
// refused flit arrives; this keeps flits in order without any buffer at the
// receiver. The response is combinational (same cycle as the flit); repeaters
// in xp_link add any register stages.
module xp_link_rx
  import xp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  link_fwd_t in_fwd,
  input  logic      accept,   // receiver takes in_fwd.flit this cycle
  output logic      seq_ok,   // a valid flit with the expected sequence number
  output link_bwd_t in_bwd
);

  seq_t exp_seq;

  assign seq_ok      = in_fwd.valid && (in_fwd.seq == exp_seq);
  assign in_bwd.ack  = accept;
  assign in_bwd.nack = in_fwd.valid && !accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      exp_seq <= '0;
    else if (accept) exp_seq <= exp_seq + 1'b1;
  end

  a_accept_only_expected: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> seq_ok);

endmodule
