// xp_out_buffer: output FIFO with ACK/NACK retransmission (go-back-N).
//
// Every link of the network is driven by one of these buffers: the output
// ports of a switch and the network-side output of each network interface.
// A flit pushed in stays in the buffer until the receiver at the far end of
// the link acknowledges it, so the buffer is at once the switch's output
// buffer and the retransmission store of the ACK/NACK protocol.
//
// How it works. Three pointers walk a circular store of DEPTH entries:
// wr_ptr (next free slot), send_ptr (next flit to transmit) and ack_ptr
// (oldest flit not yet acknowledged). One flit is transmitted per cycle from
// send_ptr while any are unsent. Responses come back in transmission order, so
// each response that counts belongs to the flit at ack_ptr: an ACK frees it, a
// NACK rewinds send_ptr to it. After a NACK the receiver refuses every flit
// until the retransmitted one arrives, so the responses to flits that were
// already on the wire at the time of the NACK are all NACKs and are dropped
// (ign_cnt counts them). Each flit is stored with a sequence number so that the
// receiver can tell the retransmitted flit from stale ones. Because the
// protocol only needs responses to come back in order, any number of register
// stages (repeaters) may sit on the link without changing this block.
//
// Interface and timing. push/push_flit write one flit per cycle when
// full is low. The link outputs are registered: a flit pushed into an empty
// buffer is on the wire the next cycle. ack/nack may arrive in the same cycle
// as the flit they answer (unpipelined link) or any fixed number of cycles
// later. Throughput is one flit per cycle as long as DEPTH exceeds the round
// trip of the link. The buffer depth of 6 follows the reference 6x6 switch;
// the go-back-N mechanics and the sequence numbers are this design's choice.
// The storage flops only load on a push, so they can take a clock-gated
// enable in synthesis.
module xp_out_buffer
  import xp_pkg::*;
#(
  parameter int unsigned DEPTH = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  flit_t     push_flit,
  output logic      full,
  output logic      empty,      // nothing stored, nothing awaiting an ACK
  output link_fwd_t out_fwd,
  input  link_bwd_t out_bwd,
  output logic      retransmit  // pulses when a NACK rewinds the buffer
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);
  localparam int unsigned IFL_W = $clog2(DEPTH + 2);

  typedef logic [PTR_W-1:0] ptr_t;
  typedef logic [CNT_W-1:0] cnt_t;

  flit_t mem_flit [DEPTH];
  seq_t  mem_seq  [DEPTH];

  ptr_t wr_ptr, send_ptr, ack_ptr;
  cnt_t count;     // stored flits (sent or not) not yet acknowledged
  cnt_t unsent;    // stored flits from send_ptr to wr_ptr
  seq_t next_seq;
  logic [IFL_W-1:0] inflight;  // transmissions still waiting for a response
  logic [IFL_W-1:0] ign_cnt;   // responses to drop after a rewind

  link_fwd_t out_q;

  function automatic ptr_t inc(ptr_t p);
    return (p == ptr_t'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full    = (count == cnt_t'(DEPTH));
  assign empty   = (count == '0);
  assign out_fwd = out_q;

  logic resp, resp_ign, got_ack, got_nack, do_push;
  assign resp     = out_bwd.ack | out_bwd.nack;
  assign resp_ign = resp && (ign_cnt != '0);
  assign got_ack  = out_bwd.ack  && !resp_ign;
  assign got_nack = out_bwd.nack && !resp_ign;
  assign do_push  = push && !full;
  assign retransmit = got_nack;

  always_ff @(posedge clk) begin
    if (do_push) begin
      mem_flit[wr_ptr] <= push_flit;
      mem_seq[wr_ptr]  <= next_seq;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      send_ptr <= '0;
      ack_ptr  <= '0;
      count    <= '0;
      unsent   <= '0;
      next_seq <= '0;
      inflight <= '0;
      ign_cnt  <= '0;
      out_q    <= '0;
    end else begin
      automatic ptr_t send_p = send_ptr;
      automatic cnt_t uns    = unsent;
      automatic cnt_t cnt    = count;
      automatic logic [IFL_W-1:0] ifl = inflight + IFL_W'(out_q.valid)
                                        - IFL_W'(resp);

      if (resp_ign) ign_cnt <= ign_cnt - 1'b1;

      if (got_ack) begin
        ack_ptr <= inc(ack_ptr);
        cnt = cnt - 1'b1;
      end

      if (got_nack) begin
        // Go back to the oldest unacknowledged flit; every response still due
        // belongs to a flit sent before this point and will be a NACK.
        send_p  = ack_ptr;
        uns     = cnt;
        ign_cnt <= ifl;
      end

      if (do_push) begin
        wr_ptr   <= inc(wr_ptr);
        next_seq <= next_seq + 1'b1;
      end

      // Launch the next transmission from the state after this cycle's
      // responses. With nothing else waiting, a flit pushed this cycle goes
      // straight to the output register (bypass) and is on the wire next cycle.
      if (uns != '0) begin
        out_q.valid <= 1'b1;
        out_q.seq   <= mem_seq[send_p];
        out_q.flit  <= mem_flit[send_p];
        send_p = inc(send_p);
        uns    = uns - 1'b1;
        if (do_push) uns = uns + 1'b1;
      end else if (do_push) begin
        out_q.valid <= 1'b1;
        out_q.seq   <= next_seq;
        out_q.flit  <= push_flit;
        send_p = inc(send_p);
      end else begin
        out_q.valid <= 1'b0;
      end

      if (do_push) cnt = cnt + 1'b1;

      send_ptr <= send_p;
      unsent   <= uns;
      count    <= cnt;
      inflight <= ifl;
    end
  end

  // A response that is dropped after a rewind must be a NACK.
  a_ignored_is_nack: assert property (@(posedge clk) disable iff (!rst_n)
    resp_ign |-> out_bwd.nack);
  // Never an ACK and a NACK together, and never a response with nothing sent.
  a_resp_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    !(out_bwd.ack && out_bwd.nack));
  a_resp_has_flit: assert property (@(posedge clk) disable iff (!rst_n)
    resp |-> (inflight != '0 || out_q.valid));

endmodule
