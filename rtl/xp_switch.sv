// xp_switch: source-routed wormhole switch with output buffering and
// ACK/NACK flow control.
//
// NIN input links and NOUT output links; each output port has its own
// xp_out_buffer (DEPTH flits), which also keeps every flit until the next hop
// acknowledges it. There are no input buffers: a flit arriving on an input is
// either written straight into the output buffer it is heading for (ACK) or
// refused (NACK) and sent again later by the upstream buffer.
//
// Routing. A head flit names its output port in the low PORT_W bits of its
// route field. The switch forwards the head with the route shifted right by
// PORT_W, so the next switch finds its own port in the low bits again. The
// input remembers the port, and the body and tail flits of the packet follow
// it (wormhole switching).
//
// Arbitration. An output port is locked to one input from the moment it takes
// a head flit until it takes that packet's tail, so packets never interleave.
// When several head flits ask for a free output in the same cycle, a
// round-robin pointer per output picks one; the others are refused and retry.
// A flit is also refused when its output buffer is full, or when its sequence
// number is not the one the input expects (it follows a refused flit).
//
// Timing. Accept/refuse is decided in the cycle the flit arrives; an accepted
// flit leaves on the output link from the next cycle, so an unloaded switch
// adds one cycle per hop plus the link. The configuration of 6x6 ports and
// 6-flit buffers is the reference mesh switch; the round-robin policy and the
// per-output lock are this design's choices.
module xp_switch
  import xp_pkg::*;
#(
  parameter int unsigned NIN   = 6,
  parameter int unsigned NOUT  = 6,
  parameter int unsigned DEPTH = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  link_fwd_t in_fwd  [NIN],
  output link_bwd_t in_bwd  [NIN],
  output link_fwd_t out_fwd [NOUT],
  input  link_bwd_t out_bwd [NOUT],
  // Event strobes for performance counting.
  output logic [NIN-1:0]  ev_refuse,      // a flit was NACKed on that input
  output logic [NOUT-1:0] ev_contention,  // more than one head wanted that free output
  output logic [NOUT-1:0] ev_retransmit   // that output buffer rewound after a NACK
);

  localparam int unsigned IDX_W = (NIN > 1) ? $clog2(NIN) : 1;
  typedef logic [IDX_W-1:0] idx_t;

  // Per input: sequence check and the output port of the packet in progress.
  logic  [NIN-1:0] seq_ok, accept;
  port_t           cur_port [NIN];
  port_t           req_port [NIN];
  logic  [NIN-1:0] req_head;

  // Per output: lock owner, round-robin pointer, buffer status.
  logic [NOUT-1:0] locked, ob_full;
  idx_t            owner [NOUT];
  idx_t            rr    [NOUT];
  logic [NOUT-1:0] grant_any;
  idx_t            grant_idx [NOUT];
  logic [NOUT-1:0] push;
  flit_t           push_flit [NOUT];

  for (genvar i = 0; i < NIN; i++) begin : g_in
    xp_link_rx u_rx (
      .clk, .rst_n,
      .in_fwd (in_fwd[i]),
      .accept (accept[i]),
      .seq_ok (seq_ok[i]),
      .in_bwd (in_bwd[i])
    );

    head_t hd;
    assign hd          = head_t'(in_fwd[i].flit.payload);
    assign req_head[i] = in_fwd[i].flit.head;
    assign req_port[i] = in_fwd[i].flit.head ? hd.route[PORT_W-1:0] : cur_port[i];
    assign ev_refuse[i] = in_fwd[i].valid && !accept[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                          cur_port[i] <= '0;
      else if (accept[i] && req_head[i])   cur_port[i] <= req_port[i];
    end

    a_port_exists: assert property (@(posedge clk) disable iff (!rst_n)
      seq_ok[i] |-> (int'(req_port[i]) < NOUT));
  end

  // Output arbitration.
  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      automatic int unsigned nreq = 0;
      grant_any[o] = 1'b0;
      grant_idx[o] = '0;
      if (locked[o]) begin
        // Only the owner's body and tail flits may enter.
        if (seq_ok[owner[o]] && !req_head[owner[o]] &&
            int'(req_port[owner[o]]) == o && !ob_full[o]) begin
          grant_any[o] = 1'b1;
          grant_idx[o] = owner[o];
        end
      end else begin
        for (int k = 0; k < NIN; k++) begin
          // i = (rr + k) mod NIN, without a divider.
          automatic logic [IDX_W:0] sum = {1'b0, rr[o]} + (IDX_W+1)'(k);
          automatic idx_t i = (sum >= (IDX_W+1)'(NIN)) ? idx_t'(sum - (IDX_W+1)'(NIN)) : idx_t'(sum);
          if (seq_ok[i] && req_head[i] && int'(req_port[i]) == o) begin
            nreq++;
            if (!grant_any[o] && !ob_full[o]) begin
              grant_any[o] = 1'b1;
              grant_idx[o] = i;
            end
          end
        end
      end
      ev_contention[o] = (nreq > 1);
    end
  end

  always_comb begin
    accept = '0;
    for (int o = 0; o < NOUT; o++) begin
      automatic flit_t f = in_fwd[grant_idx[o]].flit;
      automatic head_t h = head_t'(f.payload);
      push[o] = grant_any[o];
      if (grant_any[o]) accept[grant_idx[o]] = 1'b1;
      if (f.head) begin
        h.route  = h.route >> PORT_W;
        f.payload = PAYLOAD_W'(h);
      end
      push_flit[o] = f;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NOUT; o++) begin
        locked[o] <= 1'b0;
        owner[o]  <= '0;
        rr[o]     <= '0;
      end
    end else begin
      for (int o = 0; o < NOUT; o++) begin
        if (grant_any[o]) begin
          automatic flit_t f = in_fwd[grant_idx[o]].flit;
          if (f.head) begin
            owner[o] <= grant_idx[o];
            rr[o]    <= (int'(grant_idx[o]) == NIN - 1) ? '0 : grant_idx[o] + 1'b1;
          end
          locked[o] <= !f.tail;
        end
      end
    end
  end

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    logic unused_empty;
    xp_out_buffer #(.DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .push       (push[o]),
      .push_flit  (push_flit[o]),
      .full       (ob_full[o]),
      .empty      (unused_empty),
      .out_fwd    (out_fwd[o]),
      .out_bwd    (out_bwd[o]),
      .retransmit (ev_retransmit[o])
    );
  end

endmodule
