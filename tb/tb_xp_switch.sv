// tb_xp_switch: self-checking test of the 6x6 switch.
//
// Each input is fed by an ACK/NACK output buffer that sends random packets
// (1 to 5 flits) to random output ports. Each output ends in a model receiver
// that refuses flits at random and checks the protocol's ordering rule. The
// test checks that every packet arrives whole, at the output its route names,
// with the route shifted by one hop, without being interleaved with another
// packet, and in order for each input/output pair. It also checks the latency
// of an isolated flit (pushed into the sender in cycle t, taken at the output
// in cycle t+2: one cycle in the sender, one in the switch) and that output
// contention and refusals both happened.
module tb_xp_switch;
  import xp_pkg::*;

  localparam int N = 6;
  localparam int NPKT = 60;   // packets per input

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  link_fwd_t in_fwd  [N];
  link_bwd_t in_bwd  [N];
  link_fwd_t out_fwd [N];
  link_bwd_t out_bwd [N];
  logic [N-1:0] ev_refuse, ev_contention, ev_retransmit;

  xp_switch #(.NIN(N), .NOUT(N), .DEPTH(6)) dut (
    .clk, .rst_n, .in_fwd, .in_bwd, .out_fwd, .out_bwd,
    .ev_refuse, .ev_contention, .ev_retransmit
  );

  // Senders.
  logic  s_push [N];
  flit_t s_flit [N];
  logic  s_full [N];
  for (genvar i = 0; i < N; i++) begin : g_snd
    logic e, r;
    xp_out_buffer #(.DEPTH(6)) u_snd (
      .clk, .rst_n, .push(s_push[i]), .push_flit(s_flit[i]), .full(s_full[i]),
      .empty(e), .out_fwd(in_fwd[i]), .out_bwd(in_bwd[i]), .retransmit(r)
    );
  end

  // Expected packets per (input, output): flits as they must arrive.
  typedef flit_t pkt_t [$];
  flit_t exp_q [N][N][$];
  int    pkts_rcvd = 0;

  // Receivers.
  int   refuse_pct = 0;
  seq_t r_seq [N];
  logic r_rnd [N];
  logic r_take [N];
  int   r_src [N];     // input owning the packet in progress at this output, -1 if none
  int   n_contention = 0, n_refuse = 0;

  for (genvar o = 0; o < N; o++) begin : g_rcv
    always_ff @(posedge clk) r_rnd[o] <= ($urandom_range(99) >= refuse_pct);
    assign r_take[o]      = out_fwd[o].valid && out_fwd[o].seq == r_seq[o] && r_rnd[o];
    assign out_bwd[o].ack  = r_take[o];
    assign out_bwd[o].nack = out_fwd[o].valid && !r_take[o];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        r_seq[o] <= '0;
        r_src[o] <= -1;
      end else if (r_take[o]) begin
        automatic flit_t f = out_fwd[o].flit;
        automatic int src = r_src[o];
        r_seq[o] <= r_seq[o] + 1'b1;
        if (f.head) begin
          checks++;
          if (src != -1) begin
            failures++; $display("FAIL: out %0d head inside a packet", o);
          end
          src = int'(f.payload[11:8]);   // the sender's input number
        end
        if (src < 0 || src >= N || exp_q[src][o].size() == 0) begin
          failures++; $display("FAIL: out %0d unexpected flit %h", o, f);
        end else begin
          automatic flit_t e = exp_q[src][o].pop_front();
          checks++;
          if (f !== e) begin
            failures++; $display("FAIL: out %0d from in %0d got %h expected %h", o, src, f, e);
          end
        end
        if (f.tail) begin
          r_src[o] <= -1;
          pkts_rcvd++;
        end else r_src[o] <= src;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (|ev_contention) n_contention <= n_contention + 1;
    if (|ev_refuse)     n_refuse <= n_refuse + 1;
  end

  // Build one packet from input i to output o; returns the flits to push and
  // fills the expected queue with the flits as they must arrive.
  function automatic pkt_t make_pkt(int i, int o, int nflits, int tag);
    pkt_t p;
    for (int k = 0; k < nflits; k++) begin
      flit_t f;
      f.head = (k == 0);
      f.tail = (k == nflits - 1);
      if (k == 0) begin
        head_t h = '0;
        h.route = {PORT_W'(tag), PORT_W'($urandom_range(5)), PORT_W'(o)} | (route_t'($urandom) << (3*PORT_W));
        h.cmd   = 3'($urandom);
        h.src   = id_t'(i);
        h.len   = 4'(tag);
        f.payload = PAYLOAD_W'(h);
        p.push_back(f);
        h.route = h.route >> PORT_W;
        f.payload = PAYLOAD_W'(h);
        exp_q[i][o].push_back(f);
      end else begin
        f.payload = PAYLOAD_W'({$urandom, $urandom});
        p.push_back(f);
        exp_q[i][o].push_back(f);
      end
    end
    return p;
  endfunction

  task automatic send_pkt(int i, pkt_t p);
    foreach (p[k]) begin
      @(negedge clk);
      while (s_full[i]) @(negedge clk);
      s_push[i] = 1'b1;
      s_flit[i] = p[k];
      @(posedge clk);
      #1 s_push[i] = 1'b0;
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin s_push[i] = 0; s_flit[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // Latency of an isolated one-flit packet from input 2 to output 4.
    begin
      pkt_t p;
      int t0;
      p = make_pkt(2, 4, 1, 1);
      @(negedge clk);
      s_push[2] = 1'b1; s_flit[2] = p[0];
      @(posedge clk);               // the push is taken at this edge
      #1 s_push[2] = 1'b0;
      t0 = 0;
      for (int n = 1; n <= 6 && t0 == 0; n++) begin
        @(negedge clk);
        if (r_take[4]) t0 = n;
      end
      checks++;
      if (t0 != 2) begin
        failures++; $display("FAIL: latency %0d cycles, expected 2", t0);
      end
      repeat (2) @(posedge clk);
    end

    // Random traffic from all inputs at once, with random refusals.
    refuse_pct = 25;
    fork
      begin : f0 for (int n = 0; n < NPKT; n++) begin automatic int o = (n % 3 == 0) ? 0 : $urandom_range(N-1); send_pkt(0, make_pkt(0, o, $urandom_range(1,5), n)); end end
      begin : f1 for (int n = 0; n < NPKT; n++) begin automatic int o = (n % 3 == 0) ? 0 : $urandom_range(N-1); send_pkt(1, make_pkt(1, o, $urandom_range(1,5), n)); end end
      begin : f2 for (int n = 0; n < NPKT; n++) begin automatic int o = (n % 3 == 0) ? 0 : $urandom_range(N-1); send_pkt(2, make_pkt(2, o, $urandom_range(1,5), n)); end end
      begin : f3 for (int n = 0; n < NPKT; n++) begin automatic int o = $urandom_range(N-1); send_pkt(3, make_pkt(3, o, $urandom_range(1,5), n)); end end
      begin : f4 for (int n = 0; n < NPKT; n++) begin automatic int o = $urandom_range(N-1); send_pkt(4, make_pkt(4, o, $urandom_range(1,5), n)); end end
      begin : f5 for (int n = 0; n < NPKT; n++) begin automatic int o = $urandom_range(N-1); send_pkt(5, make_pkt(5, o, $urandom_range(1,5), n)); end end
    join
    repeat (200) @(posedge clk);

    checks++;
    if (pkts_rcvd != 1 + N * NPKT) begin
      failures++; $display("FAIL: %0d packets received, expected %0d", pkts_rcvd, 1 + N * NPKT);
    end
    for (int i = 0; i < N; i++)
      for (int o = 0; o < N; o++) begin
        checks++;
        if (exp_q[i][o].size() != 0) begin
          failures++; $display("FAIL: %0d flits from %0d to %0d never arrived", exp_q[i][o].size(), i, o);
        end
      end
    checks++;
    if (n_contention == 0) begin failures++; $display("FAIL: no output contention happened"); end
    checks++;
    if (n_refuse == 0) begin failures++; $display("FAIL: no refusal happened"); end
    $display("packets=%0d contention_cycles=%0d refusal_cycles=%0d", pkts_rcvd, n_contention, n_refuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
