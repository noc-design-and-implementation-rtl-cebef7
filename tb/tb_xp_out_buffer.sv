// tb_xp_out_buffer: self-checking test of the ACK/NACK output buffer.
//
// The buffer drives a model link whose forward and backward delays are set at
// run time (0, 1 or 2 cycles each way) and a model receiver that refuses flits at
// random. The receiver keeps its own expected sequence number and refuses
// everything out of order, as the protocol requires. Every flit taken by the
// receiver is compared with the list of pushed flits: no loss, no duplicate,
// same order. Phase 1 checks the rate: with a receiver that never refuses and
// an unpipelined link, 40 flits pushed back to back arrive in 40 consecutive
// cycles; phase 4 checks the same rate through one repeater each way.
module tb_xp_out_buffer;
  import xp_pkg::*;

  localparam int DEPTH = 6;
  localparam int MAXLAT = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic      push;
  flit_t     push_flit;
  logic      full, empty, retx;
  link_fwd_t out_fwd;
  link_bwd_t out_bwd;

  xp_out_buffer #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .push, .push_flit, .full, .empty,
    .out_fwd, .out_bwd, .retransmit(retx)
  );

  // Link model with run-time delay.
  int lat = 0;
  link_fwd_t fq [MAXLAT];
  link_bwd_t bq [MAXLAT];
  link_fwd_t rx_fwd;
  link_bwd_t rx_bwd;
  assign rx_fwd  = (lat == 0) ? out_fwd : fq[lat-1];
  assign out_bwd = (lat == 0) ? rx_bwd  : bq[lat-1];
  always_ff @(posedge clk) begin
    fq[0] <= out_fwd; bq[0] <= rx_bwd;
    for (int s = 1; s < MAXLAT; s++) begin fq[s] <= fq[s-1]; bq[s] <= bq[s-1]; end
  end

  // Receiver model.
  int   refuse_pct = 0;
  seq_t exp_seq;
  logic take;
  logic rnd_ok;
  always_ff @(posedge clk) rnd_ok <= ($urandom_range(99) >= refuse_pct);
  assign take       = rx_fwd.valid && rx_fwd.seq == exp_seq && rnd_ok;
  assign rx_bwd.ack  = take;
  assign rx_bwd.nack = rx_fwd.valid && !take;

  flit_t sent_q [$];
  int    recv_cnt, nacks, retx_cnt;
  int    first_rx_cycle, last_rx_cycle, cycle;

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) exp_seq <= '0;
    else begin
      if (rx_fwd.valid && !take) nacks <= nacks + 1;
      if (retx) retx_cnt <= retx_cnt + 1;
      if (take) begin
        exp_seq <= exp_seq + 1'b1;
        checks++;
        if (sent_q.size() == 0) begin
          failures++;
          $display("FAIL: flit received with nothing outstanding");
        end else begin
          automatic flit_t e = sent_q.pop_front();
          if (rx_fwd.flit !== e) begin
            failures++;
            $display("FAIL: got %h expected %h", rx_fwd.flit, e);
          end
        end
        if (recv_cnt == 0) first_rx_cycle <= cycle;
        last_rx_cycle <= cycle;
        recv_cnt <= recv_cnt + 1;
      end
    end
  end

  task automatic run_phase(int n, int l, int pct, int push_pct);
    int pushed = 0;
    lat = l; refuse_pct = pct;
    recv_cnt = 0;
    repeat (2) @(posedge clk);
    while (pushed < n) begin
      @(negedge clk);
      if ($urandom_range(99) < push_pct) begin
        automatic flit_t f = flit_t'({$urandom, $urandom});
        push_flit = f;
        push      = 1'b1;
        if (!full) begin
          sent_q.push_back(f);
          pushed++;
        end
      end else push = 1'b0;
      @(posedge clk);
    end
    @(negedge clk);
    push = 1'b0;
    while (!empty) @(posedge clk);
    repeat (4) @(posedge clk);
    checks++;
    if (sent_q.size() != 0 || recv_cnt != n) begin
      failures++;
      $display("FAIL: phase lat=%0d refuse=%0d: %0d of %0d delivered", l, pct, recv_cnt, n);
    end
  endtask

  initial begin
    push = 0; push_flit = '0; recv_cnt = 0; nacks = 0; retx_cnt = 0; cycle = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // Phase 1: full rate, no refusals, unpipelined link.
    run_phase(40, 0, 0, 100);
    checks++;
    if (last_rx_cycle - first_rx_cycle != 39) begin
      failures++;
      $display("FAIL: 40 flits took %0d cycles", last_rx_cycle - first_rx_cycle + 1);
    end
    checks++;
    if (nacks != 0 || retx_cnt != 0) begin
      failures++; $display("FAIL: refusals without cause");
    end

    // Phase 2: random refusals, unpipelined link.
    run_phase(300, 0, 30, 80);
    // Phase 3: random refusals, two repeaters each way.
    run_phase(300, 2, 30, 80);
    // Phase 4: full rate through one repeater each way.
    begin
      int n0;
      n0 = nacks;
      run_phase(60, 1, 0, 100);
      checks++;
      if (nacks != n0) begin failures++; $display("FAIL: refusals in phase 4"); end
      checks++;
      if (last_rx_cycle - first_rx_cycle != 59) begin
        failures++;
        $display("FAIL: 60 flits took %0d cycles with repeaters", last_rx_cycle - first_rx_cycle + 1);
      end
    end

    checks++;
    if (retx_cnt == 0) begin failures++; $display("FAIL: no retransmission exercised"); end
    $display("refusals=%0d retransmissions=%0d", nacks, retx_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
