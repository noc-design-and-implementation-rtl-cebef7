// tb_xp_mesh_traffic: traffic and checking for mesh testbenches.
//
// One model master core per tile drives that tile's initiator port with
// random OCP write and read bursts (1 to 8 beats, random byte enables) to
// random target tiles; one model memory per tile answers on the tile's target
// port, accepting commands after random delays. Each master only touches its
// own slice of every memory (address bits [15:12] hold the master's tile), so
// it can predict every read from its own record of what it wrote; unwritten
// words read as init_word(address). Core clocks run at the network clock
// divided by 1, 2 or 3 depending on the tile.
//
// MODE 1 maps the DES encryption benchmark instead: tiles 0-7 hold the eight
// processors, each with its private memory on the target port of its own tile,
// and tiles 8, 9 and 10 hold the shared memory, the semaphore device and the
// interrupt device. Each processor sends 15 of every 16 transactions (8-beat
// bursts) to its private memory and the 16th to one of the shared devices, and
// all core clocks equal the network clock, and the model cores never stall. The module then reports the data
// rate each processor sustained, in 32-bit words per network cycle.
//
// Phase 1 sends one write from tile 0 to the opposite corner with the rest of
// the mesh idle, so the wrapper can measure the unloaded head-flit latency.
// Phase 2 runs NTRANS transactions on every tile at once. The module counts
// the mechanisms the mesh must show (refusals, output contention,
// retransmissions, bursts, multi-hop paths, divided core clocks) and reports
// done with its check and failure counts.
module tb_xp_mesh_traffic
  import xp_pkg::*;
#(
  parameter int NT     = 16,
  parameter int COLS   = 4,
  parameter int NTRANS = 20,
  parameter int MODE   = 0     // 0: random all-to-all; 1: DES benchmark mapping
) (
  input  logic      clk,
  input  logic      rst_n,
  output logic [NT-1:0] ocp_en,
  output ocp_req_t  init_req        [NT],
  input  logic      init_cmd_accept [NT],
  input  ocp_resp_t init_resp       [NT],
  output logic      init_resp_accept[NT],
  input  ocp_req_t  tgt_req         [NT],
  output logic      tgt_cmd_accept  [NT],
  output ocp_resp_t tgt_resp        [NT],
  input  logic      tgt_resp_accept [NT],
  input  logic [NT-1:0] ev_refuse,
  input  logic [NT-1:0] ev_contention,
  input  logic [NT-1:0] ev_retransmit,
  output logic      solo_done,
  output logic      done,
  output int        checks,
  output int        failures
);

  function automatic logic [31:0] init_word(logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5a5a_0f0f;
  endfunction

  int chk [NT];
  int fail [NT];
  logic [NT-1:0] mdone;
  int n_burst, n_far, n_slow, n_refuse, n_cont, n_retx;
  int n_wr [NT];
  int n_rd [NT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_refuse <= 0; n_cont <= 0; n_retx <= 0;
    end else begin
      n_refuse <= n_refuse + $countones(ev_refuse);
      n_cont   <= n_cont + $countones(ev_contention);
      n_retx   <= n_retx + $countones(ev_retransmit);
    end
  end

  logic go;
  int cyc;
  int t_start [NT];
  int t_end [NT];
  int words [NT];
  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  for (genvar t = 0; t < NT; t++) begin : g_t
    localparam int RATIO = (MODE == 1) ? 1 : 1 + (t % 3);
    int en_cnt;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) en_cnt <= 0;
      else       en_cnt <= (en_cnt == RATIO - 1) ? 0 : en_cnt + 1;
    assign ocp_en[t] = (en_cnt == RATIO - 1);

    // ---------------- model memory on the target port ----------------
    logic [31:0] mem [int];
    logic [31:0] rq [$];
    logic        acc_rnd;
    assign tgt_cmd_accept[t] = acc_rnd;
    always_comb begin
      tgt_resp[t].SResp = (rq.size() > 0) ? OCP_DVA : OCP_NULL;
      tgt_resp[t].SData = (rq.size() > 0) ? rq[0] : '0;
    end
    always @(posedge clk) begin
      if (!rst_n) acc_rnd <= 1'b0;
      else if (ocp_en[t]) begin
        acc_rnd <= (MODE == 1) || ($urandom_range(3) != 0);
        if (rq.size() > 0 && tgt_resp_accept[t]) void'(rq.pop_front());
        if (tgt_req[t].MCmd == OCP_WR && acc_rnd) begin
          automatic int w = int'(tgt_req[t].MAddr[15:2]);
          automatic logic [31:0] v = mem.exists(w) ? mem[w] : init_word(tgt_req[t].MAddr);
          for (int k = 0; k < 4; k++)
            if (tgt_req[t].MByteEn[k]) v[8*k +: 8] = tgt_req[t].MData[8*k +: 8];
          mem[w] = v;
          if (tgt_req[t].MAddr[31:28] != 4'(t)) begin
            fail[t]++; $display("FAIL: tile %0d memory got address %h", t, tgt_req[t].MAddr);
          end
        end
        if (tgt_req[t].MCmd == OCP_RD && acc_rnd)
          for (int k = 0; k < int'(tgt_req[t].MBurstLength); k++) begin
            automatic logic [31:0] a = tgt_req[t].MAddr + 32'(4 * k);
            automatic int w = int'(a[15:2]);
            rq.push_back(mem.exists(w) ? mem[w] : init_word(a));
          end
      end
    end

    // ---------------- model master on the initiator port ----------------
    logic [31:0] refm [int];
    ocp_resp_t   seen;

    task automatic edge_wait(output logic acc, output logic rsp);
      @(negedge clk);
      while (!ocp_en[t]) @(negedge clk);
      acc  = init_cmd_accept[t];
      rsp  = (init_resp[t].SResp != OCP_NULL) && init_resp_accept[t];
      seen = init_resp[t];
      @(posedge clk);
      #1;
    endtask

    task automatic xact(bit is_wr, int tgt, int len);
      logic [31:0] addr, a;
      logic [31:0] wdata [8];
      logic [3:0]  wbe [8];
      logic acc, rsp;
      int beat;
      addr = {4'(tgt), 12'h0, 4'(t), 6'($urandom), 4'h0, 2'b00};
      for (int b = 0; b < len; b++) begin wdata[b] = $urandom; wbe[b] = 4'($urandom_range(1, 15)); end
      beat = 0;
      while (beat < (is_wr ? len : 1)) begin
        init_req[t].MCmd         = is_wr ? OCP_WR : OCP_RD;
        init_req[t].MAddr        = addr + 32'(4 * beat);
        init_req[t].MData        = wdata[beat];
        init_req[t].MByteEn      = is_wr ? wbe[beat] : 4'hf;
        init_req[t].MBurstLength = BURST_W'(len);
        edge_wait(acc, rsp);
        if (acc) beat++;
      end
      init_req[t] = '0;
      if (is_wr)
        for (int b = 0; b < len; b++) begin
          automatic logic [31:0] ad = addr + 32'(4 * b);
          automatic int w = int'({ad[31:28], ad[15:2]});
          automatic logic [31:0] v = refm.exists(w) ? refm[w] : init_word(ad);
          for (int k = 0; k < 4; k++) if (wbe[b][k]) v[8*k +: 8] = wdata[b][8*k +: 8];
          refm[w] = v;
        end
      beat = 0;
      while (beat < (is_wr ? 1 : len)) begin
        init_resp_accept[t] = (MODE == 1) || ($urandom_range(3) != 0);
        edge_wait(acc, rsp);
        if (rsp) begin
          a = addr + 32'(4 * beat);
          chk[t]++;
          if (seen.SResp != OCP_DVA) begin
            fail[t]++; $display("FAIL: tile %0d response %0d", t, seen.SResp);
          end else if (!is_wr) begin
            automatic int w = int'({a[31:28], a[15:2]});
            automatic logic [31:0] e = refm.exists(w) ? refm[w] : init_word(a);
            if (seen.SData != e) begin
              fail[t]++; $display("FAIL: tile %0d read %h got %h expected %h", t, a, seen.SData, e);
            end
          end
          beat++;
        end
      end
      init_resp_accept[t] = 1'b0;
      if (is_wr) n_wr[t]++; else n_rd[t]++;
      if (len > 1) n_burst++;
      if (RATIO > 1) n_slow++;
      begin
        automatic int dx = (tgt % COLS > t % COLS) ? tgt % COLS - t % COLS : t % COLS - tgt % COLS;
        automatic int dy = (tgt / COLS > t / COLS) ? tgt / COLS - t / COLS : t / COLS - tgt / COLS;
        if (dx + dy >= 4) n_far++;
      end
    endtask

    initial begin
      init_req[t] = '0;
      init_resp_accept[t] = 1'b0;
      chk[t] = 0; fail[t] = 0; n_wr[t] = 0; n_rd[t] = 0; words[t] = 0;
      mdone[t] = 1'b0;
      if (t == 0) begin
        solo_done = 1'b0;
        wait (rst_n);
        repeat (4) @(posedge clk);
        xact(1'b1, NT - 1, 1);
        xact(1'b0, NT - 1, 1);
        solo_done = 1'b1;
      end
      wait (go);
      t_start[t] = cyc;
      if (MODE == 0)
        for (int n = 0; n < NTRANS; n++)
          xact(1'($urandom_range(1)), $urandom_range(NT - 1), $urandom_range(1, 8));
      else if (t < 8)
        for (int n = 0; n < NTRANS; n++) begin
          automatic int tg = (n % 16 == 15) ? 8 + (n / 16) % 3 : t;
          xact(1'($urandom_range(1)), tg, 8);
          words[t] += 8;
        end
      t_end[t] = cyc;
      mdone[t] = 1'b1;
    end
  end

  initial begin
    go = 1'b0; done = 1'b0;
    n_burst = 0; n_far = 0; n_slow = 0;
    checks = 0; failures = 0;
    wait (rst_n);
    wait (solo_done);
    repeat (10) @(posedge clk);
    go = 1'b1;
    wait (&mdone);
    repeat (20) @(posedge clk);
    for (int t = 0; t < NT; t++) begin checks += chk[t]; failures += fail[t]; end
    if (MODE == 0) begin
      // Every mechanism must have happened.
      checks += 6;
      if (n_refuse == 0) begin failures++; $display("FAIL: no refusal (NACK) happened"); end
      if (n_cont == 0)   begin failures++; $display("FAIL: no output contention happened"); end
      if (n_retx == 0)   begin failures++; $display("FAIL: no retransmission happened"); end
      if (n_burst == 0)  begin failures++; $display("FAIL: no burst transaction"); end
      if (n_far == 0)    begin failures++; $display("FAIL: no long path exercised"); end
      if (n_slow == 0)   begin failures++; $display("FAIL: no divided core clock exercised"); end
    end else begin
      automatic real wpc = 0.0;
      for (int t = 0; t < 8; t++) begin
        automatic real r = real'(words[t]) / real'(t_end[t] - t_start[t]);
        $display("processor %0d: %0d words in %0d cycles = %0.3f words/cycle", t, words[t], t_end[t] - t_start[t], r);
        wpc += r / 8.0;
      end
      $display("mean sustained rate %0.3f words/cycle per processor: 180 MB/s needs a network clock of %0.1f MHz",
               wpc, 180.0 / (4.0 * wpc));
    end
    $display("mechanisms: refusal_cycles=%0d contention_cycles=%0d retransmissions=%0d bursts=%0d long_paths=%0d divided_clock_transactions=%0d",
             n_refuse, n_cont, n_retx, n_burst, n_far, n_slow);
    done = 1'b1;
  end

endmodule
