// tb_xp_ni_initiator: self-checking test of the initiator network interface.
//
// A model master core issues random OCP write bursts and read bursts (1 to 8
// beats) to random targets. On the network side a model receiver takes the
// request flits, refusing some at random (ACK/NACK), and checks the whole
// packet: route taken from the table for the target named by the address,
// command, the interface's id, burst length, address, data and byte enables,
// head and tail marks. It then answers with a response packet sent through an
// ACK/NACK buffer, and the master checks the response data it gets over OCP.
// The test runs with the core clock equal to the network clock and at one
// third of it; at one third, every OCP output change and every accepted beat
// must fall on a core clock edge.
module tb_xp_ni_initiator;
  import xp_pkg::*;

  localparam int NT = 16;
  localparam int MY_ID = 5;

  function automatic route_t lut_entry(int t);
    return route_t'(t * 32'h0001_2345 + 7);
  endfunction
  typedef route_t lut_t [NT];
  function automatic lut_t make_lut();
    lut_t l;
    for (int t = 0; t < NT; t++) l[t] = lut_entry(t);
    return l;
  endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // Core clock enable: one cycle in `ratio`.
  int   ratio = 1;
  int   en_cnt = 0;
  logic ocp_en;
  assign ocp_en = (en_cnt == ratio - 1);
  always_ff @(posedge clk) en_cnt <= (en_cnt >= ratio - 1) ? 0 : en_cnt + 1;

  ocp_req_t  ocp_req;
  logic      ocp_cmd_accept, ocp_resp_accept;
  ocp_resp_t ocp_resp;
  link_fwd_t out_fwd, in_fwd;
  link_bwd_t out_bwd, in_bwd;

  xp_ni_initiator #(.NTGT(NT), .TGT_W(4), .MY_ID(MY_ID), .ROUTE_LUT(make_lut())) dut (
    .clk, .rst_n, .ocp_en,
    .ocp_req, .ocp_cmd_accept, .ocp_resp, .ocp_resp_accept,
    .net_out_fwd(out_fwd), .net_out_bwd(out_bwd),
    .net_in_fwd(in_fwd), .net_in_bwd(in_bwd)
  );

  // Network-side receiver of requests.
  int    refuse_pct = 30;
  seq_t  r_seq;
  logic  r_rnd, r_take;
  flit_t req_flits [$];
  int    n_refused = 0;
  always_ff @(posedge clk) r_rnd <= ($urandom_range(99) >= refuse_pct);
  assign r_take      = out_fwd.valid && out_fwd.seq == r_seq && r_rnd;
  assign out_bwd.ack  = r_take;
  assign out_bwd.nack = out_fwd.valid && !r_take;
  always_ff @(posedge clk) begin
    if (!rst_n) r_seq <= '0;
    else begin
      if (r_take) begin
        r_seq <= r_seq + 1'b1;
        req_flits.push_back(out_fwd.flit);
      end
      if (out_fwd.valid && !r_take) n_refused <= n_refused + 1;
    end
  end

  // Network-side sender of responses.
  logic  s_push, s_full, s_empty, s_retx;
  flit_t s_flit;
  xp_out_buffer #(.DEPTH(6)) u_snd (
    .clk, .rst_n, .push(s_push), .push_flit(s_flit), .full(s_full), .empty(s_empty),
    .out_fwd(in_fwd), .out_bwd(in_bwd), .retransmit(s_retx)
  );

  task automatic net_send(flit_t f);
    @(negedge clk);
    while (s_full) @(negedge clk);
    s_push = 1'b1; s_flit = f;
    @(posedge clk);
    #1 s_push = 1'b0;
  endtask

  // Wait for a core clock edge; returns whether the NI accepted the command
  // and whether a response was taken at it.
  logic off_edge_change = 0;
  ocp_resp_t seen;
  task automatic ocp_edge(output logic acc, output logic rsp);
    @(negedge clk);
    while (!ocp_en) @(negedge clk);
    acc  = ocp_cmd_accept;
    rsp  = (ocp_resp.SResp != OCP_NULL) && ocp_resp_accept;
    seen = ocp_resp;
    @(posedge clk);
    #1;
  endtask

  // OCP outputs of the NI may only change right after a core clock edge.
  ocp_resp_t resp_prev;
  logic      en_prev;
  always_ff @(posedge clk) begin
    resp_prev <= ocp_resp;
    en_prev   <= ocp_en;
    if (rst_n && !en_prev && ocp_resp !== resp_prev) off_edge_change <= 1'b1;
    if (rst_n && ocp_cmd_accept && !ocp_en) off_edge_change <= 1'b1;
  end

  int n_wr = 0, n_rd = 0;

  task automatic transaction(bit is_wr, int tgt, int len);
    logic [31:0] addr;
    logic [31:0] wdata [8];
    logic [3:0]  wbe [8];
    logic [31:0] rdata [8];
    logic acc, rsp;
    int beat;
    addr = {tgt[3:0], 28'($urandom) & ~28'h3};
    for (int b = 0; b < len; b++) begin wdata[b] = $urandom; wbe[b] = 4'($urandom); rdata[b] = $urandom; end

    fork
      // Master core.
      begin
        beat = 0;
        while (beat < (is_wr ? len : 1)) begin
          ocp_req.MCmd         = is_wr ? OCP_WR : OCP_RD;
          ocp_req.MAddr        = addr + 32'(beat * 4);
          ocp_req.MData        = wdata[beat];
          ocp_req.MByteEn      = is_wr ? wbe[beat] : 4'hf;
          ocp_req.MBurstLength = BURST_W'(len);
          ocp_edge(acc, rsp);
          if (acc) beat++;
        end
        ocp_req = '0;
        beat = 0;
        while (beat < (is_wr ? 1 : len)) begin
          ocp_resp_accept = ($urandom_range(3) != 0);
          ocp_edge(acc, rsp);
          if (rsp) begin
            checks++;
            if (seen.SResp != OCP_DVA || (!is_wr && seen.SData != rdata[beat])) begin
              failures++;
              $display("FAIL: response beat %0d: %0d %h expected %h", beat, seen.SResp, seen.SData, rdata[beat]);
            end
            beat++;
          end
        end
        ocp_resp_accept = 1'b0;
      end
      // Network: check the request packet, then answer it.
      begin
        automatic int nfl = is_wr ? 2 + len : 2;
        automatic head_t h;
        automatic body_t b;
        while (req_flits.size() < nfl) @(posedge clk);
        checks++;
        if (req_flits.size() != nfl) begin failures++; $display("FAIL: too many flits"); end
        h = head_t'(req_flits[0].payload);
        checks++;
        if (!req_flits[0].head || req_flits[0].tail || h.route != lut_entry(tgt) ||
            h.cmd != (is_wr ? OCP_WR : OCP_RD) || h.src != MY_ID || h.len != LEN_W'(len - 1)) begin
          failures++; $display("FAIL: bad head flit %h", req_flits[0]);
        end
        b = body_t'(req_flits[1].payload);
        checks++;
        if (req_flits[1].head || req_flits[1].tail != !is_wr || b.data != addr) begin
          failures++; $display("FAIL: bad address flit %h", req_flits[1]);
        end
        if (is_wr)
          for (int k = 0; k < len; k++) begin
            b = body_t'(req_flits[2+k].payload);
            checks++;
            if (req_flits[2+k].head || req_flits[2+k].tail != (k == len - 1) ||
                b.data != wdata[k] || b.be != wbe[k]) begin
              failures++; $display("FAIL: bad data flit %0d %h", k, req_flits[2+k]);
            end
          end
        req_flits.delete();
        h = '0;
        h.route = route_t'($urandom);
        h.cmd   = {1'b0, OCP_DVA};
        h.src   = id_t'(tgt);
        h.len   = LEN_W'(len - 1);
        net_send('{head: 1'b1, tail: is_wr, payload: PAYLOAD_W'(h)});
        if (!is_wr)
          for (int k = 0; k < len; k++)
            net_send('{head: 1'b0, tail: (k == len - 1), payload: PAYLOAD_W'({4'hf, rdata[k]})});
      end
    join
    if (is_wr) n_wr++; else n_rd++;
  endtask

  initial begin
    ocp_req = '0; ocp_resp_accept = 0; s_push = 0; s_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      if (n == 30) ratio = 3;
      transaction($urandom_range(1), $urandom_range(NT - 1), $urandom_range(1, 8));
    end
    checks++;
    if (off_edge_change) begin failures++; $display("FAIL: OCP output changed between core clock edges"); end
    checks++;
    if (n_refused == 0) begin failures++; $display("FAIL: no refusal exercised"); end
    $display("writes=%0d reads=%0d refused=%0d", n_wr, n_rd, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
