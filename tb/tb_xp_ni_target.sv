// tb_xp_ni_target: self-checking test of the target network interface.
//
// Request packets (random write and read bursts of 1 to 8 beats from random
// initiator ids) are sent into the interface through an ACK/NACK buffer. On
// the OCP side a model memory accepts commands after random delays and
// returns read data. On the network side a model receiver refuses response
// flits at random and collects them. The test checks the memory contents
// after each write (byte enables included) against its own copy, the data of
// each read response, and each response head: route from the table for the
// requesting initiator, DVA, burst length, head and tail marks. The core
// clock runs at the network clock, then at half of it.
module tb_xp_ni_target;
  import xp_pkg::*;

  localparam int NI = 16;
  localparam int MY_ID = 9;
  localparam int MW = 64;   // words of model memory

  function automatic route_t lut_entry(int t);
    return route_t'(t * 32'h0003_1f0d + 3);
  endfunction
  typedef route_t lut_t [NI];
  function automatic lut_t make_lut();
    lut_t l;
    for (int t = 0; t < NI; t++) l[t] = lut_entry(t);
    return l;
  endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int   ratio = 1;
  int   en_cnt = 0;
  logic ocp_en;
  assign ocp_en = (en_cnt == ratio - 1);
  always_ff @(posedge clk) en_cnt <= (en_cnt >= ratio - 1) ? 0 : en_cnt + 1;

  ocp_req_t  ocp_req;
  logic      ocp_cmd_accept, ocp_resp_accept;
  ocp_resp_t ocp_resp;
  link_fwd_t in_fwd, out_fwd;
  link_bwd_t in_bwd, out_bwd;

  xp_ni_target #(.NINIT(NI), .MY_ID(MY_ID), .ROUTE_LUT(make_lut())) dut (
    .clk, .rst_n, .ocp_en,
    .ocp_req, .ocp_cmd_accept, .ocp_resp, .ocp_resp_accept,
    .net_in_fwd(in_fwd), .net_in_bwd(in_bwd),
    .net_out_fwd(out_fwd), .net_out_bwd(out_bwd)
  );

  // Model memory on the OCP side.
  logic [31:0] mem [MW];
  logic [31:0] rq [$];
  logic        acc_rnd;
  int          n_slave_stall = 0;
  assign ocp_cmd_accept = acc_rnd;
  always_comb begin
    ocp_resp.SResp = (rq.size() > 0) ? OCP_DVA : OCP_NULL;
    ocp_resp.SData = (rq.size() > 0) ? rq[0] : '0;
  end
  always @(posedge clk) begin
    if (ocp_en) begin
      acc_rnd <= ($urandom_range(2) != 0);
      if (rq.size() > 0 && ocp_resp_accept) void'(rq.pop_front());
      if (ocp_req.MCmd != OCP_IDLE && !acc_rnd) n_slave_stall++;
      if (ocp_req.MCmd == OCP_WR && acc_rnd) begin
        automatic int w = int'(ocp_req.MAddr[7:2]);
        for (int k = 0; k < 4; k++)
          if (ocp_req.MByteEn[k]) mem[w][8*k +: 8] <= ocp_req.MData[8*k +: 8];
      end
      if (ocp_req.MCmd == OCP_RD && acc_rnd)
        for (int k = 0; k < int'(ocp_req.MBurstLength); k++)
          rq.push_back(mem[(int'(ocp_req.MAddr[7:2]) + k) % MW]);
    end
  end

  // Request sender.
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

  // Response receiver.
  int    refuse_pct = 30;
  seq_t  r_seq;
  logic  r_rnd, r_take;
  flit_t rsp_flits [$];
  int    n_refused = 0;
  always_ff @(posedge clk) r_rnd <= ($urandom_range(99) >= refuse_pct);
  assign r_take       = out_fwd.valid && out_fwd.seq == r_seq && r_rnd;
  assign out_bwd.ack  = r_take;
  assign out_bwd.nack = out_fwd.valid && !r_take;
  always @(posedge clk) begin
    if (!rst_n) r_seq <= '0;
    else begin
      if (r_take) begin
        r_seq <= r_seq + 1'b1;
        rsp_flits.push_back(out_fwd.flit);
      end
      if (out_fwd.valid && !r_take) n_refused++;
    end
  end

  logic [31:0] ref_mem [MW];
  int n_wr = 0, n_rd = 0;

  task automatic transaction(bit is_wr, int src, int len);
    head_t h;
    body_t b;
    logic [31:0] addr;
    int w0, nfl;
    addr = {4'(MY_ID), 20'($urandom), 8'($urandom) & 8'hfc};
    w0 = int'(addr[7:2]);
    h = '0;
    h.route = route_t'($urandom);
    h.cmd   = is_wr ? OCP_WR : OCP_RD;
    h.src   = id_t'(src);
    h.len   = LEN_W'(len - 1);
    net_send('{head: 1'b1, tail: 1'b0, payload: PAYLOAD_W'(h)});
    net_send('{head: 1'b0, tail: !is_wr, payload: PAYLOAD_W'({4'hf, addr})});
    if (is_wr)
      for (int k = 0; k < len; k++) begin
        b.data = $urandom;
        b.be   = 4'($urandom);
        for (int j = 0; j < 4; j++)
          if (b.be[j]) ref_mem[(w0 + k) % MW][8*j +: 8] = b.data[8*j +: 8];
        net_send('{head: 1'b0, tail: (k == len - 1), payload: PAYLOAD_W'(b)});
      end
    nfl = is_wr ? 1 : len + 1;
    while (rsp_flits.size() < nfl) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (rsp_flits.size() != nfl) begin failures++; $display("FAIL: %0d response flits", rsp_flits.size()); end
    h = head_t'(rsp_flits[0].payload);
    checks++;
    if (!rsp_flits[0].head || rsp_flits[0].tail != is_wr || h.route != lut_entry(src) ||
        h.cmd[1:0] != OCP_DVA || h.src != MY_ID || h.len != LEN_W'(len - 1)) begin
      failures++; $display("FAIL: bad response head %h", rsp_flits[0]);
    end
    if (!is_wr)
      for (int k = 0; k < len; k++) begin
        b = body_t'(rsp_flits[1+k].payload);
        checks++;
        if (rsp_flits[1+k].head || rsp_flits[1+k].tail != (k == len - 1) ||
            b.data != ref_mem[(w0 + k) % MW]) begin
          failures++; $display("FAIL: read beat %0d got %h expected %h", k, b.data, ref_mem[(w0 + k) % MW]);
        end
      end
    else
      for (int k = 0; k < len; k++) begin
        checks++;
        if (mem[(w0 + k) % MW] != ref_mem[(w0 + k) % MW]) begin
          failures++; $display("FAIL: memory word %0d is %h expected %h", (w0 + k) % MW, mem[(w0 + k) % MW], ref_mem[(w0 + k) % MW]);
        end
      end
    rsp_flits.delete();
    if (is_wr) n_wr++; else n_rd++;
  endtask

  initial begin
    s_push = 0; s_flit = '0; acc_rnd = 0;
    for (int k = 0; k < MW; k++) begin mem[k] = 32'(k * 32'h0101_0101); ref_mem[k] = mem[k]; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 80; n++) begin
      if (n == 40) ratio = 2;
      transaction((n < 10) ? 1'b1 : 1'($urandom_range(1)), $urandom_range(NI - 1), $urandom_range(1, 8));
    end
    checks++;
    if (n_refused == 0 || n_slave_stall == 0) begin failures++; $display("FAIL: no refusal or slave stall exercised"); end
    $display("writes=%0d reads=%0d refused=%0d slave_stalls=%0d", n_wr, n_rd, n_refused, n_slave_stall);
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
