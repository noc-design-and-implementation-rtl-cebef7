// xp_ni_target: target network interface.
//
// Connects a slave core (a memory, a peripheral) to the network. It takes
// request packets from the network, drives them onto the slave's OCP port as
// a master would, and sends the results back as response packets.
//
// A request is unpacked flit by flit: the head gives the command, the
// initiator's id and the burst length; the next flit gives the address.
// A write burst is replayed beat by beat (address incremented by 4 per beat,
// data and byte enables from each body flit); writes are posted on the slave
// side, and once the last beat is accepted a one-flit DVA response goes back.
// A read is issued as one OCP request with MBurstLength; a response head flit
// is sent, then one body flit per SResp beat, the last one marked tail. The
// route of a response comes from ROUTE_LUT, indexed by the initiator id that
// the request carried.
//
// Clocks. As in xp_ni_initiator, the slave side runs at clk divided by an
// integer, marked by ocp_en; OCP outputs change and OCP inputs are sampled
// only in ocp_en cycles. Incoming flits are taken through xp_link_rx into a
// RX_DEPTH-flit buffer; responses leave through an xp_out_buffer.
//
// Posting writes at the slave, the response format and serving one request
// at a time are this design's choices.
module xp_ni_target
  import xp_pkg::*;
#(
  parameter int unsigned NINIT    = 16,
  parameter int unsigned MY_ID    = 0,
  parameter int unsigned DEPTH    = 6,
  parameter int unsigned RX_DEPTH = 4,
  parameter route_t      ROUTE_LUT [NINIT] = '{default: '0}
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ocp_en,
  // OCP master port (to the slave core)
  output ocp_req_t  ocp_req,
  input  logic      ocp_cmd_accept,
  input  ocp_resp_t ocp_resp,
  output logic      ocp_resp_accept,
  // Network side
  input  link_fwd_t net_in_fwd,
  output link_bwd_t net_in_bwd,
  output link_fwd_t net_out_fwd,
  input  link_bwd_t net_out_bwd
);

  typedef enum logic [2:0] {
    S_IDLE, S_ADDR, S_WR, S_WRESP, S_RD, S_RHEAD, S_RDATA
  } state_e;

  state_e           state;
  logic [2:0]       cmd;
  id_t              src;
  logic [LEN_W-1:0] len_m1, beat;
  logic [31:0]      addr;
  logic             req_valid;

  logic  rx_seq_ok, rx_accept, rx_full, rx_empty, rx_pop;
  flit_t rx_flit;
  logic  ob_push, ob_full, ob_empty, ob_retx;
  flit_t ob_flit;

  head_t rx_head;
  body_t rx_body;
  assign rx_head = head_t'(rx_flit.payload);
  assign rx_body = body_t'(rx_flit.payload);

  logic beat_accepted;
  assign beat_accepted = ocp_en && req_valid && ocp_cmd_accept;

  // Flit consumption.
  always_comb begin
    rx_pop = 1'b0;
    unique case (state)
      S_IDLE, S_ADDR: rx_pop = !rx_empty;
      // Load the next write beat at a slave clock edge when the register is
      // free or its beat is being accepted.
      S_WR: rx_pop = !rx_empty && ocp_en && (!req_valid || ocp_cmd_accept) &&
                     !(req_valid && beat == len_m1);
      default: ;
    endcase
  end

  // Response flits.
  always_comb begin
    automatic head_t h = '0;
    automatic body_t b = '0;
    h.route = (int'(src) < NINIT) ? ROUTE_LUT[src] : '0;
    h.cmd   = {1'b0, OCP_DVA};
    h.src   = id_t'(MY_ID);
    h.len   = len_m1;
    b.be    = '1;
    b.data  = ocp_resp.SData;
    ob_push = 1'b0;
    ob_flit = '0;
    ocp_resp_accept = 1'b0;
    unique case (state)
      S_WRESP: begin
        ob_push = !ob_full;
        ob_flit = '{head: 1'b1, tail: 1'b1, payload: PAYLOAD_W'(h)};
      end
      S_RHEAD: begin
        ob_push = !ob_full;
        ob_flit = '{head: 1'b1, tail: 1'b0, payload: PAYLOAD_W'(h)};
      end
      S_RDATA: begin
        ocp_resp_accept = !ob_full;
        ob_push = ocp_en && !ob_full && (ocp_resp.SResp != OCP_NULL);
        ob_flit = '{head: 1'b0, tail: (beat == len_m1), payload: PAYLOAD_W'(b)};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cmd       <= OCP_IDLE;
      src       <= '0;
      len_m1    <= '0;
      beat      <= '0;
      addr      <= '0;
      req_valid <= 1'b0;
      ocp_req   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (rx_pop) begin
          cmd    <= rx_head.cmd;
          src    <= rx_head.src;
          len_m1 <= rx_head.len;
          beat   <= '0;
          state  <= S_ADDR;
        end
        S_ADDR: if (rx_pop) begin
          addr  <= rx_body.data;
          state <= (cmd == OCP_WR) ? S_WR : S_RD;
        end
        S_WR: if (ocp_en) begin
          if (beat_accepted) begin
            req_valid    <= 1'b0;
            ocp_req.MCmd <= OCP_IDLE;
            beat         <= beat + 1'b1;
            if (beat == len_m1) state <= S_WRESP;
          end
          if (rx_pop) begin
            req_valid            <= 1'b1;
            ocp_req.MCmd         <= OCP_WR;
            ocp_req.MAddr        <= addr + {26'd0, (req_valid ? beat + 1'b1 : beat), 2'b00};
            ocp_req.MData        <= rx_body.data;
            ocp_req.MByteEn      <= rx_body.be;
            ocp_req.MBurstLength <= BURST_W'(len_m1) + 1'b1;
          end
        end
        S_WRESP: if (ob_push) state <= S_IDLE;
        S_RD: if (ocp_en) begin
          if (beat_accepted) begin
            req_valid    <= 1'b0;
            ocp_req.MCmd <= OCP_IDLE;
            state        <= S_RHEAD;
          end else if (!req_valid) begin
            req_valid            <= 1'b1;
            ocp_req.MCmd         <= OCP_RD;
            ocp_req.MAddr        <= addr;
            ocp_req.MByteEn      <= '1;
            ocp_req.MBurstLength <= BURST_W'(len_m1) + 1'b1;
          end
        end
        S_RHEAD: if (ob_push) state <= S_RDATA;
        S_RDATA: if (ob_push) begin
          beat <= beat + 1'b1;
          if (beat == len_m1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  xp_out_buffer #(.DEPTH(DEPTH)) u_obuf (
    .clk, .rst_n,
    .push       (ob_push),
    .push_flit  (ob_flit),
    .full       (ob_full),
    .empty      (ob_empty),
    .out_fwd    (net_out_fwd),
    .out_bwd    (net_out_bwd),
    .retransmit (ob_retx)
  );

  assign rx_accept = rx_seq_ok && !rx_full;

  xp_link_rx u_rx (
    .clk, .rst_n,
    .in_fwd (net_in_fwd),
    .accept (rx_accept),
    .seq_ok (rx_seq_ok),
    .in_bwd (net_in_bwd)
  );

  xp_fifo #(.WIDTH(FLIT_W), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst_n,
    .push      (rx_accept),
    .push_data (net_in_fwd.flit),
    .pop       (rx_pop),
    .data      (rx_flit),
    .full      (rx_full),
    .empty     (rx_empty)
  );

  // Head flits only at the start of a packet, body flits only inside one.
  a_head_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (rx_pop && state == S_IDLE) |-> rx_flit.head);
  a_body_inside: assert property (@(posedge clk) disable iff (!rst_n)
    (rx_pop && state != S_IDLE) |-> !rx_flit.head);

endmodule
