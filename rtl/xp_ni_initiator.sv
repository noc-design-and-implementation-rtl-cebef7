// xp_ni_initiator: initiator network interface.
//
// Connects a master core, through an OCP 2.0 subset, to the network. A core
// request is turned into a packet: a head flit with the source route, the
// command, this interface's id and the burst length; a body flit with the
// address; and, for a write, one body flit per data beat carrying data and
// byte enables. The last flit is marked tail. The route comes from a look-up
// table (ROUTE_LUT) indexed by the target number, which is the top TGT_W bits
// of the address. Response packets coming back are unpacked into OCP
// responses: one DVA for a write burst, one DVA with data per beat of a read.
//
// OCP subset. MCmd IDLE/WR/RD, MAddr, MData, MByteEn, MBurstLength (1..16,
// incrementing bursts, a write burst presents address and data on every beat),
// SCmdAccept; SResp, SData, MRespAccept. Writes are non-posted: the core gets
// one response when the whole burst has reached the target. One transaction
// is outstanding at a time.
//
// Clocks. The network side runs on clk. The core side runs at clk divided by
// an integer: ocp_en is high in the clk cycle that ends each core clock period
// (tie it high for equal clocks). OCP inputs are sampled and OCP outputs
// change only at those edges, so the core may be clocked by the divided clock
// with no synchroniser. Flits go out through an xp_out_buffer (ACK/NACK) and
// come in through xp_link_rx into a RX_DEPTH-flit buffer.
//
// The packet layout, the OCP subset and the one-outstanding-transaction rule
// are this design's choices; packetising, the route table and the integer
// clock ratio follow the reference architecture.
module xp_ni_initiator
  import xp_pkg::*;
#(
  parameter int unsigned NTGT     = 16,
  parameter int unsigned TGT_W    = 4,
  parameter int unsigned MY_ID    = 0,
  parameter int unsigned DEPTH    = 6,
  parameter int unsigned RX_DEPTH = 4,
  parameter route_t      ROUTE_LUT [NTGT] = '{default: '0}
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ocp_en,
  // OCP slave port (to the master core)
  input  ocp_req_t  ocp_req,
  output logic      ocp_cmd_accept,
  output ocp_resp_t ocp_resp,
  input  logic      ocp_resp_accept,
  // Network side
  output link_fwd_t net_out_fwd,
  input  link_bwd_t net_out_bwd,
  input  link_fwd_t net_in_fwd,
  output link_bwd_t net_in_bwd
);

  typedef enum logic [2:0] {
    S_IDLE, S_HEAD, S_ADDR, S_WDATA, S_RACC, S_RESP
  } state_e;

  state_e            state;
  logic [2:0]        cmd;
  logic [31:0]       addr;
  logic [LEN_W-1:0]  len_m1, beat;
  logic [TGT_W-1:0]  tgt;

  // Outgoing flits.
  logic  ob_push, ob_full, ob_empty, ob_retx;
  flit_t ob_flit;

  // Incoming flits.
  logic  rx_seq_ok, rx_accept, rx_full, rx_empty, rx_pop;
  flit_t rx_flit;

  logic  resp_valid, resp_last;

  always_comb begin
    automatic head_t h = '0;
    automatic body_t b = '0;
    ob_push        = 1'b0;
    ob_flit        = '0;
    ocp_cmd_accept = 1'b0;
    h.route = (int'(tgt) < NTGT) ? ROUTE_LUT[tgt] : '0;
    h.cmd   = cmd;
    h.src   = id_t'(MY_ID);
    h.len   = len_m1;
    unique case (state)
      S_HEAD: begin
        ob_push = !ob_full;
        ob_flit = '{head: 1'b1, tail: 1'b0, payload: PAYLOAD_W'(h)};
      end
      S_ADDR: begin
        b.be    = '1;
        b.data  = addr;
        ob_push = !ob_full;
        ob_flit = '{head: 1'b0, tail: (cmd == OCP_RD), payload: PAYLOAD_W'(b)};
      end
      S_WDATA: begin
        b.be    = ocp_req.MByteEn;
        b.data  = ocp_req.MData;
        ob_push = ocp_en && !ob_full;
        ocp_cmd_accept = ob_push;
        ob_flit = '{head: 1'b0, tail: (beat == len_m1), payload: PAYLOAD_W'(b)};
      end
      S_RACC:  ocp_cmd_accept = ocp_en;
      default: ;
    endcase
  end

  // Response unpacking: a head flit only sets up the packet; each body flit,
  // or the head of a one-flit write response, becomes one OCP response.
  assign rx_pop = (state == S_RESP) && !rx_empty &&
                  (rx_flit.head && !rx_flit.tail ||
                   (ocp_en && (!resp_valid || ocp_resp_accept) && !(resp_valid && resp_last)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cmd        <= OCP_IDLE;
      addr       <= '0;
      len_m1     <= '0;
      beat       <= '0;
      tgt        <= '0;
      resp_valid <= 1'b0;
      resp_last  <= 1'b0;
      ocp_resp   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ocp_req.MCmd == OCP_WR || ocp_req.MCmd == OCP_RD) begin
          cmd    <= ocp_req.MCmd;
          addr   <= ocp_req.MAddr;
          tgt    <= ocp_req.MAddr[31 -: TGT_W];
          len_m1 <= (ocp_req.MBurstLength == '0) ? '0 : LEN_W'(ocp_req.MBurstLength - 1'b1);
          beat   <= '0;
          state  <= S_HEAD;
        end
        S_HEAD: if (ob_push) state <= S_ADDR;
        S_ADDR: if (ob_push) state <= (cmd == OCP_WR) ? S_WDATA : S_RACC;
        S_WDATA: if (ob_push) begin
          beat <= beat + 1'b1;
          if (beat == len_m1) state <= S_RESP;
        end
        S_RACC: if (ocp_en) state <= S_RESP;
        S_RESP: begin
          if (ocp_en) begin
            if (resp_valid && ocp_resp_accept) begin
              resp_valid     <= 1'b0;
              ocp_resp.SResp <= OCP_NULL;
              if (resp_last) state <= S_IDLE;
            end
            if (rx_pop && !(rx_flit.head && !rx_flit.tail)) begin
              automatic head_t h = head_t'(rx_flit.payload);
              automatic body_t b = body_t'(rx_flit.payload);
              resp_valid     <= 1'b1;
              resp_last      <= rx_flit.tail;
              ocp_resp.SResp <= rx_flit.head ? h.cmd[1:0] : OCP_DVA;
              ocp_resp.SData <= rx_flit.head ? '0 : b.data;
            end
          end
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

  // A write burst keeps its command for every beat.
  a_burst_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WDATA && ocp_en) |-> ocp_req.MCmd == OCP_WR);

endmodule
