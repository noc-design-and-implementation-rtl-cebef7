// xp_mesh: a ROWS x COLS mesh network-on-chip (4x4 by default).
//
// Every tile holds one switch, one initiator network interface (for the
// tile's master core) and one target network interface (for the tile's slave
// core), so each switch has six ports: north, east, south, west, the
// initiator NI and the target NI. Ports that face the edge of the mesh are
// left unconnected (no flit is ever routed to them).
//
// Addressing. The top bits of an OCP address select the target tile:
// MAddr[31 -: TGT_W] is the tile number t = row*COLS + column, row 0 being the
// north edge. Routes are XY (first along the row, then along the column) and
// are computed at elaboration into each interface's route table: an initiator
// NI's table holds the route to every target NI, a target NI's table the
// route back to every initiator NI. XY routing on a mesh is free of routing
// deadlock, and requests and responses use separate NIs at each end.
//
// Links between switches carry LINK_STAGES repeaters each way; links between a
// switch and its own tile's interfaces are single-cycle. All blocks share clk;
// each core port runs at clk divided by an integer, marked by that tile's bit
// of ocp_en.
//
// Core ports are arrays indexed by tile number. The 4x4 size and the 6x6,
// 6-flit-buffer switches follow the reference meshes; the two-NI tile, the
// address map and XY routing are this design's choices.
module xp_mesh
  import xp_pkg::*;
#(
  parameter int unsigned ROWS        = 4,
  parameter int unsigned COLS        = 4,
  parameter int unsigned DEPTH       = 6,
  parameter int unsigned LINK_STAGES = 0,
  localparam int unsigned NT         = ROWS * COLS,
  localparam int unsigned TGT_W      = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [NT-1:0] ocp_en,
  // Initiator side: one OCP slave port per tile, for the tile's master core.
  input  ocp_req_t  init_req        [NT],
  output logic      init_cmd_accept [NT],
  output ocp_resp_t init_resp       [NT],
  input  logic      init_resp_accept[NT],
  // Target side: one OCP master port per tile, for the tile's slave core.
  output ocp_req_t  tgt_req         [NT],
  input  logic      tgt_cmd_accept  [NT],
  input  ocp_resp_t tgt_resp        [NT],
  output logic      tgt_resp_accept [NT],
  // Event strobes, one bit per tile, for performance counting.
  output logic [NT-1:0] ev_refuse,
  output logic [NT-1:0] ev_contention,
  output logic [NT-1:0] ev_retransmit
);

  initial begin
    assert (ROWS + COLS - 1 <= MAX_HOPS)
      else $fatal(1, "mesh too large for the %0d-hop route field", MAX_HOPS);
    assert (NT <= (1 << ID_W))
      else $fatal(1, "mesh has more tiles than NI ids");
  end

  localparam int unsigned NP = 6;

  typedef route_t lut_t [NT];

  function automatic lut_t make_lut(int unsigned from, port_t last);
    lut_t l;
    for (int unsigned t = 0; t < NT; t++) l[t] = xy_route(from, t, COLS, last);
    return l;
  endfunction

  // Switch-side link ends, indexed [tile][port].
  link_fwd_t sw_in_fwd  [NT][NP];
  link_bwd_t sw_in_bwd  [NT][NP];
  link_fwd_t sw_out_fwd [NT][NP];
  link_bwd_t sw_out_bwd [NT][NP];

  for (genvar t = 0; t < NT; t++) begin : g_tile
    localparam int unsigned X = t % COLS;
    localparam int unsigned Y = t / COLS;

    logic [NP-1:0] refuse, contention, retransmit;

    xp_switch #(.NIN(NP), .NOUT(NP), .DEPTH(DEPTH)) u_sw (
      .clk, .rst_n,
      .in_fwd        (sw_in_fwd[t]),
      .in_bwd        (sw_in_bwd[t]),
      .out_fwd       (sw_out_fwd[t]),
      .out_bwd       (sw_out_bwd[t]),
      .ev_refuse     (refuse),
      .ev_contention (contention),
      .ev_retransmit (retransmit)
    );
    assign ev_refuse[t]     = |refuse;
    assign ev_contention[t] = |contention;
    assign ev_retransmit[t] = |retransmit;

    xp_ni_initiator #(
      .NTGT(NT), .TGT_W(TGT_W), .MY_ID(t), .DEPTH(DEPTH),
      .ROUTE_LUT(make_lut(t, P_TGT))
    ) u_ini (
      .clk, .rst_n,
      .ocp_en          (ocp_en[t]),
      .ocp_req         (init_req[t]),
      .ocp_cmd_accept  (init_cmd_accept[t]),
      .ocp_resp        (init_resp[t]),
      .ocp_resp_accept (init_resp_accept[t]),
      .net_out_fwd     (sw_in_fwd[t][P_INIT]),
      .net_out_bwd     (sw_in_bwd[t][P_INIT]),
      .net_in_fwd      (sw_out_fwd[t][P_INIT]),
      .net_in_bwd      (sw_out_bwd[t][P_INIT])
    );

    xp_ni_target #(
      .NINIT(NT), .MY_ID(t), .DEPTH(DEPTH),
      .ROUTE_LUT(make_lut(t, P_INIT))
    ) u_tgt (
      .clk, .rst_n,
      .ocp_en          (ocp_en[t]),
      .ocp_req         (tgt_req[t]),
      .ocp_cmd_accept  (tgt_cmd_accept[t]),
      .ocp_resp        (tgt_resp[t]),
      .ocp_resp_accept (tgt_resp_accept[t]),
      .net_in_fwd      (sw_out_fwd[t][P_TGT]),
      .net_in_bwd      (sw_out_bwd[t][P_TGT]),
      .net_out_fwd     (sw_in_fwd[t][P_TGT]),
      .net_out_bwd     (sw_in_bwd[t][P_TGT])
    );

    // Eastward and southward neighbour links, one pair of links each, from
    // this tile's output to the neighbour's input and back.
    if (X + 1 < COLS) begin : g_east
      xp_link #(.STAGES(LINK_STAGES)) u_e2w (
        .clk, .rst_n,
        .tx_fwd (sw_out_fwd[t][P_EAST]),   .tx_bwd (sw_out_bwd[t][P_EAST]),
        .rx_fwd (sw_in_fwd[t+1][P_WEST]),  .rx_bwd (sw_in_bwd[t+1][P_WEST])
      );
      xp_link #(.STAGES(LINK_STAGES)) u_w2e (
        .clk, .rst_n,
        .tx_fwd (sw_out_fwd[t+1][P_WEST]), .tx_bwd (sw_out_bwd[t+1][P_WEST]),
        .rx_fwd (sw_in_fwd[t][P_EAST]),    .rx_bwd (sw_in_bwd[t][P_EAST])
      );
    end else begin : g_east_edge
      assign sw_in_fwd[t][P_EAST]  = '0;
      assign sw_out_bwd[t][P_EAST] = '0;
    end

    if (Y + 1 < ROWS) begin : g_south
      xp_link #(.STAGES(LINK_STAGES)) u_s2n (
        .clk, .rst_n,
        .tx_fwd (sw_out_fwd[t][P_SOUTH]),     .tx_bwd (sw_out_bwd[t][P_SOUTH]),
        .rx_fwd (sw_in_fwd[t+COLS][P_NORTH]), .rx_bwd (sw_in_bwd[t+COLS][P_NORTH])
      );
      xp_link #(.STAGES(LINK_STAGES)) u_n2s (
        .clk, .rst_n,
        .tx_fwd (sw_out_fwd[t+COLS][P_NORTH]), .tx_bwd (sw_out_bwd[t+COLS][P_NORTH]),
        .rx_fwd (sw_in_fwd[t][P_SOUTH]),       .rx_bwd (sw_in_bwd[t][P_SOUTH])
      );
    end else begin : g_south_edge
      assign sw_in_fwd[t][P_SOUTH]  = '0;
      assign sw_out_bwd[t][P_SOUTH] = '0;
    end

    if (X == 0) begin : g_west_edge
      assign sw_in_fwd[t][P_WEST]  = '0;
      assign sw_out_bwd[t][P_WEST] = '0;
    end
    if (Y == 0) begin : g_north_edge
      assign sw_in_fwd[t][P_NORTH]  = '0;
      assign sw_out_bwd[t][P_NORTH] = '0;
    end
  end

endmodule
