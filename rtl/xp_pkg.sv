// xp_pkg: types and constants shared by the network-on-chip blocks.
//
// The network carries 38-bit flits (flow-control units), the width of the
// 6x6 switch configuration and of the links characterised for it. A flit is
// {head, tail, payload[35:0]}. The payload of a head flit carries the source
// route, the command, the sender's id and the burst length. The payload of a
// body flit carries {byte enables[3:0], data or address[31:0]}, so a 32-bit
// core word travels in one flit. This field layout is this design's own
// choice; only the widths of 38 bits and 32-bit data are the reference numbers.
//
// Routing is source based: the route field is a list of 3-bit output-port
// numbers, first hop in the least significant bits. Each switch takes the low
// three bits and shifts the field right by three before forwarding the head.
// Seven hops cover the longest XY path of a 4x4 mesh (3 + 3 switch-to-switch
// hops plus the final hop into the network interface).
//
// Links use ACK/NACK flow control. The forward direction carries
// {valid, seq, flit}; the backward direction carries {ack, nack}. The 3-bit
// sequence number lets a receiver recognise the retransmitted flit after a
// NACK (go-back-N); it must count further than the deepest sender buffer.
package xp_pkg;

  localparam int unsigned FLIT_W    = 38;
  localparam int unsigned PAYLOAD_W = FLIT_W - 2;
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned BE_W      = 4;
  localparam int unsigned PORT_W    = 3;
  localparam int unsigned MAX_HOPS  = 7;
  localparam int unsigned ROUTE_W   = PORT_W * MAX_HOPS;   // 21
  localparam int unsigned ID_W      = 4;
  localparam int unsigned LEN_W     = 4;                   // burst length - 1
  localparam int unsigned BURST_W   = LEN_W + 1;           // OCP MBurstLength width
  localparam int unsigned SEQ_W     = 3;

  typedef logic [PORT_W-1:0]  port_t;
  typedef logic [ROUTE_W-1:0] route_t;
  typedef logic [ID_W-1:0]    id_t;
  typedef logic [SEQ_W-1:0]   seq_t;

  // OCP commands (MCmd) and responses (SResp), OCP 2.0 encodings.
  typedef enum logic [2:0] {
    OCP_IDLE = 3'd0,
    OCP_WR   = 3'd1,
    OCP_RD   = 3'd2
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    OCP_NULL = 2'd0,
    OCP_DVA  = 2'd1,
    OCP_ERR  = 2'd3
  } ocp_resp_e;

  typedef struct packed {
    logic                 head;
    logic                 tail;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // Payload of a head flit (36 bits).
  typedef struct packed {
    route_t           route;   // [35:15]
    logic [2:0]       cmd;     // [14:12] MCmd of a request, {1'b0, SResp} of a response
    id_t              src;     // [11:8]  initiator id of a request, target id of a response
    logic [LEN_W-1:0] len;     // [7:4]   burst length - 1
    logic [3:0]       rsvd;    // [3:0]
  } head_t;

  // Payload of a body flit (36 bits).
  typedef struct packed {
    logic [BE_W-1:0]   be;
    logic [DATA_W-1:0] data;
  } body_t;

  typedef struct packed {
    logic  valid;
    seq_t  seq;
    flit_t flit;
  } link_fwd_t;

  typedef struct packed {
    logic ack;
    logic nack;
  } link_bwd_t;

  // OCP request from a master core (or from a target NI to a slave core).
  typedef struct packed {
    logic [2:0]         MCmd;
    logic [31:0]        MAddr;
    logic [DATA_W-1:0]  MData;
    logic [BE_W-1:0]    MByteEn;
    logic [BURST_W-1:0] MBurstLength;
  } ocp_req_t;

  // OCP response to a master core (or from a slave core to a target NI).
  typedef struct packed {
    logic [1:0]        SResp;
    logic [DATA_W-1:0] SData;
  } ocp_resp_t;

  // Mesh port numbering of a tile's switch.
  localparam port_t P_NORTH = 3'd0;
  localparam port_t P_EAST  = 3'd1;
  localparam port_t P_SOUTH = 3'd2;
  localparam port_t P_WEST  = 3'd3;
  localparam port_t P_INIT  = 3'd4;   // initiator NI of the tile
  localparam port_t P_TGT   = 3'd5;   // target NI of the tile

  // XY (dimension-ordered) source route from tile src to tile dst of a mesh
  // with `cols` columns, ending on output port `last` of the destination switch.
  // Tile t sits at column t % cols, row t / cols; row 0 is the north edge.
  function automatic route_t xy_route(int unsigned src, int unsigned dst,
                                      int unsigned cols, port_t last);
    int unsigned x, y, dx, dy, hop;
    route_t r;
    r   = '0;
    hop = 0;
    x   = src % cols;  y  = src / cols;
    dx  = dst % cols;  dy = dst / cols;
    while (x != dx) begin
      r[hop*PORT_W +: PORT_W] = (dx > x) ? P_EAST : P_WEST;
      x   = (dx > x) ? x + 1 : x - 1;
      hop = hop + 1;
    end
    while (y != dy) begin
      r[hop*PORT_W +: PORT_W] = (dy > y) ? P_SOUTH : P_NORTH;
      y   = (dy > y) ? y + 1 : y - 1;
      hop = hop + 1;
    end
    r[hop*PORT_W +: PORT_W] = last;
    return r;
  endfunction

endpackage
