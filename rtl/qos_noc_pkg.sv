// qos_noc_pkg: types and constants shared by the QoS network-on-chip.
//
// A flit is a 32-bit payload plus a head and a tail flag. The first flit of
// every packet (the header) carries the 4-bit QoS field whose encoding
// follows the published one: codes 0000-0111 are priority levels 0 (lowest)
// to 7 (highest), 1000 opens a reserved circuit, 1001 closes it. The rest of
// the header layout, the endpoint numbering and the XY routing function are
// choices of this design:
//   header payload [31:28] qos, [27:23] dst endpoint, [22:18] src endpoint,
//                  [17:16] command, [15] full-duplex flag, [14:0] zero.
// An endpoint ID is {switch number (4 bits), local port (1 bit)}; switch
// s sits in column s/4 and row s%4 of the 4x4 mesh.
package qos_noc_pkg;

  localparam int unsigned QOS_W   = 4;
  localparam int unsigned EP_W    = 5;
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned NUM_EP  = 32;
  localparam int unsigned MESH_DIM = 4;   // switches per row and per column

  // QoS field encodings
  localparam logic [QOS_W-1:0] ENC_QOS_PACKET_0      = 4'b0000;
  localparam logic [QOS_W-1:0] ENC_QOS_PACKET_7      = 4'b0111;
  localparam logic [QOS_W-1:0] ENC_QOS_OPEN_CHANNEL  = 4'b1000;
  localparam logic [QOS_W-1:0] ENC_QOS_CLOSE_CHANNEL = 4'b1001;

  typedef enum logic [1:0] {
    CMD_RD_REQ  = 2'b00,
    CMD_WR_REQ  = 2'b01,
    CMD_RD_RESP = 2'b10,
    CMD_WR_RESP = 2'b11
  } cmd_e;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  typedef struct packed {
    logic [QOS_W-1:0] qos;
    logic [EP_W-1:0]  dst;
    logic [EP_W-1:0]  src;
    cmd_e             cmd;
    logic             full_duplex;
    logic [14:0]      rsvd;
  } header_t;

  // Switch ports
  localparam int unsigned NPORTS = 6;
  localparam int unsigned P_N  = 0;  // row - 1
  localparam int unsigned P_E  = 1;  // column + 1
  localparam int unsigned P_S  = 2;  // row + 1
  localparam int unsigned P_W  = 3;  // column - 1
  localparam int unsigned P_L0 = 4;
  localparam int unsigned P_L1 = 5;

  function automatic header_t make_header(logic [QOS_W-1:0] qos, logic [EP_W-1:0] dst,
                                          logic [EP_W-1:0] src, cmd_e cmd, logic fd);
    header_t h;
    h.qos = qos; h.dst = dst; h.src = src; h.cmd = cmd; h.full_duplex = fd; h.rsvd = '0;
    return h;
  endfunction

  function automatic logic is_circuit_code(logic [QOS_W-1:0] q);
    return (q == ENC_QOS_OPEN_CHANNEL) || (q == ENC_QOS_CLOSE_CHANNEL);
  endfunction

  // Dimension-ordered routing: first along the columns (x), then the rows (y).
  function automatic logic [2:0] xy_route(logic [EP_W-1:0] dst, int unsigned sw_x, int unsigned sw_y);
    logic [3:0] sw;
    int unsigned dx, dy;
    sw = dst[EP_W-1:1];
    dx = int'(sw) / MESH_DIM;
    dy = int'(sw) % MESH_DIM;
    if (dx > sw_x)      return 3'(P_E);
    else if (dx < sw_x) return 3'(P_W);
    else if (dy > sw_y) return 3'(P_S);
    else if (dy < sw_y) return 3'(P_N);
    else                return dst[0] ? 3'(P_L1) : 3'(P_L0);
  endfunction

endpackage
