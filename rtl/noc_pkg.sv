// noc_pkg: types and constants shared by the multi-path NoC.
//
// A packet is a head flit followed by one or more payload flits, moved with
// wormhole switching and credit-based link flow control. The head flit carries
// a source route (one 3-bit output-port number per hop, consumed from the low
// end by each switch), the 8-bit source and destination addresses, the 8-bit
// per-commodity packet identifier used for in-order delivery, the commodity
// number that indexes the re-order look-up tables, and two bits for critical
// packet replication. 8-bit addresses and 8-bit identifiers follow the
// original scheme; every other width here is this design's own choice.
//
// Every flit carries an extended Hamming (SEC-DED) check field computed end to
// end by the source NI and checked by the receiving NI. The route field of a
// head flit is rewritten by every switch, so it is left out of the check
// (treated as zero by both ends).
package noc_pkg;

  localparam int unsigned DATA_W   = 64;  // flit payload width
  localparam int unsigned ECC_W    = 8;   // 7 Hamming bits + overall parity for 64 bits
  localparam int unsigned ADDR_W   = 8;   // source/destination address
  localparam int unsigned PID_W    = 8;   // packet identifier
  localparam int unsigned COMM_W   = 6;   // commodity number
  localparam int unsigned NUM_COMM = 1 << COMM_W;
  localparam int unsigned NPORTS   = 5;   // local + 4 mesh directions
  localparam int unsigned PORT_W   = 3;
  localparam int unsigned MAX_HOPS = 10;  // switches a source route can cross
  localparam int unsigned ROUTE_W  = PORT_W * MAX_HOPS;
  localparam int unsigned MAX_PATHS = 4;  // non-intersecting paths per commodity
  localparam int unsigned PROB_W   = 8;   // path probabilities in 1/256 steps
  localparam int unsigned THR_W    = PROB_W + 1;  // cumulative threshold, 256 = 100 %
  localparam int unsigned COPY_W   = 3;   // up to 7 copies of a critical packet

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  // Head flit payload layout, route in the least significant bits.
  typedef struct packed {
    logic                last_copy;  // last transmitted copy of this packet
    logic                critical;   // packet is sent as a group of copies
    logic [COMM_W-1:0]   comm;
    logic [PID_W-1:0]    pid;
    logic [ADDR_W-1:0]   src;
    logic [ADDR_W-1:0]   dst;
    logic [ROUTE_W-1:0]  route;
  } head_t;

  localparam int unsigned HEAD_W = $bits(head_t);

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [ECC_W-1:0]  ecc;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Configuration writes, one per cycle, addressed to one node.
  typedef enum logic [1:0] {
    CFG_SW_REORDER = 2'd0,  // index = commodity, data[0] = re-order check on
    CFG_NI_FLOW    = 2'd1,  // index = local flow, data = {copies, dst, comm}
    CFG_NI_PATH    = 2'd2   // index = local flow, path = j, data = {en, thr, route}
  } cfg_kind_e;

  typedef struct packed {
    logic              we;
    logic [7:0]        node;
    cfg_kind_e         kind;
    logic [COMM_W-1:0] index;
    logic [1:0]        path;
    logic [63:0]       data;
  } cfg_t;

  function automatic head_t get_head(logic [DATA_W-1:0] d);
    return head_t'(d[HEAD_W-1:0]);
  endfunction

  function automatic logic [DATA_W-1:0] put_head(head_t h);
    logic [DATA_W-1:0] d;
    d = '0;
    d[HEAD_W-1:0] = h;
    return d;
  endfunction

  // Part of a flit covered by the end-to-end check: the route of a head flit
  // is masked off because switches consume it on the way.
  function automatic logic [DATA_W-1:0] ecc_view(logic is_head, logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] v;
    v = d;
    if (is_head) v[ROUTE_W-1:0] = '0;
    return v;
  endfunction

endpackage
