// noc_pkg: types and constants shared by the Spidergon network-on-chip,
// its network interfaces (NIs) and the tiles of the MPSoC.
//
// A link carries one flit per cycle from an upstream (US) interface to a
// downstream (DS) interface: the flit itself, its flit_id (single, first,
// intermediate, last), a 2-bit flit_id_error, the flit_id_atomic bit, the
// four_be mask (one bit per 32-bit piece, K = FLIT_W/32) and valid. Credits
// travel back on a separate wire, one pulse per freed buffer slot.
//
// The header flit of every packet starts with the network layer header (NLH):
// a source route of up to three 3-bit output-port selections, one per router
// crossed, and a QoS priority. The transport layer header (TLH) follows it
// in the same flit: opcode, source NI, address, number of 32-bit bus cells
// and the error code of a response.
//
// From the design description: 128-bit flits, 8 routers, Left/Right/Across
// links, at most three routers crossed, routes fixed by the NI at injection,
// header and payload in separate flits. Field widths, the port numbering, the
// NLH/TLH bit layout and the clockwise meaning of "Right" are choices of this
// design.
package noc_pkg;

  parameter int unsigned FLIT_W    = 128;
  parameter int unsigned BE_W      = FLIT_W / 32;  // K = N/32
  parameter int unsigned N_ROUTERS = 8;
  parameter int unsigned BUS_W     = 32;           // AHB data width
  parameter int unsigned MAX_CELLS = 4;            // bus cells per packet (one 128-bit payload flit)

  // Router port numbering. Ports 3 and 4 are the local (NI) ports.
  typedef enum logic [2:0] {
    PORT_LEFT   = 3'd0,
    PORT_RIGHT  = 3'd1,
    PORT_ACROSS = 3'd2,
    PORT_NI1    = 3'd3,
    PORT_NI2    = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FLIT_SINGLE = 2'b00,
    FLIT_FIRST  = 2'b01,
    FLIT_INT    = 2'b10,
    FLIT_LAST   = 2'b11
  } flit_id_e;

  typedef struct packed {
    logic              valid;
    flit_id_e          flit_id;
    logic [1:0]        flit_id_error;
    logic              flit_id_atomic;
    logic [BE_W-1:0]   four_be;
    logic [FLIT_W-1:0] flit;
  } link_t;

  localparam link_t LINK_IDLE = '{valid: 1'b0, flit_id: FLIT_SINGLE, default: '0};

  typedef enum logic [1:0] {
    OP_READ      = 2'd0,
    OP_WRITE     = 2'd1,
    OP_READ_RSP  = 2'd2,
    OP_WRITE_RSP = 2'd3
  } opcode_e;

  // Network layer header: route[2:0] is used by the first router crossed,
  // route[5:3] by the second, route[8:6] by the third. Each router shifts the
  // route right by three bits before forwarding the header.
  typedef struct packed {
    logic [1:0] prio;
    logic [8:0] route;
  } nlh_t;

  // Transport layer header
  typedef struct packed {
    opcode_e     opcode;
    logic [3:0]  src_ni;    // NI that sent the request (destination of the response)
    logic [27:0] addr;      // byte address inside the target
    logic [2:0]  cells;     // number of 32-bit bus cells, 1..4
    logic [1:0]  err;       // response error code (0 = OK)
  } tlh_t;

  localparam int unsigned HDR_BITS = $bits(nlh_t) + $bits(tlh_t);

  // Placement of an NI in the network
  typedef struct packed {
    logic [2:0] router;
    logic       lport;   // 0 -> PORT_NI1, 1 -> PORT_NI2
  } ni_pos_t;

  // Source route between two NIs across the 8-node Spidergon. Right goes to
  // router index +1, Left to index -1, Across to index +4. Destinations at
  // ring distance 1 or 2 go along the ring, the others go Across first and
  // then at most one ring hop, so no route crosses more than three routers.
  function automatic logic [8:0] spidergon_route(ni_pos_t src, ni_pos_t dst);
    logic [2:0] rel;
    logic [2:0] loc;
    logic [8:0] r;
    rel = dst.router - src.router;
    loc = dst.lport ? PORT_NI2 : PORT_NI1;
    r   = '0;
    unique case (rel)
      3'd0: r = {6'd0, loc};
      3'd1: r = {3'd0, loc, PORT_RIGHT};
      3'd2: r = {loc, PORT_RIGHT, PORT_RIGHT};
      3'd7: r = {3'd0, loc, PORT_LEFT};
      3'd6: r = {loc, PORT_LEFT, PORT_LEFT};
      3'd4: r = {3'd0, loc, PORT_ACROSS};
      3'd5: r = {loc, PORT_RIGHT, PORT_ACROSS};
      3'd3: r = {loc, PORT_LEFT, PORT_ACROSS};
      default: r = '0;
    endcase
    return r;
  endfunction

  // Header flit: NLH in the lowest bits, TLH above it.
  function automatic logic [FLIT_W-1:0] make_header(nlh_t nlh, tlh_t tlh);
    logic [FLIT_W-1:0] f;
    f = '0;
    f[HDR_BITS-1:0] = {tlh, nlh};
    return f;
  endfunction

  function automatic nlh_t hdr_nlh(logic [FLIT_W-1:0] f);
    return nlh_t'(f[$bits(nlh_t)-1:0]);
  endfunction

  function automatic tlh_t hdr_tlh(logic [FLIT_W-1:0] f);
    return tlh_t'(f[HDR_BITS-1:$bits(nlh_t)]);
  endfunction

  function automatic logic is_head(flit_id_e id);
    return (id == FLIT_SINGLE) || (id == FLIT_FIRST);
  endfunction

  function automatic logic is_tail(flit_id_e id);
    return (id == FLIT_SINGLE) || (id == FLIT_LAST);
  endfunction

endpackage
