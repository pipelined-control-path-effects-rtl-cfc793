// noc_pkg: types and constants shared by the router and mesh.
//
// A flit is 39 bits wide: a 3-bit flit type, a 4-bit local ID-tag and a 32-bit
// data word, in that order from the MSB down (bits 39..37, 36..33 and 32..1 when
// counted from 1). A message is one packet: a header flit, any number of data
// body flits and a closing tail flit ("DEnd"). The header's data word carries
// 4-bit source and target coordinates: Xs Ys Zs Xt Yt Zt ext1 ext2 from bit 31
// down. The Z coordinates and the two extension nibbles are carried but unused,
// as in the source design (Z is reserved for 3D or hierarchical networks).
//
// The bit layout and field widths follow the packet format of the design. The
// numeric codes of the three flit types are this implementation's own choice.
//
// Ports are numbered East, North, West, South, Local. CONN gives, for every
// output port, the input ports that the crossbar connects to it under static XY
// (X-first) routing: a flit travelling North or South never turns East or West,
// and no port loops back to itself.
package noc_pkg;

  localparam int unsigned FLIT_W  = 39;
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned ID_W    = 4;
  localparam int unsigned ID_SLOTS = 16;  // ID slots per link (4-bit ID-tag)
  localparam int unsigned NP      = 5;    // router ports
  localparam int unsigned COORD_W = 4;

  typedef enum logic [2:0] {
    FT_IDLE = 3'b000,
    FT_HEAD = 3'b001,   // header flit: carries source and target address
    FT_BODY = 3'b010,   // data body flit
    FT_TAIL = 3'b011    // end of data body: closes the path reservation
  } flit_type_e;

  typedef struct packed {
    flit_type_e        ftype;
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
  } flit_t;

  typedef enum logic [2:0] {
    P_E = 3'd0,
    P_N = 3'd1,
    P_W = 3'd2,
    P_S = 3'd3,
    P_L = 3'd4
  } port_e;

  // CONN[out][in]: the crossbar connects input 'in' to output 'out'.
  //                           in:  L S W N E
  localparam logic [NP-1:0][NP-1:0] CONN = {
                               5'b0_1_1_1_1,   // out L <- E N W S
                               5'b1_0_1_1_1,   // out S <- E N W L
                               5'b1_0_0_0_1,   // out W <- E L
                               5'b1_1_1_0_1,   // out N <- E W S L
                               5'b1_0_1_0_0 }; // out E <- W L

  // Bit positions of the target coordinates in a header's data word.
  localparam int unsigned XT_LSB = 16;
  localparam int unsigned YT_LSB = 12;

  // Static XY routing: first along X until the column matches, then along Y.
  // Y grows towards North.
  function automatic port_e xy_route(logic [COORD_W-1:0] my_x, logic [COORD_W-1:0] my_y,
                                     logic [COORD_W-1:0] xt,   logic [COORD_W-1:0] yt);
    if (xt > my_x)      return P_E;
    else if (xt < my_x) return P_W;
    else if (yt > my_y) return P_N;
    else if (yt < my_y) return P_S;
    else                return P_L;
  endfunction

  function automatic logic [NP-1:0] port_onehot(port_e p);
    logic [NP-1:0] v;
    v = '0;
    v[p] = 1'b1;
    return v;
  endfunction

  function automatic flit_t make_header(logic [COORD_W-1:0] xs, logic [COORD_W-1:0] ys,
                                        logic [COORD_W-1:0] xt, logic [COORD_W-1:0] yt,
                                        logic [ID_W-1:0] id, logic [7:0] ext);
    flit_t f;
    f.ftype = FT_HEAD;
    f.id    = id;
    f.data  = {xs, ys, 4'd0, xt, yt, 4'd0, ext};
    return f;
  endfunction

endpackage
