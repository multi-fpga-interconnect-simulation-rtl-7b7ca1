// noc_pkg: types and constants shared by the mesh router and the SerDes link.
//
// A flit carries the whole neuron message: data value (64 bit, double precision
// potential), a 2-bit data type, the source cell address used for the multicast
// table lookup, a destination node (x,y) used by unicast XY routing, the 2-bit
// flit kind and the 2-bit virtual-channel number. The field list and the widths of
// data, type, flit kind and VC number follow the packet model of the design; the
// destination field width, the address width (10 bit, about 1000 cells) and the
// code 2'b00 for a single-flit packet are this design's choices.
//
// Port numbering of the 5-port router: 0 local, 1 north, 2 east, 3 south, 4 west.
// North is y-1, south is y+1, east is x+1, west is x-1.
package noc_pkg;

  localparam int NPORTS  = 5;   // local + 4 mesh directions
  localparam int NVC     = 4;   // virtual channels per input port
  localparam int VC_W    = 2;   // width of the VC number field
  localparam int DATA_W  = 64;  // axon / dendrite potential (double)
  localparam int TYPE_W  = 2;   // data type
  localparam int ADR_W   = 10;  // source cell address, log2(1000) rounded up
  localparam int COORD_W = 3;   // mesh coordinate, meshes up to 8x8

  localparam int P_LOCAL = 0;
  localparam int P_NORTH = 1;
  localparam int P_EAST  = 2;
  localparam int P_SOUTH = 3;
  localparam int P_WEST  = 4;

  // flit kind: 01 head, 11 body, 10 tail; 00 is a packet of one flit
  typedef enum logic [1:0] {
    HT_SINGLE = 2'b00,
    HT_HEAD   = 2'b01,
    HT_TAIL   = 2'b10,
    HT_BODY   = 2'b11
  } ht_e;

  typedef struct packed {
    ht_e                 ht;
    logic [VC_W-1:0]     vc;
    logic [TYPE_W-1:0]   typ;
    logic [ADR_W-1:0]    adr;
    logic [COORD_W-1:0]  dy;
    logic [COORD_W-1:0]  dx;
    logic [DATA_W-1:0]   data;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  // flit channel (upstream -> downstream)
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } flit_ch_t;

  // credit channel (downstream -> upstream): one freed buffer slot of one VC
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  // what one physical link carries per local clock cycle: a flit one way and the
  // credit for the opposite direction piggy-backed on it
  typedef struct packed {
    flit_ch_t fch;
    credit_t  cr;
  } link_frame_t;

  localparam int FRAME_W = $bits(link_frame_t);

  typedef logic [NPORTS-1:0] port_mask_t;

  function automatic logic is_head(ht_e h);
    return (h == HT_HEAD) || (h == HT_SINGLE);
  endfunction

  function automatic logic is_tail(ht_e h);
    return (h == HT_TAIL) || (h == HT_SINGLE);
  endfunction

endpackage
