// rdt_pkg: types, constants and helper functions shared by the RDT router.
//
// Ports: 0..3 are the rank-0 (base) torus links N, E, S, W; 4..7 the
// upper-rank torus links N, E, S, W; 8 and 9 the two MBP (memory based
// processor) ports; output 10 exists only inside the chip and is the sink of
// the acknowledge combining buffer (the "11th" output of the 10x11 crossbar).
//
// A flit is 18 bits, one bit-slice of the 36-bit link; a packet is a 3-flit
// header followed by a variable body, 16 flits at most.  The bit layout of
// the header is this design's own (only its contents are named):
//
//   header flit 0: [17] even parity of [16:0]   [16:15] packet type
//                  [14] combining disable       [13] user VC mode
//                  [12] user VC                 [11:8] length-1 (2..15)
//                  [7:0] combining key
//   header flits 1 and 2: [17] even parity, [16] zero, [15:0] two hop
//                  descriptors; flit1[7:0] is the one used at this router.
//   hop descriptor: [7] rank (0 base torus, 1 upper torus)
//                   [6:3] direction bit map {W,S,E,N}
//                   [2:1] MBP bit map {MBP1,MBP0}  [0] zero
//
// Each router uses the first hop descriptor and shifts the list by one
// descriptor before forwarding, so the next router again finds its own
// descriptor in flit 1.
package rdt_pkg;

  localparam int unsigned N_LINKS  = 10;          // crossbar inputs
  localparam int unsigned N_OUT    = 11;          // crossbar outputs
  localparam int unsigned FLIT_W   = 18;          // bit-slice width
  localparam int unsigned N_VC     = 2;           // virtual channels per link
  localparam int unsigned MAX_FLITS = 16;         // longest packet
  localparam int unsigned HDR_FLITS = 3;
  localparam int unsigned KEY_W    = 8;

  localparam int unsigned P_MBP0 = 8;
  localparam int unsigned P_MBP1 = 9;
  localparam int unsigned P_CMB  = 10;

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [N_OUT-1:0]  omap_t;     // one bit per crossbar output

  typedef enum logic [1:0] {
    PT_DATA  = 2'b00,    // unicast / ordinary packet
    PT_MCAST = 2'b01,    // multicast needing acknowledges (combinable)
    PT_ACK   = 2'b10,    // acknowledge packet
    PT_RSVD  = 2'b11
  } ptype_e;

  // One link direction: a flit, its valid and the virtual channel it is on.
  typedef struct packed {
    logic  valid;
    logic  vc;
    flit_t data;
  } link_t;

  typedef struct packed {
    logic       par;
    ptype_e     ptype;
    logic       ncomb;
    logic       umode;
    logic       uvc;
    logic [3:0] len_m1;
    logic [KEY_W-1:0] key;
  } hdr0_t;

  typedef struct packed {
    logic       rank;
    logic [3:0] dirs;
    logic [1:0] mbp;
    logic       zero;
  } hop_t;

  function automatic logic par_ok(flit_t f);
    return ^f == 1'b0;
  endfunction

  // Return a header flit with its parity bit set.
  function automatic flit_t with_par(logic [FLIT_W-2:0] body);
    return {^body, body};
  endfunction

  // Shift the hop list of header flits 1 and 2 by one descriptor.
  function automatic logic [2*FLIT_W-1:0] shift_hops(flit_t h1, flit_t h2);
    logic [31:0] hops;
    hops = {h2[15:0], h1[15:0]} >> 8;
    return {with_par({1'b0, hops[31:16]}), with_par({1'b0, hops[15:0]})};
  endfunction

endpackage
