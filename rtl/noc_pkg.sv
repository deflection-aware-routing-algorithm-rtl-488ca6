// noc_pkg: types, constants and helper functions shared by the fault-tolerant
// mesh NoC.
//
// Port numbering of a router: LOCAL (the attached core), NORTH, EAST, SOUTH,
// WEST. The mesh is addressed by (x, y); x grows towards EAST and y grows
// towards SOUTH, so the NORTH neighbour of (x, y) is (x, y-1).
//
// A header flit carries its routing fields in the low data bits:
//   [2:0] destination x, [5:3] destination y, [8:6] source x, [11:9] source y.
// Three bits per coordinate cover the 8x8 mesh of the design; the field
// layout is a choice of this design, the mesh size follows the source.
//
// enc_width() and n_groups() give the size of a protected flit.
// ham_r() gives the number of Hamming check bits r for a group of n data bits:
// the smallest r with 2^r - r - 1 >= n, which reproduces the (m, n) codes
// listed for flit widths 32..128 (for example (7,4) and (21,16)).
package noc_pkg;

  localparam int unsigned COORD_W  = 3;            // bits per mesh coordinate
  localparam int unsigned NPORTS   = 5;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    F_BODY     = 2'd0,
    F_HEAD     = 2'd1,
    F_TAIL     = 2'd2,
    F_HEADTAIL = 2'd3   // single-flit packet
  } ftype_e;

  typedef struct packed {
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } addr_t;

  function automatic logic is_head(ftype_e t);
    return (t == F_HEAD) || (t == F_HEADTAIL);
  endfunction

  function automatic logic is_tail(ftype_e t);
    return (t == F_TAIL) || (t == F_HEADTAIL);
  endfunction

  // Number of Hamming check bits for n data bits.
  function automatic int unsigned ham_r(int unsigned n);
    int unsigned r;
    r = 1;
    while (((1 << r) - r - 1) < n) r++;
    return r;
  endfunction

  // Width of a flit after protection: B groups of flit_w/b bits and, when
  // b does not divide flit_w, one residue group of flit_w mod b bits, each
  // extended by its Hamming check bits.
  function automatic int unsigned enc_width(int unsigned flit_w, int unsigned b);
    int unsigned n, nr;
    n  = flit_w / b;
    nr = flit_w % b;
    return b * (n + ham_r(n)) + ((nr > 0) ? nr + ham_r(nr) : 0);
  endfunction

  // Number of Hamming groups of a flit.
  function automatic int unsigned n_groups(int unsigned flit_w, int unsigned b);
    return (flit_w % b == 0) ? b : b + 1;
  endfunction

  // Destination address held in a header flit's data bits.
  function automatic addr_t hdr_dest(logic [2*COORD_W-1:0] hdr);
    addr_t a;
    a.x = hdr[COORD_W-1:0];
    a.y = hdr[2*COORD_W-1:COORD_W];
    return a;
  endfunction

endpackage
