// spil_pkg: types shared by the register-transfer architecture that both
// halves of the codec are built on.
//
// The architecture has one data bus, a source address bus and a destination
// address bus. Every controller state makes exactly one transfer: the unit at
// the source address drives the bus and the unit at the destination address
// loads it. A state of the controller is therefore described by its Moore
// output word (READY plus the two addresses) and by at most one conditional
// branch, which tests either the GO input or one bit of the data bus.
//
// The Moore word keeps the bit order of the controller listings: read left to
// right it is READY, then destination bit 0, source bit 0, destination bit 1,
// source bit 1, and so on (the two address buses are interleaved). With a
// 4-bit address that is 9 bits, and the tables in codec_pkg copy the listed
// masks literally. The 6-bit state code matches the six state lines of the
// controllers.
package spil_pkg;

  localparam int unsigned ADDR_W   = 4;               // source and destination address width
  localparam int unsigned N_UNITS  = 1 << ADDR_W;     // addressable units per bus side
  localparam int unsigned MOORE_W  = 1 + 2 * ADDR_W;  // READY + interleaved addresses
  localparam int unsigned STATE_W  = 6;               // controller state lines

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [MOORE_W-1:0] moore_t;
  typedef logic [STATE_W-1:0] state_t;

  // What a state's conditional arc tests. BR_NONE: unconditional.
  typedef enum logic [1:0] {
    BR_NONE = 2'd0,
    BR_GO   = 2'd1,
    BR_BUS  = 2'd2
  } br_kind_e;

  // One row of a controller program.
  typedef struct packed {
    moore_t   moore;     // Moore output word, listing bit order
    br_kind_e br_kind;   // what the conditional arc tests
    logic [2:0] br_bit;  // data-bus bit tested when br_kind == BR_BUS
    logic     br_pol;    // value of the tested signal that takes the arc
    state_t   next_br;   // target of the conditional arc
    state_t   next_def;  // default (otherwise) target
  } state_entry_t;

  // Unpacked view of a Moore word.
  typedef struct packed {
    logic  ready;
    addr_t dst;
    addr_t src;
  } ctrl_t;

  // Split a listing-order Moore word into READY and the two addresses.
  function automatic ctrl_t decode_moore(moore_t m);
    ctrl_t c;
    c.ready = m[MOORE_W-1];
    for (int i = 0; i < int'(ADDR_W); i++) begin
      c.dst[i] = m[MOORE_W-2-2*i];
      c.src[i] = m[MOORE_W-3-2*i];
    end
    return c;
  endfunction

  // Build a program row (keeps the tables in codec_pkg short).
  function automatic state_entry_t st(moore_t m, br_kind_e k, logic [2:0] b,
                                      logic pol, state_t nbr, state_t ndef);
    state_entry_t e;
    e.moore    = m;
    e.br_kind  = k;
    e.br_bit   = b;
    e.br_pol   = pol;
    e.next_br  = nbr;
    e.next_def = ndef;
    return e;
  endfunction

endpackage
