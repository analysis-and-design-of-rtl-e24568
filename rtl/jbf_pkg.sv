// jbf_pkg: types and constants shared by the integral-histogram joint
// bilateral filter (JBF) accelerator.
//
// The accelerator filters a source image J under the guidance of an image I
// (8-bit grey levels each) with a |S|x|S| box space kernel and a Gaussian
// range kernel. Defaults are the design point of the architecture: HD1080p
// frames, 31x31 window, 60-pixel stripes, 64 histogram bins (quantisation
// factor 4), a 32-entry range-weight table and a 64-bit off-chip bus that
// moves 8 pixels per beat.
//
// The bus request/response structs and the stream identifiers are this
// design's own concrete choice of a bus protocol; the architecture only fixes
// the 64-bit width and the round-robin order of the six bus slots.
package jbf_pkg;

  localparam int unsigned PIX_W   = 8;     // grey level width
  localparam int unsigned LANES   = 8;     // pixels per 64-bit bus beat
  localparam int unsigned BUS_W   = PIX_W * LANES;
  localparam int unsigned ADDR_W  = 32;    // byte (= pixel) address

  // Design-point defaults.
  localparam int unsigned DEF_M     = 1080;  // frame height
  localparam int unsigned DEF_N     = 1920;  // frame width
  localparam int unsigned DEF_WIN   = 31;    // window width |S|
  localparam int unsigned DEF_WS    = 60;    // stripe width w_s
  localparam int unsigned DEF_NB    = 64;    // number of bins N_b
  localparam int unsigned DEF_TBL_N = 32;    // range-weight table entries
  localparam int unsigned DEF_G_W   = 8;     // range-weight width (fraction of 1)

  typedef logic [PIX_W-1:0] pix_t;

  // Round-robin slots of one 8-cycle pipeline tile. Slots 0..4 each fetch one
  // 8-pixel word for an input buffer, slot 5 stores one 8-pixel result word.
  typedef enum logic [2:0] {
    SLOT_IC  = 3'd0,   // guidance pixel at the window centre, I_c
    SLOT_IS  = 3'd1,   // guidance pixel entering the window, I_S
    SLOT_JS  = 3'd2,   // source pixel entering the window, J_S
    SLOT_IQ  = 3'd3,   // guidance pixel leaving the window, I_Q
    SLOT_JQ  = 3'd4,   // source pixel leaving the window, J_Q
    SLOT_OUT = 3'd5    // result word O_c
  } slot_e;

  // Off-chip bus request: one 8-pixel read or byte-masked write per cycle.
  // Addresses are pixel addresses and need not be 8-aligned.
  typedef struct packed {
    logic              req;
    logic              we;
    logic [2:0]        id;      // read tag, returned with the data
    logic [ADDR_W-1:0] addr;
    logic [BUS_W-1:0]  wdata;   // lane k = byte k = pixel at addr+k
    logic [LANES-1:0]  be;      // byte enables of a write
  } bus_req_t;

  typedef struct packed {
    logic              rvalid;
    logic [2:0]        rid;
    logic [BUS_W-1:0]  rdata;
  } bus_rsp_t;

  // Tag that travels through the core with every position: where its
  // result goes in the output packet.
  typedef struct packed {
    logic              en;      // result is an output pixel
    logic [2:0]        lane;    // lane in the 8-pixel packet
    logic [ADDR_W-1:0] paddr;   // pixel address of the packet
  } res_tag_t;

endpackage
