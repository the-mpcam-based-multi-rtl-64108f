// mpcam_pkg: widths and bus types shared by the MPCAM shared cache.
//
// A shared variable travels as a (tag, data) pair. The tag names one version
// of one variable (address and version number packed together by software);
// the hardware treats it as an opaque key and never splits it. The tag is
// 32 bits wide, enough for four giga distinct versions. The data word width
// is this design's choice (one 32-bit operand, as the store-back and
// operand-fetch stages of a 32-bit core move it).
//
// Three bundles recur on every bus of the crossbar:
//   wr_req_t  a horizontal (write/broadcast) bus, driven by a store-back unit
//             or by the global MMU. `far_reach` selects the far-reaching DPCAM of
//             each cross point instead of the near-reaching one.
//   rd_req_t  a vertical (search) bus, driven by an operand-fetch unit.
//   rd_rsp_t  the answer on a vertical bus, one cycle after the request:
//             `valid` marks the answer cycle, `hit` says the tag was found.
package mpcam_pkg;

  localparam int unsigned TAG_W  = 32;
  localparam int unsigned DATA_W = 32;

  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [DATA_W-1:0] data_t;

  typedef struct packed {
    logic  en;
    logic  far_reach;
    tag_t  tag;
    data_t data;
  } wr_req_t;

  typedef struct packed {
    logic en;
    tag_t tag;
  } rd_req_t;

  typedef struct packed {
    logic  valid;
    logic  hit;
    data_t data;
  } rd_rsp_t;

endpackage
