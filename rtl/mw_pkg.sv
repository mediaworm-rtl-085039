// mw_pkg: types and constants shared by the MediaWorm router.
//
// A message is a train of flits. The link carries one flit per cycle
// together with a small sideband: a valid bit, the virtual channel (VC) the
// flit travels on and its type (head, body, tail, or a single-flit message).
// The 32-bit flit width is the document's (flit size 32 bits for 400 Mbps
// links). The header layout is this design's own choice, since the document
// only says that the header carries the routing information and the
// message's Vtick:
//   data[31:24]  destination node
//   data[23:16]  output VC the message uses on every hop
//   data[15:0]   Vtick: router cycles between successive flits of the message
// Credits flow back on a separate bundle: one VC index per freed buffer slot.
//
// Timestamps are unsigned counters that wrap; ts_before() compares them by
// the sign of their difference, so any two stamps less than 2^(TS_W-1)
// apart order correctly.
package mw_pkg;

  localparam int FLIT_W    = 32;   // flit size (document: 32 bits)
  localparam int VCID_W    = 8;    // width of the VC field on the link
  localparam int DEST_W    = 8;    // width of the destination field
  localparam int VTICK_W   = 16;   // width of the Vtick field
  localparam int TS_W      = 32;   // width of the virtual clock / timestamps

  // Vtick given to best-effort traffic: the largest value.
  localparam logic [VTICK_W-1:0] VTICK_BE = '1;

  typedef enum logic [1:0] {
    FT_HEAD     = 2'b00,
    FT_BODY     = 2'b01,
    FT_TAIL     = 2'b10,
    FT_HEADTAIL = 2'b11
  } flit_type_e;

  typedef logic [TS_W-1:0] ts_t;

  // One flit with its type.
  typedef struct packed {
    flit_type_e         ftype;
    logic [FLIT_W-1:0]  data;
  } flit_t;

  // One cycle of a physical link.
  typedef struct packed {
    logic               valid;
    logic [VCID_W-1:0]  vc;
    flit_t              flit;
  } link_t;

  // One credit returned to the upstream sender.
  typedef struct packed {
    logic               valid;
    logic [VCID_W-1:0]  vc;
  } credit_t;

  // A flit as held in an input VC buffer, with its FGVC timestamp.
  typedef struct packed {
    flit_t  flit;
    ts_t    stamp;
  } stamped_flit_t;

  function automatic logic is_head(flit_type_e t);
    return (t == FT_HEAD) || (t == FT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FT_TAIL) || (t == FT_HEADTAIL);
  endfunction

  function automatic logic [DEST_W-1:0] hdr_dest(logic [FLIT_W-1:0] d);
    return d[31:24];
  endfunction

  function automatic logic [VCID_W-1:0] hdr_ovc(logic [FLIT_W-1:0] d);
    return d[23:16];
  endfunction

  function automatic logic [VTICK_W-1:0] hdr_vtick(logic [FLIT_W-1:0] d);
    return d[15:0];
  endfunction

  function automatic logic [FLIT_W-1:0] make_header(logic [DEST_W-1:0] dest,
                                                    logic [VCID_W-1:0] ovc,
                                                    logic [VTICK_W-1:0] vtick);
    return {dest, ovc, vtick};
  endfunction

  // True when stamp a is strictly earlier than stamp b (wrap-safe).
  function automatic logic ts_before(ts_t a, ts_t b);
    ts_t diff;
    diff = a - b;
    return diff[TS_W-1];
  endfunction

endpackage
