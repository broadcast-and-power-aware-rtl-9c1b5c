// route_unit -- route computation stage of a router at mesh position (X, Y).
//
// Combinational: from a head flit it returns the set of output ports the
// packet must take (one bit per port, see winoc_pkg).
//  * Wired unicast and the last leg of a wireless unicast use XY routing,
//    the document's default routing.
//  * A broadcast, and a wireless unicast before its wireless hop, travel to
//    the source's nearest WI with South-Last routing (north first, then X,
//    south last), the routing the document gives hybrid-router traffic; at
//    that WI they leave through the WI port.
//  * A broadcast being spread by a WI follows the XY tree of that WI over its
//    region: several ports may be set at once (replication), and the local
//    port is set at every tile of the region, so each tile gets one copy.
// Which WI a tile uses (its nearest) and the exact trees are this design's
// choice; the document names only tree-based load-balanced paths.
module route_unit
  import winoc_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0
) (
  input  flit_t  head,
  output pmask_t mask
);
  head_t h;
  assign h = head_t'(head);

  // distribution masks of this router for each WI tree, fixed at elaboration
  function automatic logic [NUM_WI*NPORT_MAX-1:0] dist_table();
    logic [NUM_WI*NPORT_MAX-1:0] r;
    for (int w = 0; w < NUM_WI; w++) r[w*NPORT_MAX +: NPORT_MAX] = route_dist(X, Y, w);
    return r;
  endfunction
  localparam logic [NUM_WI*NPORT_MAX-1:0] DIST_TAB = dist_table();

  logic [3:0] src_wi;
  assign src_wi = nearest_wi(h.src_x, h.src_y);

  always_comb begin
    mask = '0;
    unique case (h.mode)
      MODE_UNI:   mask = route_xy(3'(X), 3'(Y), h.dst_x, h.dst_y);
      MODE_WUNI:  mask = h.leg ? route_xy(3'(X), 3'(Y), h.dst_x, h.dst_y)
                               : route_south_last(3'(X), 3'(Y), wi_x(src_wi), wi_y(src_wi));
      MODE_BCAST: mask = route_south_last(3'(X), 3'(Y), wi_x(src_wi), wi_y(src_wi));
      MODE_DIST:  mask = (h.wi < 4'(NUM_WI)) ? DIST_TAB[h.wi*NPORT_MAX +: NPORT_MAX] : '0;
      default:    mask = '0;
    endcase
  end
endmodule
