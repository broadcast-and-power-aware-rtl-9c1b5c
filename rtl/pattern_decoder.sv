// pattern_decoder -- address matching of a received header flit in a WI.
//
// Combinational. A header flit received over the air is accepted when its
// WI address field equals this WI's address (a unicast taking its wireless
// hop to this WI) or carries the unique broadcast pattern 4'hF (a broadcast).
// For an accepted header it also produces the header the WI injects into its
// router: a unicast is marked as past its wireless hop (leg = 1) and is then
// routed XY to its destination; a broadcast becomes a distribution packet of
// this WI's tree. The document gives the address matching and the broadcast
// pattern; the field positions and the header rewriting are this design's.
module pattern_decoder
  import winoc_pkg::*;
#(
  parameter int MY_ID = 0
) (
  input  flit_t hdr,
  output logic  match_uni,    // addressed to this WI
  output logic  match_bcast,  // broadcast pattern
  output logic  accept,
  output flit_t hdr_out
);
  head_t h, o;

  always_comb begin
    h           = head_t'(hdr);
    match_uni   = (h.wi == 4'(MY_ID));
    match_bcast = (h.wi == WI_BCAST_ADDR);
    accept      = is_head(hdr) &&
                  ((h.mode == MODE_WUNI  && !h.leg && match_uni) ||
                   (h.mode == MODE_BCAST && match_bcast));
    o = h;
    if (h.mode == MODE_BCAST) begin
      o.mode = MODE_DIST;
      o.wi   = 4'(MY_ID);
    end else begin
      o.leg  = 1'b1;
    end
    hdr_out = flit_t'(o);
  end
endmodule
