// bitmap_gen: multicast bit-map generator (pure combinational).
//
// From the header of a packet, the link it arrived on, the packet's mode and
// the router's state it produces the set of crossbar outputs the packet must
// reach (omap, one bit per output) and the virtual channel (VC) to use on
// each torus output (ovc).  The document names these inputs and says the
// circuit is combinational; the rules below are this design's:
//
//  * shoot-down mode: every packet goes to MBP0 only, header left unshifted
//    (forced=1) so the MBP can later re-inject it unchanged;
//  * otherwise the hop descriptor in header flit 1 selects N/E/S/W of the
//    base (rank=0) or upper (rank=1) torus plus MBP0/MBP1; the link the
//    packet came in on is never selected again; an empty result means the
//    packet has reached its destination and goes to MBP0.
//  * VC choice (deadlock-free mode): VC1 on a link marked as the wrap-around
//    (dateline) link of its torus ring; the incoming VC is kept when the
//    packet goes straight on in the same torus; VC0 after any turn.  In user
//    selection mode (header bit umode) the header's VC bit is used.
module bitmap_gen
  import rdt_pkg::*;
(
  input  flit_t      hdr0,
  input  flit_t      hdr1,
  input  logic [3:0] in_port,     // 0..9, the link the packet arrived on
  input  logic       in_vc,
  input  logic       sd_mode,     // router is in shoot-down mode
  input  logic [7:0] wrap_link,   // which torus outputs are dateline links
  output omap_t      omap,
  output logic [7:0] ovc,
  output logic       forced
);
  hdr0_t h0;
  hop_t  hop;
  omap_t route;

  always_comb begin
    h0  = hdr0_t'(hdr0);
    hop = hop_t'(hdr1[7:0]);

    route = '0;
    if (hop.rank) route[7:4] = hop.dirs;
    else          route[3:0] = hop.dirs;
    route[P_MBP0] = hop.mbp[0];
    route[P_MBP1] = hop.mbp[1];
    if (in_port < 4'd8) route[in_port] = 1'b0;      // never back where it came from
    if (route == '0) route[P_MBP0] = 1'b1;          // destination reached

    forced = 1'b0;
    if (sd_mode) begin
      omap   = omap_t'(1) << P_MBP0;
      forced = 1'b1;
    end else begin
      omap = route;
    end

    for (int o = 0; o < 8; o++) begin
      if (h0.umode)                              ovc[o] = h0.uvc;
      else if (wrap_link[o])                     ovc[o] = 1'b1;
      else if (in_port < 4'd8 && 4'(o) == (in_port ^ 4'd2)) ovc[o] = in_vc;
      else                                       ovc[o] = 1'b0;
    end
  end
endmodule
