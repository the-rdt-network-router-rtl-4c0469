// rdt_router: one RDT router chip (one 18-bit bit-slice).
//
// The router connects ten links: ports 0..3 to the four neighbours on the
// rank-0 (base) torus (N, E, S, W), ports 4..7 to the four neighbours on the
// node's upper-rank torus, ports 8 and 9 to the two MBPs of the cluster.
// Each link input feeds a multicast controller with two virtual-channel
// packet buffers; the controllers share a 10x11 crossbar, a round-robin
// arbiter, the acknowledge combining buffer (crossbar output 10 is its sink)
// and the shoot-down/error unit.
//
// Link protocol (this design's): a link carries link_t {valid, vc, data}
// one flit per cycle; a packet's flits follow without gaps.  Back from the
// receiver come two "buffer free" bits per link, one per VC; a sender starts
// a packet on a VC only when its bit is set, and the receiving buffer then
// always holds the whole packet.  link_out_free comes from the neighbour (or
// the MBP) and link_in_free goes to it.  Links are modelled as a pair of
// one-way channels; the sharing of one line in both directions and the ECL
// drivers of the real chip are not modelled.
//
// Bit-sliced operation: two chips form a 36-bit link; each chip exports the
// parity of its buffer status (status_par_out) and compares it with the
// partner's (status_par_in) when sliced_en is set.  Independently, each
// buffer keeps a parity bit with its own status; a mismatch there, a header
// parity error, a mismatch with the partner, an MBP request or the cascade line
// puts the router in shoot-down mode (sd_cause tells which).
//
// Configuration: wrap_link marks the torus outputs that cross the wrap-around
// (dateline) of their ring, which selects VC1 in deadlock-free mode;
// timer_sel picks the buffer flush time (100 us .. 100 ms).
module rdt_router
  import rdt_pkg::*;
#(
  parameter int unsigned TICK_CYCLES = 6000,   // 100 us at 60 MHz
  parameter int unsigned CMB_ENTRIES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  link_t      link_in       [N_LINKS],
  output logic [1:0] link_in_free  [N_LINKS],
  output link_t      link_out      [N_LINKS],
  input  logic [1:0] link_out_free [N_LINKS],
  input  logic [7:0] wrap_link,
  input  logic [1:0] timer_sel,
  input  logic       sliced_en,
  input  logic       status_par_in,
  output logic       status_par_out,
  input  logic       mbp_sd_req,
  input  logic       mbp_setup,
  input  logic       chain_in,
  output logic       chain_out,
  output logic       sd_mode,
  output logic [4:0] sd_cause
);
  // controller <-> shared blocks
  logic             cmb_req   [N_LINKS];
  logic             cmb_alloc [N_LINKS];
  logic [KEY_W-1:0] cmb_key   [N_LINKS];
  logic [3:0]       cmb_cnt   [N_LINKS];
  logic [N_LINKS-1:0] cmb_gnt;
  logic             cmb_absorb, cmb_full, cmb_par;

  logic [N_OUT-1:0] req [N_LINKS];
  logic [N_OUT-1:0] gnt [N_LINKS];
  logic             rel [N_LINKS];
  logic [3:0]       sel [N_OUT];
  logic             own [N_OUT];

  flit_t      tx_data  [N_LINKS];
  logic       tx_valid [N_LINKS];
  logic [7:0] tx_ovc   [N_LINKS];
  link_t      xout     [N_OUT];

  logic [1:0] dn_free [N_OUT];
  logic [N_LINKS-1:0] hdr_err, spar, stat_err;
  logic [N_LINKS-1:0] ev_partial, ev_flush, ev_timeout;

  always_comb begin
    for (int o = 0; o < int'(N_LINKS); o++) dn_free[o] = link_out_free[o];
    dn_free[P_CMB] = 2'b11;                      // the combining sink never blocks
  end

  for (genvar i = 0; i < int'(N_LINKS); i++) begin : g_ctl
    mcast_ctrl #(.PORT(i), .TICK_CYCLES(TICK_CYCLES)) u_ctl (
      .clk, .rst_n,
      .rx         (link_in[i]),
      .rx_free    (link_in_free[i]),
      .sd_mode    (sd_mode),
      .wrap_link  (wrap_link),
      .timer_sel  (timer_sel),
      .cmb_req    (cmb_req[i]),
      .cmb_alloc  (cmb_alloc[i]),
      .cmb_key    (cmb_key[i]),
      .cmb_cnt    (cmb_cnt[i]),
      .cmb_gnt    (cmb_gnt[i]),
      .cmb_absorb (cmb_absorb),
      .dn_free    (dn_free),
      .req        (req[i]),
      .gnt        (gnt[i]),
      .release_o  (rel[i]),
      .tx_data    (tx_data[i]),
      .tx_valid   (tx_valid[i]),
      .tx_ovc     (tx_ovc[i]),
      .hdr_err    (hdr_err[i]),
      .status_par (spar[i]),
      .ev_partial (ev_partial[i]),
      .ev_flush   (ev_flush[i]),
      .ev_timeout (ev_timeout[i]),
      .stat_err   (stat_err[i])
    );
  end

  xbar_arbiter #(.NI(N_LINKS), .NO(N_OUT)) u_arb (
    .clk, .rst_n, .req, .release_i (rel), .gnt, .sel, .own
  );

  xbar #(.NI(N_LINKS), .NO(N_OUT)) u_xbar (
    .in_data (tx_data), .in_valid (tx_valid), .in_ovc (tx_ovc),
    .sel, .own, .out (xout)
  );

  ack_combiner #(.NI(N_LINKS), .ENTRIES(CMB_ENTRIES)) u_cmb (
    .clk, .rst_n,
    .req (cmb_req), .alloc (cmb_alloc), .key (cmb_key), .cnt (cmb_cnt),
    .gnt (cmb_gnt), .absorb (cmb_absorb), .full (cmb_full), .par (cmb_par)
  );

  assign status_par_out = ^spar ^ cmb_par;

  sd_ctrl u_sd (
    .clk, .rst_n,
    .mbp_req     (mbp_sd_req),
    .setup       (mbp_setup),
    .hdr_err     (|hdr_err),
    .stat_err    (|stat_err),
    .sliced_en   (sliced_en),
    .par_local   (status_par_out),
    .par_partner (status_par_in),
    .chain_in    (chain_in),
    .chain_out   (chain_out),
    .sd_mode     (sd_mode),
    .cause       (sd_cause)
  );

  // Links and MBP ports; output 10 (absorbed acknowledges) ends here.
  always_comb
    for (int o = 0; o < int'(N_LINKS); o++) link_out[o] = xout[o];
endmodule
