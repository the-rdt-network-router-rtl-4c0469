// mcast_ctrl: multicast / handshake controller of one input link.
//
// Each of the ten links has one controller with two virtual-channel (VC)
// packet buffers, one bit-map generator and one sender.
//
// Receiving.  A packet arrives on `rx` one flit per cycle without gaps, on
// the VC named with each flit, and only into a VC whose rx_free bit was set
// (whole-packet buffers: once started, a packet always fits).  Flit i is
// written at address i of that VC's buffer; the three header flits are also
// kept in registers and their parity is checked (hdr_err).  The cycle after
// the header is complete the bit-map generator computes the set of outputs
// (the multicast bit map) and the VC of each output.  An acknowledge packet
// first asks the combining buffer whether it is absorbed; a combinable
// multicast to two or more outputs first records its key and fan-out there.
//
// Sending.  Whenever some outputs in the bit map have a free downstream
// buffer (dn_free, per output and VC), the controller requests them from the
// arbiter and sends the packet to all outputs it is granted at once, then
// clears their bits.  Outputs not yet free are served by later sends, each
// of which reads the packet from the buffer again.  When the send that clears
// the last bit starts, the buffer is offered to the upstream again
// (rx_free), so the next packet is written while the last multicast is still
// reading: the reader started first and both move one flit per cycle.  The
// hop list of the header is shifted by one descriptor on the way out.  During
// the tail flit the controller may already win the next send (release and a
// new grant in the same cycle), so packets leave back to back.
//
// Flushing.  If the router is in shoot-down mode, or a packet has waited
// longer than the buffer timer's firing time, the packet's remaining bit map
// is replaced by MBP0 and it is sent with its header unchanged.
//
// Status checking.  Each buffer's status {pv, pforced, pend} is stored with
// a parity bit; stat_err flags a mismatch (an upset register).  status_par is
// the parity of all status bits, for comparison with the bit-slice partner.
//
// The partial multicast, the insertion of the next packet during the last
// multicast, the header shift, the two VCs, the combining and the flush
// follow the document; the buffer-handshake signals, the header layout and
// all cycle timing are this design's.
//
// Timing: first flit of a send on tx one cycle after the grant; a packet
// whose outputs are free leaves 3 cycles after its third flit arrived.
module mcast_ctrl
  import rdt_pkg::*;
#(
  parameter int unsigned PORT        = 0,     // this link's crossbar input
  parameter int unsigned TICK_CYCLES = 6000
) (
  input  logic             clk,
  input  logic             rst_n,
  // link input and per-VC "can take a new packet"
  input  link_t            rx,
  output logic [1:0]       rx_free,
  // router state and configuration
  input  logic             sd_mode,
  input  logic [7:0]       wrap_link,
  input  logic [1:0]       timer_sel,
  // combining buffer
  output logic             cmb_req,
  output logic             cmb_alloc,
  output logic [KEY_W-1:0] cmb_key,
  output logic [3:0]       cmb_cnt,
  input  logic             cmb_gnt,
  input  logic             cmb_absorb,
  // arbiter
  input  logic [1:0]       dn_free [N_OUT],  // downstream buffer free, per VC
  output omap_t            req,
  input  omap_t            gnt,
  output logic             release_o,
  // crossbar input
  output flit_t            tx_data,
  output logic             tx_valid,
  output logic [7:0]       tx_ovc,
  // status and events
  output logic             hdr_err,
  output logic             status_par,
  output logic             ev_partial,      // a send left outputs for later
  output logic             ev_flush,        // a packet was forced to the MBP
  output logic             ev_timeout,      // ... because its timer fired
  output logic             stat_err         // stored status parity of a buffer is wrong
);
  localparam logic [3:0] PORT_ID = 4'(PORT);

  // ---------------- receive side, per VC ----------------
  logic       rx_act  [2];
  logic [3:0] rx_cnt  [2];
  logic [3:0] rx_len  [2];         // length-1
  flit_t      hdr     [2][3];
  logic       hp      [2];         // header complete, bit map not yet made

  // ---------------- packet side, per VC ----------------
  logic       pv      [2];         // packet with outputs still to serve
  omap_t      pend    [2];
  logic [7:0] povc    [2];
  flit_t      phdr    [2][3];      // original header
  logic [3:0] plen    [2];
  logic       pforced [2];
  logic       expired [2];
  logic       spar    [2];         // stored parity of {pv, pforced, pend}

  // ---------------- sender ----------------
  logic       snd_act, snd_vc, snd_last;
  logic [3:0] snd_cnt, snd_len;
  flit_t      snd_h1, snd_h2;
  logic       last_vc;             // VC served by the previous send

  logic [3:0] raddr;
  flit_t      rdata [2];

  for (genvar v = 0; v < 2; v++) begin : g_vc
    packet_buffer #(.DEPTH(MAX_FLITS), .WIDTH(FLIT_W)) u_buf (
      .clk,
      .we    (rx.valid && rx.vc == 1'(v)),
      .waddr (rx_act[v] ? rx_cnt[v] : 4'd0),
      .wdata (rx.data),
      .raddr (raddr),
      .rdata (rdata[v])
    );
    buffer_timer #(.TICK_CYCLES(TICK_CYCLES)) u_tmr (
      .clk, .rst_n,
      .run     (pv[v] && !pforced[v]),
      .sel     (timer_sel),
      .expired (expired[v])
    );
    assign rx_free[v] = !rx_act[v] && !hp[v] && !pv[v];
  end

  // ---------------- bit-map generation for the VC whose header is ready ----
  logic  gv;                       // VC being processed
  logic  gact;
  hdr0_t gh0;
  omap_t gmap;
  logic [7:0] govc;
  logic  gforced, need_lookup, need_alloc, gdone;
  logic [3:0] fanout;

  always_comb begin
    gact = hp[0] || hp[1];
    gv   = hp[0] ? 1'b0 : 1'b1;
    gh0  = hdr0_t'(hdr[gv][0]);
  end

  bitmap_gen u_bmg (
    .hdr0      (hdr[gv][0]),
    .hdr1      (hdr[gv][1]),
    .in_port   (PORT_ID),
    .in_vc     (gv),
    .sd_mode   (sd_mode),
    .wrap_link (wrap_link),
    .omap      (gmap),
    .ovc       (govc),
    .forced    (gforced)
  );

  always_comb begin
    fanout = '0;
    for (int o = 0; o < int'(N_OUT); o++) fanout += 4'(gmap[o]);
    need_lookup = gact && !sd_mode && gh0.ptype == PT_ACK && !gh0.ncomb;
    need_alloc  = gact && !sd_mode && gh0.ptype == PT_MCAST && !gh0.ncomb && fanout >= 4'd2;
    cmb_req     = need_lookup || need_alloc;
    cmb_alloc   = need_alloc;
    cmb_key     = gh0.key;
    cmb_cnt     = fanout;
    gdone       = gact && (!cmb_req || cmb_gnt);
  end

  // ---------------- send request ----------------
  omap_t rdy [2];
  logic  sv;                       // VC offered to the arbiter
  logic  can_req;

  always_comb begin
    for (int v = 0; v < 2; v++)
      for (int o = 0; o < int'(N_OUT); o++)
        rdy[v][o] = pend[v][o] && dn_free[o][(o < 8) ? povc[v][o % 8] : 1'b0];
    snd_last = snd_act && snd_cnt == snd_len;
    can_req  = !snd_act || snd_last;
    if (pv[0] && |rdy[0] && pv[1] && |rdy[1]) sv = !last_vc;
    else                                      sv = !(pv[0] && |rdy[0]);
    req = (can_req && pv[sv]) ? rdy[sv] : '0;
    release_o = snd_last;
    raddr = snd_cnt + 4'd2;
    tx_valid = snd_act;
  end

  logic start;
  assign start = |(gnt & req);

  // ---------------- sequential ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < 2; v++) begin
        rx_act[v] <= 1'b0; rx_cnt[v] <= '0; rx_len[v] <= '0; hp[v] <= 1'b0;
        pv[v] <= 1'b0; pend[v] <= '0; povc[v] <= '0; plen[v] <= '0; pforced[v] <= 1'b0;
        spar[v] <= 1'b0;
        for (int k = 0; k < 3; k++) begin hdr[v][k] <= '0; phdr[v][k] <= '0; end
      end
      snd_act <= 1'b0; snd_vc <= 1'b0; snd_cnt <= '0; snd_len <= '0;
      snd_h1 <= '0; snd_h2 <= '0; tx_data <= '0; tx_ovc <= '0; last_vc <= 1'b1;
      hdr_err <= 1'b0; ev_partial <= 1'b0; ev_flush <= 1'b0; ev_timeout <= 1'b0;
    end else begin
      hdr_err <= 1'b0; ev_partial <= 1'b0; ev_flush <= 1'b0; ev_timeout <= 1'b0;

      // receive
      if (rx.valid) begin
        if (!rx_act[rx.vc]) begin
          rx_act[rx.vc] <= 1'b1;
          rx_cnt[rx.vc] <= 4'd1;
          rx_len[rx.vc] <= (rx.data[11:8] < 4'd2) ? 4'd2 : rx.data[11:8];
          hdr[rx.vc][0] <= rx.data;
          if (!par_ok(rx.data)) hdr_err <= 1'b1;
        end else begin
          rx_cnt[rx.vc] <= rx_cnt[rx.vc] + 4'd1;
          if (rx_cnt[rx.vc] < 4'd3) begin
            hdr[rx.vc][rx_cnt[rx.vc][1:0]] <= rx.data;
            if (!par_ok(rx.data)) hdr_err <= 1'b1;
          end
          if (rx_cnt[rx.vc] == 4'd2) hp[rx.vc] <= 1'b1;
          if (rx_cnt[rx.vc] == rx_len[rx.vc]) rx_act[rx.vc] <= 1'b0;
        end
      end

      // header ready -> packet side
      if (gdone) begin
        hp[gv]      <= 1'b0;
        pv[gv]      <= 1'b1;
        pend[gv]    <= (need_lookup && cmb_absorb) ? omap_t'(1) << P_CMB : gmap;
        spar[gv]    <= 1'b1 ^ gforced ^ ((need_lookup && cmb_absorb) ? 1'b1 : ^gmap);
        povc[gv]    <= govc;
        plen[gv]    <= rx_len[gv];
        pforced[gv] <= gforced;
        for (int k = 0; k < 3; k++) phdr[gv][k] <= hdr[gv][k];
        if (gforced) ev_flush <= 1'b1;
      end

      // flush on shoot-down or timer (not in the cycle a send starts on it)
      for (int v = 0; v < 2; v++) begin
        if (pv[v] && !pforced[v] && (sd_mode || expired[v]) && !(start && sv == 1'(v))) begin
          pforced[v] <= 1'b1;
          pend[v]    <= omap_t'(1) << P_MBP0;
          spar[v]    <= 1'b1;                      // pv ^ pforced ^ one pend bit
          ev_flush   <= 1'b1;
          if (!sd_mode) ev_timeout <= 1'b1;
        end
      end

      // send
      if (start) begin
        logic [2*FLIT_W-1:0] sh;
        sh = shift_hops(phdr[sv][1], phdr[sv][2]);
        snd_act <= 1'b1;
        snd_vc  <= sv;
        last_vc <= sv;
        snd_cnt <= '0;
        snd_len <= plen[sv];
        tx_data <= phdr[sv][0];
        tx_ovc  <= povc[sv];
        snd_h1  <= pforced[sv] ? phdr[sv][1] : sh[FLIT_W-1:0];
        snd_h2  <= pforced[sv] ? phdr[sv][2] : sh[2*FLIT_W-1:FLIT_W];
        pend[sv] <= pend[sv] & ~gnt;
        if ((pend[sv] & ~gnt) == '0) pv[sv] <= 1'b0;
        else                         ev_partial <= 1'b1;
        spar[sv] <= ((pend[sv] & ~gnt) != '0) ^ pforced[sv] ^ (^(pend[sv] & ~gnt));
      end else if (snd_act) begin
        if (snd_last) snd_act <= 1'b0;
        snd_cnt <= snd_cnt + 4'd1;
        unique case (snd_cnt)
          4'd0:    tx_data <= snd_h1;
          4'd1:    tx_data <= snd_h2;
          default: tx_data <= rdata[snd_vc];
        endcase
      end
    end
  end

  // Each buffer's status {pv, pforced, pend} carries a parity bit written
  // with it; a stored value that no longer matches is an internal error.
  always_comb begin
    stat_err = 1'b0;
    for (int v = 0; v < 2; v++)
      if (spar[v] != (pv[v] ^ pforced[v] ^ (^pend[v]))) stat_err = 1'b1;
  end

  // parity over the status of both buffers, compared with the partner chip
  always_comb begin
    status_par = 1'b0;
    for (int v = 0; v < 2; v++)
      status_par ^= rx_act[v] ^ hp[v] ^ pv[v] ^ pforced[v] ^ (^pend[v]) ^ (^rx_cnt[v]);
  end

  // a packet starts only on a VC that was offered as free
  a_rx_free: assert property (@(posedge clk) disable iff (!rst_n)
      rx.valid && !rx_act[rx.vc] |-> rx_free[rx.vc]);
  // once started, a packet's flits arrive on consecutive cycles
  a_rx_nogap: assert property (@(posedge clk) disable iff (!rst_n)
      rx_act[0] || rx_act[1] |-> rx.valid);
  // grants only for requested outputs
  a_gnt: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
endmodule
