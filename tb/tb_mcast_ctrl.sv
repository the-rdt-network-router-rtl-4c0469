// tb_mcast_ctrl: one multicast controller (link 0, base-torus North) with a
// model of the arbiter that grants a random part of each request, random
// downstream buffer availability and a model of the combining buffer.
//
// Every packet injected is tracked by its key.  Each send seen on the
// crossbar side is checked flit by flit against the packet with its hop list
// shifted, for the outputs granted, with the expected VC per output; at the
// end every expected destination must have been served exactly once.
// Phases: random traffic (partial multicasts, next packet inserted during the
// last multicast, back-to-back sends), combining (absorbed acknowledge,
// multicast key recorded), buffer timer flush, shoot-down flush and a header
// parity error.  Throughout, the stored status parity of the buffers must
// stay consistent (stat_err never raised).
module tb_mcast_ctrl;
  import rdt_pkg::*;
  localparam int TICK = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t rx; logic [1:0] rx_free;
  logic sd_mode; logic [7:0] wrap_link; logic [1:0] timer_sel;
  logic cmb_req, cmb_alloc, cmb_gnt, cmb_absorb; logic [7:0] cmb_key; logic [3:0] cmb_cnt;
  logic [1:0] dn_free [11]; omap_t req, gnt; logic release_o;
  flit_t tx_data; logic tx_valid; logic [7:0] tx_ovc;
  logic hdr_err, status_par, ev_partial, ev_flush, ev_timeout, stat_err;

  mcast_ctrl #(.PORT(0), .TICK_CYCLES(TICK)) dut (.*);

  int checks = 0, failures = 0;
  int n_partial = 0, n_insert = 0, n_b2b = 0, n_absorb = 0, n_alloc = 0, n_forced = 0, n_hdr_err = 0, n_timeout = 0, n_stat_err = 0;

  // ---------------- expected packets, by key ----------------
  typedef struct {
    bit        live;
    int        len;
    flit_t     f [16];
    logic [10:0] remaining;
    logic [7:0]  vc;
    bit        allow_forced;
    flit_t     u1, u2;           // unshifted header flits 1 and 2
    int        rx_vc;
  } exp_t;
  exp_t E [256];

  task automatic err(input string s);
    failures++; if (failures < 20) $display("t=%0t %s", $time, s);
  endtask

  // ---------------- reference of the routing rules ----------------
  function automatic logic [10:0] ref_route(flit_t h1);
    logic [10:0] m; m = '0;
    for (int d = 0; d < 4; d++) if (h1[3 + d]) m[h1[7] ? 4 + d : d] = 1;
    m[8] = h1[1]; m[9] = h1[2];
    m[0] = 0;                          // arrived on link 0
    if (m == 0) m[8] = 1;
    return m;
  endfunction

  function automatic logic [7:0] ref_vc(flit_t h0, int in_vc);
    logic [7:0] v;
    for (int o = 0; o < 8; o++)
      v[o] = h0[13] ? h0[12] : wrap_link[o] ? 1'b1 : (o == 2) ? 1'(in_vc) : 1'b0;
    return v;
  endfunction

  function automatic flit_t par(logic [16:0] b); return {^b, b}; endfunction

  // ---------------- drivers ----------------
  int gnt_pct = 60;
  bit allow_absorb = 0;
  bit free_all = 0;
  bit force_none = 0;      // while set, only outputs in free_mask are free
  logic [10:0] free_mask;

  // arbiter model: grant a random subset of the request (combinational)
  logic [10:0] gmask;
  always_ff @(posedge clk) gmask <= 11'($urandom) | (($urandom_range(0, 99) < gnt_pct) ? 11'h7ff : 11'h0);
  assign gnt = req & gmask;

  // combining buffer model
  assign cmb_gnt = cmb_req;
  assign cmb_absorb = cmb_req && !cmb_alloc && allow_absorb;

  always_ff @(posedge clk) begin
    for (int o = 0; o < 11; o++)
      dn_free[o] <= (free_all || free_mask[o]) ? 2'b11 :
                    force_none ? 2'b00 : 2'(($urandom_range(0, 3) == 0) ? $urandom : 0);
  end

  task automatic send_pkt(input int key, input int len_m1, input logic [1:0] ptype, input logic ncomb,
                          input logic umode, input logic uvc, input logic [15:0] hops,
                          input bit bad_par, input bit forced_ok);
    flit_t f [16]; int v; int waitc;
    logic [2*FLIT_W-1:0] sh;
    // wait for a free VC
    waitc = 0;
    do begin @(negedge clk); waitc++; end while (rx_free == 2'b00 && waitc < 2000);
    v = rx_free[0] && rx_free[1] ? $urandom_range(0, 1) : (rx_free[0] ? 0 : 1);
    f[0] = par({ptype, ncomb, umode, uvc, 4'(len_m1), 8'(key)});
    f[1] = par({1'b0, hops});
    f[2] = par({1'b0, 8'($urandom), 8'($urandom)});
    if (bad_par) f[1][0] = ~f[1][0];
    for (int i = 3; i <= len_m1; i++) f[i] = 18'($urandom);
    // expectation
    E[key].live = 1; E[key].len = len_m1 + 1; E[key].rx_vc = v;
    E[key].allow_forced = forced_ok;
    E[key].remaining = (ptype == 2'b10 && !ncomb && allow_absorb) ? 11'h400 : ref_route(f[1]);
    E[key].vc = ref_vc(f[0], v);
    E[key].u1 = f[1]; E[key].u2 = f[2];
    for (int i = 0; i <= len_m1; i++) E[key].f[i] = f[i];
    begin
      logic [31:0] hl; hl = {f[2][15:0], f[1][15:0]} >> 8;
      E[key].f[1] = par({1'b0, hl[15:0]}); E[key].f[2] = par({1'b0, hl[31:16]});
    end
    if (cur_act && cur_idx > 0 && E[int'(cur_f[0][7:0])].rx_vc == v) n_insert++;
    for (int i = 0; i <= len_m1; i++) begin
      rx.valid = 1; rx.vc = 1'(v); rx.data = f[i];
      @(negedge clk);
    end
    rx.valid = 0;
  endtask

  // ---------------- monitor ----------------
  logic [10:0] cur_outs; int cur_idx; int cur_key; bit cur_act; bit cur_forced;
  flit_t cur_f [16];
  int prev_tail_cycle = -10, cycle = 0;
  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    if (rst_n) begin
      if (hdr_err) n_hdr_err++;
      if (stat_err) n_stat_err++;
      if (ev_timeout) n_timeout++;
      if (ev_partial) n_partial++;
      if (cmb_req && cmb_alloc) n_alloc++;
      if (cmb_absorb) n_absorb++;
      // collect flits of the running send
      if (tx_valid && cur_act) begin
        cur_f[cur_idx] = tx_data;
        cur_idx++;
      end
      if (release_o && cur_act) begin
        int k; bit forced;
        k = int'(cur_f[0][7:0]);
        checks++;
        if (!E[k].live) err($sformatf("send of unknown key %0d", k));
        else begin
          forced = (cur_outs == 11'h100) && E[k].allow_forced && E[k].u1 != E[k].f[1] &&
                   cur_f[1] == E[k].u1 && cur_f[2] == E[k].u2;
          if (cur_idx != E[k].len) err($sformatf("key %0d: %0d flits, expected %0d", k, cur_idx, E[k].len));
          if (forced) begin
            n_forced++;
            if (cur_f[0] != E[k].f[0]) err("forced flit 0");
            for (int i = 3; i < E[k].len; i++) if (cur_f[i] != E[k].f[i]) err($sformatf("key %0d forced flit %0d", k, i));
            E[k].remaining = 0;
          end else begin
            if ((cur_outs & ~E[k].remaining) != 0) err($sformatf("key %0d: outputs %b not expected (remaining %b)", k, cur_outs, E[k].remaining));
            for (int i = 0; i < E[k].len; i++) if (cur_f[i] != E[k].f[i]) err($sformatf("key %0d flit %0d %h exp %h", k, i, cur_f[i], E[k].f[i]));
            for (int o = 0; o < 8; o++) if (cur_outs[o] && cur_vc_q[o] != E[k].vc[o]) err($sformatf("key %0d vc of out %0d", k, o));
            E[k].remaining &= ~cur_outs;
          end
          if (E[k].remaining == 0) E[k].live = 0;
        end
        cur_act = 0;
        prev_tail_cycle = cycle;
      end
      if (|gnt) begin
        if (cycle == prev_tail_cycle) n_b2b++;
        cur_outs = gnt; cur_idx = 0; cur_act = 1;
      end
    end
  end
  logic [7:0] cur_vc_q;
  always @(posedge clk) if (tx_valid) cur_vc_q <= tx_ovc;

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    err("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic drain(input int max_cycles);
    int c = 0; bit any;
    do begin
      @(negedge clk); c++; any = 0;
      for (int k = 0; k < 256; k++) if (E[k].live) any = 1;
    end while (any && c < max_cycles);
  endtask

  initial begin
    rx = '0; sd_mode = 0; wrap_link = 8'b0010_0100; timer_sel = 2'd3;
    free_mask = '0; cur_act = 0;
    for (int k = 0; k < 256; k++) E[k].live = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // random traffic, no combining
    for (int n = 0; n < 150; n++) begin
      logic [15:0] hops; hops = 16'($urandom);
      if (n % 9 == 0) hops[7:0] = 8'b0_1111_110;        // wide multicast
      send_pkt(n, $urandom_range(2, 15), 2'($urandom_range(0, 1)), 1'b1,
               1'(n % 5 == 0), 1'($urandom), hops, 0, 0);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 30)) @(negedge clk);
    end
    drain(20000);

    // back-to-back: everything free, grants always
    free_all = 1; gnt_pct = 100;
    for (int n = 150; n < 170; n++) send_pkt(n, 3, 2'b00, 1'b1, 1'b0, 1'b0, 16'h0008, 0, 0);
    drain(2000);

    // combining: multicasts record their key, absorbed acknowledges go to output 10
    for (int n = 170; n < 180; n++) send_pkt(n, 4, 2'b01, 1'b0, 1'b0, 1'b0, 16'h0030, 0, 0);
    allow_absorb = 1;
    for (int n = 180; n < 190; n++) send_pkt(n, 2, 2'b10, 1'b0, 1'b0, 1'b0, 16'h0010, 0, 0);
    repeat (4) @(negedge clk);
    allow_absorb = 0;
    drain(2000);

    // timer flush: nothing downstream free except MBP0 after the timer fired
    free_all = 0; gnt_pct = 100;
    for (int o = 0; o < 11; o++) free_mask[o] = 0;
    timer_sel = 2'd0;
    force_none = 1;
    send_pkt(200, 5, 2'b00, 1'b1, 1'b0, 1'b0, 16'h0018, 0, 1);
    repeat (TICK + 10) @(negedge clk);
    force_none = 0; free_mask[8] = 1;
    drain(2000);

    // shoot-down: pending packets are forced to MBP0
    force_none = 1; timer_sel = 2'd3; free_mask = '0;
    send_pkt(210, 6, 2'b00, 1'b1, 1'b0, 1'b0, 16'h0028, 0, 1);
    send_pkt(211, 3, 2'b00, 1'b1, 1'b0, 1'b0, 16'h0048, 0, 1);
    repeat (10) @(negedge clk);
    sd_mode = 1;
    repeat (3) @(negedge clk);
    force_none = 0; free_mask[8] = 1;
    drain(2000);
    sd_mode = 0;

    // header parity error
    free_all = 1;
    send_pkt(220, 3, 2'b00, 1'b1, 1'b0, 1'b0, 16'h0008, 1, 0);
    drain(2000);
    repeat (20) @(negedge clk);

    for (int k = 0; k < 256; k++) begin
      checks++;
      if (E[k].live) err($sformatf("key %0d never fully delivered, remaining %b", k, E[k].remaining));
    end
    checks++; if (n_partial == 0)  err("no partial multicast");
    checks++; if (n_insert == 0)   err("no packet inserted during a send of its buffer");
    checks++; if (n_b2b == 0)      err("no back-to-back send");
    checks++; if (n_alloc == 0)    err("no combining entry requested");
    checks++; if (n_absorb != 10)  err($sformatf("absorbed %0d acknowledges, expected 10", n_absorb));
    checks++; if (n_forced < 3)    err($sformatf("forced sends %0d, expected 3", n_forced));
    checks++; if (n_timeout == 0)  err("timer never fired");
    checks++; if (n_hdr_err != 1)  err($sformatf("header parity errors %0d, expected 1", n_hdr_err));
    $display("partial %0d insert %0d b2b %0d alloc %0d absorb %0d forced %0d timeout %0d",
             n_partial, n_insert, n_b2b, n_alloc, n_absorb, n_forced, n_timeout);
    checks++; if (n_stat_err != 0) err($sformatf("status parity error raised in %0d cycles", n_stat_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
