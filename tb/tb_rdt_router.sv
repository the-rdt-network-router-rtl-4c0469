// tb_rdt_router: end-to-end test of the whole router at its default
// parameters (flush time step of 6000 cycles = 100 us at 60 MHz).
//
// The testbench plays the ten neighbours: it injects packets on every link
// (only into a VC the router offers as free, flits back to back) and receives
// on every link with a random, changing "buffer free" answer per VC.  A
// scoreboard keyed by a packet number carried in body flit 3 knows, from its
// own model of the routing rules, where each packet must go, on which VC and
// with which (shifted) header; every delivery is checked flit by flit and at
// the end every destination must have been served exactly once.
//
// Directed phases then make each mechanism happen: multicast, partial
// multicast, back-to-back packets on a link, the next packet entering a
// buffer during its last multicast, dateline and user VC selection,
// acknowledge combining and its overflow, the buffer timer flush, and
// shoot-down entered by the MBP, by a header parity error, by a bit-slice
// status parity mismatch and by the cascade line, with set-up leaving it.
// Each mechanism's count is printed and must be non-zero.
module tb_rdt_router;
  import rdt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t      link_in [10];
  logic [1:0] link_in_free [10];
  link_t      link_out [10];
  logic [1:0] link_out_free [10];
  logic [7:0] wrap_link;
  logic [1:0] timer_sel;
  logic sliced_en, status_par_in, status_par_out;
  logic mbp_sd_req, mbp_setup, chain_in, chain_out, sd_mode;
  logic [4:0] sd_cause;

  rdt_router dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  task automatic err(input string s);
    failures++; if (failures < 30) $display("t=%0t %s", $time, s);
  endtask

  function automatic flit_t par(logic [16:0] b); return {^b, b}; endfunction

  // ---------------- mechanism counters ----------------
  int m_mcast = 0, m_partial = 0, m_b2b = 0, m_insert = 0, m_dateline = 0, m_straight_vc1 = 0,
      m_user_vc = 0, m_absorb = 0, m_cmb_full = 0, m_timer = 0, m_sd_mbp = 0, m_sd_hdr = 0,
      m_sd_par = 0, m_sd_chain = 0, m_forced = 0, m_contend = 0;

  // ---------------- scoreboard ----------------
  typedef struct {
    bit          known;
    int          src, in_vc, len;
    flit_t       f [16];             // as it should leave (shifted header)
    flit_t       u1, u2;             // unshifted header flits 1, 2
    logic [9:0]  remaining;
    logic [7:0]  vc;
    bit          allow_forced;
    int          first_start;        // cycle of first delivery
    int          n_starts;
  } pkt_t;
  localparam int NP = 1024;
  pkt_t P [NP];
  int next_id = 0;

  function automatic logic [9:0] ref_route(int src, flit_t h1);
    logic [9:0] m; m = '0;
    for (int d = 0; d < 4; d++) if (h1[3 + d]) m[h1[7] ? 4 + d : d] = 1;
    m[8] = h1[1]; m[9] = h1[2];
    if (src < 8) m[src] = 0;
    if (m == 0) m[8] = 1;
    return m;
  endfunction

  function automatic logic [7:0] ref_vc(int src, flit_t h0, int in_vc);
    logic [7:0] v; int straight;
    straight = (src < 8) ? (src ^ 2) : -1;
    for (int o = 0; o < 8; o++)
      v[o] = h0[13] ? h0[12] : wrap_link[o] ? 1'b1 : (o == straight) ? 1'(in_vc) : 1'b0;
    return v;
  endfunction

  // Build a packet; returns its number.  absorb: the router will absorb it.
  function automatic int make_pkt(int src, int len_m1, logic [1:0] ptype, logic ncomb, logic umode,
                                  logic uvc, logic [7:0] key, logic [15:0] hops, bit absorb);
    int id; logic [31:0] hl;
    id = next_id++;
    P[id].known = 1; P[id].src = src; P[id].len = len_m1 + 1; P[id].in_vc = -1;
    P[id].f[0] = par({ptype, ncomb, umode, uvc, 4'(len_m1), key});
    P[id].u1 = par({1'b0, hops});
    P[id].u2 = par({1'b0, 16'($urandom)});
    hl = {P[id].u2[15:0], P[id].u1[15:0]} >> 8;
    P[id].f[1] = par({1'b0, hl[15:0]});
    P[id].f[2] = par({1'b0, hl[31:16]});
    P[id].f[3] = 18'(id);
    for (int i = 4; i <= len_m1; i++) P[id].f[i] = 18'($urandom);
    P[id].remaining = absorb ? '0 : ref_route(src, P[id].u1);
    P[id].allow_forced = 0; P[id].n_starts = 0; P[id].first_start = -1;
    return id;
  endfunction

  // ---------------- injection ----------------
  int q [10][$];
  logic flip = 0;                     // makes the partner chip's status parity differ
  int last_sent_id [10][2];
  int busy_in = 0;
  logic [9:0] inject_busy;

  for (genvar i = 0; i < 10; i++) begin : g_inj
    initial begin
      link_in[i] = '0; inject_busy[i] = 0;
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        if (q[i].size() > 0 && link_in_free[i] != 2'b00) begin
          int id, v;
          id = q[i].pop_front();
          inject_busy[i] = 1;
          v = (link_in_free[i] == 2'b11) ? $urandom_range(0, 1) : (link_in_free[i][0] ? 0 : 1);
          P[id].in_vc = v;
          P[id].vc = ref_vc(i, P[id].f[0], v);
          // still sending the previous packet of this buffer: insertion during the last multicast
          if (last_sent_id[i][v] >= 0 && out_busy_with(last_sent_id[i][v])) m_insert++;
          last_sent_id[i][v] = id;
          for (int k = 0; k < P[id].len; k++) begin
            link_in[i].valid = 1; link_in[i].vc = 1'(v);
            link_in[i].data = (k == 1) ? P[id].u1 : (k == 2) ? P[id].u2 : P[id].f[k];
            @(negedge clk);
          end
          link_in[i] = '0;
          inject_busy[i] = 0;
        end
      end
    end
  end

  // ---------------- reception ----------------
  logic [1:0] prev_free [10];
  int  rx_id   [10];
  int  rx_cnt  [10];
  int  rx_len  [10];
  int  rx_vc   [10];
  int  rx_start[10];
  int  rx_tail_cycle [10];
  int  rx_src_last [10];
  flit_t rx_f [10][16];
  int  hold [10][2];
  bit  block [10];                    // output held not free by the test
  bit  rx_busy [10];
  bit  random_free = 1;               // free answers also drop at random

  function automatic bit out_busy_with(int id);
    for (int o = 0; o < 10; o++) if (rx_busy[o] && rx_id[o] == id) return 1;
    return 0;
  endfunction

  always @(posedge clk) begin
    if (rst_n) for (int o = 0; o < 10; o++) begin
      if (link_out[o].valid) begin
        if (!rx_busy[o]) begin
          rx_busy[o] = 1; rx_cnt[o] = 0; rx_id[o] = -1;
          rx_vc[o] = int'(link_out[o].vc); rx_start[o] = cycle;
          rx_len[o] = int'(link_out[o].data[11:8]) + 1;
          checks++;
          if (!prev_free[o][link_out[o].vc]) err($sformatf("out %0d: packet started on VC%0d that was not free", o, link_out[o].vc));
          if (rx_tail_cycle[o] == cycle - 1) m_b2b++;
        end
        rx_f[o][rx_cnt[o]] = link_out[o].data;
        if (rx_cnt[o] == 3) rx_id[o] = int'(link_out[o].data);
        if (link_out[o].vc != 1'(rx_vc[o])) err($sformatf("out %0d: VC changed inside a packet", o));
        rx_cnt[o]++;
        if (rx_cnt[o] == rx_len[o]) begin
          finish_rx(o);
          rx_busy[o] = 0;
          rx_tail_cycle[o] = cycle;
          hold[o][rx_vc[o]] = random_free ? $urandom_range(0, 12) : 0;
        end
      end else if (rx_busy[o]) begin
        err($sformatf("out %0d: gap inside a packet", o)); rx_busy[o] = 0;
      end
      for (int v = 0; v < 2; v++) if (hold[o][v] > 0 && !(rx_busy[o] && rx_vc[o] == v)) hold[o][v]--;
    end
  end

  task automatic finish_rx(int o);
    int id; bit forced;
    id = rx_id[o];
    checks++;
    if (rx_len[o] < 4 || id < 0 || id >= NP || !P[id].known) begin
      err($sformatf("out %0d: unknown packet id %0d", o, id)); return;
    end
    forced = (o == 8) && P[id].allow_forced && rx_f[o][1] == P[id].u1 && rx_f[o][2] == P[id].u2 &&
             P[id].u1 != P[id].f[1];
    if (forced) begin
      m_forced++;
      for (int k = 0; k < P[id].len; k++)
        if (k != 1 && k != 2 && rx_f[o][k] != P[id].f[k]) err($sformatf("pkt %0d forced flit %0d", id, k));
      P[id].remaining = '0;
      return;
    end
    if (!P[id].remaining[o]) begin
      err($sformatf("pkt %0d (from %0d) delivered on out %0d, remaining %b", id, P[id].src, o, P[id].remaining));
      return;
    end
    for (int k = 0; k < P[id].len; k++)
      if (rx_f[o][k] != P[id].f[k]) err($sformatf("pkt %0d out %0d flit %0d %h exp %h", id, o, k, rx_f[o][k], P[id].f[k]));
    if (o < 8) begin
      if (1'(rx_vc[o]) != P[id].vc[o]) err($sformatf("pkt %0d out %0d VC%0d expected VC%0d", id, o, rx_vc[o], P[id].vc[o]));
      if (wrap_link[o] && rx_vc[o] == 1 && !P[id].f[0][13]) m_dateline++;
      if (!wrap_link[o] && rx_vc[o] == 1 && !P[id].f[0][13]) m_straight_vc1++;
      if (P[id].f[0][13]) m_user_vc++;
    end
    if (P[id].n_starts == 0) P[id].first_start = rx_start[o];
    else if (P[id].first_start != rx_start[o]) m_partial++;
    else m_mcast++;
    P[id].n_starts++;
    if (rx_src_last[o] >= 0 && rx_src_last[o] != P[id].src && rx_tail_cycle[o] == rx_start[o] - 1) m_contend++;
    rx_src_last[o] = P[id].src;
    P[id].remaining[o] = 0;
  endtask

  // downstream "buffer free" answers
  always @(posedge clk) begin
    for (int o = 0; o < 10; o++) begin
      logic [1:0] f;
      for (int v = 0; v < 2; v++)
        f[v] = !block[o] && hold[o][v] == 0 && !(rx_busy[o] && rx_vc[o] == v) &&
               (!random_free || $urandom_range(0, 2) != 0);
      link_out_free[o] <= f;
      prev_free[o] <= link_out_free[o];
    end
  end

  // ---------------- helpers ----------------
  task automatic wait_all(input int max_cycles, input string what);
    int c = 0; bit any;
    do begin
      @(negedge clk); c++; any = 0;
      for (int i = 0; i < 10; i++) if (q[i].size() > 0 || inject_busy[i] || rx_busy[i]) any = 1;
      for (int id = 0; id < next_id; id++) if (P[id].remaining != 0) any = 1;
    end while (any && c < max_cycles);
    checks++;
    if (any) begin
      err($sformatf("%s: not all delivered after %0d cycles", what, max_cycles));
      for (int id = 0; id < next_id; id++)
        if (P[id].remaining != 0) $display("  pkt %0d from %0d remaining %b", id, P[id].src, P[id].remaining);
    end
  endtask

  task automatic setup_router();
    @(negedge clk); mbp_setup = 1; @(negedge clk); mbp_setup = 0;
    repeat (2) @(negedge clk);
    checks++; if (sd_mode || chain_out) err("set-up did not leave shoot-down mode");
  endtask

  task automatic put_two_pending(input int a_src, input int b_src);
    // two packets towards blocked outputs, then allow them to be forced
    int id;
    id = make_pkt(a_src, 5, 2'b00, 1, 0, 0, 8'h00, 16'h0030, 0); P[id].allow_forced = 1; q[a_src].push_back(id);
    id = make_pkt(b_src, 4, 2'b00, 1, 0, 0, 8'h00, 16'h00b0, 0); P[id].allow_forced = 1; q[b_src].push_back(id);
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    err("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int o = 0; o < 10; o++) begin
      block[o] = 0; rx_busy[o] = 0; hold[o][0] = 0; hold[o][1] = 0; rx_tail_cycle[o] = -10;
      rx_src_last[o] = -1; prev_free[o] = 0; link_out_free[o] = 0;
      last_sent_id[o][0] = -1; last_sent_id[o][1] = -1;
    end
    wrap_link = 8'b0100_0010;                   // E of base torus, S of upper torus cross the dateline
    timer_sel = 2'd3; sliced_en = 0; status_par_in = 0;
    mbp_sd_req = 0; mbp_setup = 0; chain_in = 0;
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);

    // ---- 1: random traffic on all links ----
    for (int n = 0; n < 400; n++) begin
      int src, id; logic [15:0] hops;
      src = $urandom_range(0, 9);
      hops = 16'($urandom);
      if (n % 6 == 0) hops[7:0] = {1'($urandom), 4'b1111, 2'b11, 1'b0};   // wide multicast
      id = make_pkt(src, $urandom_range(3, 15), 2'($urandom_range(0, 1)), 1'b1,
                    1'(n % 7 == 0), 1'($urandom), 8'($urandom), hops, 0);
      q[src].push_back(id);
    end
    wait_all(40000, "random traffic");

    // ---- 2: contention: every input to output 8 (MBP0) ----
    for (int n = 0; n < 40; n++) begin
      int src, id; src = n % 10;
      id = make_pkt(src, 3, 2'b00, 1, 0, 0, 8'h00, 16'h0002, 0);
      q[src].push_back(id);
    end
    wait_all(20000, "contention");

    // ---- 3: acknowledge combining ----
    begin
      int id;
      // multicasts with keys 1..4 from link 8 to E0 and S0: fan-out 2, recorded
      for (int k = 1; k <= 4; k++) begin
        id = make_pkt(8, 4, 2'b01, 0, 0, 0, 8'(k), 16'h0030, 0); q[8].push_back(id);
      end
      wait_all(5000, "combining multicasts");
      // key 5: table full, not recorded
      id = make_pkt(8, 4, 2'b01, 0, 0, 0, 8'd5, 16'h0030, 0); q[8].push_back(id);
      wait_all(5000, "multicast on full table");
      // acknowledges of key 5 both pass; to MBP0
      id = make_pkt(1, 3, 2'b10, 0, 0, 0, 8'd5, 16'h0002, 0); q[1].push_back(id);
      wait_all(5000, "ack key 5 a");
      id = make_pkt(2, 3, 2'b10, 0, 0, 0, 8'd5, 16'h0002, 0); q[2].push_back(id);
      wait_all(5000, "ack key 5 b");
      m_cmb_full++;
      // acknowledges of keys 1..4: first absorbed, second passes
      for (int k = 1; k <= 4; k++) begin
        id = make_pkt(1, 3, 2'b10, 0, 0, 0, 8'(k), 16'h0002, 1); q[1].push_back(id);
        wait_all(5000, "first ack");
        repeat (20) @(negedge clk);
        m_absorb++;
        id = make_pkt(2, 3, 2'b10, 0, 0, 0, 8'(k), 16'h0002, 0); q[2].push_back(id);
        wait_all(5000, "second ack");
      end
    end

    // ---- 4: buffer timer flush (100 us = 6000 cycles) ----
    timer_sel = 2'd0;
    block[1] = 1; block[3] = 1; block[5] = 1; block[7] = 1;
    begin
      int id;
      id = make_pkt(0, 5, 2'b00, 1, 0, 0, 8'h00, 16'h0010, 0); P[id].allow_forced = 1; q[0].push_back(id); // E0
      repeat (3000) @(negedge clk);
      checks++; if (P[id].remaining == 0) err("packet left before its timer fired");
      wait_all(6000, "timer flush");
      if (P[id].remaining == 0) m_timer++;
    end
    timer_sel = 2'd3;

    // ---- 5: shoot-down by the MBP ----
    put_two_pending(0, 4);          // to E0/S0 and E1/S1... blocked outputs
    repeat (200) @(negedge clk);
    @(negedge clk); mbp_sd_req = 1; @(negedge clk); mbp_sd_req = 0;
    @(negedge clk);
    checks++; if (!sd_mode || !chain_out || sd_cause != 5'b00001) err("MBP request: no shoot-down"); else m_sd_mbp++;
    wait_all(2000, "shoot-down by MBP");
    setup_router();

    // ---- 6: shoot-down by a header parity error ----
    begin
      int id;
      id = make_pkt(9, 3, 2'b00, 1, 0, 0, 8'h00, 16'h0002, 0); P[id].allow_forced = 1;
      P[id].u1[0] = ~P[id].u1[0];           // corrupt one bit of header flit 1
      q[9].push_back(id);
      put_two_pending(2, 6);
      wait_all(3000, "shoot-down by parity error");
      checks++; if (!sd_mode || sd_cause[1] != 1'b1) err("parity error: no shoot-down"); else m_sd_hdr++;
      setup_router();
    end

    // ---- 7: shoot-down by bit-slice status parity mismatch ----
    sliced_en = 1;
    fork
      begin : partner
        forever begin @(posedge clk); #1 status_par_in = status_par_out ^ flip; end
      end
    join_none
    put_two_pending(8, 9);
    repeat (300) @(negedge clk);
    checks++; if (sd_mode) err("shoot-down with matching partner parity");
    flip = 1; repeat (3) @(negedge clk); flip = 0;
    checks++; if (!sd_mode || !sd_cause[3]) err("status parity mismatch: no shoot-down"); else m_sd_par++;
    wait_all(2000, "shoot-down by status parity");
    setup_router();
    sliced_en = 0;

    // ---- 8: shoot-down from the cascade line ----
    put_two_pending(0, 2);
    repeat (200) @(negedge clk);
    chain_in = 1; @(negedge clk); @(negedge clk);
    checks++; if (!sd_mode || !chain_out || !sd_cause[4]) err("cascade line: no shoot-down"); else m_sd_chain++;
    chain_in = 0;
    wait_all(2000, "shoot-down by cascade");
    setup_router();
    for (int o = 0; o < 10; o++) block[o] = 0;

    // ---- 9: back-to-back and normal service again after set-up ----
    random_free = 0;
    for (int n = 0; n < 20; n++) begin
      int id; id = make_pkt(0, 3, 2'b00, 1, 0, 0, 8'h00, 16'h0028, 0); q[0].push_back(id);   // S0
    end
    wait_all(3000, "back to back");

    for (int id = 0; id < next_id; id++) begin
      checks++; if (P[id].remaining != 0) err($sformatf("pkt %0d not delivered", id));
    end
    $display("multicast %0d partial %0d back-to-back %0d insert-during-last %0d contention %0d",
             m_mcast, m_partial, m_b2b, m_insert, m_contend);
    $display("dateline-VC1 %0d straight-VC1 %0d user-VC %0d absorbed %0d combine-full %0d",
             m_dateline, m_straight_vc1, m_user_vc, m_absorb, m_cmb_full);
    $display("forced %0d timer %0d sd: mbp %0d hdr %0d par %0d chain %0d",
             m_forced, m_timer, m_sd_mbp, m_sd_hdr, m_sd_par, m_sd_chain);
    checks++; if (m_mcast == 0) err("no multicast");
    checks++; if (m_partial == 0) err("no partial multicast");
    checks++; if (m_b2b == 0) err("no back-to-back packets");
    checks++; if (m_insert == 0) err("no insertion during the last multicast");
    checks++; if (m_contend == 0) err("no contention");
    checks++; if (m_dateline == 0) err("no dateline VC");
    checks++; if (m_straight_vc1 == 0) err("VC1 never kept going straight");
    checks++; if (m_user_vc == 0) err("no user VC");
    checks++; if (m_forced < 9) err("too few forced packets");
    checks++; if (m_timer == 0) err("no timer flush");
    checks++; if (m_sd_mbp + m_sd_hdr + m_sd_par + m_sd_chain != 4) err("a shoot-down cause missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
