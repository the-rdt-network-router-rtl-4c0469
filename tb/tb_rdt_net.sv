// tb_rdt_net: four routers joined in a ring by their base-torus East/West
// links (node i East -> node i+1 West), each with a model of its MBP on port
// 8.  The link from node 3 East to node 0 and from node 0 West to node 3 are
// the ring's wrap-around links (dateline, VC1).
//
// Checks, across routers: a unicast crossing several routers with its hop
// list shifted once per router; a multicast tree (node 0 to nodes 1 and 3);
// acknowledge combining at the branch router (two acknowledges in, one out);
// and random traffic from every MBP to every other node in both directions
// at once, which must all arrive exactly once and intact (no deadlock across
// the dateline).  A last phase checks packet order: with a fixed route per
// pair of nodes and the MBPs injecting on VC0 only, every packet must arrive
// after all earlier packets between the same two nodes, since each buffer
// on the route holds one packet and the VC on each link follows from the
// route alone.
module tb_rdt_net;
  import rdt_pkg::*;

  localparam int N = 4;
  localparam int E = 1, W = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t      lin   [N][10];
  logic [1:0] linf  [N][10];
  link_t      lout  [N][10];
  logic [1:0] loutf [N][10];
  link_t      mbp_tx [N];

  for (genvar n = 0; n < N; n++) begin : g_node
    logic unused_par, unused_chain, unused_sd; logic [4:0] unused_cause;
    rdt_router u_r (
      .clk, .rst_n,
      .link_in (lin[n]), .link_in_free (linf[n]), .link_out (lout[n]), .link_out_free (loutf[n]),
      .wrap_link ((n == N - 1) ? 8'b0000_0010 : (n == 0) ? 8'b0000_1000 : 8'b0),
      .timer_sel (2'd3), .sliced_en (1'b0), .status_par_in (1'b0), .status_par_out (unused_par),
      .mbp_sd_req (1'b0), .mbp_setup (1'b0), .chain_in (1'b0), .chain_out (unused_chain),
      .sd_mode (unused_sd), .sd_cause (unused_cause)
    );
  end

  always_comb begin
    for (int n = 0; n < N; n++)
      for (int p = 0; p < 10; p++) begin lin[n][p] = '0; loutf[n][p] = 2'b00; end
    for (int n = 0; n < N; n++) begin
      lin[(n + 1) % N][W] = lout[n][E];
      loutf[n][E]         = linf[(n + 1) % N][W];
      lin[(n + N - 1) % N][E] = lout[n][W];
      loutf[n][W]             = linf[(n + N - 1) % N][E];
      lin[n][8]   = mbp_tx[n];
      loutf[n][8] = 2'b11;                    // the MBPs always take packets
      loutf[n][9] = 2'b11;
    end
  end

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;
  task automatic err(input string s);
    failures++; if (failures < 30) $display("t=%0t %s", $time, s);
  endtask

  function automatic flit_t par(logic [16:0] b); return {^b, b}; endfunction

  // ---------------- packets ----------------
  typedef struct {
    bit    known;
    int    len;
    flit_t f [16];                 // as injected
    int    hops_used;              // routers it crosses before delivery
    logic [N-1:0] dest;            // nodes whose MBP0 must receive it
    logic [N-1:0] got;
    int    src, seq;               // seq >= 0: delivery order is checked
  } pkt_t;
  pkt_t P [2048];
  int next_id = 0;

  // hop descriptor: rank 0, direction map {W,S,E,N}, MBP map
  function automatic logic [7:0] hop(bit east, bit west, bit mbp0);
    return {1'b0, west, 1'b0, east, 1'b0, 1'b0, mbp0, 1'b0};
  endfunction

  function automatic int make(int len_m1, logic [1:0] ptype, logic ncomb, logic [7:0] key,
                              logic [7:0] h0, logic [7:0] h1, logic [7:0] h2, logic [7:0] h3,
                              int depth, logic [N-1:0] dest);
    int id; id = next_id++;
    P[id].known = 1; P[id].len = len_m1 + 1; P[id].hops_used = depth; P[id].dest = dest; P[id].got = '0;
    P[id].src = 0; P[id].seq = -1;
    P[id].f[0] = par({ptype, ncomb, 1'b0, 1'b0, 4'(len_m1), key});
    P[id].f[1] = par({1'b0, h1, h0});
    P[id].f[2] = par({1'b0, h3, h2});
    P[id].f[3] = 18'(id);
    for (int i = 4; i <= len_m1; i++) P[id].f[i] = 18'($urandom);
    return id;
  endfunction

  // ---------------- MBP models ----------------
  int txq [N][$];
  bit tx_busy [N];
  bit vc0_only = 0;                // inject on VC0 only (order phase)
  int last_seq [N][N];
  int n_ordered = 0;
  for (genvar n = 0; n < N; n++) begin : g_mbp
    initial begin
      mbp_tx[n] = '0; tx_busy[n] = 0;
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        if (txq[n].size() > 0 && (vc0_only ? linf[n][8][0] : linf[n][8] != 2'b00)) begin
          int id, v;
          id = txq[n].pop_front(); tx_busy[n] = 1;
          v = linf[n][8][0] ? 0 : 1;
          for (int k = 0; k < P[id].len; k++) begin
            mbp_tx[n].valid = 1; mbp_tx[n].vc = 1'(v); mbp_tx[n].data = P[id].f[k];
            @(negedge clk);
          end
          mbp_tx[n] = '0; tx_busy[n] = 0;
        end
      end
    end
  end

  int   rcnt [N];
  flit_t rf  [N][16];
  int   n_rx [N];
  always @(posedge clk) begin
    if (rst_n) for (int n = 0; n < N; n++) begin
      if (lout[n][9].valid) err($sformatf("node %0d: unexpected packet on MBP1", n));
      if (lout[n][8].valid) begin
        rf[n][rcnt[n]] = lout[n][8].data;
        rcnt[n]++;
        if (rcnt[n] == int'(rf[n][0][11:8]) + 1) begin
          check_rx(n);
          rcnt[n] = 0;
        end
      end
    end
  end

  task automatic check_rx(int n);
    int id; logic [31:0] hl;
    checks++;
    id = int'(rf[n][3]);
    n_rx[n]++;
    if (rcnt[n] < 4 || id >= next_id || !P[id].known) begin err($sformatf("node %0d: unknown packet", n)); return; end
    if (!P[id].dest[n] || P[id].got[n]) begin
      err($sformatf("node %0d: packet %0d not expected here (dest %b got %b)", n, id, P[id].dest, P[id].got)); return;
    end
    P[id].got[n] = 1;
    if (P[id].seq >= 0) begin
      if (P[id].seq <= last_seq[P[id].src][n])
        err($sformatf("node %0d: packet %0d from %0d out of order (seq %0d after %0d)",
                      n, id, P[id].src, P[id].seq, last_seq[P[id].src][n]));
      else n_ordered++;
      last_seq[P[id].src][n] = P[id].seq;
    end
    hl = {P[id].f[2][15:0], P[id].f[1][15:0]} >> (8 * P[id].hops_used);
    if (rf[n][1] != par({1'b0, hl[15:0]}) || rf[n][2] != par({1'b0, hl[31:16]}))
      err($sformatf("node %0d: packet %0d header not shifted %0d times", n, id, P[id].hops_used));
    if (rf[n][0] != P[id].f[0]) err($sformatf("node %0d: packet %0d flit 0", n, id));
    for (int k = 3; k < P[id].len; k++)
      if (rf[n][k] != P[id].f[k]) err($sformatf("node %0d: packet %0d flit %0d", n, id, k));
  endtask

  task automatic wait_done(input int max_cycles, input string what);
    int c = 0; bit any;
    do begin
      @(negedge clk); c++; any = 0;
      for (int n = 0; n < N; n++) if (txq[n].size() > 0 || tx_busy[n] || rcnt[n] != 0) any = 1;
      for (int id = 0; id < next_id; id++) if (P[id].got != P[id].dest) any = 1;
    end while (any && c < max_cycles);
    checks++;
    if (any) begin
      err($sformatf("%s: not finished after %0d cycles", what, max_cycles));
      for (int id = 0; id < next_id; id++)
        if (P[id].got != P[id].dest) $display("  packet %0d dest %b got %b", id, P[id].dest, P[id].got);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    err("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int id, acks_at_0;
    for (int n = 0; n < N; n++) begin rcnt[n] = 0; n_rx[n] = 0; end
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);

    // unicast 0 -> 1 -> 2 -> 3 (3 routers forward, 4th delivers)
    id = make(6, 2'b00, 1, 8'h00, hop(1, 0, 0), hop(1, 0, 0), hop(1, 0, 0), hop(0, 0, 1), 4, 4'b1000);
    txq[0].push_back(id);
    wait_done(2000, "unicast across three links");

    // multicast from node 0 to nodes 1 and 3, key 0x5a, fan-out 2 recorded at node 0
    id = make(8, 2'b01, 0, 8'h5a, hop(1, 1, 0), hop(0, 0, 1), 8'h00, 8'h00, 2, 4'b1010);
    txq[0].push_back(id);
    wait_done(2000, "multicast tree");

    // both leaves acknowledge; node 0 combines them into one
    acks_at_0 = n_rx[0];
    id = make(3, 2'b10, 0, 8'h5a, hop(0, 1, 0), hop(0, 0, 1), 8'h00, 8'h00, 2, 4'b0000);  // 1 -> 0
    txq[1].push_back(id);
    wait_done(2000, "first acknowledge");
    repeat (50) @(negedge clk);                    // let node 0 absorb it
    id = make(3, 2'b10, 0, 8'h5a, hop(1, 0, 0), hop(0, 0, 1), 8'h00, 8'h00, 2, 4'b0001);  // 3 -> 0
    txq[3].push_back(id);
    wait_done(2000, "second acknowledge");
    checks++;
    if (n_rx[0] - acks_at_0 != 1) err($sformatf("node 0 received %0d acknowledges, expected 1", n_rx[0] - acks_at_0));

    // random traffic: every MBP to every other node, both directions
    for (int k = 0; k < 240; k++) begin
      int s, d, dir; logic [7:0] h [4];
      s = $urandom_range(0, N - 1);
      d = (s + $urandom_range(1, N - 1)) % N;
      dir = $urandom_range(0, 1);                      // 1: eastwards
      begin
        int nhop; nhop = dir ? (d - s + N) % N : (s - d + N) % N;
        for (int j = 0; j < 4; j++) h[j] = 8'h00;
        for (int j = 0; j < nhop; j++) h[j] = dir ? hop(1, 0, 0) : hop(0, 1, 0);
        h[nhop] = hop(0, 0, 1);
        id = make($urandom_range(3, 15), 2'b00, 1, 8'($urandom), h[0], h[1], h[2], h[3], nhop + 1, 4'(1 << d));
      end
      txq[s].push_back(id);
    end
    wait_done(60000, "random ring traffic");

    // order: fixed route per pair (east if the destination is 1 or 2 hops
    // east, else west), VC0 at injection, short bursts per pair
    vc0_only = 1;
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) last_seq[s][d] = -1;
    for (int k = 0; k < 240; k++) begin
      int s, d, dir, nhop; logic [7:0] h [4];
      s = $urandom_range(0, N - 1);
      d = (s + $urandom_range(1, N - 1)) % N;
      dir = ((d - s + N) % N) <= 2;
      nhop = dir ? (d - s + N) % N : (s - d + N) % N;
      for (int j = 0; j < 4; j++) h[j] = 8'h00;
      for (int j = 0; j < nhop; j++) h[j] = dir ? hop(1, 0, 0) : hop(0, 1, 0);
      h[nhop] = hop(0, 0, 1);
      id = make($urandom_range(3, 15), 2'b00, 1, 8'($urandom), h[0], h[1], h[2], h[3], nhop + 1, 4'(1 << d));
      P[id].src = s; P[id].seq = k;
      txq[s].push_back(id);
    end
    wait_done(60000, "ordered ring traffic");
    checks++; if (n_ordered != 240) err($sformatf("%0d of 240 ordered packets checked", n_ordered));

    for (int i = 0; i < next_id; i++) begin
      checks++; if (P[i].got != P[i].dest) err($sformatf("packet %0d missing", i));
    end
    $display("packets %0d, received per node %0d %0d %0d %0d, in order %0d", next_id, n_rx[0], n_rx[1], n_rx[2], n_rx[3], n_ordered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
