// ack_combiner: acknowledge packet combining buffer.
//
// When a combinable multicast packet leaves for n >= 2 destinations, its
// controller asks for an entry {key, n} (op alloc).  Each returning
// acknowledge packet with combining enabled asks for a lookup of its key: if
// an entry matches and more than one acknowledge is still outstanding, the
// acknowledge is absorbed (absorb=1, the count drops by one); the last one
// frees the entry and passes on, so the source sees a single, combined
// acknowledge.  An acknowledge with no matching entry passes unchanged.  When
// all entries are in use an alloc is refused (full=1) and the combining of
// that multicast is left to the MBP.  If a key is allocated again while
// its entry is live the new destinations are added to the count.
//
// The combining rule and the overflow behaviour follow the document; the
// number of entries, the count width and the one-request-per-cycle
// round-robin service of the ten controllers are this design's.
//
// Timing: gnt, absorb and full are combinational from the requests and the
// table; the table updates on the clock edge of the grant.
module ack_combiner
  import rdt_pkg::*;
#(
  parameter int unsigned NI      = 10,
  parameter int unsigned ENTRIES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req   [NI],
  input  logic             alloc [NI],     // 1: record a multicast, 0: acknowledge lookup
  input  logic [KEY_W-1:0] key   [NI],
  input  logic [3:0]       cnt   [NI],     // destinations of the multicast
  output logic [NI-1:0]    gnt,            // one-hot: request served this cycle
  output logic             absorb,         // lookup result for the served request
  output logic             full,           // alloc refused, table full
  output logic             par             // parity of the table status
);
  typedef struct packed {
    logic             valid;
    logic [KEY_W-1:0] key;
    logic [3:0]       cnt;
  } entry_t;

  entry_t tab [ENTRIES];
  logic [3:0] ptr;
  logic       sv;           // a request is served
  logic [3:0] si;           // which
  logic       hit, free_v;
  int         hi, fi;

  always_comb begin
    sv = 1'b0; si = '0;
    for (int k = 0; k < int'(NI); k++) begin
      if (!sv && req[(int'(ptr) + k) % int'(NI)]) begin
        sv = 1'b1;
        si = 4'((int'(ptr) + k) % int'(NI));
      end
    end
    gnt = '0;
    if (sv) gnt[si] = 1'b1;

    hit = 1'b0; hi = 0; free_v = 1'b0; fi = 0;
    for (int e = 0; e < int'(ENTRIES); e++) begin
      if (!hit && tab[e].valid && tab[e].key == key[si]) begin hit = 1'b1; hi = e; end
      if (!free_v && !tab[e].valid) begin free_v = 1'b1; fi = e; end
    end
    absorb = sv && !alloc[si] && hit && tab[hi].cnt > 4'd1;
    full   = sv && alloc[si] && !hit && !free_v;

    par = 1'b0;
    for (int e = 0; e < int'(ENTRIES); e++) par ^= ^tab[e];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int e = 0; e < int'(ENTRIES); e++) tab[e] <= '0;
    end else if (sv) begin
      ptr <= (si == 4'(NI - 1)) ? 4'd0 : si + 4'd1;
      if (alloc[si]) begin
        if (hit)         tab[hi].cnt <= tab[hi].cnt + cnt[si];
        else if (free_v) tab[fi]     <= '{valid: 1'b1, key: key[si], cnt: cnt[si]};
      end else if (hit) begin
        if (tab[hi].cnt > 4'd1) tab[hi].cnt   <= tab[hi].cnt - 4'd1;
        else                    tab[hi].valid <= 1'b0;
      end
    end
  end
endmodule
