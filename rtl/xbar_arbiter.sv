// xbar_arbiter: round-robin arbiter of the crossbar outputs.
//
// Each input presents a request bit map (req[i], one bit per output, already
// restricted to outputs whose downstream buffer can take a packet).  Every
// free output is granted, in the same cycle, to one of the inputs requesting
// it, chosen round-robin starting after the last winner of that output, so no
// input starves.  A granted output stays owned by its input for the whole
// packet; the input raises release[i] while its tail flit is on the crossbar,
// and in that same cycle the output may already be granted to the next
// packet, so arbitration overlaps sending and packets follow back to back.
// An input may win any subset of the outputs it asked for (partial multicast).
// The round-robin policy and the overlap follow the document; the one-cycle
// ownership scheme is this design's.
//
// Timing: gnt is combinational from req; ownership changes on the clock edge.
module xbar_arbiter
  import rdt_pkg::*;
#(
  parameter int unsigned NI = 10,
  parameter int unsigned NO = 11
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NO-1:0]   req     [NI],
  input  logic            release_i [NI],
  output logic [NO-1:0]   gnt     [NI],
  output logic [3:0]      sel     [NO],
  output logic            own     [NO]
);
  logic [3:0] ptr [NO];          // round-robin start point per output
  logic       win_v [NO];
  logic [3:0] win   [NO];

  always_comb begin
    for (int i = 0; i < int'(NI); i++) gnt[i] = '0;
    for (int o = 0; o < int'(NO); o++) begin
      win_v[o] = 1'b0;
      win[o]   = '0;
      if (!own[o] || release_i[sel[o]]) begin
        for (int k = 0; k < int'(NI); k++) begin
          if (!win_v[o] && req[(int'(ptr[o]) + k) % int'(NI)][o]) begin
            win_v[o] = 1'b1;
            win[o]   = 4'((int'(ptr[o]) + k) % int'(NI));
          end
        end
      end
      if (win_v[o]) gnt[win[o]][o] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < int'(NO); o++) begin
        own[o] <= 1'b0; sel[o] <= '0; ptr[o] <= '0;
      end
    end else begin
      for (int o = 0; o < int'(NO); o++) begin
        if (win_v[o]) begin
          own[o] <= 1'b1;
          sel[o] <= win[o];
          ptr[o] <= (win[o] == 4'(NI - 1)) ? 4'd0 : win[o] + 4'd1;
        end else if (own[o] && release_i[sel[o]]) begin
          own[o] <= 1'b0;
        end
      end
    end
  end
endmodule
