// xbar: the 10x11 crossbar of the router.
//
// Each output o is driven by the input sel[o] while own[o] is set; several
// outputs may select the same input, which is how one read of a packet buffer
// is multicast to several links in the same cycle.  Outputs 0..9 go to the
// links and MBP ports, output 10 to the acknowledge combining sink.  For the
// eight torus outputs the virtual channel comes from the selecting input's
// per-output VC choice; the MBP and combining outputs always use VC0.  The
// crossbar size is the document's; it is purely combinational here.
module xbar
  import rdt_pkg::*;
#(
  parameter int unsigned NI = 10,
  parameter int unsigned NO = 11
) (
  input  flit_t            in_data  [NI],
  input  logic             in_valid [NI],
  input  logic [7:0]       in_ovc   [NI],   // VC per torus output
  input  logic [3:0]       sel      [NO],
  input  logic             own      [NO],
  output link_t            out      [NO]
);
  always_comb begin
    for (int o = 0; o < int'(NO); o++) begin
      out[o] = '0;
      for (int i = 0; i < int'(NI); i++) begin
        if (own[o] && sel[o] == 4'(i)) begin
          out[o].valid = in_valid[i];
          out[o].data  = in_data[i];
          out[o].vc    = (o < 8) ? in_ovc[i][o % 8] : 1'b0;
        end
      end
    end
  end
endmodule
