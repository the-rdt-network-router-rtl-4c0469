// sd_ctrl: shoot-down mode and error handling of the router.
//
// The router enters shoot-down mode, in which every buffered packet is sent
// to the MBP, on any of: a request from the MBP, a parity error in a header
// flit, a wrong stored parity of a buffer's status, a mismatch between this
// chip's buffer-status parity and that of its bit-slice partner chip
// (checked when sliced_en is set), or a request on the
// barrier-synchronisation line that runs through all routers in cascade
// (chain_in).  While in the mode the router drives chain_out so the request
// travels on down the chain.  The MBP ends the mode with `setup` once it has
// taken the packets (it re-injects them itself); the mode is entered again at
// once if a cause is still present.  `cause` records, sticky until setup,
// which events were seen: {chain, partner parity, status parity, header
// parity, MBP}.
//
// The causes and the cascade line follow the document; the level-sensitive
// handshake with the MBP and the one-cycle registered compare of the two
// chips' status parities are this design's.
module sd_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mbp_req,        // MBP asks for shoot-down
  input  logic       setup,          // MBP: packets taken, leave the mode
  input  logic       hdr_err,        // header parity error seen this cycle
  input  logic       stat_err,       // stored buffer-status parity is wrong
  input  logic       sliced_en,      // two chips work bit-sliced
  input  logic       par_local,      // buffer-status parity of this chip
  input  logic       par_partner,    // the same parity from the partner chip
  input  logic       chain_in,
  output logic       chain_out,
  output logic       sd_mode,
  output logic [4:0] cause
);
  logic par_l_q, par_p_q, par_err;
  logic [4:0] ev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin par_l_q <= 1'b0; par_p_q <= 1'b0; end
    else        begin par_l_q <= par_local; par_p_q <= par_partner; end
  end
  assign par_err = sliced_en && (par_l_q != par_p_q);
  assign ev = {chain_in, par_err, stat_err, hdr_err, mbp_req};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sd_mode <= 1'b0; cause <= '0;
    end else if (setup) begin
      sd_mode <= |ev;
      cause   <= ev;
    end else begin
      if (|ev) sd_mode <= 1'b1;
      cause <= cause | ev;
    end
  end
  assign chain_out = sd_mode;
endmodule
