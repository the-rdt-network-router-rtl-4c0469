// tb_rdt_router_upset: the router's check of the stored parity of each
// buffer's status, at the router's default parameters.
//
// A packet from link 0 (base N) is routed to link 1 (base E), whose
// downstream buffer is held busy, so the packet waits in its buffer with a
// pending bit map.  The testbench then upsets the parity bit stored with
// that buffer's status (a forced register value, standing in for a soft
// error in the status registers).  The router must
// notice the wrong status parity, enter shoot-down mode with only the status
// parity cause recorded, drive chain_out, and drain the packet to MBP0 with
// its header unshifted and its body intact.  After set-up the router must be
// error free again and deliver a normal packet, header shifted, to link 1.
// A first packet before the upset checks that normal traffic raises no
// error.
module tb_rdt_router_upset;
  import rdt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t      link_in [10];
  logic [1:0] link_in_free [10];
  link_t      link_out [10];
  logic [1:0] link_out_free [10];
  logic [7:0] wrap_link = '0;
  logic [1:0] timer_sel = 2'd3;                   // 100 ms: the timer stays out of the way
  logic sliced_en = 0, status_par_in = 0, status_par_out;
  logic mbp_sd_req = 0, mbp_setup = 0, chain_in = 0, chain_out, sd_mode;
  logic [4:0] sd_cause;

  rdt_router dut (.*);

  int checks = 0, failures = 0;
  task automatic err(input string s);
    failures++; $display("t=%0t %s", $time, s);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    err("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic flit_t par(logic [16:0] b); return {^b, b}; endfunction

  // receivers: collect every flit per output
  flit_t rx [10][$];
  always @(posedge clk)
    for (int o = 0; o < 10; o++) if (link_out[o].valid) rx[o].push_back(link_out[o].data);

  flit_t pk [6];
  task automatic build(input logic [15:0] body);
    pk[0] = par({2'b00, 1'b1, 1'b0, 1'b0, 4'd5, 8'h00});   // data, no combining, 6 flits
    pk[1] = par({1'b0, 8'h00, 8'h10});                      // hop 0: base E; hop 1: deliver
    pk[2] = par({1'b0, 16'h0000});
    for (int k = 3; k < 6; k++) pk[k] = 18'(body + 16'(k));
  endtask

  task automatic send();
    while (!link_in_free[0][0]) @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      link_in[0].valid = 1; link_in[0].vc = 1'b0; link_in[0].data = pk[k];
      @(negedge clk);
    end
    link_in[0] = '0;
  endtask

  // expect exactly one packet on output o; shifted: header flits 1, 2 moved by one hop
  task automatic expect_pkt(input int o, input bit shifted, input string what);
    flit_t e;
    checks++;
    if (rx[o].size() != 6) begin err($sformatf("%s: %0d flits on output %0d", what, rx[o].size(), o)); return; end
    for (int k = 0; k < 6; k++) begin
      e = pk[k];
      if (shifted && k == 1) e = par({1'b0, 16'h0000});
      if (rx[o][k] != e) err($sformatf("%s: flit %0d is %h, expected %h", what, k, rx[o][k], e));
    end
    rx[o].delete();
  endtask

  task automatic expect_quiet(input string what);
    checks++;
    for (int o = 0; o < 10; o++) if (rx[o].size() != 0) err($sformatf("%s: stray flits on output %0d", what, o));
  endtask

  initial begin
    logic [N_OUT-1:0] p;
    logic s;
    for (int i = 0; i < 10; i++) begin link_in[i] = '0; link_out_free[i] = 2'b11; end
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);

    // normal packet: no error, delivered shifted on E
    build(16'h1000); send();
    repeat (30) @(negedge clk);
    expect_pkt(1, 1, "normal packet");
    expect_quiet("normal packet");
    checks++; if (sd_mode || sd_cause != '0) err("shoot-down during normal traffic");

    // packet held: E output busy downstream
    link_out_free[1] = 2'b00;
    build(16'h2000); send();
    repeat (30) @(negedge clk);
    p = dut.g_ctl[0].u_ctl.pend[0];
    checks++; if (p != 11'b000_0000_0010) err($sformatf("held packet pending map %b", p));
    checks++; if (sd_mode) err("shoot-down before the upset");

    // upset the stored status parity of the holding buffer
    s = ~dut.g_ctl[0].u_ctl.spar[0];
    force dut.g_ctl[0].u_ctl.spar[0] = s;
    @(negedge clk);
    release dut.g_ctl[0].u_ctl.spar[0];
    @(negedge clk);
    checks++;
    if (!sd_mode || !chain_out || sd_cause != 5'b00100)
      err($sformatf("status upset: mode %b chain %b cause %b", sd_mode, chain_out, sd_cause));

    // the packet is drained to MBP0 unshifted, nothing else moves
    repeat (40) @(negedge clk);
    expect_pkt(8, 0, "drained packet");
    expect_quiet("drain");
    checks++; if (!sd_mode) err("left shoot-down mode without set-up");

    // set-up: error free again, normal service
    link_out_free[1] = 2'b11;
    @(negedge clk); mbp_setup = 1; @(negedge clk); mbp_setup = 0;
    repeat (2) @(negedge clk);
    checks++; if (sd_mode || chain_out || sd_cause != '0) err($sformatf("after set-up: mode %b cause %b", sd_mode, sd_cause));
    build(16'h3000); send();
    repeat (30) @(negedge clk);
    expect_pkt(1, 1, "packet after set-up");
    expect_quiet("after set-up");
    checks++; if (sd_mode) err("shoot-down after set-up");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
