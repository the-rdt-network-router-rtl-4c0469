// tb_sd_ctrl: each cause (MBP request, header parity error, stored status
// parity error, bit-slice status parity mismatch, cascade line) must put the router in shoot-down mode and
// be recorded; setup must leave the mode; a parity mismatch must be ignored
// when the chips are not bit-sliced.
module tb_sd_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mbp_req = 0, setup = 0, hdr_err = 0, stat_err = 0, sliced_en = 0, par_local = 0, par_partner = 0, chain_in = 0;
  logic chain_out, sd_mode; logic [4:0] cause;
  int checks = 0, failures = 0;

  sd_ctrl dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic exp_mode, input logic [4:0] exp_cause, input string what);
    checks++;
    if (sd_mode !== exp_mode || chain_out !== exp_mode || cause !== exp_cause) begin
      failures++; $display("%s: mode %b cause %b, expected %b %b", what, sd_mode, cause, exp_mode, exp_cause);
    end
  endtask

  task automatic do_setup();
    @(negedge clk); setup = 1; @(negedge clk); setup = 0; #1;
    check(0, 5'b00000, "after setup");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(negedge clk); check(0, 0, "idle");
    @(negedge clk); mbp_req = 1; @(negedge clk); mbp_req = 0; #1; check(1, 5'b00001, "mbp");
    repeat (5) @(negedge clk); check(1, 5'b00001, "mbp held");
    do_setup();
    @(negedge clk); hdr_err = 1; @(negedge clk); hdr_err = 0; #1; check(1, 5'b00010, "hdr parity");
    do_setup();
    @(negedge clk); stat_err = 1; @(negedge clk); stat_err = 0; #1; check(1, 5'b00100, "stored status parity");
    do_setup();
    // mismatch ignored when not sliced
    @(negedge clk); par_partner = 1; repeat (3) @(negedge clk); #1; check(0, 0, "unsliced mismatch");
    par_partner = 0; @(negedge clk);
    sliced_en = 1;
    @(negedge clk); par_local = 1; par_partner = 1; repeat (3) @(negedge clk); #1; check(0, 0, "equal parity");
    @(negedge clk); par_partner = 0; @(negedge clk); #1; check(0, 0, "mismatch, 1 cycle of compare delay");
    @(negedge clk); #1; check(1, 5'b01000, "status parity mismatch");
    par_partner = 1; @(negedge clk);
    do_setup();
    @(negedge clk); chain_in = 1; @(negedge clk); #1; check(1, 5'b10000, "chain");
    // setup while the chain still requests: mode re-entered
    @(negedge clk); setup = 1; @(negedge clk); setup = 0; #1; check(1, 5'b10000, "setup with chain active");
    chain_in = 0;
    do_setup();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
