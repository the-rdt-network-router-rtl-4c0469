// tb_xbar_arbiter: checks the arbiter against a reference of its rules:
// a grant only for a requested output that is free or being released, at
// most one input per output, a granted output owned until released,
// round-robin order among contenders, and overlap of a release with the
// next grant (back-to-back ownership).
module tb_xbar_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [10:0] req [10]; logic release_i [10]; logic [10:0] gnt [10];
  logic [3:0] sel [11]; logic own [11];
  int checks = 0, failures = 0, overlaps = 0;

  xbar_arbiter dut (.*);

  // reference state
  logic r_own [11]; int r_sel [11]; int r_ptr [11];

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) begin req[i] = '0; release_i[i] = 0; end
    for (int o = 0; o < 11; o++) begin r_own[o] = 0; r_sel[o] = 0; r_ptr[o] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // inputs that own something may release; inputs request random outputs
      for (int i = 0; i < 10; i++) begin
        logic owns; owns = 0;
        for (int o = 0; o < 11; o++) if (r_own[o] && r_sel[o] == i) owns = 1;
        release_i[i] = owns && ($urandom_range(0, 3) == 0);
        req[i] = (!owns || release_i[i]) ? (11'($urandom) & 11'($urandom)) : '0;
      end
      #1;
      for (int o = 0; o < 11; o++) begin
        int w; logic avail;
        w = -1;
        avail = !r_own[o] || release_i[r_sel[o]];
        if (avail)
          for (int k = 0; k < 10; k++)
            if (w < 0 && req[(r_ptr[o] + k) % 10][o]) w = (r_ptr[o] + k) % 10;
        for (int i = 0; i < 10; i++) begin
          checks++;
          if (gnt[i][o] !== (w == i)) begin failures++; if (failures < 10) $display("n%0d out %0d in %0d gnt %b exp winner %0d", n, o, i, gnt[i][o], w); end
        end
        if (w >= 0) begin
          if (r_own[o]) overlaps++;
          r_own[o] = 1; r_sel[o] = w; r_ptr[o] = (w + 1) % 10;
        end else if (r_own[o] && release_i[r_sel[o]]) r_own[o] = 0;
      end
      @(posedge clk); #1;
      for (int o = 0; o < 11; o++) begin
        checks++;
        if (own[o] !== r_own[o] || (r_own[o] && sel[o] != 4'(r_sel[o]))) begin failures++; if (failures < 10) $display("own %0d", o); end
      end
    end
    checks++; if (overlaps == 0) begin failures++; $display("no back-to-back grant seen"); end
    $display("overlapping grants: %0d", overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
