// tb_packet_buffer: writes a packet and reads it back, including a read and
// a write in the same cycle at different addresses (push while pulling).
module tb_packet_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [3:0] waddr, raddr; logic [17:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [17:0] ref_mem [16];

  packet_buffer dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); we = 1; waddr = 4'(i); wdata = 18'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); raddr = 4'(i);
      @(posedge clk); #1;
      checks++; if (rdata !== ref_mem[i]) begin failures++; $display("rd %0d got %h exp %h", i, rdata, ref_mem[i]); end
    end
    // simultaneous: read address k while writing address k+4 with new data
    for (int k = 0; k < 12; k++) begin
      @(negedge clk); raddr = 4'(k); we = 1; waddr = 4'(k+4); wdata = 18'($urandom);
      @(posedge clk); #1;
      checks++; if (rdata !== ref_mem[k]) begin failures++; $display("rw %0d got %h exp %h", k, rdata, ref_mem[k]); end
      ref_mem[k+4] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 4; i < 16; i++) begin
      @(negedge clk); raddr = 4'(i);
      @(posedge clk); #1;
      checks++; if (rdata !== ref_mem[i]) begin failures++; $display("rd2 %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
