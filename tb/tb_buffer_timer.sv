// tb_buffer_timer: for each firing-time setting, measures the number of
// cycles from `run` rising to `expired`, and checks that dropping `run`
// early restarts the count.
module tb_buffer_timer;
  localparam int unsigned TICK = 7;
  logic clk = 0, rst_n = 0, run = 0, expired; logic [1:0] sel = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  buffer_timer #(.TICK_CYCLES(TICK)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(input logic [1:0] s, input int exp_cycles);
    int n = 0;
    @(negedge clk); sel = s; run = 1;
    while (!expired) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != exp_cycles) begin failures++; $display("sel %0d: %0d cycles, expected %0d", s, n, exp_cycles); end
    @(negedge clk); run = 0;
    @(negedge clk);
    checks++; if (expired) begin failures++; $display("expired stuck"); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    measure(0, TICK);
    measure(1, TICK * 10);
    measure(2, TICK * 100);
    measure(3, TICK * 1000);
    // interrupted run restarts from zero
    @(negedge clk); sel = 0; run = 1;
    repeat (TICK - 2) @(negedge clk);
    run = 0; @(negedge clk);
    measure(0, TICK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
