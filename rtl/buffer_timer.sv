// buffer_timer: residence timer of one packet buffer.
//
// While `run` is high (a packet is waiting in the buffer) the timer counts
// clock cycles; when the count reaches the selected firing time `expired`
// goes high and stays high until `run` drops, which also clears the count.
// The document gives the purpose and the range, 100 us to 100 ms; the four
// steps (x1, x10, x100, x1000 of 100 us) and the cycle-count implementation
// are this design's choice.  TICK_CYCLES is 100 us in clock cycles at the
// 60 MHz router clock.
//
// Timing: expired rises TICK_CYCLES*{1,10,100,1000}[sel] cycles after run rose.
module buffer_timer #(
  parameter int unsigned TICK_CYCLES = 6000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic [1:0] sel,       // 0:100us 1:1ms 2:10ms 3:100ms
  output logic       expired
);
  localparam int unsigned CW = $clog2(TICK_CYCLES * 1000 + 1);
  logic [CW-1:0] cnt, limit;

  always_comb begin
    unique case (sel)
      2'd0: limit = CW'(TICK_CYCLES);
      2'd1: limit = CW'(TICK_CYCLES * 10);
      2'd2: limit = CW'(TICK_CYCLES * 100);
      default: limit = CW'(TICK_CYCLES * 1000);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (!run)     cnt <= '0;
    else if (!expired) cnt <= cnt + 1'b1;
  end

  assign expired = run && (cnt >= limit);
endmodule
