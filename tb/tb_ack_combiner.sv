// tb_ack_combiner: random allocations and acknowledge lookups from the ten
// requesters, checked against a reference table: round-robin service, absorb
// of all but the last acknowledge of a key, pass of unknown keys, refusal
// when the table is full.
module tb_ack_combiner;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req [10]; logic alloc [10]; logic [7:0] key [10]; logic [3:0] cnt [10];
  logic [9:0] gnt; logic absorb, full, par;
  int checks = 0, failures = 0, n_absorb = 0, n_full = 0, n_last = 0;

  ack_combiner dut (.*);

  // reference
  logic r_v [4]; logic [7:0] r_k [4]; int r_c [4]; int r_ptr;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 0; e < 4; e++) begin r_v[e] = 0; r_c[e] = 0; r_k[e] = 0; end
    r_ptr = 0;
    for (int i = 0; i < 10; i++) begin req[i] = 0; alloc[i] = 0; key[i] = 0; cnt[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int w, h, f; logic e_abs, e_full;
      @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        req[i] = ($urandom_range(0, 2) == 0);
        alloc[i] = ($urandom_range(0, 2) == 0);
        key[i] = 8'($urandom_range(0, 7));          // few keys: many hits
        cnt[i] = 4'($urandom_range(2, 4));
      end
      #1;
      w = -1;
      for (int k = 0; k < 10; k++) if (w < 0 && req[(r_ptr + k) % 10]) w = (r_ptr + k) % 10;
      e_abs = 0; e_full = 0;
      if (w >= 0) begin
        h = -1; f = -1;
        for (int e = 0; e < 4; e++) begin
          if (h < 0 && r_v[e] && r_k[e] == key[w]) h = e;
          if (f < 0 && !r_v[e]) f = e;
        end
        if (alloc[w]) begin
          if (h >= 0) r_c[h] = (r_c[h] + int'(cnt[w])) % 16;   // 4-bit count
          else if (f >= 0) begin r_v[f] = 1; r_k[f] = key[w]; r_c[f] = int'(cnt[w]); end
          else e_full = 1;
        end else if (h >= 0) begin
          if (r_c[h] > 1) begin e_abs = 1; r_c[h]--; end
          else begin r_v[h] = 0; n_last++; end
        end
        r_ptr = (w + 1) % 10;
      end
      checks++;
      if (gnt !== ((w >= 0) ? (10'(1) << w) : 10'(0)) || absorb !== e_abs || full !== e_full) begin
        failures++;
        if (failures < 10) $display("n%0d gnt %b w %0d absorb %b/%b full %b/%b", n, gnt, w, absorb, e_abs, full, e_full);
      end
      n_absorb += int'(e_abs); n_full += int'(e_full);
    end
    checks++; if (n_absorb == 0 || n_full == 0 || n_last == 0) begin failures++; $display("case not reached"); end
    $display("absorbed %0d, full %0d, last %0d", n_absorb, n_full, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
