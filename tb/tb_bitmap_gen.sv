// tb_bitmap_gen: drives random headers, input links, modes and dateline
// settings into the bit-map generator and compares its output-port set and
// per-link VC choice with a reference worked out port by port.
module tb_bitmap_gen;
  import rdt_pkg::*;
  flit_t hdr0, hdr1; logic [3:0] in_port; logic in_vc, sd_mode; logic [7:0] wrap_link;
  omap_t omap; logic [7:0] ovc; logic forced;
  int checks = 0, failures = 0;

  bitmap_gen dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [10:0] exp_map; logic [7:0] exp_vc; logic exp_forced;
      logic rank; logic [3:0] dirs; logic [1:0] mbp;
      hdr0 = 18'($urandom); hdr1 = 18'($urandom);
      if (n % 7 == 0) hdr1[7:0] = 8'h00;          // empty hop list
      in_port = 4'($urandom_range(0, 9)); in_vc = 1'($urandom);
      sd_mode = ($urandom_range(0, 9) == 0);
      wrap_link = 8'($urandom) & 8'($urandom);
      #1;
      rank = hdr1[7]; dirs = hdr1[6:3]; mbp = hdr1[2:1];
      exp_map = '0;
      for (int d = 0; d < 4; d++) begin
        int port; port = rank ? 4 + d : d;
        if (dirs[d] && !(in_port == 4'(port))) exp_map[port] = 1;
      end
      if (mbp[0]) exp_map[8] = 1;
      if (mbp[1]) exp_map[9] = 1;
      if (exp_map == 0) exp_map[8] = 1;
      exp_forced = 0;
      if (sd_mode) begin exp_map = 11'b001_0000_0000; exp_forced = 1; end
      for (int o = 0; o < 8; o++) begin
        int straight;
        case (in_port) 0: straight = 2; 1: straight = 3; 2: straight = 0; 3: straight = 1;
                       4: straight = 6; 5: straight = 7; 6: straight = 4; 7: straight = 5;
                       default: straight = -1; endcase
        if (hdr0[13]) exp_vc[o] = hdr0[12];
        else if (wrap_link[o]) exp_vc[o] = 1;
        else if (o == straight) exp_vc[o] = in_vc;
        else exp_vc[o] = 0;
      end
      checks++;
      if (omap !== exp_map || ovc !== exp_vc || forced !== exp_forced) begin
        failures++;
        if (failures < 10) $display("mismatch in=%0d hop=%h map %b/%b vc %b/%b", in_port, hdr1[7:0], omap, exp_map, ovc, exp_vc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
