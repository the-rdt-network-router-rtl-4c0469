// tb_xbar: random selections and ownerships; each output must carry the
// data, valid and VC of the input it selects, or nothing when not owned.
module tb_xbar;
  import rdt_pkg::*;
  flit_t in_data [10]; logic in_valid [10]; logic [7:0] in_ovc [10];
  logic [3:0] sel [11]; logic own [11]; link_t out [11];
  int checks = 0, failures = 0;

  xbar dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 10; i++) begin
        in_data[i] = 18'($urandom); in_valid[i] = 1'($urandom); in_ovc[i] = 8'($urandom);
      end
      for (int o = 0; o < 11; o++) begin
        sel[o] = 4'($urandom_range(0, 9)); own[o] = ($urandom_range(0, 3) != 0);
      end
      #1;
      for (int o = 0; o < 11; o++) begin
        link_t e;
        if (!own[o]) e = '0;
        else begin
          e.valid = in_valid[sel[o]]; e.data = in_data[sel[o]];
          e.vc = (o < 8) ? in_ovc[sel[o]][o] : 1'b0;
        end
        checks++;
        if (out[o] !== e) begin failures++; if (failures < 10) $display("out %0d: %h exp %h", o, out[o], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
