// tb_crossbar: random flits and random (possibly multicast) selections; each
// output must carry the selected input's flit with the new VC, or be idle.
module tb_crossbar;
  import noc_pkg::*;
  flit_t in_flit [NPORTS];
  logic [NPORTS-1:0] sel [NPORTS];
  logic [VC_W-1:0] out_vc [NPORTS];
  flit_ch_t out [NPORTS];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < NPORTS; i++) in_flit[i] = flit_t'({$urandom, $urandom, $urandom});
      for (int o = 0; o < NPORTS; o++) begin
        automatic int s = $urandom_range(NPORTS);   // NPORTS means idle
        sel[o] = (s == NPORTS) ? '0 : NPORTS'(1) << s;
        out_vc[o] = VC_W'($urandom);
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        automatic flit_t e = '0;
        automatic bit ev = 0;
        for (int i = 0; i < NPORTS; i++) if (sel[o] == NPORTS'(1) << i) begin e = in_flit[i]; e.vc = out_vc[o]; ev = 1; end
        checks++;
        if (out[o].valid != ev || (ev && out[o].flit != e)) begin
          failures++; $display("FAIL t=%0d out %0d", t, o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
