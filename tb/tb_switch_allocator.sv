// tb_switch_allocator: random requests. Checks that each input selects one
// requesting VC, that each output grants at most one input whose selected VC
// asks for it, that no requested output stays idle (work conserving), and that
// a multicast request can win several outputs in one cycle.
module tb_switch_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  port_mask_t req [NPORTS][NVC];
  logic [NVC-1:0] in_vc_sel [NPORTS];
  logic [NPORTS-1:0] out_gnt [NPORTS];
  int checks = 0, failures = 0, forks = 0;

  switch_allocator dut (.*);

  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic int popc(logic [7:0] x);
    int n = 0; for (int k = 0; k < 8; k++) n += int'(x[k]); return n;
  endfunction

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < NPORTS; i++) for (int v = 0; v < NVC; v++) req[i][v] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) for (int v = 0; v < NVC; v++)
        req[i][v] = ($urandom_range(1) == 0) ? port_mask_t'($urandom) & port_mask_t'($urandom) : '0;
      #1;
      for (int i = 0; i < NPORTS; i++) begin
        automatic bit anyreq = 0;
        automatic int nw = 0;
        for (int v = 0; v < NVC; v++) anyreq |= (req[i][v] != '0);
        chk(popc(8'(in_vc_sel[i])) == (anyreq ? 1 : 0), "input VC selection");
        for (int v = 0; v < NVC; v++) if (in_vc_sel[i][v]) chk(req[i][v] != '0, "selected idle VC");
        for (int o = 0; o < NPORTS; o++) if (out_gnt[o][i]) nw++;
        if (nw > 1) forks++;
      end
      for (int o = 0; o < NPORTS; o++) begin
        automatic bit wanted = 0;
        chk(popc(8'(out_gnt[o])) <= 1, "output grants two inputs");
        for (int i = 0; i < NPORTS; i++) for (int v = 0; v < NVC; v++)
          if (in_vc_sel[i][v] && req[i][v][o]) wanted = 1;
        chk(wanted == (out_gnt[o] != '0), "output idle or granted without request");
        for (int i = 0; i < NPORTS; i++) if (out_gnt[o][i]) begin
          automatic bit ok = 0;
          for (int v = 0; v < NVC; v++) if (in_vc_sel[i][v] && req[i][v][o]) ok = 1;
          chk(ok, "grant to an input whose VC does not ask for it");
        end
      end
    end
    chk(forks > 0, "no multicast fork seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
