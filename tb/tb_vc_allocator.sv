// tb_vc_allocator: random requests and free-VC sets. Checks that a granted
// head gets one free VC on every output it asked for, that no VC is handed out
// twice, that 'alloc' lists exactly the VCs handed out, that a head is refused
// only when one of its outputs has no VC left, and that two heads competing
// for one VC are served alternately (round robin).
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int NREQ = NPORTS * NVC;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  port_mask_t req [NREQ];
  logic [NVC-1:0] vc_free [NPORTS];
  logic [NREQ-1:0] gnt;
  logic [VC_W-1:0] gnt_vc [NREQ][NPORTS];
  logic [NVC-1:0] alloc [NPORTS];
  int checks = 0, failures = 0;

  vc_allocator dut (.*);

  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int last = -1, alternations = 0;
    for (int r = 0; r < NREQ; r++) req[r] = '0;
    for (int o = 0; o < NPORTS; o++) vc_free[o] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int r = 0; r < NREQ; r++) req[r] = ($urandom_range(2) == 0) ? port_mask_t'($urandom) : '0;
      for (int o = 0; o < NPORTS; o++) vc_free[o] = NVC'($urandom);
      #1;
      begin
        logic [NVC-1:0] used [NPORTS];
        for (int o = 0; o < NPORTS; o++) used[o] = '0;
        for (int r = 0; r < NREQ; r++) if (gnt[r]) begin
          chk(req[r] != '0, "grant without request");
          for (int o = 0; o < NPORTS; o++) if (req[r][o]) begin
            chk(vc_free[o][gnt_vc[r][o]], "VC not free");
            chk(!used[o][gnt_vc[r][o]], "VC given twice");
            used[o][gnt_vc[r][o]] = 1'b1;
          end
        end
        for (int o = 0; o < NPORTS; o++) chk(alloc[o] == used[o], "alloc mismatch");
        // refused requests must lack a VC on some output
        for (int r = 0; r < NREQ; r++) if (req[r] != '0 && !gnt[r]) begin
          automatic bit blocked = 0;
          for (int o = 0; o < NPORTS; o++) if (req[r][o] && (vc_free[o] & ~used[o]) == '0) blocked = 1;
          chk(blocked, "request refused although VCs were left");
        end
      end
    end
    // two heads, one VC: round robin alternates
    for (int t = 0; t < 10; t++) begin
      @(negedge clk);
      for (int r = 0; r < NREQ; r++) req[r] = '0;
      req[3] = 5'b00100; req[9] = 5'b00100;
      for (int o = 0; o < NPORTS; o++) vc_free[o] = '0;
      vc_free[2] = 4'b0010;
      #1;
      chk(gnt[3] ^ gnt[9], "exactly one of two competing heads served");
      if (gnt[3] && last == 9 || gnt[9] && last == 3) alternations++;
      last = gnt[3] ? 3 : 9;
    end
    chk(alternations == 9, "round robin does not alternate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
