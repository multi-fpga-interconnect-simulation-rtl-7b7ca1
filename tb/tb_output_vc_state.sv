// tb_output_vc_state: random sends (only where a credit exists), returned
// credits and VC allocations/releases against a counter and busy-flag model.
// Checks the credit stall: a VC that sent DEPTH flits without a credit back
// reports no credit.
module tb_output_vc_state;
  import noc_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic send, free;
  logic [VC_W-1:0] send_vc, free_vc;
  credit_t credit_in;
  logic [NVC-1:0] alloc, credit_ok, vc_free;
  int checks = 0, failures = 0, stalls = 0;
  int cnt [NVC];
  bit busy [NVC];
  int outstanding [NVC][$];

  output_vc_state #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    send = 0; free = 0; send_vc = 0; free_vc = 0; credit_in = '0; alloc = '0;
    for (int v = 0; v < NVC; v++) begin cnt[v] = DEPTH; busy[v] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int v = 0; v < NVC; v++) begin
        checks++;
        if (credit_ok[v] != (cnt[v] > 0) || vc_free[v] != !busy[v]) begin
          failures++; $display("FAIL t=%0d vc %0d cnt=%0d", t, v, cnt[v]);
        end
        if (cnt[v] == 0) stalls++;
      end
      send_vc = VC_W'($urandom);
      send = (cnt[send_vc] > 0) && $urandom_range(1) == 0;
      credit_in.vc = VC_W'($urandom);
      credit_in.valid = (cnt[credit_in.vc] + (send && send_vc == credit_in.vc ? 1 : 0) < DEPTH) &&
                        $urandom_range(3) == 0;
      alloc = '0;
      begin
        automatic int av = $urandom_range(NVC - 1);
        if (!busy[av] && $urandom_range(3) == 0) alloc[av] = 1'b1;
      end
      free_vc = VC_W'($urandom);
      free = busy[free_vc] && !alloc[free_vc] && $urandom_range(3) == 0;
      @(posedge clk);
      if (send) cnt[send_vc]--;
      if (credit_in.valid) cnt[credit_in.vc]++;
      for (int v = 0; v < NVC; v++) if (alloc[v]) busy[v] = 1;
      if (free) busy[free_vc] = 0;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: no credit stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
