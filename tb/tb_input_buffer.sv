// tb_input_buffer: random pushes into the four VC FIFOs and random pops,
// compared with a queue model per VC (head flit, head route, valid flags),
// including filling a VC to its depth.
module tb_input_buffer;
  import noc_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid;
  flit_t in_flit;
  port_mask_t in_route;
  logic [NVC-1:0] pop, head_valid;
  flit_t head_flit [NVC];
  port_mask_t head_route [NVC];
  int checks = 0, failures = 0, fulls = 0;

  input_buffer #(.DEPTH(DEPTH)) dut (.*);

  flit_t      qf [NVC][$];
  port_mask_t qr [NVC][$];

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0; in_route = '0; pop = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // compare heads with the model
      for (int v = 0; v < NVC; v++) begin
        checks++;
        if (head_valid[v] != (qf[v].size() > 0) ||
            (qf[v].size() > 0 && (head_flit[v] != qf[v][0] || head_route[v] != qr[v][0]))) begin
          failures++; $display("FAIL t=%0d vc %0d", t, v);
        end
        if (qf[v].size() == DEPTH) fulls++;
      end
      // stimulus: at most one pop, push only where room (or where popped)
      pop = '0;
      begin
        automatic int pv = $urandom_range(NVC - 1);
        if (qf[pv].size() > 0 && $urandom_range(2) == 0) pop[pv] = 1'b1;
      end
      in_flit  = flit_t'({$urandom, $urandom, $urandom});
      in_route = port_mask_t'($urandom);
      in_flit.vc = VC_W'((t < 40) ? 1 : $urandom_range(NVC - 1));
      in_valid = (qf[in_flit.vc].size() < DEPTH || pop[in_flit.vc]) && $urandom_range(3) != 0;
      @(posedge clk);
      for (int v = 0; v < NVC; v++) if (pop[v]) begin void'(qf[v].pop_front()); void'(qr[v].pop_front()); end
      if (in_valid) begin qf[in_flit.vc].push_back(in_flit); qr[in_flit.vc].push_back(in_route); end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: a VC never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
