// tb_route_compute: checks XY routing against an independent model for every
// destination and every router position of a 5 x 5 mesh, and the multicast
// routing table (write, then read back through all five input ports).
module tb_route_compute;
  import noc_pkg::*;
  localparam int X = 2, Y = 1;
  logic clk = 0;
  always #5 clk = ~clk;
  logic mcast_mode, tbl_we;
  logic [ADR_W-1:0] tbl_addr;
  port_mask_t tbl_mask;
  flit_t in_flit [NPORTS];
  port_mask_t route [NPORTS];
  int checks = 0, failures = 0;

  route_compute #(.X(X), .Y(Y)) dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic port_mask_t model(int dx, int dy);
    // x first, then y
    if (dx != X) return (dx > X) ? port_mask_t'(1 << P_EAST) : port_mask_t'(1 << P_WEST);
    if (dy != Y) return (dy > Y) ? port_mask_t'(1 << P_SOUTH) : port_mask_t'(1 << P_NORTH);
    return port_mask_t'(1 << P_LOCAL);
  endfunction

  port_mask_t ref_tbl [16];

  initial begin
    tbl_we = 0; tbl_addr = 0; tbl_mask = 0; mcast_mode = 0;
    for (int p = 0; p < NPORTS; p++) in_flit[p] = '0;
    for (int dx = 0; dx < 5; dx++)
      for (int dy = 0; dy < 5; dy++) begin
        for (int p = 0; p < NPORTS; p++) begin
          in_flit[p].dx = COORD_W'(dx);
          in_flit[p].dy = COORD_W'(dy);
          in_flit[p].adr = ADR_W'($urandom);
        end
        #1;
        for (int p = 0; p < NPORTS; p++) begin
          checks++;
          if (route[p] !== model(dx, dy)) begin
            failures++; $display("FAIL xy dst (%0d,%0d) port %0d: %b", dx, dy, p, route[p]);
          end
        end
      end
    // multicast table
    for (int a = 0; a < 16; a++) begin
      ref_tbl[a] = port_mask_t'($urandom);
      @(negedge clk); tbl_we = 1; tbl_addr = ADR_W'(a * 37); tbl_mask = ref_tbl[a];
    end
    @(negedge clk); tbl_we = 0; mcast_mode = 1;
    for (int k = 0; k < 40; k++) begin
      automatic int a [NPORTS];
      for (int p = 0; p < NPORTS; p++) begin
        a[p] = $urandom_range(15);
        in_flit[p].adr = ADR_W'(a[p] * 37);
        in_flit[p].dx  = COORD_W'($urandom);
      end
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        checks++;
        if (route[p] !== ref_tbl[a[p]]) begin
          failures++; $display("FAIL table adr %0d port %0d: %b", a[p] * 37, p, route[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
