// route_compute: route computation for all input ports of one router.
//
// Unicast mode: dimension-order XY routing. The flit first travels along x until
// its destination column is reached, then along y, then leaves on the local
// port. Multicast mode: the output set is read from a routing table indexed by
// the flit's source cell address. The table holds, per source, the set of output
// ports of the multicast tree that passes through this router (the union of the
// XY paths from the source to all its destinations); it is filled during
// initialisation through the write port. Both modes give a 5-bit output-port
// mask, so later stages treat unicast as a multicast with one output.
//
// Timing: combinational from in_flit to route; the table write takes effect on
// the next clock edge. The table has no reset: it must be written before
// multicast traffic is sent. The router calls this at buffer-write time, as the
// design specifies.
module route_compute
  import noc_pkg::*;
#(
  parameter int X = 0,               // this router's column
  parameter int Y = 0                // this router's row
) (
  input  logic                     clk,
  input  logic                     mcast_mode,       // 1: table routing, 0: XY unicast
  input  flit_t                    in_flit [NPORTS],
  output port_mask_t               route   [NPORTS],
  // routing table initialisation
  input  logic                     tbl_we,
  input  logic [ADR_W-1:0]         tbl_addr,
  input  port_mask_t               tbl_mask
);
  port_mask_t table_q [2**ADR_W];

  always_ff @(posedge clk) begin
    if (tbl_we) table_q[tbl_addr] <= tbl_mask;
  end

  function automatic port_mask_t xy_route(logic [COORD_W-1:0] dx, logic [COORD_W-1:0] dy);
    port_mask_t m = '0;
    if      (dx > COORD_W'(X)) m[P_EAST]  = 1'b1;
    else if (dx < COORD_W'(X)) m[P_WEST]  = 1'b1;
    else if (dy > COORD_W'(Y)) m[P_SOUTH] = 1'b1;
    else if (dy < COORD_W'(Y)) m[P_NORTH] = 1'b1;
    else                       m[P_LOCAL] = 1'b1;
    return m;
  endfunction

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      if (mcast_mode) route[p] = table_q[in_flit[p].adr];
      else            route[p] = xy_route(in_flit[p].dx, in_flit[p].dy);
    end
  end
endmodule
