// mesh_router: 5-port virtual-channel wormhole router for a 2-D mesh of FPGAs.
//
// Ports: 0 local (the node's interface bridge), 1..4 north/east/south/west.
// Each port has an input side (flit channel in, credit channel out) and an
// output side (flit channel out, credit channel in). Flow control is credit
// based: a flit is only sent on an output VC whose downstream buffer has room.
//
// Pipeline (three cycles for a head flit from in_ch to out_ch, two for body
// and tail flits):
//   1. route compute + buffer write: the arriving flit is written into its
//      input VC buffer with the output mask from route_compute (XY in unicast
//      mode, routing-table lookup in multicast mode);
//   2. VC allocation: a head flit at the front of its buffer gets one output VC
//      on every output of its mask, all in the same cycle (round-robin order);
//   3. switch allocation + traversal: flits whose VCs are all allocated and whose
//      next output VC has a credit compete for the outputs (round-robin); the
//      winners cross the crossbar into the output registers.
// A multicast flit leaves its buffer, and a credit is returned upstream, only
// when every output of its mask has taken it; its output VCs are released one
// by one as the tail flit passes each output.
//
// Rule for users: multicast packets must be single flits (kind 2'b00), which is
// natural here because one flit holds a whole neuron message. A multi-flit
// multicast packet can hold an ejection VC with its head while another branch
// of the same packet waits, and such packets can block each other in a cycle.
// Unicast packets may have any length.
//
// The structure (route compute, VC buffers, VC and switch allocators, crossbar,
// credit back-pressure, table routing checked at buffer write, round-robin
// allocation, XY routing, three-cycle router latency) follows the design;
// buffer depth, the allocation details and the register placement are this
// design's choices.
module mesh_router
  import noc_pkg::*;
#(
  parameter int X     = 0,   // column of this router
  parameter int Y     = 0,   // row of this router
  parameter int DEPTH = 4    // flit slots per input VC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mcast_mode,
  input  logic              tbl_we,
  input  logic [ADR_W-1:0]  tbl_addr,
  input  port_mask_t        tbl_mask,
  input  flit_ch_t          in_ch      [NPORTS],
  output credit_t           credit_out [NPORTS],
  output flit_ch_t          out_ch     [NPORTS],
  input  credit_t           credit_in  [NPORTS]
);
  localparam int NREQ = NPORTS * NVC;

  // ---------------------------------------------------------------- stage 1
  flit_t      rc_flit  [NPORTS];
  port_mask_t rc_route [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_rcin
    assign rc_flit[p] = in_ch[p].flit;
  end

  route_compute #(.X(X), .Y(Y)) u_rc (
    .clk, .mcast_mode, .in_flit(rc_flit), .route(rc_route),
    .tbl_we, .tbl_addr, .tbl_mask
  );

  logic [NVC-1:0] head_valid [NPORTS];
  flit_t          head_flit  [NPORTS][NVC];
  port_mask_t     head_route [NPORTS][NVC];
  logic [NVC-1:0] pop        [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_ib
    input_buffer #(.DEPTH(DEPTH)) u_ib (
      .clk, .rst_n,
      .in_valid   (in_ch[p].valid),
      .in_flit    (in_ch[p].flit),
      .in_route   (rc_route[p]),
      .pop        (pop[p]),
      .head_valid (head_valid[p]),
      .head_flit  (head_flit[p]),
      .head_route (head_route[p])
    );
  end

  // ------------------------------------------------------ input VC state
  port_mask_t      route_r    [NPORTS][NVC];   // route of the packet in flight
  port_mask_t      alloc_done [NPORTS][NVC];   // outputs with an allocated VC
  port_mask_t      sent       [NPORTS][NVC];   // outputs the front flit already took
  logic [VC_W-1:0] outvc      [NPORTS][NVC][NPORTS];
  port_mask_t      eff_route  [NPORTS][NVC];
  logic            ready      [NPORTS][NVC];

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      for (int v = 0; v < NVC; v++) begin
        eff_route[i][v] = is_head(head_flit[i][v].ht) ? head_route[i][v] : route_r[i][v];
        ready[i][v]     = head_valid[i][v] &&
                          ((alloc_done[i][v] & eff_route[i][v]) == eff_route[i][v]);
      end
  end

  // ---------------------------------------------------------------- stage 2
  port_mask_t      va_req [NREQ];
  logic [NREQ-1:0] va_gnt;
  logic [VC_W-1:0] va_vc  [NREQ][NPORTS];
  logic [NVC-1:0]  va_alloc [NPORTS];
  logic [NVC-1:0]  credit_ok [NPORTS];
  logic [NVC-1:0]  vc_free   [NPORTS];

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      for (int v = 0; v < NVC; v++)
        va_req[i*NVC+v] = (head_valid[i][v] && is_head(head_flit[i][v].ht) &&
                           alloc_done[i][v] == '0) ? head_route[i][v] : '0;
  end

  vc_allocator u_va (
    .clk, .rst_n, .req(va_req), .vc_free(vc_free), .gnt(va_gnt), .gnt_vc(va_vc), .alloc(va_alloc)
  );

  // ---------------------------------------------------------------- stage 3
  port_mask_t     sa_req     [NPORTS][NVC];
  logic [NVC-1:0] in_vc_sel  [NPORTS];
  logic [NPORTS-1:0] out_gnt [NPORTS];

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      for (int v = 0; v < NVC; v++)
        for (int o = 0; o < NPORTS; o++)
          sa_req[i][v][o] = ready[i][v] && eff_route[i][v][o] && !sent[i][v][o] &&
                            credit_ok[o][outvc[i][v][o]];
  end

  switch_allocator u_sa (
    .clk, .rst_n, .req(sa_req), .in_vc_sel(in_vc_sel), .out_gnt(out_gnt)
  );

  // selected VC of each input, and what it won
  flit_t           sel_flit  [NPORTS];
  logic [VC_W-1:0] sel_vc    [NPORTS];
  port_mask_t      won_now   [NPORTS];
  logic [VC_W-1:0] xb_vc     [NPORTS];
  logic            send      [NPORTS];
  logic            tail_send [NPORTS];

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      sel_flit[i] = head_flit[i][0];
      sel_vc[i]   = '0;
      for (int v = 0; v < NVC; v++)
        if (in_vc_sel[i][v]) begin
          sel_flit[i] = head_flit[i][v];
          sel_vc[i]   = VC_W'(v);
        end
      for (int o = 0; o < NPORTS; o++) won_now[i][o] = out_gnt[o][i];
    end
    for (int o = 0; o < NPORTS; o++) begin
      xb_vc[o]     = '0;
      send[o]      = |out_gnt[o];
      tail_send[o] = 1'b0;
      for (int i = 0; i < NPORTS; i++)
        if (out_gnt[o][i]) begin
          xb_vc[o]     = outvc[i][sel_vc[i]][o];
          tail_send[o] = is_tail(sel_flit[i].ht);
        end
    end
  end

  flit_ch_t xb_out [NPORTS];

  crossbar u_xbar (.in_flit(sel_flit), .sel(out_gnt), .out_vc(xb_vc), .out(xb_out));

  for (genvar o = 0; o < NPORTS; o++) begin : g_ovc
    output_vc_state #(.DEPTH(DEPTH)) u_ovc (
      .clk, .rst_n,
      .send      (send[o]),
      .send_vc   (xb_vc[o]),
      .credit_in (credit_in[o]),
      .alloc     (va_alloc[o]),
      .free      (send[o] && tail_send[o]),
      .free_vc   (xb_vc[o]),
      .credit_ok (credit_ok[o]),
      .vc_free   (vc_free[o])
    );
  end

  // pop when the front flit has been taken by every output of its route
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      pop[i] = '0;
      for (int v = 0; v < NVC; v++)
        if (in_vc_sel[i][v] && won_now[i] != '0 &&
            (((sent[i][v] | won_now[i]) & eff_route[i][v]) == eff_route[i][v]))
          pop[i][v] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        for (int v = 0; v < NVC; v++) begin
          route_r[i][v]    <= '0;
          alloc_done[i][v] <= '0;
          sent[i][v]       <= '0;
          for (int o = 0; o < NPORTS; o++) outvc[i][v][o] <= '0;
        end
        out_ch[i]     <= '0;
        credit_out[i] <= '0;
      end
    end else begin
      // VC allocation results
      for (int i = 0; i < NPORTS; i++)
        for (int v = 0; v < NVC; v++)
          if (va_gnt[i*NVC+v]) begin
            alloc_done[i][v] <= head_route[i][v];
            for (int o = 0; o < NPORTS; o++) outvc[i][v][o] <= va_vc[i*NVC+v][o];
          end
      // switch allocation results
      for (int i = 0; i < NPORTS; i++) begin
        credit_out[i] <= '0;
        for (int v = 0; v < NVC; v++) begin
          if (pop[i][v]) begin
            sent[i][v]          <= '0;
            credit_out[i].valid <= 1'b1;
            credit_out[i].vc    <= VC_W'(v);
            if (is_head(head_flit[i][v].ht)) route_r[i][v] <= head_route[i][v];
            if (is_tail(head_flit[i][v].ht)) alloc_done[i][v] <= '0;
          end else if (in_vc_sel[i][v]) begin
            sent[i][v] <= sent[i][v] | won_now[i];
          end
        end
      end
      for (int o = 0; o < NPORTS; o++) out_ch[o] <= xb_out[o];
    end
  end

  // ------------------------------------------------- observed events
  // (read by the testbenches to show that each mechanism was exercised)
  logic ev_va_conflict, ev_sa_conflict, ev_credit_stall, ev_mcast_fork;
  always_comb begin
    automatic int nva = 0;
    ev_sa_conflict  = 1'b0;
    ev_credit_stall = 1'b0;
    ev_mcast_fork   = 1'b0;
    // a head flit left waiting for an output VC
    for (int r = 0; r < NREQ; r++)
      if (va_req[r] != '0 && !va_gnt[r]) nva++;
    ev_va_conflict = (nva > 0);
    for (int i = 0; i < NPORTS; i++) begin
      automatic int nw = 0;
      for (int o = 0; o < NPORTS; o++) if (won_now[i][o]) nw++;
      if (nw > 1) ev_mcast_fork = 1'b1;
      for (int v = 0; v < NVC; v++)
        for (int o = 0; o < NPORTS; o++)
          if (ready[i][v] && eff_route[i][v][o] && !sent[i][v][o] &&
              !credit_ok[o][outvc[i][v][o]])
            ev_credit_stall = 1'b1;
    end
    // several inputs competing for one output in switch allocation
    for (int o = 0; o < NPORTS; o++) begin
      automatic int n = 0;
      for (int i = 0; i < NPORTS; i++)
        for (int v = 0; v < NVC; v++)
          if (in_vc_sel[i][v] && sa_req[i][v][o]) n++;
      if (n > 1) ev_sa_conflict = 1'b1;
    end
  end
endmodule
