// switch_allocator: separable input-first switch allocation with multicast.
//
// Stage 1, per input port: a round-robin arbiter picks one of the input VCs
// that request at least one output (at most one flit leaves an input port per
// cycle, so at most one buffer slot and one credit are freed per port).
// Stage 2, per output port: a round-robin arbiter picks one of the input ports
// whose selected VC requests this output. A multicast flit may win several
// outputs in the same cycle; outputs it loses are retried later.
//
// req[i][v] is the output mask requested by VC v of input i (only outputs that
// have an allocated VC with a credit). Outputs: in_vc_sel (chosen VC per input,
// one-hot), out_gnt (winning input per output, one-hot). Combinational; the
// arbiters advance on the edge where their grant is used. Round-robin
// arbitration is the design's; input-first separable allocation is this
// design's choice.
module switch_allocator
  import noc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  port_mask_t      req       [NPORTS][NVC],
  output logic [NVC-1:0]  in_vc_sel [NPORTS],
  output logic [NPORTS-1:0] out_gnt [NPORTS]
);
  port_mask_t sel_req [NPORTS];       // outputs requested by the selected VC
  logic [NPORTS-1:0] out_req [NPORTS];
  logic [NPORTS-1:0] won;             // input port won at least one output

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [NVC-1:0] vreq;
    for (genvar v = 0; v < NVC; v++) begin : g_v
      assign vreq[v] = |req[i][v];
    end
    rr_arbiter #(.N(NVC)) u_arb (
      .clk, .rst_n, .req(vreq), .advance(won[i]), .gnt(in_vc_sel[i])
    );
    always_comb begin
      sel_req[i] = '0;
      for (int v = 0; v < NVC; v++)
        if (in_vc_sel[i][v]) sel_req[i] = req[i][v];
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    for (genvar i = 0; i < NPORTS; i++) begin : g_i
      assign out_req[o][i] = sel_req[i][o];
    end
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n, .req(out_req[o]), .advance(1'b1), .gnt(out_gnt[o])
    );
  end

  always_comb begin
    won = '0;
    for (int o = 0; o < NPORTS; o++) won |= out_gnt[o];
  end
endmodule
