// crossbar: NPORTS x NPORTS flit switch.
//
// Each output takes the flit of the input named by its one-hot select and
// replaces the flit's VC field with the output VC the packet holds on that
// link; an output with no select carries no flit. One input may drive several
// outputs in the same cycle (multicast fan-out). Purely combinational; the
// router registers the outputs. The crossbar controlled by the allocation
// decision is the design's; rewriting the VC field here is this design's choice.
module crossbar
  import noc_pkg::*;
(
  input  flit_t              in_flit [NPORTS],
  input  logic [NPORTS-1:0]  sel     [NPORTS],   // per output: one-hot input
  input  logic [VC_W-1:0]    out_vc  [NPORTS],   // per output: VC on the next link
  output flit_ch_t           out     [NPORTS]
);
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out[o] = '0;
      for (int i = 0; i < NPORTS; i++) begin
        if (sel[o][i]) begin
          out[o].valid   = 1'b1;
          out[o].flit    = in_flit[i];
          out[o].flit.vc = out_vc[o];
        end
      end
    end
  end
endmodule
