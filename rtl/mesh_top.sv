// mesh_top: a MESH_X x MESH_Y mesh of FPGAs, each holding one mesh_router,
// joined by source-synchronous SerDes links.
//
// Router (x,y) is node n = y*MESH_X + x. Its east port faces the west port of
// (x+1,y) and its south port faces the north port of (x,y+1). Every pair of
// neighbours is joined by two serdes_link instances, one per direction; each
// carries flits one way and the credits of the opposite direction piggy-backed
// on the same frames, so a link needs no separate credit wires. Ports on the
// mesh edge have no link: no flit arrives and no credit returns there.
//
// The local port of every router is brought out: inj/inj_credit is the
// injection channel of node n (send a flit only on a VC with a credit; DEPTH
// credits per VC after reset) and ej/ej_credit the ejection channel (the node
// returns one credit per flit it consumes). The routing tables of all routers
// are written through one shared address/mask bus with a write enable per
// router. mcast_mode selects table (multicast) or XY (unicast) routing for the
// whole mesh. links_up rises when every link has found its word alignment; no
// flit may be injected before.
//
// All FPGAs run from the same clk (local clock) and clk_ser (bit clock,
// RATIO x clk, phase-locked). The mesh of routers joined by bidirectional
// links, a router per FPGA, and the main evaluated size of 16 nodes with 4 VCs
// follow the design; sharing one clock source is this model's simplification
// (the receive path would also tolerate a separate source).
module mesh_top
  import noc_pkg::*;
#(
  parameter int MESH_X = 4,
  parameter int MESH_Y = 4,
  parameter int DEPTH  = 4,
  parameter int LANES  = 7,
  parameter int RATIO  = 14,
  localparam int NN    = MESH_X * MESH_Y
) (
  input  logic              clk,
  input  logic              clk_ser,
  input  logic              rst_n,
  input  logic              mcast_mode,
  input  logic [NN-1:0]     tbl_we,
  input  logic [ADR_W-1:0]  tbl_addr,
  input  port_mask_t        tbl_mask,
  input  flit_ch_t          inj        [NN],
  output credit_t           inj_credit [NN],
  output flit_ch_t          ej         [NN],
  input  credit_t           ej_credit  [NN],
  output logic              links_up
);
  flit_ch_t in_ch      [NN][NPORTS];
  credit_t  credit_out [NN][NPORTS];
  flit_ch_t out_ch     [NN][NPORTS];
  credit_t  credit_in  [NN][NPORTS];
  logic     lk         [NN][NPORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      mesh_router #(.X(x), .Y(y), .DEPTH(DEPTH)) u_router (
        .clk, .rst_n, .mcast_mode,
        .tbl_we     (tbl_we[N]),
        .tbl_addr, .tbl_mask,
        .in_ch      (in_ch[N]),
        .credit_out (credit_out[N]),
        .out_ch     (out_ch[N]),
        .credit_in  (credit_in[N])
      );

      // local port
      assign in_ch[N][P_LOCAL]     = inj[N];
      assign credit_in[N][P_LOCAL] = ej_credit[N];
      assign ej[N]                 = out_ch[N][P_LOCAL];
      assign inj_credit[N]         = credit_out[N][P_LOCAL];
      assign lk[N][P_LOCAL]        = 1'b1;

      // mesh ports: the link arriving at port p of this router
      for (genvar p = 1; p < NPORTS; p++) begin : g_p
        localparam int NX  = (p == P_EAST) ? x + 1 : (p == P_WEST) ? x - 1 : x;
        localparam int NY  = (p == P_SOUTH) ? y + 1 : (p == P_NORTH) ? y - 1 : y;
        localparam int OPP = (p == P_EAST) ? P_WEST : (p == P_WEST) ? P_EAST :
                             (p == P_NORTH) ? P_SOUTH : P_NORTH;
        if (NX >= 0 && NX < MESH_X && NY >= 0 && NY < MESH_Y) begin : g_link
          localparam int M = NY * MESH_X + NX;
          link_frame_t txf, rxf;
          assign txf.fch = out_ch[M][OPP];
          assign txf.cr  = credit_out[M][OPP];
          serdes_link #(.LANES(LANES), .RATIO(RATIO)) u_link (
            .rst_n,
            .tx_clk(clk), .tx_clk_ser(clk_ser), .tx_frame(txf),
            .rx_clk(clk), .rx_frame(rxf), .locked(lk[N][p])
          );
          assign in_ch[N][p]     = rxf.fch;
          assign credit_in[N][p] = rxf.cr;
        end else begin : g_edge
          assign in_ch[N][p]     = '0;
          assign credit_in[N][p] = '0;
          assign lk[N][p]        = 1'b1;
        end
      end
    end
  end

  always_comb begin
    links_up = 1'b1;
    for (int n = 0; n < NN; n++)
      for (int p = 0; p < NPORTS; p++)
        links_up &= lk[n][p];
  end
endmodule
