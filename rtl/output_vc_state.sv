// output_vc_state: credit counters and busy flags of the virtual channels of
// one router output port.
//
// Credit-based flow control: for each downstream VC the counter holds the number
// of free flit slots in the downstream input buffer. It starts at DEPTH, is
// decremented when a flit leaves on that VC and incremented when the downstream
// router returns a credit for that VC. A VC whose counter is zero cannot be
// used by the switch allocator: the flit waits (credit stall).
// The busy flag marks an output VC held by a packet: it is set when the VC
// allocator hands the VC to a head flit and cleared when the packet's tail flit
// leaves on it (wormhole release after the tail).
//
// Interface: send/send_vc, the alloc mask and the free strobe act on the next edge;
// credit_ok and vc_free are combinational views of the registered state.
// A send and a credit for the same VC in one cycle leave the count unchanged.
module output_vc_state
  import noc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             send,        // a flit leaves on send_vc
  input  logic [VC_W-1:0]  send_vc,
  input  credit_t          credit_in,   // credit from the downstream router
  input  logic [NVC-1:0]   alloc,       // VCs the VC allocator hands out
  input  logic             free,        // tail flit leaves on free_vc
  input  logic [VC_W-1:0]  free_vc,
  output logic [NVC-1:0]   credit_ok,   // counter above zero
  output logic [NVC-1:0]   vc_free      // VC not held by a packet
);
  localparam int CW = $clog2(DEPTH + 1);

  logic [CW-1:0] credits [NVC];
  logic [NVC-1:0] busy;

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    logic dec, inc;
    assign dec = send && (int'(send_vc) == v);
    assign inc = credit_in.valid && (int'(credit_in.vc) == v);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        credits[v] <= CW'(DEPTH);
        busy[v]    <= 1'b0;
      end else begin
        credits[v] <= credits[v] + CW'(inc) - CW'(dec);
        if (alloc[v])                         busy[v] <= 1'b1;
        else if (free && int'(free_vc) == v)  busy[v] <= 1'b0;
      end
    end

    assign credit_ok[v] = (credits[v] != '0);
    assign vc_free[v]   = !busy[v];

    a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
                      !(dec && credits[v] == '0) && !(inc && !dec && int'(credits[v]) == DEPTH));
  end
endmodule
