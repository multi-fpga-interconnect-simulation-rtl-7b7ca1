// vc_allocator: output virtual-channel allocation for head flits.
//
// Requesters are the NPORTS*NVC input VCs (index = port*NVC + vc). A head flit
// at the front of its buffer requests the set of outputs of its route (one
// output for unicast, several for a multicast tree). Requests are visited in
// round-robin order, starting after the last requester served. A requester is
// granted only if every output it asks for still has a free output VC in this
// cycle; it then receives one VC on each of those outputs at once (the lowest-
// numbered free one), and these VCs are no longer free for requesters visited
// later in the same cycle. A requester that cannot get all its outputs gets
// none and retries. All-or-nothing allocation keeps a multicast head from
// holding a VC on one output while it waits for another, which would let two
// multicast packets block each other inside the router.
//
// Timing: combinational; the caller registers the grants. The pointer moves
// past the first granted requester on the clock edge. Round-robin allocation
// and head-only allocation (body and tail flits keep the head's VCs) are the
// design's; the all-or-nothing rule and the greedy sequence are this design's.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int NREQ = NPORTS * NVC
) (
  input  logic             clk,
  input  logic             rst_n,
  input  port_mask_t       req     [NREQ],     // outputs requested by each input VC
  input  logic [NVC-1:0]   vc_free [NPORTS],   // free output VCs per output
  output logic [NREQ-1:0]  gnt,                // requester served this cycle
  output logic [VC_W-1:0]  gnt_vc  [NREQ][NPORTS],
  output logic [NVC-1:0]   alloc   [NPORTS]    // output VCs handed out this cycle
);
  localparam int IW = $clog2(NREQ);

  logic [IW-1:0] ptr;
  logic [IW-1:0] first_idx;
  logic          any_gnt;

  always_comb begin
    logic [NVC-1:0] avail [NPORTS];
    logic           fits;
    gnt       = '0;
    any_gnt   = 1'b0;
    first_idx = ptr;
    for (int o = 0; o < NPORTS; o++) begin
      avail[o] = vc_free[o];
      alloc[o] = '0;
    end
    for (int r = 0; r < NREQ; r++)
      for (int o = 0; o < NPORTS; o++) gnt_vc[r][o] = '0;

    for (int k = 0; k < NREQ; k++) begin
      automatic int r = (int'(ptr) + k) % NREQ;
      fits = (req[r] != '0);
      for (int o = 0; o < NPORTS; o++)
        if (req[r][o] && avail[o] == '0) fits = 1'b0;
      if (fits) begin
        gnt[r] = 1'b1;
        if (!any_gnt) first_idx = IW'(r);
        any_gnt = 1'b1;
        for (int o = 0; o < NPORTS; o++) begin
          if (req[r][o]) begin
            automatic logic done = 1'b0;
            for (int v = 0; v < NVC; v++) begin
              if (!done && avail[o][v]) begin
                done         = 1'b1;
                avail[o][v]  = 1'b0;
                alloc[o][v]  = 1'b1;
                gnt_vc[r][o] = VC_W'(v);
              end
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ptr <= '0;
    else if (any_gnt) ptr <= IW'((int'(first_idx) + 1) % NREQ);
  end
endmodule
