// input_buffer: the virtual-channel buffers of one router input port.
//
// NVC independent FIFOs of DEPTH entries share the port. An arriving flit is
// written into the FIFO named by its VC field, together with the output-port
// mask that route computation produced for it in the same cycle. Each FIFO
// presents its oldest entry (head) combinationally; 'pop' removes the head of
// the selected FIFOs on the clock edge. Credit-based flow control upstream
// guarantees that a full FIFO is never written; an assertion checks this.
//
// Timing: a flit written on edge k is visible at the head from edge k onward
// (one cycle after it was presented). Storing the route with the flit follows
// the design's "routing table is checked at the buffer write stage"; FIFO depth
// is this design's choice.
module input_buffer
  import noc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  flit_t             in_flit,
  input  port_mask_t        in_route,
  input  logic [NVC-1:0]    pop,
  output logic [NVC-1:0]    head_valid,
  output flit_t             head_flit  [NVC],
  output port_mask_t        head_route [NVC]
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t          mem_flit  [NVC][DEPTH];
  port_mask_t     mem_route [NVC][DEPTH];
  logic [AW-1:0]  rd_ptr [NVC];
  logic [AW-1:0]  wr_ptr [NVC];
  logic [AW:0]    count  [NVC];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    logic push;
    assign push = in_valid && (int'(in_flit.vc) == v);

    always_ff @(posedge clk) begin
      if (push) begin
        mem_flit[v][wr_ptr[v]]  <= in_flit;
        mem_route[v][wr_ptr[v]] <= in_route;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rd_ptr[v] <= '0;
        wr_ptr[v] <= '0;
        count[v]  <= '0;
      end else begin
        if (push)   wr_ptr[v] <= next_ptr(wr_ptr[v]);
        if (pop[v]) rd_ptr[v] <= next_ptr(rd_ptr[v]);
        count[v] <= count[v] + (AW+1)'(push) - (AW+1)'(pop[v]);
      end
    end

    assign head_valid[v] = (count[v] != '0);
    assign head_flit[v]  = mem_flit[v][rd_ptr[v]];
    assign head_route[v] = mem_route[v][rd_ptr[v]];

    // flow control must never overrun or underrun a VC buffer
    a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                      push |-> (int'(count[v]) < DEPTH) || pop[v]);
    a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                      pop[v] |-> head_valid[v]);
  end
endmodule
