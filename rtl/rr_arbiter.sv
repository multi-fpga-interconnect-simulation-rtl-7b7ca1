// rr_arbiter: round-robin arbiter, N requesters, one-hot grant.
//
// The requester just after the last winner has the highest priority. The grant
// is combinational from req and the priority pointer; the pointer moves past the
// winner on the clock edge where 'advance' is high (the caller raises it when the
// grant was used). Round-robin order is what the design specifies for both the
// channel and the switch allocators; the pointer-update rule is this design's.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;   // index with highest priority

  always_comb begin
    gnt = '0;
    for (int k = 0; k < N; k++) begin
      automatic int idx = (int'(ptr) + k) % N;
      if (gnt == '0 && req[idx]) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && gnt != '0) begin
      for (int k = 0; k < N; k++)
        if (gnt[k]) ptr <= IW'((k + 1) % N);
    end
  end
endmodule
