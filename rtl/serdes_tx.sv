// serdes_tx: multi-lane parallel-to-serial converter (the function of the
// FPGA's output SERDES primitive, written in plain logic).
//
// Each lane turns a RATIO-bit parallel word into a serial stream, bit 0 first,
// on the fast bit clock clk_ser. All lanes share one bit counter: on the bit
// period where the counter wraps, every lane loads its next word from 'din',
// and during the remaining RATIO-1 periods it shifts. 'din' belongs to the
// slow local clock, whose period is exactly RATIO bit periods and which is
// derived from the same source as clk_ser; it is only sampled once per word,
// so it may change at any point of the word.
//
// Timing: the first bit of a word appears on q one bit period after the load,
// and a word is on the wire for RATIO bit periods. The parallel-to-serial
// function and the ratio (14:1 is one of the widths the output SERDES offers
// when two are cascaded) come from the design; the bit order and single-data-
// rate clocking are this design's choices.
module serdes_tx #(
  parameter int LANES = 8,
  parameter int RATIO = 14
) (
  input  logic                         clk_ser,
  input  logic                         rst_n,
  input  logic [LANES-1:0][RATIO-1:0]  din,
  output logic [LANES-1:0]             q
);
  localparam int CW = $clog2(RATIO);

  logic [CW-1:0]                cnt;
  logic [LANES-1:0][RATIO-1:0]  sh;

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      sh  <= '0;
    end else begin
      if (int'(cnt) == RATIO - 1) begin
        cnt <= '0;
        sh  <= din;
      end else begin
        cnt <= cnt + 1'b1;
        for (int l = 0; l < LANES; l++) sh[l] <= sh[l] >> 1;
      end
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) q[l] = sh[l][0];
  end
endmodule
