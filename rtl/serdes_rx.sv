// serdes_rx: multi-lane serial-to-parallel converter with bit slip (the
// function of the FPGA's input SERDES primitive, written in plain logic).
//
// Runs on the forwarded bit clock. Each lane shifts its serial input into a
// RATIO-bit register, first-received bit ending in bit 0. All lanes share one
// bit counter; when it wraps, the assembled words of all lanes are presented
// on 'word' together with a one-period strobe 'word_valid' (once every RATIO
// bit periods). A pulse on 'bitslip' (sampled with word_valid) stretches the
// next word by one bit period, which moves the word boundary of every lane by
// one bit; repeating it walks through all RATIO alignments.
//
// Timing: 'word' holds from one strobe to the next. Bit slip for word alignment
// and the serial-to-parallel function come from the design; the bit order and
// the stretch-by-one implementation of bit slip are this design's choices.
module serdes_rx #(
  parameter int LANES = 8,
  parameter int RATIO = 14
) (
  input  logic                         clk_ser,
  input  logic                         rst_n,
  input  logic [LANES-1:0]             d,
  input  logic                         bitslip,
  output logic [LANES-1:0][RATIO-1:0]  word,
  output logic                         word_valid
);
  localparam int CW = $clog2(RATIO + 1);

  logic [CW-1:0]                cnt;
  logic                         slip_pending;
  logic [LANES-1:0][RATIO-1:0]  sh;
  logic [LANES-1:0][RATIO-1:0]  sh_next;

  always_comb begin
    for (int l = 0; l < LANES; l++) sh_next[l] = {d[l], sh[l][RATIO-1:1]};
  end

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      sh           <= '0;
      word         <= '0;
      word_valid   <= 1'b0;
      slip_pending <= 1'b0;
    end else begin
      sh         <= sh_next;
      word_valid <= 1'b0;
      if (word_valid && bitslip) slip_pending <= 1'b1;
      if (int'(cnt) == RATIO - 1) begin
        if (slip_pending) begin
          // hold the counter for one bit: the boundary moves by one bit
          slip_pending <= 1'b0;
        end else begin
          cnt        <= '0;
          word       <= sh_next;
          word_valid <= 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
