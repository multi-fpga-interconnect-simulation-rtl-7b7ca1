// serdes_link: one direction of the source-synchronous link between two FPGAs.
//
// Every local clock cycle the sending router hands over one link frame: a
// flit (with its valid bit) and a piggy-backed credit for the opposite
// direction. The frame is registered, cut into LANES words of RATIO bits and
// serialised on LANES data lanes by serdes_tx. Two more wires go along: the
// bit clock itself (forwarded clock) and a frame lane that repeats a fixed
// RATIO-bit pattern, which marks word boundaries.
//
// At the receiver, serdes_rx deserialises all lanes on the forwarded clock.
// The aligner compares the frame-lane word with the pattern and issues a bit
// slip after every mismatch (then ignores two words while the slip takes
// effect) until the pattern is found; from then on the link is locked and the
// data words are written into an async_fifo, which hands them to the receiving
// router's local clock. The receiver reads one frame per local cycle whenever
// the FIFO is not empty and registers it on rx_frame; an empty FIFO yields an
// idle frame. 'locked' (local clock domain) tells that frames are passing;
// nothing may be sent before it is high.
//
// Timing: one frame per local clock cycle, a fixed latency of a few local
// cycles after lock (see the testbench), clk_ser = RATIO x local clock,
// phase-locked to the sender's local clock. Source-synchronous clock forwarding,
// a frame signal, bit-slip alignment, the clock-crossing FIFO and several data
// lanes per channel follow the design; the lane count (7, the smallest that
// fits the 90-bit frame at 14:1), the frame pattern and the aligner rules are
// this design's choices.
module serdes_link
  import noc_pkg::*;
#(
  parameter int LANES = 7,
  parameter int RATIO = 14,
  parameter logic [RATIO-1:0] FRAME_PAT = {{(RATIO/2){1'b0}}, {(RATIO-RATIO/2){1'b1}}}
) (
  input  logic         rst_n,
  // sending FPGA
  input  logic         tx_clk,       // local clock of the sender
  input  logic         tx_clk_ser,   // bit clock of the sender
  input  link_frame_t  tx_frame,
  // receiving FPGA
  input  logic         rx_clk,       // local clock of the receiver
  output link_frame_t  rx_frame,
  output logic         locked
);
  localparam int PAYLOAD = LANES * RATIO;

  initial begin
    assert (PAYLOAD >= FRAME_W)
      else $fatal(1, "serdes_link: %0d lanes x %0d bits cannot carry a %0d-bit frame",
                  LANES, RATIO, FRAME_W);
  end

  // ------------------------------------------------------------ sender side
  logic [PAYLOAD-1:0]               tx_word;
  logic [LANES:0][RATIO-1:0]        tx_din;
  logic [LANES:0]                   wire_q;       // the lanes on the board
  logic                             wire_clk;     // forwarded clock

  always_ff @(posedge tx_clk or negedge rst_n) begin
    if (!rst_n) tx_word <= '0;
    else        tx_word <= PAYLOAD'(tx_frame);
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) tx_din[l] = tx_word[l*RATIO +: RATIO];
    tx_din[LANES] = FRAME_PAT;
  end

  serdes_tx #(.LANES(LANES + 1), .RATIO(RATIO)) u_tx (
    .clk_ser(tx_clk_ser), .rst_n, .din(tx_din), .q(wire_q)
  );

  assign wire_clk = tx_clk_ser;

  // ---------------------------------------------------------- receiver side
  logic [LANES:0][RATIO-1:0] rx_word;
  logic                      rx_word_valid;
  logic                      bitslip;
  logic                      lock_ser;
  logic [1:0]                holdoff;

  serdes_rx #(.LANES(LANES + 1), .RATIO(RATIO)) u_rx (
    .clk_ser(wire_clk), .rst_n, .d(wire_q), .bitslip(bitslip),
    .word(rx_word), .word_valid(rx_word_valid)
  );

  // word aligner, forwarded-clock domain
  always_ff @(posedge wire_clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_ser <= 1'b0;
      holdoff  <= '0;
    end else if (rx_word_valid) begin
      if (holdoff != '0) begin
        holdoff <= holdoff - 1'b1;
      end else if (rx_word[LANES] == FRAME_PAT) begin
        lock_ser <= 1'b1;
      end else begin
        lock_ser <= 1'b0;
        holdoff  <= 2'd2;
      end
    end
  end

  assign bitslip = rx_word_valid && holdoff == '0 && rx_word[LANES] != FRAME_PAT;

  logic [PAYLOAD-1:0] rx_payload;
  logic [PAYLOAD-1:0] fifo_rdata;
  logic               fifo_empty;
  logic               fifo_full;

  always_comb begin
    for (int l = 0; l < LANES; l++) rx_payload[l*RATIO +: RATIO] = rx_word[l];
  end

  async_fifo #(.W(PAYLOAD), .DEPTH(8)) u_fifo (
    .wclk(wire_clk), .wrst_n(rst_n),
    .we(rx_word_valid && lock_ser && holdoff == '0 && rx_word[LANES] == FRAME_PAT),
    .wdata(rx_payload), .full(fifo_full),
    .rclk(rx_clk), .rrst_n(rst_n),
    .re(1'b1), .rdata(fifo_rdata), .empty(fifo_empty)
  );

  logic [1:0] lock_sync;

  always_ff @(posedge rx_clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_frame  <= '0;
      lock_sync <= '0;
    end else begin
      rx_frame  <= fifo_empty ? '0 : link_frame_t'(fifo_rdata[FRAME_W-1:0]);
      lock_sync <= {lock_sync[0], lock_ser};
    end
  end

  assign locked = lock_sync[1];

  // the reader keeps pace with the writer, so the FIFO never fills
  a_no_full: assert property (@(posedge wire_clk) disable iff (!rst_n) !fifo_full);
endmodule
