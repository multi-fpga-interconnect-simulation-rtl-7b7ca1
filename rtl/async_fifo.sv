// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// Carries deserialised link words from the receiver's forwarded-clock domain
// (write side) into the local clock domain (read side), whose clock comes from
// another source. Each pointer is kept in binary and in Gray code; the Gray
// pointer crosses to the other domain through two flip-flops. 'full' and
// 'empty' are therefore conservative: a write or read is seen by the other side
// two or three of its clock periods later.
//
// Interface: write wdata when we && !full (rising wclk); rdata shows the oldest
// word whenever !empty and advances when re && !empty (rising rclk). The FIFO
// isolating the two clock domains is the design's; the depth and the Gray-code
// scheme are this design's choices.
module async_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 8     // power of two
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          re,
  output logic [W-1:0]  rdata,
  output logic          empty
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s1, wgray_s2;   // write pointer in the read domain
  logic [AW:0] rgray_s1, rgray_s2;   // read pointer in the write domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(we && !full);

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
    end
  end

  assign full = (wgray == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});

  // read domain
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(re && !empty);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
    end
  end

  assign empty = (rgray == wgray_s2);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
