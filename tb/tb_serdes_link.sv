// tb_serdes_link: one link at its default size (7 data lanes, 14:1, frame
// lane, forwarded clock). After reset the receiver must align (at least one bit
// slip, lock within 100 local cycles). Then a random frame is sent every local
// cycle; every frame must arrive intact, in order, with a fixed latency of
// TL = 6 local cycles from tx_frame to rx_frame.
module tb_serdes_link;
  import noc_pkg::*;
  localparam int RATIO = 14, TL = 6;
  logic clk = 0, clk_ser = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #1 clk_ser = ~clk_ser;
  always #(RATIO) clk = ~clk;
  link_frame_t tx_frame, rx_frame;
  logic locked;
  int checks = 0, failures = 0, slips = 0, cyc = 0;
  link_frame_t hist [int];

  serdes_link dut (.rst_n, .tx_clk(clk), .tx_clk_ser(clk_ser), .tx_frame,
                   .rx_clk(clk), .rx_frame, .locked);

  always @(posedge clk_ser) if (dut.bitslip) slips++;

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lock_at = 0;
    tx_frame = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!locked && lock_at < 100) begin @(posedge clk); lock_at++; end
    checks++;
    if (!locked) begin failures++; $display("FAIL: no lock"); end
    repeat (5) @(posedge clk);
    for (cyc = 0; cyc < 400 + TL; cyc++) begin
      @(negedge clk);
      if (cyc >= TL) begin
        checks++;
        if (rx_frame != hist[cyc - TL]) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d", cyc - TL);
        end
      end
      tx_frame = link_frame_t'({$urandom, $urandom, $urandom});
      hist[cyc] = tx_frame;
    end
    checks++;
    if (slips == 0) begin failures++; $display("FAIL: no bit slip"); end
    $display("locked after %0d cycles, %0d bit slips", lock_at, slips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
