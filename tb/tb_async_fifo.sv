// tb_async_fifo: writer and reader on unrelated clocks (7 and 10 time units),
// random write and read requests. Every word must come out once, in order;
// the FIFO must report full at some point and never lose a word.
module tb_async_fifo;
  localparam int W = 16, DEPTH = 8;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #7 wclk = ~wclk;
  always #10 rclk = ~rclk;
  logic we, re, full, empty;
  logic [W-1:0] wdata, rdata;
  int checks = 0, failures = 0, fulls = 0;
  int nw = 0, nr = 0;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge wclk) begin
    we    <= wrst_n && nw < 600 && ($urandom_range(3) != 0);
  end
  always @(posedge wclk) begin
    if (wrst_n && we && !full) nw <= nw + 1;
    if (full) fulls++;
  end
  assign wdata = W'(nw * 7 + 3);

  always @(negedge rclk) re <= rrst_n && ($urandom_range(2) != 0) && (nw > 300 || nr < 10 || $urandom_range(3) == 0);
  always @(posedge rclk) begin
    if (rrst_n && re && !empty) begin
      checks++;
      if (rdata != W'(nr * 7 + 3)) begin failures++; $display("FAIL word %0d: %h", nr, rdata); end
      nr <= nr + 1;
    end
  end

  initial begin
    we = 0; re = 0;
    #50; wrst_n = 1; rrst_n = 1;
    wait (nr == 600);
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
