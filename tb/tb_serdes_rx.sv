// tb_serdes_rx: lane 0 carries a fixed frame pattern, lane 1 a counting word,
// both serialised bit 0 first by the testbench with an odd bit offset. The
// testbench issues a bit slip after every mismatching frame word; it must find
// the pattern within RATIO slips, after which lane 1 must deliver consecutive
// counter values on every strobe, one strobe per RATIO bit clocks.
module tb_serdes_rx;
  localparam int LANES = 2, RATIO = 14;
  localparam logic [RATIO-1:0] PAT = 14'b00000001111111;
  logic clk_ser = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #1 clk_ser = ~clk_ser;
  logic [LANES-1:0] d;
  logic bitslip;
  logic [LANES-1:0][RATIO-1:0] word;
  logic word_valid;
  int checks = 0, failures = 0, slips = 0;

  serdes_rx #(.LANES(LANES), .RATIO(RATIO)) dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // serial source, offset by 5 bits from the receiver's reset phase
  int bitpos = 5;
  logic [RATIO-1:0] ctr = '0;
  always @(posedge clk_ser) begin
    d[0] <= PAT[bitpos];
    d[1] <= ctr[bitpos];
    if (bitpos == RATIO - 1) begin bitpos <= 0; ctr <= ctr + 1'b1; end
    else bitpos <= bitpos + 1;
  end

  logic locked = 0;
  int holdoff = 0, good = 0, last_strobe = -1, now = 0;
  logic [RATIO-1:0] prev;
  always @(posedge clk_ser) now <= now + 1;

  always @(negedge clk_ser) begin
    bitslip = 1'b0;
    if (rst_n && word_valid) begin
      if (holdoff > 0) holdoff--;
      else if (word[0] != PAT) begin
        bitslip = 1'b1; slips++; holdoff = 2;
        if (locked) begin failures++; $display("FAIL: lost alignment"); end
      end else begin
        if (locked) begin
          checks += 2;
          if (word[1] != prev + 1'b1) begin failures++; $display("FAIL: data %h after %h", word[1], prev); end
          if (now - last_strobe != RATIO) begin failures++; $display("FAIL: strobe spacing %0d", now - last_strobe); end
          good++;
        end
        locked = 1;
        prev = word[1];
      end
      last_strobe = now;
    end
  end

  initial begin
    bitslip = 0;
    repeat (3) @(posedge clk_ser);
    rst_n = 1;
    while (good < 40) @(posedge clk_ser);
    checks++;
    if (slips < 1 || slips > RATIO) begin failures++; $display("FAIL: %0d slips", slips); end
    $display("aligned after %0d bit slips", slips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
