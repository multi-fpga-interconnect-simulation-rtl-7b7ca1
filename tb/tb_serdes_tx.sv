// tb_serdes_tx: two lanes at 14:1. Random words are offered; the serial
// stream of each lane is sampled bit by bit and rebuilt independently. Checks
// bit order (bit 0 first), the word boundary (a word is loaded on every 14th
// bit-clock edge after reset and its first bit is on q right after that edge)
// and that every word comes out intact.
module tb_serdes_tx;
  localparam int LANES = 2, RATIO = 14;
  logic clk_ser = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #1 clk_ser = ~clk_ser;
  logic [LANES-1:0][RATIO-1:0] din;
  logic [LANES-1:0] q;
  int checks = 0, failures = 0;

  serdes_tx #(.LANES(LANES), .RATIO(RATIO)) dut (.*);

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [LANES-1:0][RATIO-1:0] sent;
    logic [LANES-1:0][RATIO-1:0] got;
    din = '0;
    repeat (3) @(posedge clk_ser);
    @(negedge clk_ser); rst_n = 1;
    din = {LANES{RATIO'($urandom)}};
    // edges 1..13 after reset count, edge 14 loads
    repeat (RATIO) @(posedge clk_ser);
    for (int w = 0; w < 50; w++) begin
      sent = din;
      @(negedge clk_ser);
      for (int l = 0; l < LANES; l++) din[l] = RATIO'($urandom);   // next word
      for (int b = 0; b < RATIO; b++) begin
        if (b > 0) @(negedge clk_ser);
        for (int l = 0; l < LANES; l++) got[l][b] = q[l];
      end
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (got[l] != sent[l]) begin failures++; $display("FAIL word %0d lane %0d: %h vs %h", w, l, got[l], sent[l]); end
      end
      @(posedge clk_ser);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
