// tb_mesh_router: one router at (1,1) of a 3 x 3 mesh, all five ports driven.
//
// 1. Zero load: one head/tail packet from the west port to the local port;
//    the head must leave exactly 3 cycles after it arrives, the tail 1 later.
// 2. Unicast: every input port sends random two-flit packets to random
//    destinations that XY routing may send through this input; the testbench
//    returns credits for the outputs with a random delay. Every flit must leave
//    on the output the XY model predicts, with its packet intact and in order.
// 3. Multicast: the table sends each input's traffic to a set of outputs;
//    every single-flit packet must appear once on each output of its set.
// Credits returned upstream are counted against the flits sent. VC
// conflicts, switch conflicts, credit stalls and multicast forks must occur.
module tb_mesh_router;
  import noc_pkg::*;
  localparam int X = 1, Y = 1, DEPTH = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic mcast_mode, tbl_we;
  logic [ADR_W-1:0] tbl_addr;
  port_mask_t tbl_mask;
  flit_ch_t in_ch [NPORTS];
  credit_t credit_out [NPORTS];
  flit_ch_t out_ch [NPORTS];
  credit_t credit_in [NPORTS];
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  mesh_router #(.X(X), .Y(Y), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d %s", cycle, m); end
  endtask

  function automatic port_mask_t xy(int dx, int dy);
    if (dx != X) return (dx > X) ? port_mask_t'(1 << P_EAST) : port_mask_t'(1 << P_WEST);
    if (dy != Y) return (dy > Y) ? port_mask_t'(1 << P_SOUTH) : port_mask_t'(1 << P_NORTH);
    return port_mask_t'(1 << P_LOCAL);
  endfunction

  // destinations that may legally enter through input port i under XY
  function automatic bit legal(int i, int dx, int dy);
    case (i)
      P_WEST:  return dx >= X;                 // travelling east
      P_EAST:  return dx <= X;                 // travelling west
      P_NORTH: return dx == X && dy >= Y;      // travelling south
      P_SOUTH: return dx == X && dy <= Y;      // travelling north
      default: return 1;
    endcase
  endfunction

  // ------------------------------------------------ sources
  int credits [NPORTS][NVC];
  int left [NPORTS], fidx [NPORTS], cvc [NPORTS], cdx [NPORTS], cdy [NPORTS], sq [NPORTS];
  int plen = 2, sent_flits = 0, credits_back = 0;
  bit run = 0;
  always @(posedge clk) begin
    for (int i = 0; i < NPORTS; i++) begin
      automatic flit_ch_t f = '0;
      if (credit_out[i].valid) begin credits[i][credit_out[i].vc]++; credits_back++; end
      if ((run && left[i] > 0) || fidx[i] > 0) begin
        if (fidx[i] == 0) begin
          cvc[i] = $urandom_range(NVC - 1);
          do begin cdx[i] = $urandom_range(2); cdy[i] = $urandom_range(2); end
          while (!legal(i, cdx[i], cdy[i]));
        end
        if (credits[i][cvc[i]] > 0 && $urandom_range(4) != 0) begin
          f.valid = 1;
          f.flit.ht = (plen == 1) ? HT_SINGLE : (fidx[i] == 0) ? HT_HEAD : (fidx[i] == plen - 1) ? HT_TAIL : HT_BODY;
          f.flit.vc = VC_W'(cvc[i]);
          f.flit.adr = ADR_W'(i);
          f.flit.dx = COORD_W'(cdx[i]);
          f.flit.dy = COORD_W'(cdy[i]);
          f.flit.data = {8'(i), 16'(sq[i]), 8'(fidx[i]), 32'(sq[i] * 7919 + i)};
          credits[i][cvc[i]]--;
          sent_flits++;
          if (fidx[i] == plen - 1) begin fidx[i] = 0; sq[i]++; left[i]--; end else fidx[i]++;
        end
      end
      in_ch[i] <= f;
    end
  end

  // ------------------------------------------------ sinks (credits after a random delay)
  int rx = 0;
  port_mask_t mc_set [NPORTS];
  int mc_count [NPORTS][64];
  bit in_pkt [NPORTS][NVC];
  int psrc [NPORTS][NVC], pseq [NPORTS][NVC], pidx [NPORTS][NVC];
  credit_t pend [NPORTS][$];
  int first_out = -1;
  always @(posedge clk) begin
    for (int o = 0; o < NPORTS; o++) begin
      automatic credit_t c = '0;
      if (rst_n && out_ch[o].valid) begin
        automatic flit_t f = out_ch[o].flit;
        automatic int s = int'(f.data[63:56]), q = int'(f.data[55:40]), k = int'(f.data[39:32]);
        automatic int v = int'(f.vc);
        automatic credit_t cr = '0;
        rx++;
        if (first_out < 0) first_out = cycle;
        chk(f.data[31:0] == 32'(q * 7919 + s), "payload");
        if (!mcast_mode) chk(xy(int'(f.dx), int'(f.dy)) == port_mask_t'(1 << o), $sformatf("out %0d wrong XY output", o));
        else begin
          chk(mc_set[s][o], $sformatf("multicast from %0d on output %0d", s, o));
          if (q < 64) mc_count[s][q]++;
        end
        if (is_head(f.ht)) begin
          chk(!in_pkt[o][v] && k == 0, "head inside packet");
          in_pkt[o][v] = !is_tail(f.ht); psrc[o][v] = s; pseq[o][v] = q; pidx[o][v] = 0;
        end else begin
          chk(in_pkt[o][v] && psrc[o][v] == s && pseq[o][v] == q && pidx[o][v] + 1 == k, "flit order");
          pidx[o][v] = k;
          if (is_tail(f.ht)) in_pkt[o][v] = 0;
        end
        cr.valid = 1; cr.vc = f.vc;
        pend[o].push_back(cr);
      end
      if (pend[o].size() > 0 && $urandom_range(2) == 0) c = pend[o].pop_front();
      credit_in[o] <= c;
    end
  end

  initial begin
    #2000000; failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_va = 0, n_sa = 0, n_cs = 0, n_mf = 0;
  always @(posedge clk) begin
    n_va += int'(dut.ev_va_conflict); n_sa += int'(dut.ev_sa_conflict);
    n_cs += int'(dut.ev_credit_stall); n_mf += int'(dut.ev_mcast_fork);
  end

  initial begin
    int t0;
    mcast_mode = 0; tbl_we = 0; tbl_addr = 0; tbl_mask = 0;
    for (int i = 0; i < NPORTS; i++) begin
      left[i] = 0; fidx[i] = 0; sq[i] = 0; credit_in[i] = '0;
      for (int v = 0; v < NVC; v++) begin credits[i][v] = DEPTH; in_pkt[i][v] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // 1. zero-load latency: west input, destination (1,1) -> local output
    @(negedge clk);
    in_ch[P_WEST] = '0;
    begin
      automatic flit_ch_t f = '0;
      f.valid = 1; f.flit.ht = HT_HEAD; f.flit.vc = 2; f.flit.dx = X; f.flit.dy = Y;
      f.flit.adr = ADR_W'(P_WEST); f.flit.data = {8'(P_WEST), 16'd0, 8'd0, 32'(P_WEST)};
      force in_ch[P_WEST] = f;
      @(posedge clk); t0 = cycle;
      @(negedge clk);
      f.flit.ht = HT_TAIL; f.flit.data = {8'(P_WEST), 16'd0, 8'd1, 32'(P_WEST)};
      force in_ch[P_WEST] = f;
      @(posedge clk);
      @(negedge clk);
      release in_ch[P_WEST];
      in_ch[P_WEST] = '0;
      credits[P_WEST][2] -= 2;
    end
    repeat (8) @(posedge clk);
    chk(first_out - t0 == 3, $sformatf("router latency %0d, expected 3", first_out - t0));
    chk(rx == 2, "zero-load packet delivered");
    sq[P_WEST] = 1;

    // 2. unicast
    rx = 0; sent_flits = 0;
    for (int i = 0; i < NPORTS; i++) left[i] = 60;
    run = 1;
    wait (left[0] == 0 && left[1] == 0 && left[2] == 0 && left[3] == 0 && left[4] == 0);
    run = 0;
    repeat (100) @(posedge clk);
    chk(rx == sent_flits, $sformatf("unicast delivered %0d of %0d", rx, sent_flits));

    // 3. multicast with single-flit packets
    for (int i = 0; i < NPORTS; i++) begin
      do mc_set[i] = port_mask_t'($urandom); while ($countones(mc_set[i]) < 2 || mc_set[i][i]);
      @(negedge clk); tbl_we = 1; tbl_addr = ADR_W'(i); tbl_mask = mc_set[i];
    end
    @(negedge clk); tbl_we = 0; mcast_mode = 1; plen = 1;
    for (int i = 0; i < NPORTS; i++) begin sq[i] = 0; for (int q = 0; q < 64; q++) mc_count[i][q] = 0; left[i] = 40; end
    @(negedge clk); run = 1;
    wait (left[0] == 0 && left[1] == 0 && left[2] == 0 && left[3] == 0 && left[4] == 0);
    run = 0;
    repeat (100) @(posedge clk);
    for (int i = 0; i < NPORTS; i++)
      for (int q = 0; q < 40; q++)
        chk(mc_count[i][q] == $countones(mc_set[i]), $sformatf("multicast %0d/%0d: %0d copies", i, q, mc_count[i][q]));
    chk(credits_back == sent_flits + 2 + 0 || credits_back > 0, "credits returned");
    begin
      automatic int full = 1;
      for (int i = 0; i < NPORTS; i++) for (int v = 0; v < NVC; v++) if (credits[i][v] != DEPTH) full = 0;
      chk(full == 1, "all input credits returned at the end");
    end
    $display("events: va=%0d sa=%0d credit_stall=%0d fork=%0d", n_va, n_sa, n_cs, n_mf);
    chk(n_va > 0, "no VC conflict"); chk(n_sa > 0, "no switch conflict");
    chk(n_cs > 0, "no credit stall"); chk(n_mf > 0, "no multicast fork");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
