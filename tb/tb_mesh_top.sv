// tb_mesh_top: end-to-end test of the mesh of routers and SerDes links, at the
// default size (4 x 4 mesh, 4 VCs, 7 lanes at 14:1).
//
// 1. Reset, then wait until every link has aligned its words (bit slips).
// 2. Zero-load latency: one single-flit packet from node 0 to the far corner;
//    the latency must equal hops x (router latency + link latency) + router.
// 3. Unicast phase (XY routing): every node sends NPKT_U two-flit packets to
//    uniformly random destinations, injecting whenever it has a credit.
// 4. Mode switch to multicast: the routing tables are filled with the union of
//    the XY paths from every source to all other nodes (fully connected
//    traffic), and every node sends NPKT_M single-flit multicast packets
//    (multicast packets are one flit long, see mesh_router).
// Every ejected flit is checked: destination, payload checksum, order inside
// its packet, and the number of copies of every packet. The test also counts
// how often VC-allocation conflicts, switch conflicts, credit stalls,
// multicast forks, bit slips and the mode switch happened; one that never
// happened is a failure.
module tb_mesh_top;
  import noc_pkg::*;

  localparam int MX = 4, MY = 4, NN = MX * MY;
  localparam int DEPTH = 4;          // default input-buffer depth of mesh_top
  localparam int RATIO = 14;         // default serialisation ratio of mesh_top
  localparam int NPKT_U = 40, NPKT_M = 40, PLEN_U = 2, PLEN_M = 1;
  localparam int TR = 3;             // router latency (head flit)
  localparam int TL = 6;             // serdes_link latency, see tb_serdes_link

  logic clk = 1'b0, clk_ser = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #1 clk_ser = ~clk_ser;
  always #(RATIO) clk = ~clk;

  logic              mcast_mode;
  logic [NN-1:0]     tbl_we;
  logic [ADR_W-1:0]  tbl_addr;
  port_mask_t        tbl_mask;
  flit_ch_t          inj        [NN];
  credit_t           inj_credit [NN];
  flit_ch_t          ej         [NN];
  credit_t           ej_credit  [NN];
  logic              links_up;

  mesh_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  function automatic logic [31:0] csum(int s, int q, int i);
    return 32'(s * 32'h9e3779b1) ^ 32'(q * 32'h85ebca6b) ^ 32'(i * 32'h27d4eb2f) ^ 32'h5a5a1234;
  endfunction

  // ----------------------------------------------------------- sources
  int  credits [NN][NVC];
  int  pkts_left [NN];
  int  flit_idx [NN];
  int  cur_vc [NN], cur_dst [NN], seq [NN];
  bit  run, mode_m;
  int  plen = PLEN_U;
  int  force_dst = -1;
  longint first_arrive;

  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      automatic flit_ch_t f = '0;
      if (inj_credit[n].valid) credits[n][inj_credit[n].vc]++;
      if ((run && pkts_left[n] > 0) || flit_idx[n] > 0) begin
        if (flit_idx[n] == 0) begin
          // pick the VC with most credits for a new packet
          cur_vc[n] = 0;
          for (int v = 1; v < NVC; v++) if (credits[n][v] > credits[n][cur_vc[n]]) cur_vc[n] = v;
          cur_dst[n] = (force_dst >= 0) ? force_dst : $urandom_range(NN - 1);
        end
        if (credits[n][cur_vc[n]] > 0) begin
          f.valid     = 1'b1;
          f.flit.ht   = (plen == 1) ? HT_SINGLE : (flit_idx[n] == 0) ? HT_HEAD :
                        (flit_idx[n] == plen - 1) ? HT_TAIL : HT_BODY;
          f.flit.vc   = VC_W'(cur_vc[n]);
          f.flit.typ  = 2'(seq[n]);
          f.flit.adr  = ADR_W'(n);
          f.flit.dx   = COORD_W'(cur_dst[n] % MX);
          f.flit.dy   = COORD_W'(cur_dst[n] / MX);
          f.flit.data = {8'(n), 16'(seq[n]), 8'(flit_idx[n]), csum(n, seq[n], flit_idx[n])};
          credits[n][cur_vc[n]]--;
          if (flit_idx[n] == plen - 1) begin
            flit_idx[n] = 0;
            seq[n]++;
            pkts_left[n]--;
          end else flit_idx[n]++;
        end
      end
      inj[n] <= f;
    end
  end

  // ----------------------------------------------------------- sinks
  int  recv_cnt [NN][64];             // copies x flits received per (src, seq)
  bit  dest_ok  [NN][NN];             // src may reach dst in this phase
  int  rx_total;
  int  exp_dst_of [NN][64];           // unicast destination per (src,seq), -1 unknown
  bit  in_pkt [NN][NVC];
  int  pkt_src [NN][NVC], pkt_seq [NN][NVC], pkt_idx [NN][NVC];

  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      automatic credit_t c = '0;
      if (rst_n && ej[n].valid) begin
        automatic flit_t f = ej[n].flit;
        automatic int s = int'(f.data[63:56]);
        automatic int q = int'(f.data[55:40]);
        automatic int i = int'(f.data[39:32]);
        automatic int v = int'(f.vc);
        c.valid = 1'b1;
        c.vc    = f.vc;
        rx_total++;
        if (first_arrive < 0) first_arrive = cycle;
        check(f.data[31:0] == csum(s, q, i), $sformatf("node %0d: payload corrupted", n));
        check(s < NN && dest_ok[s][n], $sformatf("node %0d got a flit from %0d it should not", n, s));
        if (!mode_m) check(f.dx == COORD_W'(n % MX) && f.dy == COORD_W'(n / MX),
                           $sformatf("node %0d: unicast flit for (%0d,%0d)", n, f.dx, f.dy));
        if (is_head(f.ht)) begin
          check(!in_pkt[n][v] && i == 0, $sformatf("node %0d vc %0d: head inside a packet", n, v));
          in_pkt[n][v] = !is_tail(f.ht);
          pkt_src[n][v] = s; pkt_seq[n][v] = q; pkt_idx[n][v] = 0;
        end else begin
          check(in_pkt[n][v] && pkt_src[n][v] == s && pkt_seq[n][v] == q &&
                pkt_idx[n][v] + 1 == i, $sformatf("node %0d vc %0d: flit out of order", n, v));
          pkt_idx[n][v] = i;
          if (is_tail(f.ht)) in_pkt[n][v] = 1'b0;
        end
        if (s < NN && q < 64) recv_cnt[s][q]++;
      end
      ej_credit[n] <= c;
    end
  end

  // ----------------------------------------------------------- events
  int n_va = 0, n_sa = 0, n_cs = 0, n_mf = 0, n_bs = 0, n_mode = 0;
  for (genvar y = 0; y < MY; y++) begin : g_ey
    for (genvar x = 0; x < MX; x++) begin : g_ex
      always @(posedge clk) begin
        if (dut.g_y[y].g_x[x].u_router.ev_va_conflict)  n_va++;
        if (dut.g_y[y].g_x[x].u_router.ev_sa_conflict)  n_sa++;
        if (dut.g_y[y].g_x[x].u_router.ev_credit_stall) n_cs++;
        if (dut.g_y[y].g_x[x].u_router.ev_mcast_fork)   n_mf++;
      end
    end
  end
  always @(posedge clk_ser) if (dut.g_y[0].g_x[0].g_p[P_EAST].g_link.u_link.bitslip) n_bs++;

  // ----------------------------------------------------------- routing tables
  function automatic port_mask_t tree_mask(int r, int s);
    port_mask_t m = '0;
    for (int d = 0; d < NN; d++) begin
      if (d == s) continue;
      begin
        automatic int x = s % MX, y = s / MX;
        automatic int dx = d % MX, dy = d / MX;
        forever begin
          automatic int p;
          if      (dx > x) p = P_EAST;
          else if (dx < x) p = P_WEST;
          else if (dy > y) p = P_SOUTH;
          else if (dy < y) p = P_NORTH;
          else             p = P_LOCAL;
          if (y * MX + x == r) m[p] = 1'b1;
          if (p == P_LOCAL) break;
          if (p == P_EAST) x++; else if (p == P_WEST) x--;
          else if (p == P_SOUTH) y++; else y--;
        end
      end
    end
    return m;
  endfunction

  task automatic wait_delivered(int expected, int limit);
    int t = 0;
    while (rx_total < expected && t < limit) begin
      @(posedge clk);
      t++;
    end
    repeat (20) @(posedge clk);
    check(rx_total == expected, $sformatf("delivered %0d of %0d flits", rx_total, expected));
  endtask

  // ----------------------------------------------------------- watchdog
  initial begin
    #(2 * RATIO * 60000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lock_cycles = 0;
    longint t0;
    run = 0; mode_m = 0; mcast_mode = 0; tbl_we = '0; tbl_addr = '0; tbl_mask = '0;
    rx_total = 0;
    for (int n = 0; n < NN; n++) begin
      for (int v = 0; v < NVC; v++) begin credits[n][v] = DEPTH; in_pkt[n][v] = 0; end
      pkts_left[n] = 0; flit_idx[n] = 0; seq[n] = 0;
      for (int q = 0; q < 64; q++) recv_cnt[n][q] = 0;
      for (int d = 0; d < NN; d++) dest_ok[n][d] = 1'b1;
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (!links_up && lock_cycles < 2000) begin @(posedge clk); lock_cycles++; end
    check(links_up, "links did not align");
    $display("links aligned after %0d cycles", lock_cycles);
    repeat (10) @(posedge clk);

    // zero-load latency, node 0 -> node NN-1 (a head and a tail flit)
    force_dst = NN - 1;
    first_arrive = -1;
    pkts_left[0] = 1;
    run = 1;
    @(posedge clk);             // the source puts the head on inj[0] at this edge
    t0 = cycle;
    run = 0;
    wait_delivered(PLEN_U, 500);
    begin
      automatic int hops = (MX - 1) + (MY - 1);
      automatic longint lat = first_arrive - t0;
      $display("zero-load latency over %0d hops: %0d cycles", hops, lat);
      check(lat == longint'(hops * (TR + TL) + TR),
            $sformatf("zero-load latency %0d, expected %0d", lat, hops * (TR + TL) + TR));
    end
    force_dst = -1;
    rx_total = 0;
    for (int q = 0; q < 64; q++) recv_cnt[0][q] = 0;
    seq[0] = 0;

    // ------------------------------------------------ unicast phase
    for (int n = 0; n < NN; n++) pkts_left[n] = NPKT_U;
    run = 1;
    t0 = cycle;
    wait_delivered(NN * NPKT_U * PLEN_U, 20000);
    $display("unicast: %0d flits in %0d cycles", rx_total, cycle - t0);
    run = 0;
    for (int s = 0; s < NN; s++)
      for (int q = 0; q < NPKT_U; q++)
        check(recv_cnt[s][q] == PLEN_U, $sformatf("unicast packet %0d/%0d: %0d flits", s, q, recv_cnt[s][q]));

    // ------------------------------------------------ multicast phase
    @(posedge clk);
    mcast_mode <= 1'b1; n_mode++;
    for (int s = 0; s < NN; s++)
      for (int r = 0; r < NN; r++) begin
        tbl_we   <= NN'(1) << r;
        tbl_addr <= ADR_W'(s);
        tbl_mask <= tree_mask(r, s);
        @(posedge clk);
      end
    tbl_we <= '0;
    @(posedge clk);
    mode_m = 1;
    plen = PLEN_M;
    rx_total = 0;
    for (int n = 0; n < NN; n++) begin
      seq[n] = 0;
      for (int q = 0; q < 64; q++) recv_cnt[n][q] = 0;
      for (int d = 0; d < NN; d++) dest_ok[n][d] = (d != n);
      pkts_left[n] = NPKT_M;
    end
    run = 1;
    t0 = cycle;
    wait_delivered(NN * NPKT_M * PLEN_M * (NN - 1), 40000);
    $display("multicast: %0d flits delivered in %0d cycles", rx_total, cycle - t0);
    run = 0;
    for (int s = 0; s < NN; s++)
      for (int q = 0; q < NPKT_M; q++)
        check(recv_cnt[s][q] == PLEN_M * (NN - 1),
              $sformatf("multicast packet %0d/%0d: %0d flits", s, q, recv_cnt[s][q]));

    $display("events: va_conflict=%0d sa_conflict=%0d credit_stall=%0d mcast_fork=%0d bitslip=%0d mode_switch=%0d",
             n_va, n_sa, n_cs, n_mf, n_bs, n_mode);
    check(n_va > 0, "no VC-allocation conflict");
    check(n_sa > 0, "no switch conflict");
    check(n_cs > 0, "no credit stall");
    check(n_mf > 0, "no multicast fork");
    check(n_bs > 0, "no bit slip");
    check(n_mode > 0, "no mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
