// tb_harts_mesh: network-level test. Nineteen routing controllers at their
// default parameters are wired as a C-wrapped hexagonal mesh of dimension
// e = 3. Node s has neighbour [s+1], [s+8], [s+7], [s-1], [s-8], [s-7]
// (mod 19) in directions d0..d5. Transmitter k of node s drives receiver
// (k+3) mod 6 of its neighbour in direction k, so every receiver k listens
// to the neighbour in direction k. All nodes share one clock, so the data
// recovery units are taken as ideal (rx_valid always 1).
//
// Each node gets a behavioural model of its network processor's BMU:
//  * inbound: takes every byte addressed (or teed) to the BMU and puts the
//    packets back together per sending receiver (bus-master lines). A
//    packet whose offsets are all zero has been delivered; any other packet
//    was buffered on its way and goes into the outbound queue;
//  * outbound (channel 0, slot 6): sends queued packets. Like a receiver, it
//    tries the directions of the non-zero offsets in the order m0, m1, m2,
//    moves the offset one step towards zero on a grant, and retries after a
//    major cycle or two if every candidate link is busy.
// The IM role is played once at start: the HARTS routing program is
// downloaded into all 114 receivers at the same time.
//
// Runs: (1) the example from node 1 to node 10, (1,1,0), alone: it must
// arrive at node 10 by cut-through in the intermediate node, never
// buffered; (2) every node sends one packet to every other node at the
// same time (342 packets): each must arrive once, at its destination,
// intact. The shortest offsets are found by search over |m_i| <= 2, which
// also checks that the diameter is e - 1 = 2; (3) all to all once more
// with cut-through and packet switching chosen message by message: every
// packet must arrive, the packet-switched ones buffered at every
// intermediate node; (4) circuit switching: every node sends one two-hop
// packet while every BMU holds the link those packets need next; nothing
// may arrive while the links are held, none may be buffered, and all must
// arrive once the links are released. Counts cut-through hops, buffered
// hops and refused reservations; each must occur. Prints the largest bit
// FIFO fill seen in any receiver.
module tb_harts_mesh;
  import hrc_pkg::*;
  import hrc_ucode_pkg::*;

  localparam int N = 19;
  localparam int E = 3;
  localparam int PLEN = 9;   // SOP, type, m0, m1, m2, src, dst, seq, EOP

  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] rxb [N];
  logic [NPORTS-1:0] txb [N];
  ts_req_t breq [N][NBMU_OUT];
  ts_req_t im_req;
  logic im_download = 0;
  ts_bus_t bus [N];
  logic back [N], mstart [N];
  logic [NPORTS-1:0] t_res [N], t_pkt [N], t_bo [N], t_null [N], r_err [N], r_den [N], r_exc [N];
  int checks = 0, failures = 0;

  function automatic int nbr(int s, int d);
    int step [6];
    step[0] = 1; step[1] = 3 * E - 1; step[2] = 3 * E - 2;
    step[3] = N - 1; step[4] = N - (3 * E - 1); step[5] = N - (3 * E - 2);
    return (s + step[d]) % N;
  endfunction

  for (genvar s = 0; s < N; s++) begin : g_node
    routing_controller dut (
      .clk, .rst_n, .rx_bit(rxb[s]), .rx_valid({NPORTS{1'b1}}), .tx_bit(txb[s]),
      .bmu_req(breq[s]), .bmu_ack(1'b1), .im_download, .im_req,
      .bus(bus[s]), .bus_ack(back[s]), .major_start(mstart[s]),
      .tx_reserved(t_res[s]), .tx_packet(t_pkt[s]), .tx_backoff(t_bo[s]), .tx_null(t_null[s]),
      .rcv_ddu_err(r_err[s]), .rcv_res_denied(r_den[s]), .rcv_exc(r_exc[s])
    );
  end

  always_comb begin
    for (int s = 0; s < N; s++) rxb[s] = '0;
    for (int s = 0; s < N; s++)
      for (int k = 0; k < int'(NPORTS); k++)
        rxb[nbr(s, k)][(k + 3) % 6] = txb[s][k];
  end

  always #5 clk = ~clk;
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  typedef struct { logic [8:0] b [PLEN]; } pkt_t;
  pkt_t outq [N][$];
  logic [8:0] inb [N][NMASTERS][$];
  int delivered [N][N];
  int n_deliv = 0, n_bufd = 0, n_bad = 0, n_cut = 0, n_refused = 0, n_null = 0;
  int n_bufd_mode [3] = '{0, 0, 0};   // buffered hops of cut-through, packet, circuit packets

  function automatic logic signed [7:0] off(pkt_t p, int i);
    return $signed(p.b[2 + i][7:0]);
  endfunction

  // ---------------- BMU inbound side and counters ----------------
  always @(posedge clk) if (rst_n && !im_download) begin
    for (int s = 0; s < N; s++) begin
      n_refused += $countones(r_den[s]);
      n_null    += $countones(t_null[s]);
      if (bus[s].cmd == CMD_RES_REQ && back[s] && int'(bus[s].master) < int'(NPORTS)
          && bus[s].addr[2:0] != S_BMU)
        n_cut++;
      if (bus[s].cmd == CMD_DATA && (bus[s].addr[2:0] == S_BMU || bus[s].addr[3])) begin
        inb[s][bus[s].master].push_back(bus[s].data);
        if (bus[s].data == K_EOP) begin
          pkt_t p;
          if (inb[s][bus[s].master].size() != PLEN) begin
            n_bad++;
            $display("bad packet length %0d at node %0d", inb[s][bus[s].master].size(), s);
          end else begin
            for (int i = 0; i < PLEN; i++) p.b[i] = inb[s][bus[s].master][i];
            if (p.b[0] != K_SOP || off(p, 0) < -2 || off(p, 0) > 2) n_bad++;
            else if (off(p, 0) == 0 && off(p, 1) == 0 && off(p, 2) == 0) begin
              n_deliv++;
              if (int'(p.b[6]) != s) begin
                n_bad++;
                $display("packet %0d->%0d delivered at node %0d", p.b[5], p.b[6], s);
              end else delivered[p.b[5]][p.b[6]]++;
            end else begin
              n_bufd++;
              n_bufd_mode[p.b[1][7] ? 2 : p.b[1][6] ? 1 : 0]++;
              outq[s].push_back(p);
            end
          end
          inb[s][bus[s].master].delete();
        end
      end
    end
  end

  // ---------------- BMU outbound side, one per node ----------------
  logic go = 0;
  int maxcnt = 0;   // largest bit FIFO fill seen in any receiver
  for (genvar s = 0; s < N; s++) begin : g_fill
    for (genvar k = 0; k < 6; k++) begin : g_k
      always @(posedge clk)
        if (rst_n && int'(g_node[s].dut.g_port[k].u_rcv.u_ddu.bf_cnt) > maxcnt)
          maxcnt = int'(g_node[s].dut.g_port[k].u_rcv.u_ddu.bf_cnt);
    end
  end

  for (genvar s = 0; s < N; s++) begin : g_bmu
    task automatic slot(ts_cmd_e c, logic [3:0] a, logic [8:0] d, output logic k);
      forever begin
        @(negedge clk);
        if (!im_download && bus[s].master == 4'(M_BMU0)) break;
      end
      breq[s][0] = '{cmd: c, addr: a, data: d};
      #1 k = back[s];
      @(negedge clk) breq[s][0] = TS_IDLE;
    endtask

    initial begin
      pkt_t p;
      logic k;
      int port, dim;
      for (int c = 0; c < int'(NBMU_OUT); c++) breq[s][c] = TS_IDLE;
      wait (go);
      forever begin
        if (outq[s].size() == 0) begin
          @(negedge clk);
          continue;
        end
        p = outq[s].pop_front();
        port = -1;
        while (port < 0) begin
          for (int i = 0; i < 3 && port < 0; i++) begin
            if (off(p, i) != 0) begin
              slot(CMD_RES_REQ, 4'((off(p, i) > 0) ? i : i + 3), 9'h0, k);
              if (k) begin
                port = (off(p, i) > 0) ? i : i + 3;
                dim = i;
              end
            end
          end
          if (port < 0) repeat (12 * (1 + s % 2)) @(negedge clk);
        end
        p.b[2 + dim] = {1'b0, 8'(off(p, dim) + ((port < 3) ? -8'sd1 : 8'sd1))};
        for (int i = 0; i < PLEN; i++) begin
          k = 0;
          while (!k) slot(CMD_DATA, 4'(port), p.b[i], k);
        end
        slot(CMD_RES_REL, 4'(port), 9'h0, k);
      end
    end
  end

  // ---------------- traffic ----------------
  function automatic pkt_t make_pkt(int src, int dst, int seq, logic [7:0] typ = 8'h00);
    pkt_t p;
    int best, bm [3];
    best = 99;
    bm[0] = 0; bm[1] = 0; bm[2] = 0;
    for (int a = -2; a <= 2; a++)
      for (int b = -2; b <= 2; b++)
        for (int c = -2; c <= 2; c++)
          if (((src + a * 1 + b * (3 * E - 1) + c * (3 * E - 2) - dst) % N + 2 * N) % N == 0) begin
            int cost;
            cost = (a < 0 ? -a : a) + (b < 0 ? -b : b) + (c < 0 ? -c : c);
            if (cost < best) begin
              best = cost; bm[0] = a; bm[1] = b; bm[2] = c;
            end
          end
    p.b[0] = K_SOP;
    p.b[1] = {1'b0, typ};
    for (int i = 0; i < 3; i++) p.b[2 + i] = {1'b0, 8'(bm[i])};
    p.b[5] = 9'(src);
    p.b[6] = 9'(dst);
    p.b[7] = 9'(seq);
    p.b[8] = K_EOP;
    return p;
  endfunction
  function automatic int hops(pkt_t p);
    int h;
    h = 0;
    for (int i = 0; i < 3; i++) h += (off(p, i) < 0) ? -int'(off(p, i)) : int'(off(p, i));
    return h;
  endfunction

  initial begin
    int maxhops, nd;
    pkt_t p;
    im_req = TS_IDLE;
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) delivered[a][b] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- download the routing program into every receiver of every node ----
    im_download = 1;
    nd = 0;
    for (int r = 0; r < int'(NPORTS); r++) begin
      for (int a = -1; a < int'(UC_LEN); a++) begin
        logic [15:0] w;
        w = (a < 0) ? 16'h0 : harts_word(a);
        for (int h = 0; h < 2; h++) begin
          if (a < 0 && h == 1) continue;
          @(negedge clk);
          if (a < 0) im_req = '{cmd: CMD_DL_ADDR, addr: 4'(r), data: 9'h0};
          else if (h == 0) im_req = '{cmd: CMD_DL_LO, addr: 4'(r), data: {1'b0, w[7:0]}};
          else im_req = '{cmd: CMD_DL_HI, addr: 4'(r), data: {1'b0, w[15:8]}};
          #1 if (back[0] && back[N-1] && back[7]) nd++;
        end
      end
    end
    @(negedge clk) im_req = TS_IDLE;
    @(negedge clk) im_download = 0;
    chk(nd == int'(NPORTS) * (2 * int'(UC_LEN) + 1), $sformatf("download cycles acknowledged: %0d", nd));
    chk(g_node[12].dut.g_port[5].u_rcv.u_seq.wcs[40] == harts_word(40), "control store loaded");
    repeat (50) @(negedge clk);
    go = 1;

    // ---- (1) the example: node 1 to node 10 ----
    p = make_pkt(1, 10, 0);
    chk(off(p, 0) == 1 && off(p, 1) == 1 && off(p, 2) == 0, "offsets 1 -> 10 are (1,1,0)");
    outq[1].push_back(p);
    while (n_deliv < 1) @(negedge clk);
    chk(delivered[1][10] == 1, "1 -> 10 delivered at node 10");
    chk(n_bufd == 0, "1 -> 10 not buffered on the way");
    chk(n_cut == 1, $sformatf("1 -> 10 cut through one intermediate node (%0d)", n_cut));
    repeat (200) @(negedge clk);

    // ---- (2) all to all ----
    maxhops = 0;
    for (int s = 0; s < N; s++)
      for (int t = 0; t < N; t++)
        if (s != t) begin
          p = make_pkt(s, t, 1);
          if (hops(p) > maxhops) maxhops = hops(p);
          outq[s].push_back(p);
        end
    chk(maxhops == E - 1, $sformatf("diameter %0d, expected e-1 = %0d", maxhops, E - 1));
    while (n_deliv < 1 + N * (N - 1) && failures == 0) @(negedge clk);
    repeat (500) @(negedge clk);

    begin
      int miss;
      miss = 0;
      for (int s = 0; s < N; s++)
        for (int t = 0; t < N; t++)
          if (s != t && delivered[s][t] != ((s == 1 && t == 10) ? 2 : 1)) miss++;
      chk(miss == 0, $sformatf("every packet delivered exactly once (%0d wrong)", miss));
    end
    $display("all to all: largest bit FIFO fill %0d bits", maxcnt);
    chk(n_bufd_mode[0] > 0, "some cut-through packets buffered under load");

    // ---- (3) all to all again, delivery mode chosen per message ----
    begin
      int exp_ps, miss, base;
      exp_ps = 0;
      base = n_deliv;
      for (int s = 0; s < N; s++)
        for (int t = 0; t < N; t++)
          if (s != t) begin
            logic [7:0] typ;
            typ = ((s + t) % 2 == 0) ? 8'h00 : 8'h40;
            p = make_pkt(s, t, 2, typ);
            if (typ == 8'h40) exp_ps += hops(p) - 1;
            outq[s].push_back(p);
          end
      n_bufd_mode[1] = 0;
      n_bufd_mode[2] = 0;
      while (n_deliv < base + N * (N - 1) && failures == 0) @(negedge clk);
      repeat (500) @(negedge clk);
      miss = 0;
      for (int s = 0; s < N; s++)
        for (int t = 0; t < N; t++)
          if (s != t && delivered[s][t] != ((s == 1 && t == 10) ? 3 : 2)) miss++;
      $display("mixed modes: largest bit FIFO fill %0d bits", maxcnt);
      chk(miss == 0, $sformatf("mixed modes: every packet delivered exactly once (%0d wrong)", miss));
      chk(n_bufd_mode[1] == exp_ps, $sformatf("packet switching: buffered at every intermediate node (%0d of %0d)", n_bufd_mode[1], exp_ps));
    end

    // ---- (4) circuit switching: every node sends one two-hop packet at once ----
    begin
      int far, base, r0, miss;
      far = 0;
      for (int t = 1; t < N && far == 0; t++) begin
        p = make_pkt(0, t, 0);
        if (hops(p) == 2 && off(p, 0) != 0 && off(p, 1) != 0) far = t;
      end
      base = n_deliv;
      r0 = n_refused;
      // every BMU holds its own T1 (the second hop of these packets) for a while
      // on channel 1; all nodes share one clock, so their slots line up
      while (bus[0].master != 4'(M_BMU0 + 1)) @(negedge clk);
      for (int s = 0; s < N; s++) breq[s][1] = '{cmd: CMD_RES_REQ, addr: 4'd1, data: 9'h0};
      @(negedge clk);
      for (int s = 0; s < N; s++) breq[s][1] = TS_IDLE;
      for (int s = 0; s < N; s++) outq[s].push_back(make_pkt(s, (s + far) % N, 3, 8'h80));
      repeat (400) @(negedge clk);
      chk(n_deliv == base, "circuit switching: nothing delivered while the links are held");
      while (bus[0].master != 4'(M_BMU0 + 1)) @(negedge clk);
      for (int s = 0; s < N; s++) breq[s][1] = '{cmd: CMD_RES_REL, addr: 4'd1, data: 9'h0};
      @(negedge clk);
      for (int s = 0; s < N; s++) breq[s][1] = TS_IDLE;
      while (n_deliv < base + N && failures == 0) @(negedge clk);
      repeat (500) @(negedge clk);
      miss = 0;
      for (int s = 0; s < N; s++) if (delivered[s][(s + far) % N] != ((s == 1 && (s + far) % N == 10) ? 4 : 3)) miss++;
      $display("circuit: largest bit FIFO fill %0d bits, refusals %0d", maxcnt, n_refused - r0);
      chk(miss == 0, $sformatf("circuit switching: every packet delivered (%0d wrong)", miss));
      chk(n_bufd_mode[2] == 0, $sformatf("circuit switching: never buffered (%0d)", n_bufd_mode[2]));
      chk(n_refused - r0 > 0, "circuit switching: a busy link was waited for");
    end
    chk(n_bad == 0, "no misrouted or damaged packet");
    $display("mesh: delivered=%0d cut_through_hops=%0d buffered_hops=%0d refused=%0d null_words=%0d time=%0t",
             n_deliv, n_cut, n_bufd, n_refused, n_null, $time);
    chk(n_cut > 0, "cut-through hops");
    chk(n_bufd > 0, "buffered hops");
    chk(n_refused > 0, "refused reservations");
    for (int s = 0; s < N; s++) chk(r_err[s] == '0 && outq[s].size() == 0, $sformatf("node %0d idle", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
