// tb_routing_controller: end-to-end test of the routing controller at its
// default parameters. The testbench plays the neighbours (serial senders
// and line decoders), the BMU (four outbound-channel masters and an
// inbound channel that takes every byte addressed or teed to it) and the
// interface manager. It downloads the HARTS routing microprogram into all
// six receivers, then runs:
//   A  cut-through: (1,1,0) into R0 leaves on T0 as (0,1,0)
//   B  alternate route: T1 held by the BMU, (0,1,1) into R2 leaves on T2 as (0,1,0)
//   C  buffering: T1 and T2 held, (0,1,1) into R3 goes to the BMU unchanged
//   D  arrival: (0,0,0) into R4 goes to the BMU
//   E  hold/check by the IM on the busy T1, granted after the BMU releases
//   F  tee: a BMU byte to T2 with the tee bit also reaches the BMU inbound channel
//   G  lost EOP: (-1,0,0) into R5 cut short; gap abort, exception handler
//      closes the packet on T3
//   H  corrupted word: (0,-1,0) into R1; recovery mode, packet closed on T4
//   I  packet switching chosen by the source: (1,0,0) into R0 with T0 free
//      still goes to the BMU
//   J  circuit switching: (0,0,-1) into R2 with T5 held keeps retrying T5
//      (no buffering) and leaves on T5 once the BMU releases it
//   K  a second routing program (broadcast with tee) is downloaded into R0
//      alone; a packet into R0 leaves unchanged on T0 and reaches the BMU
//   L  source-directed routing program downloaded into R3: route (4,2,end)
//      leaves on T4 as (2,end,end); route (end,end,end) goes to the BMU
//   M  dimension-order (k-ary n-cube) program downloaded into R4: (0,1,1)
//      with T1 held is buffered although T2 is free; once T1 is released
//      the same packet leaves on T1 as (0,0,1)
// Every mechanism is counted and must occur at least once.
module tb_routing_controller;
  import hrc_pkg::*;
  import hrc_ucode_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] rx_bit, rx_valid, tx_bit;
  ts_req_t bmu_req [NBMU_OUT];
  logic bmu_ack = 1, im_download = 0;
  ts_req_t im_req;
  ts_bus_t bus; logic bus_ack, major_start;
  logic [NPORTS-1:0] tx_reserved, tx_packet, tx_backoff, tx_null, rcv_ddu_err, rcv_res_denied, rcv_exc;
  int checks = 0, failures = 0;

  routing_controller dut (.*);

  line_mon mon0 (.clk, .rst_n, .line(tx_bit[0]));
  line_mon mon1 (.clk, .rst_n, .line(tx_bit[1]));
  line_mon mon2 (.clk, .rst_n, .line(tx_bit[2]));
  line_mon mon3 (.clk, .rst_n, .line(tx_bit[3]));
  line_mon mon4 (.clk, .rst_n, .line(tx_bit[4]));
  line_mon mon5 (.clk, .rst_n, .line(tx_bit[5]));

  always #5 clk = ~clk;
  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // ---------------- serial senders (one bit per clock) ----------------
  logic sq [NPORTS][$];
  always @(negedge clk) begin
    for (int k = 0; k < int'(NPORTS); k++) begin
      rx_valid[k] = 1'b1;
      rx_bit[k]   = (sq[k].size() > 0) ? sq[k].pop_front() : 1'b0;
    end
  end
  task automatic send_word(int k, logic [8:0] w, logic [1:0] pad = 2'b00);
    logic [11:0] x;
    x = {1'b1, w, pad};
    for (int i = 11; i >= 0; i--) sq[k].push_back(x[i]);
  endtask
  task automatic send_pkt(int k, logic [8:0] p [$], bit with_eop = 1);
    foreach (p[i]) send_word(k, p[i]);
    if (with_eop) send_word(k, K_EOP);
    repeat (30) sq[k].push_back(1'b0);
  endtask

  // ---------------- BMU inbound channel and mechanism counters ----------------
  logic [8:0] bmu_in [NMASTERS][$];
  int n_res_ok = 0, n_res_no = 0, n_tee = 0, n_null = 0, n_backoff = 0;
  int n_abort = 0, n_exc = 0, n_rec = 0, n_dl = 0, n_hold_pend = 0, n_hold_grant = 0;
  logic [NPORTS-1:0] bo_q = '0;
  always @(posedge clk) if (rst_n) begin
    if (!im_download && bus.cmd == CMD_DATA && (bus.addr[2:0] == S_BMU || bus.addr[3]))
      bmu_in[bus.master].push_back(bus.data);
    if (!im_download && bus.cmd == CMD_DATA && bus.addr[3]) n_tee++;
    if (!im_download && bus.cmd == CMD_RES_REQ) begin
      if (bus_ack) n_res_ok++; else n_res_no++;
    end
    if (im_download && bus.cmd == CMD_DL_HI && bus_ack) n_dl++;
    n_null  += $countones(tx_null);
    n_backoff += $countones(tx_backoff & ~bo_q);
    bo_q <= tx_backoff;
    n_abort += $countones(rcv_ddu_err);
    n_exc   += $countones(rcv_exc);
    if (dut.g_port[1].dmode == 2'd2) n_rec++;
  end

  // ---------------- bus masters driven by the testbench ----------------
  task automatic bmu_cmd(int ch, ts_cmd_e c, logic [3:0] a, logic [8:0] d, output logic k);
    forever begin
      @(negedge clk);
      if (!im_download && bus.master == 4'(NPORTS + ch)) break;
    end
    bmu_req[ch] = '{cmd: c, addr: a, data: d};
    #1 k = bus_ack;
    @(negedge clk) bmu_req[ch] = TS_IDLE;
  endtask
  task automatic im_cmd(ts_cmd_e c, logic [3:0] a, logic [8:0] d, output logic k);
    forever begin
      @(negedge clk);
      if (im_download || bus.master == M_IM0) break;
    end
    im_req = '{cmd: c, addr: a, data: d};
    #1 k = bus_ack;
    @(negedge clk) im_req = TS_IDLE;
  endtask

  typedef logic [8:0] bq_t [$];
  function automatic bq_t nonnull(bq_t q);
    bq_t o;
    foreach (q[i]) if (q[i] != K_NULL) o.push_back(q[i]);
    return o;
  endfunction
  function automatic bit last_eop(bq_t q);
    return q.size() > 0 && q[q.size()-1] == K_EOP;
  endfunction
  task automatic expect_seq(string name, logic [8:0] got [$], logic [8:0] exp [$]);
    chk(got.size() == exp.size(), $sformatf("%s: %0d bytes, expected %0d", name, got.size(), exp.size()));
    foreach (exp[i]) if (i < got.size())
      chk(got[i] == exp[i], $sformatf("%s byte %0d: %h expected %h", name, i, got[i], exp[i]));
  endtask

  logic k;
  logic [8:0] got [$];
  logic [8:0] pay [$] = '{9'h011, 9'h022, 9'h033, 9'h0FF, 9'h000};
  initial begin
    for (int c = 0; c < int'(NBMU_OUT); c++) bmu_req[c] = TS_IDLE;
    im_req = TS_IDLE;
    rx_bit = '0; rx_valid = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- download the routing microprogram into every receiver ----
    im_download = 1;
    for (int r = 0; r < int'(NPORTS); r++) begin
      im_cmd(CMD_DL_ADDR, 4'(r), 9'd0, k);
      for (int a = 0; a < int'(UC_LEN); a++) begin
        logic [15:0] w;
        w = harts_word(a);
        im_cmd(CMD_DL_LO, 4'(r), {1'b0, w[7:0]}, k);
        im_cmd(CMD_DL_HI, 4'(r), {1'b0, w[15:8]}, k);
      end
    end
    @(negedge clk) im_download = 0;
    chk(n_dl == int'(NPORTS * UC_LEN), $sformatf("download words acknowledged: %0d", n_dl));
    chk(dut.g_port[3].u_rcv.u_seq.wcs[61] == harts_word(61), "control store loaded");
    repeat (30) @(negedge clk);

    // ---- A: cut-through on the first choice ----
    send_pkt(0, '{K_SOP, 9'h001, 9'h001, 9'h001, 9'h000, 9'h011, 9'h022, 9'h033, 9'h0FF, 9'h000});
    while (!last_eop(mon0.q)) @(negedge clk);
    got = nonnull(mon0.q);
    expect_seq("A on T0", got, '{K_SOP, 9'h001, 9'h000, 9'h001, 9'h000, 9'h011, 9'h022, 9'h033, 9'h0FF, 9'h000, K_EOP});
    begin
      int bad_gap = 0;
      for (int i = 1; i < mon0.t.size(); i++) if (mon0.t[i] - mon0.t[i-1] != 12) bad_gap++;
      chk(bad_gap == 0, "T0: one line word per major cycle in packet mode");
    end
    chk(mon0.bad == 0, "T0 line words well formed");

    // ---- B: first choice busy, alternate taken ----
    bmu_cmd(0, CMD_RES_REQ, 4'd1, 9'h0, k); chk(k, "BMU channel 0 reserves T1");
    bmu_cmd(0, CMD_DATA, 4'd1, K_SOP, k);   chk(k, "BMU sends SOP on T1");
    send_pkt(2, '{K_SOP, 9'h002, 9'h000, 9'h001, 9'h001, 9'h044});
    while (!last_eop(mon2.q)) @(negedge clk);
    got = nonnull(mon2.q);
    expect_seq("B on T2", got, '{K_SOP, 9'h002, 9'h000, 9'h001, 9'h000, 9'h044, K_EOP});
    chk(n_res_no >= 1, "B: a reservation was refused");
    wait (!tx_backoff[2] && !tx_reserved[2]);

    // ---- C: both choices busy, packet buffered in the BMU ----
    bmu_cmd(1, CMD_RES_REQ, 4'd2, 9'h0, k); chk(k, "BMU channel 1 reserves T2");
    send_pkt(3, '{K_SOP, 9'h003, 9'h000, 9'h001, 9'h001, 9'h055, 9'h066});
    while (!last_eop(bmu_in[3])) @(negedge clk);
    expect_seq("C to BMU", bmu_in[3], '{K_SOP, 9'h003, 9'h000, 9'h001, 9'h001, 9'h055, 9'h066, K_EOP});

    // ---- D: packet has arrived ----
    send_pkt(4, '{K_SOP, 9'h004, 9'h000, 9'h000, 9'h000, 9'h077});
    while (!last_eop(bmu_in[4])) @(negedge clk);
    expect_seq("D to BMU", bmu_in[4], '{K_SOP, 9'h004, 9'h000, 9'h000, 9'h000, 9'h077, K_EOP});

    // ---- E: IM hold on busy T1 ----
    im_cmd(CMD_HOLD, 4'd1, 9'h0, k);  chk(k, "hold acknowledged");
    im_cmd(CMD_CHECK, 4'd1, 9'h0, k); chk(!k, "check: hold pending"); if (!k) n_hold_pend++;
    bmu_cmd(0, CMD_RES_REQ, 4'd1, 9'h0, k); chk(k, "owner may re-request its own reservation");
    bmu_cmd(0, CMD_DATA, 4'd1, K_EOP, k); chk(k, "BMU ends its packet on T1");
    bmu_cmd(0, CMD_RES_REL, 4'd1, 9'h0, k); chk(k, "BMU releases T1");
    wait (tx_backoff[1]); wait (!tx_backoff[1]);
    im_cmd(CMD_CHECK, 4'd1, 9'h0, k); chk(k, "check: hold granted"); if (k) n_hold_grant++;
    bmu_cmd(2, CMD_RES_REQ, 4'd1, 9'h0, k); chk(!k, "held T1 refuses the BMU");
    im_cmd(CMD_RES_REL, 4'd1, 9'h0, k); chk(k, "IM releases T1");

    // ---- F: tee ----
    bmu_cmd(1, CMD_DATA, 4'b1010, K_SOP, k); chk(k, "teed byte accepted by T2");
    bmu_cmd(1, CMD_DATA, 4'b1010, 9'h0AB, k);
    bmu_cmd(1, CMD_DATA, 4'b1010, K_EOP, k);
    bmu_cmd(1, CMD_RES_REL, 4'd2, 9'h0, k); chk(k, "BMU releases T2");
    repeat (40) @(negedge clk);
    expect_seq("F teed copy at BMU", bmu_in[NPORTS + 1], '{K_SOP, 9'h0AB, K_EOP});

    // ---- G: lost EOP on R5 ----
    send_pkt(5, '{K_SOP, 9'h005, 9'h0FF, 9'h000, 9'h000, 9'h088, 9'h099}, 0);
    while (!last_eop(mon3.q)) @(negedge clk);
    got = nonnull(mon3.q);
    expect_seq("G on T3", got, '{K_SOP, 9'h005, 9'h000, 9'h000, 9'h000, 9'h088, 9'h099, K_EOP});

    // ---- H: corrupted word on R1 ----
    send_word(1, K_SOP); send_word(1, 9'h006); send_word(1, 9'h000); send_word(1, 9'h0FF);
    send_word(1, 9'h000); send_word(1, 9'h0AA); send_word(1, 9'h0BB, 2'b11);
    send_word(1, 9'h0CC); send_word(1, K_EOP);
    repeat (30) sq[1].push_back(1'b0);
    while (!last_eop(mon4.q)) @(negedge clk);
    got = nonnull(mon4.q);
    expect_seq("H on T4", got, '{K_SOP, 9'h006, 9'h000, 9'h000, 9'h000, 9'h0AA, K_EOP});
    repeat (100) @(negedge clk);

    // ---- I: packet switching requested in the type byte ----
    chk(!tx_reserved[0], "I: T0 is free");
    send_pkt(0, '{K_SOP, 9'h041, 9'h001, 9'h000, 9'h000, 9'h0C1});
    while (!last_eop(bmu_in[0])) @(negedge clk);
    expect_seq("I to BMU", bmu_in[0], '{K_SOP, 9'h041, 9'h001, 9'h000, 9'h000, 9'h0C1, K_EOP});
    chk(!tx_packet[0] && mon0.q.size() == 11, "I: nothing sent on T0");

    // ---- J: circuit switching waits for the link ----
    bmu_cmd(3, CMD_RES_REQ, 4'd5, 9'h0, k); chk(k, "BMU channel 3 reserves T5");
    begin
      int n0;
      n0 = n_res_no;
      send_pkt(2, '{K_SOP, 9'h082, 9'h000, 9'h000, 9'h0FF, 9'h0D1, 9'h0D2});
      repeat (12 * 20) @(negedge clk);
      chk(n_res_no - n0 >= 5, $sformatf("J: T5 requested repeatedly (%0d refusals)", n_res_no - n0));
      chk(bmu_in[2].size() == 0, "J: circuit-switched packet not buffered");
    end
    bmu_cmd(3, CMD_RES_REL, 4'd5, 9'h0, k); chk(k, "BMU releases T5");
    while (!last_eop(mon5.q)) @(negedge clk);
    got = nonnull(mon5.q);
    expect_seq("J on T5", got, '{K_SOP, 9'h082, 9'h000, 9'h000, 9'h000, 9'h0D1, 9'h0D2, K_EOP});
    repeat (100) @(negedge clk);

    // ---- K: another routing program in one receiver ----
    im_download = 1;
    im_cmd(CMD_DL_ADDR, 4'd0, 9'd0, k);
    for (int a = 0; a < int'(TEE_LEN); a++) begin
      logic [15:0] w;
      w = tee_word(a);
      im_cmd(CMD_DL_LO, 4'd0, {1'b0, w[7:0]}, k);
      im_cmd(CMD_DL_HI, 4'd0, {1'b0, w[15:8]}, k);
    end
    @(negedge clk) im_download = 0;
    chk(dut.g_port[0].u_rcv.u_seq.wcs[5] == tee_word(5), "K: R0 reloaded");
    chk(dut.g_port[1].u_rcv.u_seq.wcs[5] == harts_word(5), "K: R1 keeps the routing program");
    bmu_in[0].delete();
    mon0.q.delete();
    begin
      int t0;
      t0 = n_tee;
      send_pkt(0, '{K_SOP, 9'h007, 9'h001, 9'h001, 9'h001, 9'h0E1});
      while (!last_eop(mon0.q)) @(negedge clk);
      got = nonnull(mon0.q);
      expect_seq("K on T0", got, '{K_SOP, 9'h007, 9'h001, 9'h001, 9'h001, 9'h0E1, K_EOP});
      expect_seq("K copy at BMU", bmu_in[0], '{K_SOP, 9'h007, 9'h001, 9'h001, 9'h001, 9'h0E1, K_EOP});
      chk(n_tee - t0 == 7, "K: every byte teed");
    end
    repeat (100) @(negedge clk);

    // ---- L: source-directed routing in R3 ----
    im_download = 1;
    im_cmd(CMD_DL_ADDR, 4'd3, 9'd0, k);
    for (int a = 0; a < int'(SRC_LEN); a++) begin
      logic [15:0] w;
      w = src_word(a);
      im_cmd(CMD_DL_LO, 4'd3, {1'b0, w[7:0]}, k);
      im_cmd(CMD_DL_HI, 4'd3, {1'b0, w[15:8]}, k);
    end
    @(negedge clk) im_download = 0;
    chk(dut.g_port[3].u_rcv.u_seq.wcs[13] == src_word(13), "L: R3 reloaded");
    mon4.q.delete();
    send_pkt(3, '{K_SOP, 9'h008, 9'h004, 9'h002, 9'h0FF, 9'h0F1, 9'h0F2});
    while (!last_eop(mon4.q)) @(negedge clk);
    got = nonnull(mon4.q);
    expect_seq("L on T4", got, '{K_SOP, 9'h008, 9'h002, 9'h0FF, 9'h0FF, 9'h0F1, 9'h0F2, K_EOP});
    bmu_in[3].delete();
    send_pkt(3, '{K_SOP, 9'h009, 9'h0FF, 9'h0FF, 9'h0FF, 9'h0F3});
    while (!last_eop(bmu_in[3])) @(negedge clk);
    expect_seq("L arrival at BMU", bmu_in[3], '{K_SOP, 9'h009, 9'h0FF, 9'h0FF, 9'h0FF, 9'h0F3, K_EOP});
    repeat (100) @(negedge clk);

    // ---- M: dimension-order routing in R4 ----
    im_download = 1;
    im_cmd(CMD_DL_ADDR, 4'd4, 9'd0, k);
    for (int a = 0; a < int'(CUBE_LEN); a++) begin
      logic [15:0] w;
      w = cube_word(a);
      im_cmd(CMD_DL_LO, 4'd4, {1'b0, w[7:0]}, k);
      im_cmd(CMD_DL_HI, 4'd4, {1'b0, w[15:8]}, k);
    end
    @(negedge clk) im_download = 0;
    chk(dut.g_port[4].u_rcv.u_seq.wcs[53] == cube_word(53), "M: R4 reloaded");
    bmu_cmd(0, CMD_RES_REQ, 4'd1, 9'h0, k); chk(k, "M: BMU channel 0 reserves T1");
    chk(!tx_reserved[2], "M: T2 is free");
    bmu_in[4].delete();
    send_pkt(4, '{K_SOP, 9'h00A, 9'h000, 9'h001, 9'h001, 9'h0A1});
    while (!last_eop(bmu_in[4])) @(negedge clk);
    expect_seq("M to BMU", bmu_in[4], '{K_SOP, 9'h00A, 9'h000, 9'h001, 9'h001, 9'h0A1, K_EOP});
    chk(!tx_packet[2], "M: no alternate dimension used");
    bmu_cmd(0, CMD_RES_REL, 4'd1, 9'h0, k); chk(k, "M: BMU releases T1");
    wait (!tx_reserved[1] && !tx_backoff[1]);
    mon1.q.delete();
    send_pkt(4, '{K_SOP, 9'h00B, 9'h000, 9'h001, 9'h001, 9'h0A2});
    while (!last_eop(mon1.q)) @(negedge clk);
    got = nonnull(mon1.q);
    expect_seq("M on T1", got, '{K_SOP, 9'h00B, 9'h000, 9'h000, 9'h001, 9'h0A2, K_EOP});
    repeat (100) @(negedge clk);

    // ---- mechanism coverage ----
    $display("mechanisms: download=%0d res_ok=%0d res_refused=%0d null=%0d backoff=%0d tee=%0d hold_pending=%0d hold_granted=%0d ddu_abort=%0d recovery_clks=%0d exceptions=%0d",
             n_dl, n_res_ok, n_res_no, n_null, n_backoff, n_tee, n_hold_pend, n_hold_grant, n_abort, n_rec, n_exc);
    chk(n_dl > 0, "download happened");
    chk(n_res_ok > 0, "reservation granted");
    chk(n_res_no > 0, "reservation refused");
    chk(n_null > 0, "null byte inserted");
    chk(n_backoff > 0, "backoff");
    chk(n_tee > 0, "tee");
    chk(n_hold_pend > 0 && n_hold_grant > 0, "hold pending and granted");
    chk(n_abort >= 2, "DDU aborts (gap and bad word)");
    chk(n_rec > 0, "recovery mode");
    chk(n_exc >= 2, "exception handler taken");
    chk(bmu_in[3].size() > 0 && bmu_in[4].size() > 0, "BMU fallback and arrival");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
