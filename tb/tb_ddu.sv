// tb_ddu: checks the data detection unit. The testbench builds the serial
// stream itself ({1, flag, byte, 00} per word, zeros between packets) and
// compares the delivered bytes and mode changes with what it sent:
// a normal packet with nulls inside (dropped), idle garbage in sync mode
// (ignored), a packet whose EOP is lost (gap abort back to sync), a packet
// with a corrupted word (recovery mode until the next gap, bytes of the
// broken packet discarded) and a following good packet. Also checks a
// bursty bit strobe through the bit FIFO, back-pressure from the buffer
// register inside a packet, a packet that arrives after a long idle
// stretch under back-pressure, and the drain of a bit backlog while the
// line keeps delivering a bit on every clock.
module tb_ddu;
  import hrc_pkg::*;
  logic clk = 0, rst_n = 0, rx_bit = 0, rx_valid = 0, out_ready = 1;
  logic byte_valid, sop, eop, err, bitfifo_ovf;
  logic [8:0] byte_data;
  logic [1:0] mode;
  int checks = 0, failures = 0;
  logic [8:0] got [$];
  int n_err = 0, n_sop = 0, n_eop = 0, n_rec = 0;

  ddu #(.GAP_BITS(16), .BITFIFO_DEPTH(128)) dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    if (byte_valid) got.push_back(byte_data);
    n_err += err; n_sop += sop; n_eop += eop;
    if (mode == 2'd2) n_rec++;
  end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask
  task automatic sbit(logic b);
    @(negedge clk); rx_bit = b; rx_valid = 1;
    @(posedge clk); #1 rx_valid = 0;
  endtask
  task automatic sword(logic [8:0] w, logic [1:0] pad = 2'b00);
    logic [11:0] x = {1'b1, w, pad};
    for (int i = 11; i >= 0; i--) sbit(x[i]);
  endtask
  task automatic zeros(int n);
    repeat (n) sbit(1'b0);
  endtask

  logic [8:0] p1 [7] = '{K_SOP, 9'h010, 9'h001, 9'h0FE, 9'h000, 9'h0AA, K_EOP};
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    zeros(30);
    chk(mode == 2'd0, "sync at start");
    // packet 1 with nulls in the middle
    foreach (p1[i]) begin
      sword(p1[i]);
      if (i == 2) begin sword(K_NULL); sword(K_NULL); end
    end
    zeros(20);
    chk(got.size() == 7, $sformatf("packet 1: 7 bytes, got %0d", got.size()));
    foreach (p1[i]) if (i < got.size()) chk(got[i] == p1[i], $sformatf("p1 byte %0d", i));
    chk(n_sop == 1 && n_eop == 1 && n_err == 0, "one SOP, one EOP, no error");
    chk(mode == 2'd0, "back to sync after EOP");
    // garbage in sync mode: a data word with no SOP is ignored
    got.delete();
    sword(9'h033); zeros(20);
    chk(got.size() == 0 && mode == 2'd0, "data word in sync mode ignored");
    // lost EOP: gap ends the packet
    sword(K_SOP); sword(9'h011); sword(9'h022);
    chk(mode == 2'd1, "packet mode");
    zeros(20);
    chk(mode == 2'd0 && n_err == 1, "gap in packet mode aborts to sync");
    chk(got.size() == 3, "bytes before the gap delivered");
    // corrupted word: bad pad bits -> recovery
    got.delete();
    sword(K_SOP); sword(9'h044); sword(9'h055, 2'b10);
    repeat (4) @(negedge clk);
    chk(mode == 2'd2 && n_err == 2, "bad word enters recovery");
    sword(9'h066); sword(K_EOP); sword(K_SOP); sword(9'h077);
    chk(mode == 2'd2, "recovery ignores words until a gap");
    chk(got.size() == 2, "nothing delivered in recovery");
    zeros(20);
    chk(mode == 2'd0, "gap returns recovery to sync");
    // good packet afterwards, bits in bursts of two with idle clocks
    got.delete();
    begin
      logic [8:0] p2 [4] = '{K_SOP, 9'h1FF & 9'h0C3, 9'h05A, K_EOP};
      foreach (p2[i]) begin
        logic [11:0] x;
        x = {1'b1, p2[i], 2'b00};
        for (int b = 11; b >= 0; b--) begin
          sbit(x[b]);
          if (b % 2 == 0) repeat (2) @(negedge clk);
        end
      end
      zeros(20);
      chk(got.size() == 4, "packet after recovery delivered");
      foreach (p2[i]) if (i < got.size()) chk(got[i] == p2[i], $sformatf("p2 byte %0d", i));
    end
    // back-pressure: buffer not ready for a while, nothing may be lost
    got.delete();
    begin
      logic [8:0] p3 [6] = '{K_SOP, 9'h001, 9'h002, 9'h003, 9'h004, K_EOP};
      int seen;
      fork
        foreach (p3[i]) sword(p3[i]);
        begin
          repeat (30) @(negedge clk);
          out_ready = 0;
          repeat (40) @(negedge clk);
          seen = got.size();
          repeat (20) @(negedge clk);
          chk(got.size() == seen, "no byte delivered while not ready");
          out_ready = 1;
        end
      join
      zeros(60);
      chk(got.size() == 6, $sformatf("back-pressured packet complete: %0d", got.size()));
      foreach (p3[i]) if (i < got.size()) chk(got[i] == p3[i], $sformatf("p3 byte %0d", i));
    end
    // long idle time while the buffer is full: idle zeros must not fill
    // the bit FIFO, and a packet arriving then must be kept whole
    got.delete();
    begin
      logic [8:0] p4 [3] = '{K_SOP, 9'h0E5, K_EOP};
      out_ready = 0;
      zeros(300);
      foreach (p4[i]) sword(p4[i]);
      zeros(20);
      chk(got.size() == 0, "nothing delivered while not ready");
      out_ready = 1;
      zeros(60);
      chk(got.size() == 3, $sformatf("packet after idle back-pressure complete: %0d", got.size()));
      foreach (p4[i]) if (i < got.size()) chk(got[i] == p4[i], $sformatf("p4 byte %0d", i));
    end
    // backlog drain: a word held back by back-pressure with idle zeros
    // queued behind it; the line keeps delivering a bit every clock, and the
    // backlog must still drain in the idle time that follows
    got.delete();
    begin
      int peak;
      out_ready = 0;
      sword(K_SOP);
      zeros(80);
      peak = int'(dut.bf_cnt);
      chk(peak >= 80, $sformatf("backlog built up behind the held word: %0d bits", peak));
      out_ready = 1;
      zeros(120);
      chk(int'(dut.bf_cnt) <= 2, $sformatf("backlog drained while bits keep arriving: %0d left", dut.bf_cnt));
      chk(got.size() == 1 && got[0] == K_SOP, "held word delivered");
      sword(K_EOP);
      zeros(40);
      chk(mode == 2'd0, "back to sync");
    end
    chk(n_rec > 0, "recovery mode seen");
    chk(!bitfifo_ovf, "no bit FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
