// tb_transmitter: checks one transmitter against the reservation rules and
// the line format. The testbench acts as the bus: at each falling edge it
// drives one command and samples the acknowledge. Checked: zeros in sync
// mode; reservation granted once and refused to another master; data only
// from the owner; bytes appear on the line in order, one word per 12
// clocks, with nulls filled in when data is late; release, drain and a
// backoff period in which reservation is refused; hold pending while busy,
// check refused until the hold is granted after backoff.
module tb_transmitter;
  import hrc_pkg::*;
  logic clk = 0, rst_n = 0;
  ts_bus_t bus;
  logic ack, tx_bit, reserved, packet_mode, in_backoff, null_sent;
  int checks = 0, failures = 0;
  localparam int BO = 24;

  transmitter #(.ID(3'd2), .BACKOFF_BITS(BO)) dut (
    .clk, .rst_n, .bus, .download(1'b0), .ack, .tx_bit, .reserved,
    .packet_mode, .in_backoff, .null_sent);
  line_mon mon (.clk, .rst_n, .line(tx_bit));

  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // one minor cycle with the given command; returns the acknowledge
  task automatic cyc(input logic [3:0] m, input ts_cmd_e c, input logic [3:0] a,
                     input logic [8:0] d, output logic k);
    @(negedge clk);
    bus = '{master: m, cmd: c, addr: a, data: d};
    #1 k = ack;
    @(posedge clk); #1;
    bus.cmd = CMD_NOP;
  endtask
  task automatic idle(int n);
    repeat (n) begin @(negedge clk); bus.cmd = CMD_NOP; end
  endtask

  logic k;
  int ones;
  logic [8:0] pkt [6] = '{K_SOP, 9'h041, 9'h001, 9'h0FF, 9'h000, K_EOP};
  logic [8:0] got [$];
  initial begin
    bus = '{master: 4'd0, cmd: CMD_NOP, addr: 4'd2, data: 9'h0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    ones = 0;
    repeat (40) begin @(posedge clk); ones += tx_bit; end
    chk(ones == 0, "sync mode sends zeros");
    cyc(4'd3, CMD_DATA, 4'd2, 9'h055, k); chk(!k, "data refused when not reserved");
    cyc(4'd1, CMD_RES_REQ, 4'd2, 9'h0, k); chk(k, "reservation granted");
    chk(reserved, "reserved");
    cyc(4'd3, CMD_RES_REQ, 4'd2, 9'h0, k); chk(!k, "second reservation refused");
    cyc(4'd3, CMD_RES_REQ, 4'd5, 9'h0, k); chk(!k, "other address not acknowledged");
    cyc(4'd3, CMD_DATA, 4'd2, 9'h055, k); chk(!k, "data from non-owner refused");
    idle(30);
    chk(!packet_mode && mon.q.size() == 0, "still sync until first byte");
    // owner sends bytes once every 12 clocks (its slot); a gap forces nulls
    for (int i = 0; i < 6; i++) begin
      cyc(4'd1, CMD_DATA, 4'd2, pkt[i], k); chk(k, $sformatf("byte %0d accepted", i));
      idle(i == 2 ? 47 : 11);
      if (i == 0) chk(packet_mode, "packet mode after first byte");
    end
    cyc(4'd1, CMD_RES_REL, 4'd2, 9'h0, k); chk(k, "release acknowledged");
    cyc(4'd7, CMD_RES_REQ, 4'd2, 9'h0, k); chk(!k, "not reservable after release");
    wait (in_backoff);
    cyc(4'd7, CMD_RES_REQ, 4'd2, 9'h0, k); chk(!k, "not reservable in backoff");
    wait (!in_backoff);
    @(negedge clk);
    chk(!reserved && !packet_mode, "free again after backoff");
    // line contents: the six bytes in order, nulls only between them
    foreach (mon.q[i]) if (mon.q[i] != K_NULL) got.push_back(mon.q[i]);
    chk(got.size() == 6, $sformatf("6 bytes on the line, got %0d", got.size()));
    foreach (got[i]) if (i < 6) chk(got[i] == pkt[i], $sformatf("byte %0d = %h", i, got[i]));
    chk(mon.q.size() > 6, "null words inserted when data is late");
    chk(mon.bad == 0, "pad bits zero");
    for (int i = 1; i < mon.t.size(); i++)
      chk(mon.t[i] - mon.t[i-1] == 12, "one line word per major cycle in packet mode");
    // hold / check
    cyc(4'd2, CMD_RES_REQ, 4'd2, 9'h0, k); chk(k, "reserved by master 2");
    cyc(4'd10, CMD_HOLD, 4'd2, 9'h0, k); chk(k, "hold acknowledged");
    cyc(4'd10, CMD_CHECK, 4'd2, 9'h0, k); chk(!k, "check: hold still pending");
    cyc(4'd2, CMD_DATA, 4'd2, K_SOP, k); chk(k, "data");
    idle(12);
    cyc(4'd2, CMD_RES_REL, 4'd2, 9'h0, k); chk(k, "release");
    wait (in_backoff); wait (!in_backoff); @(negedge clk);
    cyc(4'd10, CMD_CHECK, 4'd2, 9'h0, k); chk(k, "check: hold granted after backoff");
    cyc(4'd3, CMD_RES_REQ, 4'd2, 9'h0, k); chk(!k, "held transmitter refuses others");
    cyc(4'd10, CMD_RES_REL, 4'd2, 9'h0, k); chk(k, "IM releases");
    cyc(4'd3, CMD_RES_REQ, 4'd2, 9'h0, k); chk(k, "free after IM release without packet");
    cyc(4'd11, CMD_HOLD, 4'd2, 9'h0, k); chk(k, "hold on busy transmitter");
    cyc(4'd3, CMD_RES_REL, 4'd2, 9'h0, k); chk(k, "release unused reservation");
    cyc(4'd11, CMD_CHECK, 4'd2, 9'h0, k); chk(k, "hold granted when the unused reservation is released");
    cyc(4'd3, CMD_RES_REQ, 4'd2, 9'h0, k); chk(!k, "IM owns it now");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
