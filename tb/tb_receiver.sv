// tb_receiver: one receiver with the testbench as bus controller, IM and
// slaves. The HARTS routing microprogram is downloaded over the bus; a
// packet with offsets (1,1,0) arrives on the serial input while
// transmitter 0 refuses reservations, so the receiver must reserve the
// alternate transmitter 1, forward the packet there with offsets (1,0,0)
// and release it afterwards. A second packet with (0,0,0) must go to the
// BMU unchanged. Data leave only in the receiver's own slot, at most one
// byte per major cycle.
module tb_receiver;
  import hrc_pkg::*;
  import hrc_ucode_pkg::*;
  localparam logic [3:0] ID = 4'd2;
  logic clk = 0, rst_n = 0, download = 0, rx_bit = 0, rx_valid = 1;
  ts_bus_t bus; logic bus_ack;
  ts_req_t req; logic slave_ack;
  logic [1:0] ddu_mode; logic ddu_err, res_denied, exc_taken, dest_valid, overrun;
  logic [3:0] dest; logic [5:0] upc;
  int checks = 0, failures = 0;

  receiver #(.ID(ID)) dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  logic [3:0] slot = 0;
  ts_bus_t im_bus;
  always @(posedge clk) slot <= (slot == 11) ? 4'd0 : slot + 4'd1;
  always_comb begin
    if (download) bus = im_bus;
    else if (slot == ID) bus = '{master: slot, cmd: req.cmd, addr: req.addr, data: req.data};
    else bus = '{master: slot, cmd: CMD_NOP, addr: 4'd0, data: 9'd0};
    bus_ack = 0;
    if (download) bus_ack = slave_ack;
    else if (bus.cmd == CMD_RES_REQ) bus_ack = (bus.addr != 4'd0);
    else if (bus.cmd inside {CMD_DATA, CMD_RES_REL}) bus_ack = 1;
  end

  logic [8:0] to_slave [8][$];
  string log [$];
  longint cyc = 0, last_data = -100;
  int fast = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !download && bus.cmd == CMD_DATA) begin
      to_slave[bus.addr[2:0]].push_back(bus.data);
      if (cyc - last_data < 12) fast++;
      last_data = cyc;
    end
    if (rst_n && !download && bus.cmd == CMD_RES_REQ) log.push_back($sformatf("req %0d %0d", bus.addr, bus_ack));
    if (rst_n && !download && bus.cmd == CMD_RES_REL) log.push_back($sformatf("rel %0d", bus.addr));
  end

  logic sq [$];
  always @(negedge clk) rx_bit = (sq.size() > 0) ? sq.pop_front() : 1'b0;
  task automatic send_word(logic [8:0] w);
    logic [11:0] x;
    x = {1'b1, w, 2'b00};
    for (int i = 11; i >= 0; i--) sq.push_back(x[i]);
  endtask
  task automatic im(ts_cmd_e c, logic [8:0] d);
    @(negedge clk); im_bus = '{master: M_IM0, cmd: c, addr: ID, data: d};
  endtask

  logic [8:0] exp1 [$] = '{K_SOP, 9'h021, 9'h001, 9'h000, 9'h000, 9'h0DE, 9'h0AD, K_EOP};
  logic [8:0] exp2 [$] = '{K_SOP, 9'h022, 9'h000, 9'h000, 9'h000, 9'h0BE, K_EOP};
  initial begin
    im_bus = '{master: M_IM0, cmd: CMD_NOP, addr: 4'd0, data: 9'd0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    download = 1;
    im(CMD_DL_ADDR, 9'd0);
    for (int a = 0; a < int'(UC_LEN); a++) begin
      logic [15:0] w;
      w = harts_word(a);
      im(CMD_DL_LO, {1'b0, w[7:0]});
      im(CMD_DL_HI, {1'b0, w[15:8]});
    end
    @(negedge clk); download = 0;
    repeat (20) @(negedge clk);
    chk(upc == 6'd1, "program waits for the first byte");
    foreach (exp1[i]) send_word(i == 2 ? 9'h001 : i == 3 ? 9'h001 : exp1[i]);
    repeat (20) sq.push_back(1'b0);
    foreach (exp2[i]) send_word(exp2[i]);
    repeat (600) @(negedge clk);
    chk(to_slave[1].size() == exp1.size(), $sformatf("packet 1 to transmitter 1: %0d bytes", to_slave[1].size()));
    foreach (exp1[i]) if (i < to_slave[1].size()) chk(to_slave[1][i] == exp1[i], $sformatf("p1 byte %0d", i));
    chk(to_slave[0].size() == 0, "nothing to the busy transmitter");
    chk(to_slave[6].size() == exp2.size(), "packet 2 to the BMU");
    foreach (exp2[i]) if (i < to_slave[6].size()) chk(to_slave[6][i] == exp2[i], $sformatf("p2 byte %0d", i));
    chk(log.size() == 5, $sformatf("bus commands: %0d", log.size()));
    if (log.size() == 5) begin
      chk(log[0] == "req 0 0", log[0]);
      chk(log[1] == "req 1 1", log[1]);
      chk(log[2] == "rel 1", log[2]);
      chk(log[3] == "req 6 1", log[3]);
      chk(log[4] == "rel 6", log[4]);
    end
    chk(fast == 0, "at most one byte per major cycle");
    chk(!overrun, "no buffer overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
