// tb_rcv_ts_if: checks the receiver's TS bus interface with the testbench
// playing bus controller and slaves. A refused and a granted reservation
// (ack flag, refusal pulse, destination), FIFO bytes streamed as DATA in
// the receiver's own slot only, one per major cycle, popped on
// acknowledge; release sent to the destination; control-store download
// (address, low byte, high byte, auto-increment).
module tb_rcv_ts_if;
  import hrc_pkg::*;
  localparam logic [3:0] ID = 4'd3;
  logic clk = 0, rst_n = 0, download = 0;
  ts_bus_t bus; logic bus_ack;
  logic buscmd_we = 0; logic [7:0] buscmd = 0;
  logic cmd_busy, ack_flag;
  logic [8:0] fifo_head; logic fifo_empty, fifo_pop;
  ts_req_t req; logic slave_ack;
  logic dl_we; logic [5:0] dl_addr; logic [15:0] dl_data;
  logic dest_valid; logic [3:0] dest; logic res_denied;
  int checks = 0, failures = 0;

  rcv_ts_if #(.ID(ID), .WCS_DEPTH(64)) dut (.*);

  always #5 clk = ~clk;
  initial begin #300000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  // bus controller model
  logic [3:0] slot = 0;
  ts_bus_t im_bus;
  always @(posedge clk) slot <= (slot == 11) ? 4'd0 : slot + 4'd1;
  always_comb begin
    if (download) bus = im_bus;
    else if (slot == ID) bus = '{master: slot, cmd: req.cmd, addr: req.addr, data: req.data};
    else bus = '{master: slot, cmd: CMD_NOP, addr: 4'd0, data: 9'd0};
  end
  // slaves: transmitter 0 busy, transmitter 1 free, data always taken
  logic [8:0] fq [$];
  assign fifo_empty = (fq.size() == 0);
  assign fifo_head  = fifo_empty ? 9'h0 : fq[0];
  always_comb begin
    bus_ack = 0;
    if (download) bus_ack = slave_ack;
    else if (bus.cmd == CMD_RES_REQ) bus_ack = (bus.addr == 4'd1);
    else if (bus.cmd inside {CMD_DATA, CMD_RES_REL}) bus_ack = 1;
  end
  logic [8:0] sent [$]; longint sent_t [$]; longint cyc = 0;
  int n_rel = 0, n_denied = 0, wrong_slot = 0;
  logic [3:0] rel_addr;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !download && bus.cmd == CMD_DATA) begin sent.push_back(bus.data); sent_t.push_back(cyc); end
    if (!download && bus.cmd != CMD_NOP && bus.master != ID) wrong_slot++;
    if (!download && bus.cmd == CMD_RES_REL) begin n_rel++; rel_addr = bus.addr; end
    if (fifo_pop) void'(fq.pop_front());
    if (rst_n) n_denied += res_denied;
  end

  task automatic cmd(ts_cmd_e c, logic [3:0] a);
    @(negedge clk); buscmd_we = 1; buscmd = {c, a};
    @(negedge clk); buscmd_we = 0;
    chk(cmd_busy, "command pending");
    wait (!cmd_busy); @(negedge clk);
  endtask

  initial begin
    im_bus = '{master: M_IM0, cmd: CMD_NOP, addr: 4'd0, data: 9'd0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    cmd(CMD_RES_REQ, 4'd0);
    chk(!ack_flag && !dest_valid, "refused reservation");
    for (int i = 0; i < 5; i++) fq.push_back(9'h0A0 + 9'(i));
    repeat (30) @(negedge clk);
    chk(sent.size() == 0 && fq.size() == 5, "no data without a destination");
    chk(n_denied == 1, "refusal reported");
    cmd(CMD_RES_REQ, 4'd1);
    chk(ack_flag && dest_valid && dest == 4'd1, "granted reservation sets destination");
    repeat (70) @(negedge clk);
    chk(sent.size() == 5, $sformatf("five bytes streamed, got %0d", sent.size()));
    foreach (sent[i]) chk(sent[i] == 9'h0A0 + 9'(i), "byte order");
    for (int i = 1; i < sent_t.size(); i++) chk(sent_t[i] - sent_t[i-1] == 12, "one byte per major cycle");
    chk(wrong_slot == 0, "drives the bus only in its own slot");
    cmd(CMD_RES_REL, 4'd9);
    chk(n_rel == 1 && rel_addr == 4'd1 && !dest_valid, "release goes to the destination");
    // download
    download = 1;
    @(negedge clk); im_bus = '{master: M_IM0, cmd: CMD_DL_ADDR, addr: ID, data: 9'd5};
    @(negedge clk); im_bus.cmd = CMD_DL_LO; im_bus.data = 9'h034;
    @(negedge clk); im_bus.cmd = CMD_DL_HI; im_bus.data = 9'h012;
    #1 chk(dl_we && dl_addr == 6'd5 && dl_data == 16'h1234 && slave_ack, "download writes word 5");
    @(negedge clk); im_bus.cmd = CMD_DL_LO; im_bus.data = 9'h0CD;
    @(negedge clk); im_bus.cmd = CMD_DL_HI; im_bus.data = 9'h0AB;
    #1 chk(dl_we && dl_addr == 6'd6 && dl_data == 16'hABCD, "address advances");
    @(negedge clk); im_bus.cmd = CMD_DL_HI; im_bus.addr = 4'd2;
    #1 chk(!dl_we && !slave_ack, "other receiver's download ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
