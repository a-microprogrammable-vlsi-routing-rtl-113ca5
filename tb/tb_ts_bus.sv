// tb_ts_bus: checks the time-slice bus controller. Every master offers a
// distinct command/address/data; the test checks that the bus-master lines
// step 0..11 and wrap, that the bus carries exactly the current master's
// offer, that major_start marks slot 0 every twelve cycles, that download
// mode gives every cycle to the interface manager, and that the
// acknowledge line is the OR of the slave answers.
module tb_ts_bus;
  import hrc_pkg::*;
  logic clk = 0, rst_n = 0, download = 0;
  ts_req_t req [NMASTERS];
  logic [NMASTERS-1:0] sack;
  ts_bus_t bus;
  logic ack, major_start;
  int checks = 0, failures = 0;

  ts_bus dut (.clk, .rst_n, .download, .req, .slave_ack(sack), .bus, .ack, .major_start);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int unsigned exp_slot;
  initial begin
    for (int m = 0; m < int'(NMASTERS); m++)
      req[m] = '{cmd: ts_cmd_e'((m % 5) + 1), addr: 4'(m), data: 9'(m * 17 + 3)};
    sack = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    exp_slot = 0;
    for (int c = 0; c < 60; c++) begin
      @(negedge clk);
      // at negedge the slot has advanced from the previous posedge
      exp_slot = (c + 1) % 12;
      chk(bus.master == 4'(exp_slot), $sformatf("master %0d exp %0d", bus.master, exp_slot));
      chk(bus.cmd == req[exp_slot].cmd && bus.addr == req[exp_slot].addr &&
          bus.data == req[exp_slot].data, "bus carries the slot owner's offer");
      chk(major_start == (exp_slot == 0), "major_start");
      sack = '0;
      chk(ack == 1'b0, "no ack");
      sack[c % 12] = 1'b1;
      #1 chk(ack == 1'b1, "ack is OR of slave answers");
      sack = '0;
    end
    download = 1;
    for (int c = 0; c < 15; c++) begin
      @(negedge clk);
      chk(bus.master == M_IM0 && bus.data == req[M_IM0].data, "download: IM owns the bus");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
