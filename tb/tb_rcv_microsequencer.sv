// tb_rcv_microsequencer: loads a short test program through the download
// port and checks the order and timing of what it does: load constant,
// jump with link and return, set flags and jump on a flag (skipping a
// word), a FIFO push stalled by a full FIFO, a Wait released by a byte,
// an ALU operation with write-back, a bus command stalled by a pending
// command, a Wait left through its exception handler on a DDU error, and a
// jump on the inverted acknowledge flag that first waits for the pending
// bus command. One instruction per clock.
module tb_rcv_microsequencer;
  import hrc_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic dl_we = 0; logic [5:0] dl_addr = 0; logic [15:0] dl_data = 0;
  logic flag_z = 0, flag_n = 0, flag_c = 0, ack_flag = 0, buf_valid = 0;
  logic [8:0] buf_data = 0;
  logic fifo_empty = 1, fifo_full = 1, cmd_busy = 1, ddu_err = 0;
  src_e src_sel; logic src_rd; logic [8:0] src_val;
  logic wr_en; dst_e wr_sel; logic [8:0] wr_data;
  logic alu_en; alu_op_e alu_op; logic alu_wb;
  logic fifo_push; logic [8:0] fifo_din; logic buscmd_we; logic [7:0] buscmd;
  logic [5:0] pc; logic [3:0] uflags; logic stall, exc_taken;
  int checks = 0, failures = 0;

  rcv_microsequencer #(.WCS_DEPTH(64), .WCS_WIDTH(16)) dut (.*);

  // registers as seen by the sequencer: R0..R3 = 0x010..0x013
  assign src_val = (src_sel inside {SRC_R0, SRC_R1, SRC_R2, SRC_R3}) ? 9'h010 + 9'(int'(src_sel) - 1) : 9'h000;

  always #5 clk = ~clk;
  initial begin #300000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  string ev [$]; longint evt [$];
  longint cyc = 0;
  int n_exc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && run) begin
      if (wr_en)     begin ev.push_back($sformatf("wr %0d %h", wr_sel, wr_data)); evt.push_back(cyc); end
      if (fifo_push) begin ev.push_back($sformatf("fifo %h", fifo_din)); evt.push_back(cyc); end
      if (alu_en)    begin ev.push_back($sformatf("alu %0d %0d %0d", alu_op, src_sel, alu_wb)); evt.push_back(cyc); end
      if (buscmd_we) begin ev.push_back($sformatf("bus %h", buscmd)); evt.push_back(cyc); end
      n_exc += exc_taken;
    end
  end

  logic [15:0] prog [15];
  longint t0;
  initial begin
    prog[0]  = u_ldc(DST_R1, 9'h123);
    prog[1]  = u_jmp(1'b1, 6'd5);
    prog[2]  = u_setf(4'b0000, 4'b0001);
    prog[3]  = u_jcc(CC_F0, 1'b0, 6'd7);
    prog[4]  = u_ldc(DST_R0, 9'h0AA);
    prog[5]  = u_xfer(SRC_R2, DST_FIFO);
    prog[6]  = u_ret();
    prog[7]  = u_wait(EV_BYTE, 1'b1, 6'd12);
    prog[8]  = u_alu(ALU_ADD, SRC_R3, 1'b1);
    prog[9]  = u_ldc(DST_BUSCMD, 9'h012);
    prog[10] = u_wait(EV_NEVER, 1'b1, 6'd12);
    prog[11] = u_jmp(1'b0, 6'd11);
    prog[12] = u_jcc(CC_ACK, 1'b1, 6'd14);
    prog[13] = u_jmp(1'b0, 6'd13);
    prog[14] = u_jmp(1'b0, 6'd14);
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); dl_we = 1; dl_addr = 6'(i); dl_data = prog[i];
    end
    @(negedge clk); dl_we = 0;
    run = 1; t0 = cyc;
    repeat (12) @(negedge clk);
    chk(stall && pc == 6'd6, "stalled on push into full FIFO");
    fifo_full = 0;
    repeat (8) @(negedge clk);
    chk(stall, "waiting for a byte");
    buf_valid = 1;
    @(negedge clk); buf_valid = 0;
    repeat (6) @(negedge clk);
    chk(stall, "bus command waits for pending command");
    cmd_busy = 0;
    repeat (6) @(negedge clk);
    chk(stall, "Wait NEVER stalls");
    cmd_busy = 1;
    ddu_err = 1; @(negedge clk); ddu_err = 0;
    repeat (6) @(negedge clk);
    chk(stall && pc == 6'd13, $sformatf("ACK test waits for the pending command (pc %0d)", pc));
    cmd_busy = 0;
    repeat (4) @(negedge clk);
    chk(ev.size() == 4, $sformatf("4 actions, got %0d", ev.size()));
    if (ev.size() == 4) begin
      chk(ev[0] == "wr 2 123", ev[0]);
      chk(ev[1] == "fifo 012", ev[1]);
      chk(ev[2] == $sformatf("alu %0d %0d 1", ALU_ADD, SRC_R3), ev[2]);
      chk(ev[3] == "bus 12", ev[3]);
      chk(evt[0] - t0 == 1, $sformatf("first instruction executes one clock after start (%0d)", evt[0] - t0));
    end
    chk(n_exc == 1, "one exception taken");
    chk(pc == 6'd15, $sformatf("ends in loop at 14 (pc %0d)", pc));
    chk(uflags == 4'b0001, "F0 set");
    // back to download: sequencer held at 0
    run = 0; @(negedge clk); @(negedge clk);
    chk(pc == 0, "held at address 0 when not running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
