// tb_rcv_data_unit: random register writes and ALU operations against a
// reference model of ACC, R0..R3 and the Z/N/C flags, including write-back
// to the source register; then the buffer register: filled by the DDU,
// emptied by a read, overrun when a byte arrives on a full buffer.
module tb_rcv_data_unit;
  import hrc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ddu_valid = 0; logic [8:0] ddu_byte = 0;
  src_e src_sel = SRC_ZERO; logic src_rd = 0; logic [7:0] status = 8'h5C;
  logic [8:0] src_val;
  logic wr_en = 0; dst_e wr_sel = DST_ACC; logic [8:0] wr_data = 0;
  logic alu_en = 0; alu_op_e alu_op = ALU_ADD; logic alu_wb = 0;
  logic [7:0] acc; logic flag_z, flag_n, flag_c, buf_valid, overrun;
  logic [8:0] buf_data;
  int checks = 0, failures = 0;

  rcv_data_unit dut (.*);

  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  logic [7:0] macc; logic [8:0] mr [4]; logic mz, mn, mc;
  initial begin
    macc = 0; mz = 1; mn = 0; mc = 0;
    for (int i = 0; i < 4; i++) mr[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      logic [8:0] sv; logic [8:0] res; int s;
      @(negedge clk);
      s = $urandom % 5;                    // ACC or R0..R3
      src_sel = src_e'(s);
      sv = (s == 0) ? {1'b0, macc} : mr[s-1];
      #1 chk(src_val == sv, "source value");
      if ($urandom % 2) begin
        alu_en = 1; alu_op = alu_op_e'($urandom % 8); alu_wb = $urandom % 2;
        case (alu_op)
          ALU_ADD:  res = {1'b0, macc} + {1'b0, sv[7:0]};
          ALU_SUB:  res = {1'b0, macc} - {1'b0, sv[7:0]};
          ALU_AND:  res = {1'b0, macc & sv[7:0]};
          ALU_OR:   res = {1'b0, macc | sv[7:0]};
          ALU_XOR:  res = {1'b0, macc ^ sv[7:0]};
          ALU_PASS: res = {1'b0, sv[7:0]};
          ALU_INC:  res = {1'b0, macc} + 1;
          default:  res = {1'b0, macc} - 1;
        endcase
        macc = res[7:0]; mz = (res[7:0] == 0); mn = res[7]; mc = res[8];
        if (alu_wb && s > 0) mr[s-1] = {1'b0, res[7:0]};
      end else begin
        int d = $urandom % 5;
        wr_en = 1; wr_sel = dst_e'(d); wr_data = 9'($urandom);
        if (d == 0) macc = wr_data[7:0]; else mr[d-1] = wr_data;
      end
      @(posedge clk); #1 alu_en = 0; wr_en = 0;
      chk(acc == macc && flag_z == mz && flag_n == mn && flag_c == mc, "acc and flags");
    end
    @(negedge clk); src_sel = SRC_STAT; #1 chk(src_val == 9'h05C, "status source");
    src_sel = SRC_ZERO; #1 chk(src_val == 0, "zero source");
    // buffer register
    chk(!buf_valid && !overrun, "buffer empty after reset");
    @(negedge clk); ddu_valid = 1; ddu_byte = K_SOP; @(posedge clk); #1 ddu_valid = 0;
    chk(buf_valid && buf_data == K_SOP, "buffer filled by DDU");
    @(negedge clk); src_sel = SRC_BUF; #1 chk(src_val == K_SOP, "buffer as source");
    src_rd = 1; @(posedge clk); #1 src_rd = 0;
    chk(!buf_valid, "read empties buffer");
    @(negedge clk); ddu_valid = 1; ddu_byte = 9'h012; @(posedge clk); #1;
    ddu_byte = 9'h034; src_rd = 1; @(posedge clk); #1 ddu_valid = 0; src_rd = 0;
    chk(buf_valid && buf_data == 9'h034 && !overrun, "read and new byte in one clock");
    @(negedge clk); ddu_valid = 1; ddu_byte = 9'h056; @(posedge clk); #1 ddu_valid = 0;
    chk(overrun && buf_data == 9'h056, "overrun when buffer still full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
