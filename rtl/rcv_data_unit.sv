// rcv_data_unit: the receiver's data unit.
//
// Holds the accumulator (8 bits), four general registers R0..R3 (9 bits,
// so a special-byte flag survives a copy) and the buffer register that the
// data detection unit fills with each received byte. The microsequencer
// selects one source (ACC, R0..R3, BUF, a status byte or zero) that appears
// combinationally on `src_val`; it may write a 9-bit value into ACC or a
// register, and it may run the ALU: ACC <= ACC op source, with zero,
// negative (bit 7) and carry flags. With `alu_wb` the ALU result is also
// written into the source register, so a routing offset can be
// incremented or decremented in place.
//
// The buffer register is marked full when the DDU delivers a byte and
// empty when the microsequencer reads it (`src_rd` with source BUF); a byte
// that arrives while it is still full sets the sticky `overrun` flag. A
// read and a new byte in the same clock keep the new byte.
//
// ALU, accumulator, four registers and the buffer register are the source
// design's; widths, the ALU operation set and the flags are this design's.
module rcv_data_unit
  import hrc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // DDU side
  input  logic       ddu_valid,
  input  logic [8:0] ddu_byte,
  // microsequencer side
  input  src_e       src_sel,
  input  logic       src_rd,       // the selected source is consumed this clock
  input  logic [7:0] status,       // value read as SRC_STAT
  output logic [8:0] src_val,
  input  logic       wr_en,
  input  dst_e       wr_sel,       // DST_ACC or DST_R0..DST_R3
  input  logic [8:0] wr_data,
  input  logic       alu_en,
  input  alu_op_e    alu_op,
  input  logic       alu_wb,
  // state
  output logic [7:0] acc,
  output logic       flag_z,
  output logic       flag_n,
  output logic       flag_c,
  output logic       buf_valid,
  output logic [8:0] buf_data,
  output logic       overrun
);

  logic [8:0] r [4];

  always_comb begin
    unique case (src_sel)
      SRC_ACC:  src_val = {1'b0, acc};
      SRC_R0:   src_val = r[0];
      SRC_R1:   src_val = r[1];
      SRC_R2:   src_val = r[2];
      SRC_R3:   src_val = r[3];
      SRC_BUF:  src_val = buf_data;
      SRC_STAT: src_val = {1'b0, status};
      default:  src_val = 9'h000;
    endcase
  end

  // ALU
  logic [8:0] alu_res;
  always_comb begin
    unique case (alu_op)
      ALU_ADD:  alu_res = {1'b0, acc} + {1'b0, src_val[7:0]};
      ALU_SUB:  alu_res = {1'b0, acc} - {1'b0, src_val[7:0]};
      ALU_AND:  alu_res = {1'b0, acc & src_val[7:0]};
      ALU_OR:   alu_res = {1'b0, acc | src_val[7:0]};
      ALU_XOR:  alu_res = {1'b0, acc ^ src_val[7:0]};
      ALU_PASS: alu_res = {1'b0, src_val[7:0]};
      ALU_INC:  alu_res = {1'b0, acc} + 9'd1;
      default:  alu_res = {1'b0, acc} - 9'd1;     // ALU_DEC
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; flag_z <= 1'b1; flag_n <= 1'b0; flag_c <= 1'b0;
      for (int i = 0; i < 4; i++) r[i] <= '0;
    end else begin
      if (alu_en) begin
        acc    <= alu_res[7:0];
        flag_z <= (alu_res[7:0] == 8'h00);
        flag_n <= alu_res[7];
        flag_c <= alu_res[8];
        if (alu_wb && src_sel inside {SRC_R0, SRC_R1, SRC_R2, SRC_R3})
          r[int'(src_sel) - 1] <= {1'b0, alu_res[7:0]};
      end else if (wr_en) begin
        if (wr_sel == DST_ACC) acc <= wr_data[7:0];
        else if (wr_sel inside {DST_R0, DST_R1, DST_R2, DST_R3})
          r[int'(wr_sel) - 1] <= wr_data;
      end
    end
  end

  // buffer register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_valid <= 1'b0; buf_data <= '0; overrun <= 1'b0;
    end else begin
      if (src_rd && src_sel == SRC_BUF) buf_valid <= 1'b0;
      if (ddu_valid) begin
        buf_data  <= ddu_byte;
        buf_valid <= 1'b1;
        if (buf_valid && !(src_rd && src_sel == SRC_BUF)) overrun <= 1'b1;
      end
    end
  end

endmodule
