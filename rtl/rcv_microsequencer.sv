// rcv_microsequencer: the microprogrammed controller of a receiver.
//
// Parts: a writable control store (WCS_DEPTH words of 16 bits, loaded over
// the TS bus in download mode), a pipeline unit (the instruction register
// holds the word being executed while the next word is fetched), a
// controlling decoder (a PLA in the source design) and a flag unit (four
// user flags, a sticky DDU-error flag, the link register).
//
// Instruction set (opcode in bits 15:13, fields in hrc_pkg):
//   WAIT  event [,exception handler]  stall until the event; if the
//         exception is enabled and a DDU error is pending, jump to the
//         handler instead (a pseudo-interrupt) and clear the error
//   JCC   condition, invert, target   jump when the condition holds
//   JMP   [link], target              link saves the return address
//   RET                               return to the link address
//                                     (single-level procedure calls)
//   ALU   op, source [,write back]    ACC <= ACC op source
//   LDC   destination, 9-bit constant
//   XFER  source, destination
//   SETF  clear mask, set mask        user flags F0..F3
// A destination is ACC, R0..R3, the FIFO or the bus command register.
// Timing: one instruction per clock. Jumps cost no extra clock because
// the target word is read from the control store in the same clock. An
// instruction stalls (PC and instruction register hold) while its WAIT
// event is false, while it reads an empty buffer register, pushes into a
// full FIFO, writes the bus command register while a command is still
// pending, or tests the ACK condition before the pending command has had
// its bus slot (so a reservation can be tested right after it is issued).
// With `run` low the sequencer is held at address 0.
//
// The instruction kinds, the 64 x 16 control store and the four parts are
// the source design's; the encoding, the event and condition lists and the
// stall rules are this design's.
module rcv_microsequencer
  import hrc_pkg::*;
#(
  parameter int unsigned WCS_DEPTH = 64,
  parameter int unsigned WCS_WIDTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  // download port
  input  logic       dl_we,
  input  logic [$clog2(WCS_DEPTH)-1:0] dl_addr,
  input  logic [WCS_WIDTH-1:0] dl_data,
  // condition inputs
  input  logic       flag_z,
  input  logic       flag_n,
  input  logic       flag_c,
  input  logic       ack_flag,
  input  logic       buf_valid,
  input  logic [8:0] buf_data,
  input  logic       fifo_empty,
  input  logic       fifo_full,
  input  logic       cmd_busy,
  input  logic       ddu_err,      // pulse from the DDU
  // data unit control
  output src_e       src_sel,
  output logic       src_rd,
  input  logic [8:0] src_val,
  output logic       wr_en,
  output dst_e       wr_sel,
  output logic [8:0] wr_data,
  output logic       alu_en,
  output alu_op_e    alu_op,
  output logic       alu_wb,
  // FIFO and bus interface control
  output logic       fifo_push,
  output logic [8:0] fifo_din,
  output logic       buscmd_we,
  output logic [7:0] buscmd,
  // observation
  output logic [$clog2(WCS_DEPTH)-1:0] pc,
  output logic [3:0] uflags,
  output logic       stall,
  output logic       exc_taken
);
  localparam int unsigned AW = $clog2(WCS_DEPTH);

  logic [WCS_WIDTH-1:0] wcs [WCS_DEPTH];
  logic [15:0] ir;
  logic        ir_v;
  logic [AW-1:0] lr;
  logic        err_pend;

  always_ff @(posedge clk) if (dl_we) wcs[dl_addr] <= dl_data;

  // ---------------- decoder ----------------
  uop_e       op;
  logic [5:0] tgt;
  assign op  = uop_e'(ir[15:13]);
  assign tgt = ir[5:0];

  logic ev_ok, cc, is_exc, jump;
  logic [AW-1:0] jtarget;
  logic [8:0] value;
  dst_e dst;
  logic writes;

  always_comb begin
    unique case (event_e'(ir[12:10]))
      EV_BYTE:       ev_ok = buf_valid;
      EV_CMD_DONE:   ev_ok = !cmd_busy;
      EV_FIFO_EMPTY: ev_ok = fifo_empty;
      EV_FIFO_NFULL: ev_ok = !fifo_full;
      EV_BUF_SOP:    ev_ok = buf_valid && buf_data == K_SOP;
      EV_BUF_EOP:    ev_ok = buf_valid && buf_data == K_EOP;
      EV_FIFO_FULL:  ev_ok = fifo_full;
      default:       ev_ok = 1'b0;
    endcase
    unique case (cond_e'(ir[12:9]))
      CC_Z:           cc = flag_z;
      CC_N:           cc = flag_n;
      CC_C:           cc = flag_c;
      CC_ACK:         cc = ack_flag;
      CC_BUF_SPECIAL: cc = buf_valid && buf_data[8];
      CC_BUF_SOP:     cc = buf_valid && buf_data == K_SOP;
      CC_BUF_EOP:     cc = buf_valid && buf_data == K_EOP;
      CC_FIFO_EMPTY:  cc = fifo_empty;
      CC_F0:          cc = uflags[0];
      CC_F1:          cc = uflags[1];
      CC_F2:          cc = uflags[2];
      CC_F3:          cc = uflags[3];
      CC_BYTE:        cc = buf_valid;
      CC_DDU_ERR:     cc = err_pend;
      CC_CMD_BUSY:    cc = cmd_busy;
      default:        cc = 1'b1;
    endcase
    cc = cc ^ ir[8];

    src_sel   = (op == OP_ALU) ? src_e'(ir[9:7]) : src_e'(ir[12:10]);
    dst       = (op == OP_LDC) ? dst_e'(ir[12:10]) : dst_e'(ir[9:7]);
    value     = (op == OP_LDC) ? ir[8:0] : src_val;
    writes    = ir_v && (op == OP_LDC || op == OP_XFER);
    is_exc    = ir_v && op == OP_WAIT && ir[9] && err_pend;

    // stall rules
    stall = 1'b0;
    if (ir_v) begin
      if (op == OP_WAIT && !ev_ok && !is_exc) stall = 1'b1;
      if ((op == OP_XFER || op == OP_ALU) && src_sel == SRC_BUF && !buf_valid) stall = 1'b1;
      if (writes && dst == DST_FIFO && fifo_full) stall = 1'b1;
      if (writes && dst == DST_BUSCMD && cmd_busy) stall = 1'b1;
      if (op == OP_JCC && cond_e'(ir[12:9]) == CC_ACK && cmd_busy) stall = 1'b1;
    end

    jump    = 1'b0;
    jtarget = tgt[AW-1:0];
    if (ir_v) begin
      unique case (op)
        OP_WAIT: jump = is_exc;
        OP_JCC:  jump = cc;
        OP_JMP:  jump = 1'b1;
        OP_RET:  begin jump = 1'b1; jtarget = lr; end
        default: jump = 1'b0;
      endcase
    end

    src_rd    = ir_v && !stall && (op == OP_XFER || op == OP_ALU);
    wr_en     = writes && !stall && dst inside {DST_ACC, DST_R0, DST_R1, DST_R2, DST_R3};
    wr_sel    = dst;
    wr_data   = value;
    alu_en    = ir_v && !stall && op == OP_ALU;
    alu_op    = alu_op_e'(ir[12:10]);
    alu_wb    = ir[6];
    fifo_push = writes && !stall && dst == DST_FIFO;
    fifo_din  = value;
    buscmd_we = writes && !stall && dst == DST_BUSCMD;
    buscmd    = value[7:0];
    exc_taken = is_exc;
  end

  // ---------------- pipeline unit and flag unit ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; ir <= '0; ir_v <= 1'b0; lr <= '0; uflags <= '0; err_pend <= 1'b0;
    end else if (!run) begin
      pc <= '0; ir_v <= 1'b0; uflags <= '0; err_pend <= 1'b0;
    end else begin
      if (ddu_err) err_pend <= 1'b1;
      else if (is_exc) err_pend <= 1'b0;
      if (!stall) begin
        if (jump) begin
          ir <= wcs[jtarget];
          pc <= jtarget + 1'b1;
        end else begin
          ir <= wcs[pc];
          pc <= pc + 1'b1;
        end
        ir_v <= 1'b1;
        if (ir_v && op == OP_JMP && ir[8]) lr <= pc;
        if (ir_v && op == OP_SETF) uflags <= (uflags & ~ir[7:4]) | ir[3:0];
      end
    end
  end

endmodule
