// hrc_pkg: types and constants shared by the HARTS routing controller.
//
// The routing controller joins six receivers and six transmitters over a
// time-slice (TS) bus. This package fixes the TS bus bundle (bus-master
// slot, 4-bit command, 4-bit address = tee bit + 3-bit slave, 9-bit data),
// the command and slave codes, the 12-bit serial line word and the
// microinstruction format of the receiver's microsequencer.
//
// From the source design: 6 receivers and 6 transmitters, 4 BMU outbound
// channels, a 12-minor-cycle major cycle, 4 address / 4 control / 9 data /
// 1 acknowledge lines, address MSB as the "tee" bit, SOP/EOP/null bytes,
// 64 x 16-bit control store, an eight-word FIFO. Every code value, the line
// word layout and the instruction encoding are choices of this design.
package hrc_pkg;

  localparam int unsigned NPORTS    = 6;   // receivers = transmitters = neighbours
  localparam int unsigned NBMU_OUT  = 4;   // BMU outbound channels (bus masters)
  localparam int unsigned NSLOTS    = 12;  // minor cycles per major cycle
  localparam int unsigned NMASTERS  = 12;  // one requester per slot

  // Bus master slot numbers: receivers 0..5, BMU outbound channels 6..9,
  // interface manager 10..11.
  localparam logic [3:0] M_BMU0 = 4'd6;
  localparam logic [3:0] M_IM0  = 4'd10;
  localparam logic [3:0] M_IM1  = 4'd11;

  // Slave numbers on the low three address lines.
  localparam logic [2:0] S_BMU  = 3'd6;    // BMU inbound channel
  localparam logic [2:0] S_NONE = 3'd7;

  typedef enum logic [3:0] {
    CMD_NOP     = 4'h0,
    CMD_RES_REQ = 4'h1,   // reservation request
    CMD_RES_REL = 4'h2,   // reservation release
    CMD_DATA    = 4'h3,   // one packet byte to the addressed slave
    CMD_HOLD    = 4'h4,   // IM: reserve at end of current packet
    CMD_CHECK   = 4'h5,   // IM: ack = hold granted
    CMD_DL_ADDR = 4'h8,   // download: set control-store address
    CMD_DL_LO   = 4'h9,   // download: low byte of a word
    CMD_DL_HI   = 4'hA    // download: high byte, writes the word
  } ts_cmd_e;

  // One minor cycle on the TS bus (everything but the acknowledge line).
  typedef struct packed {
    logic [3:0] master;   // bus master lines: slot owner
    ts_cmd_e    cmd;      // control lines
    logic [3:0] addr;     // [3] tee, [2:0] slave
    logic [8:0] data;     // [8] special-byte flag, [7:0] byte
  } ts_bus_t;

  // What one master offers for its slot.
  typedef struct packed {
    ts_cmd_e    cmd;
    logic [3:0] addr;
    logic [8:0] data;
  } ts_req_t;

  localparam ts_req_t TS_IDLE = '{cmd: CMD_NOP, addr: 4'h0, data: 9'h000};

  // Special bytes (flag bit set).
  localparam logic [8:0] K_NULL = 9'h100;
  localparam logic [8:0] K_SOP  = 9'h101;
  localparam logic [8:0] K_EOP  = 9'h102;

  // Serial line word, sent MSB first: start bit 1, flag, byte, two pad zeros.
  localparam int unsigned WORD_BITS = 12;

  function automatic logic [WORD_BITS-1:0] pad_word(input logic [8:0] b);
    return {1'b1, b, 2'b00};
  endfunction

  // ---------------- microinstruction format (16 bits) ----------------
  typedef enum logic [2:0] {
    OP_WAIT = 3'd0,  // [12:10] event, [9] exception enable, [5:0] handler
    OP_JCC  = 3'd1,  // [12:9] condition, [8] invert, [5:0] target
    OP_JMP  = 3'd2,  // [8] link, [5:0] target
    OP_RET  = 3'd3,
    OP_ALU  = 3'd4,  // [12:10] alu op, [9:7] source, [6] write back to source register
    OP_LDC  = 3'd5,  // [12:10] destination, [8:0] immediate
    OP_XFER = 3'd6,  // [12:10] source, [9:7] destination
    OP_SETF = 3'd7   // [7:4] clear mask, [3:0] set mask (user flags F0..F3)
  } uop_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR = 3'd3,
    ALU_XOR = 3'd4, ALU_PASS = 3'd5, ALU_INC = 3'd6, ALU_DEC = 3'd7
  } alu_op_e;

  // Sources: ACC, R0..R3, BUF (DDU buffer, read consumes it), ZERO.
  typedef enum logic [2:0] {
    SRC_ACC = 3'd0, SRC_R0 = 3'd1, SRC_R1 = 3'd2, SRC_R2 = 3'd3,
    SRC_R3 = 3'd4, SRC_BUF = 3'd5, SRC_STAT = 3'd6, SRC_ZERO = 3'd7
  } src_e;

  // Destinations: ACC, R0..R3, FIFO push, bus command register, none.
  typedef enum logic [2:0] {
    DST_ACC = 3'd0, DST_R0 = 3'd1, DST_R1 = 3'd2, DST_R2 = 3'd3,
    DST_R3 = 3'd4, DST_FIFO = 3'd5, DST_BUSCMD = 3'd6, DST_NONE = 3'd7
  } dst_e;

  typedef enum logic [2:0] {
    EV_BYTE = 3'd0, EV_CMD_DONE = 3'd1, EV_FIFO_EMPTY = 3'd2, EV_FIFO_NFULL = 3'd3,
    EV_BUF_SOP = 3'd4, EV_BUF_EOP = 3'd5, EV_FIFO_FULL = 3'd6, EV_NEVER = 3'd7
  } event_e;

  typedef enum logic [3:0] {
    CC_Z = 4'd0, CC_N = 4'd1, CC_C = 4'd2, CC_ACK = 4'd3,
    CC_BUF_SPECIAL = 4'd4, CC_BUF_SOP = 4'd5, CC_BUF_EOP = 4'd6, CC_FIFO_EMPTY = 4'd7,
    CC_F0 = 4'd8, CC_F1 = 4'd9, CC_F2 = 4'd10, CC_F3 = 4'd11,
    CC_BYTE = 4'd12, CC_DDU_ERR = 4'd13, CC_CMD_BUSY = 4'd14, CC_TRUE = 4'd15
  } cond_e;

  // Microcode assembler helpers (used by testbenches to build programs).
  function automatic logic [15:0] u_wait(event_e ev, logic exc, logic [5:0] h);
    return {OP_WAIT, ev, exc, 3'b000, h};
  endfunction
  function automatic logic [15:0] u_jcc(cond_e c, logic inv, logic [5:0] t);
    return {OP_JCC, c, inv, 2'b00, t};
  endfunction
  function automatic logic [15:0] u_jmp(logic link, logic [5:0] t);
    return {OP_JMP, 4'b0000, link, 2'b00, t};
  endfunction
  function automatic logic [15:0] u_ret();
    return {OP_RET, 13'h0};
  endfunction
  function automatic logic [15:0] u_alu(alu_op_e op, src_e s, logic wb);
    return {OP_ALU, op, s, wb, 6'h00};
  endfunction
  function automatic logic [15:0] u_ldc(dst_e d, logic [8:0] imm);
    return {OP_LDC, d, 1'b0, imm};
  endfunction
  function automatic logic [15:0] u_xfer(src_e s, dst_e d);
    return {OP_XFER, s, d, 7'h00};
  endfunction
  function automatic logic [15:0] u_setf(logic [3:0] clr, logic [3:0] set);
    return {OP_SETF, 5'h00, clr, set};
  endfunction
  function automatic logic [8:0] mk_buscmd(ts_cmd_e c, logic [3:0] a);
    return {1'b0, c, a};
  endfunction

endpackage
