// hrc_ucode_pkg: receiver microprograms, built with the assembler helpers
// of hrc_pkg.
//
// harts_word(a): word a of the HARTS shortest-path routing program.
// Packet layout: SOP, type, m0, m1, m2, payload..., EOP, where m_i is the
// signed hop count still to go along direction d_i (negative: along
// d_(i+3)). The type byte selects the delivery mode per message:
//   bit 7 = 1  circuit switching: wait (retry) until the first link on a
//              shortest path is free, never buffer;
//   bit 6 = 1  packet switching: always hand the packet to the BMU;
//   both 0     virtual cut-through.
// In cut-through mode the program tries the directions in the order m0,
// m1, m2: for the first non-zero m_i it asks for transmitter i (m_i > 0)
// or i+3 (m_i < 0); if the reservation is granted it moves m_i one step
// towards zero, otherwise it tries the next non-zero offset. With all
// offsets zero (packet has arrived) or every candidate busy it reserves
// the BMU and hands the packet over unchanged. It then streams the rest
// of the packet until EOP, waits for the FIFO to drain and releases the
// reservation. If the DDU aborts the packet while the program waits for a
// byte, the forwarded packet is closed with an EOP. The EOP is taken out
// of the buffer register at once, so the next packet can come in while the
// FIFO drains. All 64 words.
//
// tee_word(a): word a of a broadcast program. Every packet is forwarded
// unchanged on direction d0 with the tee address bit set, so the BMU gets
// a copy of each byte in the same bus cycles. 16 words.
//
// src_word(a): word a of a source-directed routing program. The three
// routing bytes hold the route itself: each is a port number 0..5 or an
// end marker (bit 7 set). A node sends the packet on the port named by the
// first byte and shifts the route left, filling in an end marker; a packet
// whose first byte is the end marker has arrived and goes to the BMU, as
// does a packet whose port is busy (header left unchanged). The port number
// is turned into a reservation command at run time (0x10 + port) and moved
// into the bus command register with a Transfer. 32 words.
//
// cube_word(a): word a of a dimension-order routing program for k-ary
// n-cubes with n <= 3 (mesh or torus). Offset m_i is the signed hop count
// still to go in dimension i; port i is the + direction of dimension i and
// port i+3 the - direction. The packet always moves in the lowest
// dimension with a non-zero offset; if that link is busy it is buffered in
// the BMU (no alternate dimension, which keeps the routing deadlock-free
// in the usual way). Offsets all zero: arrived, to the BMU. 55 words.
package hrc_ucode_pkg;
  import hrc_pkg::*;

  localparam int unsigned UC_LEN  = 64;
  localparam int unsigned TEE_LEN = 16;
  localparam int unsigned SRC_LEN = 32;
  localparam int unsigned CUBE_LEN = 55;

  function automatic logic [15:0] harts_word(int unsigned a);
    logic [15:0] p [64];
    for (int i = 0; i < 64; i++) p[i] = u_jmp(1'b0, 6'd0);
    p[0]  = u_wait(EV_BYTE, 1'b0, 6'd0);
    p[1]  = u_jcc(CC_BUF_SOP, 1'b0, 6'd4);
    p[2]  = u_xfer(SRC_BUF, DST_NONE);      // not a packet start: drop
    p[3]  = u_jmp(1'b0, 6'd0);
    p[4]  = u_xfer(SRC_BUF, DST_FIFO);      // SOP
    p[5]  = u_alu(ALU_PASS, SRC_BUF, 1'b0); // type -> ACC, N = bit 7
    p[6]  = u_xfer(SRC_ACC, DST_FIFO);
    p[7]  = u_jcc(CC_N, 1'b1, 6'd9);
    p[8]  = u_setf(4'b0000, 4'b0001);       // F0 = circuit switching
    p[9]  = u_alu(ALU_ADD, SRC_ACC, 1'b0);  // N = type bit 6
    p[10] = u_xfer(SRC_BUF, DST_R0);        // m0
    p[11] = u_xfer(SRC_BUF, DST_R1);        // m1
    p[12] = u_xfer(SRC_BUF, DST_R2);        // m2
    p[13] = u_jcc(CC_N, 1'b0, 6'd50);       // packet switching
    for (int i = 0; i < 3; i++) begin
      int unsigned b = 14 + 12 * i;
      src_e r = src_e'(int'(SRC_R0) + i);
      p[b+0]  = u_alu(ALU_PASS, r, 1'b0);
      p[b+1]  = u_jcc(CC_Z, 1'b0, 6'(b + 12));
      p[b+2]  = u_jcc(CC_N, 1'b0, 6'(b + 7));
      p[b+3]  = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REQ, 4'(i)));
      p[b+4]  = u_jcc(CC_ACK, 1'b1, 6'(b + 11));
      p[b+5]  = u_alu(ALU_DEC, r, 1'b1);
      p[b+6]  = u_jmp(1'b0, 6'd51);
      p[b+7]  = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REQ, 4'(i + 3)));
      p[b+8]  = u_jcc(CC_ACK, 1'b1, 6'(b + 11));
      p[b+9]  = u_alu(ALU_INC, r, 1'b1);
      p[b+10] = u_jmp(1'b0, 6'd51);
      p[b+11] = u_jcc(CC_F0, 1'b0, 6'(b));  // circuit: retry, else next offset
    end
    p[50] = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REQ, {1'b0, S_BMU}));
    p[51] = u_xfer(SRC_R0, DST_FIFO);
    p[52] = u_xfer(SRC_R1, DST_FIFO);
    p[53] = u_xfer(SRC_R2, DST_FIFO);
    p[54] = u_wait(EV_BYTE, 1'b1, 6'd59);
    p[55] = u_jcc(CC_BUF_EOP, 1'b0, 6'd58);
    p[56] = u_xfer(SRC_BUF, DST_FIFO);
    p[57] = u_jmp(1'b0, 6'd54);
    p[58] = u_xfer(SRC_BUF, DST_NONE);      // free the buffer for the next packet
    p[59] = u_ldc(DST_FIFO, K_EOP);         // end of packet, also after an abort
    p[60] = u_wait(EV_FIFO_EMPTY, 1'b0, 6'd0);
    p[61] = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REL, 4'h0));
    p[62] = u_setf(4'b0001, 4'b0000);
    p[63] = u_jmp(1'b0, 6'd0);
    return p[a];
  endfunction

  function automatic logic [15:0] tee_word(int unsigned a);
    logic [15:0] p [16];
    for (int i = 0; i < 16; i++) p[i] = u_jmp(1'b0, 6'd0);
    p[0]  = u_wait(EV_BYTE, 1'b0, 6'd0);
    p[1]  = u_jcc(CC_BUF_SOP, 1'b0, 6'd4);
    p[2]  = u_xfer(SRC_BUF, DST_NONE);
    p[3]  = u_jmp(1'b0, 6'd0);
    p[4]  = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REQ, 4'b1000));  // tee + d0
    p[5]  = u_jcc(CC_ACK, 1'b1, 6'd4);                            // retry
    p[6]  = u_xfer(SRC_BUF, DST_FIFO);                            // SOP
    p[7]  = u_wait(EV_BYTE, 1'b1, 6'd12);
    p[8]  = u_jcc(CC_BUF_EOP, 1'b0, 6'd11);
    p[9]  = u_xfer(SRC_BUF, DST_FIFO);
    p[10] = u_jmp(1'b0, 6'd7);
    p[11] = u_xfer(SRC_BUF, DST_NONE);
    p[12] = u_ldc(DST_FIFO, K_EOP);
    p[13] = u_wait(EV_FIFO_EMPTY, 1'b0, 6'd0);
    p[14] = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REL, 4'h0));
    p[15] = u_jmp(1'b0, 6'd0);
    return p[a];
  endfunction

  function automatic logic [15:0] cube_word(int unsigned a);
    logic [15:0] p [64];
    for (int i = 0; i < 64; i++) p[i] = u_jmp(1'b0, 6'd0);
    p[0]  = u_wait(EV_BYTE, 1'b0, 6'd0);
    p[1]  = u_jcc(CC_BUF_SOP, 1'b0, 6'd4);
    p[2]  = u_xfer(SRC_BUF, DST_NONE);
    p[3]  = u_jmp(1'b0, 6'd0);
    p[4]  = u_xfer(SRC_BUF, DST_FIFO);                  // SOP
    p[5]  = u_xfer(SRC_BUF, DST_FIFO);                  // type
    p[6]  = u_xfer(SRC_BUF, DST_R0);
    p[7]  = u_xfer(SRC_BUF, DST_R1);
    p[8]  = u_xfer(SRC_BUF, DST_R2);
    for (int i = 0; i < 3; i++) begin
      int unsigned b = 9 + 11 * i;
      src_e r = src_e'(int'(SRC_R0) + i);
      p[b+0]  = u_alu(ALU_PASS, r, 1'b0);
      p[b+1]  = u_jcc(CC_Z, 1'b0, 6'(b + 11));          // done in this dimension
      p[b+2]  = u_jcc(CC_N, 1'b0, 6'(b + 7));
      p[b+3]  = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REQ, 4'(i)));
      p[b+4]  = u_jcc(CC_ACK, 1'b1, 6'd42);
      p[b+5]  = u_alu(ALU_DEC, r, 1'b1);
      p[b+6]  = u_jmp(1'b0, 6'd43);
      p[b+7]  = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REQ, 4'(i + 3)));
      p[b+8]  = u_jcc(CC_ACK, 1'b1, 6'd42);
      p[b+9]  = u_alu(ALU_INC, r, 1'b1);
      p[b+10] = u_jmp(1'b0, 6'd43);
    end
    p[42] = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REQ, {1'b0, S_BMU}));
    p[43] = u_xfer(SRC_R0, DST_FIFO);
    p[44] = u_xfer(SRC_R1, DST_FIFO);
    p[45] = u_xfer(SRC_R2, DST_FIFO);
    p[46] = u_wait(EV_BYTE, 1'b1, 6'd51);
    p[47] = u_jcc(CC_BUF_EOP, 1'b0, 6'd50);
    p[48] = u_xfer(SRC_BUF, DST_FIFO);
    p[49] = u_jmp(1'b0, 6'd46);
    p[50] = u_xfer(SRC_BUF, DST_NONE);
    p[51] = u_ldc(DST_FIFO, K_EOP);
    p[52] = u_wait(EV_FIFO_EMPTY, 1'b0, 6'd0);
    p[53] = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REL, 4'h0));
    p[54] = u_jmp(1'b0, 6'd0);
    return p[a];
  endfunction

  function automatic logic [15:0] src_word(int unsigned a);
    logic [15:0] p [32];
    for (int i = 0; i < 32; i++) p[i] = u_jmp(1'b0, 6'd0);
    p[0]  = u_wait(EV_BYTE, 1'b0, 6'd0);
    p[1]  = u_jcc(CC_BUF_SOP, 1'b0, 6'd4);
    p[2]  = u_xfer(SRC_BUF, DST_NONE);
    p[3]  = u_jmp(1'b0, 6'd0);
    p[4]  = u_xfer(SRC_BUF, DST_FIFO);                  // SOP
    p[5]  = u_xfer(SRC_BUF, DST_FIFO);                  // type
    p[6]  = u_xfer(SRC_BUF, DST_R0);
    p[7]  = u_xfer(SRC_BUF, DST_R1);
    p[8]  = u_xfer(SRC_BUF, DST_R2);
    p[9]  = u_alu(ALU_PASS, SRC_R0, 1'b0);
    p[10] = u_jcc(CC_N, 1'b0, 6'd19);                   // end marker: arrived
    p[11] = u_ldc(DST_R3, mk_buscmd(CMD_RES_REQ, 4'h0));
    p[12] = u_alu(ALU_ADD, SRC_R3, 1'b0);               // ACC = request for port
    p[13] = u_xfer(SRC_ACC, DST_BUSCMD);
    p[14] = u_jcc(CC_ACK, 1'b1, 6'd19);
    p[15] = u_xfer(SRC_R1, DST_FIFO);                   // shifted route
    p[16] = u_xfer(SRC_R2, DST_FIFO);
    p[17] = u_ldc(DST_FIFO, 9'h0FF);
    p[18] = u_jmp(1'b0, 6'd23);
    p[19] = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REQ, {1'b0, S_BMU}));
    p[20] = u_xfer(SRC_R0, DST_FIFO);
    p[21] = u_xfer(SRC_R1, DST_FIFO);
    p[22] = u_xfer(SRC_R2, DST_FIFO);
    p[23] = u_wait(EV_BYTE, 1'b1, 6'd28);
    p[24] = u_jcc(CC_BUF_EOP, 1'b0, 6'd27);
    p[25] = u_xfer(SRC_BUF, DST_FIFO);
    p[26] = u_jmp(1'b0, 6'd23);
    p[27] = u_xfer(SRC_BUF, DST_NONE);
    p[28] = u_ldc(DST_FIFO, K_EOP);
    p[29] = u_wait(EV_FIFO_EMPTY, 1'b0, 6'd0);
    p[30] = u_ldc(DST_BUSCMD, mk_buscmd(CMD_RES_REL, 4'h0));
    p[31] = u_jmp(1'b0, 6'd0);
    return p[a];
  endfunction
endpackage
