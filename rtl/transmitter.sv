// transmitter: one reservable serial transmitter T_ij of the routing controller.
//
// Reservation. The transmitter is a shared resource that keeps its own
// reservation status. A reservation request from any bus master is
// acknowledged when the transmitter is free and no interface-manager hold is
// pending; the requesting master becomes the owner. Only the owner may send
// data bytes or release it. A hold command from the interface manager is
// always acknowledged: it reserves a free transmitter at once, otherwise it
// is remembered and granted when the current packet has ended. A check
// command is acknowledged only when the hold has been granted.
//
// Line side. In sync mode the line carries a continuous stream of zeros.
// The first data byte from the owner switches to packet mode. Every
// WORD_BITS clocks (one major cycle) a new line word starts: the held byte
// if one arrived in time, otherwise a null byte that the receiver drops.
// After a release the held byte is sent, then the line returns to zeros for
// a backoff period in which the transmitter cannot be reserved.
//
// Padding. The padding logic (a PLA in the source design) turns a 9-bit bus
// byte {flag, byte} into the 12-bit line word {1, flag, byte, 00}, sent MSB
// first; the start bit gives word alignment and the zero pad bits make one
// line word last exactly one major cycle.
//
// Fault tolerance. The control state is one-hot; any code that is not one of
// the legal states (for example after an upset) returns the machine to free
// sync mode.
//
// Interface: the TS bus is decoded combinationally and `ack` is driven in
// the same minor cycle; state changes at the following clock edge.
// From the source design: the reservation, release, hold and check
// commands, sync/packet modes, null bytes, backoff and the four parts
// (padding PLA, decoder, shift register, fault-tolerant state machine).
// Line word format, backoff length and one-hot encoding are this design's.
module transmitter
  import hrc_pkg::*;
#(
  parameter logic [2:0]  ID           = 3'd0,
  parameter int unsigned BACKOFF_BITS = 24
) (
  input  logic    clk,
  input  logic    rst_n,
  input  ts_bus_t bus,
  input  logic    download,
  output logic    ack,
  output logic    tx_bit,
  output logic    reserved,      // owned by some master
  output logic    packet_mode,
  output logic    in_backoff,
  output logic    null_sent      // pulse: a null line word started
);

  typedef enum logic [4:0] {
    ST_FREE    = 5'b00001,
    ST_RESV    = 5'b00010,   // reserved, still sending sync zeros
    ST_PACKET  = 5'b00100,
    ST_DRAIN   = 5'b01000,   // released, last held byte still to send
    ST_BACKOFF = 5'b10000
  } state_e;

  state_e      state;
  logic [3:0]  owner;
  logic        hold_pend;
  logic [3:0]  hold_owner;
  logic        hbuf_v;
  logic [8:0]  hbuf;
  logic [WORD_BITS-1:0] shreg;
  logic [3:0]  bitcnt;
  logic [$clog2(BACKOFF_BITS+1)-1:0] boff;

  // ---------------- command / address decoder ----------------
  logic sel, is_owner, owned, word_end, consume;
  assign sel      = !download && (bus.addr[2:0] == ID) && (bus.cmd != CMD_NOP);
  assign owned    = (state == ST_RESV) || (state == ST_PACKET);
  assign is_owner = owned && (owner == bus.master);
  assign word_end = (bitcnt == 4'(WORD_BITS - 1));
  // the held byte leaves at this word boundary
  assign consume  = word_end && hbuf_v &&
                    (state == ST_RESV || state == ST_PACKET || state == ST_DRAIN);

  logic ack_req, ack_rel, ack_data, ack_hold, ack_chk;
  assign ack_req  = sel && bus.cmd == CMD_RES_REQ &&
                    ((state == ST_FREE && !hold_pend) || is_owner);
  assign ack_rel  = sel && bus.cmd == CMD_RES_REL && is_owner;
  assign ack_data = sel && bus.cmd == CMD_DATA && is_owner && (!hbuf_v || consume);
  assign ack_hold = sel && bus.cmd == CMD_HOLD;
  assign ack_chk  = sel && bus.cmd == CMD_CHECK && is_owner;
  assign ack      = ack_req | ack_rel | ack_data | ack_hold | ack_chk;

  // ---------------- controlling state machine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_FREE;
      owner      <= 4'd0;
      hold_pend  <= 1'b0;
      hold_owner <= 4'd0;
      hbuf_v     <= 1'b0;
      hbuf       <= 9'h0;
      shreg      <= '0;
      bitcnt     <= 4'd0;
      boff       <= '0;
      null_sent  <= 1'b0;
    end else begin
      null_sent <= 1'b0;
      // shift register: one bit per minor cycle
      shreg  <= {shreg[WORD_BITS-2:0], 1'b0};
      bitcnt <= word_end ? 4'd0 : bitcnt + 4'd1;

      if (consume) hbuf_v <= 1'b0;
      if (ack_data) begin
        hbuf   <= bus.data;
        hbuf_v <= 1'b1;
      end
      if (ack_hold && !(state == ST_FREE && !hold_pend)) begin
        hold_pend  <= 1'b1;
        hold_owner <= bus.master;
      end

      unique case (state)
        ST_FREE: begin
          if (ack_req) begin
            state <= ST_RESV;
            owner <= bus.master;
          end else if (ack_hold && !hold_pend) begin
            state <= ST_RESV;
            owner <= bus.master;
          end else if (hold_pend) begin
            state     <= ST_RESV;
            owner     <= hold_owner;
            hold_pend <= 1'b0;
          end
        end
        ST_RESV: begin
          if (ack_rel) begin
            hbuf_v <= 1'b0;
            if (hold_pend) begin         // unused reservation: grant the hold now
              owner     <= hold_owner;
              hold_pend <= 1'b0;
            end else begin
              state <= ST_FREE;
            end
          end else if (consume) begin
            shreg <= pad_word(hbuf);
            state <= ST_PACKET;
          end
        end
        ST_PACKET: begin
          if (word_end) begin
            if (hbuf_v) shreg <= pad_word(hbuf);
            else begin
              shreg     <= pad_word(K_NULL);
              null_sent <= 1'b1;
            end
          end
          if (ack_rel) state <= ST_DRAIN;
        end
        ST_DRAIN: begin
          if (word_end) begin
            if (hbuf_v) shreg <= pad_word(hbuf);
            else begin
              state <= ST_BACKOFF;
              boff  <= '0;
            end
          end
        end
        ST_BACKOFF: begin
          if (boff == ($bits(boff))'(BACKOFF_BITS - 1)) begin
            if (hold_pend) begin
              state     <= ST_RESV;
              owner     <= hold_owner;
              hold_pend <= 1'b0;
            end else begin
              state <= ST_FREE;
            end
          end else begin
            boff <= boff + 1'b1;
          end
        end
        default: begin       // illegal code: recover to free sync mode
          state  <= ST_FREE;
          hbuf_v <= 1'b0;
        end
      endcase
    end
  end

  assign tx_bit      = shreg[WORD_BITS-1];
  assign reserved    = owned;
  assign packet_mode = (state == ST_PACKET) || (state == ST_DRAIN);
  assign in_backoff  = (state == ST_BACKOFF);

  // Only the owner may release, and a release is never acknowledged twice.
  a_rel_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                ack_rel |-> owned);

endmodule
