// ddu: data detection unit of a receiver.
//
// Turns the serial line from the neighbouring transmitter into bytes and
// finds the packet framing. Four parts:
//  * bit FIFO - takes a bit whenever the external data recovery unit
//    strobes one (rx_valid) and hands one bit per clock to the shift
//    register while `out_ready` is high. When the receiver's buffer
//    register still holds an unread byte (out_ready low) the DDU stops
//    at the next start bit, so the bit FIFO is the elastic store that
//    covers the time the microprogram spends on a routing decision. Zeros
//    between words carry nothing and keep being taken, two per clock when
//    two are there, so a backlog drains in the idle time between packets;
//  * shift register - an incoming 1 while no word is open is a start bit;
//    the next 11 bits are collected into a line word {flag, byte, pad};
//  * depadding unit - strips start bit and pad zeros, drops null bytes, and
//    reports SOP, EOP and bad words (non-zero pad, unknown special code);
//  * controlling state machine - SYNC (wait for SOP), PACKET (deliver
//    every non-null byte, SOP and EOP included, until EOP) and RECOVERY.
// A bad word inside a packet, or a SOP inside a packet, aborts the packet
// and enters RECOVERY, which lasts until an inter-message gap (GAP_BITS
// zeros in a row, longer than any zero run inside a packet) is seen. A gap
// inside PACKET (lost EOP) also aborts the packet and returns to SYNC.
// Aborts are reported on `err`.
//
// Timing: byte_valid pulses one clock after the last bit of a word leaves
// the bit FIFO; no more bits are taken until out_ready returns. Sync/packet/recovery modes, SOP/EOP detection, gap-based
// recovery and the four parts follow the source design; the line word
// format, the gap length, the bit FIFO depth and its use as the
// elastic store under back-pressure are this design's.
module ddu
  import hrc_pkg::*;
#(
  parameter int unsigned GAP_BITS      = 16,
  parameter int unsigned BITFIFO_DEPTH = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_bit,
  input  logic       rx_valid,
  input  logic       out_ready,     // buffer register can take a byte
  output logic       byte_valid,
  output logic [8:0] byte_data,     // {special flag, byte}
  output logic       sop,           // pulses with the SOP byte
  output logic       eop,           // pulses with the EOP byte
  output logic       err,           // packet aborted / framing error
  output logic [1:0] mode,          // 0 sync, 1 packet, 2 recovery
  output logic       bitfifo_ovf
);

  typedef enum logic [1:0] {M_SYNC = 2'd0, M_PACKET = 2'd1, M_RECOVERY = 2'd2} mode_e;

  // ---------------- bit FIFO ----------------
  localparam int unsigned BW = $clog2(BITFIFO_DEPTH);
  logic [BITFIFO_DEPTH-1:0] bf;
  logic [BW-1:0] bf_wp, bf_rp;
  logic [BW:0]   bf_cnt;
  logic          bit_v, bit_d, bit_d2, skip2;
  logic [BW-1:0] bf_rp1;

  // Between words a 0 carries no data, so it is taken even under
  // back-pressure; only a start bit (and the word behind it) waits. Two
  // such zeros are taken per clock when both are there, so a backlog left
  // by back-pressure drains during the idle time between packets even
  // though the line delivers a bit on every clock.
  logic open_w;                        // a word is being collected
  assign bf_rp1 = (bf_rp == BW'(BITFIFO_DEPTH-1)) ? '0 : bf_rp + 1'b1;
  assign bit_d  = bf[bf_rp];
  assign bit_d2 = bf[bf_rp1];
  assign bit_v  = (bf_cnt != 0) && (out_ready || (!open_w && !bit_d));
  assign skip2  = bit_v && !open_w && !bit_d && (bf_cnt > 1) && !bit_d2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bf <= '0; bf_wp <= '0; bf_rp <= '0; bf_cnt <= '0; bitfifo_ovf <= 1'b0;
    end else begin
      logic push;
      logic [1:0] npop;
      npop = skip2 ? 2'd2 : {1'b0, bit_v};
      push = rx_valid && (bf_cnt != (BW+1)'(BITFIFO_DEPTH) || npop != 2'd0);
      if (rx_valid && !push) bitfifo_ovf <= 1'b1;
      if (push) begin
        bf[bf_wp] <= rx_bit;
        bf_wp     <= (bf_wp == BW'(BITFIFO_DEPTH-1)) ? '0 : bf_wp + 1'b1;
      end
      if (skip2) bf_rp <= (bf_rp1 == BW'(BITFIFO_DEPTH-1)) ? '0 : bf_rp1 + 1'b1;
      else if (bit_v) bf_rp <= bf_rp1;
      bf_cnt <= bf_cnt + (BW+1)'(push) - (BW+1)'(npop);
    end
  end

  // ---------------- shift register and gap counter ----------------
  logic [3:0]  nbits;                  // bits collected after the start bit
  logic [9:0]  sh;
  logic [$clog2(GAP_BITS+1)-1:0] zrun;
  logic        word_done, gap;
  logic [10:0] word;

  assign word      = {sh[9:0], bit_d};
  assign word_done = bit_v && open_w && (nbits == 4'd10);
  // gap: the zero run reaches GAP_BITS with the zero(s) taken this clock
  assign gap       = bit_v && !bit_d && (zrun < ($bits(zrun))'(GAP_BITS)) &&
                     (zrun + ($bits(zrun))'(skip2 ? 2 : 1) >= ($bits(zrun))'(GAP_BITS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_w <= 1'b0; nbits <= '0; sh <= '0; zrun <= '0;
    end else if (bit_v) begin
      if (bit_d) zrun <= '0;
      else if (gap || zrun == ($bits(zrun))'(GAP_BITS)) zrun <= ($bits(zrun))'(GAP_BITS);
      else zrun <= zrun + ($bits(zrun))'(skip2 ? 2 : 1);
      if (!open_w) begin
        if (bit_d) begin
          open_w <= 1'b1;
          nbits  <= '0;
        end
      end else begin
        sh    <= word[9:0];
        nbits <= nbits + 4'd1;
        if (word_done) open_w <= 1'b0;
      end
    end
  end

  // ---------------- depadding unit ----------------
  logic [8:0] dbyte;
  logic       pad_ok, is_null, is_sop, is_eop, bad_code;
  assign dbyte    = word[10:2];
  assign pad_ok   = (word[1:0] == 2'b00);
  assign is_null  = (dbyte == K_NULL);
  assign is_sop   = (dbyte == K_SOP);
  assign is_eop   = (dbyte == K_EOP);
  assign bad_code = !pad_ok || (dbyte[8] && !is_null && !is_sop && !is_eop);

  // ---------------- controlling state machine ----------------
  mode_e st;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_SYNC; byte_valid <= 1'b0; byte_data <= '0;
      sop <= 1'b0; eop <= 1'b0; err <= 1'b0;
    end else begin
      byte_valid <= 1'b0; sop <= 1'b0; eop <= 1'b0; err <= 1'b0;
      unique case (st)
        M_SYNC: if (word_done && pad_ok && is_sop) begin
          st <= M_PACKET; byte_valid <= 1'b1; byte_data <= dbyte; sop <= 1'b1;
        end
        M_PACKET: begin
          if (gap) begin
            st <= M_SYNC; err <= 1'b1;
          end else if (word_done) begin
            if (bad_code || is_sop) begin
              st <= M_RECOVERY; err <= 1'b1;
            end else if (!is_null) begin
              byte_valid <= 1'b1; byte_data <= dbyte;
              if (is_eop) begin
                st <= M_SYNC; eop <= 1'b1;
              end
            end
          end
        end
        M_RECOVERY: if (gap) st <= M_SYNC;
        default: st <= M_SYNC;
      endcase
    end
  end

  assign mode = st;

endmodule
