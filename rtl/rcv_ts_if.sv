// rcv_ts_if: TS bus interface of a receiver.
//
// Master role (run mode). The microsequencer writes a command byte
// {command[3:0], address[3:0]} into the bus command register; it stays
// pending until the receiver's own slot, is placed on the bus there, and
// the acknowledge line is captured into `ack_flag`. An acknowledged
// reservation request makes its address the current destination. A
// release always goes to the current destination (the address field of a
// release command is ignored) and ends streaming. When no command is
// pending and a destination is held, the slot carries one DATA transfer
// of the FIFO head to that destination; the word is popped when it is
// acknowledged. So once a transmitter (or the BMU) is reserved, the
// packet streams out at one byte per major cycle with no microcode work.
//
// Slave role (download mode). When the interface manager addresses this
// receiver, DL_ADDR sets the control-store write address, DL_LO keeps a
// low byte and DL_HI writes {high, low} into the control store and
// advances the address. Each download command is acknowledged.
//
// Timing: the offer (`req`) is combinational from registered state; the
// acknowledge is used in the same minor cycle. The command register,
// destination register and download protocol are this design's; the
// reservation-based relaying and download over the bus are the source's.
module rcv_ts_if
  import hrc_pkg::*;
#(
  parameter logic [3:0]  ID        = 4'd0,
  parameter int unsigned WCS_DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       download,
  input  ts_bus_t    bus,
  input  logic       bus_ack,
  // microsequencer
  input  logic       buscmd_we,
  input  logic [7:0] buscmd,
  output logic       cmd_busy,
  output logic       ack_flag,
  // FIFO
  input  logic [8:0] fifo_head,
  input  logic       fifo_empty,
  output logic       fifo_pop,
  // bus
  output ts_req_t    req,
  output logic       slave_ack,
  // control-store download
  output logic       dl_we,
  output logic [$clog2(WCS_DEPTH)-1:0] dl_addr,
  output logic [15:0] dl_data,
  // status
  output logic       dest_valid,
  output logic [3:0] dest,
  output logic       res_denied   // pulse: a reservation request was refused
);

  logic       pend;
  ts_cmd_e    pcmd;
  logic [3:0] paddr;
  logic       my_slot;
  logic [7:0] dl_lo;

  assign my_slot  = !download && (bus.master == ID);
  assign cmd_busy = pend;

  always_comb begin
    req = TS_IDLE;
    if (pend) begin
      req.cmd  = pcmd;
      req.addr = (pcmd == CMD_RES_REL) ? dest : paddr;
    end else if (dest_valid && !fifo_empty) begin
      req.cmd  = CMD_DATA;
      req.addr = dest;
      req.data = fifo_head;
    end
  end

  assign fifo_pop = my_slot && !pend && dest_valid && !fifo_empty && bus_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; pcmd <= CMD_NOP; paddr <= '0; ack_flag <= 1'b0;
      dest_valid <= 1'b0; dest <= '0; res_denied <= 1'b0;
    end else begin
      res_denied <= 1'b0;
      if (my_slot && pend) begin
        pend     <= 1'b0;
        ack_flag <= bus_ack;
        if (pcmd == CMD_RES_REQ) begin
          if (bus_ack) begin
            dest_valid <= 1'b1;
            dest       <= paddr;
          end else begin
            res_denied <= 1'b1;
          end
        end
        if (pcmd == CMD_RES_REL) dest_valid <= 1'b0;
      end
      if (buscmd_we) begin
        pend  <= 1'b1;
        pcmd  <= ts_cmd_e'(buscmd[7:4]);
        paddr <= buscmd[3:0];
      end
    end
  end

  // ---------------- download slave ----------------
  logic dl_sel;
  assign dl_sel    = download && (bus.addr[2:0] == ID[2:0]) &&
                     (bus.cmd inside {CMD_DL_ADDR, CMD_DL_LO, CMD_DL_HI});
  assign slave_ack = dl_sel;
  assign dl_we     = dl_sel && bus.cmd == CMD_DL_HI;
  assign dl_data   = {bus.data[7:0], dl_lo};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl_addr <= '0; dl_lo <= '0;
    end else if (dl_sel) begin
      unique case (bus.cmd)
        CMD_DL_ADDR: dl_addr <= bus.data[$clog2(WCS_DEPTH)-1:0];
        CMD_DL_LO:   dl_lo   <= bus.data[7:0];
        default:     dl_addr <= dl_addr + 1'b1;
      endcase
    end
  end

  a_cmd_not_lost: assert property (@(posedge clk) disable iff (!rst_n)
                                   buscmd_we |-> !pend || (my_slot && pend));

endmodule
