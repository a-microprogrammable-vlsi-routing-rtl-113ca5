// receiver: one microprogrammable receiver R_ji of the routing controller.
//
// The data detection unit (DDU) turns the serial line into bytes and puts
// each into the buffer register of the data unit. The microsequencer,
// running the routing algorithm held in its writable control store, reads
// the routing bytes of a packet, decides on a route, asks the TS bus
// interface to reserve the matching transmitter (or an alternate one, or
// the BMU when none is free) and pushes the packet bytes into the
// eight-word FIFO, from which the TS bus interface streams them in the
// receiver's bus slot. The order in which transmitters are tried is set by
// the microcode alone.
//
// In download mode the microsequencer is held at address 0 and the
// interface manager loads the control store over the TS bus; leaving
// download mode starts the program at address 0.
//
// Interface: serial input rx_bit with its strobe rx_valid, the TS bus as
// seen by every device, the receiver's offer for its slot (`req`) and its
// slave acknowledge for download commands. The composition (DDU,
// microsequencer, data unit, FIFO, bus interface) is the source design's.
module receiver
  import hrc_pkg::*;
#(
  parameter logic [3:0]  ID        = 4'd0,
  parameter int unsigned WCS_DEPTH = 64,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    download,
  input  logic    rx_bit,
  input  logic    rx_valid,
  input  ts_bus_t bus,
  input  logic    bus_ack,
  output ts_req_t req,
  output logic    slave_ack,
  // observation
  output logic [1:0] ddu_mode,
  output logic    ddu_err,
  output logic    res_denied,
  output logic    exc_taken,
  output logic    dest_valid,
  output logic [3:0] dest,
  output logic    overrun,
  output logic [$clog2(WCS_DEPTH)-1:0] upc
);

  logic       buf_valid;

  // DDU
  logic       b_valid, sop, eop, bf_ovf;
  logic [8:0] b_data;
  ddu u_ddu (
    .clk, .rst_n, .rx_bit, .rx_valid, .out_ready(!buf_valid),
    .byte_valid(b_valid), .byte_data(b_data), .sop, .eop, .err(ddu_err),
    .mode(ddu_mode), .bitfifo_ovf(bf_ovf)
  );

  // data unit
  src_e       src_sel;
  logic       src_rd, wr_en, alu_en, alu_wb;
  dst_e       wr_sel;
  logic [8:0] wr_data, src_val, buf_data;
  alu_op_e    alu_op;
  logic [7:0] acc, status;
  logic       fz, fn, fc;

  // FIFO / bus interface
  logic       fifo_push, fifo_pop, fifo_empty, fifo_full;
  logic [8:0] fifo_din, fifo_head;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_cnt;
  logic       buscmd_we, cmd_busy, ack_flag, dl_we;
  logic [7:0] buscmd;
  logic [$clog2(WCS_DEPTH)-1:0] dl_addr;
  logic [15:0] dl_data;
  logic [3:0] uflags;
  logic       ustall;

  assign status = {ack_flag, cmd_busy, fifo_full, fifo_empty, buf_valid, overrun, dest_valid, bf_ovf};

  rcv_data_unit u_du (
    .clk, .rst_n, .ddu_valid(b_valid), .ddu_byte(b_data),
    .src_sel, .src_rd, .status, .src_val, .wr_en, .wr_sel, .wr_data,
    .alu_en, .alu_op, .alu_wb, .acc, .flag_z(fz), .flag_n(fn), .flag_c(fc),
    .buf_valid, .buf_data, .overrun
  );

  rcv_microsequencer #(.WCS_DEPTH(WCS_DEPTH)) u_seq (
    .clk, .rst_n, .run(!download),
    .dl_we, .dl_addr, .dl_data,
    .flag_z(fz), .flag_n(fn), .flag_c(fc), .ack_flag, .buf_valid, .buf_data,
    .fifo_empty, .fifo_full, .cmd_busy, .ddu_err,
    .src_sel, .src_rd, .src_val, .wr_en, .wr_sel, .wr_data, .alu_en, .alu_op, .alu_wb,
    .fifo_push, .fifo_din, .buscmd_we, .buscmd,
    .pc(upc), .uflags, .stall(ustall), .exc_taken
  );

  rcv_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(9)) u_fifo (
    .clk, .rst_n, .push(fifo_push), .din(fifo_din), .pop(fifo_pop),
    .head(fifo_head), .empty(fifo_empty), .full(fifo_full), .count(fifo_cnt)
  );

  rcv_ts_if #(.ID(ID), .WCS_DEPTH(WCS_DEPTH)) u_tsif (
    .clk, .rst_n, .download, .bus, .bus_ack,
    .buscmd_we, .buscmd, .cmd_busy, .ack_flag,
    .fifo_head, .fifo_empty, .fifo_pop,
    .req, .slave_ack, .dl_we, .dl_addr, .dl_data,
    .dest_valid, .dest, .res_denied
  );

endmodule
