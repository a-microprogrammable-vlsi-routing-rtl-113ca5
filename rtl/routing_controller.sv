// routing_controller: the HARTS routing controller, top level.
//
// Six receivers and six transmitters, one pair per neighbour direction
// d0..d5 of the hexagonal mesh, share the time-slice bus with the buffer
// management unit (BMU) and the interface manager (IM) of the network
// processor, which sit outside this chip and reach the bus through ports.
// Receivers and the four BMU outbound channels are the bus masters in run
// mode, one slot each per twelve-cycle major cycle (the IM holds slots 10
// and 11); transmitters and the BMU inbound channels are the slaves. A
// receiver that has reserved a transmitter relays a packet to it byte by
// byte through the bus (virtual cut-through); if no suitable transmitter
// can be reserved, the receiver sends the packet to the BMU instead. With
// the tee address bit set, a byte goes to a transmitter and to the BMU at
// once. In download mode the IM owns the bus and loads the receivers'
// control stores.
//
// Ports: serial lines per direction (from and to the external data
// recovery / encoding units), the BMU outbound-channel offers and inbound
// acknowledge, the IM offer and download select, and the bus as seen in
// every minor cycle. One clock is one minor cycle and one line bit.
module routing_controller
  import hrc_pkg::*;
#(
  parameter int unsigned WCS_DEPTH    = 64,
  parameter int unsigned FIFO_DEPTH   = 8,
  parameter int unsigned BACKOFF_BITS = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  // serial lines
  input  logic [NPORTS-1:0]   rx_bit,
  input  logic [NPORTS-1:0]   rx_valid,
  output logic [NPORTS-1:0]   tx_bit,
  // BMU outbound channels (bus masters in slots 6..9)
  input  ts_req_t             bmu_req [NBMU_OUT],
  // BMU inbound channels (slave S_BMU, or any teed cycle)
  input  logic                bmu_ack,
  // interface manager (bus master in slots 10..11, and in download mode)
  input  logic                im_download,
  input  ts_req_t             im_req,
  // bus as seen by every device
  output ts_bus_t             bus,
  output logic                bus_ack,
  output logic                major_start,
  // status
  output logic [NPORTS-1:0]   tx_reserved,
  output logic [NPORTS-1:0]   tx_packet,
  output logic [NPORTS-1:0]   tx_backoff,
  output logic [NPORTS-1:0]   tx_null,
  output logic [NPORTS-1:0]   rcv_ddu_err,
  output logic [NPORTS-1:0]   rcv_res_denied,
  output logic [NPORTS-1:0]   rcv_exc
);

  ts_req_t             req [NMASTERS];
  logic [NMASTERS-1:0] sack;

  ts_bus u_bus (
    .clk, .rst_n, .download(im_download), .req, .slave_ack(sack),
    .bus, .ack(bus_ack), .major_start
  );

  for (genvar k = 0; k < NBMU_OUT; k++) begin : g_bmu
    assign req[NPORTS + k] = bmu_req[k];
  end
  assign req[M_IM0] = im_req;
  assign req[M_IM1] = im_req;

  logic [NPORTS-1:0] tx_ack, rcv_ack;

  for (genvar k = 0; k < NPORTS; k++) begin : g_port
    transmitter #(.ID(3'(k)), .BACKOFF_BITS(BACKOFF_BITS)) u_tx (
      .clk, .rst_n, .bus, .download(im_download), .ack(tx_ack[k]),
      .tx_bit(tx_bit[k]), .reserved(tx_reserved[k]), .packet_mode(tx_packet[k]),
      .in_backoff(tx_backoff[k]), .null_sent(tx_null[k])
    );

    // per-port probe points (not brought out; read by the end-to-end test)
    logic [1:0] dmode;
    logic       dv, ovf;
    logic [3:0] dst;
    logic [$clog2(WCS_DEPTH)-1:0] upc;
    receiver #(.ID(4'(k)), .WCS_DEPTH(WCS_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_rcv (
      .clk, .rst_n, .download(im_download), .rx_bit(rx_bit[k]), .rx_valid(rx_valid[k]),
      .bus, .bus_ack, .req(req[k]), .slave_ack(rcv_ack[k]),
      .ddu_mode(dmode), .ddu_err(rcv_ddu_err[k]), .res_denied(rcv_res_denied[k]),
      .exc_taken(rcv_exc[k]), .dest_valid(dv), .dest(dst), .overrun(ovf), .upc
    );
  end

  // Slave acknowledges: transmitters, receivers (download) and the BMU
  // inbound channels, which answer for cycles addressed or teed to them.
  logic bmu_sel;
  assign bmu_sel = !im_download && bus.cmd != CMD_NOP &&
                   (bus.addr[2:0] == S_BMU || bus.addr[3]);
  always_comb begin
    sack = '0;
    sack[NPORTS-1:0]      = tx_ack | rcv_ack;
    sack[NPORTS]          = bmu_sel && bmu_ack && bus.addr[2:0] == S_BMU;
  end

endmodule
