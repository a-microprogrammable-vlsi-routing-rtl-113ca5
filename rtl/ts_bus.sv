// ts_bus: time-slice bus controller of the routing controller.
//
// One clock is one minor cycle. In run mode a slot counter steps through
// the twelve bus-master slots in round-robin order (receivers 0..5, BMU
// outbound channels 6..9, interface manager 10..11); twelve minor cycles
// form one major cycle, so every master gets the bus once per major cycle
// at a fixed position. In download mode the interface manager owns every
// minor cycle. The controller places the slot number on the bus-master
// lines and copies that master's command, address and data onto the bus.
// Slaves decode the bus combinationally and answer on the single
// acknowledge line within the same minor cycle; the acknowledge is the OR
// of all slave answers and is returned to the current master.
//
// Round-robin slot order, 12-cycle major cycle, line groups and the tee bit
// follow the source design. The slot numbering, the two interface-manager
// slots filling the 12-slot cycle and the single-clock timing (in place of
// the two non-overlapping phases) are this design's choices.
module ts_bus
  import hrc_pkg::*;
#(
  parameter int unsigned NSLOTS_P = NSLOTS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                download,           // 1: IM owns the bus
  input  ts_req_t             req   [NMASTERS],   // per-master offer
  input  logic [NMASTERS-1:0] slave_ack,          // acknowledge from every slave
  output ts_bus_t             bus,                // current minor cycle
  output logic                ack,                // acknowledge line
  output logic                major_start         // slot 0 of a major cycle
);

  logic [3:0] slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              slot <= 4'd0;
    else if (slot == 4'(NSLOTS_P - 1))       slot <= 4'd0;
    else                                     slot <= slot + 4'd1;
  end

  logic [3:0] master;
  always_comb begin
    master = download ? M_IM0 : slot;
    bus.master = master;
    bus.cmd    = req[master].cmd;
    bus.addr   = req[master].addr;
    bus.data   = req[master].data;
  end

  assign ack         = |slave_ack;
  assign major_start = (slot == 4'd0);

endmodule
