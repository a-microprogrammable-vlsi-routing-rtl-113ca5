// rcv_fifo: the receiver's eight-word FIFO.
//
// Holds bytes ({flag, byte}) that the microsequencer has pushed until the
// TS bus interface can hand them to the reserved slave in the receiver's
// bus slot. First-word-fall-through: `head` is the oldest word whenever
// `empty` is low. A push and a pop may happen in the same clock; a push
// into a full FIFO is ignored (the microsequencer stalls instead), and is
// flagged by an assertion.
//
// The depth of eight words is the source design's; organisation and
// interface are this design's.
module rcv_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] head,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == ($bits(count))'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign head    = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + ($bits(count))'(do_push) - ($bits(count))'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wp] <= din;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));

endmodule
