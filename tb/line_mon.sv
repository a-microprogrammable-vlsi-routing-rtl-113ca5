// line_mon: testbench decoder of one serial line. Waits for a start bit,
// collects the following 11 bits as {flag, byte, pad, pad}, and stores
// every word (nulls included) in `q` with the clock count of its start
// bit in `t`. Words with non-zero pad bits are counted in `bad`.
module line_mon (
  input logic clk,
  input logic rst_n,
  input logic line
);
  logic [8:0] q [$];
  longint     t [$];
  int         bad = 0;
  longint     cyc = 0;
  int         n = -1;
  logic [10:0] sh;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) n <= -1;
    else if (n < 0) begin
      if (line) begin n <= 0; t.push_back(cyc); end
    end else begin
      sh = {sh[9:0], line};
      if (n == 10) begin
        q.push_back(sh[10:2]);
        if (sh[1:0] != 2'b00) bad++;
        n <= -1;
      end else n <= n + 1;
    end
  end
endmodule
