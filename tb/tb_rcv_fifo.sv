// tb_rcv_fifo: random pushes and pops against a queue model; checks head,
// empty, full and count after every clock, including simultaneous push and
// pop on a full FIFO, and that the FIFO holds exactly eight words.
module tb_rcv_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [8:0] din = 0, head;
  logic empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [8:0] model [$];

  rcv_fifo #(.DEPTH(8), .WIDTH(9)) dut (.*);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  int fills = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == 8), "full");
      chk(count == 4'(model.size()), "count");
      if (model.size() > 0) chk(head == model[0], "head");
      if (full) fills++;
      // bias towards filling in the first half, draining in the second
      push = ($urandom % 100) < (i < 1000 ? 70 : 30);
      pop  = ($urandom % 100) < (i < 1000 ? 30 : 70);
      push = push && (!full || pop);   // the user stalls on a full FIFO
      din  = 9'($urandom);
      @(posedge clk);
      begin
        bit dp, dq;
        dp = pop && model.size() > 0;
        dq = push && (model.size() < 8 || dp);
        if (dp) void'(model.pop_front());
        if (dq) model.push_back(din);
      end
      #1 push = 0; pop = 0;
    end
    chk(fills > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
