// tb_sync_fifo -- random push/pop traffic against a queue model: head data,
// empty, full and count are compared every cycle, including pushes into a
// full FIFO and pops from an empty one being ignored.
module tb_sync_fifo;
  localparam int unsigned W = 8, DEPTH = 5, AW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic         push, pop, empty, full;
  logic [W-1:0] wdata, rdata;
  logic [AW:0]  count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      chk(int'(count) == q.size(), $sformatf("count %0d model %0d", count, q.size()));
      chk(empty == (q.size() == 0), "empty flag");
      chk(full == (q.size() == DEPTH), "full flag");
      if (q.size() != 0) chk(rdata == q[0], $sformatf("head %02h model %02h", rdata, q[0]));
      // bias the traffic in phases so that both full and empty are visited
      push  = ($urandom_range(99) < ((it / 200) % 2 ? 70 : 30)) && !(q.size() == DEPTH);
      pop   = ($urandom_range(99) < ((it / 200) % 2 ? 30 : 70)) && (q.size() != 0);
      wdata = W'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
