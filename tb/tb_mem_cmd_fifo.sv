// tb_mem_cmd_fifo: random push/pop traffic against a queue kept here; checks
// order, data, full/empty/count, and that a FIFO of DEPTH entries accepts
// exactly DEPTH pushes before it reports full.
module tb_mem_cmd_fifo;
  localparam int W = 40, D = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(D):0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0;

  mem_cmd_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty, .count);

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", w, $time); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill completely
    for (int n = 0; n < D; n++) begin
      chk("not full while filling", !full);
      push = 1; din = {8'(n), $urandom};
      q.push_back(din);
      @(negedge clk);
    end
    push = 0;
    chk("full after DEPTH pushes", full && count == D);
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      push = !full && ($urandom_range(0, 1) == 1);
      pop  = !empty && ($urandom_range(0, 1) == 1);
      din  = {$urandom, $urandom};
      chk("empty flag", empty == (q.size() == 0));
      chk("count", count == q.size());
      if (!empty) chk("head data", dout == q[0]);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      @(negedge clk);
    end
    push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
