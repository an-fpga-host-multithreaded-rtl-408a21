// tb_thread_sel: after reset the scheduler must issue threads 0,1,...,N-1,0,...
// one per cycle with valid high every cycle, for several rounds.
module tb_thread_sel;
  localparam int N = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [$clog2(N)-1:0] tid;
  logic valid;
  int checks = 0, failures = 0;

  thread_sel #(.NTHREADS(N)) dut (.clk, .rst_n, .tid, .valid);

  initial begin
    repeat (3) @(posedge clk);
    #1 checks++; if (valid) begin failures++; $display("FAIL valid during reset"); end
    rst_n = 1;
    @(posedge clk); #1;   // first slot registered
    for (int n = 0; n < 5 * N; n++) begin
      checks++;
      if (!valid || tid != ($clog2(N))'(n % N)) begin
        failures++;
        $display("FAIL cycle %0d: valid=%b tid=%0d expected %0d", n, valid, tid, n % N);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
