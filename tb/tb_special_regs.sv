// tb_special_regs: every thread must read the SPARC reset state until it is
// first written; written records must read back per thread without
// disturbing other threads; halted[] must follow the written halted flags.
module tb_special_regs;
  import sparc_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] rd_tid, wr_tid;
  tstate_t rd_state, wr_state;
  logic we;
  logic [N-1:0] halted;
  tstate_t model [N];
  logic written [N];
  int checks = 0, failures = 0;

  special_regs #(.NTHREADS(N), .RESET_PC(32'h0000_1000)) dut (
    .clk, .rst_n, .rd_tid, .rd_state, .we, .wr_tid, .wr_state, .halted);

  initial begin
    tstate_t r;
    we = 0; rd_tid = 0; wr_tid = 0; wr_state = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < N; t++) begin
      rd_tid = 4'(t); #1;
      checks++;
      if (rd_state.pc != 32'h1000 || rd_state.npc != 32'h1004 || !rd_state.psr.s ||
          rd_state.psr.et || rd_state.psr.cwp != 0 || rd_state.umode || rd_state.halted) begin
        failures++; $display("FAIL reset state of thread %0d", t);
      end
      written[t] = 0;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      wr_tid = 4'($urandom_range(0, N - 1));
      r = tstate_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      r.halted = ($urandom_range(0, 3) == 0);
      wr_state = r;
      @(posedge clk);
      if (we) begin model[wr_tid] = r; written[wr_tid] = 1; end
      #1;
      we = 0;
      rd_tid = 4'($urandom_range(0, N - 1)); #1;
      if (written[rd_tid]) begin
        checks++;
        if (rd_state !== model[rd_tid]) begin failures++; $display("FAIL readback thread %0d", rd_tid); end
      end
      for (int t = 0; t < N; t++) begin
        checks++;
        if (halted[t] !== (written[t] ? model[t].halted : 1'b0)) begin
          failures++; $display("FAIL halted[%0d]", t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
