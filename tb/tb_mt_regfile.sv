// tb_mt_regfile: random writes to random (thread, word) pairs, then reads on
// both ports, checked two cycles after the address is presented (the two
// register-file read stages). Word 0 of every thread must read zero and
// never report a parity error; written words must not report one either.
module tb_mt_regfile;
  localparam int N = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0] rd_tid, wr_tid;
  logic [5:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic p1, p2, we;
  logic [31:0] model [N][64];
  bit valid [N][64];
  int checks = 0, failures = 0;

  mt_regfile #(.NTHREADS(N)) dut (.clk, .rd_tid, .ra1, .ra2, .rd1, .rd2, .rd1_perr (p1),
                                  .rd2_perr (p2), .we, .wr_tid, .wa, .wd);

  initial begin
    logic [3:0] t;
    logic [5:0] a1, a2;
    we = 0; rd_tid = 0; ra1 = 0; ra2 = 0; wr_tid = 0; wa = 0; wd = 0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < 64; j++) valid[i][j] = 0;
      model[i][0] = 0; valid[i][0] = 1;
    end
    @(negedge clk);
    for (int n = 0; n < 1500; n++) begin
      we = 1; wr_tid = 4'($urandom); wa = 6'($urandom); wd = $urandom;
      @(posedge clk);
      if (wa != 0) begin model[wr_tid][wa] = wd; valid[wr_tid][wa] = 1; end
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 1500; n++) begin
      t = 4'($urandom); a1 = 6'($urandom); a2 = (n % 10 == 0) ? 6'd0 : 6'($urandom);
      if (!valid[t][a1] || !valid[t][a2]) continue;
      rd_tid = t; ra1 = a1; ra2 = a2;
      @(posedge clk); @(posedge clk); #1;
      checks++;
      if (rd1 !== model[t][a1] || rd2 !== model[t][a2] || p1 || p2) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d a1=%0d a2=%0d got %h %h", t, a1, a2, rd1, rd2);
      end
      @(negedge clk);
    end
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
