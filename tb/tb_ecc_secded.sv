// tb_ecc_secded: random 64-bit words are encoded, then decoded clean, with
// one flipped bit (must be corrected and flagged) and with two flipped bits
// (must be flagged as uncorrectable); also checks that the code is
// systematic enough to be distinct for distinct data.
module tb_ecc_secded;
  logic [63:0] ed, dd;
  logic [71:0] ec, dc;
  logic corr, dbl;
  int checks = 0, failures = 0;

  ecc_secded dut (.enc_data (ed), .enc_code (ec), .dec_code (dc), .dec_data (dd),
                  .dec_corrected (corr), .dec_double (dbl));

  task automatic chk(string w, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s data=%h", w, ed); end
  endtask

  initial begin
    logic [71:0] code;
    int p1, p2;
    for (int n = 0; n < 2000; n++) begin
      ed = {$urandom, $urandom};
      #1 code = ec;
      chk("code has even parity", (^code) == 1'b0);
      dc = code; #1;
      chk("clean decode", dd == ed && !corr && !dbl);
      p1 = $urandom_range(0, 71);
      dc = code; dc[p1] = ~dc[p1]; #1;
      chk("single error corrected", dd == ed && corr && !dbl);
      p2 = (p1 + $urandom_range(1, 70)) % 72;
      dc = code; dc[p1] = ~dc[p1]; dc[p2] = ~dc[p2]; #1;
      chk("double error detected", dbl && !corr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
