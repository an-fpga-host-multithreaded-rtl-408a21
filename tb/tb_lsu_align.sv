// tb_lsu_align: every byte offset and access size for store preparation
// (lane data, byte mask, misalignment) and for load alignment with zero and
// sign extension, against big-endian expectations written out here.
module tb_lsu_align;
  import sparc_pkg::*;
  logic [1:0] lo, llo;
  msize_e sz, lsz;
  logic mis, lsg;
  logic [31:0] sd, sw, lw, ld;
  logic [3:0] sm;
  int checks = 0, failures = 0;

  lsu_align dut (.addr_lo (lo), .size (sz), .misaligned (mis), .st_data (sd), .st_word (sw),
                 .st_mask (sm), .ld_addr_lo (llo), .ld_size (lsz), .ld_signed (lsg),
                 .ld_word (lw), .ld_data (ld));

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  initial begin
    logic [3:0] em;
    logic [7:0] byt;
    logic [15:0] half;
    for (int rep = 0; rep < 20; rep++)
      for (int s = 0; s < 3; s++)
        for (int o = 0; o < 4; o++) begin
          sz = msize_e'(s); lo = 2'(o); sd = $urandom;
          lsz = msize_e'(s); llo = 2'(o); lsg = rep[0]; lw = $urandom;
          #1;
          if (s == 0) begin
            em = 4'b1000 >> o;
            chk("st mask b", 32'(sm), 32'(em));
            chk("st lane b", sw[8 * (3 - o) +: 8], 32'(sd[7:0]));
            chk("mis b", 32'(mis), 0);
            byt = lw[8 * (3 - o) +: 8];
            chk("ld b", ld, lsg ? 32'($signed(byt)) : 32'(byt));
          end else if (s == 1) begin
            chk("mis h", 32'(mis), 32'(o % 2));
            if (o % 2 == 0) begin
              chk("st mask h", 32'(sm), (o == 0) ? 32'hC : 32'h3);
              chk("st lane h", sw[16 * (1 - o / 2) +: 16], 32'(sd[15:0]));
              half = lw[16 * (1 - o / 2) +: 16];
              chk("ld h", ld, lsg ? 32'($signed(half)) : 32'(half));
            end
          end else begin
            chk("mis w", 32'(mis), 32'(o != 0));
            if (o == 0) begin
              chk("st w", sw, sd);
              chk("st mask w", 32'(sm), 32'hF);
              chk("ld w", ld, lw);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
