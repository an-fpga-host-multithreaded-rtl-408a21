// tb_muldiv_shf: random vectors for shifts, signed/unsigned multiply (with
// the Y result) and divide (with overflow saturation and divide-by-zero),
// compared with 64-bit arithmetic done here.
module tb_muldiv_shf;
  import sparc_pkg::*;
  mds_op_e op;
  logic [31:0] a, b, y, r, yo;
  logic [3:0] icc;
  logic dz;
  int checks = 0, failures = 0;

  muldiv_shf dut (.op, .a, .b, .y_in (y), .result (r), .y_out (yo), .icc, .div_zero (dz));

  initial begin
    logic [31:0] er, ey;
    logic ev, edz;
    longint unsigned pu, qu;
    longint ps, qs, dvd;
    for (int n = 0; n < 4000; n++) begin
      op = mds_op_e'($urandom_range(0, 6));
      a  = $urandom;
      b  = (n % 9 == 0) ? 32'd0 : (n % 3 == 0) ? 32'($urandom_range(1, 40)) : $urandom;
      y  = (n % 4 == 0) ? $urandom : (n % 4 == 1) ? 32'hFFFF_FFFF : 32'd0;
      #1;
      ey = y; ev = 0; edz = 0;
      case (op)
        MDS_SLL: er = a << b[4:0];
        MDS_SRL: er = a >> b[4:0];
        MDS_SRA: er = 32'($signed(a) >>> b[4:0]);
        MDS_UMUL: begin pu = longint'(a) * longint'(b); er = pu[31:0]; ey = pu[63:32]; end
        MDS_SMUL: begin
          ps = longint'($signed(a)) * longint'($signed(b)); er = ps[31:0]; ey = ps[63:32];
        end
        MDS_UDIV: begin
          edz = (b == 0);
          if (b == 0) begin er = 32'hFFFF_FFFF; ev = 1; end
          else begin
            qu = {y, a} / longint'(b);
            if (qu > 64'hFFFF_FFFF) begin er = 32'hFFFF_FFFF; ev = 1; end else er = qu[31:0];
          end
        end
        default: begin
          edz = (b == 0);
          if (b == 0) begin er = 32'hFFFF_FFFF; ev = 1; end
          else begin
            dvd = longint'({y, a});
            qs = dvd / longint'($signed(b));
            if (qs > 64'sh7FFF_FFFF) begin er = 32'h7FFF_FFFF; ev = 1; end
            else if (qs < -64'sh8000_0000) begin er = 32'h8000_0000; ev = 1; end
            else er = qs[31:0];
          end
        end
      endcase
      checks++;
      if (dz !== edz || (!edz && (r !== er || yo !== ey ||
          icc !== {er[31], er == 0, ev, 1'b0}))) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h: got %h/%h/%b expected %h/%h/%b",
                                     op.name(), a, b, y, r, yo, icc, er, ey, ev);
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
