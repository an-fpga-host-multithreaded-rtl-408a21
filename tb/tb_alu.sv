// tb_alu: random and corner-case vectors for every ALU operation, compared
// with results and SPARC condition codes computed here with 33-bit
// arithmetic.
module tb_alu;
  import sparc_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, r;
  logic cin;
  logic [3:0] icc;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .cin, .result (r), .icc);

  task automatic ref_model(output logic [31:0] er, output logic [3:0] eicc);
    logic [32:0] s;
    logic v, c;
    v = 0; c = 0;
    case (op)
      ALU_ADD, ALU_ADDX: begin
        s = 33'(a) + 33'(b) + ((op == ALU_ADDX) ? 33'(cin) : 33'd0);
        er = s[31:0]; c = s[32];
        v = (a[31] == b[31]) && (er[31] != a[31]);
      end
      ALU_SUB, ALU_SUBX: begin
        s = 33'(a) - 33'(b) - ((op == ALU_SUBX) ? 33'(cin) : 33'd0);
        er = s[31:0]; c = s[32];
        v = (a[31] != b[31]) && (er[31] != a[31]);
      end
      ALU_AND:  er = a & b;
      ALU_ANDN: er = a & ~b;
      ALU_OR:   er = a | b;
      ALU_ORN:  er = a | ~b;
      ALU_XOR:  er = a ^ b;
      ALU_XNOR: er = a ~^ b;
      default:  er = b;
    endcase
    eicc = {er[31], er == 0, v, c};
  endtask

  initial begin
    logic [31:0] er;
    logic [3:0] ei;
    for (int n = 0; n < 4000; n++) begin
      op  = alu_op_e'($urandom_range(0, 10));
      a   = (n % 7 == 0) ? 32'h8000_0000 : (n % 11 == 0) ? 32'hFFFF_FFFF : $urandom;
      b   = (n % 5 == 0) ? a : (n % 13 == 0) ? 32'h7FFF_FFFF : $urandom;
      cin = $urandom_range(0, 1);
      #1;
      ref_model(er, ei);
      checks++;
      if (r !== er || icc !== ei) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h cin=%b: got %h/%b expected %h/%b",
                                     op.name(), a, b, cin, r, icc, er, ei);
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
