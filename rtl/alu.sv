// alu: the simple integer ALU of the execution stage ("Simple ALU (1 DSP)").
//
// One add/subtract/logic unit serves all SPARC v8 simple arithmetic and logic
// instructions and also the address computation of loads, stores, JMPL and
// CALL, as the model maps them onto a single DSP48-style slice: a 32-bit
// two's-complement adder/subtracter with carry in, the bit-wise logic
// operations, and a pattern detector that produces the zero flag. Purely
// combinational; the stage register around it belongs to the pipeline.
//
// Interface: op (alu_op_e), operands a/b, carry-in cin (PSR.icc.C for
// ADDX/SUBX); result and the four integer condition codes N Z V C as SPARC
// defines them (V and C from the adder for add/sub, 0 for logic ops).
// Mapping onto a DSP primitive is left to synthesis; this file describes the
// function only.
module alu
  import sparc_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] result,
  output logic [3:0]  icc
);
  logic [32:0] sum;
  logic        is_sub, is_arith, v, c;
  logic [31:0] bb;

  always_comb begin
    is_sub   = (op == ALU_SUB) || (op == ALU_SUBX);
    is_arith = (op == ALU_ADD) || (op == ALU_ADDX) || is_sub;
    bb       = is_sub ? ~b : b;
    // subtract is a + ~b + 1, less one more for a borrow in (SUBX)
    unique case (op)
      ALU_ADDX: sum = {1'b0, a} + {1'b0, bb} + 33'(cin);
      ALU_SUB:  sum = {1'b0, a} + {1'b0, bb} + 33'd1;
      ALU_SUBX: sum = {1'b0, a} + {1'b0, bb} + {32'd0, !cin};
      default:  sum = {1'b0, a} + {1'b0, bb};
    endcase
    unique case (op)
      ALU_AND:   result = a & b;
      ALU_ANDN:  result = a & ~b;
      ALU_OR:    result = a | b;
      ALU_ORN:   result = a | ~b;
      ALU_XOR:   result = a ^ b;
      ALU_XNOR:  result = ~(a ^ b);
      ALU_PASSB: result = b;
      default:   result = sum[31:0];
    endcase
    if (is_arith) begin
      v = is_sub ? ((a[31] ^ b[31]) & (a[31] ^ sum[31]))
                 : (~(a[31] ^ b[31]) & (a[31] ^ sum[31]));
      c = is_sub ? ~sum[32] : sum[32];   // SPARC C is the borrow for subtract
    end else begin
      v = 1'b0;
      c = 1'b0;
    end
    icc = {result[31], (result == 32'd0), v, c};
  end
endmodule
