// muldiv_shf: the multiply / divide / shift unit of the execution stage.
//
// Implements SLL, SRL, SRA (shift count = b[4:0]), UMUL/SMUL (64-bit product,
// upper half written to Y) and UDIV/SDIV (64-bit dividend {Y, a} divided by
// b, result saturated on overflow as SPARC v8 specifies). The condition codes
// returned are those of the cc forms: N and Z from the 32-bit result, V set on
// divide overflow, C cleared. div_zero flags a zero divisor (trap 0x2A).
//
// The model places this unit in four DSP slices and only names it; the
// function here is the SPARC v8 definition written as plain combinational
// operators, with timing and DSP mapping left to synthesis.
module muldiv_shf
  import sparc_pkg::*;
(
  input  mds_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] y_in,
  output logic [31:0] result,
  output logic [31:0] y_out,
  output logic [3:0]  icc,
  output logic        div_zero
);
  logic [63:0] prod_u, prod_s, dvd;
  logic [63:0] q_u;
  logic signed [63:0] q_s;
  logic        ovf;

  always_comb begin
    prod_u   = {32'd0, a} * {32'd0, b};
    prod_s   = $unsigned($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}));
    dvd      = {y_in, a};
    div_zero = ((op == MDS_UDIV) || (op == MDS_SDIV)) && (b == 32'd0);
    q_u      = (b == 32'd0) ? 64'd0 : dvd / {32'd0, b};
    q_s      = (b == 32'd0) ? 64'sd0 : $signed(dvd) / $signed({{32{b[31]}}, b});
    ovf      = 1'b0;
    y_out    = y_in;
    unique case (op)
      MDS_SLL:  result = a << b[4:0];
      MDS_SRL:  result = a >> b[4:0];
      MDS_SRA:  result = $unsigned($signed(a) >>> b[4:0]);
      MDS_UMUL: begin result = prod_u[31:0]; y_out = prod_u[63:32]; end
      MDS_SMUL: begin result = prod_s[31:0]; y_out = prod_s[63:32]; end
      MDS_UDIV: begin
        ovf    = (q_u[63:32] != 32'd0);
        result = ovf ? 32'hFFFF_FFFF : q_u[31:0];
      end
      default: begin // MDS_SDIV
        if (q_s > 64'sh0000_0000_7FFF_FFFF) begin
          ovf = 1'b1; result = 32'h7FFF_FFFF;
        end else if (q_s < -64'sh0000_0000_8000_0000) begin
          ovf = 1'b1; result = 32'h8000_0000;
        end else begin
          result = q_s[31:0];
        end
      end
    endcase
    icc = {result[31], (result == 32'd0), ovf, 1'b0};
  end
endmodule
