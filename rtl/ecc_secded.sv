// ecc_secded: single-error-correcting, double-error-detecting code for 64-bit
// words stored as 72 bits, the protection the model gives to the cache data
// BRAMs (organised 512 x 72 per bank).
//
// Encoder: a Hamming code over codeword positions 1..71 (check bits at the
// power-of-two positions 1,2,4,...,64, data in the others, in ascending
// order) plus an overall parity bit in position 0. Decoder: recomputes the
// syndrome and overall parity; a non-zero syndrome with bad overall parity is
// a single error and is corrected, a non-zero syndrome with good parity is a
// double error (reported, data passed uncorrected), zero syndrome with bad
// parity is an error in the parity bit itself.
//
// Interface: enc_data -> enc_code, and independently dec_code -> dec_data,
// dec_corrected, dec_double. Purely combinational. The model uses the FPGA's
// hard BRAM ECC; this file implements an equivalent code in logic, with the
// bit layout chosen here.
module ecc_secded (
  input  logic [63:0] enc_data,
  output logic [71:0] enc_code,
  input  logic [71:0] dec_code,
  output logic [63:0] dec_data,
  output logic        dec_corrected,
  output logic        dec_double
);
  function automatic logic is_pow2(int unsigned p);
    return (p != 0) && ((p & (p - 1)) == 0);
  endfunction

  logic [71:0] cw, fixed;
  logic [6:0]  syn;
  logic        par;
  int unsigned ke, kd;

  // encoder
  always_comb begin
    cw = '0;
    ke = 0;
    for (int unsigned p = 1; p < 72; p++) begin
      if (!is_pow2(p)) begin
        cw[p] = enc_data[ke];
        ke    = ke + 1;
      end
    end
    for (int unsigned b = 0; b < 7; b++) begin
      for (int unsigned p = 1; p < 72; p++) begin
        if (!is_pow2(p) && p[b]) cw[1 << b] = cw[1 << b] ^ cw[p];
      end
    end
    cw[0]    = ^cw[71:1];
    enc_code = cw;
  end

  // decoder
  always_comb begin
    syn = '0;
    for (int unsigned p = 1; p < 72; p++) begin
      if (dec_code[p]) syn = syn ^ 7'(p);
    end
    par           = ^dec_code;
    fixed         = dec_code;
    dec_corrected = 1'b0;
    dec_double    = 1'b0;
    if (syn != 7'd0 && par) begin
      if (syn < 7'd72) fixed[syn] = ~fixed[syn];
      dec_corrected = 1'b1;
    end else if (syn != 7'd0) begin
      dec_double = 1'b1;
    end else if (par) begin
      dec_corrected = 1'b1;
    end
    dec_data = '0;
    kd       = 0;
    for (int unsigned p = 1; p < 72; p++) begin
      if (!is_pow2(p)) begin
        dec_data[kd] = fixed[p];
        kd          = kd + 1;
      end
    end
  end
endmodule
