// mt_regfile: the multithreaded SPARC integer register file.
//
// Each hardware thread owns an aligned chunk of 64 32-bit words: eight
// globals, three register windows of 16 words (ins/locals of one window
// overlap the outs of the next) and eight words that only microcode can name
// (word 56 holds the trap base address). The thread number forms the upper
// address bits, so the whole file is one RAM of NTHREADS*64 words, which
// sparc_pkg::phys_reg indexes. Word 0 of every thread (%g0) reads as zero and
// ignores writes.
//
// Two read ports and one write port. Reads take two cycles, as in the
// model's two pipelined register-file access stages: the address is
// registered in the first cycle and the data in the second (a BRAM with its
// output register). Every word carries an even-parity bit generated on write
// and checked on read; a mismatch is reported on rd*_perr with the data.
//
// The 3-window / 64-word layout follows the model. The parity protection
// stands in for the model's BRAM protection (it names ECC or logic parity);
// port timing and the %g0 handling are this implementation's choices.
module mt_regfile #(
  parameter int NTHREADS = 64,
  localparam int TID_W = (NTHREADS > 1) ? $clog2(NTHREADS) : 1,
  localparam int AW    = TID_W + 6
) (
  input  logic             clk,
  input  logic [TID_W-1:0] rd_tid,
  input  logic [5:0]       ra1,
  input  logic [5:0]       ra2,
  output logic [31:0]      rd1,
  output logic [31:0]      rd2,
  output logic             rd1_perr,
  output logic             rd2_perr,
  input  logic             we,
  input  logic [TID_W-1:0] wr_tid,
  input  logic [5:0]       wa,
  input  logic [31:0]      wd
);
  logic [32:0]   ram [NTHREADS * 64];
  logic [AW-1:0] a1_q, a2_q;
  logic          z1_q, z2_q;

  always_ff @(posedge clk) begin
    if (we && wa != 6'd0) ram[{wr_tid, wa}] <= {^wd, wd};
  end

  // cycle 1: register the addresses; cycle 2: registered RAM output
  always_ff @(posedge clk) begin
    a1_q <= {rd_tid, ra1};
    a2_q <= {rd_tid, ra2};
    z1_q <= (ra1 == 6'd0);
    z2_q <= (ra2 == 6'd0);
    rd1  <= z1_q ? 32'd0 : ram[a1_q][31:0];
    rd2  <= z2_q ? 32'd0 : ram[a2_q][31:0];
    rd1_perr <= !z1_q && (^ram[a1_q]);
    rd2_perr <= !z2_q && (^ram[a2_q]);
  end
endmodule
