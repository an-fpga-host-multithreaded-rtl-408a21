// special_regs: per-thread special and thread-control registers.
//
// Holds, for every hardware thread, the SPARC PC and nPC, PSR (icc, PIL, S,
// PS, ET, CWP), WIM and Y, plus the model's thread-control state: microcode
// mode with its sequence and micro-PC, the instruction that entered
// microcode, the last trap type and the PC/nPC saved at a trap, and the
// halted (error-mode) flag. The whole record (sparc_pkg::tstate_t) is one
// entry of a distributed-RAM-style array indexed by thread number.
//
// Read port: combinational (LUT RAM) on rd_tid. Write port: the whole record
// of wr_tid at the clock edge when we is high; the pipeline writes a thread's
// record only when that thread commits or traps. Reset does not clear the
// array: a per-thread "initialised" bit makes a never-written entry read as
// the SPARC reset state (PC = RESET_PC, nPC = RESET_PC + 4, S = 1, ET = 0,
// CWP = 0, WIM = 0). halted[] exposes every thread's error-mode flag.
//
// Which registers are kept here follows the model's "special registers"
// box; the record layout and the reset mechanism are this design's choices.
module special_regs
  import sparc_pkg::*;
#(
  parameter int          NTHREADS = 64,
  parameter logic [31:0] RESET_PC = 32'h0000_0000,
  localparam int TID_W = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TID_W-1:0]  rd_tid,
  output tstate_t           rd_state,
  input  logic              we,
  input  logic [TID_W-1:0]  wr_tid,
  input  tstate_t           wr_state,
  output logic [NTHREADS-1:0] halted
);
  tstate_t             ram [NTHREADS];
  logic [NTHREADS-1:0] init;
  tstate_t             rst_state;

  always_comb begin
    rst_state          = '0;
    rst_state.pc       = RESET_PC;
    rst_state.npc      = RESET_PC + 32'd4;
    rst_state.psr.s    = 1'b1;
    rst_state.psr.ps   = 1'b1;
    rst_state.psr.pil  = 4'hF;
    rd_state = init[rd_tid] ? ram[rd_tid] : rst_state;
  end

  always_ff @(posedge clk) begin
    if (we) ram[wr_tid] <= wr_state;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init   <= '0;
      halted <= '0;
    end else if (we) begin
      init[wr_tid]   <= 1'b1;
      halted[wr_tid] <= wr_state.halted;
    end
  end
endmodule
