// sparc_mt_top: the complete functional model on one FPGA: NCLUSTERS clusters
// of CORES_PER_CLUSTER host-multithreaded SPARC v8 pipelines (defaults 2 x 4
// pipelines x 64 threads = 512 SPARC contexts). Each pipeline has its own
// 16 KB I-cache and 16 KB D-cache, split evenly among its threads; the eight
// caches of a cluster share one memory controller port through mem_arbiter.
// The clusters do not share memory: this configuration emulates a
// non-cache-coherent distributed-memory machine.
//
// Interface: clk, rst_n; per cluster one 128-bit memory controller port
// (mc_req_valid/mc_req_ready/mc_req, mc_resp_valid/mc_resp; a line moves as
// two beats, see sparc_pkg) to be connected to a DDR2 controller, which is
// not part of this design; per pipeline the halted-thread vector, event
// pulses and error status (the signals a monitor circuit would watch); per
// pipeline and thread an interrupt request level (see mt_pipeline).
// Pipeline p gets core number p (cluster = p / CORES_PER_CLUSTER), which
// appears in its memory IDs and in RDASR %asr16.
//
// The cluster organisation follows the model; the port format is this
// design's own.
module sparc_mt_top
  import sparc_pkg::*;
#(
  parameter int          NCLUSTERS         = 2,
  parameter int          CORES_PER_CLUSTER = 4,
  parameter int          NTHREADS          = 64,
  parameter logic [31:0] RESET_PC          = 32'h0000_0000,
  localparam int NCORES = NCLUSTERS * CORES_PER_CLUSTER
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              mc_req_valid  [NCLUSTERS],
  input  logic              mc_req_ready  [NCLUSTERS],
  output mem_req_t          mc_req        [NCLUSTERS],
  input  logic              mc_resp_valid [NCLUSTERS],
  input  mem_resp_t         mc_resp       [NCLUSTERS],
  input  logic [3:0]        irq_level     [NCORES][NTHREADS],
  output logic [NTHREADS-1:0] halted      [NCORES],
  output logic [NCORES-1:0] ev_commit,
  output logic [NCORES-1:0] ev_ireplay,
  output logic [NCORES-1:0] ev_dreplay,
  output logic [NCORES-1:0] ev_trap,
  output logic [NCORES-1:0] ev_uop,
  output logic [NCORES-1:0] ev_miss,
  output logic [NCORES-1:0] ev_writeback,
  output logic [NCORES-1:0] err_parity,
  output logic [NCORES-1:0] err_ecc_corrected,
  output logic [NCORES-1:0] err_ecc_double
);
  if (NCORES > 8) begin : g_check
    $error("sparc_mt_top: the memory ID holds a 3-bit core number");
  end

  for (genvar c = 0; c < NCLUSTERS; c++) begin : g_cl
    logic      rv   [2*CORES_PER_CLUSTER];
    logic      rr   [2*CORES_PER_CLUSTER];
    mem_req_t  rq   [2*CORES_PER_CLUSTER];
    logic      sv   [2*CORES_PER_CLUSTER];
    mem_resp_t sp   [2*CORES_PER_CLUSTER];

    for (genvar p = 0; p < CORES_PER_CLUSTER; p++) begin : g_core
      localparam int CORE = c * CORES_PER_CLUSTER + p;
      mt_pipeline #(.NTHREADS(NTHREADS), .RESET_PC(RESET_PC)) u_pipe (
        .clk, .rst_n, .core_id (3'(CORE)),
        .imreq_valid (rv[2*p]),   .imreq_ready (rr[2*p]),   .imreq (rq[2*p]),
        .imresp_valid (sv[2*p]),  .imresp (sp[2*p]),
        .dmreq_valid (rv[2*p+1]), .dmreq_ready (rr[2*p+1]), .dmreq (rq[2*p+1]),
        .dmresp_valid (sv[2*p+1]), .dmresp (sp[2*p+1]),
        .irq_level (irq_level[CORE]), .halted (halted[CORE]),
        .ev_commit (ev_commit[CORE]), .ev_ireplay (ev_ireplay[CORE]),
        .ev_dreplay (ev_dreplay[CORE]), .ev_trap (ev_trap[CORE]), .ev_uop (ev_uop[CORE]),
        .ev_miss (ev_miss[CORE]), .ev_writeback (ev_writeback[CORE]),
        .err_parity (err_parity[CORE]), .err_ecc_corrected (err_ecc_corrected[CORE]),
        .err_ecc_double (err_ecc_double[CORE])
      );
    end

    mem_arbiter #(.N(2 * CORES_PER_CLUSTER)) u_arb (
      .clk, .rst_n,
      .req_valid (rv), .req_ready (rr), .req (rq),
      .resp_valid (sv), .resp (sp),
      .m_valid (mc_req_valid[c]), .m_ready (mc_req_ready[c]), .m_req (mc_req[c]),
      .m_resp_valid (mc_resp_valid[c]), .m_resp (mc_resp[c])
    );
  end
endmodule
