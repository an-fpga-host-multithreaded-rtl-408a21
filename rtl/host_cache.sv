// host_cache: per-thread partitioned, direct-mapped, write-back,
// write-allocate, non-blocking host cache with a decoupled refill path.
// The same module is used as the I-cache (never written by the pipeline) and
// as the D-cache of a pipeline.
//
// Organisation (defaults): 64 threads x 256 bytes = 16 KB; 32-byte lines, so
// 8 lines per thread and 512 lines in all. A thread only ever uses its own 8
// lines: the line index is {thread, addr[7:5]} and the tag is addr[31:8].
// The tag RAM holds 512 entries of {valid, dirty, tag, even parity}; the data
// RAM is four banks of 512 x 72 bits, each bank one 64-bit quarter of the line
// protected by a SECDED code (ecc_secded).
//
// Pipeline port, two cycles:
//   cycle 0  req_valid with thread, byte address and, for a store, the word
//            and byte mask: tag and line are read (registered RAM read).
//   cycle 1  resp_valid: tag compare, ECC check of the four quarters, 4:1
//            64-bit select and 32-bit word select, resp_hit / resp_rdata.
//            A miss (resp_hit = 0) tells the pipeline to replay the thread.
//   cycle 2  a store hit writes the re-encoded 64-bit quarter and sets dirty
//            ("read and modify").
// On a miss the thread's command {write back victim?, victim line, fill line,
// victim data} is pushed into the memory command FIFO and the thread is
// marked pending; further accesses by a pending thread just replay. A full
// FIFO also makes the thread replay, without recording the miss. Each thread
// has at most one outstanding miss, so up to NTHREADS misses are in flight.
//
// Memory port (128-bit beats, see sparc_pkg::mem_req_t): a command is sent
// as two write beats (dirty victim only) followed by one read beat; the read
// returns two 128-bit beats on the refill port, which writes the line through
// separate RAM ports from the pipeline's and, with the second beat, the tag,
// and clears the thread's pending bit. mreq_valid/mreq_ready is a
// valid/ready handshake; refill beats are always accepted.
//
// Follows the model: geometry, per-thread partitioning, write-back /
// write-allocate, non-blocking misses from different threads, separate
// refill ports, tag parity, data ECC, the command FIFO. This design's own
// choices: the command format, one outstanding miss per thread, the order of
// write-back before fill, treating a tag parity error as a clean miss, and
// replaying an access whose line is refilled in the same cycle.
module host_cache
  import sparc_pkg::*;
#(
  parameter int NTHREADS   = 64,
  parameter int LINES_PT   = 8,     // lines per thread (256 B / 32 B)
  parameter int FIFO_DEPTH = 64,
  localparam int TID_W   = (NTHREADS > 1) ? $clog2(NTHREADS) : 1,
  localparam int LIDX_W  = (LINES_PT > 1) ? $clog2(LINES_PT) : 1,
  localparam int IDX_W   = TID_W + LIDX_W,
  localparam int TAG_W   = 32 - 5 - LIDX_W,
  localparam int NLINES  = NTHREADS * LINES_PT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        cache_id,     // upper bits of the memory ID
  // pipeline port
  input  logic              req_valid,
  input  logic [TID_W-1:0]  req_tid,
  input  logic [31:0]       req_addr,
  input  logic              req_write,
  input  logic [31:0]       req_wdata,
  input  logic [3:0]        req_mask,
  output logic              resp_valid,
  output logic              resp_hit,
  output logic [31:0]       resp_rdata,
  // memory side
  output logic              mreq_valid,
  input  logic              mreq_ready,
  output mem_req_t          mreq,
  input  logic              mresp_valid,
  input  mem_resp_t         mresp,
  // events and error status
  output logic              ev_miss,       // miss recorded, command queued
  output logic              ev_writeback,  // the queued command writes back
  output logic              ev_fifo_full,  // miss replayed because FIFO full
  output logic              err_tag_parity,
  output logic              err_ecc_corrected,
  output logic              err_ecc_double
);
  typedef struct packed {
    logic             par;
    logic             valid;
    logic             dirty;
    logic [TAG_W-1:0] tag;
  } tag_t;

  typedef struct packed {
    logic               wb;
    logic [LINE_AW-1:0] victim;
    logic [LINE_AW-1:0] fill;
    logic [TID_W-1:0]   tid;
    logic [255:0]       data;
  } cmd_t;

  function automatic tag_t mk_tag(logic v, logic d, logic [TAG_W-1:0] t);
    tag_t r;
    r.valid = v; r.dirty = d; r.tag = t;
    r.par   = ^{v, d, t};
    return r;
  endfunction

  tag_t        tag_ram [NLINES];

  // ---------------------------------------------------------------- cycle 0
  logic [IDX_W-1:0] idx0;
  assign idx0 = {req_tid, req_addr[5 + LIDX_W - 1:5]};

  logic             v1, wr1, clash1;
  logic [TID_W-1:0] tid1;
  logic [31:0]      addr1, wdata1;
  logic [3:0]       mask1;
  tag_t             tag1;
  logic [71:0]      code1 [4];

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= req_valid;
    tid1   <= req_tid;
    addr1  <= req_addr;
    wr1    <= req_write;
    wdata1 <= req_wdata;
    mask1  <= req_mask;
    tag1   <= tag_ram[idx0];
    // a refill beat written in the same cycle as this read: the read saw
    // the old contents, so the access must replay
    clash1 <= mresp_valid && ({mresp.id[TID_W-1:0], mresp.line[LIDX_W-1:0]} == idx0);
  end

  // ---------------------------------------------------------------- cycle 1
  logic [63:0] q [4];
  logic [3:0]  corr, dbl;
  logic [71:0] enc_st;
  logic [63:0] merged;

  for (genvar b = 0; b < 4; b++) begin : g_dec
    ecc_secded u_dec (
      .enc_data (64'd0), .enc_code (),
      .dec_code (code1[b]), .dec_data (q[b]),
      .dec_corrected (corr[b]), .dec_double (dbl[b])
    );
  end

  logic             tag_ok, hit;
  logic [IDX_W:0]   init_cnt;
  logic             init_busy;
  logic [IDX_W-1:0] idx1;
  logic [63:0]      q_sel;
  logic [31:0]      w_sel, w_new;
  logic             pending_t, push;
  logic [NTHREADS-1:0] pending;
  cmd_t             cmd_in, cmd_out;
  logic             fifo_full, fifo_empty, pop;


  always_comb begin
    idx1   = {tid1, addr1[5 + LIDX_W - 1:5]};
    tag_ok = (^tag1) == 1'b0;
    hit    = !init_busy && !clash1 && tag_ok && tag1.valid && (tag1.tag == addr1[31:32 - TAG_W]);
    q_sel  = q[addr1[4:3]];
    w_sel  = addr1[2] ? q_sel[31:0] : q_sel[63:32];
    for (int k = 0; k < 4; k++) begin
      w_new[8*k +: 8] = mask1[k] ? wdata1[8*k +: 8] : w_sel[8*k +: 8];
    end
    merged = addr1[2] ? {q_sel[63:32], w_new} : {w_new, q_sel[31:0]};
    pending_t = pending[tid1];
    push      = v1 && !hit && !pending_t && !fifo_full && !init_busy && !clash1;

    cmd_in.wb     = tag_ok && tag1.valid && tag1.dirty;
    cmd_in.victim = {tag1.tag, addr1[5 + LIDX_W - 1:5]};
    cmd_in.fill   = addr1[31:5];
    cmd_in.tid    = tid1;
    cmd_in.data   = {q[3], q[2], q[1], q[0]};
  end

  assign resp_valid        = v1;
  assign resp_hit          = hit;
  assign resp_rdata        = w_sel;
  assign ev_miss           = push;
  assign ev_writeback      = push && cmd_in.wb;
  assign ev_fifo_full      = v1 && !hit && !pending_t && fifo_full && !init_busy && !clash1;
  assign err_tag_parity    = v1 && !init_busy && !tag_ok;
  assign err_ecc_corrected = v1 && !init_busy && tag_ok && tag1.valid && (|corr);
  assign err_ecc_double    = v1 && !init_busy && tag_ok && tag1.valid && (|dbl);

  ecc_secded u_enc (
    .enc_data (merged), .enc_code (enc_st),
    .dec_code (72'd0), .dec_data (), .dec_corrected (), .dec_double ()
  );

  // ---------------------------------------------------------------- cycle 2
  logic             st2;
  logic [IDX_W-1:0] idx2;
  logic [1:0]       bank2;
  logic [71:0]      code2;
  tag_t             tag2;

  always_ff @(posedge clk) begin
    if (!rst_n) st2 <= 1'b0;
    else        st2 <= v1 && hit && wr1;
    idx2  <= idx1;
    bank2 <= addr1[4:3];
    code2 <= enc_st;
    tag2  <= mk_tag(1'b1, 1'b1, tag1.tag);
  end

  // ---------------------------------------------------------------- refill
  logic [IDX_W-1:0] ridx;
  logic [TID_W-1:0] rtid;
  logic [71:0]      renc [2];

  assign rtid = mresp.id[TID_W-1:0];
  assign ridx = {rtid, mresp.line[LIDX_W-1:0]};

  for (genvar h = 0; h < 2; h++) begin : g_renc
    ecc_secded u_renc (
      .enc_data (mresp.data[64*h +: 64]), .enc_code (renc[h]),
      .dec_code (72'd0), .dec_data (), .dec_corrected (), .dec_double ()
    );
  end

  // after reset every tag is invalidated, one line per cycle through the
  // refill port; until then all accesses replay
  assign init_busy = !init_cnt[IDX_W];

  always_ff @(posedge clk) begin
    if (!rst_n)         init_cnt <= '0;
    else if (init_busy) init_cnt <= init_cnt + 1'b1;
  end

  // RAM writes: pipeline port (store hit) and refill port
  always_ff @(posedge clk) begin
    if (init_busy) tag_ram[init_cnt[IDX_W-1:0]] <= mk_tag(1'b0, 1'b0, '0);
    if (st2) tag_ram[idx2] <= tag2;
    if (mresp_valid && mresp.beat)
      tag_ram[ridx] <= mk_tag(1'b1, 1'b0, mresp.line[LINE_AW-1:LIDX_W]);
  end

  // the four data banks, each a separate 512 x 72 RAM with one read port,
  // a store-hit write port and a refill write port (refill beat 0 fills
  // banks 0/1, beat 1 fills banks 2/3)
  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [71:0] ram [NLINES];
    always_ff @(posedge clk) begin
      code1[b] <= ram[idx0];
      if (st2 && bank2 == 2'(b)) ram[idx2] <= code2;
      if (mresp_valid && mresp.beat == b[1]) ram[ridx] <= renc[b % 2];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pending <= '0;
    else begin
      if (push) pending[tid1] <= 1'b1;
      if (mresp_valid && mresp.beat) pending[rtid] <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- commands
  mem_cmd_fifo #(.W($bits(cmd_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (push), .din (cmd_in),
    .pop (pop), .dout (cmd_out),
    .full (fifo_full), .empty (fifo_empty), .count ()
  );

  typedef enum logic [1:0] { S_IDLE, S_WB0, S_WB1, S_RD } sst_e;
  sst_e sst;

  always_ff @(posedge clk) begin
    if (!rst_n) sst <= S_IDLE;
    else unique case (sst)
      S_IDLE: if (!fifo_empty) sst <= cmd_out.wb ? S_WB0 : S_RD;
      S_WB0:  if (mreq_ready) sst <= S_WB1;
      S_WB1:  if (mreq_ready) sst <= S_RD;
      default: if (mreq_ready) sst <= S_IDLE;
    endcase
  end

  always_comb begin
    mreq_valid = (sst != S_IDLE);
    mreq.id    = {cache_id, 6'(cmd_out.tid)};
    mreq.write = (sst == S_WB0) || (sst == S_WB1);
    mreq.line  = mreq.write ? cmd_out.victim : cmd_out.fill;
    mreq.beat  = (sst == S_WB1);
    mreq.data  = (sst == S_WB1) ? cmd_out.data[255:128] : cmd_out.data[127:0];
    pop        = (sst == S_RD) && mreq_ready;
  end

  a_one_miss_per_thread: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> !pending[tid1]);
endmodule
