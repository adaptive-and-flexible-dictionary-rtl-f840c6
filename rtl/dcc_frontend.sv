// dcc_frontend: instruction front end of a single-issue RISC pipeline running
// dictionary-compressed code.
//
// Frequently executed 32-bit instructions are stored in memory as 8-, 16- or
// 24-bit code words that index a 256-entry dictionary; the rest stay 32 bits.
// The front end fetches 32-bit fetch units from the instruction cache
// (fetch_stage), keeps up to two of them (fetch_buffer), and in an extra
// pipeline stage (decompress_stage) takes one code word per cycle, rebuilds the
// full instruction through the dictionary and queues it (instr_queue) for an
// unchanged decode/execute/memory/write-back pipeline.
//
// Ports:
//   ic_*        instruction cache: word-address request, one outstanding, data
//               with ic_rvalid one cycle later on a hit.
//   redirect    branch target or misprediction recovery from the pipeline or
//               its predictor; flushes buffer and queue and refetches.
//   dict_*      dictionary write port, driven by write-back for each LDE
//               (load dictionary entry) instruction.
//   id_*        decompressed instruction stream to decode (valid/ready).
// Timing: with cache hits, a redirect in cycle t issues the target in cycle t,
// its data enters the buffer at the end of t+1, the first instruction is
// decompressed in t+2 and is offered to decode in t+3: one cycle more than a
// front end without the decompression stage. After that up to one instruction
// per cycle is delivered. Because a unit is only requested when it is sure to
// fit in the two-unit buffer, a one-cycle bubble occurs when the buffer was
// full one cycle and then held fewer bytes than the next code word needs.
module dcc_frontend
  import cw_pkg::*;
#(
  parameter int unsigned FETCH_UNITS = 2,
  parameter int unsigned QUEUE_DEPTH = 4,
  parameter int unsigned DICT_SIZE   = DICT_ENTRIES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // branch redirect
  input  logic                       redirect,
  input  logic [ADDR_W-1:0]          redirect_pc,
  // instruction cache
  output logic                       ic_req,
  output logic [ADDR_W-1:0]          ic_addr,
  input  logic                       ic_rvalid,
  input  logic [31:0]                ic_rdata,
  // LDE write from write-back
  input  logic                       dict_we,
  input  logic [$clog2(DICT_SIZE)-1:0] dict_waddr,
  input  logic [INSTR_W-1:0]         dict_wdata,
  // to decode
  output logic                       id_valid,
  input  logic                       id_ready,
  output dec_instr_t                 id_instr
);

  localparam int unsigned BUF_BYTES = FETCH_UNITS * 4;
  localparam int unsigned CW        = $clog2(BUF_BYTES + 1);

  logic [BUF_BYTES-1:0][7:0] win;
  logic [CW-1:0]             count;
  logic [ADDR_W-1:0]         head_pc;
  logic                      buf_push;
  logic [31:0]               buf_word;
  logic                      pop;
  logic [2:0]                pop_len;
  logic [DICT_AW-1:0]        dict_raddr;
  logic [INSTR_W-1:0]        dict_rdata;
  logic                      dp_valid, q_ready;
  dec_instr_t                dp_out;

  fetch_stage #(.BUF_BYTES(BUF_BYTES)) u_fetch (
    .clk, .rst_n,
    .redirect, .redirect_pc,
    .ic_req, .ic_addr, .ic_rvalid, .ic_rdata,
    .buf_count (count),
    .pop_bytes (pop ? pop_len : 3'd0),
    .buf_push, .buf_word
  );

  fetch_buffer #(.UNITS(FETCH_UNITS)) u_buf (
    .clk, .rst_n,
    .flush     (redirect),
    .flush_pc  (redirect_pc),
    .push      (buf_push),
    .push_word (buf_word),
    .pop, .pop_len,
    .win, .count, .head_pc
  );

  decompress_stage #(.BUF_BYTES(BUF_BYTES)) u_dp (
    .clk, .rst_n,
    .flush     (redirect),
    .win       (win[3:0]),
    .count, .head_pc,
    .dict_raddr, .dict_rdata,
    .pop, .pop_len,
    .out_valid (dp_valid),
    .out_ready (q_ready),
    .out       (dp_out)
  );

  dictionary #(.ENTRIES(DICT_SIZE), .WIDTH(INSTR_W)) u_dict (
    .clk,
    .we    (dict_we),
    .waddr (dict_waddr),
    .wdata (dict_wdata),
    .raddr ($clog2(DICT_SIZE)'(dict_raddr)),
    .rdata (dict_rdata)
  );

  instr_queue #(.DEPTH(QUEUE_DEPTH), .T(dec_instr_t)) u_q (
    .clk, .rst_n,
    .flush     (redirect),
    .in_valid  (dp_valid),
    .in_ready  (q_ready),
    .in_data   (dp_out),
    .out_valid (id_valid),
    .out_ready (id_ready),
    .out_data  (id_instr)
  );

endmodule
