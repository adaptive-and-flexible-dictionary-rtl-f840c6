// fetch_stage: the fetch stage (F) of the compressed-code front end.
//
// It keeps the fetch address in the compressed address space and reads one
// 32-bit fetch unit per request from the instruction cache. A fetch unit holds
// one uncompressed instruction or up to four code words, so the decompression
// stage often needs several cycles to use one unit; the fetch stage then stops
// asking the cache, which is where the scheme saves fetch energy.
//
// Cache interface (this implementation's choice): ic_req/ic_addr issue a word
// address; exactly one request may be outstanding; the data returns with
// ic_rvalid one cycle later on a hit, later on a miss. A new request may be
// issued in the cycle the previous one returns.
// A request is made only if the fetch buffer, after this cycle's consumption
// (pop_bytes) and this cycle's arrival, leaves room for one more unit, so no
// fetched unit is ever dropped for lack of space.
// redirect/redirect_pc restart fetch at a branch target in the same cycle (the
// target is issued to the cache at once if no request is pending); a response
// still in flight at a redirect belongs to the old path and is discarded.
// Branch targets are aligned to fetch units by the compiler; this is asserted.
module fetch_stage #(
  parameter int unsigned BUF_BYTES = 8,
  localparam int unsigned CW       = $clog2(BUF_BYTES + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      redirect,
  input  logic [cw_pkg::ADDR_W-1:0] redirect_pc,
  output logic                      ic_req,
  output logic [cw_pkg::ADDR_W-1:0] ic_addr,
  input  logic                      ic_rvalid,
  input  logic [31:0]               ic_rdata,
  input  logic [CW-1:0]             buf_count,
  input  logic [2:0]                pop_bytes,
  output logic                      buf_push,
  output logic [31:0]               buf_word
);

  logic [cw_pkg::ADDR_W-1:0] fetch_pc;
  logic                      pending;   // a request is waiting for its data
  logic                      discard;   // ... and its data is for a stale path
  logic                      arrive;
  int unsigned               fill_next;
  logic                      slot_free;

  assign arrive    = pending && ic_rvalid;
  assign buf_push  = arrive && !discard && !redirect;
  assign buf_word  = ic_rdata;
  assign slot_free = !pending || arrive;

  always_comb begin
    fill_next = int'(buf_count) - int'(pop_bytes) + (buf_push ? 4 : 0);
    if (redirect) fill_next = 0;
  end

  assign ic_req  = slot_free && (fill_next + 4 <= BUF_BYTES);
  assign ic_addr = redirect ? redirect_pc : fetch_pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_pc <= '0;
      pending  <= 1'b0;
      discard  <= 1'b0;
    end else begin
      if (ic_req) begin
        fetch_pc <= ic_addr + cw_pkg::ADDR_W'(4);
        pending  <= 1'b1;
        discard  <= 1'b0;
      end else begin
        if (redirect) fetch_pc <= redirect_pc;
        if (arrive) begin
          pending <= 1'b0;
          discard <= 1'b0;
        end else if (redirect && pending) begin
          discard <= 1'b1;
        end
      end
    end
  end

  a_target_aligned : assert property (@(posedge clk) disable iff (!rst_n)
    redirect |-> (redirect_pc[1:0] == 2'b00));

endmodule
