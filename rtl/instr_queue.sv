// instr_queue: the queue between the decompression stage and decode.
//
// A synchronous FIFO of DEPTH decompressed instructions with valid/ready on
// both sides. It is the pipeline register of the decompression stage and lets
// decompression run ahead while the rest of the pipeline stalls; when it is
// full, in_ready drops and the decompression and fetch stages stop in turn.
// Data written at a clock edge is visible on the output side from the next
// cycle. flush (a redirect) drops every entry. The depth is this
// implementation's choice.
module instr_queue #(
  parameter int unsigned DEPTH = 4,
  parameter type         T     = cw_pkg::dec_instr_t
) (
  input  logic clk,
  input  logic rst_n,
  input  logic flush,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                 mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [PW:0]      used;
  logic             do_push, do_pop;

  assign in_ready  = (used != (PW+1)'(DEPTH));
  assign out_valid = (used != '0);
  assign out_data  = mem[rd_ptr];
  assign do_push   = in_valid && in_ready;
  assign do_pop    = out_valid && out_ready;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push && !flush) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      used   <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      used   <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      used <= used + (do_push ? (PW+1)'(1) : '0) - (do_pop ? (PW+1)'(1) : '0);
    end
  end

endmodule
