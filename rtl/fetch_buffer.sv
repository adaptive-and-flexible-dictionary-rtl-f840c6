// fetch_buffer: the buffer of fetched units between fetch and decompression.
//
// It holds up to UNITS fetch units of 32 bits (two in this design) as a window
// of bytes, oldest byte first. The decompression stage reads win[0..] directly:
// win[0] is always the first byte of the next code word, because the bytes of
// each consumed code word are shifted out (pop/pop_len). A fetched unit is
// appended behind the valid bytes (push); pop and push may happen in the same
// cycle. Fetch units are big-endian: bits 31:24 become the first byte. Because a
// code word is at most four bytes, two units always hold any code word that
// straddles a fetch-unit boundary. head_pc is the compressed-space address of
// win[0]; flush empties the buffer and loads a new head address. All updates are
// on the rising clock edge; outputs are registers.
module fetch_buffer #(
  parameter int unsigned UNITS = 2,
  localparam int unsigned BYTES = UNITS * 4,
  localparam int unsigned CW    = $clog2(BYTES + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  input  logic [cw_pkg::ADDR_W-1:0] flush_pc,
  input  logic                      push,
  input  logic [31:0]               push_word,
  input  logic                      pop,
  input  logic [2:0]                pop_len,
  output logic [BYTES-1:0][7:0]     win,
  output logic [CW-1:0]             count,
  output logic [cw_pkg::ADDR_W-1:0] head_pc
);

  logic [BYTES-1:0][7:0] win_n;
  logic [CW-1:0]         cnt_pop;
  logic [3:0][7:0]       wbytes;

  always_comb begin
    // byte 0 of the unit is its most significant byte
    for (int k = 0; k < 4; k++) wbytes[k] = push_word[31-8*k -: 8];

    win_n   = win;
    cnt_pop = count;
    if (pop) begin
      cnt_pop = count - CW'(pop_len);
      for (int i = 0; i < BYTES; i++)
        win_n[i] = (i + int'(pop_len) < BYTES) ? win[i + int'(pop_len)] : 8'h00;
    end
    if (push) begin
      for (int i = 0; i < BYTES; i++)
        if (i >= int'(cnt_pop) && i < int'(cnt_pop) + 4) win_n[i] = wbytes[i - int'(cnt_pop)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win     <= '0;
      count   <= '0;
      head_pc <= '0;
    end else if (flush) begin
      win     <= '0;
      count   <= '0;
      head_pc <= flush_pc;
    end else begin
      win     <= win_n;
      count   <= cnt_pop + (push ? CW'(4) : CW'(0));
      if (pop) head_pc <= head_pc + cw_pkg::ADDR_W'(pop_len);
    end
  end

  // A consumer may only take bytes that are there, and a unit is only
  // appended when it fits behind what remains.
  a_pop_in_range : assert property (@(posedge clk) disable iff (!rst_n || flush)
    pop |-> (pop_len != 0 && CW'(pop_len) <= count));
  a_push_fits : assert property (@(posedge clk) disable iff (!rst_n || flush)
    push |-> (int'(cnt_pop) + 4 <= BYTES));

endmodule
