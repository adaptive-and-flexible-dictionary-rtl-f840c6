// dictionary: the code-word dictionary, 256 entries of 32 bits.
//
// Each entry holds the full bit pattern of one frequently executed instruction
// (or, with bit 31 clear, the opcode/register template of a relative branch whose
// offset comes from the code word). It behaves like a register file: the read
// port is combinational so the decompression stage can classify, look up and
// rebuild an instruction in one cycle, and the single 32-bit write port is
// clocked. The write port carries the LDE (load dictionary entry) instruction
// from the write-back stage, which lets the contents be reloaded as part of a
// process context; a fixed dictionary is simply loaded once after power-up.
// The contents are not reset (volatile storage). A read of an entry in the cycle
// it is written returns the old word; this is a choice of this implementation,
// the LDE routine finishes before code using the new entries is fetched.
module dictionary #(
  parameter int unsigned ENTRIES = cw_pkg::DICT_ENTRIES,
  parameter int unsigned WIDTH   = cw_pkg::INSTR_W,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
