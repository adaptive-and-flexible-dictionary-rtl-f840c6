// decompress_stage: the decompression stage (DP) between fetch and decode.
//
// Every cycle it looks at the first four bytes in the fetch buffer (win, with
// count the number of valid bytes in the whole buffer) and, if a whole
// code word is there, turns it back into a 32-bit instruction:
//   * U  (first byte 1xxxxxxx): the four bytes are the instruction.
//   * G1 (first byte 0..124): the byte is a 7-bit dictionary index. If that
//     entry has bit 31 clear it is a relative-branch template and the code word
//     is R1: a second byte carries the 8-bit branch offset.
//   * G2 / G3 / R2 (prefix 0x7D / 0x7E / 0x7F): the next byte is an 8-bit index;
//     G3 has one padding byte after it, R2 the 8-bit branch offset.
// For R1 and R2 the offset, sign-extended, replaces bits 15:0 of the template.
// Bit 31 of every rebuilt instruction is set, as in all uncompressed code.
// The class, and so the length, of a one-byte-index code word depends on the
// dictionary entry, so the dictionary is read combinationally in the same cycle.
// The result (instruction, compressed-space address, length in bytes, class)
// goes to the instruction queue when it has room (out_ready); the code word's
// bytes are then consumed from the buffer (pop/pop_len). One code word per cycle.
// flush (a redirect) suppresses the output of this cycle.
// The class sizes follow the compression scheme; the prefix values, the branch
// mark in bit 31 and the offset position are this implementation's choices.
module decompress_stage #(
  parameter int unsigned BUF_BYTES = 8,
  localparam int unsigned CW       = $clog2(BUF_BYTES + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          flush,
  input  logic [3:0][7:0]               win,
  input  logic [CW-1:0]                 count,
  input  logic [cw_pkg::ADDR_W-1:0]     head_pc,
  output logic [cw_pkg::DICT_AW-1:0]    dict_raddr,
  input  logic [cw_pkg::INSTR_W-1:0]    dict_rdata,
  output logic                          pop,
  output logic [2:0]                    pop_len,
  output logic                          out_valid,
  input  logic                          out_ready,
  output cw_pkg::dec_instr_t            out
);
  import cw_pkg::*;

  cw_class_e  cls;
  logic [2:0] len;
  logic [7:0] offset;
  logic       branch_mark;
  logic       have_word;

  assign branch_mark = !dict_rdata[31];

  always_comb begin
    dict_raddr = {1'b0, win[0][6:0]};
    offset     = win[1];
    cls        = CW_U;
    len        = 3'd4;
    if (win[0][7]) begin
      cls = CW_U;
      len = 3'd4;
    end else if (win[0][6:0] < 7'(G1_CODES)) begin
      cls    = branch_mark ? CW_R1 : CW_G1;
      len    = branch_mark ? 3'd2 : 3'd1;
      offset = win[1];
    end else begin
      dict_raddr = win[1];
      offset     = win[2];
      unique case (win[0])
        PFX_G2:  begin cls = CW_G2; len = 3'd2; end
        PFX_G3:  begin cls = CW_G3; len = 3'd3; end
        default: begin cls = CW_R2; len = 3'd3; end
      endcase
    end
  end

  always_comb begin
    out.pc  = head_pc;
    out.len = len;
    out.cls = cls;
    unique case (cls)
      CW_U:         out.instr = {win[0], win[1], win[2], win[3]};
      CW_R1, CW_R2: out.instr = {1'b1, dict_rdata[30:16], {8{offset[7]}}, offset};
      default:      out.instr = {1'b1, dict_rdata[30:0]};
    endcase
  end

  assign have_word = (count != '0) && (CW'(len) <= count);
  assign out_valid = have_word && !flush;
  assign pop       = out_valid && out_ready;
  assign pop_len   = len;

  // G-class code words never name a branch template.
  a_g_not_branch : assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && (cls == CW_G2 || cls == CW_G3)) |-> !branch_mark);

endmodule
