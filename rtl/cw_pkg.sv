// cw_pkg: constants and types shared by the dictionary code-compression front end.
//
// Code words are read from a big-endian byte stream; the first byte of a code
// word decides its class and length:
//   1xxxxxxx                 U  : uncompressed 32-bit instruction (4 bytes)
//   0iiiiiii  (i < 125)      G1 : 7-bit dictionary index (1 byte), or
//                            R1 : same index byte followed by an 8-bit branch
//                                 offset (2 bytes) when the addressed dictionary
//                                 entry is marked as a relative-branch template
//   0x7D iiiiiiii            G2 : 8-bit index (2 bytes)
//   0x7E iiiiiiii pppppppp   G3 : 8-bit index plus a padding byte (3 bytes)
//   0x7F iiiiiiii oooooooo   R2 : 8-bit index plus 8-bit branch offset (3 bytes)
// The class sizes (8/16/24/32 bits, 125 one-byte codes, 256 entries) follow the
// scheme; the exact prefix values and the use of dictionary bit 31 as the branch
// mark are this implementation's choices. A real instruction always has bit 31
// set, so a dictionary entry with bit 31 clear is a branch template.
package cw_pkg;

  localparam int unsigned INSTR_W      = 32;
  localparam int unsigned ADDR_W       = 32;
  localparam int unsigned DICT_ENTRIES = 256;
  localparam int unsigned DICT_AW      = 8;
  localparam int unsigned G1_CODES     = 125;

  localparam logic [7:0] PFX_G2 = 8'h7D;
  localparam logic [7:0] PFX_G3 = 8'h7E;
  localparam logic [7:0] PFX_R2 = 8'h7F;

  typedef enum logic [2:0] {
    CW_U  = 3'd0,
    CW_G1 = 3'd1,
    CW_G2 = 3'd2,
    CW_G3 = 3'd3,
    CW_R1 = 3'd4,
    CW_R2 = 3'd5
  } cw_class_e;

  // One decompressed instruction as handed to the unchanged pipeline: the
  // rebuilt instruction, the compressed-space byte address of its code word,
  // the code word's length in bytes (pc + len is the fall-through address)
  // and its class.
  typedef struct packed {
    logic [INSTR_W-1:0] instr;
    logic [ADDR_W-1:0]  pc;
    logic [2:0]         len;
    cw_class_e          cls;
  } dec_instr_t;

endpackage
