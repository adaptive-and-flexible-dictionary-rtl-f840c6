// decompress_stage_tb: self-checking test of the decompression stage.
// A dictionary is modelled here (every fifth entry a relative-branch template
// with bit 31 clear). Each vector encodes one instruction as a U, G1, G2, G3,
// R1 or R2 code word, places it at the head of the buffer window followed by
// random bytes, with a random number of valid bytes, queue-ready and flush, and
// compares the stage's output with the instruction that was encoded: its value,
// address, length and class, and the bytes consumed. Incomplete code words must
// produce nothing.
module decompress_stage_tb;
  import cw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush, pop, out_valid, out_ready;
  logic [7:0][7:0] win;
  logic [3:0] count;
  logic [31:0] head_pc, dict_rdata;
  logic [7:0] dict_raddr;
  logic [2:0] pop_len;
  dec_instr_t out;
  logic [31:0] dmodel [256];
  int checks = 0, failures = 0;
  int seen [6];

  decompress_stage dut (.clk, .rst_n, .flush, .win(win[3:0]), .count, .head_pc,
    .dict_raddr, .dict_rdata, .pop, .pop_len, .out_valid, .out_ready, .out);

  assign dict_rdata = dmodel[dict_raddr];
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_br(int i);
    return (i % 5) == 0;
  endfunction

  function automatic int pick(bit branch, int lo, int hi);
    int i;
    do i = lo + int'($urandom % (hi - lo + 1)); while (is_br(i) != branch);
    return i;
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%s (class %0d)", what, out.cls); end
  endtask

  initial begin
    logic [7:0] bytes [4];
    int len, c, idx;
    logic [7:0] off;
    logic [31:0] exp_instr;
    cw_class_e ec;
    for (int i = 0; i < 256; i++) dmodel[i] = is_br(i) ? ($urandom & 32'h7fff_0000) : ($urandom | 32'h8000_0000);
    flush = 0; out_ready = 0; win = '0; count = 0; head_pc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 20000; v++) begin
      @(negedge clk);
      c = int'($urandom % 6);
      off = 8'($urandom);
      unique case (c)
        0: begin ec = CW_U; exp_instr = $urandom | 32'h8000_0000; len = 4;
                 for (int k = 0; k < 4; k++) bytes[k] = exp_instr[31-8*k -: 8]; end
        1: begin ec = CW_G1; idx = pick(0, 0, 124); len = 1; bytes[0] = 8'(idx);
                 exp_instr = dmodel[idx]; end
        2: begin ec = CW_G2; idx = pick(0, 0, 255); len = 2; bytes[0] = 8'h7D; bytes[1] = 8'(idx);
                 exp_instr = dmodel[idx]; end
        3: begin ec = CW_G3; idx = pick(0, 0, 255); len = 3; bytes[0] = 8'h7E; bytes[1] = 8'(idx);
                 bytes[2] = 8'($urandom); exp_instr = dmodel[idx]; end
        4: begin ec = CW_R1; idx = pick(1, 0, 124); len = 2; bytes[0] = 8'(idx); bytes[1] = off;
                 exp_instr = {1'b1, dmodel[idx][30:16], {8{off[7]}}, off}; end
        default: begin ec = CW_R2; idx = pick(1, 0, 255); len = 3; bytes[0] = 8'h7F; bytes[1] = 8'(idx);
                 bytes[2] = off; exp_instr = {1'b1, dmodel[idx][30:16], {8{off[7]}}, off}; end
      endcase
      for (int k = 0; k < 8; k++) win[k] = (k < len) ? bytes[k] : 8'($urandom);
      count     = 4'($urandom % 9);
      if ($urandom % 3 != 0 && count < 4'(len)) count = 4'(len + int'($urandom % (9 - len)));
      head_pc   = $urandom;
      out_ready = ($urandom % 4) != 0;
      flush     = ($urandom % 16) == 0;
      #1;
      if (int'(count) >= len && !flush) begin
        chk(out_valid === 1'b1, "complete code word not accepted");
        chk(out.instr === exp_instr, "instruction mismatch");
        chk(out.cls == ec, "class mismatch");
        chk(int'(out.len) == len, "length mismatch");
        chk(out.pc === head_pc, "address mismatch");
        chk(pop === out_ready, "pop must follow queue ready");
        chk(int'(pop_len) == len, "bytes consumed mismatch");
        if (out_valid) seen[c]++;
      end else begin
        chk(out_valid === 1'b0, "incomplete code word or flush produced output");
        chk(pop === 1'b0, "consumed bytes without output");
      end
    end
    for (int k = 0; k < 6; k++) chk(seen[k] > 0, "class never decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
