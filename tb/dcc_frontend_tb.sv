// dcc_frontend_tb: end-to-end test of the compressed-code front end at its
// default sizes (two fetch units, 256-entry dictionary, 4-entry queue).
//
// Two processes, A and B, each get their own dictionary and a program image
// built here: basic blocks of randomly chosen instructions, each encoded as the
// shortest fitting code word class (U, G1, G2, G3, R1 or R2) and padded at the
// block end to a fetch-unit boundary with a G1/G2/G3 filler, as a compressing
// compiler would. A third region holds an uncompressed loop standing for the
// context-switch routine. The testbench models the instruction cache (1-cycle
// hits, random misses), a decode stage that stalls at random, branch redirects
// to block starts, and context switches that reload all 256 dictionary entries
// through the LDE write port while the uncompressed routine runs.
// Every instruction handed to decode is compared with the instruction the
// generator encoded, in program order. Also checked: the first instruction
// after a redirect reaches decode two cycles after its fetch unit returns from
// the cache, the fetch stage never leaves the decompression stage without data
// when it could have fetched, and every mechanism (all six classes, code words
// straddling fetch units, fetch held back by a full buffer, cache misses,
// decode stalls and a full queue, redirects, discarded stale responses,
// dictionary reloads) happens at least once.
module dcc_frontend_tb;
  import cw_pkg::*;

  localparam int MEM_BYTES = 16384;
  localparam int MAXE      = 8192;
  localparam int MAXB      = 2048;
  localparam int IMG_BYTES = 3072;
  localparam int BASE [3]  = '{32'h0000, 32'h1000, 32'h3000};

  logic clk = 0, rst_n = 0;
  logic redirect, ic_req, ic_rvalid, dict_we, id_valid, id_ready;
  logic [31:0] redirect_pc, ic_addr, ic_rdata, dict_wdata;
  logic [7:0] dict_waddr;
  dec_instr_t id_instr;

  dcc_frontend dut (.clk, .rst_n, .redirect, .redirect_pc, .ic_req, .ic_addr, .ic_rvalid, .ic_rdata,
                    .dict_we, .dict_waddr, .dict_wdata, .id_valid, .id_ready, .id_instr);

  always #5 clk = ~clk;

  // ---------------- program images and expected streams ----------------
  logic [7:0]  mem [MEM_BYTES];
  logic [31:0] dict [2][256];
  logic [31:0] e_pc [MAXE], e_instr [MAXE];
  int          e_len [MAXE];
  cw_class_e   e_cls [MAXE];
  int          nent = 0;
  int          blk [3][MAXB];
  int          nblk [3];
  int          img_end [3];

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_br(int p, int i);
    return (i % 5) == p;
  endfunction

  function automatic int pick(int p, bit branch, int hi);
    int i;
    do i = int'($urandom % (hi + 1)); while (is_br(p, i) != branch);
    return i;
  endfunction

  function automatic void emit(int p, cw_class_e c, ref int pc);
    logic [7:0] b [4];
    int len, idx;
    logic [7:0] off;
    logic [31:0] ins;
    off = 8'($urandom);
    unique case (c)
      CW_U:  begin ins = $urandom | 32'h8000_0000; len = 4; for (int k = 0; k < 4; k++) b[k] = ins[31-8*k -: 8]; end
      CW_G1: begin idx = pick(p, 0, 124); len = 1; b[0] = 8'(idx); ins = dict[p][idx]; end
      CW_G2: begin idx = pick(p, 0, 255); len = 2; b[0] = PFX_G2; b[1] = 8'(idx); ins = dict[p][idx]; end
      CW_G3: begin idx = pick(p, 0, 255); len = 3; b[0] = PFX_G3; b[1] = 8'(idx); b[2] = 8'($urandom);
                   ins = dict[p][idx]; end
      CW_R1: begin idx = pick(p, 1, 124); len = 2; b[0] = 8'(idx); b[1] = off;
                   ins = {1'b1, dict[p][idx][30:16], {8{off[7]}}, off}; end
      default: begin idx = pick(p, 1, 255); len = 3; b[0] = PFX_R2; b[1] = 8'(idx); b[2] = off;
                   ins = {1'b1, dict[p][idx][30:16], {8{off[7]}}, off}; end
    endcase
    for (int k = 0; k < len; k++) mem[pc + k] = b[k];
    e_pc[nent] = 32'(pc); e_instr[nent] = ins; e_len[nent] = len; e_cls[nent] = c;
    nent++;
    pc += len;
  endfunction

  function automatic cw_class_e rand_class();
    int r;
    r = int'($urandom % 100);
    if (r < 25) return CW_U;
    if (r < 55) return CW_G1;
    if (r < 70) return CW_G2;
    if (r < 75) return CW_G3;
    if (r < 90) return CW_R1;
    return CW_R2;
  endfunction

  function automatic void gen_image(int p);
    int pc;
    pc = BASE[p];
    nblk[p] = 0;
    while (pc < BASE[p] + (p == 2 ? 256 : IMG_BYTES)) begin
      int n;
      blk[p][nblk[p]++] = nent;
      n = 1 + int'($urandom % 10);
      for (int i = 0; i < n; i++) emit(p, (p == 2) ? CW_U : rand_class(), pc);
      case (pc % 4)
        1: emit(p, CW_G3, pc);
        2: emit(p, CW_G2, pc);
        3: emit(p, CW_G1, pc);
        default: ;
      endcase
    end
    img_end[p] = nent;
  endfunction

  // ---------------- cache model ----------------
  bit  pend;
  int  lat, pend_gen;
  logic [31:0] pend_addr;
  int  miss_pct;

  function automatic logic [31:0] word_at(logic [31:0] a);
    return {mem[a % MEM_BYTES], mem[(a + 1) % MEM_BYTES], mem[(a + 2) % MEM_BYTES], mem[(a + 3) % MEM_BYTES]};
  endfunction

  // ---------------- stimulus state ----------------
  int  cyc = 0, cur = 0, proc = 0, gen = 0;
  int  t_arr = -1;
  bit  await_first = 0;
  int  since_redirect = 0;
  int  stall_pct = 0, redir_pct = 0;
  bit  reloading = 0;
  int  reload_idx = 0, reload_to = 0;
  bit  need_wrap = 0;
  // mechanism counters
  int  n_cls [6];
  int  n_instr = 0, n_fetch = 0, n_straddle = 0, n_full_hold = 0, n_miss = 0, n_decode_stall = 0;
  int  n_queue_full = 0, n_redirect = 0, n_discard = 0, n_reload = 0, n_latency = 0, n_starve_ok = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("cycle %0d: %s", cyc, what);
    end
  endtask

  task automatic step();
    bit resp, req_s, rd, hs;
    logic [31:0] addr_s, tgt;
    @(negedge clk);
    // choose a redirect
    rd = 0; tgt = 0;
    if (need_wrap) begin
      rd = 1; need_wrap = 0;
      cur = blk[proc][$urandom % nblk[proc]];
    end else if (!reloading && reload_to == 0 && int'($urandom % 1000) < redir_pct * 10) begin
      rd = 1;
      cur = blk[proc][$urandom % nblk[proc]];
    end
    // context switch: run the uncompressed routine while reloading the dictionary
    dict_we = 0;
    if (reloading) begin
      dict_we    = 1;
      dict_waddr = 8'(reload_idx);
      dict_wdata = dict[reload_to - 1][reload_idx];
      reload_idx++;
      if (reload_idx == 256) begin
        reloading = 0;
        n_reload++;
      end
    end else if (reload_to != 0 && !rd) begin
      // routine done: jump to the other process
      proc = reload_to - 1; reload_to = 0;
      rd = 1; cur = blk[proc][$urandom % nblk[proc]];
    end
    if (rd) tgt = e_pc[cur];
    redirect    = rd;
    redirect_pc = tgt;
    id_ready    = !rd && (int'($urandom % 100) >= stall_pct);
    resp        = pend && lat == 1;
    ic_rvalid   = resp;
    ic_rdata    = resp ? word_at(pend_addr) : $urandom;
    #1;
    req_s = ic_req; addr_s = ic_addr;
    // interface rules
    if (req_s) begin
      chk(!pend || resp, "request while one is outstanding");
      n_fetch++;
    end else if (!pend || resp) n_full_hold += rd ? 0 : 1;
    if (rd && pend && !resp) n_discard++;
    if (id_valid && !id_ready && !rd) n_decode_stall++;
    if (dut.u_dp.out_valid && !dut.u_q.in_ready) n_queue_full++;
    // the decompression stage may only starve while its next unit is on the way
    if (miss_pct == 0 && since_redirect > 3 && !dut.u_dp.out_valid && dut.u_q.in_ready && !rd) begin
      chk(pend || req_s, "decompression stage starved with fetch idle");
      n_starve_ok++;
    end
    // redirect-to-decode latency
    if (await_first && !rd && id_valid) begin
      chk(t_arr >= 0 && cyc == t_arr + 2, "first instruction after redirect not 2 cycles after its fetch unit");
      n_latency++;
      await_first = 0;
    end
    // compare delivered instructions with the generated program
    hs = id_valid && id_ready;
    if (hs) begin
      chk(id_instr.pc === e_pc[cur], $sformatf("pc %h expected %h", id_instr.pc, e_pc[cur]));
      chk(id_instr.instr === e_instr[cur], $sformatf("instr %h expected %h at %h", id_instr.instr, e_instr[cur], e_pc[cur]));
      chk(int'(id_instr.len) == e_len[cur], "length mismatch");
      chk(id_instr.cls == e_cls[cur], "class mismatch");
      n_cls[int'(e_cls[cur])]++;
      if ((e_pc[cur] % 4) + e_len[cur] > 4) n_straddle++;
      n_instr++;
      cur++;
      if (cur == img_end[proc]) need_wrap = 1;
    end
    @(posedge clk);
    #1;
    // cache model update
    if (resp && pend_gen == gen && t_arr < 0) t_arr = cyc;
    if (rd) begin
      gen++; n_redirect++; t_arr = -1; await_first = 1; since_redirect = 0;
      if (resp && req_s) ; // new request below
    end else since_redirect++;
    if (req_s) begin
      pend = 1; pend_addr = addr_s; pend_gen = gen;
      lat = (int'($urandom % 100) < miss_pct) ? 4 + int'($urandom % 7) : 1;
      if (lat > 1) n_miss++;
    end else if (resp) pend = 0;
    else if (pend) lat--;
    cyc++;
  endtask

  initial begin
    redirect = 0; redirect_pc = 0; ic_rvalid = 0; ic_rdata = 0; id_ready = 0;
    dict_we = 0; dict_waddr = 0; dict_wdata = 0;
    pend = 0; lat = 0; pend_gen = 0; pend_addr = 0; miss_pct = 0;
    for (int i = 0; i < MEM_BYTES; i++) mem[i] = 8'h00;
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < 256; i++)
        dict[p][i] = is_br(p, i) ? ($urandom & 32'h7fff_0000) : ($urandom | 32'h8000_0000);
    gen_image(0);
    gen_image(1);
    gen_image(2);
    // load dictionary A through the write port while in reset
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      dict_we = 1; dict_waddr = 8'(i); dict_wdata = dict[0][i];
      @(negedge clk);
    end
    dict_we = 0;
    @(posedge clk);
    #1 rst_n = 1;
    // phase 1: all hits, decode always ready, jump to the first block of A
    proc = 0; need_wrap = 0;
    cur = 0;
    // the front end starts at address 0 = block 0 of A, so no redirect needed;
    // a redirect is still issued to measure the latency
    need_wrap = 1;
    for (int i = 0; i < 2000; i++) step();
    $display("all-hit phase: %0d instructions in %0d cycles", n_instr, cyc);
    // phase 2: misses, decode stalls, random redirects
    miss_pct = 20; stall_pct = 30; redir_pct = 2;
    for (int i = 0; i < 6000; i++) step();
    // phase 3: context switch to B, run, switch back to A
    for (int s = 0; s < 2; s++) begin
      // jump into the uncompressed routine, then reload
      @(negedge clk);
      step_routine();
      reloading = 1; reload_idx = 0; reload_to = (proc == 0) ? 2 : 1;
      for (int i = 0; i < 4000; i++) step();
    end
    // phase 4: heavy decode stalls so the queue fills and fetch is held back
    stall_pct = 85; redir_pct = 1;
    for (int i = 0; i < 3000; i++) step();

    chk(n_instr > 1000, "too few instructions delivered");
    for (int k = 0; k < 6; k++) chk(n_cls[k] > 0, $sformatf("class %0d never delivered", k));
    chk(n_straddle > 0,     "no code word straddled fetch units");
    chk(n_full_hold > 0,    "fetch never held back by a full buffer");
    chk(n_miss > 0,         "no cache miss");
    chk(n_decode_stall > 0, "decode never stalled");
    chk(n_queue_full > 0,   "queue never full");
    chk(n_redirect > 0,     "no redirect");
    chk(n_discard > 0,      "no stale cache response discarded");
    chk(n_reload >= 2,      "dictionary not reloaded twice");
    chk(n_latency > 0,      "redirect latency never measured");
    chk(n_starve_ok > 0,    "fetch/decompression balance never checked");
    $display("instr=%0d fetches=%0d (fetches/instr %0.3f) U=%0d G1=%0d G2=%0d G3=%0d R1=%0d R2=%0d",
             n_instr, n_fetch, real'(n_fetch) / real'(n_instr), n_cls[0], n_cls[1], n_cls[2], n_cls[3], n_cls[4], n_cls[5]);
    $display("straddle=%0d full_hold=%0d miss=%0d decode_stall=%0d queue_full=%0d redirect=%0d discard=%0d reload=%0d latency_checks=%0d",
             n_straddle, n_full_hold, n_miss, n_decode_stall, n_queue_full, n_redirect, n_discard, n_reload, n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // redirect into the uncompressed context-switch routine (region 2)
  task automatic step_routine();
    proc = 2;
    need_wrap = 1;
  endtask
endmodule
