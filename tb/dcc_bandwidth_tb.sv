// dcc_bandwidth_tb: instruction-fetch bandwidth of a loop workload at different
// dictionary coverages.
//
// The fetch bandwidth model of the compression scheme says that if a fraction
// c of the executed instructions is covered by the dictionary and each of them
// becomes an 8-bit code word, the bytes fetched fall to (1 - c) + c/4 of the
// uncompressed amount; c = 2/3 halves the fetch traffic. This test builds a
// loop body of N instructions, K of them one-byte G1 code words placed at
// random among 32-bit instructions, aligned so the body is a whole number of
// fetch units, and runs it for ITER iterations on the front end (all cache
// hits, decode always ready, the back edge taken as a redirect when the last
// instruction of the body reaches decode). Configurations: c = 0, c = 2/3
// (N = 48, K = 32) and c = 8/9 (N = 36, K = 32, close to the 89 % average
// coverage of function-specific 256-entry profiles).
// Checks: every instruction delivered is the encoded one; the body size equals
// the model; the cache requests per iteration are at least the body size in
// units and at most 4 units more (the units fetched past the back edge before
// the redirect takes effect). The measured ratio against c = 0 is printed.
module dcc_bandwidth_tb;
  import cw_pkg::*;

  localparam int ITER = 50;
  localparam logic [31:0] LOOP = 32'h100;

  logic clk = 0, rst_n = 0;
  logic redirect, ic_req, ic_rvalid, dict_we, id_valid, id_ready;
  logic [31:0] redirect_pc, ic_addr, ic_rdata, dict_wdata;
  logic [7:0] dict_waddr;
  dec_instr_t id_instr;

  dcc_frontend dut (.clk, .rst_n, .redirect, .redirect_pc, .ic_req, .ic_addr, .ic_rvalid, .ic_rdata,
                    .dict_we, .dict_waddr, .dict_wdata, .id_valid, .id_ready, .id_instr);

  always #5 clk = ~clk;

  logic [7:0]  mem [4096];
  logic [31:0] dict [256];
  logic [31:0] e_instr [64];
  logic [31:0] e_pc [64];
  int checks = 0, failures = 0;
  real per_iter [3];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("%s", what); end
  endtask

  function automatic logic [31:0] word_at(logic [31:0] a);
    return {mem[a % 4096], mem[(a + 1) % 4096], mem[(a + 2) % 4096], mem[(a + 3) % 4096]};
  endfunction

  // Runs one configuration; returns cache requests per iteration.
  task automatic run(int n, int k, output real fetch_per_iter);
    bit comp [64];
    int pc, placed, body_bytes, cur, iter, reqs;
    bit pend, resp, rd, req_s;
    logic [31:0] pend_addr;
    real model;
    // encode the body
    for (int i = 0; i < 64; i++) comp[i] = 0;
    placed = 0;
    while (placed < k) begin
      int j;
      j = int'($urandom % n);
      if (!comp[j]) begin comp[j] = 1; placed++; end
    end
    for (int i = 0; i < 4096; i++) mem[i] = 8'hFF;  // U-class filler after the body
    pc = LOOP;
    for (int i = 0; i < n; i++) begin
      e_pc[i] = 32'(pc);
      if (comp[i]) begin
        int idx;
        idx = int'($urandom % 125);
        mem[pc] = 8'(idx); e_instr[i] = dict[idx]; pc += 1;
      end else begin
        e_instr[i] = $urandom | 32'h8000_0000;
        for (int b = 0; b < 4; b++) mem[pc + b] = e_instr[i][31-8*b -: 8];
        pc += 4;
      end
    end
    body_bytes = pc - int'(LOOP);
    model = (1.0 - real'(k) / n) + (real'(k) / n) / 4.0;
    chk(body_bytes % 4 == 0, "body not a whole number of fetch units");
    chk(body_bytes == int'(model * 4.0 * n), $sformatf("body %0d bytes, model %f", body_bytes, model * 4.0 * n));
    // run
    rst_n = 0; redirect = 0; id_ready = 0; ic_rvalid = 0;
    repeat (2) @(negedge clk);
    @(posedge clk);
    #1 rst_n = 1;
    pend = 0; pend_addr = 0; cur = 0; iter = 0; reqs = 0; rd = 1;
    while (iter < ITER) begin
      @(negedge clk);
      redirect    = rd;
      redirect_pc = LOOP;
      id_ready    = !rd;
      resp        = pend;
      ic_rvalid   = resp;
      ic_rdata    = resp ? word_at(pend_addr) : 32'h0;
      #1;
      req_s = ic_req;
      if (req_s) begin
        reqs++;
        pend_addr = ic_addr;
      end
      if (rd) begin cur = 0; rd = 0; end
      else if (id_valid) begin
        chk(id_instr.instr === e_instr[cur] && id_instr.pc === e_pc[cur],
            $sformatf("iteration %0d instruction %0d: %h at %h", iter, cur, id_instr.instr, id_instr.pc));
        cur++;
        if (cur == n) begin rd = 1; iter++; end
      end
      @(posedge clk);
      pend = req_s;
    end
    fetch_per_iter = real'(reqs) / ITER;
    chk(fetch_per_iter >= real'(body_bytes / 4), "fewer fetches than the body holds");
    chk(fetch_per_iter <= real'(body_bytes / 4 + 4), $sformatf("%f fetches per iteration for a %0d-unit body", fetch_per_iter, body_bytes / 4));
    $display("N=%0d K=%0d coverage=%0.3f: body %0d units (model %0.3f of uncompressed), %0.2f cache requests per iteration",
             n, k, real'(k) / n, body_bytes / 4, model, fetch_per_iter);
  endtask

  initial begin
    redirect = 0; redirect_pc = 0; ic_rvalid = 0; ic_rdata = 0; id_ready = 0;
    dict_we = 0; dict_waddr = 0; dict_wdata = 0;
    for (int i = 0; i < 256; i++) dict[i] = $urandom | 32'h8000_0000;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      dict_we = 1; dict_waddr = 8'(i); dict_wdata = dict[i];
      @(negedge clk);
    end
    dict_we = 0;
    run(48, 0, per_iter[0]);
    run(48, 32, per_iter[1]);
    run(36, 32, per_iter[2]);
    // the c = 8/9 loop is 36 instructions long, so it is compared with 36/48 of the c = 0 loop
    $display("measured fetch ratio: c=2/3 -> %0.3f, c=8/9 -> %0.3f (of the uncompressed loop's requests)",
             per_iter[1] / per_iter[0], per_iter[2] / (per_iter[0] * 36.0 / 48.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
