// fetch_stage_tb: self-checking test of the fetch stage.
// A cache model here answers each request after 1 cycle (hit) or 3..8 cycles
// (miss) with a word derived from its address; a buffer model consumes 0..4
// bytes per cycle. Checks: one request outstanding at most, every unit handed
// to the buffer is the next word of the current path (so stale responses after
// a redirect are dropped), the buffer never overflows, and with hits and a
// consumer taking 4 bytes per cycle one unit is fetched every cycle.
module fetch_stage_tb;
  logic clk = 0, rst_n = 0;
  logic redirect, ic_req, ic_rvalid, buf_push;
  logic [31:0] redirect_pc, ic_addr, ic_rdata, buf_word;
  logic [3:0] buf_count;
  logic [2:0] pop_bytes;
  int checks = 0, failures = 0;
  int model_count;
  logic [31:0] exp_addr;
  // cache model
  logic pend; int lat; logic [31:0] pend_addr;
  int n_discard = 0, n_full_stall = 0, n_miss = 0, n_push = 0;
  bit all_hit, full_rate;

  fetch_stage dut (.clk, .rst_n, .redirect, .redirect_pc, .ic_req, .ic_addr,
                                    .ic_rvalid, .ic_rdata, .buf_count, .pop_bytes, .buf_push, .buf_word);

  function automatic logic [31:0] word_at(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  assign buf_count = 4'(model_count);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(bit do_redirect, logic [31:0] target);
    bit resp, req_s;
    logic [31:0] addr_s;
    @(negedge clk);
    redirect    = do_redirect;
    redirect_pc = target;
    resp        = pend && lat == 1;
    ic_rvalid   = resp;
    ic_rdata    = resp ? word_at(pend_addr) : $urandom;
    if (full_rate) pop_bytes = (model_count >= 4) ? 3'd4 : 3'd0;
    else begin
      pop_bytes = 3'($urandom % 5);
      if (int'(pop_bytes) > model_count) pop_bytes = 3'(model_count);
    end
    #1;
    req_s = ic_req; addr_s = ic_addr;
    if (ic_req) begin
      checks++;
      if (pend && !resp) begin failures++; $display("second request while one is outstanding"); end
      checks++;
      if (ic_addr[1:0] != 0) begin failures++; $display("unaligned fetch address"); end
    end else if (!pend || resp) n_full_stall++;
    if (buf_push) begin
      n_push++;
      checks++;
      if (buf_word !== word_at(exp_addr)) begin
        failures++; $display("pushed %h expected word of %h", buf_word, exp_addr);
      end
      exp_addr += 4;
    end
    if (do_redirect && pend && !resp) n_discard++;
    @(posedge clk);
    #1;
    if (do_redirect) begin
      model_count = 0;
      exp_addr    = target;
    end else model_count = model_count - int'(pop_bytes) + (buf_push ? 4 : 0);
    checks++;
    if (model_count > 8 || model_count < 0) begin failures++; $display("buffer overflow %0d", model_count); end
    if (req_s) begin
      pend = 1; pend_addr = addr_s;
      lat = (all_hit || ($urandom % 4 != 0)) ? 1 : 3 + int'($urandom % 6);
      if (lat > 1) n_miss++;
    end else if (resp) pend = 0;
    else if (pend) lat--;
  endtask

  initial begin
    redirect = 0; redirect_pc = 0; ic_rvalid = 0; ic_rdata = 0; pop_bytes = 0;
    model_count = 0; exp_addr = 0; pend = 0; lat = 0; pend_addr = 0;
    all_hit = 1; full_rate = 1;
    repeat (2) @(negedge clk);
    @(posedge clk);
    #1 rst_n = 1;  // released between an edge and the first modelled cycle
    // full-rate phase: hits and a consumer taking one word per cycle
    cycle(1, 32'h100);
    for (int i = 0; i < 20; i++) cycle(0, 0);
    begin
      int p0;
      p0 = n_push;
      for (int i = 0; i < 100; i++) cycle(0, 0);
      checks++;
      if (n_push - p0 != 100) begin failures++; $display("full rate: %0d units in 100 cycles", n_push - p0); end
    end
    // random phase: misses, partial consumption, redirects
    all_hit = 0; full_rate = 0;
    for (int i = 0; i < 5000; i++) begin
      if ($urandom % 40 == 0) cycle(1, ($urandom % 4096) & 32'hffc);
      else cycle(0, 0);
    end
    checks++; if (n_discard == 0)    begin failures++; $display("no stale response discarded"); end
    checks++; if (n_full_stall == 0) begin failures++; $display("fetch never held back by a full buffer"); end
    checks++; if (n_miss == 0)       begin failures++; $display("no miss"); end
    $display("pushes=%0d discards=%0d full_stalls=%0d misses=%0d", n_push, n_discard, n_full_stall, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
