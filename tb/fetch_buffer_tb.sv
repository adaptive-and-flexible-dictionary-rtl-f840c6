// fetch_buffer_tb: self-checking test of the two-unit fetch buffer.
// Random legal pushes of 32-bit units and pops of 1..4 bytes, mirrored in a
// byte queue kept here; every cycle the valid bytes of the window, the byte
// count and the head address are compared. Also flushes with a new address.
module fetch_buffer_tb;
  logic clk = 0, rst_n = 0;
  logic flush, push, pop;
  logic [31:0] flush_pc, push_word, head_pc;
  logic [2:0] pop_len;
  logic [7:0][7:0] win;
  logic [3:0] count;
  logic [7:0] model [$];
  logic [31:0] model_pc;
  int checks = 0, failures = 0, straddles = 0;

  fetch_buffer dut (.clk, .rst_n, .flush, .flush_pc, .push, .push_word,
                                 .pop, .pop_len, .win, .count, .head_pc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; push = 0; pop = 0; pop_len = 1; flush_pc = 0; push_word = 0;
    model_pc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int rem;
      @(negedge clk);
      // compare state
      checks++;
      if (int'(count) != model.size()) begin failures++; $display("count %0d vs %0d", count, model.size()); end
      checks++;
      if (head_pc !== model_pc) begin failures++; $display("head_pc %h vs %h", head_pc, model_pc); end
      for (int i = 0; i < model.size() && i < 8; i++) begin
        checks++;
        if (win[i] !== model[i]) begin failures++; $display("byte %0d: %h vs %h", i, win[i], model[i]); end
      end
      // choose a legal action
      flush    = ($urandom % 150) == 0;
      flush_pc = $urandom & 32'hffff_fffc;
      pop_len  = 3'($urandom % 4 + 1);
      pop      = (model.size() > 0) && ($urandom % 4 != 0) && (int'(pop_len) <= model.size());
      rem      = model.size() - (pop ? int'(pop_len) : 0);
      push     = (rem + 4 <= 8) && ($urandom % 3 != 0);
      push_word = $urandom;
      if (pop && model.size() >= 5 && int'(pop_len) >= 1) straddles++;
      @(posedge clk);
      if (flush) begin
        model.delete();
        model_pc = flush_pc;
      end else begin
        if (pop) begin
          for (int k = 0; k < int'(pop_len); k++) void'(model.pop_front());
          model_pc += 32'(pop_len);
        end
        if (push) for (int k = 0; k < 4; k++) model.push_back(push_word[31-8*k -: 8]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
