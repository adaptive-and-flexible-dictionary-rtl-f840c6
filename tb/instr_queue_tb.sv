// instr_queue_tb: self-checking test of the decompressed-instruction queue.
// Random pushes and pops against a reference queue kept here; checks order,
// data, the full and empty flags, the one-cycle write-to-read latency, and
// that a flush empties the queue.
module instr_queue_tb;
  import cw_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic flush, in_valid, in_ready, out_valid, out_ready;
  dec_instr_t in_data, out_data;
  dec_instr_t model [$];
  int checks = 0, failures = 0;
  int fulls = 0;

  instr_queue dut (.clk, .rst_n, .flush, .in_valid, .in_ready, .in_data,
                                    .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      flush     = ($urandom % 100) == 0;
      in_valid  = ($urandom % 3) != 0;
      out_ready = (cyc % 400 < 200) ? (($urandom % 4) == 0) : (($urandom % 4) != 0);
      in_data.instr = $urandom;
      in_data.pc    = $urandom;
      in_data.len   = 3'($urandom % 4 + 1);
      in_data.cls   = CW_G1;
      #1;
      checks++;
      if (in_ready !== (model.size() < DEPTH)) begin failures++; $display("in_ready wrong at %0d", cyc); end
      checks++;
      if (out_valid !== (model.size() > 0)) begin failures++; $display("out_valid wrong at %0d", cyc); end
      if (out_valid && model.size() > 0) begin
        checks++;
        if (out_data !== model[0]) begin failures++; $display("data wrong at %0d", cyc); end
      end
      if (!in_ready) fulls++;
      @(posedge clk);
      if (flush) model.delete();
      else begin
        if (out_valid && out_ready) void'(model.pop_front());
        if (in_valid && in_ready) model.push_back(in_data);
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("queue never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
