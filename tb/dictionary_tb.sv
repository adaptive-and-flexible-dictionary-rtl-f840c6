// dictionary_tb: self-checking test of the 256 x 32 dictionary.
// Fills every entry through the write port, reads all entries back in random
// order and compares with a copy kept here, checks that a read in the cycle of
// a write still sees the old word and the new one a cycle later, and overwrites
// entries again (a dictionary reload) before a second full read-back.
module dictionary_tb;
  localparam int N = 256;
  logic clk = 0;
  logic we;
  logic [7:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [N];
  int checks = 0, failures = 0;

  dictionary dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 0; k < N; k++) begin
      raddr = 8'((k * 97 + 13) % N);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("entry %0d: got %h expected %h", raddr, rdata, model[raddr]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    check_all();
    @(negedge clk);
    // read during write: old word in that cycle, new word after the edge
    for (int i = 0; i < 20; i++) begin
      logic [7:0] a;
      logic [31:0] d;
      a = 8'($urandom); d = $urandom;
      we = 1; waddr = a; wdata = d; raddr = a;
      #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("write-cycle read of %0d wrong", a); end
      @(negedge clk);
      we = 0; model[a] = d;
      #1;
      checks++;
      if (rdata !== d) begin failures++; $display("read after write of %0d wrong", a); end
    end
    // reload half the table, as a context switch would
    for (int i = 0; i < N; i += 2) begin
      we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
