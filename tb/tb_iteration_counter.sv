// tb_iteration_counter: increments the counter on random cycles, clears it at
// random moments, and checks the count every cycle; also runs it through the
// 16-bit wrap.
module tb_iteration_counter;
  logic clk = 0, rst_n = 0, inc, clear;
  logic [15:0] count;
  int checks = 0, failures = 0;

  iteration_counter #(.BITS(16)) dut (.clk, .rst_n, .inc, .clear, .count);

  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [15:0] m;
    inc = 0; clear = 0; m = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      inc = 1'($urandom); clear = ($urandom % 500) == 0;
      @(negedge clk);
      m = clear ? 16'd0 : m + 16'(inc);
      checks++;
      if (count !== m) begin failures++; $display("count %h exp %h", count, m); end
    end
    inc = 1; clear = 0;
    for (int i = 0; i < 70000; i++) begin
      @(negedge clk);
      m = m + 1;
      if (count !== m) begin failures++; checks++; end
      if (i % 1000 == 0) checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
