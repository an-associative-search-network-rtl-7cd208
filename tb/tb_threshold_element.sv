// tb_threshold_element: compares random signed 20-bit sums with random signed
// thresholds bit-serially and checks y = (sum > threshold); also checks the
// state-table steps on equal bits and that y holds while the next comparison
// runs.
module tb_threshold_element;
  localparam int NB = 20;
  logic clk = 0, rst_n = 0;
  logic clr, en, msb, s, th, state, y;
  int checks = 0, failures = 0;

  threshold_element dut (.clk, .rst_n, .clr, .en, .msb, .s, .th, .state, .y);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic cmp(input logic signed [NB-1:0] a, input logic signed [NB-1:0] t);
    logic yprev;
    yprev = y;
    clr = 1; en = 0; msb = 0; @(negedge clk); clr = 0;
    for (int k = 0; k < NB; k++) begin
      en = 1; msb = k == NB - 1; s = a[k]; th = t[k];
      @(negedge clk);
      if (k < NB - 1) begin
        checks++;
        if (y !== yprev) begin failures++; $display("y changed early"); end
      end
    end
    en = 0; msb = 0;
    checks++;
    if (y !== (a > t)) begin failures++; $display("%0d > %0d gave %b", a, t, y); end
  endtask

  initial begin
    clr = 1; en = 0; msb = 0; s = 0; th = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cmp(5, 5); cmp(6, 5); cmp(-1, 0); cmp(0, -1); cmp(-524288, 524287); cmp(524287, -524288);
    for (int i = 0; i < 300; i++) begin
      logic signed [NB-1:0] a, t;
      a = NB'($urandom); t = (i % 4 == 0) ? a + NB'(($urandom % 3)) - 1 : NB'($urandom);
      cmp(a, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
