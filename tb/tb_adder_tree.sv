// tb_adder_tree: feeds 16 random signed 20-bit numbers (sign-extended for 24
// bits) into the tree, LSB first, with a random ignore mask, and checks that the
// serial sum leaving the tree four cycles later equals the sum of the enabled
// inputs modulo 2^24.
module tb_adder_tree;
  localparam int N = 16, LAT = 4, NB = 24;
  logic clk = 0, rst_n = 0;
  logic clr, sum;
  logic [N-1:0] ignore, in;
  int checks = 0, failures = 0;

  adder_tree #(.N_IN(N)) dut (.clk, .rst_n, .clr, .ignore, .in, .sum);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [NB-1:0] v [N];
    logic [NB-1:0] exp, got;
    clr = 1; ignore = '0; in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      exp = '0;
      ignore = (it % 3 == 0) ? N'($urandom) : '0;
      for (int i = 0; i < N; i++) begin
        v[i] = NB'(signed'(20'($urandom)));
        if (!ignore[i]) exp += v[i];
      end
      clr = 1; in = '0; @(negedge clk); clr = 0;
      for (int k = 0; k < NB + LAT; k++) begin
        for (int i = 0; i < N; i++) in[i] = k < NB ? v[i][k] : 1'b0;
        @(negedge clk);
        if (k >= LAT - 1 && k - (LAT - 1) < NB) got[k-(LAT-1)] = sum;
      end
      checks++;
      if (got !== exp) begin failures++; $display("sum got %h exp %h", got, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
