// tb_z_difference: loads a sequence of random signed 8-bit payoffs and checks
// that the R stream of each iteration is z - z_old, exact and sign-extended
// over 24 bits, z_old being the payoff of the previous iteration (0 after reset).
module tb_z_difference;
  logic clk = 0, rst_n = 0;
  logic z_in, load, start, run, r;
  int checks = 0, failures = 0;

  z_difference #(.Z_BITS(8)) dut (.clk, .rst_n, .z_in, .load, .start, .run, .r);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic signed [7:0] z, zold;
    logic [23:0] got, exp;
    z_in = 0; load = 0; start = 0; run = 0; zold = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      z = (it % 10 == 3) ? -8'sd128 : (it % 10 == 4) ? 8'sd127 : 8'($urandom);
      for (int k = 0; k < 8; k++) begin load = 1; z_in = z[k]; @(negedge clk); end
      load = 0; z_in = 0;
      repeat ($urandom % 4) @(negedge clk);
      exp = 24'(32'(z) - 32'(zold));
      for (int k = 0; k < 24; k++) begin
        run = 1; start = k == 0;
        #1 got[k] = r;
        @(negedge clk);
      end
      run = 0; start = 0;
      checks++;
      if (got !== exp) begin failures++; $display("z %0d zold %0d got %h exp %h", z, zold, got, exp); end
      zold = z;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
