// tb_x_input_buffer: presents a sequence of random 4-bit X vectors on the 16
// pins, LSB first during four shift cycles, and checks that xc repeats the pins
// and xold delivers the vector of the previous iteration bit by bit, and that
// both are zero outside the shift cycles.
module tb_x_input_buffer;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic shift;
  logic [N-1:0] x_in, xc, xold;
  int checks = 0, failures = 0;

  x_input_buffer #(.N_IN(N), .X_BITS(4)) dut (.clk, .rst_n, .shift, .x_in, .xc, .xold);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [3:0] cur [N];
    logic [3:0] prev [N];
    shift = 0; x_in = '0;
    for (int i = 0; i < N; i++) prev[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 50; it++) begin
      for (int i = 0; i < N; i++) cur[i] = 4'($urandom);
      for (int k = 0; k < 4; k++) begin
        shift = 1;
        for (int i = 0; i < N; i++) x_in[i] = cur[i][k];
        #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (xc[i] !== cur[i][k] || xold[i] !== prev[i][k]) begin
            failures++; $display("line %0d bit %0d xc %b xold %b exp %b %b", i, k, xc[i], xold[i], cur[i][k], prev[i][k]);
          end
        end
        @(negedge clk);
      end
      shift = 0; x_in = N'($urandom);
      #1 checks++;
      if (xc !== '0 || xold !== '0) begin failures++; $display("not gated"); end
      repeat (3) @(negedge clk);
      for (int i = 0; i < N; i++) prev[i] = cur[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
