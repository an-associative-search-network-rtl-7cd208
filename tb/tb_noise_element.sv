// tb_noise_element: sends two random 20-bit sums and two random 20-bit noise
// values, the two noise bits of each cycle multiplexed on the one noise pin
// (element 0 in the first half-cycle, element 1 in the second), and checks the
// two noisy sums; then repeats with noise disabled and checks the sums pass
// unchanged.
module tb_noise_element;
  localparam int NB = 20;
  logic clk = 0, rst_n = 0;
  logic clr, en, noise_off, noise_in;
  logic [1:0] sum_in, nsum;
  int checks = 0, failures = 0;

  noise_element #(.N_ELEM(2)) dut (.clk, .rst_n, .clr, .en, .noise_off, .noise_in, .sum_in, .nsum);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input bit off);
    logic [NB-1:0] s0, s1, n0, n1, g0, g1, e0, e1;
    s0 = NB'($urandom); s1 = NB'($urandom); n0 = NB'($urandom); n1 = NB'($urandom);
    e0 = off ? s0 : s0 + n0; e1 = off ? s1 : s1 + n1;
    noise_off = off;
    clr = 1; en = 0; @(posedge clk); #1; clr = 0;
    for (int k = 0; k < NB + 1; k++) begin
      en = k < NB; sum_in = k < NB ? {s1[k], s0[k]} : 2'b00;
      noise_in = k < NB ? n0[k] : 1'b0;
      @(negedge clk); #1;
      noise_in = k < NB ? n1[k] : 1'b0;
      @(posedge clk); #1;
      if (k < NB) begin g0[k] = nsum[0]; g1[k] = nsum[1]; end
    end
    checks += 2;
    if (g0 !== e0) begin failures++; $display("e0 got %h exp %h", g0, e0); end
    if (g1 !== e1) begin failures++; $display("e1 got %h exp %h", g1, e1); end
  endtask

  initial begin
    clr = 1; en = 0; noise_off = 0; noise_in = 0; sum_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) run(i % 5 == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
