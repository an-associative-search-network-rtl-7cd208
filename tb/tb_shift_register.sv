// tb_shift_register: checks shift-in, circulation (value returns after WIDTH
// cycles while its bits appear LSB first), parallel load and hold against a
// reference model kept in the testbench.
module tb_shift_register;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic shift, circ, load, din, lsb;
  logic [W-1:0] pdata, q, model;
  int checks = 0, failures = 0;

  shift_register #(.WIDTH(W)) dut (.clk, .rst_n, .shift, .circ, .load, .din, .pdata, .lsb, .q);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    shift = 0; circ = 0; load = 0; din = 0; pdata = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int op;
      op = $urandom % 4;
      shift = op == 1; circ = op == 2; load = op == 3 && ($urandom % 3 == 0);
      din = 1'($urandom); pdata = W'($urandom);
      checks++;
      if (lsb !== model[0]) begin failures++; $display("lsb mismatch"); end
      if (load)       model = pdata;
      else if (shift) model = {din, model[W-1:1]};
      else if (circ)  model = {model[0], model[W-1:1]};
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("q %h exp %h", q, model); end
    end
    // circulate W times: value returns and bits come out LSB first
    shift = 0; load = 1; pdata = 8'hA5; @(negedge clk); load = 0; circ = 1;
    for (int k = 0; k < W; k++) begin
      checks++;
      if (lsb !== pdata[k]) begin failures++; $display("circ bit %0d", k); end
      @(negedge clk);
    end
    checks++;
    if (q !== 8'hA5) begin failures++; $display("circ did not return"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
