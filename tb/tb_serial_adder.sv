// tb_serial_adder: adds random 16-bit pairs bit-serially through the serial
// adder (registered and combinational sum forms) and compares the serial
// results with a + b and with a - b (carry preset, b inverted).
module tb_serial_adder;
  logic clk = 0, rst_n = 0;
  logic clr, cin1, a, b, s_reg, s_comb;
  int checks = 0, failures = 0;

  serial_adder #(.REG_SUM(1'b1)) u_reg  (.clk, .rst_n, .clr, .cin1, .a, .b, .s(s_reg));
  serial_adder #(.REG_SUM(1'b0)) u_comb (.clk, .rst_n, .clr, .cin1, .a, .b, .s(s_comb));

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input logic [15:0] x, input logic [15:0] yv, input bit sub);
    logic [15:0] rc, rr, exp;
    logic [15:0] ybits;
    ybits = sub ? ~yv : yv;
    exp   = sub ? x - yv : x + yv;
    clr = 1; cin1 = 0; a = 0; b = 0;
    @(negedge clk);
    clr = 0;
    for (int k = 0; k < 16; k++) begin
      a = x[k]; b = ybits[k]; cin1 = sub && k == 0;
      #1 rc[k] = s_comb;
      @(negedge clk);
      rr[k] = s_reg;
    end
    checks += 2;
    if (rc !== exp) begin failures++; $display("comb %h %s %h = %h exp %h", x, sub ? "-" : "+", yv, rc, exp); end
    if (rr !== exp) begin failures++; $display("reg  %h %s %h = %h exp %h", x, sub ? "-" : "+", yv, rr, exp); end
  endtask

  initial begin
    clr = 1; cin1 = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(16'hFFFF, 16'h0001, 0);
    run(16'h1234, 16'h1234, 1);
    for (int i = 0; i < 200; i++) run(16'($urandom), 16'($urandom), ($urandom % 2) == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
