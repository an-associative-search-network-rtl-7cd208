// tb_shift_adder: multiplies random signed 16-bit weights by 4-bit unsigned X
// (sign-extending mode, 20 product bits) and random unsigned 16-bit traces by
// random signed 8-bit R (R fed LSB first and then continued with its sign bit,
// 40 product bits), and compares the serial product bits, read both
// combinationally (p) and one cycle later (p_q), with products computed here.
module tb_shift_adder;
  logic clk = 0, rst_n = 0;
  logic start, sign_ext, mx, mr, p, p_q;
  logic [15:0] w, t;
  int checks = 0, failures = 0;

  shift_adder #(.W_BITS(16), .ACC_BITS(18)) dut (.clk, .rst_n, .start, .sign_ext, .mx, .mr, .w, .t, .p, .p_q);

  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic mul_wx(input logic signed [15:0] wv, input logic [3:0] xv);
    logic signed [19:0] exp;
    logic [19:0] got, gotq;
    exp = 20'(wv) * signed'({16'b0, xv});
    exp = 20'(32'(wv) * 32'(xv));
    w = wv; t = 16'($urandom); sign_ext = 1; mr = 0;
    for (int k = 0; k < 20; k++) begin
      start = k == 0; mx = k < 4 ? xv[k] : 1'b0;
      #1 got[k] = p;
      @(negedge clk);
      gotq[k] = p_q;
    end
    checks += 2;
    if (got !== exp)  begin failures++; $display("WX %0d*%0d got %h exp %h", wv, xv, got, exp); end
    if (gotq !== exp) begin failures++; $display("WX q %0d*%0d got %h exp %h", wv, xv, gotq, exp); end
  endtask

  task automatic mul_tr(input logic [15:0] tv, input logic signed [7:0] rv);
    logic [39:0] exp, got;
    exp = 40'(64'(signed'({1'b0, tv})) * 64'(rv));
    t = tv; w = 16'($urandom); sign_ext = 0; mx = 0;
    for (int k = 0; k < 40; k++) begin
      start = k == 0; mr = k < 8 ? rv[k] : rv[7];
      #1 got[k] = p;
      @(negedge clk);
    end
    checks++;
    if (got !== exp) begin failures++; $display("TR %0d*%0d got %h exp %h", tv, rv, got, exp); end
  endtask

  initial begin
    start = 1; sign_ext = 0; mx = 0; mr = 0; w = 0; t = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mul_wx(-16'sd32768, 4'd15);
    mul_wx(16'sd32767, 4'd15);
    mul_tr(16'hFFFF, -8'sd128);
    mul_tr(16'hFFFF, 8'sd127);
    for (int i = 0; i < 100; i++) begin
      mul_wx(16'($urandom), 4'($urandom));
      mul_tr(16'($urandom), 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
