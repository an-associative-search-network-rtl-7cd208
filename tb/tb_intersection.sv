// tb_intersection: drives one intersection through register writes and reads
// (access mode), the weight x X multiplication, the trace update
// T += Yold * Xold, and the weight update W += (T * R) >> (8 + Nc), checking
// every register value and product bit against arithmetic done here.
module tb_intersection;
  logic clk = 0, rst_n = 0;
  logic xc, rc, sign_ext, sa_start, wx, wshift, tshift, rw, l, d, xold, d_out;
  logic [15:0] w_q, t_q;
  int checks = 0, failures = 0;

  intersection #(.W_BITS(16), .ACC_BITS(18)) dut (.clk, .rst_n, .xc, .rc, .sign_ext, .sa_start, .wx,
    .wshift, .tshift, .rw, .l, .d, .xold, .d_out, .w_q, .t_q);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic idle();
    xc = 0; rc = 0; sign_ext = 0; sa_start = 1; wshift = 0; tshift = 0; rw = 1; l = 0; d = 0; xold = 0;
  endtask

  task automatic write_reg(input bit trace, input logic [15:0] v);
    idle();
    for (int k = 0; k < 16; k++) begin
      wshift = !trace; tshift = trace; l = 1; rw = 0; d = v[k];
      @(negedge clk);
    end
    idle();
  endtask

  task automatic read_reg(input bit trace, output logic [15:0] v);
    idle();
    for (int k = 0; k < 16; k++) begin
      wshift = !trace; tshift = trace; l = 1; rw = 1;
      #1 v[k] = d_out;
      @(negedge clk);
    end
    idle();
  endtask

  task automatic one_iter(input logic [3:0] xv, input logic [3:0] xo, input bit yo,
                          input logic signed [7:0] rv, input int nc);
    logic signed [15:0] w0, wexp;
    logic [15:0] t0, texp, rb;
    logic [19:0] prod, pexp;
    logic [63:0] tr;
    w0 = w_q; t0 = t_q;
    pexp = 20'(32'(w0) * 32'(xv));
    texp = t0 + 16'(yo ? xo : 4'd0);
    // W*X and trace update run together
    idle();
    for (int k = 0; k < 21; k++) begin
      sa_start = k == 0; sign_ext = 1; xc = k < 4 ? xv[k] : 1'b0;
      tshift = k < 16; d = yo; xold = k < 4 ? xo[k] : 1'b0;
      @(negedge clk);
      if (k < 20) prod[k] = wx;
    end
    checks += 2;
    if (prod !== pexp) begin failures++; $display("WX %0d*%0d got %h exp %h", w0, xv, prod, pexp); end
    if (t_q !== texp)  begin failures++; $display("T got %h exp %h", t_q, texp); end
    // T*R and weight update
    tr = 64'(signed'({48'b0, texp})) * 64'(rv);
    wexp = w0 + 16'(tr >> (8 + nc));
    idle();
    for (int k = 0; k < 24 + nc; k++) begin
      sa_start = k == 0; sign_ext = 0; rc = k < 8 ? rv[k] : rv[7];
      wshift = k >= 8 + nc; rw = 1; l = 0;
      @(negedge clk);
    end
    idle();
    checks++;
    if (w_q !== wexp) begin failures++; $display("W got %h exp %h (T=%h R=%0d nc=%0d)", w_q, wexp, texp, rv, nc); end
    read_reg(0, rb);
    checks++;
    if (rb !== wexp) begin failures++; $display("W read %h exp %h", rb, wexp); end
  endtask

  initial begin
    logic [15:0] v, rb;
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      v = 16'($urandom); write_reg(0, v); read_reg(0, rb);
      checks += 2;
      if (rb !== v || w_q !== v) begin failures++; $display("W rw %h %h", rb, v); end
      v = 16'($urandom); write_reg(1, v); read_reg(1, rb);
      if (rb !== v || t_q !== v) begin failures++; $display("T rw %h %h", rb, v); end
    end
    for (int i = 0; i < 60; i++)
      one_iter(4'($urandom), 4'($urandom), 1'($urandom), 8'($urandom), $urandom % 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
