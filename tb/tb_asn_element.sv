// tb_asn_element: one element column driven directly. Weights and traces are
// written through the D line, then each round: the weight x X multiplication
// and the trace update run together and the serial element sum leaving the
// adder tree is compared with sum_j w_j * x_j over the enabled rows (mod 2^20);
// then the weights are updated with (T * R) >> (8 + N_c); finally all registers
// are read back over the D line and compared with arithmetic done here.
module tb_asn_element;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] xc, xold, l, ignore;
  logic rc, sign_ext, sa_start, wshift, tshift, rw, d, tree_clr, sum, d_out;
  int checks = 0, failures = 0;

  asn_element #(.N_IN(N), .W_BITS(16), .ACC_BITS(18)) dut (.clk, .rst_n, .xc, .xold, .rc, .sign_ext,
    .sa_start, .wshift, .tshift, .rw, .l, .d, .tree_clr, .ignore, .sum, .d_out);

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [15:0] w [N];
  logic [15:0] t [N];

  task automatic idle();
    xc = 0; xold = 0; rc = 0; sign_ext = 0; sa_start = 1; wshift = 0; tshift = 0; rw = 1; l = 0; d = 0; tree_clr = 1;
  endtask

  task automatic access(input bit write);
    for (int j = 0; j < N; j++)
      for (int r = 0; r < 2; r++) begin
        logic [15:0] got;
        for (int k = 0; k < 16; k++) begin
          wshift = r == 0; tshift = r == 1; l = N'(1) << j; rw = !write;
          d = r ? t[j][k] : w[j][k];
          #1 got[k] = d_out;
          @(negedge clk);
        end
        idle();
        if (!write) begin
          checks++;
          if (got !== (r ? t[j] : w[j])) begin failures++; $display("row %0d reg %0d got %h exp %h", j, r, got, r ? t[j] : w[j]); end
        end
      end
  endtask

  initial begin
    idle(); ignore = '0;
    for (int j = 0; j < N; j++) begin w[j] = 16'($urandom); t[j] = 16'($urandom % 2000); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    access(1);
    for (int round = 0; round < 12; round++) begin
      logic [3:0] x [N];
      logic [3:0] xo [N];
      logic [19:0] exp, got;
      logic signed [7:0] rv;
      bit yo;
      int nc;
      ignore = (round % 3 == 1) ? N'($urandom) : '0;
      yo = 1'($urandom); rv = 8'($urandom); nc = $urandom % 17;
      exp = '0;
      for (int j = 0; j < N; j++) begin
        x[j] = 4'($urandom); xo[j] = 4'($urandom);
        if (!ignore[j]) exp += 20'(int'(signed'(w[j])) * int'(x[j]));
        if (yo) t[j] += 16'(xo[j]);
      end
      // t = 0 clear, then t = 1..25
      idle(); @(negedge clk); tree_clr = 0;
      for (int c = 1; c <= 25; c++) begin
        sa_start = c == 1; sign_ext = 1;
        for (int j = 0; j < N; j++) begin
          xc[j] = c <= 4 ? x[j][c-1] : 1'b0;
          xold[j] = c <= 4 ? xo[j][c-1] : 1'b0;
        end
        tshift = c <= 16; d = yo;
        #1 if (c >= 6) got[c-6] = sum;
        @(negedge clk);
      end
      checks++;
      if (got !== exp) begin failures++; $display("round %0d sum got %h exp %h", round, got, exp); end
      // weight update
      idle(); tree_clr = 0;
      for (int c = 0; c < 24 + nc; c++) begin
        sa_start = c == 0; rc = c < 8 ? rv[c] : rv[7]; wshift = c >= 8 + nc;
        @(negedge clk);
      end
      idle();
      for (int j = 0; j < N; j++) w[j] += 16'((longint'(t[j]) * longint'(rv)) >>> (8 + nc));
    end
    access(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
