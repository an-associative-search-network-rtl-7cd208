// tb_jk_ff: applies random J, K, clear and preset and checks q and q_n against
// the JK truth table (hold, reset, set, toggle) and the asynchronous overrides.
module tb_jk_ff;
  logic clk = 0, clr_n, pre_n, j, k, q, q_n;
  int checks = 0, failures = 0;

  jk_ff dut (.clk, .clr_n, .pre_n, .j, .k, .q, .q_n);

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic m;
    clr_n = 0; pre_n = 1; j = 0; k = 0; #2;
    m = 0;
    checks++; if (q !== 0) failures++;
    clr_n = 1; #1; pre_n = 0; #2;
    m = 1;
    checks++; if (q !== 1) begin failures++; $display("preset"); end
    pre_n = 1; #2;
    for (int i = 0; i < 500; i++) begin
      j = 1'($urandom); k = 1'($urandom);
      if ($urandom % 20 == 0) begin
        if ($urandom % 2) begin clr_n = 0; m = 0; end else begin pre_n = 0; m = 1; end
        #1 clr_n = 1; pre_n = 1;
      end
      #4 clk = 1;
      case ({j, k}) 2'b01: m = 0; 2'b10: m = 1; 2'b11: m = !m; default: ; endcase
      #1;
      checks++;
      if (q !== m || q_n !== !m) begin failures++; $display("j%b k%b q%b exp %b", j, k, q, m); end
      #4 clk = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
