// tb_decay_unit: loads decay constants through the byte writes and checks that
// decay_now fires in exactly every (D+1)-th decay slot, that the count is
// reloaded and decremented as expected, and that the registers read back.
module tb_decay_unit;
  logic clk = 0, rst_n = 0;
  logic slot, decay_now;
  logic [3:0] wr;
  logic [7:0] din;
  logic [15:0] decay_q, count_q;
  int checks = 0, failures = 0;

  decay_unit #(.BITS(16)) dut (.clk, .rst_n, .slot, .wr, .din, .decay_now, .decay_q, .count_q);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic wbyte(input int which, input logic [7:0] v);
    wr = 4'(1 << which); din = v; @(negedge clk); wr = 0;
  endtask

  initial begin
    int model;
    slot = 0; wr = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      int dval;
      dval = (trial == 5) ? 300 : $urandom % 6;
      wbyte(0, 8'(dval)); wbyte(1, 8'(dval >> 8));
      wbyte(2, 8'(dval)); wbyte(3, 8'(dval >> 8));
      checks++;
      if (decay_q !== 16'(dval) || count_q !== 16'(dval)) begin failures++; $display("readback"); end
      model = dval;
      for (int it = 0; it < 2 * dval + 5; it++) begin
        repeat (2) @(negedge clk);
        slot = 1; #1;
        checks++;
        if (decay_now !== (model == 0)) begin failures++; $display("D=%0d it=%0d decay_now=%b", dval, it, decay_now); end
        @(negedge clk); slot = 0;
        model = (model == 0) ? dval : model - 1;
        checks++;
        if (count_q !== 16'(model)) begin failures++; $display("count %0d exp %0d", count_q, model); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
