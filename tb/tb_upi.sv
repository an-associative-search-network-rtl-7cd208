// tb_upi: walks the address counter through a full pause session. For the
// 512 intersection accesses it checks the row / register / bit decode, the write
// data lines and the read path; then it writes and reads back every byte
// register, checks the status byte, the iteration counter (counting and clear on
// write), that the counter restarts at 0 in each pause, and that outside pause
// an access reads status and moves nothing.
module tb_upi;
  import asn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cs_n, we_n, doe, paused, ia_sel, ia_trace, ia_write, thr_load, iter_inc;
  logic [7:0] din, dout, c_reg, ctrl;
  logic [1:0] y, ia_d, ia_q;
  logic [3:0] ia_row, dec_wr;
  logic [15:0] ignore, decay_q, dcount_q, iter_count;
  logic [19:0] thr_pdata, thr_q;
  int checks = 0, failures = 0;

  upi #(.N_IN(16), .N_ELEM(2), .SUM_BITS(20), .ITER_BITS(16)) dut (.clk, .rst_n, .cs_n, .we_n, .din, .dout, .doe,
    .paused, .y, .ia_sel, .ia_row, .ia_trace, .ia_write, .ia_d, .ia_q, .ignore, .c_reg, .ctrl,
    .dec_wr, .decay_q, .dcount_q, .thr_load, .thr_pdata, .thr_q, .iter_inc, .iter_count);

  // stand-ins for the registers that live outside the interface
  always_ff @(posedge clk) begin
    if (thr_load) thr_q <= thr_pdata;
    if (dec_wr[0]) decay_q[7:0] <= din;
    if (dec_wr[1]) decay_q[15:8] <= din;
    if (dec_wr[2]) dcount_q[7:0] <= din;
    if (dec_wr[3]) dcount_q[15:8] <= din;
  end

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one bus cycle; returns the byte read during it
  task automatic access(input bit write, input logic [7:0] data, output logic [7:0] rdata);
    cs_n = 0; we_n = !write; din = data;
    #1 rdata = dout;
    chk(doe == !write, "doe");
    @(negedge clk);
    cs_n = 1; we_n = 1;
  endtask

  initial begin
    logic [7:0] r;
    logic [7:0] vals [13];
    cs_n = 1; we_n = 1; din = 0; paused = 0; y = 2'b10; ia_q = 0; iter_inc = 0;
    thr_q = 0; decay_q = 0; dcount_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // not paused: read gives status, writes ignored, no counting
    access(0, 0, r); chk(r == 8'h02, "status outside pause");
    access(1, 8'hFF, r);
    repeat (5) begin iter_inc = 1; @(negedge clk); end
    iter_inc = 0;
    paused = 1; @(negedge clk);
    // intersection accesses 0..511
    for (int a = 0; a < 512; a++) begin
      logic wr;
      wr = 1'($urandom);
      ia_q = 2'($urandom);
      cs_n = 0; we_n = !wr; din = 8'($urandom);
      #1;
      chk(ia_sel && ia_row == 4'(a >> 5) && ia_trace == a[4] && ia_write == wr && ia_d == din[1:0],
          $sformatf("decode at %0d", a));
      if (!wr) chk(dout[1:0] == ia_q && dout[7:2] == 0, "intersection read");
      @(negedge clk);
    end
    cs_n = 1; #1 chk(!ia_sel, "ia_sel only during access");
    // byte registers 512..524 written
    for (int i = 0; i < 13; i++) begin
      vals[i] = 8'($urandom);
      access(1, vals[i], r);
    end
    chk(decay_q == {vals[1], vals[0]}, "decay");
    chk(ctrl == vals[2] && c_reg == vals[3], "ctrl/c");
    chk(ignore == {vals[5], vals[4]}, "enable");
    chk(iter_count == 0, "iteration counter cleared by write");
    chk(thr_q == {vals[10][3:0], vals[9], vals[8]}, "threshold");
    chk(dcount_q == {vals[12], vals[11]}, "decay count");
    // new pause session restarts at 0; skip to 512 and read back
    paused = 0; @(negedge clk); paused = 1; @(negedge clk);
    repeat (3) begin iter_inc = 1; @(negedge clk); end
    iter_inc = 0;
    for (int a = 0; a < 512; a++) access(0, 0, r);
    access(0, 0, r); chk(r == vals[0], "rd decay lo");
    access(0, 0, r); chk(r == vals[1], "rd decay hi");
    access(0, 0, r); chk(r == vals[2], "rd ctrl");
    access(0, 0, r); chk(r == vals[3], "rd c");
    access(0, 0, r); chk(r == vals[4], "rd en lo");
    access(0, 0, r); chk(r == vals[5], "rd en hi");
    access(0, 0, r); chk(r == 8'd3, "rd iter lo");
    access(0, 0, r); chk(r == 8'd0, "rd iter hi");
    access(0, 0, r); chk(r == vals[8], "rd thr0");
    access(0, 0, r); chk(r == vals[9], "rd thr1");
    access(0, 0, r); chk(r == {4'b0, vals[10][3:0]}, "rd thr2");
    access(0, 0, r); chk(r == vals[11], "rd dcnt lo");
    access(0, 0, r); chk(r == vals[12], "rd dcnt hi");
    for (int a = 525; a < 538; a++) access(0, 0, r);
    access(0, 0, r); chk(r == 8'h82, "status at 538");
    for (int a = 539; a < 1023; a++) access(0, 0, r);
    y = 2'b01;
    access(0, 0, r); chk(r == 8'h81, "status at 1023");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
