// tb_asn_network: tests the network section with the timing sequencer and the
// decay registers around it, the register-access lines being driven directly
// (as the bus interface would during pause). Registers are loaded, the network
// iterates on random X, z and noise with a random enable mask and N_c, and each
// iteration's outputs, and finally every weight and trace register, are compared
// with the reference model. The X, z and noise bits are driven at the cycles of
// the schedule in timing_fsa.
module tb_asn_network;
  import asn_pkg::*;
  import asn_model_pkg::*;
  logic clk = 0, rst_n = 0;
  timing_t tm;
  logic load_unused, pause_req, decay_now;
  logic [7:0] c_reg, ctrl, din;
  logic [3:0] dec_wr, ia_row;
  logic [15:0] decay_q, count_q, x_in, ignore;
  logic z_in, noise_in, ia_sel, ia_trace, ia_write, thr_load;
  logic [1:0] ia_d, ia_q, y, y_out;
  logic [19:0] thr_pdata, thr_q;
  int checks = 0, failures = 0;

  timing_fsa u_fsa (.clk, .rst_n, .pause_req, .c_reg, .tm, .load(load_unused));
  decay_unit #(.BITS(16)) u_dec (.clk, .rst_n, .slot(tm.decay_slot), .wr(dec_wr), .din, .decay_now,
                                 .decay_q, .count_q);
  asn_network dut (.clk, .rst_n, .tm, .x_in, .z_in, .noise_in, .ignore, .ctrl, .decay_now,
    .ia_sel, .ia_row, .ia_trace, .ia_write, .ia_d, .ia_q, .thr_load, .thr_pdata, .thr_q, .y, .y_out);

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  state_t st;
  input_t in;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic regs(input bit write);
    for (int j = 0; j < NI; j++)
      for (int r = 0; r < 2; r++) begin
        logic [15:0] got [NE];
        for (int k = 0; k < 16; k++) begin
          ia_sel = 1; ia_row = 4'(j); ia_trace = r[0]; ia_write = write;
          for (int e = 0; e < NE; e++) ia_d[e] = r ? st.t[e][j][k] : st.w[e][j][k];
          #1 for (int e = 0; e < NE; e++) got[e][k] = ia_q[e];
          @(negedge clk);
        end
        ia_sel = 0;
        if (!write)
          for (int e = 0; e < NE; e++)
            chk(got[e] == (r ? st.t[e][j] : st.w[e][j]), $sformatf("reg e%0d j%0d r%0d got %h", e, j, r, got[e]));
      end
  endtask

  initial begin
    pause_req = 1; c_reg = 0; ctrl = 0; din = 0; dec_wr = 0; x_in = 0; ignore = 0; z_in = 0; noise_in = 0;
    ia_sel = 0; ia_row = 0; ia_trace = 0; ia_write = 0; ia_d = 0; thr_load = 0; thr_pdata = 0;
    for (int e = 0; e < NE; e++)
      for (int j = 0; j < NI; j++) begin
        st.w[e][j] = 16'(signed'(12'($urandom)));
        st.t[e][j] = 16'($urandom % 600);
      end
    for (int j = 0; j < NI; j++) st.xold[j] = '0;
    st.zold = 0; st.y = '0; st.dcount = 16'd0;
    in.thr = 20'(signed'(12'($urandom))); in.ignore = 16'h0410; in.noise_off = 0; in.nc = 5; in.decay = 16'd2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(tm.paused, "paused");
    regs(1);
    thr_load = 1; thr_pdata = in.thr; @(negedge clk); thr_load = 0;
    din = 8'd2; dec_wr = 4'b0001; @(negedge clk); dec_wr = 0;
    c_reg = 8'(in.nc); ignore = in.ignore;
    pause_req = 0;
    @(negedge clk);   // t = 0
    for (int i = 0; i < 15; i++) begin
      logic [19:0] ns [NE];
      bit halved;
      for (int j = 0; j < NI; j++) in.x[j] = 4'($urandom);
      in.z = 8'($urandom);
      for (int e = 0; e < NE; e++) in.noise[e] = 20'(signed'(10'($urandom)));
      step(st, in, ns, halved);
      for (int t = 1; t < 45 + in.nc; t++) begin
        @(posedge clk); #1;
        noise_in = (t >= 6 && t <= 25) ? in.noise[0][t-6] : 1'b0;
        @(negedge clk); #1;
        for (int j = 0; j < NI; j++) x_in[j] = (t <= 4) ? in.x[j][t-1] : 1'b0;
        z_in = (t <= 8) ? in.z[t-1] : 1'b0;
        noise_in = (t >= 6 && t <= 25) ? in.noise[1][t-6] : 1'b0;
        if (t == 44 + in.nc && i == 14) pause_req = 1;
      end
      @(negedge clk);
      for (int e = 0; e < NE; e++) chk(y[e] == st.y[e] && y_out[e] == st.y[e], $sformatf("iter %0d y%0d", i, e));
    end
    @(negedge clk);
    chk(tm.paused, "paused at end");
    regs(0);
    chk(thr_q == in.thr, "threshold register back in place");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
