// tb_asn_chip: end-to-end test of the chip at its default size through its pins.
//
// 1. With pause held, every weight and trace register, the threshold, C (N_c),
//    control, enable and decay registers are written through the bus interface.
// 2. The chip then iterates on random X, z and noise, in runs separated by
//    pauses that change N_c, the enable mask, the control register (noise off,
//    serial output mode) and the decay constant. Every iteration's outputs are
//    checked against the reference model (asn_model_pkg), bit by bit in serial
//    output mode; the iteration length 45 + N_c is checked from the pin timing.
// 3. In each pause all 64 weight and trace registers, the iteration counter and
//    the status byte are read back over the bus and compared with the model.
// Mechanisms counted (each must occur at least once): pause entry, register
// write, register read, trace halving, ignored input, noise disabled, serial
// output mode, y = 1 and y = 0 outputs, weight increase and decrease, N_c = 0
// and N_c > 0 iterations.
module tb_asn_chip;
  import asn_model_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] x_in;
  logic z_in, noise_in, pause_n, cs_n, we_n, data_oe;
  logic [1:0] y_out;
  logic [7:0] data_in, data_out;
  int checks = 0, failures = 0;

  asn_chip dut (.clk, .rst_n, .x_in, .z_in, .noise_in, .y_out, .pause_n, .cs_n, .we_n,
                .data_in, .data_out, .data_oe);

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  state_t st;
  input_t in;
  logic [7:0] ctrl;
  int iters = 0;
  int n_pause, n_write, n_read, n_halve, n_ignore, n_noiseoff, n_serial, n_y1, n_y0,
      n_winc, n_wdec, n_nc0, n_ncpos;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic bus(input bit write, input logic [7:0] d, output logic [7:0] r);
    cs_n = 0; we_n = !write; data_in = d;
    #1 r = data_out;
    @(negedge clk);
    cs_n = 1; we_n = 1;
  endtask

  // whole pause session: addresses 0..538 in order; writes or reads registers
  task automatic session(input bit write);
    logic [7:0] r;
    logic [15:0] rw_, rt_;
    for (int j = 0; j < NI; j++) begin
      for (int reg_ = 0; reg_ < 2; reg_++) begin
        logic [15:0] got [NE];
        for (int k = 0; k < 16; k++) begin
          logic [7:0] d;
          d = '0;
          for (int e = 0; e < NE; e++) d[e] = (reg_ != 0) ? st.t[e][j][k] : st.w[e][j][k];
          bus(write, d, r);
          for (int e = 0; e < NE; e++) got[e][k] = r[e];
        end
        if (!write)
          for (int e = 0; e < NE; e++)
            chk(got[e] == ((reg_ != 0) ? st.t[e][j] : st.w[e][j]),
                $sformatf("%s[%0d][%0d] read %h exp %h", (reg_ != 0) ? "T" : "W", e, j, got[e],
                          (reg_ != 0) ? st.t[e][j] : st.w[e][j]));
      end
    end
    if (write) n_write++; else n_read++;
  endtask

  task automatic write_regs();
    logic [7:0] r;
    bus(1, in.decay[7:0], r); bus(1, in.decay[15:8], r);
    bus(1, ctrl, r); bus(1, 8'(in.nc), r);
    bus(1, in.ignore[7:0], r); bus(1, in.ignore[15:8], r);
    bus(0, 0, r); chk(r == 8'(iters), "iteration counter low");
    bus(0, 0, r); chk(r == 8'(iters >> 8), "iteration counter high");
    bus(1, in.thr[7:0], r); bus(1, in.thr[15:8], r); bus(1, 8'(in.thr[19:16]), r);
    bus(1, st.dcount[7:0], r); bus(1, st.dcount[15:8], r);
    for (int a = 525; a < 538; a++) bus(0, 0, r);
    bus(0, 0, r); chk(r == {1'b1, 5'b0, st.y}, $sformatf("status %h", r));
  endtask

  task automatic enter_pause();
    pause_n = 0;
    repeat (2 * (45 + 63)) @(negedge clk);
    n_pause++;
  endtask

  // runs n iterations; pause_n is released at the start
  task automatic iterate(input int n);
    pause_n = 1;
    @(negedge clk);            // middle of t = 0
    for (int i = 0; i < n; i++) begin
      logic [19:0] ns [NE];
      logic [19:0] sser [NE];
      bit halved;
      state_t prev_st;
      for (int j = 0; j < NI; j++) in.x[j] = 4'($urandom);
      in.z = 8'($urandom);
      for (int e = 0; e < NE; e++) in.noise[e] = 20'(signed'(11'($urandom)));
      prev_st = st;
      step(st, in, ns, halved);
      if (halved) n_halve++;
      if (in.ignore != 0) n_ignore++;
      if (in.noise_off) n_noiseoff++;
      if (in.nc == 0) n_nc0++; else n_ncpos++;
      for (int e = 0; e < NE; e++)
        for (int j = 0; j < NI; j++) begin
          if (signed'(st.w[e][j]) > signed'(prev_st.w[e][j])) n_winc++;
          if (signed'(st.w[e][j]) < signed'(prev_st.w[e][j])) n_wdec++;
        end
      for (int t = 1; t < 45 + in.nc; t++) begin
        @(posedge clk); #1;
        noise_in = (t >= 6 && t <= 25) ? in.noise[0][t-6] : 1'b0;
        @(negedge clk); #1;
        for (int j = 0; j < NI; j++) x_in[j] = (t <= 4) ? in.x[j][t-1] : 1'b0;
        z_in = (t <= 8) ? in.z[t-1] : 1'b0;
        noise_in = (t >= 6 && t <= 25) ? in.noise[1][t-6] : 1'b0;
        for (int e = 0; e < NE; e++)
          if (ctrl[e] && t >= 7 && t <= 26) sser[e][t-7] = y_out[e];
        if (t == 44 + in.nc) pause_n = (i == n - 1) ? 1'b0 : 1'b1;
      end
      @(negedge clk);           // t = 0 of the next iteration; outputs are final
      iters++;
      for (int e = 0; e < NE; e++) begin
        if (ctrl[e]) begin
          chk(sser[e] == ns[e], $sformatf("serial sum e%0d got %h exp %h", e, sser[e], ns[e]));
          n_serial++;
        end else begin
          chk(y_out[e] == st.y[e], $sformatf("iter %0d y%0d got %b exp %b (ns %h thr %h)",
                                             iters, e, y_out[e], st.y[e], ns[e], in.thr));
        end
        if (st.y[e]) n_y1++; else n_y0++;
      end
    end
  endtask

  initial begin
    logic [7:0] r;
    x_in = 0; z_in = 0; noise_in = 0; pause_n = 0; cs_n = 1; we_n = 1; data_in = 0;
    n_pause = 0; n_write = 0; n_read = 0; n_halve = 0; n_ignore = 0; n_noiseoff = 0;
    n_serial = 0; n_y1 = 0; n_y0 = 0; n_winc = 0; n_wdec = 0; n_nc0 = 0; n_ncpos = 0;
    for (int e = 0; e < NE; e++)
      for (int j = 0; j < NI; j++) begin
        st.w[e][j] = 16'(signed'(12'($urandom)));
        st.t[e][j] = 16'($urandom % 600);
      end
    for (int j = 0; j < NI; j++) st.xold[j] = '0;
    st.zold = 0; st.y = '0; st.dcount = 16'd2;
    in.thr = 20'(signed'(13'($urandom))); in.ignore = '0; in.noise_off = 0; in.nc = 0; in.decay = 16'd3;
    ctrl = 8'h00;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    n_pause++;
    session(1);
    write_regs();
    for (int run = 0; run < 8; run++) begin
      iterate(run == 0 ? 12 : 6);
      enter_pause();
      session(0);
      // change the configuration for the next run
      in.nc        = (run == 1) ? 16 : (run % 3 == 2) ? 0 : $urandom % 9;
      in.ignore    = (run % 2 == 1) ? 16'($urandom) : 16'h0000;
      in.noise_off = run == 3;
      in.decay     = 16'($urandom % 4);
      in.thr       = 20'(signed'(14'($urandom)));
      ctrl         = (run == 4) ? 8'h03 : (run == 5) ? 8'h81 : 8'h00;
      in.noise_off = in.noise_off || ctrl[7];
      write_regs();
    end
    $display("mechanisms: pause %0d write %0d read %0d halve %0d ignore %0d noiseoff %0d serial %0d y1 %0d y0 %0d winc %0d wdec %0d nc0 %0d ncpos %0d",
             n_pause, n_write, n_read, n_halve, n_ignore, n_noiseoff, n_serial, n_y1, n_y0, n_winc, n_wdec, n_nc0, n_ncpos);
    chk(n_pause > 0 && n_write > 0 && n_read > 0 && n_halve > 0 && n_ignore > 0 && n_noiseoff > 0, "mechanisms 1");
    chk(n_serial > 0 && n_y1 > 0 && n_y0 > 0 && n_winc > 0 && n_wdec > 0 && n_nc0 > 0 && n_ncpos > 0, "mechanisms 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
