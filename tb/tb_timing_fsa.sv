// tb_timing_fsa: runs the sequencer for several iterations at random N_c and
// checks the iteration length (45 + N_c cycles), the cycles in which each
// timing line is high (against the schedule t = 0..44+N_c written out here),
// and the pause handshake: a pause request is honoured only at t = 0 and the
// chip stays paused until it is withdrawn.
module tb_timing_fsa;
  import asn_pkg::*;
  logic clk = 0, rst_n = 0, pause_req, load;
  logic [7:0] c_reg;
  timing_t tm;
  int checks = 0, failures = 0;

  timing_fsa dut (.clk, .rst_n, .pause_req, .c_reg, .tm, .load);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic timing_t expect_at(int t, int nc);
    timing_t e;
    e = '0;
    e.clr        = t == 0;
    e.x_shift    = t >= 1 && t <= 4;
    e.z_load     = t >= 1 && t <= 8;
    e.t_upd      = t >= 1 && t <= 16;
    e.decay_slot = t == 17;
    e.sa_w       = t >= 1 && t <= 20;
    e.sa_t       = t >= 21;
    e.sa_start   = t == 0 || t == 1 || t == 21;
    e.r_start    = t == 21;
    e.r_run      = t >= 21;
    e.noise_en   = t >= 6 && t <= 25;
    e.thr_en     = t >= 7 && t <= 26;
    e.thr_msb    = t == 26;
    e.w_add      = t >= 29 + nc && t <= 44 + nc;
    e.iter_done  = t == 44 + nc;
    return e;
  endfunction

  initial begin
    pause_req = 0; c_reg = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // t = 0 of the first iteration is the first cycle after reset
    for (int it = 0; it < 30; it++) begin
      int nc;
      nc = (it < 17) ? it : $urandom % 17;
      c_reg = 8'(nc);
      for (int t = 0; t < 45 + nc; t++) begin
        checks++;
        if (tm !== expect_at(t, nc)) begin
          failures++; $display("it %0d nc %0d t %0d tm %b exp %b", it, nc, t, tm, expect_at(t, nc));
        end
        // request pause in the middle of an iteration: must not stop it
        pause_req = (it == 20 && t > 5);
        @(negedge clk);
      end
      if (it == 20) begin
        // t = 0 now: CHECK sees the request and enters pause
        checks++; if (!tm.clr || tm.paused) begin failures++; $display("no check cycle"); end
        @(negedge clk);
        for (int p = 0; p < 25; p++) begin
          checks++;
          if (!tm.paused || tm.x_shift || tm.t_upd || tm.w_add || !tm.sa_start) begin failures++; $display("pause state"); end
          @(negedge clk);
        end
        pause_req = 0;
        @(negedge clk);   // leaves pause through one check cycle
        checks++; if (tm.paused) begin failures++; $display("still paused"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
