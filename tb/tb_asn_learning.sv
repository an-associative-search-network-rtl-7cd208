// tb_asn_learning: the chip at its default size learns a two-pattern
// association by reinforcement alone, driven only through its pins.
//
// Environment: each iteration shows one of two patterns, chosen at random:
// pattern A puts 15 on input 1, pattern B puts 15 on input 2; all other inputs
// are 0. Element 0 should fire on A and element 1 on B. In the next iteration
// the payoff z is +63 for each element that acted correctly and -63 for each
// that did not (z in -126..126). Noise is an 11-bit signed random number per
// element, the threshold is -300, N_c = 0 and the traces are halved every
// iteration (decay register 0). All weights and traces start at 0.
//
// Setup and read-back use the bus interface in pause mode: one pass over
// addresses 0..524 writes the registers; after the run a second pass reads the
// weights of inputs 1 and 2 and the iteration counter.
// Checks: the fraction of correct actions over the last 300 iterations is at
// least 0.80 and higher than over the first 300; element 0 ends with a larger
// weight on input 1 than on input 2 and element 1 the reverse; both elements
// fired during the last 300 iterations; the iteration counter equals the number
// of iterations run; each iteration lasts 45 cycles (N_c = 0).
// The learning outcome depends on the random sequence; with this environment it
// reached at least 0.83 in every one of 40 differently seeded runs of the same
// arithmetic.
module tb_asn_learning;
  localparam int ITERS = 2000;
  localparam int WIN   = 300;
  localparam int AMP   = 63;
  localparam logic [19:0] THR = -20'sd300;

  logic clk = 0, rst_n = 0;
  logic [15:0] x_in;
  logic z_in, noise_in, pause_n, cs_n, we_n, data_oe;
  logic [1:0] y_out;
  logic [7:0] data_in, data_out;
  int checks = 0, failures = 0;

  asn_chip dut (.clk, .rst_n, .x_in, .z_in, .noise_in, .y_out, .pause_n, .cs_n, .we_n,
                .data_in, .data_out, .data_oe);

  always #5 clk = ~clk;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one bus access at the current interface address
  task automatic bus(input bit write, input logic [7:0] d, output logic [7:0] r);
    cs_n = 0; we_n = !write; data_in = d;
    #1 r = data_out;
    @(negedge clk);
    cs_n = 1; we_n = 1;
  endtask

  int   correct_first = 0, correct_last = 0, fired0_last = 0, fired1_last = 0;
  int   cycles;
  logic y_prev [2];
  bit   a_prev;

  initial begin
    logic [7:0] r;
    logic signed [15:0] w [2][3];
    x_in = 0; z_in = 0; noise_in = 0; pause_n = 0; cs_n = 1; we_n = 1; data_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // configuration pass: 0..511 weights and traces = 0, then the byte registers
    for (int a = 0; a < 512; a++) bus(1, 8'h00, r);
    bus(1, 8'h00, r); bus(1, 8'h00, r);          // decay register = 0
    bus(1, 8'h00, r);                            // control: binary outputs, noise on
    bus(1, 8'h00, r);                            // C register: N_c = 0
    bus(1, 8'h00, r); bus(1, 8'h00, r);          // enable register: no input ignored
    bus(1, 8'h00, r); bus(1, 8'h00, r);          // clear the iteration counter
    bus(1, THR[7:0], r); bus(1, THR[15:8], r); bus(1, 8'(THR[19:16]), r);
    bus(1, 8'h00, r); bus(1, 8'h00, r);          // decay count = 0

    // learning run
    y_prev[0] = 0; y_prev[1] = 0; a_prev = 0;
    pause_n = 1;
    @(negedge clk);                              // middle of t = 0
    for (int n = 0; n < ITERS; n++) begin
      bit a;
      int zv;
      logic [7:0] z;
      logic [19:0] nz [2];
      a  = 1'($urandom);
      zv = ((y_prev[0] == a_prev)  ? AMP : -AMP) + ((y_prev[1] == !a_prev) ? AMP : -AMP);
      z  = 8'(zv);
      for (int e = 0; e < 2; e++) nz[e] = 20'(signed'(11'($urandom)));
      cycles = 1;
      for (int t = 1; t < 45; t++) begin
        @(posedge clk); #1;
        noise_in = (t >= 6 && t <= 25) ? nz[0][t-6] : 1'b0;
        @(negedge clk); #1;
        x_in = '0;
        if (t <= 4) begin
          x_in[1] = a  ? 1'b1 : 1'b0;           // 15 = 4'b1111 on the chosen line
          x_in[2] = !a ? 1'b1 : 1'b0;
        end
        z_in = (t <= 8) ? z[t-1] : 1'b0;
        noise_in = (t >= 6 && t <= 25) ? nz[1][t-6] : 1'b0;
        if (n == ITERS - 1 && t == 44) pause_n = 1'b0;
        cycles++;
      end
      @(negedge clk);                            // t = 0 of the next iteration
      if (n < 3) chk(cycles == 45, $sformatf("iteration length %0d", cycles));
      if (n < WIN) correct_first += int'(y_out[0] == a) + int'(y_out[1] == !a);
      if (n >= ITERS - WIN) begin
        correct_last += int'(y_out[0] == a) + int'(y_out[1] == !a);
        fired0_last  += int'(y_out[0]);
        fired1_last  += int'(y_out[1]);
      end
      y_prev[0] = y_out[0]; y_prev[1] = y_out[1]; a_prev = a;
    end

    // read-back pass (the chip paused at the end of the last iteration)
    repeat (4) @(negedge clk);
    for (int a = 0; a < 512; a++) begin
      bus(0, 8'h00, r);
      if (a[4] == 1'b0 && a[8:5] inside {4'd1, 4'd2}) begin
        logic [1:0] row;
        row = 2'(a >> 5);
        for (int e = 0; e < 2; e++) w[e][row][a[3:0]] = r[e];
      end
    end
    for (int a = 512; a < 518; a++) bus(0, 8'h00, r);
    begin
      logic [7:0] lo, hi;
      bus(0, 8'h00, lo); bus(0, 8'h00, hi);
      chk({hi, lo} == 16'(ITERS), $sformatf("iteration counter %0d", {hi, lo}));
    end

    $display("correct actions: first %0d / %0d, last %0d / %0d; fired in last window: %0d %0d",
             correct_first, 2 * WIN, correct_last, 2 * WIN, fired0_last, fired1_last);
    $display("weights: element 0 w1=%0d w2=%0d, element 1 w1=%0d w2=%0d",
             w[0][1], w[0][2], w[1][1], w[1][2]);
    chk(correct_last * 100 >= 80 * 2 * WIN, "final accuracy below 0.80");
    chk(correct_last > correct_first, "no improvement");
    chk(w[0][1] > w[0][2], "element 0 did not favour input 1");
    chk(w[1][2] > w[1][1], "element 1 did not favour input 2");
    chk(fired0_last > 0 && fired1_last > 0, "an element never fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
