// asn_model_pkg: word-level reference model of one ASN iteration, used by the
// network and chip testbenches. It works on whole numbers, not bit streams:
//   s_e    = sum over enabled inputs j of W[e][j] * x[j]            (mod 2^20)
//   ns_e   = s_e + noise_e (unless noise is off)                    (mod 2^20)
//   y_e    = ns_e > threshold, both as signed 20-bit numbers
//   T      += Xold[j] where Yold[e] = 1; then T >>= 1 if the decay count is 0
//   W      += (T * (z - z_old)) >>> (8 + N_c)                       (mod 2^16)
// and the decay count is reloaded from D when it was 0, else decremented.
package asn_model_pkg;
  localparam int NI = 16, NE = 2;

  typedef struct {
    logic [15:0] w [NE][NI];
    logic [15:0] t [NE][NI];
    logic [3:0]  xold [NI];
    logic signed [7:0] zold;
    logic [NE-1:0] y;
    logic [15:0] dcount;
  } state_t;

  typedef struct {
    logic [3:0]  x [NI];
    logic signed [7:0] z;
    logic [19:0] noise [NE];
    logic [19:0] thr;
    logic [15:0] ignore;
    logic        noise_off;
    int          nc;
    logic [15:0] decay;
  } input_t;

  function automatic void step(ref state_t st, input input_t in, output logic [19:0] ns [NE],
                               output bit halved);
    logic [NE-1:0] ynew;
    int r;
    halved = st.dcount == 0;
    r = int'(in.z) - int'(st.zold);
    for (int e = 0; e < NE; e++) begin
      logic [19:0] s;
      s = '0;
      for (int j = 0; j < NI; j++)
        if (!in.ignore[j]) s += 20'(int'(signed'(st.w[e][j])) * int'(in.x[j]));
      ns[e] = in.noise_off ? s : s + in.noise[e];
      ynew[e] = signed'(ns[e]) > signed'(in.thr);
      for (int j = 0; j < NI; j++) begin
        longint prod;
        if (st.y[e]) st.t[e][j] = st.t[e][j] + 16'(st.xold[j]);
        if (halved) st.t[e][j] = st.t[e][j] >> 1;
        prod = longint'(st.t[e][j]) * longint'(r);
        st.w[e][j] = st.w[e][j] + 16'(prod >>> (8 + in.nc));
      end
    end
    st.dcount = halved ? in.decay : st.dcount - 16'd1;
    st.y = ynew;
    st.zold = in.z;
    for (int j = 0; j < NI; j++) st.xold[j] = in.x[j];
  endfunction
endpackage
