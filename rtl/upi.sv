// upi: microprocessor interface for initialising, monitoring and testing the
// chip from an 8-bit microprocessor bus (a 6502-style synchronous bus).
//
// Bus: cs_n (chip select), we_n (write enable) and pause_n are active low; the
// 8-bit data bus is split into din (from the bus) and dout/doe (to the bus
// drivers). The chip runs on the bus clock and every clock cycle with cs_n low is
// one access. There are no address lines: in pause mode each access advances a
// 10-bit address counter, which is cleared whenever the chip is not paused, and
// the counter value selects what is accessed:
//   0..511   intersection registers, one bit per access and per element:
//            bits 3:0 = bit position, bit 4 = weight (0) / trace (1),
//            bits 8:5 = input line (row). Element e uses data bit e. A read
//            returns the LSB of the selected registers and circulates them; a
//            write shifts data bit e into the MSB. Sixteen accesses move a whole
//            register, LSB first.
//   512/513  Decay Register low/high      514 Control Register
//   515      C Register (N_c in bits 5:0) 516/517 Enable (ignore) Register low/high
//   518/519  Iteration Counter low/high (a write to either clears both)
//   520..522 threshold, bytes 0..2        523/524 Decay Count Register low/high
//   538,1023 status: bits N_ELEM-1:0 element outputs, bit 7 pause acknowledge
// Outside pause mode an access does not move the counter; a read returns the
// status byte and a write is ignored.
// The address map 0..519 and 538/1023 and the status bit positions follow the
// original interface drawing; 520..524, the order of bits inside the intersection
// address and the behaviour outside pause are this design's choices.
// The threshold is 20 bits wide, so the top four bits of byte 2 are not kept.
// The intersection write bits ia_d are the data bus bits themselves; they take
// effect only on cycles where ia_sel and ia_write are set.
module upi
  import asn_pkg::*;
#(
  parameter int unsigned N_IN      = asn_pkg::NUM_INPUTS,
  parameter int unsigned N_ELEM    = asn_pkg::NUM_ELEMS,
  parameter int unsigned SUM_BITS  = asn_pkg::SUM_WIDTH,
  parameter int unsigned ITER_BITS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cs_n,
  input  logic                    we_n,
  input  logic [7:0]              din,
  output logic [7:0]              dout,
  output logic                    doe,
  input  logic                    paused,
  input  logic [N_ELEM-1:0]       y,
  // intersection register access
  output logic                    ia_sel,
  output logic [$clog2(N_IN)-1:0] ia_row,
  output logic                    ia_trace,
  output logic                    ia_write,
  output logic [N_ELEM-1:0]       ia_d,
  input  logic [N_ELEM-1:0]       ia_q,
  // registers
  output logic [N_IN-1:0]         ignore,
  output logic [7:0]              c_reg,
  output logic [7:0]              ctrl,
  output logic [3:0]              dec_wr,
  input  logic [15:0]             decay_q,
  input  logic [15:0]             dcount_q,
  output logic                    thr_load,
  output logic [SUM_BITS-1:0]     thr_pdata,
  input  logic [SUM_BITS-1:0]     thr_q,
  input  logic                    iter_inc,
  output logic [ITER_BITS-1:0]    iter_count
);
  logic [9:0]  addr_q;
  logic        acc, wr, rd;
  logic [23:0] thr_ext, thr_new;
  logic        iter_clear;
  logic [7:0]  status;

  assign acc = !cs_n && paused;
  assign wr  = acc && !we_n;
  assign rd  = !cs_n && we_n;

  // address counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       addr_q <= '0;
    else if (!paused) addr_q <= '0;
    else if (acc)     addr_q <= addr_q + 10'd1;
  end

  // intersection access decode
  assign ia_sel   = acc && addr_q < 10'd512;
  assign ia_row   = addr_q[5 +: $clog2(N_IN)];
  assign ia_trace = addr_q[4];
  assign ia_write = !we_n;
  assign ia_d     = din[N_ELEM-1:0];

  // byte registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ignore <= '0;
      c_reg  <= '0;
      ctrl   <= '0;
    end else if (wr) begin
      unique case (addr_q)
        10'(A_CONTROL): ctrl  <= din;
        10'(A_CREG):    c_reg <= din;
        10'(A_EN_LO):   ignore[7:0]      <= din;
        10'(A_EN_HI):   ignore[N_IN-1:8] <= din[N_IN-9:0];
        default: ;
      endcase
    end
  end

  assign dec_wr[0] = wr && addr_q == 10'(A_DECAY_LO);
  assign dec_wr[1] = wr && addr_q == 10'(A_DECAY_HI);
  assign dec_wr[2] = wr && addr_q == 10'(A_DCNT_LO);
  assign dec_wr[3] = wr && addr_q == 10'(A_DCNT_HI);

  assign iter_clear = wr && (addr_q == 10'(A_ITER_LO) || addr_q == 10'(A_ITER_HI));

  iteration_counter #(.BITS(ITER_BITS)) u_iter (
    .clk, .rst_n, .inc(iter_inc), .clear(iter_clear), .count(iter_count)
  );

  // threshold bytes: read-modify-write of the threshold shift register
  always_comb begin
    thr_ext = 24'(thr_q);
    thr_new = thr_ext;
    thr_load = 1'b0;
    if (wr && addr_q == 10'(A_THR0)) begin thr_new[7:0]   = din; thr_load = 1'b1; end
    if (wr && addr_q == 10'(A_THR1)) begin thr_new[15:8]  = din; thr_load = 1'b1; end
    if (wr && addr_q == 10'(A_THR2)) begin thr_new[23:16] = din; thr_load = 1'b1; end
    thr_pdata = thr_new[SUM_BITS-1:0];
  end

  // read multiplexer
  always_comb begin
    status = '0;
    status[N_ELEM-1:0] = y;
    status[7] = paused;
    dout = 8'h00;
    if (!paused) dout = status;
    else if (addr_q < 10'd512) dout[N_ELEM-1:0] = ia_q;
    else begin
      unique case (addr_q)
        10'(A_DECAY_LO): dout = decay_q[7:0];
        10'(A_DECAY_HI): dout = decay_q[15:8];
        10'(A_CONTROL):  dout = ctrl;
        10'(A_CREG):     dout = c_reg;
        10'(A_EN_LO):    dout = ignore[7:0];
        10'(A_EN_HI):    dout = 8'(ignore[N_IN-1:8]);
        10'(A_ITER_LO):  dout = iter_count[7:0];
        10'(A_ITER_HI):  dout = iter_count[15:8];
        10'(A_THR0):     dout = thr_ext[7:0];
        10'(A_THR1):     dout = thr_ext[15:8];
        10'(A_THR2):     dout = thr_ext[23:16];
        10'(A_DCNT_LO):  dout = dcount_q[7:0];
        10'(A_DCNT_HI):  dout = dcount_q[15:8];
        10'(A_STATUS), 10'(A_STATUS2): dout = status;
        default:         dout = 8'h00;
      endcase
    end
  end
  assign doe = rd;
endmodule
