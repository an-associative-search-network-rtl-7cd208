// asn_pkg: constants and the timing-signal bundle shared by the ASN chip.
//
// The chip is a two-element, sixteen-input Associative Search Network built
// entirely from bit-serial arithmetic. The defaults below are the sizes of the
// reference chip: 16 sensory inputs of 4 bits, 2 elements, 16-bit weight and
// trace registers, an 8-bit two's-complement payoff z, 20-bit element sums.
// timing_t is the set of timing lines the timing sequencer drives into the
// network section; each field is high during the minor cycles named in its
// comment (t counts minor cycles from the start of an iteration, t = 0 being the
// pause check). The exact cycle numbers are this design's schedule.
package asn_pkg;

  localparam int unsigned NUM_INPUTS = 16;  // sensory inputs per element
  localparam int unsigned NUM_ELEMS = 2;   // ASN elements per chip
  localparam int unsigned X_WIDTH = 4;   // unsigned sensor value
  localparam int unsigned Z_WIDTH = 8;   // signed payoff
  localparam int unsigned REG_WIDTH = 16;  // weight / trace registers
  localparam int unsigned SUM_WIDTH = 20;  // element sum, noise and threshold width
  localparam int unsigned ACC_WIDTH = 18;  // shift-adder accumulator
  localparam int unsigned R_OFFSET = 8;   // product bits skipped before N_c

  // UPI address map (10-bit address counter)
  localparam int unsigned A_DECAY_LO = 512;
  localparam int unsigned A_DECAY_HI = 513;
  localparam int unsigned A_CONTROL  = 514;
  localparam int unsigned A_CREG     = 515;
  localparam int unsigned A_EN_LO    = 516;
  localparam int unsigned A_EN_HI    = 517;
  localparam int unsigned A_ITER_LO  = 518;
  localparam int unsigned A_ITER_HI  = 519;
  localparam int unsigned A_THR0     = 520;
  localparam int unsigned A_THR1     = 521;
  localparam int unsigned A_THR2     = 522;
  localparam int unsigned A_DCNT_LO  = 523;
  localparam int unsigned A_DCNT_HI  = 524;
  localparam int unsigned A_STATUS   = 538;
  localparam int unsigned A_STATUS2  = 1023;

  // control register bit that disables noise
  localparam int unsigned CTRL_NOISE_OFF = 7;

  typedef struct packed {
    logic clr;        // t=0 and pause: empty every serial pipeline
    logic paused;     // chip is in pause mode (PAUSE acknowledged)
    logic x_shift;    // t=1..4   : X bits on the pins, X buffers shift
    logic z_load;     // t=1..8   : z bits on the z pin, z register shifts
    logic t_upd;      // t=1..16  : trace registers add Yold*Xold
    logic decay_slot; // t=17     : decay count checked, trace halved if zero
    logic sa_w;       // t=1..20  : shift-adders multiply weight by X (sign extend)
    logic sa_t;       // t=21..   : shift-adders multiply trace by R
    logic sa_start;   // first cycle of each multiplication (accumulator taken as empty)
    logic r_start;    // t=21     : z difference starts, carry preset to 1
    logic r_run;      // t=21..   : R bits on the R line
    logic noise_en;   // t=6..25  : noise bits are added to the tree output
    logic thr_en;     // t=7..26  : threshold comparison runs, threshold register circulates
    logic thr_msb;    // t=26     : sign bit of the noisy sum, Y latched
    logic w_add;      // t=29+Nc..44+Nc : weight registers add (T*R) >> (8+Nc)
    logic iter_done;  // last cycle of an iteration
  } timing_t;

endpackage
