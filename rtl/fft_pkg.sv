// Shared types and constants of the 2-D systolic FFT array.
//
// The array computes an N = 2^(M+N) point radix-2 FFT on a 2^M x 2^N mesh of
// identical processing elements (PEs), one complex sample per PE. Data words are
// complex numbers of CW-bit two's complement real and imaginary parts (Q1.(CW-1)
// fractions); a whole word is 2*CW = 16 bits and moves over 8-bit links, so every
// word transfer takes two clocks ("beats": real part first, imaginary part second).
//
// The array controller broadcasts one command per clock (ctrl_bus_t) to every PE;
// each PE's control logic unit turns it into DRU and HBAU controls (hbau_ctrl_t).
package fft_pkg;

  // Width of one real or imaginary part, and of one link beat.
  localparam int unsigned CW     = 8;
  localparam int unsigned WORD_W = 2 * CW;
  // Clocks of one half butterfly: correction load, CW-1 shift-adds, the sign
  // step and the final add/subtract with scaling.
  localparam int unsigned HBA_STEPS = CW + 2;
  // Accumulator width: full precision of B*W plus A, so no bit is lost before
  // the final scaling.
  localparam int unsigned ACC_W = 2 * CW + 3;
  // Width of the row/column index and shuffle-distance fields.
  localparam int unsigned IDX_W  = 8;
  localparam int unsigned DBIT_W = 4;

  // Twiddle coefficient value 0.5 in Q1.(CW-1): (Wr+Wi)/2 = (Wr-Wi)/2 = 0.5
  // for W = 1, used in the first process.
  localparam logic signed [CW-1:0] COEF_HALF = CW'(1 << (CW - 2));

  typedef logic signed [CW-1:0] comp_t;
  typedef struct packed {
    comp_t re;
    comp_t im;
  } cplx_t;

  // Commands broadcast by the array controller.
  typedef enum logic [2:0] {
    C_IDLE     = 3'd0,
    C_IO_LOAD  = 3'd1,  // results of the last process: accumulator -> DRU-B
    C_IO_SHIFT = 3'd2,  // DRU-B chain moves one beat north (out at top, in at bottom)
    C_IO_ACC   = 3'd3,  // new input word: DRU-B -> accumulator
    C_SH_LOAD  = 3'd4,  // own word -> DRU-A and DRU-B; next twiddles -> HBAU
    C_SH_SHIFT = 3'd5,  // DRU-A south/east, DRU-B north/west, one beat
    C_SH_GET   = 3'd6,  // partner word DRU -> HBAU data register
    C_HBA      = 3'd7   // one step of the half butterfly
  } cmd_e;

  typedef enum logic {
    DIR_ROW = 1'b0,
    DIR_COL = 1'b1
  } dir_e;

  typedef struct packed {
    cmd_e                 cmd;
    logic                 beat;     // 0: real part, 1: imaginary part
    logic [3:0]           step;     // HBA step, 0 .. HBA_STEPS-1
    dir_e                 dir;      // row or column shuffling
    logic [DBIT_W-1:0]    dbit;     // log2 of the shuffle distance
    logic                 tw_load;  // this C_SH_LOAD also moves new twiddles into the HBAU
    logic                 coef_en;  // during C_HBA: DRU-A takes a coefficient beat
  } ctrl_bus_t;

  // Sources of a DRU register: the two neighbour inputs (first mux of the DRU),
  // the HBAU (second mux) and the external coefficient port.
  typedef enum logic [1:0] {
    SRC_NB_ROW = 2'd0,
    SRC_NB_COL = 2'd1,
    SRC_HBAU   = 2'd2,
    SRC_EXT    = 2'd3
  } dru_src_e;

  typedef struct packed {
    logic       en;
    dru_src_e   src;
  } dru_ctrl_t;

  // Controls of the half butterfly arithmetic unit for one clock.
  typedef struct packed {
    logic       beat;        // which half of a word a byte transfer carries
    logic       tw_preset;   // twiddle registers <- 0.5, 0.5
    logic       tw_cap;      // twiddle register <- DRU-A byte
    logic       get;         // partner byte -> data register; own word -> the other one
    logic       plus;        // HBA+ (partner from DRU-B into B) or HBA- (from DRU-A into A)
    logic       own_load;    // accumulator <- DRU-B byte (new input data)
    logic       da;          // perform HBA step 'step'
    logic [3:0] step;
    logic       t_seed;      // self test: seed pattern registers
    logic       t_step;      // self test: advance pattern registers
  } hbau_ctrl_t;

  // 16-bit Fibonacci LFSR, x^16 + x^15 + x^13 + x^4 + 1 (maximal length).
  function automatic logic [15:0] lfsr16_next(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction

  // 9-bit signature register, x^9 + x^5 + 1, compressing a 16-bit word folded
  // to 9 bits.
  function automatic logic [8:0] misr9_next(input logic [8:0] s, input logic [15:0] d);
    logic [8:0] fold;
    fold = d[8:0] ^ {2'b00, d[15:9]};
    return {s[7:0], s[8] ^ s[4]} ^ fold;
  endfunction

endpackage
