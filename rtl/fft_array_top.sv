// Two-dimensional systolic array for the radix-2 FFT.
//
// A 2^M x 2^N mesh of identical processing elements computes an
// N_PTS = 2^(M+N) point FFT, one complex sample per PE, with sample k held by the
// PE in row r = k / 2^N, column c = k mod 2^N (row-major, zero-based here).
// Each of the M+N processes first shuffles every sample to its butterfly partner
// over nearest-neighbour links (rows for the first M processes, columns for the
// last N), then every PE computes one half butterfly, HBA+ or HBA-, so all PEs
// work in every process. Each half butterfly halves its result, so the array
// returns DFT(x)/N_PTS. The outputs come out in bit-reversed order: the PE
// holding index k ends with X(bitrev(k)) / N_PTS.
//
// Interface:
//   start / busy / done  start a transform; done pulses when it is finished.
//   io_shift             high for 2*2^M clocks at the beginning of each transform.
//                        Each clock every column c takes one byte din[c] (row 0's
//                        word first, real byte before imaginary byte) and shows
//                        one byte of the previous transform's results on dout[c]
//                        (row 0 first), so output and input are pipelined.
//   coef_req / coef_q / coef_beat / coef_in
//                        in the first two clocks of each half butterfly but the
//                        last, every PE (r,c) takes a coefficient byte of process
//                        coef_q from coef_in[r][c]: (Wr+Wi)/2 when coef_beat=0,
//                        (Wr-Wi)/2 when coef_beat=1, Q1.7, W = exp(-j*2*pi*p/N_PTS),
//                        p = bitrev_{q-1}(k >> (M+N-q+1)) * 2^(M+N-q). These come
//                        from a coefficient memory outside the array.
//   test_en / test_done / test_go
//                        self test of every PE; test_go[r][c] = 1 for a good PE.
// Latency: one transform takes 2(2^M+2) + 2*sum_q(d_q+2) + 10(M+N) clocks,
// 332 clocks for the default 1024 points.
// The array, its data mapping, the shuffles, the half butterflies and the I/O
// pipeline follow the document; the coefficient port, the edge tie-offs and the
// handshake are this design's choices.
module fft_array_top
  import fft_pkg::*;
#(
  parameter int unsigned M             = 5,
  parameter int unsigned N             = 5,
  parameter int unsigned TEST_PATTERNS = 65535,
  parameter logic [8:0]  GOOD_SIG      = 9'h175,
  localparam int unsigned ROWS         = 1 << M,
  localparam int unsigned COLS         = 1 << N
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          io_shift,
  input  logic [CW-1:0] din  [COLS],
  output logic [CW-1:0] dout [COLS],
  output logic          coef_req,
  output logic [4:0]    coef_q,
  output logic          coef_beat,
  input  logic [CW-1:0] coef_in [ROWS][COLS],
  input  logic          test_en,
  output logic          test_done,
  output logic          test_go,
  output logic [COLS-1:0] test_go_pe [ROWS]
);

  ctrl_bus_t     bus;
  logic [CW-1:0] a_out [ROWS][COLS];
  logic [CW-1:0] b_out [ROWS][COLS];
  logic [COLS-1:0] done_pe [ROWS];

  array_ctrl #(.M(M), .N(N)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .bus, .io_shift,
    .coef_req, .coef_q, .coef_beat, .q_now()
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [CW-1:0] from_n, from_w, from_s, from_e;

      assign from_n = (r == 0)        ? '0     : a_out[(r == 0) ? 0 : r - 1][c];
      assign from_w = (c == 0)        ? '0     : a_out[r][(c == 0) ? 0 : c - 1];
      assign from_s = (r == ROWS - 1) ? din[c] : b_out[(r == ROWS - 1) ? r : r + 1][c];
      assign from_e = (c == COLS - 1) ? '0     : b_out[r][(c == COLS - 1) ? c : c + 1];

      pe #(.TEST_PATTERNS(TEST_PATTERNS), .GOOD_SIG(GOOD_SIG)) u_pe (
        .clk, .rst_n, .bus,
        .row_idx(IDX_W'(r)), .col_idx(IDX_W'(c)),
        .a_from_n(from_n), .a_from_w(from_w), .b_from_s(from_s), .b_from_e(from_e),
        .a_out(a_out[r][c]), .b_out(b_out[r][c]),
        .coef_in(coef_in[r][c]),
        .test_en, .test_done(done_pe[r][c]), .test_go(test_go_pe[r][c]),
        .test_sig(), .own(), .hba_plus()
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_dout
    assign dout[c] = b_out[0][c];
  end

  always_comb begin
    test_done = 1'b1;
    test_go   = 1'b1;
    for (int r = 0; r < ROWS; r++) begin
      test_done &= &done_pe[r];
      test_go   &= &test_go_pe[r];
    end
  end

endmodule
