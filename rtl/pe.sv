// Processing element (PE) of the 2-D systolic FFT array.
//
// One PE holds one complex sample of the transform. It is built, as in the
// document, from two data routing units, a half butterfly arithmetic unit and
// a control logic unit:
//   DRU-A takes bytes from its north (row shuffle) or west (column shuffle)
//         neighbour and passes them on south and east through a_out;
//   DRU-B takes bytes from its south or east neighbour and passes them on north
//         and west through b_out; it also carries the I/O pipeline;
//   HBAU  holds the PE's own word in its accumulators and computes one half
//         butterfly per process;
//   CLU   decodes the array controller's broadcast command.
// A self-test controller (bist) turns the HBAU registers into pattern
// generators and checks a 9-bit signature; it runs while test_en is high.
// All links are 8 bits wide; a word moves in two clocks. coef_in is a per-PE
// byte port through which DRU-A loads the next process's twiddle coefficients
// during a half butterfly (this port is this design's choice: the document says
// the coefficients come from an external memory through the DRU).
// row_idx / col_idx give the PE's zero-based position, which the CLU needs for
// the HBA+/HBA- decision.
module pe
  import fft_pkg::*;
#(
  parameter int unsigned TEST_PATTERNS = 65535,
  parameter logic [8:0]  GOOD_SIG      = 9'h175
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ctrl_bus_t        bus,
  input  logic [IDX_W-1:0] row_idx,
  input  logic [IDX_W-1:0] col_idx,
  input  logic [CW-1:0]    a_from_n,
  input  logic [CW-1:0]    a_from_w,
  input  logic [CW-1:0]    b_from_s,
  input  logic [CW-1:0]    b_from_e,
  output logic [CW-1:0]    a_out,
  output logic [CW-1:0]    b_out,
  input  logic [CW-1:0]    coef_in,
  input  logic             test_en,
  output logic             test_done,
  output logic             test_go,
  output logic [8:0]       test_sig,
  output cplx_t            own,
  output logic             hba_plus
);

  dru_ctrl_t         dru_a_c, dru_b_c;
  hbau_ctrl_t        hctrl, t_ctrl;
  logic              t_active;
  logic [CW-1:0]     hb_byte;
  logic [WORD_W-1:0] a_word, b_word;

  clu u_clu (
    .bus, .row_idx, .col_idx, .t_active, .t_ctrl,
    .dru_a(dru_a_c), .dru_b(dru_b_c), .hctrl, .hba_plus
  );

  dru u_dru_a (
    .clk, .rst_n, .ctrl(dru_a_c),
    .in_row(a_from_n), .in_col(a_from_w), .in_hbau(hb_byte), .in_ext(coef_in),
    .out_byte(a_out), .word(a_word)
  );

  dru u_dru_b (
    .clk, .rst_n, .ctrl(dru_b_c),
    .in_row(b_from_s), .in_col(b_from_e), .in_hbau(hb_byte), .in_ext(coef_in),
    .out_byte(b_out), .word(b_word)
  );

  hbau u_hbau (
    .clk, .rst_n, .ctrl(hctrl),
    .dru_a_byte(a_out), .dru_b_byte(b_out),
    .dru_a_word(a_word), .dru_b_word(b_word),
    .out_byte(hb_byte), .own
  );

  bist #(.TEST_PATTERNS(TEST_PATTERNS), .GOOD_SIG(GOOD_SIG)) u_bist (
    .clk, .rst_n, .test_en, .result(own),
    .t_active, .t_ctrl, .signature(test_sig), .done(test_done), .go(test_go)
  );

endmodule
