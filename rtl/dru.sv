// Data routing unit (DRU) of a processing element.
//
// A DRU is a first multiplexer choosing between the two neighbour inputs (the
// row neighbour or the column neighbour), a second multiplexer choosing between
// that and a byte from the half butterfly arithmetic unit, and a data register.
// The register holds one 16-bit complex word as two bytes and works as a two-stage
// byte shift register: every enabled clock it shifts one byte in from the selected
// source, and its older byte is the output seen by the next PE and by the HBAU.
// A chain of DRUs therefore moves one whole word one PE further every two clocks,
// over 8-bit links. The mux-mux-register structure follows the document; the
// two-byte shift register and the extra external input (used to bring in
// twiddle coefficients from outside the array) are this design's choices.
//
// Timing: out_byte and word are register outputs; a byte presented while en=1
// appears on out_byte two enabled clocks later.
module dru
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  dru_ctrl_t         ctrl,
  input  logic [CW-1:0]     in_row,    // from the row-direction neighbour
  input  logic [CW-1:0]     in_col,    // from the column-direction neighbour
  input  logic [CW-1:0]     in_hbau,   // from the HBAU
  input  logic [CW-1:0]     in_ext,    // external (coefficient) port
  output logic [CW-1:0]     out_byte,  // to the neighbour and to the HBAU
  output logic [WORD_W-1:0] word       // whole register, read by the self test
);

  logic [CW-1:0]     nb_byte;
  logic [CW-1:0]     sel_byte;
  logic [WORD_W-1:0] data_q;

  // First mux: which neighbour.
  always_comb nb_byte = (ctrl.src == SRC_NB_COL) ? in_col : in_row;

  // Second mux: neighbour or HBAU (or the external port).
  always_comb begin
    unique case (ctrl.src)
      SRC_HBAU: sel_byte = in_hbau;
      SRC_EXT:  sel_byte = in_ext;
      default:  sel_byte = nb_byte;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       data_q <= '0;
    else if (ctrl.en) data_q <= {data_q[CW-1:0], sel_byte};
  end

  assign out_byte = data_q[WORD_W-1:CW];
  assign word     = data_q;

endmodule
