// Half butterfly arithmetic unit (HBAU).
//
// Computes one half butterfly, HBA = (A & B*W) / 2, where & is '+' (HBA+) or '-'
// (HBA-), A, B and W are complex and the division by two is the automatic
// scaling that keeps every process inside the fixed register size. The complex
// product B*W is formed by distributed arithmetic with no multiplier: W is held
// as the two coefficients C1 = (Wr+Wi)/2 and C2 = (Wr-Wi)/2, and for each bit
// position j of B (offset-binary reading of the two's complement bits br_j, bi_j)
// the real adder adds one of +-C1, +-C2 and the imaginary adder another:
//
//     (br,bi)   real part Qr   imaginary part Qi
//      (1,1)        +C2             +C1
//      (1,0)        +C1             -C2
//      (0,1)        -C1             +C2
//      (0,0)        -C2             -C1
//
// Step 0 loads the accumulators with the offset correction (-C2 and -C1), steps
// 1..CW-1 do acc = (acc + Q_j) / 2 for the bits j = 0..CW-2 of B (LSB first),
// step CW subtracts Q of the sign bit, and step CW+1 reuses the same two adders
// for A +- P and halves the sum. The accumulators carry CW-1 extra fraction
// bits, so P is exact and the only rounding is the final floor of the halving;
// a sum that still does not fit CW bits saturates. The result stays in the
// accumulators, which also hold the PE's own data word between processes.
// One half butterfly takes HBA_STEPS = CW+2 = 10 clocks.
//
// Word transfers with the DRUs are byte-serial (beat 0 real, beat 1 imaginary):
// out_byte presents the own word, 'get' takes the partner word from DRU-B (HBA+,
// partner into B, own word into A) or DRU-A (HBA-, partner into A, own word into
// B), 'tw_cap' takes C1 then C2 from DRU-A, 'own_load' takes a new input word.
// For the built-in self test, 't_seed' loads A, B and the coefficient pair from
// the accumulator and the DRU registers, and 't_step' advances B and the
// coefficient pair as two 16-bit LFSRs.
//
// Exactly two adders do all the arithmetic, as in the document: one binary
// lookahead carry adder (blc_adder) for the real part and one for the imaginary
// part; multiplexers pick their operands in each step and a subtraction inverts
// the second operand with the carry-in set.
// The document gives the distributed-arithmetic principle, the two adders, the
// registers, the coefficient pair and the scaling by two; the bit-level
// schedule, the accumulator width and the saturation are this design's choices.
module hbau
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  hbau_ctrl_t        ctrl,
  input  logic [CW-1:0]     dru_a_byte,
  input  logic [CW-1:0]     dru_b_byte,
  input  logic [WORD_W-1:0] dru_a_word,
  input  logic [WORD_W-1:0] dru_b_word,
  output logic [CW-1:0]     out_byte,
  output cplx_t             own          // current data word of this PE
);

  typedef logic signed [ACC_W-1:0] acc_t;

  cplx_t a_q, b_q;
  comp_t c1_q, c2_q;
  acc_t  acc_r_q, acc_i_q;

  // Bit j of B used in this step, the selected coefficient magnitude and sign,
  // and the operands of the two adders (one per part). A subtraction is done by
  // inverting the second operand and setting the carry-in.
  logic [2:0] j;
  logic       br, bi;
  comp_t      mag_r, mag_i;
  logic       neg_r, neg_i;
  acc_t       x_r, y_r, x_i, y_i, s_r, s_i;
  logic       sub_r, sub_i;
  comp_t      res_r, res_i;

  always_comb begin
    j  = (ctrl.step == 4'd0) ? 3'd0 : 3'(ctrl.step - 4'd1);
    br = b_q.re[j];
    bi = b_q.im[j];
    // Qr = +C2, +C1, -C1, -C2 and Qi = +C1, -C2, +C2, -C1 for (br,bi) = 11, 10, 01, 00.
    mag_r = (br == bi) ? c2_q : c1_q;
    neg_r = ~br;
    mag_i = (br == bi) ? c1_q : c2_q;
    neg_i = ~bi;

    if (ctrl.step == 4'd0) begin
      // offset correction: 0 - C2, 0 - C1
      x_r = '0;  y_r = acc_t'(c2_q) <<< (CW - 1);  sub_r = 1'b1;
      x_i = '0;  y_i = acc_t'(c1_q) <<< (CW - 1);  sub_i = 1'b1;
    end else if (ctrl.step < 4'(CW)) begin
      x_r = acc_r_q;  y_r = acc_t'(mag_r) <<< (CW - 1);  sub_r = neg_r;
      x_i = acc_i_q;  y_i = acc_t'(mag_i) <<< (CW - 1);  sub_i = neg_i;
    end else if (ctrl.step == 4'(CW)) begin
      // sign bit: subtract Q
      x_r = acc_r_q;  y_r = acc_t'(mag_r) <<< (CW - 1);  sub_r = ~neg_r;
      x_i = acc_i_q;  y_i = acc_t'(mag_i) <<< (CW - 1);  sub_i = ~neg_i;
    end else begin
      // A & P
      x_r = acc_t'(a_q.re) <<< (CW - 1);  y_r = acc_r_q;  sub_r = ~ctrl.plus;
      x_i = acc_t'(a_q.im) <<< (CW - 1);  y_i = acc_i_q;  sub_i = ~ctrl.plus;
    end
    res_r = sat(s_r >>> CW);
    res_i = sat(s_i >>> CW);
  end

  blc_adder #(.W(ACC_W)) u_add_r (.a(x_r), .b(y_r ^ {ACC_W{sub_r}}), .cin(sub_r), .sum(s_r));
  blc_adder #(.W(ACC_W)) u_add_i (.a(x_i), .b(y_i ^ {ACC_W{sub_i}}), .cin(sub_i), .sum(s_i));

  function automatic comp_t sat(input acc_t v);
    if (v > acc_t'(2 ** (CW - 1) - 1))      return comp_t'(2 ** (CW - 1) - 1);
    else if (v < -acc_t'(2 ** (CW - 1)))    return comp_t'(-(2 ** (CW - 1)));
    else                                    return comp_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q     <= '0;
      b_q     <= '0;
      c1_q    <= COEF_HALF;
      c2_q    <= COEF_HALF;
      acc_r_q <= '0;
      acc_i_q <= '0;
    end else begin
      if (ctrl.tw_preset) begin
        c1_q <= COEF_HALF;
        c2_q <= COEF_HALF;
      end else if (ctrl.tw_cap) begin
        if (!ctrl.beat) c1_q <= comp_t'(dru_a_byte);
        else            c2_q <= comp_t'(dru_a_byte);
      end

      if (ctrl.get) begin
        if (ctrl.plus) begin
          if (!ctrl.beat) begin a_q <= own; b_q.re <= comp_t'(dru_b_byte); end
          else            b_q.im <= comp_t'(dru_b_byte);
        end else begin
          if (!ctrl.beat) begin b_q <= own; a_q.re <= comp_t'(dru_a_byte); end
          else            a_q.im <= comp_t'(dru_a_byte);
        end
      end

      if (ctrl.own_load) begin
        if (!ctrl.beat) acc_r_q <= acc_t'(comp_t'(dru_b_byte));
        else            acc_i_q <= acc_t'(comp_t'(dru_b_byte));
      end

      if (ctrl.da) begin
        if (ctrl.step == 4'd0 || ctrl.step == 4'(CW)) begin
          acc_r_q <= s_r;
          acc_i_q <= s_i;
        end else if (ctrl.step < 4'(CW)) begin
          acc_r_q <= s_r >>> 1;
          acc_i_q <= s_i >>> 1;
        end else begin
          acc_r_q <= acc_t'(res_r);
          acc_i_q <= acc_t'(res_i);
        end
      end

      if (ctrl.t_seed) begin
        a_q  <= own;
        b_q  <= cplx_t'(dru_b_word);
        c1_q <= comp_t'(dru_a_word[WORD_W-1:CW]);
        c2_q <= comp_t'(dru_a_word[CW-1:0]);
      end else if (ctrl.t_step) begin
        b_q          <= cplx_t'(lfsr16_next(b_q));
        {c1_q, c2_q} <= lfsr16_next({c1_q, c2_q});
      end
    end
  end

  assign own      = '{re: comp_t'(acc_r_q), im: comp_t'(acc_i_q)};
  assign out_byte = ctrl.beat ? own.im : own.re;

endmodule
