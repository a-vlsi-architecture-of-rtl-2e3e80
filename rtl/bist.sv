// Built-in self-test controller of a processing element.
//
// While test_en is high the PE tests its half butterfly arithmetic unit on its
// own. The first clock seeds the HBAU registers (data register A from the
// accumulator, data register B from the DRU-B register, the twiddle coefficient
// pair from the DRU-A register), so initial test patterns are brought in from
// outside through the DRUs. Then, pattern after pattern, the HBAU runs one half
// butterfly (HBA_STEPS clocks, alternating HBA+ and HBA-), a 9-bit signature
// register compresses the result, and data register B and the coefficient pair
// advance as two 16-bit LFSRs. A test-end detector counts TEST_PATTERNS patterns
// (2^16-1 by default, the full LFSR period); the final signature is then compared
// with GOOD_SIG and go (1: good, 0: faulty) is raised with done. Lowering
// test_en returns the PE to normal operation.
//
// Timing: one pattern takes HBA_STEPS+1 clocks; done rises
// 2 + TEST_PATTERNS*(HBA_STEPS+1) clocks after test_en is first seen high
// (one clock to start, one to seed).
// The document gives the two 16-bit pattern LFSRs in the HBAU data and
// twiddle registers, the 9-bit signature, the test-end detector, the comparator,
// the test enable input and the GO/NO-GO output. The LFSR polynomials, the
// folding of the result into the signature, holding A constant and the
// default GOOD_SIG (the signature of a good PE for the reference seed described
// with GOOD_SIG below) are this design's choices.
module bist
  import fft_pkg::*;
#(
  parameter int unsigned TEST_PATTERNS = 65535,
  // Good signature for the reference seed: accumulator = (0x35, 0x1c),
  // DRU-B register = 0xACE1, DRU-A register = 0x4040.
  parameter logic [8:0]  GOOD_SIG      = 9'h175
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        test_en,
  input  cplx_t       result,     // HBAU accumulator word
  output logic        t_active,
  output hbau_ctrl_t  t_ctrl,
  output logic [8:0]  signature,
  output logic        done,
  output logic        go
);

  typedef enum logic [2:0] {
    S_IDLE, S_SEED, S_HBA, S_STEP, S_DONE
  } state_e;

  state_e      state_q;
  logic [3:0]  step_q;
  logic [16:0] count_q;
  logic [8:0]  sig_q;
  logic        go_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      step_q  <= '0;
      count_q <= '0;
      sig_q   <= '0;
      go_q    <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (test_en) begin
          state_q <= S_SEED;
          count_q <= '0;
          sig_q   <= '0;
          go_q    <= 1'b0;
        end
        S_SEED: begin
          state_q <= S_HBA;
          step_q  <= '0;
        end
        S_HBA: begin
          if (step_q == 4'(HBA_STEPS - 1)) state_q <= S_STEP;
          else                             step_q  <= step_q + 4'd1;
        end
        S_STEP: begin
          sig_q   <= misr9_next(sig_q, result);
          count_q <= count_q + 17'd1;
          step_q  <= '0;
          if (count_q + 17'd1 == 17'(TEST_PATTERNS)) begin
            state_q <= S_DONE;
            go_q    <= (misr9_next(sig_q, result) == GOOD_SIG);
          end else begin
            state_q <= S_HBA;
          end
        end
        S_DONE: if (!test_en) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    t_active      = (state_q != S_IDLE);
    t_ctrl        = '0;
    t_ctrl.step   = step_q;
    t_ctrl.plus   = ~count_q[0];
    t_ctrl.t_seed = (state_q == S_SEED);
    t_ctrl.da     = (state_q == S_HBA);
    t_ctrl.t_step = (state_q == S_STEP);
  end

  assign signature = sig_q;
  assign done      = (state_q == S_DONE);
  assign go        = go_q;

endmodule
