// Array controller of the 2-D systolic FFT array.
//
// Sequences one transform of N = 2^(M+N) points on the 2^M x 2^N PE array and
// broadcasts one command per clock to all PEs. A transform, started by a start
// pulse, is:
//   I/O pipelining   IO_LOAD (2 clocks), IO_SHIFT (2*2^M), IO_ACC (2):
//                    the previous results leave through the top row while the
//                    new samples enter through the bottom row;
//   processes q = 1 .. M+N, each
//     shuffle        SH_LOAD (2), SH_SHIFT (2*d), SH_GET (2), with the
//                    distance d = 2^(M-q) rows for q <= M (row shuffling) and
//                    d = 2^(M+N-q) columns for q > M (column shuffling);
//     half butterfly HBA (HBA_STEPS = 10), during which the coefficients of
//                    process q+1 are requested (coef_req, coef_q, coef_beat).
// The total is 2(2^M+2) + 2*sum(d+2) + (M+N)*10 clocks, the document's
// T_FFT = T_I/O + T_S + T_B with an HBA time of ten clocks (500 ns at 20 MHz).
// done pulses for one clock when the last half butterfly has finished; busy is
// high from the clock after start until then. io_shift is high while the
// array takes one input byte per column and presents one output byte per
// column. A start while busy is ignored.
// The phase order and lengths follow the document's procedures and eq. (9); the
// command encoding and the start/busy/done handshake are this design's.
module array_ctrl
  import fft_pkg::*;
#(
  parameter int unsigned M = 5,   // 2^M rows
  parameter int unsigned N = 5    // 2^N columns
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output ctrl_bus_t  bus,
  output logic       io_shift,    // I/O byte transfer this clock
  output logic       coef_req,    // a coefficient byte is taken this clock
  output logic [4:0] coef_q,      // process (1-based) the coefficient is for
  output logic       coef_beat,   // 0: (Wr+Wi)/2, 1: (Wr-Wi)/2
  output logic [4:0] q_now        // current process, 0 during I/O
);

  localparam int unsigned Q_LAST = M + N;

  cmd_e        phase_q;
  logic [15:0] cnt_q;
  logic [4:0]  q_q;

  logic [DBIT_W-1:0] dbit;
  logic [15:0]       last_cnt;

  always_comb begin
    if (q_q <= 5'(M)) dbit = DBIT_W'(5'(M) - q_q);
    else              dbit = DBIT_W'(5'(Q_LAST) - q_q);
    unique case (phase_q)
      C_IO_SHIFT: last_cnt = 16'((2 << M) - 1);
      C_SH_SHIFT: last_cnt = 16'((2 << dbit) - 1);
      C_HBA:      last_cnt = 16'(HBA_STEPS - 1);
      default:    last_cnt = 16'd1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= C_IDLE;
      cnt_q   <= '0;
      q_q     <= '0;
    end else if (phase_q == C_IDLE) begin
      if (start) begin
        phase_q <= C_IO_LOAD;
        cnt_q   <= '0;
        q_q     <= '0;
      end
    end else if (cnt_q != last_cnt) begin
      cnt_q <= cnt_q + 16'd1;
    end else begin
      cnt_q <= '0;
      unique case (phase_q)
        C_IO_LOAD:  phase_q <= C_IO_SHIFT;
        C_IO_SHIFT: phase_q <= C_IO_ACC;
        C_IO_ACC:   begin phase_q <= C_SH_LOAD; q_q <= 5'd1; end
        C_SH_LOAD:  phase_q <= C_SH_SHIFT;
        C_SH_SHIFT: phase_q <= C_SH_GET;
        C_SH_GET:   phase_q <= C_HBA;
        C_HBA: begin
          if (q_q == 5'(Q_LAST)) begin
            phase_q <= C_IDLE;
            q_q     <= '0;
          end else begin
            phase_q <= C_SH_LOAD;
            q_q     <= q_q + 5'd1;
          end
        end
        default: phase_q <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    bus.cmd     = phase_q;
    bus.beat    = cnt_q[0];
    bus.step    = cnt_q[3:0];
    bus.dir     = (q_q > 5'(M)) ? DIR_COL : DIR_ROW;
    bus.dbit    = dbit;
    bus.tw_load = (phase_q == C_SH_LOAD) && (q_q > 5'd1);
    bus.coef_en = (phase_q == C_HBA) && (cnt_q < 16'd2) && (q_q < 5'(Q_LAST));

    busy      = (phase_q != C_IDLE);
    done      = (phase_q == C_HBA) && (cnt_q == last_cnt) && (q_q == 5'(Q_LAST));
    io_shift  = (phase_q == C_IO_SHIFT);
    coef_req  = bus.coef_en;
    coef_q    = q_q + 5'd1;
    coef_beat = cnt_q[0];
    q_now     = q_q;
  end

  // The broadcast shuffle distance never exceeds the array.
  a_dist : assert property (@(posedge clk) disable iff (!rst_n)
    (phase_q == C_SH_SHIFT) |-> (dbit < DBIT_W'((q_q <= 5'(M)) ? M : N)));

endmodule
