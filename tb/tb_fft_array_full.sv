// Full-size run of the systolic FFT array with every parameter at its default:
// 32 x 32 PEs, 1024 points. A random frame and then a two-tone frame are
// transformed; each frame's results leave the array during the next frame's
// I/O pipelining and are compared bit for bit with the closed-form model and,
// within 8 LSB, with DFT(x)/1024 in floating point (outputs in bit-reversed
// order). Each transform must take 332 clocks, 16.6 us at 20 MHz.
module tb_fft_array_full;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int M = 5;
  localparam int N = 5;
  localparam int L = M + N;
  localparam int ROWS = 1 << M;
  localparam int COLS = 1 << N;
  localparam int NPTS = 1 << L;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic busy, done, io_shift, coef_req, coef_beat;
  logic [4:0] coef_q;
  logic [CW-1:0] din [COLS];
  logic [CW-1:0] dout [COLS];
  logic [CW-1:0] coef_in [ROWS][COLS];
  logic test_en = 1'b0;
  logic test_done, test_go;
  logic [COLS-1:0] test_go_pe [ROWS];
  int checks = 0, failures = 0;

  fft_array_top dut (.*);

  always #25 clk = ~clk;   // 20 MHz with a 1 ns time unit

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (coef_req) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          int c1, c2;
          coef_ref(int'(coef_q), r * COLS + c, L, c1, c2);
          coef_in[r][c] = coef_beat ? c2[7:0] : c1[7:0];
        end
    end
  end

  ci_t x [3][];
  ci_t y_exp [3][];
  ci_t y_got [];

  task automatic run_frame(input int fr, input int prev);
    int t, cyc;
    y_got = new[NPTS];
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    t = 0;
    while (!done) begin
      if (io_shift) begin
        for (int c = 0; c < COLS; c++) begin
          int k;
          k = (t / 2) * COLS + c;
          din[c] = (t % 2 == 0) ? x[fr][k].re[7:0] : x[fr][k].im[7:0];
          if (t % 2 == 0) y_got[k].re = sx8(dout[c]);
          else            y_got[k].im = sx8(dout[c]);
        end
        t++;
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 332) begin
      failures++;
      $display("frame %0d took %0d clocks", fr, cyc);
    end
    if (prev >= 0) begin
      real err;
      int bad = 0;
      for (int k = 0; k < NPTS; k++) begin
        checks++;
        if (y_got[k].re != y_exp[prev][k].re || y_got[k].im != y_exp[prev][k].im) begin
          failures++;
          bad++;
          if (bad < 5) $display("frame %0d out %0d: got (%0d,%0d) expected (%0d,%0d)", prev, k,
                                y_got[k].re, y_got[k].im, y_exp[prev][k].re, y_exp[prev][k].im);
        end
      end
      err = dft_err(x[prev], y_got, L);
      $display("frame %0d: largest distance to DFT/1024 %f LSB", prev, err);
      checks++;
      if (err > 8.0) failures++;
    end
  endtask

  initial begin
    for (int c = 0; c < COLS; c++) din[c] = '0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) coef_in[r][c] = '0;
    for (int f = 0; f < 3; f++) begin
      x[f] = new[NPTS];
      for (int k = 0; k < NPTS; k++) begin
        if (f == 1) begin
          x[f][k].re = $rtoi(60.0 * $cos(2.0 * 3.14159265358979 * 37.0 * k / NPTS)
                            + 25.0 * $cos(2.0 * 3.14159265358979 * 300.0 * k / NPTS));
          x[f][k].im = $rtoi(60.0 * $sin(2.0 * 3.14159265358979 * 37.0 * k / NPTS)
                            - 25.0 * $sin(2.0 * 3.14159265358979 * 300.0 * k / NPTS));
        end else begin
          x[f][k].re = int'($urandom_range(180)) - 90;
          x[f][k].im = int'($urandom_range(180)) - 90;
        end
      end
      y_exp[f] = x[f];
      fft_ref(y_exp[f], L);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_frame(0, -1);
    run_frame(1, 0);
    run_frame(2, 1);
    // The two tones land in bins 37 and 1024-300 (at bit-reversed positions).
    checks++;
    if (y_got[bitrev(37, L)].re < 55 || y_got[bitrev(NPTS - 300, L)].re < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
