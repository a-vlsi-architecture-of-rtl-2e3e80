// End-to-end test of the systolic FFT array at a reduced size (4 x 4 PEs,
// 16 points, the size of the document's worked example).
//
// Runs three transforms back to back. Each transform's inputs enter through the
// bottom row while the previous transform's results leave through the top row;
// every result is compared bit for bit with a closed-form model of the array
// and, loosely, with a floating-point DFT. The clock count of each transform is
// checked against 2(2^M+2) + 2*sum(d+2) + 10(M+N). Then the self test of all
// PEs is run and each PE's signature is compared with a model computed from the
// seeds the PE holds when the test starts. Counted mechanisms: row shuffles,
// column shuffles, HBA+ and HBA- operations, coefficient loads, overlapped I/O
// and completed self tests; one that never happens counts as a failure.
module tb_fft_array_top;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int M = 2;
  localparam int N = 2;
  localparam int L = M + N;
  localparam int ROWS = 1 << M;
  localparam int COLS = 1 << N;
  localparam int NPTS = 1 << L;
  localparam int NPAT = 40;
  localparam int FRAMES = 3;

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
  int n_row_sh = 0, n_col_sh = 0, n_plus = 0, n_minus = 0, n_coef = 0, n_io_overlap = 0,
      n_bist = 0;

  fft_array_top #(.M(M), .N(N), .TEST_PATTERNS(NPAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input words of each frame and the expected outputs.
  ci_t x [FRAMES][];
  ci_t y_exp [FRAMES][];
  ci_t y_got [];

  // Coefficient memory: drives coef_in when the array asks for it.
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

  // Mechanism counters.
  always @(posedge clk) begin
    if (dut.u_ctrl.bus.cmd == C_SH_SHIFT && dut.u_ctrl.bus.dir == DIR_ROW) n_row_sh++;
    if (dut.u_ctrl.bus.cmd == C_SH_SHIFT && dut.u_ctrl.bus.dir == DIR_COL) n_col_sh++;
    if (coef_req) n_coef++;
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      always @(posedge clk) begin
        if (dut.u_ctrl.bus.cmd == C_HBA && dut.u_ctrl.bus.step == 4'(HBA_STEPS - 1)) begin
          if (dut.g_row[r].g_col[c].u_pe.hba_plus) n_plus++;
          else                                     n_minus++;
        end
      end
    end
  end

  task automatic run_frame(input int fr, input bit check_out, input int prev);
    int t, cyc;
    bit seen_out;
    y_got = new[NPTS];
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    t = 0;
    seen_out = 1'b0;
    while (!done) begin
      if (io_shift) begin
        for (int c = 0; c < COLS; c++) begin
          int row, k;
          row = t / 2;
          k   = row * COLS + c;
          din[c] = (t % 2 == 0) ? x[fr][k].re[7:0] : x[fr][k].im[7:0];
          if (t % 2 == 0) y_got[k].re = sx8(dout[c]);
          else            y_got[k].im = sx8(dout[c]);
          if (dout[c] != 0) seen_out = 1'b1;
        end
        t++;
      end
      @(negedge clk);
      cyc++;
    end
    if (seen_out) n_io_overlap++;
    // Cycle count of one transform (eq. 9 with a 10-clock half butterfly).
    begin
      int exp_cyc;
      exp_cyc = 2 * ((1 << M) + 2) + 10 * L;
      for (int i = 1; i <= M; i++) exp_cyc += 2 * ((1 << (M - i)) + 2);
      for (int j = 1; j <= N; j++) exp_cyc += 2 * ((1 << (N - j)) + 2);
      checks++;
      if (cyc != exp_cyc) begin
        failures++;
        $display("frame %0d: %0d clocks, expected %0d", fr, cyc, exp_cyc);
      end
    end
    checks++;
    if (t != 2 * ROWS) begin
      failures++;
      $display("frame %0d: %0d I/O beats, expected %0d", fr, t, 2 * ROWS);
    end
    if (check_out) begin
      real err;
      for (int k = 0; k < NPTS; k++) begin
        checks++;
        if (y_got[k].re != y_exp[prev][k].re || y_got[k].im != y_exp[prev][k].im) begin
          failures++;
          $display("frame %0d out %0d: got (%0d,%0d) expected (%0d,%0d)", prev, k,
                   y_got[k].re, y_got[k].im, y_exp[prev][k].re, y_exp[prev][k].im);
        end
      end
      err = dft_err(x[prev], y_got, L);
      checks++;
      if (err > 3.0) begin
        failures++;
        $display("frame %0d: distance to DFT/N %f LSB", prev, err);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < COLS; c++) din[c] = '0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) coef_in[r][c] = '0;
    for (int f = 0; f < FRAMES; f++) begin
      x[f] = new[NPTS];
      for (int k = 0; k < NPTS; k++) begin
        x[f][k].re = int'($urandom_range(180)) - 90;
        x[f][k].im = int'($urandom_range(180)) - 90;
      end
      if (f == 1) begin
        // A single tone: energy in one bin.
        for (int k = 0; k < NPTS; k++) begin
          x[f][k].re = $rtoi(100.0 * $cos(2.0 * 3.14159265358979 * 3.0 * k / NPTS));
          x[f][k].im = $rtoi(100.0 * $sin(2.0 * 3.14159265358979 * 3.0 * k / NPTS));
        end
      end
      y_exp[f] = new[NPTS];
      y_exp[f] = x[f];
      fft_ref(y_exp[f], L);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // First transform: the outputs are the reset contents (zero).
    run_frame(0, 1'b0, 0);
    for (int k = 0; k < NPTS; k++) begin
      checks++;
      if (y_got[k].re != 0 || y_got[k].im != 0) failures++;
    end
    run_frame(1, 1'b1, 0);
    run_frame(2, 1'b1, 1);
    // Idle gap, then one more transform to flush frame 2's results.
    repeat (7) @(negedge clk);
    run_frame(0, 1'b1, 2);

    // Self test of every PE.
    begin
      logic [8:0] sig_exp [ROWS][COLS];
      int cyc;
      @(negedge clk);
      test_en = 1'b1;
      @(posedge clk);
      #1;
      // Seeds captured at the first test clock.
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) sig_exp[r][c] = '0;
      seed_model(sig_exp);
      cyc = 0;
      while (!test_done && cyc < 100000) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (!test_done) failures++;
      else n_bist++;
      check_sigs(sig_exp);
      @(negedge clk);
      test_en = 1'b0;
      @(negedge clk);
      // Normal operation resumes.
      run_frame(1, 1'b0, 0);
    end

    $display("mechanisms: row_shuffle=%0d col_shuffle=%0d hba_plus=%0d hba_minus=%0d coef_loads=%0d io_overlap=%0d self_test=%0d",
             n_row_sh, n_col_sh, n_plus, n_minus, n_coef, n_io_overlap, n_bist);
    checks += 7;
    if (n_row_sh == 0) failures++;
    if (n_col_sh == 0) failures++;
    if (n_plus == 0) failures++;
    if (n_minus == 0) failures++;
    if (n_coef == 0) failures++;
    if (n_io_overlap == 0) failures++;
    if (n_bist == 0) failures++;
    // Every PE works in every process: as many HBA+ as HBA-.
    checks++;
    if (n_plus != n_minus) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The seeds are read from each PE just before the seeding clock.
  logic [15:0] seed_a [ROWS][COLS];
  logic [15:0] seed_b [ROWS][COLS];
  logic [15:0] seed_c [ROWS][COLS];
  for (genvar r = 0; r < ROWS; r++) begin : g_sr
    for (genvar c = 0; c < COLS; c++) begin : g_sc
      always @(posedge clk) begin
        if (test_en && dut.g_row[r].g_col[c].u_pe.u_bist.state_q == 0) begin
          seed_a[r][c] <= dut.g_row[r].g_col[c].u_pe.own;
          seed_b[r][c] <= dut.g_row[r].g_col[c].u_pe.u_dru_b.word;
          seed_c[r][c] <= dut.g_row[r].g_col[c].u_pe.u_dru_a.word;
        end
      end
    end
  end

  task automatic seed_model(output logic [8:0] s [ROWS][COLS]);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        s[r][c] = bist_ref(seed_a[r][c], seed_b[r][c], seed_c[r][c], NPAT);
  endtask

  logic [8:0] sig_pe [ROWS][COLS];
  for (genvar r = 0; r < ROWS; r++) begin : g_gr
    for (genvar c = 0; c < COLS; c++) begin : g_gc
      assign sig_pe[r][c] = dut.g_row[r].g_col[c].u_pe.test_sig;
    end
  end

  task automatic check_sigs(input logic [8:0] s [ROWS][COLS]);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (sig_pe[r][c] != s[r][c]) begin
          failures++;
          $display("PE(%0d,%0d) signature %h expected %h", r, c, sig_pe[r][c], s[r][c]);
        end
        checks++;
        if (test_go_pe[r][c] != (s[r][c] == 9'h175)) failures++;
      end
  endtask

endmodule
