// Test of the half butterfly arithmetic unit. Each trial loads an own word
// (own_load), a coefficient pair (tw_cap), a partner word (get, HBA+ or HBA-),
// runs the ten steps of one half butterfly and compares the accumulator word
// with a closed-form model (A*128 +- B*W)/256. Coefficients span the full 8-bit
// range, so saturation is exercised too. The self-test seeding path is also
// checked.
module tb_hbau;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  hbau_ctrl_t ctrl;
  logic [CW-1:0] dru_a_byte, dru_b_byte, out_byte;
  logic [WORD_W-1:0] dru_a_word, dru_b_word;
  cplx_t own;
  int checks = 0, failures = 0, n_sat = 0;

  hbau dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    ctrl = '0;
  endtask

  task automatic run_hba(input bit plus);
    for (int s = 0; s < HBA_STEPS; s++) begin
      ctrl = '0;
      ctrl.da = 1'b1;
      ctrl.step = 4'(s);
      ctrl.plus = plus;
      @(negedge clk);
    end
    idle();
  endtask

  initial begin
    idle();
    {dru_a_byte, dru_b_byte, dru_a_word, dru_b_word} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      logic [7:0] own_r, own_i, par_r, par_i, c1, c2;
      bit plus, wide;
      ci_t a, b, r;
      own_r = 8'($urandom); own_i = 8'($urandom);
      par_r = 8'($urandom); par_i = 8'($urandom);
      wide  = (t % 4 == 3);
      if (wide || t < 2) begin
        c1 = 8'($urandom); c2 = 8'($urandom);
      end else begin
        int i1, i2;
        coef_ref(1 + t % 6, $urandom_range(63), 6, i1, i2);
        c1 = i1[7:0]; c2 = i2[7:0];
      end
      if (t == 0) begin c1 = 8'h40; c2 = 8'h40; end
      plus = $urandom_range(1);
      // own word
      ctrl = '0; ctrl.own_load = 1'b1; ctrl.beat = 1'b0; dru_b_byte = own_r; @(negedge clk);
      ctrl.beat = 1'b1; dru_b_byte = own_i; @(negedge clk);
      // own word comes back on out_byte
      ctrl = '0; ctrl.beat = 1'b0; #1;
      checks++; if (out_byte != own_r) failures++;
      ctrl.beat = 1'b1; #1;
      checks++; if (out_byte != own_i) failures++;
      // coefficients
      ctrl = '0; ctrl.tw_cap = 1'b1; ctrl.beat = 1'b0; dru_a_byte = c1; @(negedge clk);
      ctrl.beat = 1'b1; dru_a_byte = c2; @(negedge clk);
      // partner
      ctrl = '0; ctrl.get = 1'b1; ctrl.plus = plus; ctrl.beat = 1'b0;
      dru_a_byte = par_r; dru_b_byte = par_r; @(negedge clk);
      ctrl.beat = 1'b1; dru_a_byte = par_i; dru_b_byte = par_i; @(negedge clk);
      if (plus) begin
        a.re = sx8(own_r); a.im = sx8(own_i); b.re = sx8(par_r); b.im = sx8(par_i);
      end else begin
        a.re = sx8(par_r); a.im = sx8(par_i); b.re = sx8(own_r); b.im = sx8(own_i);
      end
      r = hba_ref(a, b, sx8(c1), sx8(c2), plus);
      if (r.re == 127 || r.re == -128 || r.im == 127 || r.im == -128) n_sat++;
      // the ten steps of one half butterfly
      for (int s = 0; s < HBA_STEPS; s++) begin
        ctrl = '0; ctrl.da = 1'b1; ctrl.step = 4'(s); ctrl.plus = plus;
        @(negedge clk);
      end
      idle();
      checks++;
      if (own.re != r.re[7:0] || own.im != r.im[7:0]) begin
        failures++;
        if (failures < 10)
          $display("trial %0d %s a=(%0d,%0d) b=(%0d,%0d) c=(%0d,%0d): got (%0d,%0d) expected (%0d,%0d)",
                   t, plus ? "+" : "-", a.re, a.im, b.re, b.im, sx8(c1), sx8(c2),
                   own.re, own.im, r.re, r.im);
      end
    end
    // Self-test seeding: A <- own, B <- DRU-B word, C <- DRU-A word.
    begin
      ci_t a, b, r;
      a.re = sx8(own.re); a.im = sx8(own.im);
      dru_b_word = 16'h2bd7; dru_a_word = 16'h3a16;
      ctrl = '0; ctrl.t_seed = 1'b1; @(negedge clk);
      run_hba(1'b0);
      b.re = sx8(8'h2b); b.im = sx8(8'hd7);
      r = hba_ref(a, b, sx8(8'h3a), sx8(8'h16), 1'b0);
      checks++;
      if (own.re != r.re[7:0] || own.im != r.im[7:0]) failures++;
      // t_step advances B and C as LFSRs
      a.re = sx8(own.re); a.im = sx8(own.im);
      ctrl = '0; ctrl.t_seed = 1'b1; dru_b_word = 16'h1234; dru_a_word = 16'h2f11; @(negedge clk);
      ctrl = '0; ctrl.t_step = 1'b1; @(negedge clk);
      run_hba(1'b1);
      b.re = sx8(lfsr16(16'h1234) >> 8); b.im = sx8(lfsr16(16'h1234));
      r = hba_ref(a, b, sx8(lfsr16(16'h2f11) >> 8), sx8(lfsr16(16'h2f11)), 1'b1);
      checks++;
      if (own.re != r.re[7:0] || own.im != r.im[7:0]) failures++;
    end
    $display("saturated results: %0d", n_sat);
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
