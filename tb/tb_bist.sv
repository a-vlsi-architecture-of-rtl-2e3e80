// Test of the self-test controller together with the HBAU whose registers it
// turns into pattern generators. With the reference seed the full test
// (2^16-1 patterns) must end with the signature GOOD_SIG and GO; with another
// seed the signature must match the model and give NO-GO. The clock count from
// test_en to done is checked, and lowering test_en must end the test.
module tb_bist;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int NPAT = 65535;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic test_en = 1'b0;
  cplx_t own;
  logic t_active, done, go;
  hbau_ctrl_t t_ctrl, tb_ctrl, hctrl;
  logic [8:0] signature;
  logic [CW-1:0] dru_b_byte, out_byte;
  logic [WORD_W-1:0] dru_a_word, dru_b_word;
  int checks = 0, failures = 0, n_go = 0, n_nogo = 0;

  bist dut (.clk, .rst_n, .test_en, .result(own), .t_active, .t_ctrl, .signature, .done, .go);

  assign hctrl = t_active ? t_ctrl : tb_ctrl;
  hbau u_hbau (.clk, .rst_n, .ctrl(hctrl), .dru_a_byte(8'h00), .dru_b_byte,
               .dru_a_word, .dru_b_word, .out_byte, .own);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_test(input logic [15:0] a_w, input logic [15:0] b_w, input logic [15:0] c_w);
    logic [8:0] exp_sig;
    int cyc;
    exp_sig = bist_ref(a_w, b_w, c_w, NPAT);
    tb_ctrl = '0; tb_ctrl.own_load = 1'b1; tb_ctrl.beat = 1'b0; dru_b_byte = a_w[15:8];
    @(negedge clk);
    tb_ctrl.beat = 1'b1; dru_b_byte = a_w[7:0];
    @(negedge clk);
    tb_ctrl = '0;
    dru_b_word = b_w;
    dru_a_word = c_w;
    test_en = 1'b1;
    cyc = 0;
    while (!done && cyc < 1000000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 2 + NPAT * (HBA_STEPS + 1)) begin
      failures++;
      $display("test took %0d clocks", cyc);
    end
    checks++;
    if (signature != exp_sig) begin
      failures++;
      $display("signature %h expected %h", signature, exp_sig);
    end
    checks++;
    if (go != (exp_sig == 9'h175)) failures++;
    if (go) n_go++; else n_nogo++;
    repeat (3) @(negedge clk);
    checks++;
    if (!done || !t_active) failures++;
    test_en = 1'b0;
    @(negedge clk);
    checks++;
    if (t_active || done) failures++;
  endtask

  initial begin
    tb_ctrl = '0;
    dru_b_byte = '0;
    dru_a_word = '0;
    dru_b_word = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (t_active || done) failures++;
    run_test(16'h351c, 16'hACE1, 16'h4040);
    run_test(16'h0102, 16'h7777, 16'h1d2c);
    checks += 2;
    if (n_go != 1) failures++;
    if (n_nogo != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
