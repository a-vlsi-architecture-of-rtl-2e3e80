// Test of the data routing unit: random source selections and enables; the
// output byte and the whole register are compared with a two-byte queue model.
module tb_dru;
  import fft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  dru_ctrl_t ctrl;
  logic [CW-1:0] in_row, in_col, in_hbau, in_ext, out_byte;
  logic [WORD_W-1:0] word;
  int checks = 0, failures = 0;
  logic [WORD_W-1:0] model;

  dru dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '{en: 1'b0, src: SRC_NB_ROW};
    {in_row, in_col, in_hbau, in_ext} = '0;
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      logic [CW-1:0] pick;
      @(negedge clk);
      checks++;
      if (out_byte != model[WORD_W-1:CW] || word != model) begin
        failures++;
        $display("cycle %0d: out %h word %h, expected %h", i, out_byte, word, model);
      end
      ctrl.en  = ($urandom_range(3) != 0);
      ctrl.src = dru_src_e'($urandom_range(3));
      in_row  = CW'($urandom);
      in_col  = CW'($urandom);
      in_hbau = CW'($urandom);
      in_ext  = CW'($urandom);
      case (ctrl.src)
        SRC_NB_ROW: pick = in_row;
        SRC_NB_COL: pick = in_col;
        SRC_HBAU:   pick = in_hbau;
        default:    pick = in_ext;
      endcase
      if (ctrl.en) model = {model[CW-1:0], pick};
    end
    // A word loaded in two beats comes out, real byte first, two clocks later.
    @(negedge clk);
    ctrl = '{en: 1'b1, src: SRC_HBAU};
    in_hbau = 8'h5a;
    @(negedge clk);
    in_hbau = 8'hc3;
    @(negedge clk);
    ctrl.en = 1'b0;
    checks++;
    if (out_byte != 8'h5a || word != 16'h5ac3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
