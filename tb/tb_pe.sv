// Test of the processing element: two PEs stacked in one column (rows 0 and
// 1), driven by a hand-built command stream. Two words enter through the
// bottom PE's DRU-B; process 1 exchanges them (row shuffle, distance 1) and the
// top PE computes HBA+ and the bottom PE HBA- with W = 1; during that half
// butterfly both PEs load new coefficients through coef_in, and process 2
// repeats the exchange with that twiddle. The results leave through the top
// PE's DRU-B and are compared with the closed-form model. Random trials.
module tb_pe;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  ctrl_bus_t bus;
  logic [CW-1:0] din, coef, a0, b0, a1, b1, dout;
  logic go0, go1, dn0, dn1, p0, p1;
  logic [8:0] s0, s1;
  cplx_t own0, own1;
  int checks = 0, failures = 0;

  pe u_top (.clk, .rst_n, .bus, .row_idx(8'd0), .col_idx(8'd0),
            .a_from_n(8'h00), .a_from_w(8'h00), .b_from_s(b1), .b_from_e(8'h00),
            .a_out(a0), .b_out(b0), .coef_in(coef), .test_en(1'b0),
            .test_done(dn0), .test_go(go0), .test_sig(s0), .own(own0), .hba_plus(p0));
  pe u_bot (.clk, .rst_n, .bus, .row_idx(8'd1), .col_idx(8'd0),
            .a_from_n(a0), .a_from_w(8'h00), .b_from_s(din), .b_from_e(8'h00),
            .a_out(a1), .b_out(b1), .coef_in(coef), .test_en(1'b0),
            .test_done(dn1), .test_go(go1), .test_sig(s1), .own(own1), .hba_plus(p1));
  assign dout = b0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] in_bytes[4];
  logic [7:0] out_bytes[4];
  logic [7:0] coef_bytes[2];

  task automatic phase(input cmd_e cmd, input int len, input bit tw_load, input bit coef_en);
    for (int i = 0; i < len; i++) begin
      bus = '0;
      bus.cmd = cmd;
      bus.beat = i[0];
      bus.step = 4'(i);
      bus.dir = DIR_ROW;
      bus.dbit = '0;
      bus.tw_load = tw_load;
      bus.coef_en = coef_en && (i < 2);
      if (cmd == C_IO_SHIFT) begin
        din = in_bytes[i];
        out_bytes[i] = dout;
      end
      if (cmd == C_HBA) coef = coef_bytes[i % 2];
      @(negedge clk);
    end
    bus = '0;
  endtask

  initial begin
    bus = '0;
    din = '0;
    coef = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      ci_t x0, x1, y0, y1, z0, z1;
      int c1, c2;
      for (int i = 0; i < 4; i++) in_bytes[i] = 8'($urandom_range(180) - 90);
      coef_ref(2, 2, 2, c1, c2);
      if (t % 2 == 1) begin c1 = $urandom_range(180) - 90; c2 = $urandom_range(180) - 90; end
      coef_bytes[0] = c1[7:0];
      coef_bytes[1] = c2[7:0];
      x0.re = sx8(in_bytes[0]); x0.im = sx8(in_bytes[1]);
      x1.re = sx8(in_bytes[2]); x1.im = sx8(in_bytes[3]);
      // I/O: row 0 gets the first word
      phase(C_IO_LOAD, 2, 0, 0);
      phase(C_IO_SHIFT, 4, 0, 0);
      phase(C_IO_ACC, 2, 0, 0);
      checks++;
      if (own0 != cplx_t'({in_bytes[0], in_bytes[1]}) || own1 != cplx_t'({in_bytes[2], in_bytes[3]}))
        failures++;
      if (t > 0) begin
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (out_bytes[i] != ((i < 2) ? (i == 0 ? z0.re[7:0] : z0.im[7:0])
                                        : (i == 2 ? z1.re[7:0] : z1.im[7:0]))) failures++;
        end
      end
      // process 1 (W = 1), loading the twiddle of process 2
      phase(C_SH_LOAD, 2, 0, 0);
      phase(C_SH_SHIFT, 2, 0, 0);
      phase(C_SH_GET, 2, 0, 0);
      checks++;
      if (!p0 || p1) failures++;
      phase(C_HBA, 10, 0, 1);
      y0 = hba_ref(x0, x1, 64, 64, 1'b1);
      y1 = hba_ref(x0, x1, 64, 64, 1'b0);
      checks++;
      if (own0 != cplx_t'({y0.re[7:0], y0.im[7:0]}) || own1 != cplx_t'({y1.re[7:0], y1.im[7:0]})) begin
        failures++;
        $display("trial %0d process 1 mismatch", t);
      end
      // process 2 with the loaded twiddle
      phase(C_SH_LOAD, 2, 1, 0);
      phase(C_SH_SHIFT, 2, 0, 0);
      phase(C_SH_GET, 2, 0, 0);
      phase(C_HBA, 10, 0, 0);
      z0 = hba_ref(y0, y1, c1, c2, 1'b1);
      z1 = hba_ref(y0, y1, c1, c2, 1'b0);
      checks++;
      if (own0 != cplx_t'({z0.re[7:0], z0.im[7:0]}) || own1 != cplx_t'({z1.re[7:0], z1.im[7:0]})) begin
        failures++;
        $display("trial %0d process 2 mismatch", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
