// Test of the binary lookahead carry adder: exhaustive at 5 bits, random at the
// 19-bit width the half butterfly unit uses and at 16 bits (a power of two),
// each sum compared with the '+' operator.
module tb_blc_adder;
  logic [4:0]  a5, b5, s5;
  logic [18:0] a19, b19, s19;
  logic [15:0] a16, b16, s16;
  logic        c5, c19, c16;
  int checks = 0, failures = 0;

  blc_adder #(.W(5))  u5  (.a(a5),  .b(b5),  .cin(c5),  .sum(s5));
  blc_adder           u19 (.a(a19), .b(b19), .cin(c19), .sum(s19));
  blc_adder #(.W(16)) u16 (.a(a16), .b(b16), .cin(c16), .sum(s16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int k = 0; k < 32; k++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(i); b5 = 5'(k); c5 = c[0];
          #1;
          checks++;
          if (s5 != 5'(i + k + c)) failures++;
        end
    for (int t = 0; t < 20000; t++) begin
      a19 = 19'($urandom); b19 = 19'($urandom); c19 = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      if (t % 5 == 0) b19 = ~a19;   // long carry chains
      if (t % 7 == 0) b16 = ~a16;
      #1;
      checks += 2;
      if (s19 != 19'(a19 + b19 + 19'(c19))) failures++;
      if (s16 != 16'(a16 + b16 + 16'(c16))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
