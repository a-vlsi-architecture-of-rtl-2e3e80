// Test of the array controller at its default size (32 x 32 PEs, 1024 points).
// The broadcast command stream of one transform is compared, clock by clock,
// with a sequence built from the shuffle, HBA and I/O procedures: I/O phases,
// then for every process a row (q <= M) or column shuffle over distance
// 2^(M-q) or 2^(M+N-q), then ten HBA steps. The transform must take 332 clocks
// (16.6 us at 20 MHz), done must pulse once, and the coefficient requests must
// name the next process. A second transform with a smaller controller
// (M=2, N=3) checks the sequence for a non-square array.
module tb_array_ctrl;
  import fft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  int checks = 0, failures = 0;

  logic busy5, done5, io5, creq5, cbeat5;
  logic [4:0] cq5, qn5;
  ctrl_bus_t bus5;
  logic busy2, done2, io2, creq2, cbeat2;
  logic [4:0] cq2, qn2;
  ctrl_bus_t bus2;

  array_ctrl dut (.clk, .rst_n, .start, .busy(busy5), .done(done5), .bus(bus5), .io_shift(io5),
                  .coef_req(creq5), .coef_q(cq5), .coef_beat(cbeat5), .q_now(qn5));
  array_ctrl #(.M(2), .N(3)) dut2 (.clk, .rst_n, .start, .busy(busy2), .done(done2), .bus(bus2),
                  .io_shift(io2), .coef_req(creq2), .coef_q(cq2), .coef_beat(cbeat2), .q_now(qn2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    cmd_e cmd;
    int   cnt;
    int   q;
    int   dbit;
    dir_e dir;
  } ph_t;

  function automatic void build(input int m, input int n, ref ph_t seq[$]);
    seq.delete();
    seq.push_back('{C_IO_LOAD, 2, 0, 0, DIR_ROW});
    seq.push_back('{C_IO_SHIFT, 2 * (1 << m), 0, 0, DIR_ROW});
    seq.push_back('{C_IO_ACC, 2, 0, 0, DIR_ROW});
    for (int q = 1; q <= m + n; q++) begin
      int db;
      dir_e dr;
      db = (q <= m) ? m - q : m + n - q;
      dr = (q <= m) ? DIR_ROW : DIR_COL;
      seq.push_back('{C_SH_LOAD, 2, q, db, dr});
      seq.push_back('{C_SH_SHIFT, 2 * (1 << db), q, db, dr});
      seq.push_back('{C_SH_GET, 2, q, db, dr});
      seq.push_back('{C_HBA, 10, q, db, dr});
    end
  endfunction

  ph_t seq5[$], seq2[$];
  int total5, total2, ndone5, ndone2, ncoef5, nbusy5;

  initial begin
    build(5, 5, seq5);
    build(2, 3, seq2);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy5 || bus5.cmd != C_IDLE) failures++;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    total5 = 0; total2 = 0; nbusy5 = 0; ndone5 = 0; ndone2 = 0; ncoef5 = 0;
    for (int i = 0; i < 400; i++) begin
      // walk both expected sequences
      if (seq5.size() > 0) begin
        ph_t p;
        int k;
        p = seq5[0];
        k = total5 - 0;
        checks++;
        if (bus5.cmd != p.cmd || (p.cmd != C_IO_LOAD && p.cmd != C_IO_SHIFT && p.cmd != C_IO_ACC &&
            (qn5 != 5'(p.q) || bus5.dbit != DBIT_W'(p.dbit) || bus5.dir != p.dir))) begin
          failures++;
          if (failures < 10) $display("M=5: clock %0d cmd %0d q %0d dbit %0d, expected cmd %0d q %0d dbit %0d",
                                      total5, bus5.cmd, qn5, bus5.dbit, p.cmd, p.q, p.dbit);
        end
        checks++;
        if (io5 != (p.cmd == C_IO_SHIFT)) failures++;
        checks++;
        if (bus5.tw_load != (p.cmd == C_SH_LOAD && p.q > 1)) failures++;
        if (creq5) begin
          ncoef5++;
          checks++;
          if (p.cmd != C_HBA || cq5 != 5'(p.q + 1) || p.q == 10) failures++;
        end
        total5++;
        seq5[0].cnt--;
        if (seq5[0].cnt == 0) void'(seq5.pop_front());
      end
      if (seq2.size() > 0) begin
        checks++;
        if (bus2.cmd != seq2[0].cmd || (seq2[0].cmd == C_SH_SHIFT && bus2.dbit != DBIT_W'(seq2[0].dbit))) begin
          failures++;
          if (failures < 10) $display("M=2,N=3: clock %0d cmd %0d expected %0d", total2, bus2.cmd, seq2[0].cmd);
        end
        total2++;
        seq2[0].cnt--;
        if (seq2[0].cnt == 0) void'(seq2.pop_front());
      end
      if (busy5) nbusy5++;
      if (done5) ndone5++;
      if (done2) ndone2++;
      @(negedge clk);
    end
    checks++;
    if (nbusy5 != 332 || total5 != 332) begin failures++; $display("1024-point transform: %0d clocks", nbusy5); end
    checks++;
    if (ndone5 != 1 || ndone2 != 1) failures++;
    checks++;
    if (ncoef5 != 2 * 9) failures++;
    checks++;
    if (busy5 || busy2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
