// Test of the control logic unit: for every command, direction, shuffle
// distance and PE position the decoded DRU and HBAU controls are compared with
// the expected ones, and the HBA+/HBA- choice with the rule
// (i mod 2d) < d  =>  HBA+ (i the zero-based row or column index).
module tb_clu;
  import fft_pkg::*;

  ctrl_bus_t bus;
  logic [IDX_W-1:0] row_idx, col_idx;
  logic t_active;
  hbau_ctrl_t t_ctrl, hctrl;
  dru_ctrl_t dru_a, dru_b;
  logic hba_plus;
  int checks = 0, failures = 0;

  clu dut (.*);

  task automatic expect_eq(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch: %s (cmd %0d dir %0d dbit %0d r %0d c %0d)",
                                  what, bus.cmd, bus.dir, bus.dbit, row_idx, col_idx);
    end
  endtask

  initial begin
    t_active = 1'b0;
    t_ctrl = '0;
    for (int cmd = 0; cmd < 8; cmd++)
      for (int dir = 0; dir < 2; dir++)
        for (int db = 0; db < 5; db++)
          for (int r = 0; r < 32; r += 3)
            for (int c = 0; c < 32; c += 5)
              for (int bt = 0; bt < 2; bt++) begin
                int idx, d;
                bit plus;
                bus = '0;
                bus.cmd = cmd_e'(cmd);
                bus.dir = dir_e'(dir);
                bus.dbit = DBIT_W'(db);
                bus.beat = bt[0];
                bus.step = 4'((r + c) % 10);
                bus.tw_load = r[0];
                bus.coef_en = c[0];
                row_idx = IDX_W'(r);
                col_idx = IDX_W'(c);
                #1;
                idx = dir ? c : r;
                d = 1 << db;
                plus = (idx % (2 * d)) < d;
                expect_eq(hba_plus == plus, "hba_plus");
                expect_eq(hctrl.plus == plus && hctrl.beat == bt[0] &&
                          hctrl.step == bus.step, "hctrl beat/step/plus");
                expect_eq(hctrl.da == (cmd == C_HBA), "da");
                expect_eq(hctrl.get == (cmd == C_SH_GET), "get");
                expect_eq(hctrl.own_load == (cmd == C_IO_ACC), "own_load");
                expect_eq(hctrl.tw_preset == (cmd == C_IO_LOAD), "tw_preset");
                expect_eq(hctrl.tw_cap == (cmd == C_SH_LOAD && r[0]), "tw_cap");
                expect_eq(!hctrl.t_seed && !hctrl.t_step, "no test controls");
                case (cmd)
                  C_IO_LOAD: begin
                    expect_eq(!dru_a.en && dru_b.en && dru_b.src == SRC_HBAU, "io_load");
                  end
                  C_IO_SHIFT, C_IO_ACC: begin
                    expect_eq(!dru_a.en && dru_b.en && dru_b.src == SRC_NB_ROW, "io shift north");
                  end
                  C_SH_LOAD: begin
                    expect_eq(dru_a.en && dru_b.en && dru_a.src == SRC_HBAU &&
                              dru_b.src == SRC_HBAU, "sh_load");
                  end
                  C_SH_SHIFT: begin
                    expect_eq(dru_a.en && dru_b.en &&
                              dru_a.src == (dir ? SRC_NB_COL : SRC_NB_ROW) &&
                              dru_b.src == (dir ? SRC_NB_COL : SRC_NB_ROW), "sh_shift");
                  end
                  C_SH_GET: begin
                    expect_eq(dru_a.en && dru_b.en, "sh_get shifts");
                  end
                  C_HBA: begin
                    expect_eq(dru_a.en == c[0] && dru_a.src == SRC_EXT && !dru_b.en, "hba coef");
                  end
                  default: begin
                    expect_eq(!dru_a.en && !dru_b.en, "idle");
                  end
                endcase
              end
    // Self test overrides the HBAU controls.
    bus = '0;
    bus.cmd = C_HBA;
    t_active = 1'b1;
    t_ctrl = '0;
    t_ctrl.t_step = 1'b1;
    #1;
    expect_eq(hctrl == t_ctrl, "test override");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
