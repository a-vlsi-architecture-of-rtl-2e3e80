// Control logic unit (CLU) of a processing element.
//
// Turns the command broadcast by the array controller into the controls of the
// PE's two data routing units and its half butterfly arithmetic unit. It also
// decides the PE's half-butterfly type: with the shuffle distance d = 2^dbit
// (in rows during row processes, in columns during column processes), a PE whose
// zero-based index i has (i mod 2d) < d, i.e. bit dbit of i clear, holds
// F(K) and computes HBA+; the others hold F(K + N/2^q) and compute HBA-.
// DRU-A always carries data south (row) or east (column) and DRU-B north (row)
// or west (column); the I/O pipeline uses DRU-B, moving results out of the top
// row while new inputs enter at the bottom row. While the self test runs, the
// self-test controller's HBAU controls take the place of the decoded ones.
//
// Purely combinational. The command set and its decoding are this design's;
// the document only says that the CLU receives signals from the array controller
// and generates the DRU and HBAU controls, and gives the HBA+/HBA- rule.
module clu
  import fft_pkg::*;
(
  input  ctrl_bus_t        bus,
  input  logic [IDX_W-1:0] row_idx,   // zero-based row of this PE
  input  logic [IDX_W-1:0] col_idx,   // zero-based column of this PE
  input  logic             t_active,  // self test running
  input  hbau_ctrl_t       t_ctrl,    // HBAU controls from the self test
  output dru_ctrl_t        dru_a,
  output dru_ctrl_t        dru_b,
  output hbau_ctrl_t       hctrl,
  output logic             hba_plus
);

  logic [IDX_W-1:0] idx;

  always_comb begin
    idx      = (bus.dir == DIR_COL) ? col_idx : row_idx;
    hba_plus = ~idx[bus.dbit[2:0]];

    dru_a = '{en: 1'b0, src: SRC_NB_ROW};
    dru_b = '{en: 1'b0, src: SRC_NB_ROW};
    hctrl = '0;
    hctrl.beat = bus.beat;
    hctrl.step = bus.step;
    hctrl.plus = hba_plus;

    unique case (bus.cmd)
      C_IO_LOAD: begin
        dru_b = '{en: 1'b1, src: SRC_HBAU};
        hctrl.tw_preset = 1'b1;
      end
      C_IO_SHIFT: begin
        dru_b = '{en: 1'b1, src: SRC_NB_ROW};
      end
      C_IO_ACC: begin
        dru_b = '{en: 1'b1, src: SRC_NB_ROW};
        hctrl.own_load = 1'b1;
      end
      C_SH_LOAD: begin
        dru_a = '{en: 1'b1, src: SRC_HBAU};
        dru_b = '{en: 1'b1, src: SRC_HBAU};
        hctrl.tw_cap = bus.tw_load;
      end
      C_SH_SHIFT: begin
        dru_a = '{en: 1'b1, src: (bus.dir == DIR_COL) ? SRC_NB_COL : SRC_NB_ROW};
        dru_b = '{en: 1'b1, src: (bus.dir == DIR_COL) ? SRC_NB_COL : SRC_NB_ROW};
      end
      C_SH_GET: begin
        dru_a = '{en: 1'b1, src: SRC_NB_ROW};
        dru_b = '{en: 1'b1, src: SRC_NB_ROW};
        hctrl.get = 1'b1;
      end
      C_HBA: begin
        dru_a = '{en: bus.coef_en, src: SRC_EXT};
        hctrl.da = 1'b1;
      end
      default: ;
    endcase

    if (t_active) hctrl = t_ctrl;
  end

endmodule
