// domino_read_array: behavioural timing model of the domino read paths of all
// bitslices of one sub-array (dynamic precharge/evaluate circuits, so there is
// no synthesizable equivalent).
//
// Structure per bitslice (from the published design): NL local bitlines
// (LBLs) of 16 cells, a 2-input merge-NAND per LBL pair (NAOUT), two
// merge-NANDs per global bitline (GBL), and a set-dominant latch (SDL) fed by
// the two GBLs.
//   * An LBL is precharged high. When its selected cell stores 1 (lbl_pull
//     rises) it discharges after T_EVAL_PS + slow_ps + a fixed within-die
//     offset of that LBL (0..WID_SPREAD_PS, a hash of SUB_ID, bitslice and LBL
//     index). If the precharge of its pair starts, or is still on, before the
//     discharge completes, the LBL stays high: a sensing failure, which no
//     double sampling can see.
//   * Precharge (lbl_pch rising) restores a low LBL after T_PCH_PS without
//     the EQ1 equaliser, T_PCH_PS/2 when EQ1 (eq_en) turns on together with
//     the precharge, and T_PCH_PS/3 when EQ1 was already sharing charge with
//     the neighbouring LBL. If the precharge ends first, the LBL stays low and
//     the next read of that pair sees a false 1.
//   * NAOUT = NAND of the two LBLs, T_NAND_PS after an LBL changes; GBL = NOR
//     of its NAOUTs, T_GBL_PS later; a falling GBL sets SDLOUT T_SDL_PS later
//     (set dominant). On each rising edge of del_clkb (the delayed inverted
//     clock, shortly after the falling clock edge) SDLOUT is cleared if both
//     GBLs are precharged.
// slow_ps carries the operating point: voltage droop, temperature and aging
// slow the bitline evaluation. All picosecond values are this model's
// assumptions; the nominal read is set to arrive after mid-cycle, as in the
// published cycle break-down, which lets the error detector use the whole
// following high phase as its window. Each change is handled by a forked
// thread, so the model holds only a few static processes.
module domino_read_array
  import rf_pkg::*;
#(
  parameter int unsigned N_BITS        = WIDTH,
  parameter int unsigned NL            = LBLS,
  parameter int unsigned SUB_ID        = 0,
  parameter int unsigned T_EVAL_PS     = 440,
  parameter int unsigned WID_SPREAD_PS = 60,
  parameter int unsigned T_NAND_PS     = 80,
  parameter int unsigned T_GBL_PS      = 50,
  parameter int unsigned T_SDL_PS      = 50,
  parameter int unsigned T_PCH_PS      = 150
) (
  input  logic [N_BITS-1:0][NL-1:0]   lbl_pull,
  input  logic [N_BITS-1:0][NL/2-1:0] lbl_pch,
  input  logic [N_BITS-1:0][NL/2-1:0] eq_en,
  input  logic                        del_clkb,
  input  logic [31:0]                 slow_ps,
  output logic [N_BITS-1:0][NL/2-1:0] naout,
  output logic [N_BITS-1:0]           sdlout
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NN       = NL / 2;
  localparam int unsigned NAND_PER = NN / 2;

  logic        [NL-1:0] lbl    [N_BITS];
  logic        [1:0]    gbl    [N_BITS];
  int unsigned          ev_tok [N_BITS][NL];
  int unsigned          pc_tok [N_BITS][NN];
  time                  eq_rise[N_BITS][NN];
  logic [N_BITS-1:0][NL-1:0] pull_q;
  logic [N_BITS-1:0][NN-1:0] pch_q;
  logic [N_BITS-1:0][NN-1:0] eq_q;

  function automatic int unsigned wid(int unsigned b, int unsigned i);
    int unsigned h;
    h = (SUB_ID * 7919 + b * 104729 + i * 1299709) * 32'd2654435761;
    return (h >> 8) % (WID_SPREAD_PS + 1);
  endfunction

  initial begin
    for (int b = 0; b < N_BITS; b++) begin
      lbl[b]    = '1;
      gbl[b]    = '1;
      naout[b]  = '0;
      sdlout[b] = 1'b0;
      for (int i = 0; i < NL; i++) ev_tok[b][i] = 0;
      for (int k = 0; k < NN; k++) begin
        pc_tok[b][k]  = 0;
        eq_rise[b][k] = 0;
      end
    end
    pull_q = '0;
    pch_q  = '0;
    eq_q   = '0;
  end

  // Propagate an LBL change through merge-NAND, GBL and SDL.
  task automatic propagate(int unsigned b, int unsigned k);
    int unsigned g;
    logic        was;
    #(T_NAND_PS);
    naout[b][k] = ~(lbl[b][2*k] & lbl[b][2*k+1]);
    #(T_GBL_PS);
    g   = k / NAND_PER;
    was = gbl[b][g];
    gbl[b][g] = ~(|naout[b][g*NAND_PER +: NAND_PER]);
    if (was && !gbl[b][g]) begin
      #(T_SDL_PS);
      sdlout[b] = 1'b1;
    end
  endtask

  // Evaluation: discharge unless a precharge intervenes.
  always @(lbl_pull) begin
    automatic logic [N_BITS-1:0][NL-1:0] rise = lbl_pull & ~pull_q;
    pull_q = lbl_pull;
    for (int b = 0; b < N_BITS; b++) begin
      for (int i = 0; i < NL; i++) begin
        if (rise[b][i]) begin
          automatic int unsigned bb = b;
          automatic int unsigned ii = i;
          ev_tok[b][i]++;
          fork
            begin
              automatic int unsigned my_ev = ev_tok[bb][ii];
              automatic int unsigned my_pc = pc_tok[bb][ii/2];
              #1;
              if (lbl_pull[bb][ii]) begin      // not a zero-width decode glitch
                #(T_EVAL_PS + wid(bb, ii) + slow_ps - 1);
                if (my_ev == ev_tok[bb][ii] && my_pc == pc_tok[bb][ii/2] &&
                    !lbl_pch[bb][ii/2] && lbl[bb][ii]) begin
                  lbl[bb][ii] = 1'b0;
                  propagate(bb, ii/2);
                end
              end
            end
          join_none
        end
      end
    end
  end

  always @(eq_en) begin
    for (int b = 0; b < N_BITS; b++)
      for (int k = 0; k < NN; k++)
        if (eq_en[b][k] && !eq_q[b][k]) eq_rise[b][k] = $time;
    eq_q = eq_en;
  end

  // Precharge: restore, faster when EQ1 charge sharing is on.
  always @(lbl_pch) begin
    automatic logic [N_BITS-1:0][NN-1:0] rise = lbl_pch & ~pch_q;
    pch_q = lbl_pch;
    for (int b = 0; b < N_BITS; b++) begin
      for (int k = 0; k < NN; k++) begin
        if (rise[b][k]) begin
          automatic int unsigned bb     = b;
          automatic int unsigned kk     = k;
          automatic logic        shared = eq_en[b][k] && (eq_rise[b][k] < $time);
          pc_tok[b][k]++;
          if (lbl[b][2*k +: 2] != 2'b11) begin
            fork
              begin
                automatic int unsigned my_pc = pc_tok[bb][kk];
                #1;
                if (shared)               #(T_PCH_PS/3 - 1);
                else if (eq_en[bb][kk])   #(T_PCH_PS/2 - 1);
                else                      #(T_PCH_PS - 1);
                if (my_pc == pc_tok[bb][kk] && lbl_pch[bb][kk]) begin
                  lbl[bb][2*kk +: 2] = 2'b11;
                  propagate(bb, kk);
                end
              end
            join_none
          end
        end
      end
    end
  end

  // SDL reset on the rising edge of the delayed inverted clock.
  // The reset is applied only to slices whose GBLs are still both high when
  // it takes effect, so a GBL falling meanwhile wins (set dominance).
  always @(posedge del_clkb) begin
    automatic logic [N_BITS-1:0] rst;
    for (int b = 0; b < N_BITS; b++) rst[b] = &gbl[b];
    fork
      begin
        #(T_SDL_PS);
        for (int b = 0; b < N_BITS; b++)
          if (rst[b] && (&gbl[b])) sdlout[b] = 1'b0;
      end
    join_none
  end
endmodule
