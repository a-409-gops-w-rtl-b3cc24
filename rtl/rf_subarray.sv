// rf_subarray: one 4 Kb (ENTRIES x WIDTH) resilient domino register-file
// sub-array with in-situ timing margin and timing error detection.
//
// Per bitslice: the domino read path (local bitlines, merge-NANDs, global
// bitlines, set-dominant latch), conditional delayed precharge for each LBL
// pair, two margin-window delay lines feeding a timing margin detector (TMD)
// and a timing error detector (TED). Shared: storage, read decoder, the
// delayed-precharge and delayed-CLKB lines, and three error compactors that
// reduce the 32 TED flags and the 32 TMDa / TMDb flags to one bit each.
//
// Timing for a read issued (rd_en, raddr) before rising edge k:
//   edge k      address registered, RWL high for the high phase (2H)
//   edge k+1    dout holds the data (3H); dout_lat holds corrected data from
//               the falling edge after it (3L)
//   edge k+2    err_ted / err_tmd[0] (TMDa) / err_tmd[1] (TMDb) hold the
//               compacted flags of that read (4H)
// Writes take effect at the rising edge. slow_ps is the extra bitline
// evaluation delay of the present operating point and tune holds the delay
// settings; both go only to the behavioural delay models.
// The organisation and the detector/compactor chain follow the published
// design. This design's own choice: three compactors (the published one has a
// single compactor with a TED/TMD mode input), so that error recovery and
// margin tracking run at the same time.
module rf_subarray
  import rf_pkg::*;
#(
  parameter int unsigned N_ROWS = ENTRIES,
  parameter int unsigned N_BITS = WIDTH,
  parameter int unsigned SUB_ID = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wwl_en,
  input  logic [$clog2(N_ROWS)-1:0] waddr,
  input  logic [N_BITS-1:0]         wdata,
  input  logic                      rd_en,
  input  logic [$clog2(N_ROWS)-1:0] raddr,
  input  rf_tune_t                  tune,
  input  logic [31:0]               slow_ps,
  output logic [N_BITS-1:0]         dout,
  output logic [N_BITS-1:0]         dout_lat,
  output logic                      err_ted,
  output logic [N_MDW-1:0]          err_tmd
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NL = N_ROWS / CELLS_PER_LBL;
  localparam int unsigned NN = NL / 2;

  logic [N_ROWS-1:0]         rwl;
  logic [N_BITS-1:0][NL-1:0] lbl_pull;
  logic                      clkb;
  logic                      del_pchb;
  logic                      del_clkb;
  logic [N_BITS-1:0]         sdlout;
  logic [N_BITS-1:0]         ted_out;
  logic [N_BITS-1:0]         tmda_out;
  logic [N_BITS-1:0]         tmdb_out;

  assign clkb = ~clk;

  rwl_decoder #(.N_ROWS(N_ROWS)) u_dec (
    .clk, .rst_n, .rd_en, .raddr, .rwl
  );

  bitcell_array #(.N_ROWS(N_ROWS), .N_BITS(N_BITS)) u_array (
    .clk, .wwl_en, .waddr, .wdata, .rwl, .lbl_pull
  );

  // Bitline precharge delay: two mux delays plus steps of two inverters.
  prog_delay_line #(.T_FIXED_PS(40), .T_STEP_PS(120)) u_del_pch (
    .a(clkb), .sel(tune.pch_sel), .y(del_pchb)
  );
  prog_delay_line #(.T_FIXED_PS(40), .T_STEP_PS(20)) u_del_clkb (
    .a(clkb), .sel(tune.clkb_sel), .y(del_clkb)
  );

  logic [N_BITS-1:0][NN-1:0] naout;
  logic [N_BITS-1:0][NN-1:0] lbl_pch;
  logic [N_BITS-1:0][NN-1:0] eq_en;
  logic [N_BITS-1:0]         del_mdw2;
  logic [N_BITS-1:0]         del_mdw12;

  domino_read_array #(.N_BITS(N_BITS), .NL(NL), .SUB_ID(SUB_ID)) u_read (
    .lbl_pull, .lbl_pch, .eq_en, .del_clkb, .slow_ps, .naout, .sdlout
  );

  // Margin detection windows: MDW2 (TMDa) and MDW1+MDW2 (TMDb).
  prog_delay_line #(.N(N_BITS), .T_FIXED_PS(20), .T_STEP_PS(40)) u_mdw2 (
    .a(sdlout), .sel(tune.mdw2_sel), .y(del_mdw2)
  );
  prog_delay_line #(.N(N_BITS), .T_FIXED_PS(20), .T_STEP_PS(40)) u_mdw12 (
    .a(sdlout), .sel(tune.mdw12_sel), .y(del_mdw12)
  );

  for (genvar b = 0; b < N_BITS; b++) begin : g_slice
    logic [N_MDW-1:0] tmd_o;

    for (genvar k = 0; k < NN; k++) begin : g_pair
      cond_precharge u_pch (
        .clk, .rst_n, .naout(naout[b][k]), .del_pchb,
        .lbl_pch(lbl_pch[b][k]), .eq_en(eq_en[b][k])
      );
    end

    tmd u_tmd (
      .clk, .rst_n, .sdlout(sdlout[b]), .del_sdlout({del_mdw12[b], del_mdw2[b]}),
      .tmd_out(tmd_o)
    );
    assign tmda_out[b] = tmd_o[0];
    assign tmdb_out[b] = tmd_o[1];

    ted u_ted (
      .clk, .rst_n, .sdlout(sdlout[b]),
      .dout(dout[b]), .dout_lat(dout_lat[b]), .ted_out(ted_out[b])
    );
  end

  error_compactor #(.N_BITS(N_BITS)) u_ec_ted (
    .clk, .rst_n, .mode(1'b0), .ted_out, .tmd_out(tmda_out), .err_compact_ff(err_ted)
  );
  error_compactor #(.N_BITS(N_BITS)) u_ec_tmda (
    .clk, .rst_n, .mode(1'b1), .ted_out, .tmd_out(tmda_out), .err_compact_ff(err_tmd[0])
  );
  error_compactor #(.N_BITS(N_BITS)) u_ec_tmdb (
    .clk, .rst_n, .mode(1'b1), .ted_out, .tmd_out(tmdb_out), .err_compact_ff(err_tmd[1])
  );
endmodule
