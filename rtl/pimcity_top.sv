// pimcity_top: a PimCity compute-in-memory fabric: GRID_R x GRID_C tiles of
// T x T cells driven by one controller.
//
// Each tile computes Boolean gates inside its array, along rows or along columns,
// and moves data by the same gates (two NOTs copy a value). Neighbouring tiles
// join their row logic lines (east-west) and column logic lines (north-south), so
// a gate can read cells in one tile and write a cell in the next: data crosses
// tiles without reads, writes or a shared network. The controller broadcasts one
// micro-operation per cycle to all tiles (see pim_controller for the instruction
// set and timing, pimcity_tile for tile selection and links).
//
// Defaults: 1024 x 1024 tiles, the largest tile the document considers practical,
// in a 1 x 69 grid, the tile count the document lists for a 1024 x 1024 matrix on
// 1024 x 1024 tiles. The instruction memory and row buffer depths are this
// design's choices.
//
// Host interface: load the program with prog_we, load rows to write with
// dbuf_we, pulse start, wait for done, fetch rows read with dbuf_raddr/dbuf_rdata.
//
// With GRID_R = 1 (the default) no tile has a north or south neighbour, so the
// tiles' column logic line outputs (cll_all, cll_any) go unused; they stay for
// grids with more than one tile row.
module pimcity_top
  import pimcity_pkg::*;
#(
  parameter int unsigned T          = 1024,
  parameter int unsigned GRID_R     = 1,
  parameter int unsigned GRID_C     = 69,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DBUF_DEPTH = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_instr,
  input  logic                          dbuf_we,
  input  logic [$clog2(DBUF_DEPTH)-1:0] dbuf_waddr,
  input  logic [T-1:0]                  dbuf_wdata,
  input  logic [$clog2(DBUF_DEPTH)-1:0] dbuf_raddr,
  output logic [T-1:0]                  dbuf_rdata,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          err,
  output logic [31:0]                   instr_count
);

  uop_t         uop;
  logic [T-1:0] wdata, rdata;
  logic         fabric_err;

  pim_controller #(.T(T), .IMEM_DEPTH(IMEM_DEPTH), .DBUF_DEPTH(DBUF_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_instr,
    .dbuf_we, .dbuf_waddr, .dbuf_wdata, .dbuf_raddr, .dbuf_rdata,
    .start, .busy, .done, .err, .instr_count,
    .uop, .wdata, .rdata, .fabric_err
  );

  // Logic-line facts each tile drives toward its neighbours.
  logic [T-1:0] rll_all [GRID_R][GRID_C];
  logic [T-1:0] rll_any [GRID_R][GRID_C];
  logic [T-1:0] cll_all [GRID_R][GRID_C];
  logic [T-1:0] cll_any [GRID_R][GRID_C];
  logic [T-1:0] t_rdata [GRID_R][GRID_C];
  logic         t_err   [GRID_R][GRID_C];

  for (genvar r = 0; r < int'(GRID_R); r++) begin : g_row
    for (genvar c = 0; c < int'(GRID_C); c++) begin : g_col
      logic [T-1:0] w_all, w_any, e_all, e_any, n_all, n_any, s_all, s_any;
      // Off-grid neighbours contribute the identity (switch never closed there).
      if (c > 0) begin : g_w
        assign w_all = rll_all[r][c-1];
        assign w_any = rll_any[r][c-1];
      end else begin : g_w0
        assign w_all = '1;
        assign w_any = '0;
      end
      if (c < int'(GRID_C) - 1) begin : g_e
        assign e_all = rll_all[r][c+1];
        assign e_any = rll_any[r][c+1];
      end else begin : g_e0
        assign e_all = '1;
        assign e_any = '0;
      end
      if (r > 0) begin : g_n
        assign n_all = cll_all[r-1][c];
        assign n_any = cll_any[r-1][c];
      end else begin : g_n0
        assign n_all = '1;
        assign n_any = '0;
      end
      if (r < int'(GRID_R) - 1) begin : g_s
        assign s_all = cll_all[r+1][c];
        assign s_any = cll_any[r+1][c];
      end else begin : g_s0
        assign s_all = '1;
        assign s_any = '0;
      end

      pimcity_tile #(.T(T), .GRID_R(GRID_R), .GRID_C(GRID_C)) u_tile (
        .clk, .rst_n,
        .tile_r(TILE_IDX_W'(r)), .tile_c(TILE_IDX_W'(c)),
        .uop, .wdata,
        .rdata_o(t_rdata[r][c]), .err(t_err[r][c]),
        .rll_all_o(rll_all[r][c]), .rll_any_o(rll_any[r][c]),
        .cll_all_o(cll_all[r][c]), .cll_any_o(cll_any[r][c]),
        .w_all_i(w_all), .w_any_i(w_any), .e_all_i(e_all), .e_any_i(e_any),
        .n_all_i(n_all), .n_any_i(n_any), .s_all_i(s_all), .s_any_i(s_any)
      );
    end
  end

  // Only the tile selected for the last read drives non-zero read data.
  always_comb begin
    rdata      = '0;
    fabric_err = 1'b0;
    for (int r = 0; r < int'(GRID_R); r++)
      for (int c = 0; c < int'(GRID_C); c++) begin
        rdata      = rdata | t_rdata[r][c];
        fabric_err = fabric_err | t_err[r][c];
      end
  end

endmodule
