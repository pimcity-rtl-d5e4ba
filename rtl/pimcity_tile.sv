// pimcity_tile: one PimCity tile, a PIM array with its row and column decoders and
// the switches that join its logic lines to the four neighbouring tiles.
//
// Every tile receives the same micro-operation from the single controller each
// cycle (the document requires the tiles to run in lockstep). The decoders latch
// the addresses it carries; a fire, wr or rd strobe then acts on the latched lines.
// Which lines feed the array depends on the direction: for row logic the column
// decoder names the input and output columns and the row decoder the parallel
// rows; for column logic the roles swap. Writes use the row decoder's output latch
// for the row and its column decoder's parallel latch for the columns, reads the
// input latch.
//
// Tile selection and links (this design's encoding of what the document leaves
// open): the micro-operation names the selected tiles (all, one by index
// r*GRID_C+c, or those with even/odd coordinate along the link axis) and a link
// direction. Without a link each selected tile computes on its own. With a link
// each selected tile that has a neighbour in that direction is a source (its input
// cells drive the line) and the neighbour is the destination (its output cell is
// written). Row logic links run east-west, column logic links north-south; a
// mismatched direction, or a tile that would be both source and destination
// (chained lines), raises err and the pair does nothing.
//
// The tile's coordinates are inputs so that all tiles share one module.
// Timing: strobes take effect at the clock edge; rdata_o shows the last row read
// by this tile from the cycle after the rd strobe, and is zero in tiles that were
// not selected for that read.
module pimcity_tile
  import pimcity_pkg::*;
#(
  parameter int unsigned T      = 1024,
  parameter int unsigned GRID_R = 1,
  parameter int unsigned GRID_C = 69
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [TILE_IDX_W-1:0] tile_r,
  input  logic [TILE_IDX_W-1:0] tile_c,
  input  uop_t                  uop,
  input  logic [T-1:0]          wdata,
  output logic [T-1:0]          rdata_o,
  output logic                  err,
  // this tile's input-cell facts, to the neighbours
  output logic [T-1:0]          rll_all_o,
  output logic [T-1:0]          rll_any_o,
  output logic [T-1:0]          cll_all_o,
  output logic [T-1:0]          cll_any_o,
  // neighbours' facts (west/east on the row lines, north/south on the column lines)
  input  logic [T-1:0]          w_all_i,
  input  logic [T-1:0]          w_any_i,
  input  logic [T-1:0]          e_all_i,
  input  logic [T-1:0]          e_any_i,
  input  logic [T-1:0]          n_all_i,
  input  logic [T-1:0]          n_any_i,
  input  logic [T-1:0]          s_all_i,
  input  logic [T-1:0]          s_any_i
);

  // ---------------------------------------------------------------- selection
  function automatic logic sel_at(int r, int c);
    int axis;
    if (r < 0 || c < 0 || r >= int'(GRID_R) || c >= int'(GRID_C)) return 1'b0;
    axis = (uop.link == LINK_N || uop.link == LINK_S) ? r : c;
    case (uop.tsel)
      TS_ALL:  return 1'b1;
      TS_ONE:  return uop.tile == TILE_IDX_W'(r * int'(GRID_C) + c);
      TS_EVEN: return (axis % 2) == 0;
      default: return (axis % 2) == 1;
    endcase
  endfunction

  // Neighbour offset in the link direction.
  function automatic int dr_of(link_e l);
    case (l)
      LINK_N:  return -1;
      LINK_S:  return 1;
      default: return 0;
    endcase
  endfunction
  function automatic int dc_of(link_e l);
    case (l)
      LINK_W:  return -1;
      LINK_E:  return 1;
      default: return 0;
    endcase
  endfunction

  function automatic logic in_grid(int r, int c);
    return r >= 0 && c >= 0 && r < int'(GRID_R) && c < int'(GRID_C);
  endfunction

  // Raw source / destination roles of the tile at (r, c) for a linked operation.
  function automatic logic src_at(int r, int c);
    return sel_at(r, c) && in_grid(r + dr_of(uop.link), c + dc_of(uop.link));
  endfunction
  function automatic logic dst_at(int r, int c);
    return in_grid(r, c) && sel_at(r - dr_of(uop.link), c - dc_of(uop.link));
  endfunction
  function automatic logic conflict_at(int r, int c);
    return src_at(r, c) && dst_at(r, c);
  endfunction

  int   me_r, me_c;
  logic link_ok, linked, me_sel, is_src, is_dst, chain_err;
  int   up_r, up_c, dn_r, dn_c;

  always_comb begin
    me_r    = int'(tile_r);
    me_c    = int'(tile_c);
    me_sel  = sel_at(me_r, me_c);
    linked  = (uop.link != LINK_NONE);
    link_ok = !linked ||
              ((uop.dir == DIR_ROW) == (uop.link == LINK_E || uop.link == LINK_W));
    up_r = me_r - dr_of(uop.link);
    up_c = me_c - dc_of(uop.link);
    dn_r = me_r + dr_of(uop.link);
    dn_c = me_c + dc_of(uop.link);
    if (!linked) begin
      is_src    = me_sel;
      is_dst    = me_sel;
      chain_err = 1'b0;
    end else begin
      is_src    = link_ok && src_at(me_r, me_c) &&
                  !conflict_at(me_r, me_c) && !conflict_at(dn_r, dn_c);
      is_dst    = link_ok && dst_at(me_r, me_c) &&
                  !conflict_at(me_r, me_c) && !conflict_at(up_r, up_c);
      chain_err = conflict_at(me_r, me_c);
    end
  end

  // ---------------------------------------------------------------- decoders
  logic [T-1:0] r_in, r_out, r_par, c_in, c_out, c_par;

  line_decoder #(.T(T)) u_row_dec (
    .clk, .rst_n, .clr(uop.clr), .role(uop.row_role), .addr(uop.row_addr),
    .in_act(r_in), .out_act(r_out), .par_act(r_par)
  );

  line_decoder #(.T(T)) u_col_dec (
    .clk, .rst_n, .clr(uop.clr), .role(uop.col_role), .addr(uop.col_addr),
    .in_act(c_in), .out_act(c_out), .par_act(c_par)
  );

  // ---------------------------------------------------------------- links
  logic [T-1:0] rll_all_i, rll_any_i, cll_all_i, cll_any_i;

  // Row logic lines: a destination of an eastward link listens to the west.
  ll_switch #(.T(T)) u_rll_sw (
    .en_a(is_dst && uop.link == LINK_E), .a_all(w_all_i), .a_any(w_any_i),
    .en_b(is_dst && uop.link == LINK_W), .b_all(e_all_i), .b_any(e_any_i),
    .all_o(rll_all_i), .any_o(rll_any_i)
  );

  // Column logic lines: a destination of a southward link listens to the north.
  ll_switch #(.T(T)) u_cll_sw (
    .en_a(is_dst && uop.link == LINK_S), .a_all(n_all_i), .a_any(n_any_i),
    .en_b(is_dst && uop.link == LINK_N), .b_all(s_all_i), .b_any(s_any_i),
    .all_o(cll_all_i), .any_o(cll_any_i)
  );

  // ---------------------------------------------------------------- array
  logic         arr_fire, arr_wr, arr_rd, arr_err;
  logic [T-1:0] arr_rdata;

  assign arr_fire = uop.fire && link_ok && (is_src || is_dst);
  assign arr_wr   = uop.wr && me_sel;
  assign arr_rd   = uop.rd && me_sel;

  pimcity_array #(.T(T)) u_array (
    .clk,
    .fire(arr_fire), .dir(uop.dir), .gate(uop.gate),
    .src_en(is_src), .dst_en(is_dst), .wr_en(arr_wr), .rd_en(arr_rd),
    .row_in(r_in), .row_out(r_out), .row_par(r_par),
    .col_in(c_in), .col_out(c_out), .col_par(c_par),
    .wdata, .rdata(arr_rdata),
    .rll_all_o, .rll_any_o, .cll_all_o, .cll_any_o,
    .rll_all_i, .rll_any_i, .cll_all_i, .cll_any_i,
    .op_err(arr_err)
  );

  logic rd_mine;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        rd_mine <= 1'b0;
    else if (uop.rd)   rd_mine <= me_sel;
  end
  assign rdata_o = rd_mine ? arr_rdata : '0;

  assign err = ((arr_fire || arr_wr || arr_rd) && arr_err) ||
               (uop.fire && linked && (chain_err || (!link_ok && me_sel)));

endmodule
