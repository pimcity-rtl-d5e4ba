// tb_pimcity_tile: self-checking test of the tile, in a 2 x 3 grid of small tiles
// wired to their neighbours as in the full fabric. Micro-operations are driven
// directly: decoder latching one address per cycle, fire/wr/rd strobes, tile
// selection (all, one, even, odd) and inter-tile links in all four directions.
// A cell-level reference of all six arrays is kept in the testbench; every array is
// read back and compared after each operation. Chained links and a link on the
// wrong axis must raise err and change nothing.
module tb_pimcity_tile;
  import pimcity_pkg::*;
  import tb_pim_asm::*;
  localparam int unsigned T  = 8;
  localparam int unsigned GR = 2;
  localparam int unsigned GC = 3;
  localparam int unsigned NT = GR * GC;

  logic clk = 1'b0, rst_n = 1'b0;
  uop_t uop;
  logic [T-1:0] wdata;
  logic [T-1:0] rdata [NT];
  logic         err [NT];
  logic [T-1:0] ra [NT], ro [NT], ca [NT], co [NT];

  logic [T-1:0] ref_mem [NT][T];
  int checks = 0, failures = 0;
  int n_link = 0, n_local = 0, n_err = 0;

  always #5 clk = ~clk;

  for (genvar r = 0; r < GR; r++) begin : g_r
    for (genvar c = 0; c < GC; c++) begin : g_c
      localparam int I = r * GC + c;
      pimcity_tile #(.T(T), .GRID_R(GR), .GRID_C(GC)) dut (
        .clk, .rst_n, .tile_r(TILE_IDX_W'(r)), .tile_c(TILE_IDX_W'(c)),
        .uop, .wdata, .rdata_o(rdata[I]), .err(err[I]),
        .rll_all_o(ra[I]), .rll_any_o(ro[I]), .cll_all_o(ca[I]), .cll_any_o(co[I]),
        .w_all_i(c > 0 ? ra[I-1] : '1), .w_any_i(c > 0 ? ro[I-1] : '0),
        .e_all_i(c < GC-1 ? ra[I+1] : '1), .e_any_i(c < GC-1 ? ro[I+1] : '0),
        .n_all_i(r > 0 ? ca[I-GC] : '1), .n_any_i(r > 0 ? co[I-GC] : '0),
        .s_all_i(r < GR-1 ? ca[I+GC] : '1), .s_any_i(r < GR-1 ? co[I+GC] : '0)
      );
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic any_err();
    logic e = 0;
    for (int i = 0; i < NT; i++) e |= err[i];
    return e;
  endfunction

  task automatic send(uop_t u);
    uop = u;
    @(posedge clk); #1;
    uop = '0;
  endtask

  function automatic logic ref_sel(tsel_e ts, int tile, link_e l, int r, int c);
    int axis;
    if (r < 0 || c < 0 || r >= GR || c >= GC) return 0;
    axis = (l == LINK_N || l == LINK_S) ? r : c;
    case (ts)
      TS_ALL:  return 1;
      TS_ONE:  return tile == r * GC + c;
      TS_EVEN: return axis % 2 == 0;
      default: return axis % 2 == 1;
    endcase
  endfunction

  function automatic logic ref_gate(gate_e g, logic old, logic all1, logic any1);
    case (g)
      G_PRESET0: return 1'b0;
      G_PRESET1: return 1'b1;
      G_NOT, G_NAND: return all1 ? old : 1'b1;
      G_AND:         return all1 ? old : 1'b0;
      G_NOR:         return any1 ? old : 1'b1;
      default:       return any1 ? old : 1'b0;
    endcase
  endfunction

  task automatic wr_row(int tile, int row, logic [T-1:0] d);
    uop_t u;
    u = '0; u.tsel = TS_ONE; u.tile = TILE_IDX_W'(tile);
    u.clr = 1; u.row_role = LR_OUT; u.row_addr = line_addr(row);
    u.col_role = LR_PAR; u.col_addr = bulk_addr(BULK_ALL);
    send(u);
    u.clr = 0; u.row_role = LR_NONE; u.col_role = LR_NONE; u.wr = 1;
    wdata = d;
    send(u);
    ref_mem[tile][row] = d;
  endtask

  task automatic check_all(string what);
    for (int t = 0; t < NT; t++)
      for (int row = 0; row < T; row++) begin
        uop_t u;
        u = '0; u.tsel = TS_ONE; u.tile = TILE_IDX_W'(t);
        u.clr = 1; u.row_role = LR_IN; u.row_addr = line_addr(row);
        u.col_role = LR_PAR; u.col_addr = bulk_addr(BULK_ALL);
        send(u);
        u.clr = 0; u.row_role = LR_NONE; u.col_role = LR_NONE; u.rd = 1;
        send(u);
        checks++;
        for (int o = 0; o < NT; o++) begin
          if (o == t && rdata[o] !== ref_mem[t][row]) begin
            failures++;
            $display("FAIL %s: tile %0d row %0d = %h expected %h", what, t, row, rdata[o], ref_mem[t][row]);
          end
          if (o != t && rdata[o] !== '0) begin
            failures++; $display("FAIL %s: unselected tile %0d drives read data", what, o);
          end
        end
      end
  endtask

  // Issue a gate the way the controller does and update the reference.
  task automatic gate_op(gate_e g, dir_e d, link_e l, tsel_e ts, int tile,
                         int a, int b, int c, line_addr_t par, logic expect_err);
    uop_t u;
    int k;
    logic e;
    logic [T-1:0] pv;
    k = gate_inputs(g);
    u = '0; u.gate = g; u.dir = d; u.link = l; u.tsel = ts; u.tile = TILE_IDX_W'(tile);
    for (int s = 0; s <= k; s++) begin
      latch_role_e role;
      line_addr_t ad;
      role = (s < k) ? LR_IN : LR_OUT;
      ad = line_addr(s < k ? (s == 0 ? a : b) : c);
      u.clr = (s == 0);
      u.row_role = LR_NONE; u.col_role = LR_NONE;
      if (d == DIR_ROW) begin
        u.col_role = role; u.col_addr = ad;
        if (s == 0) begin u.row_role = LR_PAR; u.row_addr = par; end
      end else begin
        u.row_role = role; u.row_addr = ad;
        if (s == 0) begin u.col_role = LR_PAR; u.col_addr = par; end
      end
      send(u);
    end
    u.clr = 0; u.row_role = LR_NONE; u.col_role = LR_NONE; u.fire = 1;
    uop = u;
    #1;
    e = any_err();
    @(posedge clk); #1;
    uop = '0;
    checks++;
    if (e !== expect_err) begin
      failures++; $display("FAIL err=%b expected %b (gate %0d link %0d)", e, expect_err, g, l);
    end
    if (expect_err) begin n_err++; return; end
    // parallel lines
    pv = '0;
    for (int i = 0; i < T; i++)
      pv[i] = par[LINE_AW-1] ? (par[1:0] == 0 ? 1 : par[1:0] == 1 ? (i < T/2) : (i >= T/2))
                             : (i == int'(par));
    // reference: for each destination tile, find its source tile
    begin
      logic [T-1:0] nm [NT][T];
      nm = ref_mem;
      for (int r = 0; r < GR; r++)
        for (int cc = 0; cc < GC; cc++) begin
          int sr, sc, dt, st;
          sr = r; sc = cc;
          case (l)
            LINK_E: sc = cc - 1;
            LINK_W: sc = cc + 1;
            LINK_S: sr = r - 1;
            LINK_N: sr = r + 1;
            default: ;
          endcase
          if (!ref_sel(ts, tile, l, sr, sc)) continue;
          dt = r * GC + cc;
          st = sr * GC + sc;
          for (int line = 0; line < T; line++) begin
            logic all1, any1;
            if (!pv[line]) continue;
            all1 = 1; any1 = 0;
            if (d == DIR_ROW) begin
              if (k > 0) begin all1 &= ref_mem[st][line][a]; any1 |= ref_mem[st][line][a]; end
              if (k > 1) begin all1 &= ref_mem[st][line][b]; any1 |= ref_mem[st][line][b]; end
              nm[dt][line][c] = ref_gate(g, ref_mem[dt][line][c], all1, any1);
            end else begin
              if (k > 0) begin all1 &= ref_mem[st][a][line]; any1 |= ref_mem[st][a][line]; end
              if (k > 1) begin all1 &= ref_mem[st][b][line]; any1 |= ref_mem[st][b][line]; end
              nm[dt][c][line] = ref_gate(g, ref_mem[dt][c][line], all1, any1);
            end
          end
        end
      ref_mem = nm;
    end
    if (l == LINK_NONE) n_local++; else n_link++;
  endtask

  initial begin
    uop = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < NT; t++)
      for (int row = 0; row < T; row++) wr_row(t, row, T'($urandom));
    check_all("write/read");

    // Local row and column logic in all tiles, one tile, even/odd tiles
    gate_op(G_PRESET0, DIR_ROW, LINK_NONE, TS_ALL, 0, 0, 0, 7, bulk_addr(BULK_ALL), 0);
    gate_op(G_NAND, DIR_ROW, LINK_NONE, TS_ALL, 0, 1, 2, 7, bulk_addr(BULK_ALL), 0);
    gate_op(G_PRESET1, DIR_COL, LINK_NONE, TS_ONE, 4, 0, 0, 3, bulk_addr(BULK_LOWER), 0);
    gate_op(G_OR, DIR_COL, LINK_NONE, TS_ONE, 4, 0, 2, 3, bulk_addr(BULK_LOWER), 0);
    gate_op(G_PRESET0, DIR_ROW, LINK_NONE, TS_ODD, 0, 0, 0, 6, bulk_addr(BULK_UPPER), 0);
    gate_op(G_NOT, DIR_ROW, LINK_NONE, TS_ODD, 0, 4, 0, 6, bulk_addr(BULK_UPPER), 0);
    check_all("local logic");

    // Inter-tile copies: NOT across each link direction
    gate_op(G_PRESET0, DIR_ROW, LINK_NONE, TS_ALL, 0, 0, 0, 5, bulk_addr(BULK_ALL), 0);
    gate_op(G_NOT, DIR_ROW, LINK_E, TS_EVEN, 0, 1, 0, 5, bulk_addr(BULK_ALL), 0);
    check_all("row logic east");
    gate_op(G_PRESET1, DIR_ROW, LINK_NONE, TS_ALL, 0, 0, 0, 4, bulk_addr(BULK_ALL), 0);
    gate_op(G_AND, DIR_ROW, LINK_W, TS_ONE, 5, 2, 3, 4, bulk_addr(BULK_ALL), 0);
    check_all("row logic west");
    gate_op(G_PRESET0, DIR_COL, LINK_NONE, TS_ALL, 0, 0, 0, 1, bulk_addr(BULK_ALL), 0);
    gate_op(G_NOR, DIR_COL, LINK_S, TS_EVEN, 0, 0, 2, 1, bulk_addr(BULK_ALL), 0);
    check_all("column logic south");
    gate_op(G_PRESET0, DIR_COL, LINK_NONE, TS_ALL, 0, 0, 0, 6, bulk_addr(BULK_ALL), 0);
    gate_op(G_NAND, DIR_COL, LINK_N, TS_ODD, 0, 3, 5, 6, bulk_addr(BULK_UPPER), 0);
    check_all("column logic north");

    // Random mix
    for (int i = 0; i < 40; i++) begin
      gate_e g; dir_e d; link_e l; tsel_e ts; int p, a, b, c;
      g = gate_e'($urandom % 5);
      d = dir_e'($urandom % 2);
      ts = ($urandom % 2) ? TS_EVEN : TS_ODD;
      if ($urandom % 3 == 0) l = LINK_NONE;
      else if (d == DIR_ROW) l = ($urandom % 2) ? LINK_E : LINK_W;
      else l = ($urandom % 2) ? LINK_N : LINK_S;
      p = $urandom % 2;
      a = 2 * ($urandom % (T/2)) + p;
      b = 2 * ($urandom % (T/2)) + p;
      c = 2 * ($urandom % (T/2)) + 1 - p;
      gate_op(gate_target(g) ? G_PRESET0 : G_PRESET1, d, LINK_NONE, TS_ALL, 0, 0, 0, c,
              bulk_addr(BULK_ALL), 0);
      gate_op(g, d, l, ts, 0, a, b, c, bulk_addr(BULK_ALL), 0);
    end
    check_all("random logic");

    // Errors: chained east links (middle tile is source and destination),
    // a column-logic gate on an east-west link
    gate_op(G_NOT, DIR_ROW, LINK_E, TS_ALL, 0, 1, 0, 5, bulk_addr(BULK_ALL), 1);
    gate_op(G_NOT, DIR_COL, LINK_E, TS_EVEN, 0, 0, 0, 1, bulk_addr(BULK_ALL), 1);
    check_all("after rejected operations");

    checks++;
    if (n_link == 0 || n_local == 0 || n_err == 0) begin
      failures++; $display("FAIL mechanism never exercised");
    end
    $display("local ops %0d, linked ops %0d, rejected %0d", n_local, n_link, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
