// tb_pimcity_top: end-to-end test of the PimCity fabric (64 x 64 tiles, 2 x 2 grid).
//
// Runs the two worked examples of the architecture as in-array gate programs:
//  1. Moving data by logic: a 4-bit X and a 4-bit Y sit in different rows of one
//     tile. Row-logic NOTs make X' in spare columns of X's row, one column-logic
//     NOT over the upper half of the columns puts X into Y's row (b+1 gates), and
//     a ripple-carry adder of 9-NAND full adders in row logic forms X+Y there.
//  2. Matrix-vector product of a 128 x 2 matrix M (4-bit) with a 2-element vector
//     V: column c of M lives in tile column c, rows 0..63 in tile row 0 and rows
//     64..127 in tile row 1. V is written into one row, copied to every row by
//     column logic (with a north-south inter-tile copy to the second tile row),
//     every row multiplies M by V with row logic (AND partial products, full
//     adders), the products of tile column 1 move into tile column 0 through the
//     east-west links, and a final row-logic addition forms each output element.
// Results are read back through the row buffer and compared with integer
// arithmetic. The run time of every program is checked against the controller's
// cycle formula, and each mechanism (row logic, column logic, east-west and
// north-south links, bulk addressing, tile selection modes, reads, writes, the
// illegal-operation flag) is counted; one never used counts as a failure.
module tb_pimcity_top;
  import pimcity_pkg::*;
  import tb_pim_asm::*;

  localparam int unsigned T    = 64;
  localparam int unsigned GR   = 2;
  localparam int unsigned GC   = 2;
  localparam int unsigned IMEM = 1024;
  localparam int unsigned DBUF = 16;
  localparam int B = 4;                       // operand bits

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we;
  logic [$clog2(IMEM)-1:0] prog_addr;
  instr_t prog_instr;
  logic dbuf_we;
  logic [$clog2(DBUF)-1:0] dbuf_waddr, dbuf_raddr;
  logic [T-1:0] dbuf_wdata, dbuf_rdata;
  logic start, busy, done, err;
  logic [31:0] instr_count;

  pimcity_top #(.T(T), .GRID_R(GR), .GRID_C(GC), .IMEM_DEPTH(IMEM), .DBUF_DEPTH(DBUF)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_row_logic = 0, n_col_logic = 0, n_link_ew = 0, n_link_ns = 0;
  int n_bulk_all = 0, n_bulk_half = 0, n_ts_one = 0, n_ts_all = 0, n_ts_even = 0, n_ts_odd = 0;
  int n_write = 0, n_read = 0, n_err = 0;

  instr_t prog [$];

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, from the broadcast micro-operations.
  always @(posedge clk) if (rst_n) begin
    if (dut.uop.fire) begin
      if (dut.uop.dir == DIR_ROW) n_row_logic++; else n_col_logic++;
      if (dut.uop.link == LINK_E || dut.uop.link == LINK_W) n_link_ew++;
      if (dut.uop.link == LINK_N || dut.uop.link == LINK_S) n_link_ns++;
      case (dut.uop.tsel)
        TS_ALL: n_ts_all++; TS_ONE: n_ts_one++; TS_EVEN: n_ts_even++; default: n_ts_odd++;
      endcase
    end
    if (dut.uop.wr) n_write++;
    if (dut.uop.rd) n_read++;
    if (dut.fabric_err) n_err++;
    if (dut.uop.row_role == LR_PAR || dut.uop.col_role == LR_PAR) begin
      line_addr_t pa;
      pa = (dut.uop.row_role == LR_PAR) ? dut.uop.row_addr : dut.uop.col_addr;
      if (pa[LINE_AW-1]) begin
        if (pa[1:0] == BULK_ALL) n_bulk_all++; else n_bulk_half++;
      end
    end
  end

  // ------------------------------------------------------------ program helpers
  function automatic int tid(int r, int c);
    return r * GC + c;
  endfunction

  // Gate with its preset, row logic over the given rows of the selected tiles.
  task automatic rgate(gate_e g, int a, int b, int c, line_addr_t rows = bulk_addr(BULK_ALL),
                       tsel_e ts = TS_ALL, int tile = 0, link_e l = LINK_NONE);
    if (l == LINK_NONE)
      prog.push_back(i_gate(gate_target(g) ? G_PRESET0 : G_PRESET1, DIR_ROW, 0, 0, c, rows,
                            LINK_NONE, ts, tile));
    prog.push_back(i_gate(g, DIR_ROW, a, b, c, rows, l, ts, tile));
  endtask

  task automatic rcopy(int src, int dst, line_addr_t rows = bulk_addr(BULK_ALL));
    rgate(G_AND, src, src, dst, rows);
  endtask

  // Full adder of 9 NANDs in row logic: columns x, y, cin -> s, co.
  localparam int N1 = 21, N2 = 22, N3 = 23, S1 = 24, N5 = 25, N6 = 26, N7 = 27;
  task automatic full_add(int x, int y, int cin, int s, int co,
                          line_addr_t rows = bulk_addr(BULK_ALL));
    rgate(G_NAND, x, y, N1, rows);
    rgate(G_NAND, x, N1, N2, rows);
    rgate(G_NAND, y, N1, N3, rows);
    rgate(G_NAND, N2, N3, S1, rows);
    rgate(G_NAND, S1, cin, N5, rows);
    rgate(G_NAND, S1, N5, N6, rows);
    rgate(G_NAND, cin, N5, N7, rows);
    rgate(G_NAND, N6, N7, s, rows);
    rgate(G_NAND, N1, N5, co, rows);
  endtask

  // Load and run the program in chunks that fit the instruction memory.
  task automatic run_prog();
    int pos = 0;
    while (pos < prog.size()) begin
      int n, exp_cycles, cycles;
      n = prog.size() - pos;
      if (n > int'(IMEM) - 1) n = IMEM - 1;
      exp_cycles = 1;                      // HALT
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        prog_we = 1; prog_addr = k[$clog2(IMEM)-1:0]; prog_instr = prog[pos + k];
        exp_cycles += cycles_of(prog[pos + k]);
      end
      @(negedge clk);
      prog_addr = n[$clog2(IMEM)-1:0]; prog_instr = i_halt();
      @(negedge clk); prog_we = 0; start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != exp_cycles + 1) begin
        failures++; $display("FAIL chunk took %0d cycles, expected %0d", cycles, exp_cycles + 1);
      end
      checks++;
      if (instr_count != 32'(n)) begin failures++; $display("FAIL retired %0d of %0d", instr_count, n); end
      pos += n;
    end
    prog.delete();
  endtask

  task automatic expect_no_err(string what);
    checks++;
    if (err) begin failures++; $display("FAIL %s raised the error flag", what); end
  endtask

  // Write rows through the row buffer (up to DBUF at a time).
  logic [T-1:0] wq_data [$];
  int           wq_tile [$], wq_row [$];
  line_addr_t   wq_cols [$];
  task automatic flush_writes();
    while (wq_data.size() > 0) begin
      int n;
      n = wq_data.size() > int'(DBUF) ? int'(DBUF) : wq_data.size();
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        dbuf_we = 1; dbuf_waddr = k[$clog2(DBUF)-1:0]; dbuf_wdata = wq_data[k];
        prog.push_back(i_write(wq_tile[k], wq_row[k], k, wq_cols[k]));
      end
      @(negedge clk); dbuf_we = 0;
      for (int k = 0; k < n; k++) begin
        void'(wq_data.pop_front()); void'(wq_tile.pop_front());
        void'(wq_row.pop_front()); void'(wq_cols.pop_front());
      end
      run_prog();
    end
  endtask

  task automatic read_row(int tile, int row, output logic [T-1:0] d);
    prog.push_back(i_read(tile, row, 0));
    run_prog();
    @(negedge clk); dbuf_raddr = '0;
    #1 d = dbuf_rdata;
  endtask

  function automatic int field(logic [T-1:0] row, int lsb, int w);
    int v = 0;
    for (int k = 0; k < w; k++) v |= int'(row[lsb + k]) << k;
    return v;
  endfunction

  // ------------------------------------------------------------ test
  initial begin
    prog_we = 0; dbuf_we = 0; start = 0;
    prog_addr = '0; prog_instr = '0; dbuf_waddr = '0; dbuf_wdata = '0; dbuf_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------- 1. move X next to Y by logic, then add
    begin
      int x, y;
      logic [T-1:0] d;
      localparam int YROW = 4, XROW = 7, XS = 32, XN = 36, ADD_C = 20, SUM = 40;
      x = $urandom % 16; y = $urandom % 16;
      d = '0; d[3:0] = 4'(y);
      wq_data.push_back(d); wq_tile.push_back(0); wq_row.push_back(YROW); wq_cols.push_back(bulk_addr(BULK_ALL));
      d = '0; d[3:0] = 4'(x);
      wq_data.push_back(d); wq_tile.push_back(0); wq_row.push_back(XROW); wq_cols.push_back(bulk_addr(BULK_ALL));
      flush_writes();
      // b row-logic NOTs in X's row: X' into columns XS..XS+3
      for (int k = 0; k < B; k++)
        rgate(G_NOT, k, 0, XS + k, line_addr(XROW), TS_ONE, 0);
      // preset Y's upper half to 0 and one column-logic NOT over the upper half
      prog.push_back(i_gate(G_PRESET0, DIR_COL, 0, 0, YROW, bulk_addr(BULK_UPPER), LINK_NONE, TS_ONE, 0));
      prog.push_back(i_gate(G_NOT, DIR_COL, XROW, 0, YROW, bulk_addr(BULK_UPPER), LINK_NONE, TS_ONE, 0));
      // X now in columns XS..XS+3 of Y's row: ripple-carry add in row logic
      rgate(G_PRESET0, 0, 0, ADD_C, line_addr(YROW));
      for (int k = 0; k < B; k++)
        full_add(k, XS + k, ADD_C, SUM + k, (k == B - 1) ? SUM + B : ADD_C, line_addr(YROW));
      run_prog();
      expect_no_err("case study I");
      read_row(0, YROW, d);
      checks++;
      if (field(d, XS, B) != x) begin
        failures++; $display("FAIL X not moved: %0d expected %0d", field(d, XS, B), x);
      end
      checks++;
      if (field(d, SUM, B + 1) != x + y) begin
        failures++; $display("FAIL X+Y = %0d expected %0d", field(d, SUM, B + 1), x + y);
      end
      read_row(0, XROW, d);
      checks++;
      if (field(d, 0, B) != x || field(d, XS, B) != (~x & 15)) begin
        failures++; $display("FAIL X row damaged / X' wrong");
      end
      $display("case study I: %0d + %0d = %0d", x, y, x + y);
    end

    // ---------------- 2. matrix-vector product across four tiles
    begin
      localparam int MC = 0, VC = 32, PC = 8, PP = 16, CY = 20, QC = 36, Q2 = 44, SC = 52;
      int m [2*T][2];
      int v [2];
      logic [T-1:0] d;
      v[0] = $urandom % 16; v[1] = $urandom % 16;
      // V element c into row 0 (upper half) of tile (0, c)
      for (int c = 0; c < 2; c++) begin
        d = '0; d[VC +: B] = B'(v[c]);
        wq_data.push_back(d); wq_tile.push_back(tid(0, c)); wq_row.push_back(0);
        wq_cols.push_back(bulk_addr(BULK_UPPER));
      end
      flush_writes();
      // copy V down every row of tile row 0 with column-logic AND(x, x) copies:
      // even row 0 -> odd rows, then odd row 1 -> even rows
      for (int r = 1; r < int'(T); r++) begin
        int src;
        src = (r % 2) ? 0 : 1;
        prog.push_back(i_gate(G_PRESET1, DIR_COL, 0, 0, r, bulk_addr(BULK_UPPER), LINK_NONE, TS_ONE, tid(0, 0)));
        prog.push_back(i_gate(G_PRESET1, DIR_COL, 0, 0, r, bulk_addr(BULK_UPPER), LINK_NONE, TS_ONE, tid(0, 1)));
        prog.push_back(i_gate(G_AND, DIR_COL, src, src, r, bulk_addr(BULK_UPPER), LINK_NONE, TS_EVEN, 0));
        prog.push_back(i_gate(G_AND, DIR_COL, src, src, r, bulk_addr(BULK_UPPER), LINK_NONE, TS_ODD, 0));
      end
      // south across the tile boundary: row 0 of tile row 0 -> row 1 of tile row 1
      for (int c = 0; c < 2; c++)
        prog.push_back(i_gate(G_PRESET1, DIR_COL, 0, 0, 1, bulk_addr(BULK_UPPER), LINK_NONE, TS_ONE, tid(1, c)));
      prog.push_back(i_gate(G_AND, DIR_COL, 0, 0, 1, bulk_addr(BULK_UPPER), LINK_S, TS_EVEN, 0));
      // copy down in tile row 1 (tile row 0 recomputes the same values)
      for (int r = 0; r < int'(T); r++) begin
        int src;
        if (r == 1) continue;
        // even rows from row 1 (odd, just filled); odd rows from row 0 (even)
        src = (r % 2) ? 0 : 1;
        for (int c = 0; c < 2; c++)
          prog.push_back(i_gate(G_PRESET1, DIR_COL, 0, 0, r, bulk_addr(BULK_UPPER), LINK_NONE, TS_ONE, tid(1, c)));
        prog.push_back(i_gate(G_AND, DIR_COL, src, src, r, bulk_addr(BULK_UPPER), LINK_NONE, TS_ONE, tid(1, 0)));
        prog.push_back(i_gate(G_AND, DIR_COL, src, src, r, bulk_addr(BULK_UPPER), LINK_NONE, TS_ONE, tid(1, 1)));
      end
      run_prog();
      expect_no_err("vector broadcast");
      // matrix: column c of M into tile column c, lower half of the row
      for (int i = 0; i < 2 * int'(T); i++)
        for (int c = 0; c < 2; c++) begin
          m[i][c] = $urandom % 16;
          d = '0; d[MC +: B] = B'(m[i][c]);
          wq_data.push_back(d); wq_tile.push_back(tid(i / T, c)); wq_row.push_back(i % T);
          wq_cols.push_back(bulk_addr(BULK_LOWER));
        end
      flush_writes();
      // multiply M (cols MC..) by V (cols VC..) in every row of every tile
      for (int k = 0; k < 2 * B; k++) rgate(G_PRESET0, 0, 0, PC + k);
      for (int i = 0; i < B; i++) begin
        for (int j = 0; j < B; j++) rgate(G_AND, MC + j, VC + i, PP + j);
        rgate(G_PRESET0, 0, 0, CY);
        for (int j = 0; j < B; j++) begin
          full_add(PC + i + j, PP + j, CY, 28, 29);
          rcopy(28, PC + i + j);
          rcopy(29, CY);
        end
        rcopy(CY, PC + i + B);
      end
      run_prog();
      expect_no_err("multiplication");
      // products of tile column 1 -> tile column 0 through the row logic lines
      for (int k = 0; k < 2 * B; k++) begin
        prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, QC + k, bulk_addr(BULK_ALL), LINK_NONE, TS_EVEN, 0));
        prog.push_back(i_gate(G_NOT, DIR_ROW, PC + k, 0, QC + k, bulk_addr(BULK_ALL), LINK_W, TS_ODD, 0));
        rgate(G_NOT, QC + k, 0, Q2 + k, bulk_addr(BULK_ALL), TS_EVEN, 0);
      end
      // sum of the two products in tile column 0
      rgate(G_PRESET0, 0, 0, CY, bulk_addr(BULK_ALL), TS_EVEN, 0);
      for (int k = 0; k < 2 * B; k++) begin
        full_add(PC + k, Q2 + k, CY, SC + k, 29);
        rcopy(29, CY);
      end
      rcopy(CY, SC + 2 * B);
      run_prog();
      expect_no_err("reduction");
      // read back and compare
      for (int i = 0; i < 2 * int'(T); i++) begin
        int got, want;
        read_row(tid(i / T, 0), i % T, d);
        got  = field(d, SC, 2 * B + 1);
        want = m[i][0] * v[0] + m[i][1] * v[1];
        checks++;
        if (got != want) begin
          failures++;
          if (failures < 10) $display("FAIL y[%0d] = %0d expected %0d", i, got, want);
        end
      end
      $display("case study II: %0d output elements checked", 2 * T);
    end

    // ---------------- 3. illegal operation: column logic with mixed-parity inputs
    prog.push_back(i_gate(G_NAND, DIR_COL, 2, 3, 5, bulk_addr(BULK_ALL), LINK_NONE, TS_ALL, 0));
    run_prog();
    checks++;
    if (!err) begin failures++; $display("FAIL parity violation not reported"); end

    $display("row logic %0d, column logic %0d, E/W links %0d, N/S links %0d",
             n_row_logic, n_col_logic, n_link_ew, n_link_ns);
    $display("bulk all %0d, bulk half %0d, tile one/all/even/odd %0d/%0d/%0d/%0d",
             n_bulk_all, n_bulk_half, n_ts_one, n_ts_all, n_ts_even, n_ts_odd);
    $display("writes %0d, reads %0d, errors flagged %0d", n_write, n_read, n_err);
    begin
      int cnt [13];
      cnt = '{n_row_logic, n_col_logic, n_link_ew, n_link_ns, n_bulk_all, n_bulk_half,
              n_ts_one, n_ts_all, n_ts_even, n_ts_odd, n_write, n_read, n_err};
      for (int k = 0; k < 13; k++) begin
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
