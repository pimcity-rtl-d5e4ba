// tb_pimcity_mvm: the evaluated workload at reduced size. Ten matrix-vector
// products y = M v with 32-bit fixed-point elements (products and sums kept
// modulo 2^32), computed entirely by in-array gates.
//
// Fabric: 1 x 4 tiles of 512 x 512. Layout per row of tile c (matrix row i in
// array row i): two matrix elements M[i][2c+j] in columns 32j..32j+31 (lower
// half) and the matching vector elements in columns 256+32j.. (upper half). The
// matrix is written once and reused; for each vector:
//   1. the tile's two vector elements are written into row 0 (upper half only)
//      and copied to rows 1..7 by column-logic copies, in all tiles at once;
//   2. every row multiplies and accumulates its two pairs with row logic
//      (AND partial products, 9-NAND full adders), all rows and tiles at once;
//   3. partial sums are reduced across tiles in log2(4) = 2 steps through the
//      east-west row logic lines: 1 -> 0 and 3 -> 2 together, then 2 -> 0 in two
//      hops through tile 1 (inter-tile gates only reach a neighbour);
//   4. the 8 results are read from tile 0 and compared with integer arithmetic.
// Every program chunk's cycle count is checked against the controller formula.
module tb_pimcity_mvm;
  import pimcity_pkg::*;
  import tb_pim_asm::*;

  localparam int unsigned T    = 512;
  localparam int unsigned GC   = 4;
  localparam int unsigned IMEM = 1024;
  localparam int unsigned DBUF = 16;
  localparam int W   = 32;            // element precision
  localparam int N   = 8;             // matrix is N x N
  localparam int PPT = 2;             // pairs per tile row
  localparam int NV  = 10;            // vectors

  // column map
  localparam int MC = 0, VC = 256, PROD = 64, PP = 96, ACC = 128, CY = 160;
  localparam int N1 = 161, N2 = 162, N3 = 163, S1 = 164, N5 = 165, N6 = 166, N7 = 167;
  localparam int FS = 168, FCO = 169, XF = 320, XF2 = 352;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we;
  logic [$clog2(IMEM)-1:0] prog_addr;
  instr_t prog_instr;
  logic dbuf_we;
  logic [$clog2(DBUF)-1:0] dbuf_waddr, dbuf_raddr;
  logic [T-1:0] dbuf_wdata, dbuf_rdata;
  logic start, busy, done, err;
  logic [31:0] instr_count;

  pimcity_top #(.T(T), .GRID_R(1), .GRID_C(GC), .IMEM_DEPTH(IMEM), .DBUF_DEPTH(DBUF)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint total_cycles = 0, total_instr = 0;
  instr_t prog [$];

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rgate(gate_e g, int a, int b, int c, tsel_e ts = TS_ALL);
    prog.push_back(i_gate(gate_target(g) ? G_PRESET0 : G_PRESET1, DIR_ROW, 0, 0, c,
                          bulk_addr(BULK_ALL), LINK_NONE, ts));
    prog.push_back(i_gate(g, DIR_ROW, a, b, c, bulk_addr(BULK_ALL), LINK_NONE, ts));
  endtask

  task automatic rcopy(int src, int dst);
    rgate(G_AND, src, src, dst);
  endtask

  task automatic full_add(int x, int y, int cin, int s, int co);
    rgate(G_NAND, x, y, N1);
    rgate(G_NAND, x, N1, N2);
    rgate(G_NAND, y, N1, N3);
    rgate(G_NAND, N2, N3, S1);
    rgate(G_NAND, S1, cin, N5);
    rgate(G_NAND, S1, N5, N6);
    rgate(G_NAND, cin, N5, N7);
    rgate(G_NAND, N6, N7, s);
    rgate(G_NAND, N1, N5, co);
  endtask

  // dst[0..W-1] += src[0..W-1] (mod 2^W)
  task automatic add_into(int dst, int src);
    prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, CY, bulk_addr(BULK_ALL)));
    for (int k = 0; k < W; k++) begin
      full_add(dst + k, src + k, CY, FS, FCO);
      rcopy(FS, dst + k);
      if (k < W - 1) rcopy(FCO, CY);
    end
  endtask

  // Move a W-bit field from the tiles picked by ts one tile west (two NOTs).
  task automatic hop_west(int src_col, tsel_e src_ts, tsel_e dst_ts, int dst_col);
    for (int k = 0; k < W; k++) begin
      prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, XF + k, bulk_addr(BULK_ALL), LINK_NONE, dst_ts));
      prog.push_back(i_gate(G_NOT, DIR_ROW, src_col + k, 0, XF + k, bulk_addr(BULK_ALL), LINK_W, src_ts));
      prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, dst_col + k, bulk_addr(BULK_ALL), LINK_NONE, dst_ts));
      prog.push_back(i_gate(G_NOT, DIR_ROW, XF + k, 0, dst_col + k, bulk_addr(BULK_ALL), LINK_NONE, dst_ts));
    end
  endtask

  task automatic run_prog();
    int pos = 0;
    while (pos < prog.size()) begin
      int n, exp_cycles, cycles;
      n = prog.size() - pos;
      if (n > int'(IMEM) - 1) n = IMEM - 1;
      exp_cycles = 1;
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
      if (err) begin failures++; $display("FAIL error flag raised"); end
      total_cycles += cycles;
      total_instr  += n;
      pos += n;
    end
    prog.delete();
  endtask

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

  logic [31:0] m [N][N];
  logic [31:0] v [N];

  initial begin
    logic [T-1:0] d;
    prog_we = 0; dbuf_we = 0; start = 0;
    prog_addr = '0; prog_instr = '0; dbuf_waddr = '0; dbuf_wdata = '0; dbuf_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // matrix, written once
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) m[i][j] = $urandom;
    for (int i = 0; i < N; i++)
      for (int c = 0; c < int'(GC); c++) begin
        d = '0;
        for (int j = 0; j < PPT; j++) d[MC + W*j +: W] = m[i][PPT*c + j];
        wq_data.push_back(d); wq_tile.push_back(c); wq_row.push_back(i);
        wq_cols.push_back(bulk_addr(BULK_LOWER));
      end
    flush_writes();

    for (int vec = 0; vec < NV; vec++) begin
      for (int j = 0; j < N; j++) v[j] = $urandom;
      // 1. vector into row 0 of each tile, then copied down by column logic
      for (int c = 0; c < int'(GC); c++) begin
        d = '0;
        for (int j = 0; j < PPT; j++) d[VC + W*j +: W] = v[PPT*c + j];
        wq_data.push_back(d); wq_tile.push_back(c); wq_row.push_back(0);
        wq_cols.push_back(bulk_addr(BULK_UPPER));
      end
      flush_writes();
      for (int r = 1; r < N; r++) begin
        int src;
        src = (r % 2) ? 0 : 1;
        prog.push_back(i_gate(G_PRESET1, DIR_COL, 0, 0, r, bulk_addr(BULK_UPPER)));
        prog.push_back(i_gate(G_AND, DIR_COL, src, src, r, bulk_addr(BULK_UPPER)));
      end
      // 2. multiply-accumulate in every row
      for (int k = 0; k < W; k++) prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, ACC + k, bulk_addr(BULK_ALL)));
      for (int j = 0; j < PPT; j++) begin
        for (int k = 0; k < W; k++) prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, PROD + k, bulk_addr(BULK_ALL)));
        for (int i = 0; i < W; i++) begin
          for (int k = 0; k < W - i; k++) rgate(G_AND, MC + W*j + k, VC + W*j + i, PP + k);
          prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, CY, bulk_addr(BULK_ALL)));
          for (int k = 0; k < W - i; k++) begin
            full_add(PROD + i + k, PP + k, CY, FS, FCO);
            rcopy(FS, PROD + i + k);
            if (i + k < W - 1) rcopy(FCO, CY);
          end
        end
        add_into(ACC, PROD);
      end
      // 3. reduction across tiles: 1->0 and 3->2, then 2->1->0
      hop_west(ACC, TS_ODD, TS_EVEN, XF2);
      add_into(ACC, XF2);
      for (int k = 0; k < W; k++) begin
        // tile 2 -> tile 1 (sources: even tiles; tile 0 has no west neighbour)
        prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, XF + k, bulk_addr(BULK_ALL), LINK_NONE, TS_ODD));
        prog.push_back(i_gate(G_NOT, DIR_ROW, ACC + k, 0, XF + k, bulk_addr(BULK_ALL), LINK_W, TS_EVEN));
        // tile 1 -> tile 0
        prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, XF2 + k, bulk_addr(BULK_ALL), LINK_NONE, TS_EVEN));
        prog.push_back(i_gate(G_NOT, DIR_ROW, XF + k, 0, XF2 + k, bulk_addr(BULK_ALL), LINK_W, TS_ODD));
      end
      add_into(ACC, XF2);
      run_prog();
      // 4. read out
      for (int i = 0; i < N; i++) prog.push_back(i_read(0, i, i));
      run_prog();
      for (int i = 0; i < N; i++) begin
        logic [31:0] want, got;
        want = '0;
        for (int j = 0; j < N; j++) want += m[i][j] * v[j];
        @(negedge clk); dbuf_raddr = i[$clog2(DBUF)-1:0];
        #1 got = dbuf_rdata[ACC +: W];
        checks++;
        if (got !== want) begin
          failures++;
          if (failures < 10) $display("FAIL vector %0d y[%0d] = %h expected %h", vec, i, got, want);
        end
      end
      $display("vector %0d done: %0d instructions, %0d cycles so far", vec, total_instr, total_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
