// tb_pimcity_full: one complete operation on the fabric at its default size
// (69 tiles of 1024 x 1024 cells in one row of tiles).
//
// Writes random rows into several tiles, then runs one program that uses every
// kind of in-array step on all 69 tiles at once: a column-logic NAND over all
// 1024 columns, a row-logic NOR over all 1024 rows, and an inter-tile copy in
// which every even tile drives a NOT through the east-west logic lines into its
// odd east neighbour. The rows are read back and compared with a reference
// computed in the testbench; the program's cycle count is checked against the
// controller's per-instruction cycle formula.
module tb_pimcity_full;
  import pimcity_pkg::*;
  import tb_pim_asm::*;

  localparam int unsigned T    = 1024;
  localparam int unsigned IMEM = 1024;
  localparam int unsigned DBUF = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we;
  logic [$clog2(IMEM)-1:0] prog_addr;
  instr_t prog_instr;
  logic dbuf_we;
  logic [$clog2(DBUF)-1:0] dbuf_waddr, dbuf_raddr;
  logic [T-1:0] dbuf_wdata, dbuf_rdata;
  logic start, busy, done, err;
  logic [31:0] instr_count;

  pimcity_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  instr_t prog [$];

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Tiles whose rows 0..3 are tracked, and their reference contents.
  localparam int NTR = 6;
  int tiles [NTR] = '{0, 1, 34, 35, 67, 68};
  logic [T-1:0] ref_rows [NTR][4];
  logic         known [NTR];

  task automatic run_prog();
    int exp_cycles, cycles;
    exp_cycles = 1;
    foreach (prog[k]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = k[$clog2(IMEM)-1:0]; prog_instr = prog[k];
      exp_cycles += cycles_of(prog[k]);
    end
    @(negedge clk);
    prog_addr = prog.size(); prog_instr = i_halt();
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != exp_cycles + 1) begin
      failures++; $display("FAIL program took %0d cycles, expected %0d", cycles, exp_cycles + 1);
    end
    checks++;
    if (err) begin failures++; $display("FAIL error flag raised"); end
    prog.delete();
  endtask

  initial begin
    prog_we = 0; dbuf_we = 0; start = 0;
    prog_addr = '0; prog_instr = '0; dbuf_waddr = '0; dbuf_wdata = '0; dbuf_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // write rows 0..3 of tiles 0, 34, 68 and 1, 35 (67 left unwritten)
    foreach (tiles[t]) known[t] = (tiles[t] != 67);
    begin
      int slot = 0;
      foreach (tiles[t]) begin
        if (!known[t]) continue;
        for (int r = 0; r < 4; r++) begin
          logic [T-1:0] d;
          for (int w = 0; w < int'(T) / 32; w++) d[w*32 +: 32] = $urandom;
          ref_rows[t][r] = d;
          @(negedge clk); dbuf_we = 1; dbuf_waddr = slot[3:0]; dbuf_wdata = d;
          prog.push_back(i_write(tiles[t], r, slot, bulk_addr(BULK_ALL)));
          slot++;
          if (slot == int'(DBUF)) begin
            @(negedge clk); dbuf_we = 0;
            run_prog();
            slot = 0;
          end
        end
      end
      @(negedge clk); dbuf_we = 0;
      if (prog.size() > 0) run_prog();
    end

    // the operation
    prog.push_back(i_gate(G_PRESET0, DIR_COL, 0, 0, 1, bulk_addr(BULK_ALL)));
    prog.push_back(i_gate(G_NAND, DIR_COL, 0, 2, 1, bulk_addr(BULK_ALL)));
    prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, 1000, bulk_addr(BULK_ALL)));
    prog.push_back(i_gate(G_NOR, DIR_ROW, 5, 9, 1000, bulk_addr(BULK_ALL)));
    prog.push_back(i_gate(G_PRESET0, DIR_ROW, 0, 0, 1001, bulk_addr(BULK_ALL), LINK_NONE, TS_ODD));
    prog.push_back(i_gate(G_NOT, DIR_ROW, 7, 0, 1001, bulk_addr(BULK_ALL), LINK_E, TS_EVEN));
    run_prog();

    // reference
    foreach (tiles[t]) if (known[t]) ref_rows[t][1] = ~(ref_rows[t][0] & ref_rows[t][2]);
    foreach (tiles[t]) if (known[t])
      for (int r = 0; r < 4; r++) ref_rows[t][r][1000] = ~(ref_rows[t][r][5] | ref_rows[t][r][9]);
    // tile 1 from tile 0, tile 35 from tile 34; tile 68 (even, no east neighbour) untouched
    for (int r = 0; r < 4; r++) begin
      ref_rows[1][r][1001] = ~ref_rows[0][r][7];
      ref_rows[3][r][1001] = ~ref_rows[2][r][7];
    end

    foreach (tiles[t]) begin
      if (!known[t]) continue;
      for (int r = 0; r < 4; r++) begin
        prog.push_back(i_read(tiles[t], r, 0));
        run_prog();
        @(negedge clk); dbuf_raddr = '0;
        #1;
        checks++;
        if (dbuf_rdata !== ref_rows[t][r]) begin
          failures++;
          $display("FAIL tile %0d row %0d differs (bits 0..7 %h/%h, 1000..1001 %b/%b)", tiles[t], r,
                   dbuf_rdata[7:0], ref_rows[t][r][7:0], dbuf_rdata[1001:1000], ref_rows[t][r][1001:1000]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
