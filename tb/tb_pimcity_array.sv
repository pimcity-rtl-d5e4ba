// tb_pimcity_array: self-checking test of the PIM array model.
// Writes random rows and reads them back, then runs random column-logic and
// row-logic gates (preset first, then the gate) on random parallel masks,
// including gates fed from a neighbour's logic-line facts, and checks the whole
// array after each operation against a cell-by-cell reference in the testbench.
// Also checks the column-logic parity rule and the single-row read rule.
module tb_pimcity_array;
  import pimcity_pkg::*;
  localparam int unsigned T = 16;

  logic         clk = 1'b0;
  logic         fire, src_en, dst_en, wr_en, rd_en;
  dir_e         dir;
  gate_e        gate;
  logic [T-1:0] row_in, row_out, row_par, col_in, col_out, col_par;
  logic [T-1:0] wdata, rdata;
  logic [T-1:0] rll_all_o, rll_any_o, cll_all_o, cll_any_o;
  logic [T-1:0] rll_all_i, rll_any_i, cll_all_i, cll_any_i;
  logic         op_err;

  logic [T-1:0] ref_mem [T];
  int checks = 0, failures = 0;
  int n_col_ops = 0, n_row_ops = 0, n_ext_ops = 0;

  pimcity_array #(.T(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    fire = 0; src_en = 0; dst_en = 0; wr_en = 0; rd_en = 0;
    dir = DIR_ROW; gate = G_NOT;
    row_in = '0; row_out = '0; row_par = '0; col_in = '0; col_out = '0; col_par = '0;
    rll_all_i = '1; rll_any_i = '0; cll_all_i = '1; cll_any_i = '0;
  endtask

  // Reference gate: value the output cell takes given its old value and inputs.
  function automatic logic ref_gate(gate_e g, logic old, logic all1, logic any1);
    case (g)
      G_PRESET0: return 1'b0;
      G_PRESET1: return 1'b1;
      G_NOT, G_NAND: return all1 ? old : 1'b1;
      G_AND:         return all1 ? old : 1'b0;
      G_NOR:         return any1 ? old : 1'b1;
      default:       return any1 ? old : 1'b0;   // OR
    endcase
  endfunction

  task automatic write_row(int r, logic [T-1:0] d);
    idle();
    row_out = '0; row_out[r] = 1'b1; col_par = '1; wdata = d; wr_en = 1;
    @(posedge clk); #1;
    idle();
    ref_mem[r] = d;
  endtask

  task automatic check_all(string what);
    for (int r = 0; r < int'(T); r++) begin
      idle();
      row_in[r] = 1'b1; col_par = '1; rd_en = 1;
      @(posedge clk); #1;
      idle();
      checks++;
      if (rdata !== ref_mem[r]) begin
        failures++;
        $display("FAIL %s: row %0d = %h expected %h", what, r, rdata, ref_mem[r]);
      end
    end
  endtask

  // Column logic: inputs rows a,b (b<0: one input), output row c, columns par.
  task automatic col_op(gate_e g, int a, int b, int c, logic [T-1:0] par);
    logic [T-1:0] all1, any1;
    idle();
    dir = DIR_COL; gate = g; fire = 1; src_en = 1; dst_en = 1;
    if (gate_inputs(g) > 0) row_in[a] = 1'b1;
    if (gate_inputs(g) > 1) row_in[b] = 1'b1;
    row_out[c] = 1'b1; col_par = par;
    #1;
    all1 = '1; any1 = '0;
    for (int r = 0; r < int'(T); r++)
      if (row_in[r]) begin all1 &= ref_mem[r]; any1 |= ref_mem[r]; end
    checks++;
    if (gate_inputs(g) > 0 && (cll_all_o !== all1 || cll_any_o !== any1)) begin
      failures++; $display("FAIL column line facts");
    end
    @(posedge clk); #1;
    idle();
    for (int j = 0; j < int'(T); j++)
      if (par[j]) ref_mem[c][j] = ref_gate(g, ref_mem[c][j], all1[j], any1[j]);
    n_col_ops++;
  endtask

  // Row logic: inputs columns a,b, output column c, rows par.
  task automatic row_op(gate_e g, int a, int b, int c, logic [T-1:0] par,
                        logic ext, logic [T-1:0] ext_all, logic [T-1:0] ext_any);
    logic [T-1:0] all1, any1;
    idle();
    dir = DIR_ROW; gate = g; fire = 1; src_en = !ext; dst_en = 1;
    if (gate_inputs(g) > 0) col_in[a] = 1'b1;
    if (gate_inputs(g) > 1) col_in[b] = 1'b1;
    col_out[c] = 1'b1; row_par = par;
    if (ext) begin rll_all_i = ext_all; rll_any_i = ext_any; end
    #1;
    for (int r = 0; r < int'(T); r++) begin
      all1[r] = ext ? ext_all[r] : 1'b1;
      any1[r] = ext ? ext_any[r] : 1'b0;
      if (!ext) for (int j = 0; j < int'(T); j++)
        if (col_in[j]) begin all1[r] &= ref_mem[r][j]; any1[r] |= ref_mem[r][j]; end
    end
    checks++;
    if (!ext && gate_inputs(g) > 0 && (rll_all_o !== all1 || rll_any_o !== any1)) begin
      failures++; $display("FAIL row line facts");
    end
    if (ext && (rll_all_o !== '1 || rll_any_o !== '0)) begin
      failures++; $display("FAIL disconnected inputs drive the row line");
    end
    @(posedge clk); #1;
    idle();
    for (int r = 0; r < int'(T); r++)
      if (par[r]) ref_mem[r][c] = ref_gate(g, ref_mem[r][c], all1[r], any1[r]);
    if (ext) n_ext_ops++; else n_row_ops++;
  endtask

  initial begin
    idle();
    wdata = '0;
    @(posedge clk); #1;
    for (int r = 0; r < int'(T); r++) write_row(r, T'({$urandom, $urandom}));
    check_all("write/read");

    // Directed: NAND truth table along columns 0..3 of rows 0,2 -> 1
    write_row(0, T'(16'b0000_0000_0000_1010));
    write_row(2, T'(16'b0000_0000_0000_1100));
    col_op(G_PRESET0, 0, 0, 1, 16'h000F);
    col_op(G_NAND, 0, 2, 1, 16'h000F);
    checks++;
    if (ref_mem[1][3:0] !== 4'b0111) begin failures++; $display("FAIL reference NAND"); end
    check_all("directed column NAND");

    // Random column logic
    for (int i = 0; i < 60; i++) begin
      gate_e g;
      int a, b, c, p;
      logic [T-1:0] par;
      g = gate_e'($urandom % 5);
      p = $urandom % 2;
      a = 2 * ($urandom % (T/2)) + p;
      b = 2 * ($urandom % (T/2)) + p;
      c = 2 * ($urandom % (T/2)) + (1 - p);
      par = T'($urandom);
      col_op(gate_target(g) ? G_PRESET0 : G_PRESET1, a, b, c, par);
      col_op(g, a, b, c, par);
      check_all("column logic");
    end

    // Random row logic (no parity rule)
    for (int i = 0; i < 60; i++) begin
      gate_e g;
      int a, b, c;
      logic [T-1:0] par;
      g = gate_e'($urandom % 5);
      a = $urandom % T;
      b = $urandom % T;
      do c = $urandom % T; while (c == a || c == b);
      par = T'($urandom);
      row_op(gate_target(g) ? G_PRESET0 : G_PRESET1, a, b, c, par, 1'b0, '1, '0);
      row_op(g, a, b, c, par, 1'b0, '1, '0);
      check_all("row logic");
    end

    // Row logic fed by a neighbour's line (inter-tile destination)
    for (int i = 0; i < 10; i++) begin
      gate_e g;
      logic [T-1:0] ea, eo;
      g = gate_e'($urandom % 5);
      ea = T'($urandom);
      eo = ea | T'($urandom);
      row_op(gate_target(g) ? G_PRESET0 : G_PRESET1, 0, 0, 5, '1, 1'b1, '1, '0);
      row_op(g, 0, 0, 5, '1, 1'b1, ea, eo);
      check_all("row logic from neighbour");
    end

    // Parity violation: inputs rows 0 and 1 (mixed parity) -> error, no change
    idle();
    dir = DIR_COL; gate = G_NAND; fire = 1; src_en = 1; dst_en = 1;
    row_in[0] = 1; row_in[1] = 1; row_out[3] = 1; col_par = '1;
    #1;
    checks++;
    if (!op_err) begin failures++; $display("FAIL mixed-parity inputs not flagged"); end
    @(posedge clk); #1;
    idle();
    // output on the same parity as the inputs
    dir = DIR_COL; gate = G_NOR; fire = 1; src_en = 1; dst_en = 1;
    row_in[2] = 1; row_out[4] = 1; col_par = '1;
    #1;
    checks++;
    if (!op_err) begin failures++; $display("FAIL same-parity output not flagged"); end
    @(posedge clk); #1;
    idle();
    // read of two rows
    rd_en = 1; row_in[2] = 1; row_in[5] = 1; col_par = '1;
    #1;
    checks++;
    if (!op_err) begin failures++; $display("FAIL two-row read not flagged"); end
    @(posedge clk); #1;
    idle();
    check_all("after rejected operations");

    checks++;
    if (n_col_ops == 0 || n_row_ops == 0 || n_ext_ops == 0) begin
      failures++; $display("FAIL some mode never exercised");
    end
    $display("column ops %0d, row ops %0d, neighbour-fed ops %0d", n_col_ops, n_row_ops, n_ext_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
