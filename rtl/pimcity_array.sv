// pimcity_array: functional model of one PimCity memory array (T x T cells).
//
// Behavioural model of a mixed-signal part. The real array holds one MTJ and two
// access transistors per cell; rows carry WLC, WLR and the row logic line RLL,
// columns carry BLE, BLO and the column logic line CLL. Here the electrical
// behaviour is replaced by its digital effect, and the model is written as
// synthesizable logic so that the fabric can be simulated and synthesized as a
// whole. The line activations that the decoders latch stand in for the word
// lines, and the fire/wr/rd strobes stand in for the bitline voltages.
//
// Modes (from the document): retention (no strobe), read and write of one row,
// column logic and row logic.
//  * Column logic (dir = DIR_COL): inputs are the rows in row_in, the output is the
//    row in row_out, and every column in col_par computes at once. The document
//    requires the inputs on rows of one parity and the output on the other parity
//    (BLE serves even rows, BLO odd rows); a violation raises op_err and the gate
//    is not applied.
//  * Row logic (dir = DIR_ROW): inputs are the columns in col_in, the output is the
//    column in col_out, and every row in row_par computes at once. Even and odd
//    rows may compute together, so there is no parity rule.
// A gate is evaluated in threshold form: the output cell switches to the gate's
// target state when the current is high enough, otherwise it keeps its state, so
// the output must be preset first (PRESET0/PRESET1 gates do that). The current is
// reduced to two facts per logic line: whether all input cells are 1 and whether
// any input cell is 1.
//
// Inter-tile logic: the per-line facts of the local input cells leave on
// rll_*_o / cll_*_o, and the facts of a neighbouring tile whose line is joined to
// this one come in on rll_*_i / cll_*_i (identity values, all-one = 1 and any-one
// = 0, when no link is closed). src_en connects the local input cells to the line,
// dst_en connects the local output cell. The reduction to AND/OR facts and this
// port split are this design's choices.
//
// Timing: gates, writes and reads take effect at the clock edge of the strobe
// cycle; rdata is registered and holds the row (masked by col_par) read in the
// previous strobe. The cells have no reset: MTJs are non-volatile.
module pimcity_array
  import pimcity_pkg::*;
#(
  parameter int unsigned T = 1024
) (
  input  logic         clk,
  // strobes
  input  logic         fire,
  input  dir_e         dir,
  input  gate_e        gate,
  input  logic         src_en,
  input  logic         dst_en,
  input  logic         wr_en,
  input  logic         rd_en,
  // line activation from the decoders
  input  logic [T-1:0] row_in,
  input  logic [T-1:0] row_out,
  input  logic [T-1:0] row_par,
  input  logic [T-1:0] col_in,
  input  logic [T-1:0] col_out,
  input  logic [T-1:0] col_par,
  // data
  input  logic [T-1:0] wdata,
  output logic [T-1:0] rdata,
  // logic lines: local contribution out, neighbour contribution in
  output logic [T-1:0] rll_all_o,
  output logic [T-1:0] rll_any_o,
  output logic [T-1:0] cll_all_o,
  output logic [T-1:0] cll_any_o,
  input  logic [T-1:0] rll_all_i,
  input  logic [T-1:0] rll_any_i,
  input  logic [T-1:0] cll_all_i,
  input  logic [T-1:0] cll_any_i,
  output logic         op_err
);

  logic [T-1:0] mem [T];   // mem[row][column]

  logic [T-1:0] even_mask;
  always_comb
    for (int unsigned i = 0; i < T; i++) even_mask[i] = (i % 2 == 0);

  logic row_fire, col_fire;
  assign row_fire = fire && (dir == DIR_ROW);
  assign col_fire = fire && (dir == DIR_COL);

  // Local contribution of the input cells to each row logic line.
  always_comb begin
    for (int unsigned n = 0; n < T; n++) begin
      rll_all_o[n] = 1'b1;
      rll_any_o[n] = 1'b0;
      if (row_fire && src_en) begin
        rll_all_o[n] = &(mem[n] | ~col_in);
        rll_any_o[n] = |(mem[n] & col_in);
      end
    end
  end

  // Local contribution of the input cells to each column logic line.
  always_comb begin
    cll_all_o = '1;
    cll_any_o = '0;
    if (col_fire && src_en) begin
      for (int unsigned i = 0; i < T; i++) begin
        if (row_in[i]) begin
          cll_all_o = cll_all_o & mem[i];
          cll_any_o = cll_any_o | mem[i];
        end
      end
    end
  end

  // Illegal operations: column-logic parity rule, read of other than one row.
  logic in_even, in_odd, out_even, out_odd, col_par_err, rd_err;
  assign in_even  = |(row_in  &  even_mask);
  assign in_odd   = |(row_in  & ~even_mask);
  assign out_even = |(row_out &  even_mask);
  assign out_odd  = |(row_out & ~even_mask);
  assign col_par_err = col_fire && (gate_inputs(gate) != 0) &&
                       ((in_even && in_odd) || (in_even && out_even) || (in_odd && out_odd));
  assign rd_err = rd_en && ((row_in == '0) || ((row_in & (row_in - 1'b1)) != '0));
  assign op_err = col_par_err || rd_err;

  // Column-logic switching vector (one bit per column).
  logic [T-1:0] col_sw;
  always_comb begin
    logic [T-1:0] all1, any1;
    all1 = cll_all_o & cll_all_i;
    any1 = cll_any_o | cll_any_i;
    for (int unsigned j = 0; j < T; j++)
      col_sw[j] = col_par[j] && gate_switch(gate, all1[j], any1[j]);
  end

  logic tgt;
  assign tgt = gate_target(gate);

  always_ff @(posedge clk) begin
    if (row_fire && dst_en && !op_err) begin
      for (int unsigned n = 0; n < T; n++) begin
        if (row_par[n] &&
            gate_switch(gate, rll_all_o[n] & rll_all_i[n], rll_any_o[n] | rll_any_i[n]))
          mem[n] <= tgt ? (mem[n] | col_out) : (mem[n] & ~col_out);
      end
    end else if (col_fire && dst_en && !op_err) begin
      for (int unsigned i = 0; i < T; i++) begin
        if (row_out[i])
          mem[i] <= tgt ? (mem[i] | col_sw) : (mem[i] & ~col_sw);
      end
    end else if (wr_en) begin
      for (int unsigned i = 0; i < T; i++) begin
        if (row_out[i])
          mem[i] <= (mem[i] & ~col_par) | (wdata & col_par);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en && !rd_err) begin
      logic [T-1:0] r;
      r = '0;
      for (int unsigned i = 0; i < T; i++)
        if (row_in[i]) r = r | mem[i];
      rdata <= r & col_par;
    end
  end

endmodule
