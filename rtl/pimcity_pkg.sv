// pimcity_pkg: types and constants shared by the PimCity compute-in-memory fabric.
//
// PimCity is a grid of tiles. Each tile is a square array of MTJ cells that can
// compute Boolean gates inside the array either along its rows (row logic: the
// operands sit in different columns of one row, every activated row computes in
// parallel) or along its columns (column logic: the operands sit in different rows
// of one column, every activated column computes in parallel). One controller
// broadcasts instructions to all tiles.
//
// This package holds the instruction word the controller executes, the
// micro-operation it broadcasts to the tiles each cycle, the decoder address
// encoding (a single line or a reserved bulk address) and the threshold form of
// each gate. The gate set (NOT, NAND, AND, NOR, OR) and the extra row/column bit
// in the instruction follow the document; field widths, the bulk codes beyond
// "all lines" and "first/second half", the link and tile-select fields are this
// design's own choices.
package pimcity_pkg;

  // Largest tile edge the address fields can name (the document's largest tile).
  localparam int unsigned T_MAX      = 1024;
  // Decoder address: MSB clear = single line index, MSB set = bulk code.
  localparam int unsigned LINE_AW    = $clog2(T_MAX) + 1;
  // Tile index for single-tile selection (covers the largest grid evaluated, 87392 tiles).
  localparam int unsigned TILE_IDX_W = 17;
  // Index into the controller's row buffer used by WRITE and READ.
  localparam int unsigned DBUF_IDX_W = 8;

  typedef logic [LINE_AW-1:0] line_addr_t;

  // Reserved bulk addresses.
  typedef enum logic [1:0] {
    BULK_ALL   = 2'd0,   // every line of the array
    BULK_LOWER = 2'd1,   // lines 0 .. T/2-1
    BULK_UPPER = 2'd2    // lines T/2 .. T-1
  } bulk_e;

  function automatic line_addr_t bulk_addr(bulk_e code);
    line_addr_t a;
    a = '0;
    a[LINE_AW-1] = 1'b1;
    a[1:0] = code;
    return a;
  endfunction

  typedef enum logic [2:0] {
    OP_NOP   = 3'd0,
    OP_LOGIC = 3'd1,   // in-array gate (row or column logic, optionally across a tile link)
    OP_WRITE = 3'd2,   // write one row of the selected tile(s) from the row buffer
    OP_READ  = 3'd3,   // read one row of the selected tile into the row buffer
    OP_HALT  = 3'd4
  } opcode_e;

  // Gates. PRESET0/PRESET1 write a constant into the output cells (the preset step
  // every threshold gate needs before it is evaluated).
  typedef enum logic [2:0] {
    G_NOT     = 3'd0,
    G_NAND    = 3'd1,
    G_AND     = 3'd2,
    G_NOR     = 3'd3,
    G_OR      = 3'd4,
    G_PRESET0 = 3'd5,
    G_PRESET1 = 3'd6
  } gate_e;

  // DIR_ROW: row logic (operands in columns, rows are the parallel dimension).
  // DIR_COL: column logic (operands in rows, columns are the parallel dimension).
  typedef enum logic {
    DIR_ROW = 1'b0,
    DIR_COL = 1'b1
  } dir_e;

  // Inter-tile link: direction from the tile holding the inputs to the tile holding
  // the output. Row logic lines run east-west, column logic lines north-south.
  typedef enum logic [2:0] {
    LINK_NONE = 3'd0,
    LINK_N    = 3'd1,
    LINK_S    = 3'd2,
    LINK_E    = 3'd3,
    LINK_W    = 3'd4
  } link_e;

  // Tile selection. EVEN/ODD pick tiles by their coordinate along the link axis
  // (tile column for east-west and no link, tile row for north-south), so that
  // linked pairs never chain into one long logic line.
  typedef enum logic [1:0] {
    TS_ALL  = 2'd0,
    TS_ONE  = 2'd1,
    TS_EVEN = 2'd2,
    TS_ODD  = 2'd3
  } tsel_e;

  typedef struct packed {
    opcode_e                 op;
    gate_e                   gate;
    dir_e                    dir;
    link_e                   link;
    tsel_e                   tsel;
    logic [TILE_IDX_W-1:0]   tile;
    line_addr_t              a;       // first input line (READ: the row read)
    line_addr_t              b;       // second input line
    line_addr_t              c;       // output line (WRITE: the row written)
    line_addr_t              par;     // lines of the parallel dimension (usually bulk)
    logic [DBUF_IDX_W-1:0]   buf_idx; // row buffer entry for WRITE/READ
  } instr_t;

  // Role a decoder latch takes for the address it is given.
  typedef enum logic [1:0] {
    LR_NONE = 2'd0,
    LR_IN   = 2'd1,   // input cells of a gate (or the row read)
    LR_OUT  = 2'd2,   // output cell of a gate (or the row written)
    LR_PAR  = 2'd3    // lines computing in parallel
  } latch_role_e;

  // Micro-operation broadcast to every tile in one cycle.
  typedef struct packed {
    logic                    clr;      // clear all decoder latches before latching
    latch_role_e             row_role;
    line_addr_t              row_addr;
    latch_role_e             col_role;
    line_addr_t              col_addr;
    logic                    fire;     // apply the gate voltage (evaluate the gate)
    logic                    wr;       // write pulse
    logic                    rd;       // sense pulse
    gate_e                   gate;
    dir_e                    dir;
    link_e                   link;
    tsel_e                   tsel;
    logic [TILE_IDX_W-1:0]   tile;
  } uop_t;

  // Number of input cells a gate uses.
  function automatic int unsigned gate_inputs(gate_e g);
    case (g)
      G_NOT:                  return 1;
      G_PRESET0, G_PRESET1:   return 0;
      default:                return 2;
    endcase
  endfunction

  // State the output cell switches to when enough current flows.
  function automatic logic gate_target(gate_e g);
    case (g)
      G_NOT, G_NAND, G_NOR, G_PRESET1: return 1'b1;
      default:                         return 1'b0;
    endcase
  endfunction

  // Switching condition per line, from the AND and the OR of the input cells on
  // the logic line (a low-resistance input, logic 0, raises the current).
  //   NOT/NAND/AND switch unless every input is 1; NOR/OR only if every input is 0.
  function automatic logic gate_switch(gate_e g, logic all_one, logic any_one);
    case (g)
      G_NOT, G_NAND, G_AND:  return ~all_one;
      G_NOR, G_OR:           return ~any_one;
      default:               return 1'b1;
    endcase
  endfunction

endpackage
