// pim_controller: the single controller that drives every PimCity tile in lockstep.
//
// The document has one controller broadcast PIM instructions to all tiles; each
// instruction names the gate, the line addresses and one bit choosing row or
// column parallel logic. Decoders take one address per cycle, so this controller
// expands every instruction into a short sequence of micro-operations (uop_t)
// that it broadcasts to all tiles:
//   LOGIC, k-input gate (k = 2 for NAND/AND/NOR/OR, 1 for NOT, 0 for PRESET):
//     k input-latch cycles, one output-latch cycle, one fire cycle (k+2 cycles).
//     The first cycle also clears the latches and latches the parallel lines
//     (instruction field par, normally a bulk address) in the other decoder.
//   WRITE: latch row c and the columns par, then a write strobe with the row
//     buffer entry buf_idx as data (2 cycles).
//   READ: latch row a and the columns par, a sense strobe, then the row is stored
//     into buffer entry buf_idx (3 cycles).
//   NOP: 1 cycle.  HALT: stops and pulses done.
// The instruction memory and the row buffer, which stand between the fabric and
// a host, the cycle counts above and the start/done handshake are this design's
// choices; the document gives no controller internals.
//
// Host side: prog_we writes instruction memory, dbuf_we writes a buffer row and
// dbuf_rdata returns buffer row dbuf_raddr (combinational). start (one cycle,
// while idle) runs from address 0 until HALT; busy is high meanwhile, done pulses
// for one cycle at the end. err is sticky until the next start and reports any
// illegal operation a tile flagged. instr_count counts retired instructions.
module pim_controller
  import pimcity_pkg::*;
#(
  parameter int unsigned T          = 1024,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DBUF_DEPTH = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host: program and row buffer
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
  output logic [31:0]                   instr_count,
  // fabric side
  output uop_t                          uop,
  output logic [T-1:0]                  wdata,
  input  logic [T-1:0]                  rdata,
  input  logic                          fabric_err
);

  localparam int unsigned PCW = $clog2(IMEM_DEPTH);
  localparam int unsigned BW  = $clog2(DBUF_DEPTH);

  instr_t       imem [IMEM_DEPTH];
  logic [T-1:0] dbuf [DBUF_DEPTH];

  logic [PCW-1:0] pc;
  logic [1:0]     step;
  instr_t         ins;
  logic           last;

  assign ins        = imem[pc];
  assign dbuf_rdata = dbuf[dbuf_raddr];
  assign wdata      = dbuf[ins.buf_idx[BW-1:0]];

  // Micro-operation of the current step.
  always_comb begin
    int unsigned k;
    uop          = '0;
    uop.gate     = ins.gate;
    uop.dir      = ins.dir;
    uop.link     = ins.link;
    uop.tsel     = ins.tsel;
    uop.tile     = ins.tile;
    uop.row_role = LR_NONE;
    uop.col_role = LR_NONE;
    last         = 1'b1;
    k            = gate_inputs(ins.gate);
    if (busy) begin
      case (ins.op)
        OP_LOGIC: begin
          latch_role_e role;
          line_addr_t  addr;
          role = LR_NONE;
          addr = '0;
          if (int'(step) < int'(k)) begin
            role = LR_IN;
            addr = (step == 2'd0) ? ins.a : ins.b;
          end else if (int'(step) == int'(k)) begin
            role = LR_OUT;
            addr = ins.c;
          end else begin
            uop.fire = 1'b1;
          end
          uop.clr = (step == 2'd0);
          if (ins.dir == DIR_ROW) begin
            // operands are columns, rows compute in parallel
            uop.col_role = role;
            uop.col_addr = addr;
            if (step == 2'd0) begin
              uop.row_role = LR_PAR;
              uop.row_addr = ins.par;
            end
          end else begin
            uop.row_role = role;
            uop.row_addr = addr;
            if (step == 2'd0) begin
              uop.col_role = LR_PAR;
              uop.col_addr = ins.par;
            end
          end
          last = (int'(step) == int'(k) + 1);
        end
        OP_WRITE: begin
          if (step == 2'd0) begin
            uop.clr      = 1'b1;
            uop.row_role = LR_OUT;
            uop.row_addr = ins.c;
            uop.col_role = LR_PAR;
            uop.col_addr = ins.par;
          end else begin
            uop.wr = 1'b1;
          end
          last = (step == 2'd1);
        end
        OP_READ: begin
          if (step == 2'd0) begin
            uop.clr      = 1'b1;
            uop.row_role = LR_IN;
            uop.row_addr = ins.a;
            uop.col_role = LR_PAR;
            uop.col_addr = ins.par;
          end else if (step == 2'd1) begin
            uop.rd = 1'b1;
          end
          last = (step == 2'd2);
        end
        default: last = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (prog_we) imem[prog_addr] <= prog_instr;
  end

  always_ff @(posedge clk) begin
    if (busy && ins.op == OP_READ && step == 2'd2)
      dbuf[ins.buf_idx[BW-1:0]] <= rdata;
    else if (dbuf_we)
      dbuf[dbuf_waddr] <= dbuf_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      err         <= 1'b0;
      pc          <= '0;
      step        <= '0;
      instr_count <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy        <= 1'b1;
          err         <= 1'b0;
          pc          <= '0;
          step        <= '0;
          instr_count <= '0;
        end
      end else begin
        if (fabric_err) err <= 1'b1;
        if (ins.op == OP_HALT) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (last) begin
          step        <= '0;
          pc          <= pc + 1'b1;
          instr_count <= instr_count + 1;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  // A READ or WRITE must name one row buffer entry that exists.
  // Checked only out of reset, so that state before the first reset is ignored.
  // Sampling rst_n here makes lint report it as used both synchronously and
  // asynchronously; the check drives no logic.
  always_ff @(posedge clk)
    if (rst_n && busy && (ins.op == OP_READ || ins.op == OP_WRITE))
      assert (int'(ins.buf_idx) < int'(DBUF_DEPTH))
        else $error("row buffer index %0d out of range", ins.buf_idx);

endmodule
