// tb_pim_controller: self-checking test of the controller.
// Loads a random program (gates of every kind in both directions, writes, reads,
// NOPs, then HALT), runs it against a stand-in fabric that returns a known row
// for every read, and compares every broadcast micro-operation with the expected
// expansion: k input latches, one output latch, one fire (k+2 cycles per gate),
// 2 cycles per WRITE, 3 per READ, 1 per NOP. Also checks the total cycle count,
// the row buffer round trip, the retired-instruction count and the sticky error.
module tb_pim_controller;
  import pimcity_pkg::*;
  import tb_pim_asm::*;
  localparam int unsigned T = 16;
  localparam int unsigned IMEM_DEPTH = 64;
  localparam int unsigned DBUF_DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we;
  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr;
  instr_t prog_instr;
  logic dbuf_we;
  logic [$clog2(DBUF_DEPTH)-1:0] dbuf_waddr, dbuf_raddr;
  logic [T-1:0] dbuf_wdata, dbuf_rdata;
  logic start, busy, done, err;
  logic [31:0] instr_count;
  uop_t uop;
  logic [T-1:0] wdata, rdata;
  logic fabric_err;

  pim_controller #(.T(T), .IMEM_DEPTH(IMEM_DEPTH), .DBUF_DEPTH(DBUF_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  instr_t prog [$];
  uop_t   exp_q [$];
  logic [T-1:0] exp_wdata_q [$];
  logic [T-1:0] buf_model [DBUF_DEPTH];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stand-in fabric: a read returns a row derived from the address latched.
  line_addr_t last_row;
  always_ff @(posedge clk) begin
    if (uop.row_role == LR_IN) last_row <= uop.row_addr;
    if (uop.rd) rdata <= T'(16'hA500) ^ T'(last_row);
  end

  function automatic uop_t base(instr_t i);
    uop_t u;
    u = '0;
    u.gate = i.gate; u.dir = i.dir; u.link = i.link; u.tsel = i.tsel; u.tile = i.tile;
    return u;
  endfunction

  task automatic expand(instr_t i);
    uop_t u;
    int k;
    case (i.op)
      OP_LOGIC: begin
        k = gate_inputs(i.gate);
        for (int s = 0; s <= k + 1; s++) begin
          latch_role_e role;
          line_addr_t ad;
          u = base(i);
          role = LR_NONE; ad = '0;
          if (s < k) begin role = LR_IN; ad = (s == 0) ? i.a : i.b; end
          else if (s == k) begin role = LR_OUT; ad = i.c; end
          else u.fire = 1;
          u.clr = (s == 0);
          if (i.dir == DIR_ROW) begin
            u.col_role = role; u.col_addr = ad;
            if (s == 0) begin u.row_role = LR_PAR; u.row_addr = i.par; end
          end else begin
            u.row_role = role; u.row_addr = ad;
            if (s == 0) begin u.col_role = LR_PAR; u.col_addr = i.par; end
          end
          exp_q.push_back(u); exp_wdata_q.push_back('x);
        end
      end
      OP_WRITE: begin
        u = base(i); u.clr = 1; u.row_role = LR_OUT; u.row_addr = i.c;
        u.col_role = LR_PAR; u.col_addr = i.par;
        exp_q.push_back(u); exp_wdata_q.push_back('x);
        u = base(i); u.wr = 1;
        exp_q.push_back(u); exp_wdata_q.push_back(buf_model[i.buf_idx[1:0]]);
      end
      OP_READ: begin
        u = base(i); u.clr = 1; u.row_role = LR_IN; u.row_addr = i.a;
        u.col_role = LR_PAR; u.col_addr = i.par;
        exp_q.push_back(u); exp_wdata_q.push_back('x);
        u = base(i); u.rd = 1;
        exp_q.push_back(u); exp_wdata_q.push_back('x);
        u = base(i);
        exp_q.push_back(u); exp_wdata_q.push_back('x);
        buf_model[i.buf_idx[1:0]] = T'(16'hA500) ^ T'(i.a);
      end
      default: begin
        u = base(i);
        exp_q.push_back(u); exp_wdata_q.push_back('x);
      end
    endcase
  endtask

  initial begin
    int cycles, n_instr;
    prog_we = 0; dbuf_we = 0; start = 0; fabric_err = 0;
    prog_addr = '0; prog_instr = '0; dbuf_waddr = '0; dbuf_wdata = '0; dbuf_raddr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // row buffer contents
    for (int b = 0; b < DBUF_DEPTH; b++) begin
      buf_model[b] = T'($urandom);
      @(negedge clk); dbuf_we = 1; dbuf_waddr = b[1:0]; dbuf_wdata = buf_model[b];
    end
    @(negedge clk); dbuf_we = 0;
    // random program
    for (int n = 0; n < 50; n++) begin
      instr_t i;
      i = '0;
      case ($urandom % 6)
        0, 1, 2: i.op = OP_LOGIC;
        3: i.op = OP_WRITE;
        4: i.op = OP_READ;
        default: i.op = OP_NOP;
      endcase
      i.gate = gate_e'($urandom % 7);
      i.dir  = dir_e'($urandom % 2);
      i.link = link_e'($urandom % 5);
      i.tsel = tsel_e'($urandom % 4);
      i.tile = TILE_IDX_W'($urandom % 9);
      i.a = line_addr($urandom % T); i.b = line_addr($urandom % T);
      i.c = line_addr($urandom % T); i.par = bulk_addr(bulk_e'($urandom % 3));
      i.buf_idx = DBUF_IDX_W'($urandom % DBUF_DEPTH);
      prog.push_back(i);
    end
    begin
      instr_t h;
      h = '0; h.op = OP_HALT;
      prog.push_back(h);
    end
    foreach (prog[n]) begin
      @(negedge clk); prog_we = 1; prog_addr = n[5:0]; prog_instr = prog[n];
    end
    @(negedge clk); prog_we = 0;
    n_instr = prog.size() - 1;
    for (int n = 0; n < n_instr; n++) expand(prog[n]);

    // run
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin
      if (busy && exp_q.size() > 0) begin
        uop_t e;
        logic [T-1:0] ew;
        e = exp_q.pop_front();
        ew = exp_wdata_q.pop_front();
        checks++;
        if (uop !== e) begin
          failures++;
          $display("FAIL cycle %0d: uop %h expected %h", cycles, uop, e);
        end
        if (e.wr) begin
          checks++;
          if (wdata !== ew) begin failures++; $display("FAIL write data %h expected %h", wdata, ew); end
        end
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d uops never issued", exp_q.size()); end
    begin
      int exp_cycles = 0;
      foreach (prog[n]) begin
        case (prog[n].op)
          OP_LOGIC: exp_cycles += gate_inputs(prog[n].gate) + 2;
          OP_WRITE: exp_cycles += 2;
          OP_READ:  exp_cycles += 3;
          OP_HALT:  exp_cycles += 1;
          default:  exp_cycles += 1;
        endcase
      end
      // done is registered: it rises the cycle after HALT
      exp_cycles += 1;
      checks++;
      if (cycles != exp_cycles) begin
        failures++; $display("FAIL program took %0d cycles, expected %0d", cycles, exp_cycles);
      end
      $display("program of %0d instructions: %0d cycles", n_instr, cycles);
    end
    checks++;
    if (instr_count != 32'(n_instr)) begin
      failures++; $display("FAIL instr_count %0d expected %0d", instr_count, n_instr);
    end
    checks++;
    if (err) begin failures++; $display("FAIL err set without a fabric error"); end
    for (int b = 0; b < DBUF_DEPTH; b++) begin
      @(negedge clk); dbuf_raddr = b[1:0];
      #1;
      checks++;
      if (dbuf_rdata !== buf_model[b]) begin
        failures++; $display("FAIL buffer %0d = %h expected %h", b, dbuf_rdata, buf_model[b]);
      end
    end
    // sticky error: raise fabric_err for one cycle during a second run
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; fabric_err = 1;
    @(negedge clk); fabric_err = 0;
    while (!done) @(negedge clk);
    checks++;
    if (!err) begin failures++; $display("FAIL fabric error not kept"); end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (err) begin failures++; $display("FAIL error not cleared by start"); end
    while (!done) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
