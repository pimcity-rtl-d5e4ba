// tb_line_decoder: self-checking test of the latched row/column decoder.
// Drives single and bulk addresses into each latch role, one per cycle, and
// compares the latch vectors with a model kept in the testbench.
module tb_line_decoder;
  import pimcity_pkg::*;
  import tb_pim_asm::*;
  localparam int unsigned T = 16;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         clr;
  latch_role_e  role;
  line_addr_t   addr;
  logic [T-1:0] in_act, out_act, par_act;
  logic [T-1:0] m_in, m_out, m_par;
  int checks = 0, failures = 0;

  line_decoder #(.T(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [T-1:0] expect_dec(line_addr_t a);
    logic [T-1:0] v;
    v = '0;
    if (a[LINE_AW-1]) begin
      case (a[1:0])
        2'd0: v = '1;
        2'd1: v = {{(T/2){1'b0}}, {(T/2){1'b1}}};
        2'd2: v = {{(T/2){1'b1}}, {(T/2){1'b0}}};
        default: v = '0;
      endcase
    end else if (a < T) begin
      v[a] = 1'b1;
    end
    return v;
  endfunction

  task automatic step(logic c, latch_role_e r, line_addr_t a);
    clr = c; role = r; addr = a;
    @(posedge clk); #1;
    if (c) begin m_in = '0; m_out = '0; m_par = '0; end
    case (r)
      LR_IN:  m_in  |= expect_dec(a);
      LR_OUT: m_out |= expect_dec(a);
      LR_PAR: m_par |= expect_dec(a);
      default: ;
    endcase
    checks++;
    if (in_act !== m_in || out_act !== m_out || par_act !== m_par) begin
      failures++;
      $display("FAIL role=%0d addr=%h: in=%h/%h out=%h/%h par=%h/%h", r, a,
               in_act, m_in, out_act, m_out, par_act, m_par);
    end
  endtask

  initial begin
    clr = 1'b0; role = LR_NONE; addr = '0;
    m_in = '0; m_out = '0; m_par = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (in_act != '0 || out_act != '0 || par_act != '0) begin
      failures++; $display("FAIL latches not cleared by reset");
    end
    // NAND-style activation: inputs 2 and 4, output 7, all columns in parallel
    step(1'b1, LR_IN, line_addr(2));
    step(1'b0, LR_IN, line_addr(4));
    step(1'b0, LR_OUT, line_addr(7));
    step(1'b0, LR_PAR, bulk_addr(BULK_ALL));
    step(1'b0, LR_NONE, line_addr(9));          // no latch request: holds
    // clear and re-latch with halves
    step(1'b1, LR_PAR, bulk_addr(BULK_LOWER));
    step(1'b0, LR_OUT, bulk_addr(BULK_UPPER));
    step(1'b0, LR_IN, line_addr(T - 1));
    step(1'b0, LR_IN, line_addr(T + 3));        // out of range: nothing
    // random sequence
    for (int i = 0; i < 200; i++) begin
      line_addr_t a;
      a = ($urandom % 4 == 0) ? bulk_addr(bulk_e'($urandom % 3)) : line_addr($urandom % T);
      step(($urandom % 5) == 0, latch_role_e'($urandom % 4), a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
