// tb_ll_switch: self-checking test of the inter-tile logic-line switches.
// Random line facts on both sides, every enable combination; the merged facts are
// compared with the AND/OR of the closed sides (identity for open ones).
module tb_ll_switch;
  localparam int unsigned T = 32;
  logic         en_a, en_b;
  logic [T-1:0] a_all, a_any, b_all, b_any, all_o, any_o;
  logic [T-1:0] e_all, e_any;
  int checks = 0, failures = 0;

  ll_switch #(.T(T)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      en_a  = i[0];
      en_b  = i[1];
      a_all = {$urandom, $urandom};
      a_any = {$urandom, $urandom};
      b_all = {$urandom, $urandom};
      b_any = {$urandom, $urandom};
      #1;
      e_all = '1; e_any = '0;
      if (en_a) begin e_all &= a_all; e_any |= a_any; end
      if (en_b) begin e_all &= b_all; e_any |= b_any; end
      checks++;
      if (all_o !== e_all || any_o !== e_any) begin
        failures++;
        $display("FAIL en=%b%b all=%h/%h any=%h/%h", en_a, en_b, all_o, e_all, any_o, e_any);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
