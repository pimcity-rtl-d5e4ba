// line_decoder: row or column decoder of a PimCity tile, with one latch per line.
//
// A plain decoder turns an address into one active word or column line. To
// activate several lines for one in-array gate, each line has latches and the
// addresses are supplied one per cycle: the two inputs and the output of a gate
// take three decoder cycles. Reserved bulk addresses activate many lines at once
// (all lines, or the first or second half), which selects the lines that compute
// in parallel. Both mechanisms follow the document.
//
// Each line keeps three latches, one per role (input, output, parallel), because
// the array has to drive input and output cells differently; the role field of the
// micro-operation says which latch takes the address. That split, the encoding of
// bulk codes and the clear-then-latch behaviour are this design's choices.
//
// Timing: clr and a latch request in the same cycle clear every latch and then
// set the new line(s); results are visible the cycle after the clock edge. An
// out-of-range single address latches nothing. Reset clears all latches.
module line_decoder
  import pimcity_pkg::*;
#(
  parameter int unsigned T = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  latch_role_e  role,
  input  line_addr_t   addr,
  output logic [T-1:0] in_act,
  output logic [T-1:0] out_act,
  output logic [T-1:0] par_act
);

  logic [T-1:0] dec;

  // Address decode: single line or bulk group.
  always_comb begin
    dec = '0;
    if (addr[LINE_AW-1]) begin
      for (int unsigned i = 0; i < T; i++) begin
        case (bulk_e'(addr[1:0]))
          BULK_ALL:   dec[i] = 1'b1;
          BULK_LOWER: dec[i] = (i < T / 2);
          BULK_UPPER: dec[i] = (i >= T / 2);
          default:    dec[i] = 1'b0;
        endcase
      end
    end else if (int'(addr[LINE_AW-2:0]) < int'(T)) begin
      dec[addr[LINE_AW-2:0]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_act  <= '0;
      out_act <= '0;
      par_act <= '0;
    end else begin
      in_act  <= (clr ? '0 : in_act)  | ((role == LR_IN)  ? dec : '0);
      out_act <= (clr ? '0 : out_act) | ((role == LR_OUT) ? dec : '0);
      par_act <= (clr ? '0 : par_act) | ((role == LR_PAR) ? dec : '0);
    end
  end

endmodule
