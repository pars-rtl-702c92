// trim_classifier: chooses the default state of every switching element.
//
// Process and thermal variations shift each microring's resonance, so the
// trimming power needed to bring an element back to its Bar state (P_TB) and
// to its Cross state (P_TC) differ from element to element. This block sets
// the element's default-state bit d_s to Cross (1) when the displaced
// resonance is closer to the Cross operating point, i.e. P_TC < P_TB, and to
// Bar (0) otherwise; a tie keeps the as-designed Bar default. The rule and
// the encoding follow the PARS algorithm; the equal-power tie rule and the
// representation of the powers as TW-bit unsigned codes are this design's
// choices.
//
// Interface: p_tb[s], p_tc[s] are the trimming-power codes of element s;
// d[s] is its default state. Purely combinational, no clock.
module trim_classifier #(
  parameter int S  = 20,  // number of switching elements
  parameter int TW = 8    // width of a trimming-power code
) (
  input  logic [S-1:0][TW-1:0] p_tb,
  input  logic [S-1:0][TW-1:0] p_tc,
  output logic [S-1:0]         d
);

  always_comb begin
    for (int s = 0; s < S; s++) begin
      d[s] = (p_tc[s] < p_tb[s]) ? pars_pkg::SW_CROSS : pars_pkg::SW_BAR;
    end
  end

endmodule
