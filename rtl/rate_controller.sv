// Rate controller: up/down counter that integrates the loop filter output.
//
// Each carry pulse raises the rate count P by one, each borrow lowers it by
// one; P programs the rate multiplier and so sets the ADPLL frequency
// f = P * f_c / (2 N Q). P is held inside [P_MIN, P_MAX], which keeps the
// ADPLL within 230 kHz +- 25 kHz (205..255 kHz) so that it cannot drift to a
// false lock between packets. Reset loads P_NOM (230 kHz). The three limits
// are computed from the document's frequencies; starting at the nominal
// frequency is this design's choice.
module rate_controller #(
  parameter int unsigned PW    = mls_pkg::PW,
  parameter int unsigned P_NOM = mls_pkg::P_NOM,
  parameter int unsigned P_MIN = mls_pkg::P_MIN,
  parameter int unsigned P_MAX = mls_pkg::P_MAX
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          carry,
  input  logic          borrow,
  output logic [PW-1:0] p,
  output logic          at_limit   // P is at P_MIN or P_MAX
);

  always_ff @(posedge clk) begin
    if (!rst_n) p <= PW'(P_NOM);
    else if (carry && !borrow && p < PW'(P_MAX)) p <= p + 1'b1;
    else if (borrow && !carry && p > PW'(P_MIN)) p <= p - 1'b1;
  end

  assign at_limit = (p == PW'(P_MAX)) || (p == PW'(P_MIN));

endmodule
