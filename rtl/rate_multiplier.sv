// Rate multiplier: accumulating digitally controlled oscillator.
//
// On every f_c tick the accumulator adds P modulo Q. A tick on which the
// accumulator wraps is flagged by rm_pulse (the add/delete unit's clock,
// combinational, high only in that en cycle), so the pulse rate
// is P/Q * f_c. An accumulating rate multiplier spreads its pulses as evenly
// as the ratio allows, which keeps its phase jitter low. Q = 1024 follows the
// document.
module rate_multiplier #(
  parameter int unsigned Q  = mls_pkg::ADPLL_Q,
  parameter int unsigned PW = mls_pkg::PW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [PW-1:0] p,
  output logic          rm_pulse
);

  localparam int unsigned AW = $clog2(Q) + 2;
  logic [AW-1:0] acc, sum;

  assign sum = acc + AW'(p);

  assign rm_pulse = en && (sum >= AW'(Q));

  always_ff @(posedge clk) begin
    if (!rst_n)        acc <= '0;
    else if (rm_pulse) acc <= sum - AW'(Q);
    else if (en)       acc <= sum;
  end

endmodule
