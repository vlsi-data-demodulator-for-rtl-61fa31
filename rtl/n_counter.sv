// N-counter: divides ID_out by N to form the in-phase and quadrature outputs.
//
// A counter of 2N states advances on every id_step (every half-cycle of
// ID_out), so its LSB follows ID_out and its top bit is ID_out / N. Out_I is
// the top bit; Out_Q = top bit xor next bit is the same square wave a quarter
// cycle earlier (Out_Q leads Out_I by 90 degrees). q_rise is a one-cycle
// pulse in the cycle Out_Q goes high; it clocks the sample-and-hold of the
// remodulation branch. N = 32 follows the document; the 2N-state phase counter
// and the sign of the quadrature are this design's choice.
module n_counter #(
  parameter int unsigned N = mls_pkg::ADPLL_N
) (
  input  logic clk,
  input  logic rst_n,
  input  logic id_step,
  output logic out_i,
  output logic out_q,
  output logic q_rise
);

  localparam int unsigned W = $clog2(2 * N);
  logic [W-1:0] ph;
  logic         q_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph  <= '0;
      q_d <= 1'b0;
    end else begin
      if (id_step) ph <= ph + 1'b1;
      q_d <= out_q;
    end
  end

  assign out_i  = ph[W-1];
  assign out_q  = ph[W-1] ^ ph[W-2];
  assign q_rise = out_q && !q_d;

endmodule
