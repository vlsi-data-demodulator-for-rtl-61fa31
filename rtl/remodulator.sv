// Remodulation branch and phase detector of the ADPLL demodulator.
//
// Four one-bit operations:
//   u_d = u_i xor out_i        demodulating XOR (the data, before filtering)
//   u_s = u_d sampled when Out_Q rises (sample-and-hold flip-flop)
//   u_2 = u_s xor out_q        remodulating XOR
//   cb  = u_i xor u_2          XOR phase detector, the C/B count command
// Sampling u_d at the Out_Q edges takes it a quarter cycle away from the
// jittery edges of the input. u_s follows the data, so u_2 carries the same
// 180-degree phase reversals as the input and cb, the loop's error signal,
// does not see the modulation. The structure follows the document; q_rise is
// the Out_Q clock expressed as an enable of the single system clock.
module remodulator (
  input  logic clk,
  input  logic rst_n,
  input  logic u_i,
  input  logic out_i,
  input  logic out_q,
  input  logic q_rise,
  output logic u_d,
  output logic u_s,
  output logic cb
);

  logic u_2;

  assign u_d = u_i ^ out_i;

  always_ff @(posedge clk) begin
    if (!rst_n)      u_s <= 1'b0;
    else if (q_rise) u_s <= u_d;
  end

  assign u_2 = u_s ^ out_q;
  assign cb  = u_i ^ u_2;

endmodule
