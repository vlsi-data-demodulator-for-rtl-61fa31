// Frequency divider: derives the demodulator's timing from the 68 MHz clock.
//
// Each output is a one-cycle clock-enable tick at the rate named, produced by
// a free-running modulo counter:
//   en_fc  : 17 MHz   (68/4)   ADPLL clock f_c
//   en_mix : 5.23 MHz (68/13)  second mixer input
//   en_4m  : 4 MHz    (68/17)  edge-detector and data-clock counters
//   en_2m  : 2 MHz    (68/34)  integrate-and-dump data filter
//   en_1m  : 1 MHz    (68/68)  lock detector
// The 17, 5.23, 4 and 1 MHz rates and the divide-by-13 follow the document.
// The 2 MHz tick is added because the data filter is specified at 2 MHz.
// Using enables instead of divided clocks is this design's choice; it keeps
// the whole unit synchronous to one clock.
module freq_divider #(
  parameter int unsigned DIV_FC  = 4,
  parameter int unsigned DIV_MIX = 13,
  parameter int unsigned DIV_4M  = 17,
  parameter int unsigned DIV_2M  = 34,
  parameter int unsigned DIV_1M  = 68
) (
  input  logic clk,
  input  logic rst_n,
  output logic en_fc,
  output logic en_mix,
  output logic en_4m,
  output logic en_2m,
  output logic en_1m
);

  logic [$clog2(DIV_FC)-1:0]  c_fc;
  logic [$clog2(DIV_MIX)-1:0] c_mix;
  logic [$clog2(DIV_4M)-1:0]  c_4m;
  logic [$clog2(DIV_2M)-1:0]  c_2m;
  logic [$clog2(DIV_1M)-1:0]  c_1m;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_fc <= '0; c_mix <= '0; c_4m <= '0; c_2m <= '0; c_1m <= '0;
    end else begin
      c_fc  <= (c_fc  == $bits(c_fc)'(DIV_FC-1))  ? '0 : c_fc  + 1'b1;
      c_mix <= (c_mix == $bits(c_mix)'(DIV_MIX-1)) ? '0 : c_mix + 1'b1;
      c_4m  <= (c_4m  == $bits(c_4m)'(DIV_4M-1))  ? '0 : c_4m  + 1'b1;
      c_2m  <= (c_2m  == $bits(c_2m)'(DIV_2M-1))  ? '0 : c_2m  + 1'b1;
      c_1m  <= (c_1m  == $bits(c_1m)'(DIV_1M-1))  ? '0 : c_1m  + 1'b1;
    end
  end

  assign en_fc  = rst_n && (c_fc  == $bits(c_fc)'(DIV_FC-1));
  assign en_mix = rst_n && (c_mix == $bits(c_mix)'(DIV_MIX-1));
  assign en_4m  = rst_n && (c_4m  == $bits(c_4m)'(DIV_4M-1));
  assign en_2m  = rst_n && (c_2m  == $bits(c_2m)'(DIV_2M-1));
  assign en_1m  = rst_n && (c_1m  == $bits(c_1m)'(DIV_1M-1));

endmodule
