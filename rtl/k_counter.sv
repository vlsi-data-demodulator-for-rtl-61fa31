// K-counter: loop filter of the ADPLL.
//
// Two divide-by-K counters are clocked at f_c (en ticks). The carry counter
// advances while the phase detector output cb is 0, the borrow counter while
// cb is 1. A counter that completes K counts wraps to zero and emits a
// one-cycle carry (or borrow) pulse. The pulse rate is thus set by the duty
// cycle of cb, averaged over K clocks. K is K_ACQ (8, wide loop for
// acquisition) when track is 0 and K_TRACK (64, narrow loop) when track is 1;
// both values follow the document. Changing K leaves the counts in place; a
// count already at or above the new K wraps on its next step.
module k_counter #(
  parameter int unsigned K_ACQ   = 8,
  parameter int unsigned K_TRACK = 64,
  parameter int unsigned KW      = $clog2(K_TRACK > K_ACQ ? K_TRACK : K_ACQ)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic track,
  input  logic cb,
  output logic carry,
  output logic borrow
);

  logic [KW-1:0] cnt_c, cnt_b;
  logic [KW-1:0] k_last;

  assign k_last = track ? KW'(K_TRACK - 1) : KW'(K_ACQ - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_c <= '0; cnt_b <= '0; carry <= 1'b0; borrow <= 1'b0;
    end else begin
      carry  <= 1'b0;
      borrow <= 1'b0;
      if (en) begin
        if (!cb) begin
          if (cnt_c >= k_last) begin cnt_c <= '0; carry <= 1'b1; end
          else cnt_c <= cnt_c + 1'b1;
        end else begin
          if (cnt_b >= k_last) begin cnt_b <= '0; borrow <= 1'b1; end
          else cnt_b <= cnt_b + 1'b1;
        end
      end
    end
  end

endmodule
