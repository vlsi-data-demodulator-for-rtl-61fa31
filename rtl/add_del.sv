// Add/delete unit: proportional path of the second-order ADPLL.
//
// Normally ID_out toggles on every rate-multiplier pulse, so ID_out runs at
// half the rate-multiplier frequency; each toggle is reported as a one-cycle
// id_step pulse. A carry pulse inserts one extra toggle (advances ID_out by
// half a cycle), made in the next f_c slot that has no rate-multiplier pulse;
// a borrow pulse swallows the next rate-multiplier pulse (retards ID_out by
// half a cycle). Requests not yet carried out are kept as a signed count
// (-REQ_MAX..REQ_MAX), so an insert and a delete cancel and no request is
// lost while the unit waits for a free slot, unless more than REQ_MAX pile
// up. Free slots occur at the rate (Q - P)/Q * f_c, at least every 25 f_c
// ticks for P <= 983, while the K-counter can issue at most one request per K
// ticks, so only the wide acquisition loop (K = 8) near the top of the range
// can saturate the count.
// The half-cycle step follows the loop model's 1/2 gain of the unit; the
// request counter is this design's way of doing it on a single clock.
module add_del #(
  parameter int REQ_MAX = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic rm_pulse,
  input  logic carry,
  input  logic borrow,
  output logic id_step,
  output logic id_out
);

  localparam int RW = $clog2(REQ_MAX + 1) + 1;
  logic signed [RW-1:0] req, req_in, req_nxt;
  logic                 step_nxt;

  always_comb begin
    // new request from the loop filter
    req_in = req;
    if (carry && !borrow && req < RW'(REQ_MAX))        req_in = req + RW'(1);
    else if (borrow && !carry && req > -RW'(REQ_MAX))  req_in = req - RW'(1);
    // act in the f_c slot
    req_nxt  = req_in;
    step_nxt = 1'b0;
    if (en) begin
      if (rm_pulse) begin
        if (req_in < 0) req_nxt = req_in + RW'(1);   // delete this pulse
        else            step_nxt = 1'b1;
      end else if (req_in > 0) begin               // add a pulse
        req_nxt  = req_in - RW'(1);
        step_nxt = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req <= '0; id_step <= 1'b0; id_out <= 1'b0;
    end else begin
      req     <= req_nxt;
      id_step <= step_nxt;
      if (step_nxt) id_out <= ~id_out;
    end
  end

endmodule
