// rps_quiet_check: does a receipt fall into the quiet time of its disclosure?
//
// A buffered receipt may only become a delayed disclosure if it is older than
// its direct disclosure by more than kappa - mu (quiet time minus jitter
// margin), so that nobody can learn its fate while it is still in flight.
// Timestamps are 16-bit and wrap, and the pipeline cannot subtract them
// directly, so the controller supplies ts_q = d.ts - (kappa - mu) and a flag
// for the case where that subtraction wrapped (then ts_q > d.ts). The check
// uses only comparisons:
//   no wrap: in quiet time  <=>  ts_q <= r.ts <= d.ts
//   wrap:    in quiet time  <=>  ts_q <= r.ts  or  r.ts <= d.ts
// This is the case split of the design description, expressed as
// comparisons instead of max/min selections.
//
// Interface: r_ts_i, d_ts_i, ts_q_i, overflow_i -> in_quiet_o. Combinational.
module rps_quiet_check
  import rps_pkg::*;
(
  input  ts_t  r_ts_i,
  input  ts_t  d_ts_i,
  input  ts_t  ts_q_i,
  input  logic overflow_i,
  output logic in_quiet_o
);

  logic above_q, below_d;

  always_comb begin
    above_q    = (r_ts_i >= ts_q_i);
    below_d    = (r_ts_i <= d_ts_i);
    in_quiet_o = overflow_i ? (above_q || below_d) : (above_q && below_d);
  end

endmodule
