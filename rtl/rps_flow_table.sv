// rps_flow_table: per-flow state of the sampler, matched exactly on flowid.
//
// Each of NUM_FLOWS slots is installed by the controller with a flowid key and
// holds:
//   count  - packets seen, incremented by the data plane and read by the
//            controller, which derives the flow's rate from it;
//   rate   - the rate the controller last computed (packets/s);
//   next_d - the number the flow's next direct disclosure will get. Ordinary
//            receipts are tagged with it; a direct disclosure takes it and
//            increments it (8 bits, wraps).
// The direct-disclosure range is chosen from the stored rate: flows at or
// above rate_thresh_i use range_high_rate_i (the smaller disclosure
// probability), slower flows use range_low_rate_i. A packet is a direct
// disclosure when its digest is below that range.
//
// Port A serves the arriving packet: combinational match and decision,
// counter/next_d update at the clock edge. Back-to-back packets of one flow
// see each other's updates because the read and the update happen in the same
// cycle. Port B is a second, read-only match used for evicted receipts.
// If several slots hold the same key the lowest index wins; the controller
// must not install duplicates (asserted).
// The flow-to-slot mapping, the counter-based rate tracking and the two
// disclosure ranges with one threshold follow the design description; the
// slot count of 256 is the one the description gives for its reduced-flowid
// variant, adopted here.
// rst_n also disables an assertion during reset ("disable iff"); lint reports
// that as a synchronous use of the asynchronous reset, which it is not for the
// flops.
module rps_flow_table
  import rps_pkg::*;
#(
  parameter int unsigned NUM_FLOWS = 256,
  localparam int unsigned IDX_W = (NUM_FLOWS > 1) ? $clog2(NUM_FLOWS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // global configuration
  input  rate_t            rate_thresh_i,
  input  digest_t          range_low_rate_i,
  input  digest_t          range_high_rate_i,
  // port A: arriving packet
  input  logic             a_valid_i,
  input  flowid_t          a_flowid_i,
  input  digest_t          a_digest_i,
  output logic             a_hit_o,
  output logic [IDX_W-1:0] a_idx_o,
  output nextd_t           a_next_d_o,
  output logic             a_direct_o,
  output logic             a_high_rate_o,
  // port B: evicted receipt
  input  flowid_t          b_flowid_i,
  output logic             b_hit_o,
  output logic [IDX_W-1:0] b_idx_o,
  output nextd_t           b_next_d_o,
  // controller: install / remove a flow (clears its counter and number)
  input  logic             ctrl_flow_we_i,
  input  logic [IDX_W-1:0] ctrl_flow_idx_i,
  input  logic             ctrl_flow_valid_i,
  input  flowid_t          ctrl_flow_key_i,
  // controller: rate update
  input  logic             ctrl_rate_we_i,
  input  logic [IDX_W-1:0] ctrl_rate_idx_i,
  input  rate_t            ctrl_rate_i,
  // controller: counter read
  input  logic [IDX_W-1:0] ctrl_rd_idx_i,
  output logic [31:0]      ctrl_rd_count_o,
  output nextd_t           ctrl_rd_next_d_o
);

  logic    [NUM_FLOWS-1:0] valid_q;
  flowid_t                 key_q   [NUM_FLOWS];
  rate_t                   rate_q  [NUM_FLOWS];
  logic    [31:0]          count_q [NUM_FLOWS];
  nextd_t                  next_d_q[NUM_FLOWS];

  logic [NUM_FLOWS-1:0] match_a, match_b;

  always_comb begin
    for (int unsigned i = 0; i < NUM_FLOWS; i++) begin
      match_a[i] = valid_q[i] && (key_q[i] == a_flowid_i);
      match_b[i] = valid_q[i] && (key_q[i] == b_flowid_i);
    end
  end

  // lowest matching index
  always_comb begin
    a_hit_o = 1'b0;
    a_idx_o = '0;
    b_hit_o = 1'b0;
    b_idx_o = '0;
    for (int i = NUM_FLOWS - 1; i >= 0; i--) begin
      if (match_a[i]) begin
        a_hit_o = 1'b1;
        a_idx_o = IDX_W'(i);
      end
      if (match_b[i]) begin
        b_hit_o = 1'b1;
        b_idx_o = IDX_W'(i);
      end
    end
  end

  digest_t range_a;
  always_comb begin
    a_next_d_o    = next_d_q[a_idx_o];
    a_high_rate_o = a_hit_o && (rate_q[a_idx_o] >= rate_thresh_i);
    range_a       = (rate_q[a_idx_o] >= rate_thresh_i) ? range_high_rate_i : range_low_rate_i;
    a_direct_o    = a_valid_i && a_hit_o && (a_digest_i < range_a);
    b_next_d_o    = next_d_q[b_idx_o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int unsigned i = 0; i < NUM_FLOWS; i++) begin
        key_q[i]    <= '0;
        rate_q[i]   <= '0;
        count_q[i]  <= '0;
        next_d_q[i] <= '0;
      end
    end else begin
      if (a_valid_i && a_hit_o) begin
        count_q[a_idx_o] <= count_q[a_idx_o] + 32'd1;
        if (a_direct_o) next_d_q[a_idx_o] <= next_d_q[a_idx_o] + nextd_t'(1);
      end
      if (ctrl_rate_we_i) rate_q[ctrl_rate_idx_i] <= ctrl_rate_i;
      // installation last, so it overrides a same-cycle packet update
      if (ctrl_flow_we_i) begin
        valid_q[ctrl_flow_idx_i]  <= ctrl_flow_valid_i;
        key_q[ctrl_flow_idx_i]    <= ctrl_flow_key_i;
        count_q[ctrl_flow_idx_i]  <= '0;
        next_d_q[ctrl_flow_idx_i] <= '0;
      end
    end
  end

  assign ctrl_rd_count_o  = count_q[ctrl_rd_idx_i];
  assign ctrl_rd_next_d_o = next_d_q[ctrl_rd_idx_i];

  // A flowid must be installed in at most one slot.
  a_unique_key : assert property (@(posedge clk) disable iff (!rst_n)
    a_valid_i |-> $onehot0(match_a));

endmodule
