// rps_sampler: data-plane Retroactive Packet Sampling with a FIFO receipt
// buffer (top level).
//
// Retroactive Packet Sampling lets an outside monitor check an ISP's loss and
// delay without letting the ISP know, while a packet is in flight, whether
// that packet will be sampled. Every packet leaves a small receipt. A packet
// whose digest falls in a rate-dependent range is a direct disclosure and is
// reported at once. Buffered receipts of the same flow that are old enough
// (outside the quiet time) and whose combined hash with that disclosure falls
// in the selection range are reported later as delayed disclosures.
//
// This top wires the line-rate version in which each packet causes exactly
// one buffer operation (the "inverted" algorithm):
//   S0 -> S1  rps_receipt_gen builds flowid, 16-bit timestamp, CRC-32 digest.
//   S1        rps_flow_table matches the flow, counts the packet, picks the
//             disclosure range from the flow's rate, decides "direct", and
//             tags the receipt with the flow's next disclosure number.
//   S2        rps_receipt_buffer swaps the new entry with the oldest one. A
//             direct disclosure writes a marker entry (digest and timestamp
//             all ones) instead of its receipt, is reported on direct_*_o and
//             is written to rps_disc_regs for the controller.
//   S3        the evicted entry's flow is matched again (port B) and
//             rps_disc_tracker is read with (flow slot, disclosure number).
//   S4        rps_evict_proc decides delayed disclosure / late warning;
//   S5        evict_*_o registered.
// Latency: a packet on pkt_valid_i in cycle n is reported as direct in cycle
// n+2; the entry it evicts is reported in cycle n+5. Throughput is one packet
// per cycle with no stall. Packets that are not IPv4 or whose flow is not
// installed pass without a receipt.
//
// The controller (software on the switch CPU, outside this design) polls
// rps_disc_regs, writes the tracker (adding ts_q and the wrap flag), writes
// the flow rates from the packet counters and installs flows; those ports are
// brought out as ctrl_*. The pipeline split and the register/mirror channels
// follow the design description; stage boundaries, port layout and the
// report encoding are this implementation's choices.
//
// Lint notes: rst_n is also used synchronously, by the "disable iff" of the
// buffer's pointer-range assertion; that is simulation-only checking and the
// flops themselves use rst_n only asynchronously. The flow table's a_idx_o is
// left open because the arriving packet's slot number is not needed here.
//
// Defaults: 286,733 buffer slots (one Tofino pipeline with 16-bit registers),
// 4000 direct-disclosure registers, 256 flow slots.
module rps_sampler
  import rps_pkg::*;
#(
  parameter int unsigned BUF_DEPTH      = 286733,
  parameter int unsigned NUM_FLOWS      = 256,
  parameter int unsigned DISC_REG_DEPTH = 4000,
  localparam int unsigned FIDX_W = (NUM_FLOWS > 1) ? $clog2(NUM_FLOWS) : 1,
  localparam int unsigned DIDX_W = (DISC_REG_DEPTH > 1) ? $clog2(DISC_REG_DEPTH) : 1,
  localparam int unsigned BPTR_W = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // packet headers at line rate
  input  logic              pkt_valid_i,
  input  logic [HDR_W-1:0]  pkt_hdr_i,
  input  logic [GTS_W-1:0]  gtstamp_i,
  // configuration (disclosure ranges as fractions of 2^32)
  input  rate_t             rate_thresh_i,
  input  digest_t           range_low_rate_i,
  input  digest_t           range_high_rate_i,
  input  digest_t           sel_range_i,
  // reports towards the monitor
  output logic              direct_valid_o,
  output entry_t            direct_o,
  output logic              evict_valid_o,
  output report_t           evict_report_o,
  // event flags of the evicted entry (valid with evict_valid_o's cycle)
  output logic              ev_seen_o,
  output logic              ev_marker_o,
  output logic              ev_no_disc_o,
  output logic              ev_in_quiet_o,
  output logic              high_rate_o,
  output logic [BPTR_W-1:0] buf_ptr_o,
  output logic              buf_full_o,
  // controller: flow table
  input  logic              ctrl_flow_we_i,
  input  logic [FIDX_W-1:0] ctrl_flow_idx_i,
  input  logic              ctrl_flow_valid_i,
  input  flowid_t           ctrl_flow_key_i,
  input  logic              ctrl_rate_we_i,
  input  logic [FIDX_W-1:0] ctrl_rate_idx_i,
  input  rate_t             ctrl_rate_i,
  input  logic [FIDX_W-1:0] ctrl_rd_idx_i,
  output logic [31:0]       ctrl_rd_count_o,
  output nextd_t            ctrl_rd_next_d_o,
  // controller: disclosure tracker
  input  logic              ctrl_trk_we_i,
  input  logic [FIDX_W-1:0] ctrl_trk_flow_i,
  input  nextd_t            ctrl_trk_num_i,
  input  logic              ctrl_trk_valid_i,
  input  trk_entry_t        ctrl_trk_entry_i,
  // controller: direct-disclosure registers
  input  logic [DIDX_W-1:0] ctrl_disc_addr_i,
  output entry_t            ctrl_disc_data_o,
  output logic [DIDX_W-1:0] ctrl_disc_wr_idx_o,
  output logic [31:0]       ctrl_disc_count_o
);

  // ---------------- S1: receipt ----------------
  logic     gen_ipv4;
  receipt_t gen_r;

  rps_receipt_gen u_gen (
    .hdr_i     (pkt_hdr_i),
    .gtstamp_i (gtstamp_i),
    .is_ipv4_o (gen_ipv4),
    .receipt_o (gen_r)
  );

  logic     s1_valid;
  receipt_t s1_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= pkt_valid_i && gen_ipv4;
  end
  always_ff @(posedge clk) s1_r <= gen_r;

  // ---------------- S1: flow table ----------------
  logic              a_hit, a_direct, a_high;
  nextd_t            a_next_d;
  entry_t            ev_entry;
  logic              ev_valid;
  logic              b_hit;
  logic [FIDX_W-1:0] b_idx;
  nextd_t            b_next_d;

  rps_flow_table #(.NUM_FLOWS(NUM_FLOWS)) u_flows (
    .clk               (clk),
    .rst_n             (rst_n),
    .rate_thresh_i     (rate_thresh_i),
    .range_low_rate_i  (range_low_rate_i),
    .range_high_rate_i (range_high_rate_i),
    .a_valid_i         (s1_valid),
    .a_flowid_i        (s1_r.flowid),
    .a_digest_i        (s1_r.digest),
    .a_hit_o           (a_hit),
    .a_idx_o           (),
    .a_next_d_o        (a_next_d),
    .a_direct_o        (a_direct),
    .a_high_rate_o     (a_high),
    .b_flowid_i        (ev_entry.r.flowid),
    .b_hit_o           (b_hit),
    .b_idx_o           (b_idx),
    .b_next_d_o        (b_next_d),
    .ctrl_flow_we_i    (ctrl_flow_we_i),
    .ctrl_flow_idx_i   (ctrl_flow_idx_i),
    .ctrl_flow_valid_i (ctrl_flow_valid_i),
    .ctrl_flow_key_i   (ctrl_flow_key_i),
    .ctrl_rate_we_i    (ctrl_rate_we_i),
    .ctrl_rate_idx_i   (ctrl_rate_idx_i),
    .ctrl_rate_i       (ctrl_rate_i),
    .ctrl_rd_idx_i     (ctrl_rd_idx_i),
    .ctrl_rd_count_o   (ctrl_rd_count_o),
    .ctrl_rd_next_d_o  (ctrl_rd_next_d_o)
  );

  // ---------------- S2: buffer swap, direct disclosure ----------------
  logic   s2_valid, s2_direct, s2_high;
  entry_t s2_buf_entry, s2_disc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid  <= 1'b0;
      s2_direct <= 1'b0;
      s2_high   <= 1'b0;
    end else begin
      s2_valid  <= s1_valid && a_hit;
      s2_direct <= s1_valid && a_direct;
      s2_high   <= s1_valid && a_high;
    end
  end

  always_ff @(posedge clk) begin
    s2_disc.r   <= s1_r;
    s2_disc.num <= a_next_d;
    s2_buf_entry.num      <= a_next_d;
    s2_buf_entry.r.flowid <= s1_r.flowid;
    s2_buf_entry.r.ts     <= a_direct ? MARKER_TS     : s1_r.ts;
    s2_buf_entry.r.digest <= a_direct ? MARKER_DIGEST : s1_r.digest;
  end

  assign direct_valid_o = s2_valid && s2_direct;
  assign direct_o       = s2_disc;
  assign high_rate_o    = s2_valid && s2_high;

  rps_receipt_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_valid_i (s2_valid),
    .wr_entry_i (s2_buf_entry),
    .ev_valid_o (ev_valid),
    .ev_entry_o (ev_entry),
    .ptr_o      (buf_ptr_o),
    .full_o     (buf_full_o)
  );

  rps_disc_regs #(.DEPTH(DISC_REG_DEPTH)) u_disc_regs (
    .clk        (clk),
    .rst_n      (rst_n),
    .we_i       (direct_valid_o),
    .entry_i    (s2_disc),
    .rd_addr_i  (ctrl_disc_addr_i),
    .rd_data_o  (ctrl_disc_data_o),
    .wr_idx_o   (ctrl_disc_wr_idx_o),
    .wr_count_o (ctrl_disc_count_o)
  );

  // ---------------- S3: flow match of the evicted entry, tracker read ----------------
  logic       trk_hit;
  trk_entry_t trk_entry;

  rps_disc_tracker #(.NUM_FLOWS(NUM_FLOWS)) u_trk (
    .clk          (clk),
    .rst_n        (rst_n),
    .rd_flow_i    (b_idx),
    .rd_num_i     (ev_entry.num),
    .rd_hit_o     (trk_hit),
    .rd_entry_o   (trk_entry),
    .ctrl_we_i    (ctrl_trk_we_i),
    .ctrl_flow_i  (ctrl_trk_flow_i),
    .ctrl_num_i   (ctrl_trk_num_i),
    .ctrl_valid_i (ctrl_trk_valid_i),
    .ctrl_entry_i (ctrl_trk_entry_i)
  );

  logic   s4_valid, s4_fhit;
  entry_t s4_entry;
  nextd_t s4_next_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s4_valid <= 1'b0;
    else        s4_valid <= ev_valid;
  end
  always_ff @(posedge clk) begin
    s4_entry  <= ev_entry;
    s4_fhit   <= b_hit;
    s4_next_d <= b_next_d;
  end

  // ---------------- S4: evicted entry decision ----------------
  logic delayed, late, marker, no_disc, in_quiet;

  rps_evict_proc u_evict (
    .valid_i       (s4_valid),
    .entry_i       (s4_entry),
    .flow_hit_i    (s4_fhit),
    .flow_next_d_i (s4_next_d),
    .trk_hit_i     (trk_hit && s4_fhit),
    .trk_entry_i   (trk_entry),
    .sel_range_i   (sel_range_i),
    .delayed_o     (delayed),
    .late_o        (late),
    .marker_o      (marker),
    .no_disc_o     (no_disc),
    .in_quiet_o    (in_quiet)
  );

  // ---------------- S5: report ----------------
  rep_kind_e ev_kind_q;
  entry_t    ev_entry_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evict_valid_o <= 1'b0;
      ev_seen_o     <= 1'b0;
      ev_marker_o   <= 1'b0;
      ev_no_disc_o  <= 1'b0;
      ev_in_quiet_o <= 1'b0;
      ev_kind_q     <= REP_NONE;
    end else begin
      evict_valid_o <= delayed || late;
      ev_seen_o     <= s4_valid;
      ev_marker_o   <= marker;
      ev_no_disc_o  <= no_disc;
      ev_in_quiet_o <= in_quiet;
      ev_kind_q     <= late ? REP_LATE : (delayed ? REP_DELAYED : REP_NONE);
    end
  end
  always_ff @(posedge clk) ev_entry_q <= s4_entry;

  assign evict_report_o = '{kind: ev_kind_q, e: ev_entry_q};

endmodule
