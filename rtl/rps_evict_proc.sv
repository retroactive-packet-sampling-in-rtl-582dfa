// rps_evict_proc: decides the fate of the entry evicted from the receipt buffer.
//
// This is the "inverted" part of the FIFO sampling algorithm: instead of
// searching the buffer when a direct disclosure arrives, every entry that
// leaves the buffer looks up its direct disclosure.
//  - Ordinary receipt: if the tracker holds its disclosure, the receipt lies
//    outside the quiet time, and CRC-32(receipt digest, disclosure digest) is
//    below sel_range_i (the selection probability sigma as a fraction of
//    2^32), it is a delayed disclosure. Otherwise it is dropped.
//  - Disclosure marker (digest and timestamp all ones): a direct disclosure
//    leaving the buffer. If it is still the flow's latest disclosure
//    (marker number + 1 == flow's next number), the flow's following receipts
//    will leave the buffer before any disclosure can select them: a late
//    disclosure warning is raised, carrying the marker.
// The marker mechanism and the delayed-disclosure rule follow the design
// description; the exact late-warning condition and the byte order of the
// selection hash input (receipt digest first, each digest least significant
// byte first) are this block's choices.
//
// Interface: all inputs describe one evicted entry; outputs are
// combinational. no_disc_o flags a receipt whose disclosure is not (yet) in
// the tracker, in_quiet_o one rejected by the quiet time.
module rps_evict_proc
  import rps_pkg::*;
(
  input  logic       valid_i,
  input  entry_t     entry_i,
  input  logic       flow_hit_i,
  input  nextd_t     flow_next_d_i,
  input  logic       trk_hit_i,
  input  trk_entry_t trk_entry_i,
  input  digest_t    sel_range_i,
  output logic       delayed_o,
  output logic       late_o,
  output logic       marker_o,
  output logic       no_disc_o,
  output logic       in_quiet_o
);

  logic    quiet;
  digest_t sel_hash;

  rps_quiet_check u_quiet (
    .r_ts_i     (entry_i.r.ts),
    .d_ts_i     (trk_entry_i.ts),
    .ts_q_i     (trk_entry_i.ts_q),
    .overflow_i (trk_entry_i.overflow),
    .in_quiet_o (quiet)
  );

  rps_crc32 #(.NBYTES(8)) u_sel_hash (
    .data_i ({trk_entry_i.digest, entry_i.r.digest}),
    .crc_o  (sel_hash)
  );

  always_comb begin
    marker_o   = valid_i && is_marker(entry_i.r.digest, entry_i.r.ts);
    late_o     = marker_o && flow_hit_i && (entry_i.num + nextd_t'(1) == flow_next_d_i);
    no_disc_o  = valid_i && !marker_o && !trk_hit_i;
    in_quiet_o = valid_i && !marker_o && trk_hit_i && quiet;
    delayed_o  = valid_i && !marker_o && trk_hit_i && !quiet && (sel_hash < sel_range_i);
  end

endmodule
