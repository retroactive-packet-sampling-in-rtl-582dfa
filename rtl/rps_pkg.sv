// rps_pkg: types and constants shared by the Retroactive Packet Sampling (RPS)
// data-plane sampler.
//
// A receipt is the 12-byte record kept for every packet: a 6-byte flow
// identifier, a 2-byte timestamp and a 4-byte digest. The buffered form adds
// one byte, the number of the next direct disclosure of the flow, which is how
// an evicted receipt finds the disclosure it belongs to. Sizes follow the
// design description; the report encoding and the tracker entry layout are
// this implementation's choices.
package rps_pkg;

  localparam int unsigned FLOWID_W = 48;  // /24 source prefix + /24 destination prefix
  localparam int unsigned TS_W     = 16;  // timestamp, units of 2^20 ns
  localparam int unsigned DIGEST_W = 32;  // CRC-32 digest
  localparam int unsigned NEXTD_W  = 8;   // next disclosure number, one byte
  localparam int unsigned RATE_W   = 32;  // flow rate written by the controller (packets/s)
  localparam int unsigned GTS_W    = 48;  // global nanosecond timestamp
  localparam int unsigned TS_SHIFT = 20;  // ns -> ~1.05 ms ticks

  // Header window handed to the sampler: 14 bytes Ethernet, 20 bytes IPv4,
  // 32 bytes that follow the IPv4 header. Byte 0 sits in bits [7:0].
  localparam int unsigned HDR_BYTES  = 66;
  localparam int unsigned HDR_W      = 8 * HDR_BYTES;
  localparam int unsigned DIG_BYTES  = 48;  // non-mutable bytes fed to the digest

  typedef logic [FLOWID_W-1:0] flowid_t;
  typedef logic [TS_W-1:0]     ts_t;
  typedef logic [DIGEST_W-1:0] digest_t;
  typedef logic [NEXTD_W-1:0]  nextd_t;
  typedef logic [RATE_W-1:0]   rate_t;

  typedef struct packed {
    flowid_t flowid;
    ts_t     ts;
    digest_t digest;
  } receipt_t;

  // Buffer slot and direct-disclosure register: receipt plus disclosure number.
  // For an ordinary receipt the number is the flow's next disclosure number at
  // arrival; for a disclosure marker it is the disclosure's own number.
  typedef struct packed {
    receipt_t r;
    nextd_t   num;
  } entry_t;

  // Disclosure tracker entry, written by the controller for every direct
  // disclosure: its digest and timestamp, the earliest timestamp of its quiet
  // time (ts - (kappa - mu)) and whether that subtraction wrapped around.
  typedef struct packed {
    digest_t digest;
    ts_t     ts;
    ts_t     ts_q;
    logic    overflow;
  } trk_entry_t;

  typedef enum logic [1:0] {
    REP_NONE    = 2'd0,
    REP_DIRECT  = 2'd1,
    REP_DELAYED = 2'd2,
    REP_LATE    = 2'd3
  } rep_kind_e;

  // Report sent towards the monitor (mirrored copy). For REP_LATE the receipt
  // is the evicted disclosure marker of the flow.
  typedef struct packed {
    rep_kind_e kind;
    entry_t    e;
  } report_t;

  // Direct disclosures are also written into the buffer as markers whose
  // digest and timestamp bits are all ones.
  localparam digest_t MARKER_DIGEST = '1;
  localparam ts_t     MARKER_TS     = '1;

  function automatic logic is_marker(digest_t digest, ts_t ts);
    return (digest == MARKER_DIGEST) && (ts == MARKER_TS);
  endfunction

endpackage
