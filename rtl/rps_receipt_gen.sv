// rps_receipt_gen: turns a packet header into an RPS receipt.
//
// For every packet the sampler keeps a receipt of three fields:
//   flowid - the /24 prefix of the IPv4 source followed by the /24 prefix of
//            the destination (6 bytes);
//   ts     - bits [35:20] of the nanosecond clock, i.e. a 16-bit time in
//            ticks of 2^20 ns (about 1.05 ms) that wraps after about 68 s;
//            the shift replaces a division by 10^6, which the pipeline lacks;
//   digest - CRC-32 over 48 bytes that routers do not change: the IPv4
//            header without its flags/fragment-offset and checksum fields
//            (16 bytes) followed by the first 32 bytes after the IPv4 header
//            (TCP header plus 12 payload bytes, or UDP header plus 24).
// Following the design description, TTL stays in the digest.
//
// Interface: hdr_i is a 66-byte window from the first byte of the Ethernet
// header (byte 0 in bits [7:0]); gtstamp_i is the ingress nanosecond time.
// is_ipv4_o is set for EtherType 0x0800 with IP version 4; only those packets
// are sampled. The IPv4 header is taken to be 20 bytes long (no options):
// this block's choice. Timing: combinational. Only bits [35:20] of
// gtstamp_i are used; the lint report of the other bits as unused is expected.
module rps_receipt_gen
  import rps_pkg::*;
(
  input  logic [HDR_W-1:0] hdr_i,
  input  logic [GTS_W-1:0] gtstamp_i,
  output logic             is_ipv4_o,
  output receipt_t         receipt_o
);

  localparam int unsigned ETH = 0;   // Ethernet header offset
  localparam int unsigned IP  = 14;  // IPv4 header offset
  localparam int unsigned L4  = 34;  // bytes after a 20-byte IPv4 header

  function automatic logic [7:0] byte_at(int unsigned i);
    return hdr_i[8*i +: 8];
  endfunction

  logic [8*DIG_BYTES-1:0] dig_bytes;
  digest_t                digest;

  always_comb begin
    // IPv4 bytes 0..5 (version/IHL, TOS, total length, identification),
    // 8..9 (TTL, protocol), 12..19 (addresses); 6..7 and 10..11 are mutable.
    for (int unsigned k = 0; k < 6; k++) dig_bytes[8*k +: 8] = byte_at(IP + k);
    for (int unsigned k = 0; k < 2; k++) dig_bytes[8*(6+k) +: 8] = byte_at(IP + 8 + k);
    for (int unsigned k = 0; k < 8; k++) dig_bytes[8*(8+k) +: 8] = byte_at(IP + 12 + k);
    for (int unsigned k = 0; k < 32; k++) dig_bytes[8*(16+k) +: 8] = byte_at(L4 + k);
  end

  rps_crc32 #(.NBYTES(DIG_BYTES)) u_digest (
    .data_i (dig_bytes),
    .crc_o  (digest)
  );

  always_comb begin
    is_ipv4_o = ({byte_at(ETH + 12), byte_at(ETH + 13)} == 16'h0800) &&
                (hdr_i[8*IP+4 +: 4] == 4'd4);
    receipt_o.flowid = {byte_at(IP + 12), byte_at(IP + 13), byte_at(IP + 14),
                        byte_at(IP + 16), byte_at(IP + 17), byte_at(IP + 18)};
    receipt_o.ts = gtstamp_i[TS_SHIFT +: TS_W];
    receipt_o.digest = digest;
  end

endmodule
