// rps_tb_pkg: reference functions shared by the sampler testbenches.
//
// crc32_ref is a table-driven CRC-32 (IEEE 802.3, reflected), written
// independently of the bit-serial RTL. make_hdr builds a 66-byte
// Ethernet/IPv4 header window from named fields, and digest_ref/flowid_ref
// pick the receipt fields out of the named fields, not out of byte offsets.
package rps_tb_pkg;
  import rps_pkg::*;

  typedef bit [7:0] bytes_t[$];

  function automatic bit [31:0] crc32_ref(bytes_t data);
    bit [31:0] table_q[256];
    bit [31:0] c;
    for (int n = 0; n < 256; n++) begin
      c = n;
      repeat (8) c = c[0] ? (32'hEDB88320 ^ (c >> 1)) : (c >> 1);
      table_q[n] = c;
    end
    c = 32'hFFFFFFFF;
    foreach (data[i]) c = table_q[(c ^ data[i]) & 8'hFF] ^ (c >> 8);
    return c ^ 32'hFFFFFFFF;
  endfunction

  typedef struct {
    bit [15:0] ethertype;
    bit [3:0]  version;
    bit [7:0]  tos;
    bit [15:0] total_len;
    bit [15:0] ident;
    bit [15:0] flags_frag;
    bit [7:0]  ttl;
    bit [7:0]  proto;
    bit [15:0] csum;
    bit [31:0] src;
    bit [31:0] dst;
    bit [7:0]  l4 [32];
  } pkt_t;

  function automatic pkt_t rand_pkt(bit [31:0] src, bit [31:0] dst);
    pkt_t p;
    p.ethertype  = 16'h0800;
    p.version    = 4'd4;
    p.tos        = 8'($urandom);
    p.total_len  = 16'($urandom);
    p.ident      = 16'($urandom);
    p.flags_frag = 16'($urandom);
    p.ttl        = 8'($urandom);
    p.proto      = 8'($urandom);
    p.csum       = 16'($urandom);
    p.src        = src;
    p.dst        = dst;
    foreach (p.l4[i]) p.l4[i] = 8'($urandom);
    return p;
  endfunction

  // Byte k of the window goes to bits [8k+7:8k].
  function automatic logic [HDR_W-1:0] make_hdr(pkt_t p);
    bytes_t b;
    logic [HDR_W-1:0] h;
    repeat (12) b.push_back(8'($urandom));           // MAC addresses
    b.push_back(p.ethertype[15:8]); b.push_back(p.ethertype[7:0]);
    b.push_back({p.version, 4'd5});
    b.push_back(p.tos);
    b.push_back(p.total_len[15:8]); b.push_back(p.total_len[7:0]);
    b.push_back(p.ident[15:8]);     b.push_back(p.ident[7:0]);
    b.push_back(p.flags_frag[15:8]); b.push_back(p.flags_frag[7:0]);
    b.push_back(p.ttl);
    b.push_back(p.proto);
    b.push_back(p.csum[15:8]); b.push_back(p.csum[7:0]);
    for (int i = 3; i >= 0; i--) b.push_back(p.src[8*i +: 8]);
    for (int i = 3; i >= 0; i--) b.push_back(p.dst[8*i +: 8]);
    foreach (p.l4[i]) b.push_back(p.l4[i]);
    foreach (b[i]) h[8*i +: 8] = b[i];
    return h;
  endfunction

  function automatic bit [31:0] digest_ref(pkt_t p);
    bytes_t b;
    b.push_back({p.version, 4'd5});
    b.push_back(p.tos);
    b.push_back(p.total_len[15:8]); b.push_back(p.total_len[7:0]);
    b.push_back(p.ident[15:8]);     b.push_back(p.ident[7:0]);
    b.push_back(p.ttl);
    b.push_back(p.proto);
    for (int i = 3; i >= 0; i--) b.push_back(p.src[8*i +: 8]);
    for (int i = 3; i >= 0; i--) b.push_back(p.dst[8*i +: 8]);
    foreach (p.l4[i]) b.push_back(p.l4[i]);
    return crc32_ref(b);
  endfunction

  function automatic bit [47:0] flowid_ref(pkt_t p);
    return {p.src[31:8], p.dst[31:8]};
  endfunction

  // Selection hash: receipt digest bytes then disclosure digest bytes, each
  // least significant byte first.
  function automatic bit [31:0] sel_hash_ref(bit [31:0] r_digest, bit [31:0] d_digest);
    bytes_t b;
    for (int i = 0; i < 4; i++) b.push_back(r_digest[8*i +: 8]);
    for (int i = 0; i < 4; i++) b.push_back(d_digest[8*i +: 8]);
    return crc32_ref(b);
  endfunction

  // Quiet time by modular distance: d.ts - r.ts (mod 2^16) <= q.
  function automatic bit in_quiet_ref(bit [15:0] r_ts, bit [15:0] d_ts, bit [15:0] q);
    bit [15:0] gap;
    gap = d_ts - r_ts;
    return gap <= q;
  endfunction

endpackage
