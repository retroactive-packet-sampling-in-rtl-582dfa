// tb_rps_receipt_gen: random IPv4 headers; flowid, timestamp and digest are
// recomputed from the named header fields and compared. Non-IPv4 EtherTypes
// and IP version 6 must clear is_ipv4_o. Mutable fields (flags/fragment
// offset, checksum) must not change the digest.
module tb_rps_receipt_gen;
  import rps_pkg::*;
  import rps_tb_pkg::*;

  int checks = 0, failures = 0;

  logic [HDR_W-1:0] hdr;
  logic [GTS_W-1:0] gts;
  logic             ipv4;
  receipt_t         r;

  rps_receipt_gen dut (.hdr_i(hdr), .gtstamp_i(gts), .is_ipv4_o(ipv4), .receipt_o(r));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p;
    bit [31:0] d0;
    for (int t = 0; t < 300; t++) begin
      p   = rand_pkt($urandom, $urandom);
      hdr = make_hdr(p);
      gts = {$urandom, $urandom};
      #1;
      check("ipv4", 64'(ipv4), 64'd1);
      check("flowid", 64'(r.flowid), 64'(flowid_ref(p)));
      check("ts", 64'(r.ts), 64'((gts / 48'd1048576) % 48'd65536));
      check("digest", 64'(r.digest), 64'(digest_ref(p)));
      // mutable fields do not matter
      d0 = r.digest;
      p.flags_frag = ~p.flags_frag;
      p.csum       = p.csum + 16'd1;
      hdr = make_hdr(p);
      #1;
      check("digest mutable", 64'(r.digest), 64'(d0));
      // a non-mutable byte does
      p.l4[31] = ~p.l4[31];
      hdr = make_hdr(p);
      #1;
      check("digest payload", 64'(r.digest != d0), 64'd1);
      if (t % 3 == 0) begin
        p.ethertype = 16'h86DD;
        hdr = make_hdr(p);
        #1;
        check("not ipv4 ethertype", 64'(ipv4), 64'd0);
      end else if (t % 3 == 1) begin
        p.version = 4'd6;
        hdr = make_hdr(p);
        #1;
        check("not ipv4 version", 64'(ipv4), 64'd0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
