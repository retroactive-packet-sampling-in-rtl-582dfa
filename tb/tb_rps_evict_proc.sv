// tb_rps_evict_proc: random evicted entries (ordinary receipts and markers)
// with random tracker results; the delayed-disclosure and late-warning
// decisions are recomputed with the reference selection hash and the modular
// quiet-time rule. Each outcome must occur.
module tb_rps_evict_proc;
  import rps_pkg::*;
  import rps_tb_pkg::*;

  int checks = 0, failures = 0;
  int n_delayed = 0, n_late = 0, n_quiet = 0, n_nodisc = 0, n_reject = 0;

  logic       valid, fhit, thit;
  entry_t     e;
  nextd_t     fnd;
  trk_entry_t te;
  digest_t    sel;
  logic       delayed, late, marker, no_disc, in_quiet;

  rps_evict_proc dut (
    .valid_i(valid), .entry_i(e), .flow_hit_i(fhit), .flow_next_d_i(fnd),
    .trk_hit_i(thit), .trk_entry_i(te), .sel_range_i(sel),
    .delayed_o(delayed), .late_o(late), .marker_o(marker), .no_disc_o(no_disc), .in_quiet_o(in_quiet)
  );

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    bit [15:0] q;
    bit mk, exp_del, exp_late;
    for (int t = 0; t < 4000; t++) begin
      valid = ($urandom % 8) != 0;
      mk    = ($urandom % 4) == 0;
      e.r.flowid = {$urandom, 16'($urandom)};
      e.r.digest = mk ? 32'hFFFF_FFFF : $urandom;
      e.r.ts     = mk ? 16'hFFFF : 16'($urandom);
      e.num      = nextd_t'($urandom);
      fhit = ($urandom % 6) != 0;
      fnd  = (($urandom % 2) == 0) ? e.num + 8'd1 : nextd_t'($urandom);
      thit = ($urandom % 3) != 0;
      q    = 16'($urandom_range(1, 300));
      te.digest = $urandom;
      te.ts     = e.r.ts + 16'($urandom_range(0, 600));
      te.ts_q   = te.ts - q;
      te.overflow = te.ts < q;
      sel = $urandom;
      #1;
      exp_late = valid && mk && fhit && (fnd == e.num + 8'd1);
      exp_del  = valid && !mk && thit && !in_quiet_ref(e.r.ts, te.ts, q) &&
                 (sel_hash_ref(e.r.digest, te.digest) < sel);
      check("late", late, exp_late);
      check("delayed", delayed, exp_del);
      check("marker", marker, valid && mk);
      check("no_disc", no_disc, valid && !mk && !thit);
      check("in_quiet", in_quiet, valid && !mk && thit && in_quiet_ref(e.r.ts, te.ts, q));
      n_delayed += int'(exp_del);
      n_late    += int'(exp_late);
      n_quiet   += int'(in_quiet);
      n_nodisc  += int'(no_disc);
      n_reject  += int'(valid && !mk && thit && !in_quiet && !exp_del);
    end
    if (n_delayed == 0 || n_late == 0 || n_quiet == 0 || n_nodisc == 0 || n_reject == 0) begin
      failures++;
      $display("FAIL coverage %0d %0d %0d %0d %0d", n_delayed, n_late, n_quiet, n_nodisc, n_reject);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
