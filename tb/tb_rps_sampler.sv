// tb_rps_sampler: end-to-end test of the RPS sampler at reduced sizes (64-slot buffer, 8 flow slots, 16 registers).
//
// The testbench plays three roles:
//  - traffic source: bursts of back-to-back packets (one per cycle) of
//    installed flows, of unknown flows and of non-IPv4 frames, with a
//    nanosecond clock that starts just before the 16-bit tick counter wraps
//    and now and then jumps forward to just before the next wrap; the first
//    BOOST_PKTS packets use wider disclosure ranges so that the register ring
//    wraps, the rest use R_LOW / R_HIGH;
//  - controller: installs the flows, writes flow rates (one flow above the
//    rate threshold, later switched), polls the direct-disclosure registers
//    and, CTRL_DELAY cycles after reading one, writes its tracker entry with
//    ts_q = ts - QUIET and the wrap flag; in the next cycle it removes the
//    entry of the following disclosure number, which after the 8-bit number
//    wraps would still hold a disclosure from 256 numbers earlier;
//  - checker: at the end, a reference model replays the logged inputs and
//    controller writes (FIFO of entries, per-flow disclosure numbers,
//    tracker visibility by cycle) and predicts every direct report (cycle
//    n+2) and every delayed / late report (cycle n+5) of a packet sent in
//    cycle n. Observed and predicted reports must match in cycle and content.
// Each mechanism (direct disclosure, buffer wrap and eviction, delayed
// disclosure, rejection by quiet time with and without timestamp wrap,
// rejection by selection hash, receipt without disclosure, late warning,
// high-rate range, unknown flow, non-IPv4, register ring wrap) is counted
// and must occur.
module tb_rps_sampler;
  import rps_pkg::*;
  import rps_tb_pkg::*;

  localparam int unsigned BUF_DEPTH = 64;
  localparam int unsigned NUM_FLOWS = 8;
  localparam int unsigned DISC_DEPTH = 16;
  localparam int unsigned FIDX_W = $clog2(NUM_FLOWS);
  localparam int unsigned DIDX_W = $clog2(DISC_DEPTH);
  localparam int unsigned BPTR_W = $clog2(BUF_DEPTH);
  localparam int          NPKT = 6000;
  localparam int          NFLOW_USED = 5;
  localparam int          CTRL_DELAY = 4;
  localparam bit [15:0]   QUIET = 16'd2;           // kappa - mu in ticks
  localparam rate_t       THRESH = 32'd437000;
  localparam digest_t     R_LOW  = 32'h2000_0000;
  localparam digest_t     R_HIGH = 32'h0800_0000;
  // wider ranges used for the first BOOST_PKTS packets, to fill the register ring
  localparam digest_t     R_LOW_BOOST  = 32'h2000_0000;
  localparam digest_t     R_HIGH_BOOST = 32'h0800_0000;
  localparam int          BOOST_PKTS   = 0;
  localparam digest_t     SEL    = 32'h8000_0000;    // selection range, sigma * 2^32

  int checks = 0, failures = 0;
  longint cyc = 0;

  logic clk = 0, rst_n = 0;
  digest_t r_low = R_LOW_BOOST, r_high = R_HIGH_BOOST;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- DUT ----------------
  logic              pkt_valid = 0;
  logic [HDR_W-1:0]  pkt_hdr = '0;
  logic [GTS_W-1:0]  gts = '0;
  logic              direct_valid, evict_valid, ev_seen, ev_marker, ev_no_disc, ev_in_quiet, high_rate;
  entry_t            direct_e;
  report_t           evict_rep;
  logic [BPTR_W-1:0] buf_ptr;
  logic              buf_full;
  logic              f_we = 0, f_valid = 0, r_we = 0, t_we = 0, t_valid = 0;
  logic [FIDX_W-1:0] f_idx = '0, r_idx = '0, rd_idx = '0, t_flow = '0;
  flowid_t           f_key = '0;
  rate_t             r_val = '0;
  logic [31:0]       rd_count, disc_count;
  nextd_t            rd_nd, t_num = '0;
  trk_entry_t        t_entry = '0;
  logic [DIDX_W-1:0] disc_addr = '0, disc_wr_idx;
  entry_t            disc_data;

  rps_sampler #(.BUF_DEPTH(BUF_DEPTH), .NUM_FLOWS(NUM_FLOWS), .DISC_REG_DEPTH(DISC_DEPTH)) dut (
    .clk(clk), .rst_n(rst_n),
    .pkt_valid_i(pkt_valid), .pkt_hdr_i(pkt_hdr), .gtstamp_i(gts),
    .rate_thresh_i(THRESH), .range_low_rate_i(r_low), .range_high_rate_i(r_high), .sel_range_i(SEL),
    .direct_valid_o(direct_valid), .direct_o(direct_e),
    .evict_valid_o(evict_valid), .evict_report_o(evict_rep),
    .ev_seen_o(ev_seen), .ev_marker_o(ev_marker), .ev_no_disc_o(ev_no_disc), .ev_in_quiet_o(ev_in_quiet),
    .high_rate_o(high_rate), .buf_ptr_o(buf_ptr), .buf_full_o(buf_full),
    .ctrl_flow_we_i(f_we), .ctrl_flow_idx_i(f_idx), .ctrl_flow_valid_i(f_valid), .ctrl_flow_key_i(f_key),
    .ctrl_rate_we_i(r_we), .ctrl_rate_idx_i(r_idx), .ctrl_rate_i(r_val),
    .ctrl_rd_idx_i(rd_idx), .ctrl_rd_count_o(rd_count), .ctrl_rd_next_d_o(rd_nd),
    .ctrl_trk_we_i(t_we), .ctrl_trk_flow_i(t_flow), .ctrl_trk_num_i(t_num),
    .ctrl_trk_valid_i(t_valid), .ctrl_trk_entry_i(t_entry),
    .ctrl_disc_addr_i(disc_addr), .ctrl_disc_data_o(disc_data),
    .ctrl_disc_wr_idx_o(disc_wr_idx), .ctrl_disc_count_o(disc_count)
  );

  // ---------------- logs ----------------
  typedef struct { longint n; pkt_t p; bit ipv4; bit [47:0] g; digest_t lo, hi; } in_rec_t;
  typedef struct { longint n; int flow; nextd_t num; bit v; trk_entry_t e; } trk_rec_t;
  typedef struct { longint n; int flow; rate_t rate; } rate_rec_t;
  typedef struct { longint n; rep_kind_e kind; entry_t e; } out_rec_t;

  in_rec_t   in_log[$];
  trk_rec_t  trk_log[$];
  rate_rec_t rate_log[$];
  out_rec_t  dir_obs[$], ev_obs[$], dir_exp[$], ev_exp[$];

  flowid_t keys[NFLOW_USED];
  bit [31:0] srcs[NFLOW_USED], dsts[NFLOW_USED];
  int obs_quiet = 0, obs_nodisc = 0, obs_marker = 0, obs_high = 0;

  function automatic int flow_of(flowid_t k);
    for (int i = 0; i < NFLOW_USED; i++) if (keys[i] == k) return i;
    return -1;
  endfunction

  // ---------------- output monitor ----------------
  always @(negedge clk) if (rst_n) begin
    if (direct_valid) dir_obs.push_back('{cyc, REP_DIRECT, direct_e});
    if (evict_valid)  ev_obs.push_back('{cyc, evict_rep.kind, evict_rep.e});
    obs_quiet  += int'(ev_in_quiet);
    obs_nodisc += int'(ev_no_disc);
    obs_marker += int'(ev_marker);
    obs_high   += int'(high_rate);
  end

  // ---------------- controller model ----------------
  typedef struct { longint ready; bit clr; entry_t e; } pend_t;
  pend_t  pend[$];
  longint seen = 0;
  bit     rd_pending = 0;
  bit     ctrl_on = 0;

  always @(negedge clk) begin
    t_we = 0;
    if (ctrl_on) begin
      if (rd_pending) begin
        pend.push_back('{cyc + CTRL_DELAY, 1'b0, disc_data});
        rd_pending = 0;
      end else if (seen < longint'(disc_count)) begin
        if (longint'(disc_count) - seen > longint'(DISC_DEPTH)) begin
          failures++;
          $display("FAIL direct-disclosure ring overrun");
        end
        disc_addr  = DIDX_W'(seen % DISC_DEPTH);
        seen++;
        rd_pending = 1;
      end
      if (pend.size() > 0 && pend[0].ready <= cyc) begin
        pend_t q;
        int f;
        q = pend.pop_front();
        f = flow_of(q.e.r.flowid);
        if (f >= 0 && q.clr) begin
          // remove what is left of the disclosure numbered 256 earlier
          t_we    = 1;
          t_valid = 0;
          t_flow  = FIDX_W'(f);
          t_num   = q.e.num;
          t_entry = '0;
          trk_log.push_back('{cyc, f, q.e.num, 1'b0, t_entry});
        end else if (f >= 0) begin
          t_we    = 1;
          t_valid = 1;
          t_flow  = FIDX_W'(f);
          t_num   = q.e.num;
          t_entry = '{digest: q.e.r.digest, ts: q.e.r.ts, ts_q: q.e.r.ts - QUIET,
                      overflow: (q.e.r.ts < QUIET)};
          trk_log.push_back('{cyc, f, q.e.num, 1'b1, t_entry});
          q.clr   = 1;
          q.e.num = q.e.num + nextd_t'(1);
          pend.push_front(q);
        end
      end
    end
  end

  task automatic set_rate(int f, rate_t v);
    @(negedge clk);
    r_we = 1; r_idx = FIDX_W'(f); r_val = v;
    rate_log.push_back('{cyc, f, v});
    @(negedge clk);
    r_we = 0;
  endtask

  initial begin
    #(2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic void run_model(output int m_direct, output int m_delayed, output int m_late,
                                    output int m_quiet, output int m_quiet_wrap, output int m_sel_rej,
                                    output int m_nodisc, output int m_evict, output int m_unknown,
                                    output int m_nonip, output int m_tswrap);
    entry_t fifo[$];
    longint dir_cyc[NFLOW_USED][$];
    int nd[NFLOW_USED];
    int ti = 0;
    trk_entry_t trk[int];
    bit [15:0] last_ts = 0;
    m_direct = 0; m_delayed = 0; m_late = 0; m_quiet = 0; m_quiet_wrap = 0; m_sel_rej = 0;
    m_nodisc = 0; m_evict = 0; m_unknown = 0; m_nonip = 0; m_tswrap = 0;
    foreach (nd[i]) nd[i] = 0;
    // pass 1: direct decisions and disclosure cycles of every flow
    foreach (in_log[k]) begin
      in_rec_t x;
      receipt_t r;
      int f;
      rate_t rate;
      x = in_log[k];
      if (!x.ipv4) continue;
      r.flowid = flowid_ref(x.p);
      r.digest = digest_ref(x.p);
      f = flow_of(r.flowid);
      if (f < 0) continue;
      rate = 0;
      foreach (rate_log[j]) if (rate_log[j].flow == f && rate_log[j].n <= x.n) rate = rate_log[j].rate;
      if (r.digest < ((rate >= THRESH) ? x.hi : x.lo)) dir_cyc[f].push_back(x.n);
    end
    // pass 2: buffer, tracker and reports
    foreach (in_log[k]) begin
      in_rec_t x;
      receipt_t r;
      int f;
      bit dir;
      entry_t ent;
      x = in_log[k];
      if (!x.ipv4) begin m_nonip++; continue; end
      r.flowid = flowid_ref(x.p);
      r.digest = digest_ref(x.p);
      r.ts     = 16'((x.g >> 20) & 48'hFFFF);
      if (r.ts < last_ts) m_tswrap++;
      last_ts = r.ts;
      f = flow_of(r.flowid);
      if (f < 0) begin m_unknown++; continue; end
      dir = 0;
      foreach (dir_cyc[f][j]) if (dir_cyc[f][j] == x.n) dir = 1;
      ent.r = r;
      ent.num = nextd_t'(nd[f]);
      if (dir) begin
        dir_exp.push_back('{x.n + 2, REP_DIRECT, ent});
        nd[f]++;
        m_direct++;
        ent.r.digest = '1;
        ent.r.ts     = '1;
      end
      fifo.push_back(ent);
      if (fifo.size() > BUF_DEPTH) begin
        entry_t e;
        int fe;
        e  = fifo.pop_front();
        fe = flow_of(e.r.flowid);
        m_evict++;
        // tracker writes visible to this lookup
        while (ti < trk_log.size() && trk_log[ti].n <= x.n + 2) begin
          if (trk_log[ti].v) trk[{trk_log[ti].flow, 8'(trk_log[ti].num)}] = trk_log[ti].e;
          else trk.delete({trk_log[ti].flow, 8'(trk_log[ti].num)});
          ti++;
        end
        if (e.r.digest == '1 && e.r.ts == '1) begin
          int cnt;
          cnt = 0;
          foreach (dir_cyc[fe][j]) if (dir_cyc[fe][j] <= x.n + 1) cnt++;
          if (nextd_t'(e.num + 1) == nextd_t'(cnt)) begin
            ev_exp.push_back('{x.n + 5, REP_LATE, e});
            m_late++;
          end
        end else if (!trk.exists({fe, 8'(e.num)})) begin
          m_nodisc++;
        end else begin
          trk_entry_t d;
          d = trk[{fe, 8'(e.num)}];
          if (in_quiet_ref(e.r.ts, d.ts, QUIET)) begin
            m_quiet++;
            if (d.overflow || d.ts < e.r.ts) m_quiet_wrap++;
          end else if (sel_hash_ref(e.r.digest, d.digest) < SEL) begin
            ev_exp.push_back('{x.n + 5, REP_DELAYED, e});
            m_delayed++;
          end else begin
            m_sel_rej++;
          end
        end
      end
    end
  endfunction

  task automatic compare(string what, ref out_rec_t exp_q[$], ref out_rec_t obs_q[$]);
    checks++;
    if (exp_q.size() != obs_q.size()) begin
      failures++;
      $display("FAIL %s: %0d expected, %0d observed", what, exp_q.size(), obs_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < obs_q.size(); i++) begin
      checks++;
      if (exp_q[i].n != obs_q[i].n || exp_q[i].kind != obs_q[i].kind || exp_q[i].e != obs_q[i].e) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s #%0d: expected cycle %0d kind %0d %h, observed cycle %0d kind %0d %h",
                   what, i, exp_q[i].n, exp_q[i].kind, exp_q[i].e, obs_q[i].n, obs_q[i].kind, obs_q[i].e);
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int sent = 0;
    int m_direct, m_delayed, m_late, m_quiet, m_quiet_wrap, m_sel_rej, m_nodisc, m_evict, m_unknown, m_nonip, m_tswrap;
    for (int i = 0; i < NFLOW_USED; i++) begin
      srcs[i] = {8'd10, 8'(i), 8'd1, 8'd0};
      dsts[i] = {8'd192, 8'd168, 8'(i), 8'd0};
      keys[i] = {srcs[i][31:8], dsts[i][31:8]};
    end
    gts = 48'(65536 - 300) << 20;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NFLOW_USED; i++) begin
      @(negedge clk);
      f_we = 1; f_idx = FIDX_W'(i); f_valid = 1; f_key = keys[i];
    end
    @(negedge clk);
    f_we = 0;
    for (int i = 0; i < NFLOW_USED; i++) set_rate(i, (i == 0) ? 32'd650000 : 32'd250000);
    ctrl_on = 1;
    while (sent < NPKT) begin
      int burst;
      burst = $urandom_range(20, 200);
      for (int b = 0; b < burst && sent < NPKT; b++) begin
        pkt_t p;
        int kind, f;
        bit ipv4;
        kind = $urandom_range(0, 99);
        f    = $urandom_range(0, NFLOW_USED - 1);
        ipv4 = 1;
        @(negedge clk);
        if (kind < 3) p = rand_pkt($urandom, $urandom);                 // unknown flow
        else p = rand_pkt(srcs[f] | 32'($urandom_range(0, 255)), dsts[f] | 32'($urandom_range(0, 255)));
        if (kind >= 3 && kind < 5) begin p.ethertype = 16'h86DD; ipv4 = 0; end
        gts = gts + 48'($urandom_range(0, 1 << 19));
        pkt_valid = 1;
        pkt_hdr = make_hdr(p);
        in_log.push_back('{cyc, p, ipv4, gts, r_low, r_high});
        sent++;
      end
      @(negedge clk);
      pkt_valid = 0;
      // occasional idle gap and rate update while the pipeline is empty
      if (($urandom % 4) == 0) begin
        repeat (8) @(negedge clk);
        // leave the boost phase while the pipeline is empty
        if (sent >= BOOST_PKTS) begin r_low = R_LOW; r_high = R_HIGH; end
        // move the clock to just before the next wrap of the 16-bit ticks
        if (($urandom % 2) == 0) gts = (((gts >> 36) + 48'd1) << 36) - (48'd3 << 20);
        set_rate($urandom_range(0, NFLOW_USED - 1), (($urandom % 2) == 1) ? 32'd650000 : 32'd250000);
      end
    end
    repeat (40) @(negedge clk);
    run_model(m_direct, m_delayed, m_late, m_quiet, m_quiet_wrap, m_sel_rej, m_nodisc, m_evict,
              m_unknown, m_nonip, m_tswrap);
    compare("direct disclosures", dir_exp, dir_obs);
    compare("evicted reports", ev_exp, ev_obs);
    // the event flags must agree with the model's counts
    checks++;
    if (obs_quiet != m_quiet || obs_nodisc != m_nodisc) begin
      failures++;
      $display("FAIL flags: quiet %0d/%0d no_disc %0d/%0d", obs_quiet, m_quiet, obs_nodisc, m_nodisc);
    end
    $display("mechanisms (packets sent %0d):", sent);
    need("direct disclosure", m_direct);
    need("marker evicted", obs_marker);
    need("buffer wrap / eviction", m_evict);
    need("delayed disclosure", m_delayed);
    need("quiet-time rejection", m_quiet);
    need("quiet-time rejection, wrap", m_quiet_wrap);
    need("selection-hash rejection", m_sel_rej);
    need("no disclosure in tracker", m_nodisc);
    need("late disclosure warning", m_late);
    need("high-rate disclosure range", obs_high);
    need("unknown flow", m_unknown);
    need("non-IPv4 frame", m_nonip);
    need("timestamp wrap", m_tswrap);
    need("register ring wrap", int'(disc_count > DISC_DEPTH));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
