// tb_rps_flow_table: installs flows, sends random packets on port A and
// compares hit, slot, next disclosure number, direct decision and packet
// counters with a model; switches flows between the two disclosure ranges by
// writing rates above and below the threshold; probes port B; removes and
// reinstalls a flow.
module tb_rps_flow_table;
  import rps_pkg::*;

  localparam int unsigned NF = 8;
  localparam int unsigned IW = 3;

  int checks = 0, failures = 0, n_direct = 0, n_high = 0, n_miss = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rate_t   thresh = 437000;
  digest_t r_low  = 32'h4000_0000, r_high = 32'h0800_0000;
  logic    a_valid = 0;
  flowid_t a_flowid = '0, b_flowid = '0;
  digest_t a_digest = '0;
  logic a_hit, a_direct, a_high, b_hit;
  logic [IW-1:0] a_idx, b_idx;
  nextd_t a_nd, b_nd;
  logic f_we = 0, f_valid = 0, r_we = 0;
  logic [IW-1:0] f_idx = '0, r_idx = '0, rd_idx = '0;
  flowid_t f_key = '0;
  rate_t r_val = '0;
  logic [31:0] rd_count;
  nextd_t rd_nd;

  rps_flow_table #(.NUM_FLOWS(NF)) dut (
    .clk(clk), .rst_n(rst_n),
    .rate_thresh_i(thresh), .range_low_rate_i(r_low), .range_high_rate_i(r_high),
    .a_valid_i(a_valid), .a_flowid_i(a_flowid), .a_digest_i(a_digest),
    .a_hit_o(a_hit), .a_idx_o(a_idx), .a_next_d_o(a_nd), .a_direct_o(a_direct), .a_high_rate_o(a_high),
    .b_flowid_i(b_flowid), .b_hit_o(b_hit), .b_idx_o(b_idx), .b_next_d_o(b_nd),
    .ctrl_flow_we_i(f_we), .ctrl_flow_idx_i(f_idx), .ctrl_flow_valid_i(f_valid), .ctrl_flow_key_i(f_key),
    .ctrl_rate_we_i(r_we), .ctrl_rate_idx_i(r_idx), .ctrl_rate_i(r_val),
    .ctrl_rd_idx_i(rd_idx), .ctrl_rd_count_o(rd_count), .ctrl_rd_next_d_o(rd_nd)
  );

  flowid_t keys [NF];
  bit      inst [NF];
  rate_t   rates[NF];
  int      cnt  [NF];
  int      nd   [NF];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic install(int i, bit v);
    @(negedge clk);
    f_we = 1; f_idx = IW'(i); f_valid = v; f_key = keys[i];
    @(negedge clk);
    f_we = 0;
    inst[i] = v; cnt[i] = 0; nd[i] = 0;
  endtask

  task automatic set_rate(int i, rate_t v);
    @(negedge clk);
    r_we = 1; r_idx = IW'(i); r_val = v;
    @(negedge clk);
    r_we = 0;
    rates[i] = v;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f, exp_idx;
    bit exp_direct;
    for (int i = 0; i < NF; i++) begin
      keys[i] = {16'hA000 + 16'(i), $urandom};
      inst[i] = 0; rates[i] = 0; cnt[i] = 0; nd[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NF - 2; i++) install(i, 1);
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < NF - 2; i++) set_rate(i, (($urandom % 2) == 1) ? 32'd600000 : 32'd200000);
      for (int t = 0; t < 400; t++) begin
        @(negedge clk);
        f = $urandom_range(0, NF - 1);      // slots 6, 7 never installed -> miss
        a_valid  = 1;
        a_flowid = keys[f];
        a_digest = $urandom;
        b_flowid = keys[$urandom_range(0, NF - 1)];
        #1;
        check("hit", a_hit, inst[f]);
        if (inst[f]) begin
          exp_direct = a_digest < ((rates[f] >= thresh) ? r_high : r_low);
          check("idx", a_idx, f);
          check("next_d", a_nd, nd[f] % 256);
          check("direct", a_direct, exp_direct);
          check("high", a_high, rates[f] >= thresh);
          n_direct += int'(exp_direct);
          n_high   += int'(rates[f] >= thresh);
          cnt[f]++;
          if (exp_direct) nd[f]++;
        end else begin
          n_miss++;
          check("no direct on miss", a_direct, 0);
        end
        exp_idx = -1;
        for (int i = 0; i < NF; i++) if (inst[i] && keys[i] == b_flowid) exp_idx = i;
        check("b hit", b_hit, exp_idx >= 0);
        if (exp_idx >= 0) check("b idx", b_idx, exp_idx);
      end
      @(negedge clk);
      a_valid = 0;
      for (int i = 0; i < NF; i++) begin
        rd_idx = IW'(i);
        #1;
        if (inst[i]) begin
          check("count", rd_count, cnt[i]);
          check("ctrl next_d", rd_nd, nd[i] % 256);
          b_flowid = keys[i];
          #1;
          check("b next_d", b_nd, nd[i] % 256);
        end
      end
      // remove one flow, then reinstall it
      if (round == 1) install(2, 0);
      if (round == 2) install(2, 1);
    end
    if (n_direct == 0 || n_high == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL coverage direct=%0d high=%0d miss=%0d", n_direct, n_high, n_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
