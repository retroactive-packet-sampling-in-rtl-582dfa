// tb_rps_disc_tracker: random writes, removals and lookups against an
// associative-array model; checks the one-cycle read latency and that
// nothing hits after reset.
module tb_rps_disc_tracker;
  import rps_pkg::*;

  localparam int unsigned NF = 4;

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] rd_flow = 0, wr_flow = 0;
  nextd_t     rd_num = 0, wr_num = 0;
  logic       rd_hit, we = 0, wvalid = 0;
  trk_entry_t rd_entry, wentry;

  rps_disc_tracker #(.NUM_FLOWS(NF)) dut (
    .clk(clk), .rst_n(rst_n), .rd_flow_i(rd_flow), .rd_num_i(rd_num),
    .rd_hit_o(rd_hit), .rd_entry_o(rd_entry),
    .ctrl_we_i(we), .ctrl_flow_i(wr_flow), .ctrl_num_i(wr_num),
    .ctrl_valid_i(wvalid), .ctrl_entry_i(wentry)
  );

  trk_entry_t model[int];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int key;
    bit exp_hit;
    trk_entry_t exp_e;
    wentry = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // write phase (takes effect at the next edge)
      we = ($urandom % 2) == 0;
      wr_flow = 2'($urandom); wr_num = nextd_t'($urandom_range(0, 15));
      wvalid = ($urandom % 5) != 0;
      wentry = {$urandom, 16'($urandom), 16'($urandom), 1'($urandom)};
      // read phase: sample the model before this cycle's write
      rd_flow = 2'($urandom); rd_num = nextd_t'($urandom_range(0, 15));
      key = {rd_flow, rd_num};
      exp_hit = model.exists(key);
      if (exp_hit) exp_e = model[key];
      if (we) begin
        if (wvalid) model[{wr_flow, wr_num}] = wentry;
        else if (model.exists({wr_flow, wr_num})) model.delete({wr_flow, wr_num});
      end
      @(negedge clk);
      we = 0;
      checks++;
      if (rd_hit !== exp_hit || (exp_hit && rd_entry !== exp_e)) begin
        failures++;
        $display("FAIL key %0h hit %0d exp %0d", key, rd_hit, exp_hit);
      end
      if (exp_hit) n_hit++; else n_miss++;
    end
    if (n_hit == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
