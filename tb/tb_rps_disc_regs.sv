// tb_rps_disc_regs: writes direct disclosures into a 5-entry ring with random
// gaps, checks the write index, the total count and the wrap, and reads every
// slot back with one cycle of latency.
module tb_rps_disc_regs;
  import rps_pkg::*;

  localparam int unsigned DEPTH = 5;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       we = 0;
  entry_t     entry, rd_data;
  logic [2:0] rd_addr = 0, wr_idx;
  logic [31:0] count;

  rps_disc_regs #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .we_i(we), .entry_i(entry), .rd_addr_i(rd_addr),
    .rd_data_o(rd_data), .wr_idx_o(wr_idx), .wr_count_o(count)
  );

  entry_t model[DEPTH];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    entry = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      check("idx", wr_idx, n % DEPTH);
      check("count", count, n);
      we = ($urandom % 3) != 0;
      entry = {$urandom, $urandom, $urandom, 8'($urandom)};
      if (we) begin
        model[n % DEPTH] = entry;
        n++;
      end
      if (n >= DEPTH && t % 10 == 0) begin
        @(negedge clk);
        we = 0;
        for (int a = 0; a < DEPTH; a++) begin
          rd_addr = 3'(a);
          @(negedge clk);
          checks++;
          if (rd_data !== model[a]) begin
            failures++;
            $display("FAIL read %0d: %h expected %h", a, rd_data, model[a]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
