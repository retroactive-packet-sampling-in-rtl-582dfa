// tb_rps_receipt_buffer: writes entries with random gaps into a 7-slot buffer
// and checks that, once full, every write evicts exactly the entry written
// DEPTH writes earlier, one cycle later, and that nothing is evicted before
// the buffer has wrapped.
module tb_rps_receipt_buffer;
  import rps_pkg::*;

  localparam int unsigned DEPTH = 7;

  int checks = 0, failures = 0, n_ev = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   wr_valid = 0;
  entry_t wr_entry;
  logic   ev_valid, full;
  entry_t ev_entry;
  logic [2:0] ptr;

  rps_receipt_buffer #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .wr_valid_i(wr_valid), .wr_entry_i(wr_entry),
    .ev_valid_o(ev_valid), .ev_entry_o(ev_entry), .ptr_o(ptr), .full_o(full)
  );

  entry_t model[$];
  bit     exp_valid;
  entry_t exp_entry;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int writes = 0;
    wr_entry = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      // outputs of the previous cycle's write
      if (exp_valid || ev_valid) begin
        checks++;
        if (ev_valid !== exp_valid || (exp_valid && ev_entry !== exp_entry)) begin
          failures++;
          $display("FAIL t=%0d ev_valid=%0d exp=%0d entry %h exp %h", t, ev_valid, exp_valid, ev_entry, exp_entry);
        end
      end
      exp_valid = 0;
      wr_valid = ($urandom % 4) != 0;
      wr_entry = {$urandom, $urandom, $urandom, 8'($urandom)};
      if (wr_valid) begin
        checks++;
        if (ptr !== 3'(writes % DEPTH)) begin
          failures++;
          $display("FAIL ptr %0d expected %0d", ptr, writes % DEPTH);
        end
        model.push_back(wr_entry);
        if (model.size() > DEPTH) begin
          exp_valid = 1;
          exp_entry = model.pop_front();
          n_ev++;
        end
        writes++;
      end
    end
    if (n_ev == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
