// tb_rps_quiet_check: random and boundary timestamps against the modular
// definition (d.ts - r.ts mod 2^16 <= kappa - mu), with ts_q and the wrap
// flag computed as the controller does.
module tb_rps_quiet_check;
  import rps_pkg::*;
  import rps_tb_pkg::*;

  int checks = 0, failures = 0, n_wrap = 0, n_quiet = 0;

  ts_t  r_ts, d_ts, ts_q;
  logic ovf, q;

  rps_quiet_check dut (.r_ts_i(r_ts), .d_ts_i(d_ts), .ts_q_i(ts_q), .overflow_i(ovf), .in_quiet_o(q));

  task automatic one(bit [15:0] r, bit [15:0] d, bit [15:0] quiet);
    r_ts = r; d_ts = d; ts_q = d - quiet; ovf = (d < quiet);
    #1;
    checks++;
    n_wrap  += int'(ovf);
    n_quiet += int'(q);
    if (q !== in_quiet_ref(r, d, quiet)) begin
      failures++;
      $display("FAIL r=%0d d=%0d q=%0d: got %0d", r, d, quiet, q);
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
    bit [15:0] d, quiet;
    for (int t = 0; t < 3000; t++) begin
      d     = (t % 4 == 0) ? 16'($urandom_range(0, 200)) : 16'($urandom);
      quiet = 16'($urandom_range(1, 400));
      one(16'($urandom), d, quiet);
      one(d - 16'($urandom_range(0, 500)), d, quiet);
      one(d - quiet, d, quiet);
      one(d - quiet - 16'd1, d, quiet);
      one(d, d, quiet);
      one(d + 16'd1, d, quiet);
    end
    if (n_wrap == 0 || n_quiet == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
