// tb_rps_crc32: checks the CRC-32 unit against the standard check value of
// "123456789" (0xCBF43926) and against a table-driven reference on random
// 48-byte and 8-byte strings.
module tb_rps_crc32;
  import rps_tb_pkg::*;

  int checks = 0, failures = 0;

  logic [8*9-1:0]  d9;
  logic [8*48-1:0] d48;
  logic [8*8-1:0]  d8;
  logic [31:0]     c9, c48, c8;

  rps_crc32 #(.NBYTES(9)) u9  (.data_i(d9),  .crc_o(c9));
  rps_crc32               u48 (.data_i(d48), .crc_o(c48));
  rps_crc32 #(.NBYTES(8)) u8  (.data_i(d8),  .crc_o(c8));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
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
    bytes_t b;
    string s = "123456789";
    for (int i = 0; i < 9; i++) d9[8*i +: 8] = s[i];
    #1;
    check("check value", c9, 32'hCBF43926);
    for (int t = 0; t < 200; t++) begin
      b.delete();
      for (int i = 0; i < 48; i++) begin
        b.push_back(8'($urandom));
        d48[8*i +: 8] = b[i];
      end
      #1;
      check("48 bytes", c48, crc32_ref(b));
      b.delete();
      for (int i = 0; i < 8; i++) begin
        b.push_back(8'($urandom));
        d8[8*i +: 8] = b[i];
      end
      #1;
      check("8 bytes", c8, crc32_ref(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
