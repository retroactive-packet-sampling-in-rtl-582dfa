// rps_crc32: combinational CRC-32 of a fixed-length byte string.
//
// The sampler needs a hash with good spreading that a switch pipeline can
// compute at line rate; the CRC-32 of ISO 3309 / IEEE 802.3 (the Ethernet
// frame check sequence) replaces the cryptographic MAC of the original
// algorithm. It is used twice: for the 32-bit packet digest over the 48
// non-mutable header bytes, and for the selection hash over the digests of a
// buffered receipt and its direct disclosure.
//
// Algorithm: reflected polynomial 0xEDB88320, initial value 0xFFFFFFFF, final
// xor 0xFFFFFFFF, bytes taken in order data_i[7:0] first, each byte LSB first.
// The standard check value of "123456789" is 0xCBF43926.
//
// Interface: data_i (NBYTES bytes, byte k in bits [8k+7:8k]) -> crc_o.
// Timing: purely combinational; the caller registers the result.
module rps_crc32 #(
  parameter int unsigned NBYTES = 48
) (
  input  logic [8*NBYTES-1:0] data_i,
  output logic [31:0]         crc_o
);

  localparam logic [31:0] POLY_REFL = 32'hEDB88320;

  always_comb begin
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int unsigned k = 0; k < NBYTES; k++) begin
      c = c ^ {24'h0, data_i[8*k +: 8]};
      for (int unsigned b = 0; b < 8; b++) begin
        c = c[0] ? ((c >> 1) ^ POLY_REFL) : (c >> 1);
      end
    end
    crc_o = ~c;
  end

endmodule
