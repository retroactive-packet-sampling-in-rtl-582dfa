// rps_disc_regs: register array through which direct disclosures reach the
// controller.
//
// Direct disclosures are time-critical: the controller must put them into the
// disclosure tracker before the receipts they select leave the buffer. Rather
// than waiting for batched digest messages, the data plane writes each direct
// disclosure into a ring of DEPTH registers and advances a tracking index; the
// controller polls the index and reads the new entries. DEPTH = 4000 follows
// the design description (headroom for about 10,000 disclosures/s with
// polling reads of a few microseconds). A 32-bit total count lets the
// controller detect that the ring was overrun; that counter is this block's
// addition.
//
// Interface: we_i/entry_i write one entry per cycle at wr_idx_o, which then
// advances and wraps. rd_addr_i is read with one cycle latency on rd_data_o.
module rps_disc_regs
  import rps_pkg::*;
#(
  parameter int unsigned DEPTH = 4000,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we_i,
  input  entry_t           entry_i,
  input  logic [IDX_W-1:0] rd_addr_i,
  output entry_t           rd_data_o,
  output logic [IDX_W-1:0] wr_idx_o,
  output logic [31:0]      wr_count_o
);

  entry_t           mem [DEPTH];
  logic [IDX_W-1:0] idx_q;
  logic [31:0]      count_q;

  always_ff @(posedge clk) begin
    rd_data_o <= mem[rd_addr_i];
    if (we_i) mem[idx_q] <= entry_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q   <= '0;
      count_q <= '0;
    end else if (we_i) begin
      idx_q   <= (idx_q == IDX_W'(DEPTH - 1)) ? '0 : idx_q + IDX_W'(1);
      count_q <= count_q + 32'd1;
    end
  end

  assign wr_idx_o   = idx_q;
  assign wr_count_o = count_q;

endmodule
