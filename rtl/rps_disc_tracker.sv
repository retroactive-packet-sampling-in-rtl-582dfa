// rps_disc_tracker: the disclosure tracker, a table of direct disclosures.
//
// When a receipt leaves the buffer the sampler must find the direct
// disclosure it belongs to: the first direct disclosure of the same flow after
// the receipt arrived. Receipts carry that disclosure's number, so the lookup
// is an exact match on (flow slot, disclosure number) and no range match on
// timestamps is needed. The controller fills the table from the direct
// disclosures it polls, adding the fields the pipeline cannot compute itself:
// the quiet-time bound ts_q = ts - (kappa - mu) and a flag telling that this
// subtraction wrapped around.
//
// The table covers the whole key space, NUM_FLOWS x 2^NEXTD_W entries, so the
// key is the address; a valid bit per entry is cleared at reset. This direct
// mapping is this block's choice; the description only says the tracker is an
// exact-match table written by the controller. The valid bits form one
// 65,536-bit vector at the default size, so clearing it at reset is a
// replication wider than lint's default limit; that warning is expected.
//
// Interface: rd_flow_i/rd_num_i are looked up with one cycle of latency
// (rd_hit_o, rd_entry_o registered). The controller writes through
// ctrl_we_i; a write with ctrl_valid_i = 0 removes an entry. A write and a
// read of the same key in one cycle return the old contents.
module rps_disc_tracker
  import rps_pkg::*;
#(
  parameter int unsigned NUM_FLOWS = 256,
  localparam int unsigned IDX_W = (NUM_FLOWS > 1) ? $clog2(NUM_FLOWS) : 1,
  localparam int unsigned N     = NUM_FLOWS << NEXTD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] rd_flow_i,
  input  nextd_t           rd_num_i,
  output logic             rd_hit_o,
  output trk_entry_t       rd_entry_o,
  input  logic             ctrl_we_i,
  input  logic [IDX_W-1:0] ctrl_flow_i,
  input  nextd_t           ctrl_num_i,
  input  logic             ctrl_valid_i,
  input  trk_entry_t       ctrl_entry_i
);

  trk_entry_t     mem [N];
  logic [N-1:0]   valid_q;

  logic [IDX_W+NEXTD_W-1:0] rd_addr, wr_addr;
  assign rd_addr = {rd_flow_i, rd_num_i};
  assign wr_addr = {ctrl_flow_i, ctrl_num_i};

  always_ff @(posedge clk) begin
    rd_entry_o <= mem[rd_addr];
    if (ctrl_we_i) mem[wr_addr] <= ctrl_entry_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      rd_hit_o <= 1'b0;
    end else begin
      rd_hit_o <= valid_q[rd_addr];
      if (ctrl_we_i) valid_q[wr_addr] <= ctrl_valid_i;
    end
  end

endmodule
