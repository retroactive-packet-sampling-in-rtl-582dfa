// rps_receipt_buffer: the circular FIFO receipt buffer of the sampler.
//
// The original algorithm removes all receipts of a flow at a direct
// disclosure, which needs a loop over the buffer. Here every packet instead
// performs exactly one buffer operation: its entry replaces the oldest entry,
// at the single head pointer, and the oldest entry is handed on (evicted) to be
// checked for a delayed disclosure. Because the buffer is always written in
// order, the head is also the tail; entries leave strictly in arrival order.
//
// Until the pointer has wrapped once the slot under it has never been written,
// so a fill flag, not a valid bit per slot, tells whether the evicted entry
// is real. The memory itself needs no reset.
//
// Interface: wr_valid_i/wr_entry_i write one entry per cycle. One cycle later
// ev_valid_o/ev_entry_o give the entry that occupied the slot (read before
// write). ptr_o is the head index, full_o tells that the buffer has wrapped.
// DEPTH is the number of 16-bit-register receipt slots that fit one Tofino
// pipeline (286,733), as given in the design description.
// rst_n also disables an assertion during reset ("disable iff"); lint reports
// that as a synchronous use of the asynchronous reset, which it is not for the
// flops.
module rps_receipt_buffer
  import rps_pkg::*;
#(
  parameter int unsigned DEPTH = 286733,
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid_i,
  input  entry_t           wr_entry_i,
  output logic             ev_valid_o,
  output entry_t           ev_entry_o,
  output logic [PTR_W-1:0] ptr_o,
  output logic             full_o
);

  entry_t           mem [DEPTH];
  logic [PTR_W-1:0] ptr_q;
  logic             full_q;

  always_ff @(posedge clk) begin
    if (wr_valid_i) begin
      ev_entry_o <= mem[ptr_q];
      mem[ptr_q] <= wr_entry_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q      <= '0;
      full_q     <= 1'b0;
      ev_valid_o <= 1'b0;
    end else begin
      ev_valid_o <= wr_valid_i && full_q;
      if (wr_valid_i) begin
        if (ptr_q == PTR_W'(DEPTH - 1)) begin
          ptr_q  <= '0;
          full_q <= 1'b1;
        end else begin
          ptr_q <= ptr_q + PTR_W'(1);
        end
      end
    end
  end

  assign ptr_o  = ptr_q;
  assign full_o = full_q;

  a_ptr_range : assert property (@(posedge clk) disable iff (!rst_n)
    32'(ptr_q) < DEPTH);

endmodule
