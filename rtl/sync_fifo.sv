// sync_fifo -- single-clock FIFO used for the buffers inside a transfer stage
// and for the router input buffers.
//
// A DEPTH-entry circular buffer with a read and a write index and an
// occupancy counter. Interface: push when in_valid && in_ready (in_ready =
// not full); out_valid = not empty, out_data is the oldest entry
// (fall-through), pop when out_valid && out_ready. A push into a full FIFO
// is refused. `count` gives the current occupancy. Push and pop may happen
// in the same cycle; a word pushed in cycle t can be popped in cycle t+1.
// Any depth >= 1 is allowed. This helper is this design's own.
module sync_fifo #(
  parameter int DATA_W = 32,
  parameter int DEPTH  = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [DATA_W-1:0]          in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [DATA_W-1:0]          out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0] wr_idx, rd_idx;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_idx];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] i);
    return (i == AW'(DEPTH - 1)) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_idx <= '0;
      rd_idx <= '0;
      count  <= '0;
    end else begin
      if (push) wr_idx <= inc(wr_idx);
      if (pop)  rd_idx <= inc(rd_idx);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_idx] <= in_data;
  end
endmodule
