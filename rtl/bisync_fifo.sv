// bisync_fifo -- bi-synchronous (dual-clock) FIFO for the host port of a
// pipeline-bus transfer stage, so that each layer can run from its own clock.
//
// How it works: a DEPTH-entry memory is written in the write_clk domain and
// read in the read_clk domain. Each side keeps a binary pointer one bit wider
// than the address and a Gray-coded copy of it. The Gray write pointer is
// passed through a two-flop synchroniser into the read domain, where it is
// compared with the read pointer to make `empty`; the Gray read pointer is
// passed the other way to make `full`. Because consecutive Gray codes differ
// in one bit, a pointer caught mid-change is off by at most one position, so
// no handshake is needed. The pointer scheme and the signal set (write_data,
// write_req, write_clk, full, read_data, read_req, read_clk, empty) follow the
// source design; the per-domain active-low resets, the depth and the
// first-word-fall-through read port are this design's choices.
//
// Interface: a write happens on write_clk when write_req && !full; a read
// happens on read_clk when read_req && !empty. read_data shows the oldest
// entry whenever !empty (fall-through). Requests against full/empty are
// ignored.
// Timing: a written word becomes visible to the reader 2-3 read_clk edges
// later (synchroniser); freed space becomes visible to the writer 2-3
// write_clk edges after the read.
module bisync_fifo #(
  parameter int DATA_W = 32,
  parameter int DEPTH  = 8            // power of two
) (
  // write domain
  input  logic              write_clk,
  input  logic              write_rst_n,
  input  logic              write_req,
  input  logic [DATA_W-1:0] write_data,
  output logic              full,
  // read domain
  input  logic              read_clk,
  input  logic              read_rst_n,
  input  logic              read_req,
  output logic [DATA_W-1:0] read_data,
  output logic              empty
);
  localparam int AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer synchronised to write clock
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer synchronised to read clock
  logic [AW:0] wbin_nxt, rbin_nxt, wgray_nxt, rgray_nxt;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  wire do_write = write_req && !full;
  assign wbin_nxt  = wbin + (AW+1)'(do_write);
  assign wgray_nxt = bin2gray(wbin_nxt);

  always_ff @(posedge write_clk or negedge write_rst_n) begin
    if (!write_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= wgray_nxt;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge write_clk) begin
    if (do_write) mem[wbin[AW-1:0]] <= write_data;
  end

  // Full when the write pointer is one lap ahead: in Gray code the two top
  // bits differ and the rest match.
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // ---------------- read domain ----------------
  wire do_read = read_req && !empty;
  assign rbin_nxt  = rbin + (AW+1)'(do_read);
  assign rgray_nxt = bin2gray(rbin_nxt);

  always_ff @(posedge read_clk or negedge read_rst_n) begin
    if (!read_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= rgray_nxt;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign empty     = (rgray == wgray_r2);
  assign read_data = mem[rbin[AW-1:0]];

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("bisync_fifo: DEPTH must be a power of two >= 4");
  end
endmodule
