// wb_arbiter -- weight-based (weighted round-robin) packet arbiter, the
// arbitration used for the transfer-stage multiplexers M1, M2 and M3.
//
// Each input i has a weight: the number of layers whose traffic can reach the
// multiplexer through that input. The arbiter lets the current input send up
// to weight[i] whole packets in a row (if it has them), then moves on to the
// next requesting input in round-robin order, which again gets up to its
// weight in packets. A layer therefore gets the same share of the output
// whatever its distance, instead of the nearest layer taking half of it as
// plain round-robin would. This rule follows the source design.
// Packets are never interleaved: once the first flit of a packet is granted,
// the grant stays on that input until its EOM flit has been transferred
// (wormhole). Weights are ports so one module serves every stage; a weight
// of 0 behaves as 1. When the current input has used its weight and no other
// input is requesting, it starts a new turn (work conserving).
//
// Interface: req[i] = input i has a flit at its head, eom[i] = that flit is
// the last of its packet. gnt is one-hot (combinational from req and state),
// gnt_valid = some input granted. `accept` says the granted flit was taken
// this cycle. Timing: no added latency, grant in the same cycle as request.
module wb_arbiter #(
  parameter int N  = 2,
  parameter int WW = 3                 // weight width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic [N-1:0]  eom,
  input  logic [WW-1:0] weight [N],
  input  logic          accept,
  output logic [N-1:0]  gnt,
  output logic          gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] cur;       // input owning the current turn
  logic [WW-1:0] cnt;       // packets sent by cur in this turn
  logic          locked;    // inside a packet

  logic [IW-1:0] sel;
  logic [WW-1:0] sel_cnt;
  logic          sel_valid;

  function automatic logic [WW-1:0] eff_w(logic [WW-1:0] w);
    return (w == '0) ? WW'(1) : w;
  endfunction

  always_comb begin
    sel       = cur;
    sel_cnt   = cnt;
    sel_valid = 1'b0;
    if (locked) begin
      sel_valid = req[cur];
    end else if (req[cur] && cnt < eff_w(weight[cur])) begin
      sel_valid = 1'b1;
      sel_cnt   = cnt + 1'b1;
    end else begin
      // next requesting input after cur, round robin
      for (int k = N - 1; k >= 1; k--) begin
        if (req[(int'(cur) + k) % N]) begin
          sel       = IW'((int'(cur) + k) % N);
          sel_valid = 1'b1;
          sel_cnt   = WW'(1);
        end
      end
      if (!sel_valid && req[cur]) begin
        sel_valid = 1'b1;
        sel_cnt   = WW'(1);
      end
    end
  end

  always_comb begin
    gnt = '0;
    if (sel_valid) gnt[sel] = 1'b1;
  end
  assign gnt_valid = sel_valid;
  assign gnt_idx   = sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur    <= '0;
      cnt    <= '0;
      locked <= 1'b0;
    end else if (sel_valid && accept) begin
      if (!locked) begin
        cur <= sel;
        cnt <= sel_cnt;
      end
      locked <= !eom[sel];
    end
  end

`ifndef SYNTHESIS
  // A granted packet keeps its grant until its last flit has gone.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (locked && !req[cur]) |-> !gnt_valid;
  endproperty
  a_hold: assert property (p_hold);
`endif
endmodule
