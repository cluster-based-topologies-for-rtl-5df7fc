// ts_unit -- output buffer and controller of one direction of a pipeline-bus
// transfer stage (the "TS unit"). It holds packets waiting to go to the next
// stage and chooses which one goes next so that a packet blocked at the next
// stage does not hold up packets that could proceed (non-blocking scheme).
//
// Storage: a DEPTH-flit buffer whose entries are chained as linked lists, one
// list per packet, plus a packet table. A table row holds a valid tag (v),
// the packet type (T: single-hop SH if the destination is the next stage's
// layer, otherwise multi-hop MH), an age (A) and a head pointer (P); this
// implementation adds the tail pointer, the number of stored-but-unsent flits
// and an "EOM stored" flag, which appending and draining need. Free entries
// are kept in a bitmap and the lowest free one is taken. Because packets
// leave in a different order than they came, flits are freed out of order,
// which is why the buffer is linked rather than circular.
//
// Selection: the next stage has two paths, SH (its interface buffer) and MH
// (its own forwarding buffer). Their stress values are known here through
// credit counters: credits = free slots at the next stage, stress =
// capacity - credits. A path can be used if it has a credit and a packet of
// that type is waiting; of the usable paths the one with the lower stress
// wins (SH on a tie), and of the packets of that type the oldest (highest
// age, lowest row on a tie) is chosen. Then the age of every other waiting
// packet of the same type is increased (saturating) so none starves. Table
// fields, the stress-based choice and the ageing rule follow the source
// design; the credit counters as the carrier of the stress value, the tie
// rules and the saturating age are this design's choices.
// A chosen packet keeps the output until its EOM flit is sent (wormhole); it
// stalls, without switching, while its path has no credit or its next flit
// has not arrived yet.
//
// Interface: in_* is a valid/ready input; packets arrive contiguously (the
// multiplexer in front never interleaves them). out_valid/out_flit/out_sh
// present one flit per cycle; it is sent whenever out_valid is high (credit
// flow control, no ready). sh_credit_ret/mh_credit_ret return one credit each.
// nb_event pulses when a packet is chosen while a packet of the other type
// is waiting on a path that has no credit (the overtake the scheme exists
// for). Timing: a flit written in cycle t can leave in cycle t+1.
module ts_unit
  import noc_pkg::*;
#(
  parameter int DEPTH      = 6,   // flits in the buffer
  parameter int NEXT_LAYER = 1,   // layer of the next stage in this direction
  parameter int SH_CAP     = 6,   // buffer size of the next stage's SH path
  parameter int MH_CAP     = 6,   // buffer size of the next stage's MH path
  parameter int AGE_W      = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the multiplexer in front (M1 or M2)
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  // to the segment towards the next stage
  output logic  out_valid,
  output flit_t out_flit,
  output logic  out_sh,          // flit travels on the next stage's SH path
  input  logic  sh_credit_ret,
  input  logic  mh_credit_ret,
  // observation
  output logic  nb_event,
  output logic [$clog2(DEPTH+1)-1:0] used
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;    // pointer / row index
  localparam int CW = $clog2(DEPTH + 1);
  localparam int SW = $clog2(((SH_CAP > MH_CAP) ? SH_CAP : MH_CAP) + 1);

  typedef struct packed {
    logic          v;      // row in use
    logic          t;      // 1 = SH, 0 = MH
    logic [AGE_W-1:0] a;   // age
    logic [PW-1:0] p;      // head pointer
    logic [PW-1:0] tail;   // last stored flit
    logic [CW-1:0] cnt;    // stored, not yet sent flits
    logic          done;   // EOM flit stored
  } row_t;

  row_t          tbl   [DEPTH];
  flit_t         bflit [DEPTH];
  logic [PW-1:0] bnext [DEPTH];
  logic [DEPTH-1:0] ent_free;

  logic          wr_active;          // inside an incoming packet
  logic [PW-1:0] wr_row;
  logic          out_lock;
  logic [PW-1:0] out_row;
  logic [SW-1:0] sh_cred, mh_cred;

  // ---------------- allocation ----------------
  logic          ent_found, row_found;
  logic [PW-1:0] ent_sel, row_sel;
  always_comb begin
    ent_found = 1'b0; ent_sel = '0;
    row_found = 1'b0; row_sel = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (ent_free[i]) begin ent_found = 1'b1; ent_sel = PW'(i); end
      if (!tbl[i].v)   begin row_found = 1'b1; row_sel = PW'(i); end
    end
  end

  assign in_ready = ent_found && (!is_bom(in_flit) || row_found);
  wire   push     = in_valid && in_ready;
  wire [PW-1:0] push_row = is_bom(in_flit) ? row_sel : wr_row;

  // ---------------- selection ----------------
  logic          cand_sh, cand_mh;        // a packet of that type waits
  logic [PW-1:0] best_sh, best_mh;
  logic [AGE_W-1:0] age_sh, age_mh;
  always_comb begin
    cand_sh = 1'b0; cand_mh = 1'b0;
    best_sh = '0;   best_mh = '0;
    age_sh  = '0;   age_mh  = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (tbl[i].v && tbl[i].cnt != '0 && !(out_lock && out_row == PW'(i))) begin
        if (tbl[i].t) begin
          if (!cand_sh || tbl[i].a > age_sh) begin
            cand_sh = 1'b1; best_sh = PW'(i); age_sh = tbl[i].a;
          end
        end else begin
          if (!cand_mh || tbl[i].a > age_mh) begin
            cand_mh = 1'b1; best_mh = PW'(i); age_mh = tbl[i].a;
          end
        end
      end
    end
  end

  wire use_sh = cand_sh && (sh_cred != '0);
  wire use_mh = cand_mh && (mh_cred != '0);
  // stress = capacity - credits; compare stresses
  wire sh_less_stressed = (SW'(SH_CAP) - sh_cred) <= (SW'(MH_CAP) - mh_cred);

  logic          new_sel;      // a new packet is picked this cycle
  logic [PW-1:0] pick;
  always_comb begin
    new_sel = 1'b0;
    pick    = best_sh;
    if (!out_lock) begin
      if (use_sh && (!use_mh || sh_less_stressed)) begin
        new_sel = 1'b1; pick = best_sh;
      end else if (use_mh) begin
        new_sel = 1'b1; pick = best_mh;
      end
    end
  end

  wire [PW-1:0] rd_row = out_lock ? out_row : pick;
  wire rd_has_cred = tbl[rd_row].t ? (sh_cred != '0) : (mh_cred != '0);
  assign out_valid = (out_lock ? (tbl[out_row].cnt != '0 && rd_has_cred) : new_sel);
  assign out_flit  = bflit[tbl[rd_row].p];
  assign out_sh    = tbl[rd_row].t;
  assign nb_event  = new_sel && (tbl[pick].t ? (cand_mh && mh_cred == '0)
                                             : (cand_sh && sh_cred == '0));

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) tbl[i] <= '0;
      ent_free  <= '1;
      wr_active <= 1'b0;
      wr_row    <= '0;
      out_lock  <= 1'b0;
      out_row   <= '0;
      sh_cred   <= SW'(SH_CAP);
      mh_cred   <= SW'(MH_CAP);
    end else begin
      logic [DEPTH-1:0] fr;
      fr = ent_free;
      // ageing on a new selection
      if (new_sel) begin
        for (int i = 0; i < DEPTH; i++) begin
          if (tbl[i].v && PW'(i) != pick && tbl[i].t == tbl[pick].t &&
              tbl[i].a != '1)
            tbl[i].a <= tbl[i].a + 1'b1;
        end
      end
      // read side
      if (out_valid) begin
        fr[tbl[rd_row].p] = 1'b1;
        if (tbl[rd_row].cnt != CW'(1))
          tbl[rd_row].p <= bnext[tbl[rd_row].p];
        else if (push && push_row == rd_row && !is_bom(in_flit))
          tbl[rd_row].p <= ent_sel;          // link being written this cycle
        if (is_eom(out_flit)) begin
          tbl[rd_row].v <= 1'b0;
          out_lock      <= 1'b0;
        end else begin
          out_lock <= 1'b1;
          out_row  <= rd_row;
        end
      end
      // write side
      if (push) begin
        fr[ent_sel] = 1'b0;
        if (is_bom(in_flit)) begin
          tbl[row_sel].v    <= 1'b1;
          tbl[row_sel].t    <= (int'(hdr_layer(in_flit)) == NEXT_LAYER);
          tbl[row_sel].a    <= '0;
          tbl[row_sel].p    <= ent_sel;
          tbl[row_sel].tail <= ent_sel;
          tbl[row_sel].done <= is_eom(in_flit);
          wr_row            <= row_sel;
        end else begin
          bnext[tbl[wr_row].tail] <= ent_sel;
          tbl[wr_row].tail <= ent_sel;
          tbl[wr_row].done <= is_eom(in_flit);
          if (tbl[wr_row].cnt == '0)
            tbl[wr_row].p <= ent_sel;
        end
        wr_active <= !is_eom(in_flit);
      end
      ent_free <= fr;
      // flit counts per row
      for (int i = 0; i < DEPTH; i++) begin
        tbl[i].cnt <= tbl[i].cnt
                      + CW'(push && push_row == PW'(i))
                      - CW'(out_valid && rd_row == PW'(i));
        if (push && is_bom(in_flit) && row_sel == PW'(i))
          tbl[i].cnt <= CW'(1);
      end
      // credits
      sh_cred <= sh_cred + SW'(sh_credit_ret) - SW'(out_valid &&  tbl[rd_row].t);
      mh_cred <= mh_cred + SW'(mh_credit_ret) - SW'(out_valid && !tbl[rd_row].t);
    end
  end

  always_ff @(posedge clk) begin
    if (push) bflit[ent_sel] <= in_flit;
  end

  always_comb begin
    used = '0;
    for (int i = 0; i < DEPTH; i++) used += CW'(!ent_free[i]);
  end

`ifndef SYNTHESIS
  // A body flit only arrives inside a packet, a header only outside one.
  a_contig: assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid |-> (is_bom(in_flit) != wr_active));
  a_cred:   assert property (@(posedge clk) disable iff (!rst_n)
                             sh_cred <= SW'(SH_CAP) && mh_cred <= SW'(MH_CAP));
`endif
endmodule
