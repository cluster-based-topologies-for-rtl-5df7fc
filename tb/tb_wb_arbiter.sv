// tb_wb_arbiter -- self-checking test of the weight-based packet arbiter.
// Three inputs with weights 3, 1, 2 always hold packets of random length
// (1-3 flits). A reference model, written from the arbitration rule, works
// out which input must own each packet, and the test compares it with the
// arbiter's grant every cycle: up to weight[i] packets in a row from the
// current input, then the next requesting input in round-robin order, no
// interleaving inside a packet. With all inputs saturated the shares of
// packets must be 3:1:2. A second phase makes requests random and checks the
// same model, including the work-conserving restart when only one input
// requests, and that a grant never goes to an input without a request.
module tb_wb_arbiter;
  localparam int N = 3, WW = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] req, eom, gnt;
  logic [WW-1:0] weight [N];
  logic accept, gv;
  logic [1:0] gi;

  wb_arbiter #(.N(N), .WW(WW)) dut (.clk, .rst_n, .req, .eom, .weight, .accept,
                                    .gnt, .gnt_valid(gv), .gnt_idx(gi));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // per input: remaining flits of the packet at its head
  int rem [N];
  int pkts [N];
  int sat = 1;
  // reference state
  int m_cur = 0, m_cnt = 0;
  bit m_lock = 0;

  function automatic int model_pick();
    if (m_lock) return req[m_cur] ? m_cur : -1;
    if (req[m_cur] && m_cnt < weight[m_cur]) return m_cur;
    for (int k = 1; k < N; k++) if (req[(m_cur + k) % N]) return (m_cur + k) % N;
    if (req[m_cur]) return m_cur;
    return -1;
  endfunction

  initial begin
    weight[0] = 3; weight[1] = 1; weight[2] = 2;
    for (int i = 0; i < N; i++) begin rem[i] = 1 + $urandom % 3; pkts[i] = 0; end
  end

  always_comb
    for (int i = 0; i < N; i++) eom[i] = (rem[i] == 1);

  initial begin req = '1; accept = 1; end

  always @(posedge clk) if (rst_n) begin
    int exp_g;
    exp_g = model_pick();
    check(exp_g < 0 ? !gv : (gv && gi == 2'(exp_g) && gnt == N'(1 << exp_g)),
          $sformatf("grant %0d/%b, expected %0d", gi, gnt, exp_g));
    check((gnt & ~req) == '0, "grant without request");
    if (exp_g >= 0 && accept) begin
      if (!m_lock) begin
        if (exp_g == m_cur && m_cnt < weight[m_cur]) m_cnt++;
        else m_cnt = 1;
        m_cur = exp_g;
      end
      m_lock = (rem[exp_g] != 1);
      if (rem[exp_g] == 1) begin
        pkts[exp_g]++;
        rem[exp_g] <= 1 + $urandom % 3;
      end else rem[exp_g] <= rem[exp_g] - 1;
    end
    // next cycle's stimulus (a started packet keeps requesting in phase 1)
    if (sat) req <= '1;
    else for (int i = 0; i < N; i++) req[i] <= ($urandom % 3 == 0);
    accept <= sat ? 1'b1 : ($urandom % 4 != 0);
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    begin
      real s0, s1, s2, t;
      t  = pkts[0] + pkts[1] + pkts[2];
      s0 = pkts[0] / t; s1 = pkts[1] / t; s2 = pkts[2] / t;
      $display("saturated shares: %0d %0d %0d", pkts[0], pkts[1], pkts[2]);
      check(s0 > 0.47 && s0 < 0.53 && s1 > 0.14 && s1 < 0.19 && s2 > 0.31 && s2 < 0.36,
            "shares not 3:1:2");
    end
    sat = 0;
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
