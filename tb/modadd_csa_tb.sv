// modadd_csa_tb: self-checking test of the multi-operand modulo N adder.
//
// Three instances run side by side: the default (n = 16, two resolvers),
// n = 16 with one resolver, and n = 4 with two resolvers (small enough that
// every partial-sum corner is hit often). Each gets random moduli with bit
// n-1 set, random operand counts k (including k = 1) and random operands
// below N, sometimes back to back and sometimes with idle gaps. The result
// is compared with the sum reduced modulo N in the testbench. For streams
// without gaps the cycle count from taking X_1 to seeing res_valid is
// checked: 2k - 2 accumulation cycles, 1 cycle to form C + S - N,
// n + 2 (two resolvers) or 2n + 4 plus one hand-over cycle (one resolver)
// for the final reduction, 1 cycle to register the result, and 1 cycle for
// the monitor to observe it. The testbench also counts how often the sign
// estimate accepted and rejected the reduction, which candidate won, and
// how often the last reduction was taken yet left C + S at N or above (the
// case that needs C + S - N formed afresh in the final stage).
module modadd_csa_tb;
  localparam int NCFG = 3;
  localparam int CFG_N    [NCFG] = '{16, 16, 4};
  localparam bit CFG_DUAL [NCFG] = '{1'b1, 1'b0, 1'b1};
  localparam int VECTORS = 400;

  int checks = 0, failures = 0;
  int n_accept = 0, n_reject = 0, n_pick_hat = 0, n_pick_plain = 0, n_stall = 0;
  // results where reusing the last subtracted pair as the second candidate
  // would have been wrong: last reduction taken and C + S still >= N
  int n_stale_pair = 0;
  bit last_taken;
  logic clk = 1'b0, rst_n = 1'b0;
  bit done [NCFG];

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int NB = CFG_N[g];
    logic [NB-1:0] modulus = '0, x = '0, res;
    logic x_valid = 1'b0, x_last = 1'b0, x_ready, res_valid;

    if (g == 0) begin : g_def
      modadd_csa dut (.clk, .rst_n, .modulus, .x_valid, .x_ready, .x, .x_last,
                      .res_valid, .res);
    end else begin : g_par
      modadd_csa #(.N_BITS(NB), .DUAL_FINAL(CFG_DUAL[g])) dut (
        .clk, .rst_n, .modulus, .x_valid, .x_ready, .x, .x_last, .res_valid, .res);
    end

    // Monitor: cycle counter, accepted operands, result arrival.
    int cyc = 0, t_first = 0, t_res = 0;
    bit accepted, got_res;
    logic [NB-1:0] res_seen;
    always_ff @(posedge clk) begin
      cyc      <= cyc + 1;
      accepted <= x_valid && x_ready;
      if (x_valid && x_ready && (g_cfg[g].first_pending)) t_first <= cyc;
      got_res <= res_valid;
      if (res_valid) begin
        t_res    <= cyc;
        res_seen <= res;
      end
    end
    bit first_pending = 1'b0;

    initial begin
      longint nval, acc;
      int k, exp_lat;
      bit gaps;
      logic [NB-1:0] ops [64];
      wait (rst_n);
      for (int v = 0; v < VECTORS; v++) begin
        nval = (longint'(1) << (NB - 1)) + longint'($urandom_range((1 << (NB - 1)) - 1));
        if (v % 7 == 0) nval = (longint'(1) << NB) - 1;
        if (v % 7 == 1) nval = longint'(1) << (NB - 1);
        k    = (v % 10 == 0) ? 1 : $urandom_range(40, 2);
        gaps = (v % 3 == 2);
        acc  = 0;
        for (int i = 0; i < k; i++) begin
          ops[i] = NB'($urandom_range(32'(nval - 1)));
          if (v % 5 == 3) ops[i] = NB'(nval - 1);  // largest operands
          acc = (acc + longint'(ops[i])) % nval;
        end
        @(negedge clk);
        modulus = NB'(nval);
        for (int i = 0; i < k; i++) begin
          if (gaps && $urandom_range(2) == 0) begin
            x_valid = 1'b0;
            repeat ($urandom_range(3, 1)) @(negedge clk);
          end
          x_valid = 1'b1;
          x = ops[i];
          x_last = (i == k - 1);
          first_pending = (i == 0);
          do @(negedge clk); while (!accepted);
          first_pending = 1'b0;
        end
        x_valid = 1'b0;
        x_last = 1'b0;
        while (!got_res) @(negedge clk);
        checks++;
        if (res_seen != NB'(acc)) begin
          failures++;
          $display("FAIL cfg%0d N=%0d k=%0d got %0d expected %0d", g, nval, k, res_seen, acc);
        end
        if (!gaps) begin
          exp_lat = CFG_DUAL[g] ? (2 * k - 2) + 1 + (NB + 2) + 1 + 1
                                : (2 * k - 2) + 1 + 2 * (NB + 2) + 1 + 1 + 1;
          checks++;
          if (t_res - t_first != exp_lat) begin
            failures++;
            $display("FAIL cfg%0d k=%0d latency %0d expected %0d", g, k, t_res - t_first, exp_lat);
          end
        end
        @(negedge clk);
      end
      done[g] = 1'b1;
    end
  end

  // Mechanism counters, taken from the default instance's internals.
  always_ff @(posedge clk) begin
    if (g_cfg[0].g_def.dut.state_q == g_cfg[0].g_def.dut.S_SUB) begin
      if (g_cfg[0].g_def.dut.neg_est) n_reject <= n_reject + 1;
      else                            n_accept <= n_accept + 1;
    end
    if (g_cfg[0].g_def.dut.state_q == g_cfg[0].g_def.dut.S_ADD && !g_cfg[0].x_valid)
      n_stall <= n_stall + 1;
    if (g_cfg[0].g_def.dut.state_q == g_cfg[0].g_def.dut.S_SUB && g_cfg[0].g_def.dut.last_q)
      last_taken <= !g_cfg[0].g_def.dut.neg_est;
    if (g_cfg[0].g_def.dut.state_q == g_cfg[0].g_def.dut.S_IDLE && g_cfg[0].x_valid && g_cfg[0].x_last)
      last_taken <= 1'b0;
    if (g_cfg[0].g_def.dut.fin_done && last_taken &&
        g_cfg[0].g_def.dut.r0_value >= 18'(g_cfg[0].g_def.dut.n_q))
      n_stale_pair <= n_stale_pair + 1;
    if (g_cfg[0].g_def.dut.fin_done) begin
      if (g_cfg[0].g_def.dut.r1_value[17]) n_pick_plain <= n_pick_plain + 1;
      else                                 n_pick_hat   <= n_pick_hat + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    $display("reductions accepted=%0d rejected=%0d, final pick C+S-N=%0d C+S=%0d, stalls=%0d",
             n_accept, n_reject, n_pick_hat, n_pick_plain, n_stall);
    $display("results needing C+S-N formed afresh (last reduction taken, C+S >= N): %0d",
             n_stale_pair);
    checks += 6;
    if (n_accept == 0 || n_reject == 0 || n_pick_hat == 0 || n_pick_plain == 0 || n_stall == 0 ||
        n_stale_pair == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
