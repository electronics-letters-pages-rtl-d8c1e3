// modadd_table1_tb: cycle-count sweep of the modulo N adder.
//
// Runs the adder at modulus widths n = 4, 8, 12, 16, 24 and 30, each with
// two resolvers (two-level CSA final stage) and with one (one-level), for
// operand counts k = 1, 2, 3, 8 and 32 offered back to back. Every result
// is compared with the sum mod N worked out here, and every cycle count
// with the expected split: 2k - 2 accumulation cycles, 1 cycle to form
// C + S - N, n + 2 or 2n + 4 (+1 hand-over) resolve cycles, 1 cycle to
// register the result. One line per (n, levels) pair reports the measured
// accumulation and final-stage cycles.
module modadd_table1_tb;
  localparam int NCFG = 12;
  localparam int CFG_N    [NCFG] = '{4, 4, 8, 8, 12, 12, 16, 16, 24, 24, 30, 30};
  localparam bit CFG_DUAL [NCFG] = '{1, 0, 1, 0, 1, 0, 1, 0, 1, 0, 1, 0};
  localparam int NK = 5;
  localparam int KS [NK] = '{1, 2, 3, 8, 32};
  localparam int REPS = 12;

  int checks = 0, failures = 0;
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

    modadd_csa #(.N_BITS(NB), .DUAL_FINAL(CFG_DUAL[g])) dut (
      .clk, .rst_n, .modulus, .x_valid, .x_ready, .x, .x_last, .res_valid, .res);

    int cyc = 0, t_first = 0, t_res = 0;
    bit accepted, got_res, first_pending = 1'b0;
    logic [NB-1:0] res_seen;
    always_ff @(posedge clk) begin
      cyc      <= cyc + 1;
      accepted <= x_valid && x_ready;
      if (x_valid && x_ready && first_pending) t_first <= cyc;
      got_res <= res_valid;
      if (res_valid) begin
        t_res    <= cyc;
        res_seen <= res;
      end
    end

    initial begin
      longint nval, acc;
      int k, fin_exp, fin_meas;
      wait (rst_n);
      fin_exp = CFG_DUAL[g] ? 1 + (NB + 2) + 1 : 1 + 2 * (NB + 2) + 1 + 1;
      fin_meas = -1;
      for (int ki = 0; ki < NK; ki++) begin
        k = KS[ki];
        for (int r = 0; r < REPS; r++) begin
          nval = (longint'(1) << (NB - 1)) + longint'($urandom_range(32'((longint'(1) << (NB - 1)) - 1)));
          if (r == 0) nval = (longint'(1) << NB) - 1;
          acc = 0;
          @(negedge clk);
          modulus = NB'(nval);
          for (int i = 0; i < k; i++) begin
            longint op;
            op = (r == 1) ? nval - 1 : longint'($urandom_range(32'(nval - 1)));
            acc = (acc + op) % nval;
            x_valid = 1'b1;
            x = NB'(op);
            x_last = (i == k - 1);
            first_pending = (i == 0);
            do @(negedge clk); while (!accepted);
            first_pending = 1'b0;
          end
          x_valid = 1'b0;
          x_last = 1'b0;
          while (!got_res) @(negedge clk);
          checks += 2;
          if (res_seen != NB'(acc)) begin
            failures++;
            $display("FAIL n=%0d k=%0d got %0d expected %0d", NB, k, res_seen, acc);
          end
          // t_res is seen one cycle after res_valid is driven
          fin_meas = (t_res - t_first - 1) - (2 * k - 2);
          if (fin_meas != fin_exp) begin
            failures++;
            $display("FAIL n=%0d levels=%0d k=%0d final stage %0d cycles, expected %0d",
                     NB, CFG_DUAL[g] ? 2 : 1, k, fin_meas, fin_exp);
          end
          @(negedge clk);
        end
      end
      $display("n=%2d levels=%0d: accumulation 2k-2 cycles, final stage %0d cycles (resolve %0d)",
               NB, CFG_DUAL[g] ? 2 : 1, fin_meas, CFG_DUAL[g] ? NB + 2 : 2 * (NB + 2));
      done[g] = 1'b1;
    end
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      foreach (done[i]) all &= done[i];
    end while (!all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
