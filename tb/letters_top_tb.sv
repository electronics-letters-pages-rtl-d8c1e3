// letters_top_tb: end-to-end test of both designs in letters_top, all
// parameters at their defaults.
//
// Modulo N adder: random moduli (bit 15 set), operand counts 1..40 and
// operands, offered back to back or with idle gaps; each result is compared
// with the sum reduced modulo N here, and the latency of gap-free streams
// with 2k - 2 + 1 + (n + 2) + 1 cycles (+1 for the monitor). Counts accepted
// and rejected reductions, stalls and which final candidate was chosen.
//
// Burst-error test bed: the testbench plays the parts outside the design.
// A 2^15 - 1 PRBS transmitter (x^15 + x^14 + 1) sends one bit per tick at
// +-40 codes; the received level is that plus the interference, D/A code
// minus 128; the decision circuit slices at zero and the error detector
// flags every wrong decision. A workstation model loads the waveform table
// with A*t*exp(-t/T) and A*exp(-t/T)*sin(wt) transients (A = 60 codes) for
// decay constants T = 10..70 bits, triggers playbacks, and reads the logged
// intervals back continuously. Every D/A sample is checked against the
// table, every interval read back is checked against the intervals worked
// out from the error flags, and the error autocorrelation (lags 1..8) is
// computed both from the raw error pattern and from the read-back
// intervals and compared. A phase without reading fills the buffer
// (overflow), and a long quiet phase saturates the interval counter.
module letters_top_tb;
  int checks = 0, failures = 0;

  // ------------------------------------------------------------------
  // clocks, resets, DUT
  logic clk = 1'b0, tb_clk = 1'b0, rst_n = 1'b0, tb_rst_n = 1'b0;
  always #5 clk = ~clk;
  always #7 tb_clk = ~tb_clk;

  logic [15:0] ma_modulus = '0, ma_x = '0, ma_res;
  logic        ma_x_valid = 1'b0, ma_x_last = 1'b0, ma_x_ready, ma_res_valid;

  logic        tg_tick = 1'b0, tg_tbl_we = 1'b0, tg_trigger = 1'b0, tg_busy;
  logic [9:0]  tg_tbl_addr = '0, tg_last_addr = '0;
  logic [7:0]  tg_tbl_wdata = '0, tg_dac_code;
  logic        el_tick, el_err, el_enable = 1'b0, el_clear = 1'b0, el_rd_en = 1'b0;
  logic        el_rd_valid, el_overflow;
  logic [15:0] el_rd_data;
  logic [10:0] el_level;

  letters_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge tb_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // modulo N adder
  int ma_cyc = 0, ma_t_first = 0, ma_t_res = 0;
  bit ma_accepted, ma_got_res, ma_first_pending = 1'b0, ma_done = 1'b0;
  logic [15:0] ma_res_seen;
  int n_accept = 0, n_reject = 0, n_pick_hat = 0, n_pick_plain = 0, n_stall = 0;

  always_ff @(posedge clk) begin
    ma_cyc      <= ma_cyc + 1;
    ma_accepted <= ma_x_valid && ma_x_ready;
    if (ma_x_valid && ma_x_ready && ma_first_pending) ma_t_first <= ma_cyc;
    ma_got_res <= ma_res_valid;
    if (ma_res_valid) begin
      ma_t_res    <= ma_cyc;
      ma_res_seen <= ma_res;
    end
    if (dut.u_modadd.state_q == dut.u_modadd.S_SUB) begin
      if (dut.u_modadd.neg_est) n_reject <= n_reject + 1;
      else                      n_accept <= n_accept + 1;
    end
    if (dut.u_modadd.state_q == dut.u_modadd.S_ADD && !ma_x_valid) n_stall <= n_stall + 1;
    if (dut.u_modadd.fin_done) begin
      if (dut.u_modadd.r1_value[17]) n_pick_plain <= n_pick_plain + 1;
      else                           n_pick_hat   <= n_pick_hat + 1;
    end
  end

  initial begin
    longint nval, acc;
    int k;
    bit gaps;
    logic [15:0] ops [40];
    wait (rst_n);
    for (int v = 0; v < 200; v++) begin
      nval = 32768 + longint'($urandom_range(32767));
      k    = (v % 10 == 0) ? 1 : $urandom_range(40, 2);
      gaps = (v % 3 == 2);
      acc  = 0;
      for (int i = 0; i < k; i++) begin
        ops[i] = 16'($urandom_range(32'(nval - 1)));
        acc = (acc + longint'(ops[i])) % nval;
      end
      @(negedge clk);
      ma_modulus = 16'(nval);
      for (int i = 0; i < k; i++) begin
        if (gaps && $urandom_range(2) == 0) begin
          ma_x_valid = 1'b0;
          repeat ($urandom_range(3, 1)) @(negedge clk);
        end
        ma_x_valid = 1'b1;
        ma_x = ops[i];
        ma_x_last = (i == k - 1);
        ma_first_pending = (i == 0);
        do @(negedge clk); while (!ma_accepted);
        ma_first_pending = 1'b0;
      end
      ma_x_valid = 1'b0;
      ma_x_last = 1'b0;
      while (!ma_got_res) @(negedge clk);
      check(ma_res_seen == 16'(acc),
            $sformatf("modadd N=%0d k=%0d got %0d expected %0d", nval, k, ma_res_seen, acc));
      if (!gaps)
        check(ma_t_res - ma_t_first == (2 * k - 2) + 1 + 18 + 1 + 1,
              $sformatf("modadd latency k=%0d: %0d", k, ma_t_res - ma_t_first));
      @(negedge clk);
    end
    ma_done = 1'b1;
  end

  // ------------------------------------------------------------------
  // burst-error test bed
  logic [7:0]  table_model [1024];
  logic [14:0] prbs = 15'h7fff;
  bit          fast_ticks = 1'b0, hold_ticks = 1'b1, reader_paused = 1'b0;
  longint      bitno = 0, last_err = 0;
  int          exp_q [$];
  bit          err_pattern [$];   // raw error flags, one per logged bit
  int          read_back [$];     // intervals as read by the workstation
  int          n_playbacks = 0, n_errors = 0, n_logged = 0, n_dropped = 0, n_saturated = 0;
  int          n_idle_errors = 0;

  assign el_tick = tg_tick;

  // What happened at the last edge, for the D/A check.
  bit ev_tick, ev_fire;
  always_ff @(posedge tb_clk) begin
    ev_tick <= tg_tick;
    ev_fire <= tg_trigger && !tg_busy;
  end

  // Transmitter, link, decision circuit and error detector.
  initial begin
    bit pb_active;
    int pb_idx, pb_last, level, tx_bit;
    logic [7:0] exp_dac;
    pb_active = 1'b0;
    pb_idx = 0;
    pb_last = 0;
    exp_dac = 8'h80;
    el_err = 1'b0;
    wait (tb_rst_n);
    forever begin
      @(negedge tb_clk);
      // D/A check for the edge just gone
      if (ev_fire) begin
        pb_active = 1'b1;
        pb_idx = 0;
        pb_last = int'(tg_last_addr);
        n_playbacks++;
      end
      if (ev_tick) begin
        if (pb_active && !ev_fire) begin
          exp_dac = table_model[pb_idx];
          if (pb_idx == pb_last) pb_active = 1'b0;
          else pb_idx++;
        end else begin
          exp_dac = 8'h80;
        end
        check(tg_dac_code == exp_dac,
              $sformatf("dac code %0d expected %0d", tg_dac_code, exp_dac));
      end
      // next bit
      tg_tick = !hold_ticks && (fast_ticks || $urandom_range(3) != 0);
      el_err = 1'b0;
      if (tg_tick) begin
        tx_bit = int'(prbs[14]);
        prbs = {prbs[13:0], prbs[14] ^ prbs[13]};
        level = (tx_bit ? 40 : -40) + (int'(tg_dac_code) - 128);
        el_err = ((level > 0) ? 1 : 0) != tx_bit;
        bitno++;
        err_pattern.push_back(el_err);
        if (el_err) begin
          longint iv;
          n_errors++;
          if (tg_dac_code == 8'h80) n_idle_errors++;
          iv = bitno - last_err;
          if (iv > 65535) begin
            iv = 65535;
            n_saturated++;
          end
          last_err = bitno;
          if (reader_paused && exp_q.size() >= 1024) n_dropped++;
          else begin
            exp_q.push_back(int'(iv));
            n_logged++;
          end
        end
      end
    end
  end

  // Workstation reader: pops whenever the buffer holds an interval.
  initial begin
    wait (tb_rst_n);
    forever begin
      @(negedge tb_clk);
      if (el_rd_valid) begin
        if (exp_q.size() == 0) check(1'b0, "interval read with none expected");
        else begin
          check(int'(el_rd_data) == exp_q[0],
                $sformatf("interval %0d expected %0d", el_rd_data, exp_q[0]));
          read_back.push_back(int'(el_rd_data));
          void'(exp_q.pop_front());
        end
      end
      el_rd_en = !reader_paused && (el_level != '0);
    end
  end

  task automatic load_table(input bit sine, input real tau, input int last);
    real v;
    for (int i = 0; i < 1024; i++) begin
      if (i > last)  v = 0.0;
      else if (sine) v = 60.0 * $exp(-i / tau) * $sin(6.2832 * i / (tau / 2.0));
      else           v = 60.0 * (i / tau) * $exp(1.0 - i / tau);
      table_model[i] = 8'(128 + $rtoi(v));
      @(negedge tb_clk);
      tg_tbl_we = 1'b1;
      tg_tbl_addr = 10'(i);
      tg_tbl_wdata = table_model[i];
    end
    @(negedge tb_clk);
    tg_tbl_we = 1'b0;
    tg_last_addr = 10'(last);
  endtask

  task automatic fire_and_wait(input int quiet_bits);
    @(negedge tb_clk);
    tg_trigger = 1'b1;
    @(negedge tb_clk);
    tg_trigger = 1'b0;
    while (tg_busy) @(negedge tb_clk);
    repeat (quiet_bits) @(negedge tb_clk);
  endtask

  task automatic drain();
    while (el_level != '0 || el_rd_valid || exp_q.size() != 0) @(negedge tb_clk);
  endtask

  // ACF of the error pattern, Gamma(tau) = sum_i e(t_i) e(t_i + tau),
  // from the raw flags and from the pattern rebuilt from the intervals.
  task automatic compare_acf(input int first_bit, input int n_bits);
    bit rebuilt [$];
    int pos;
    for (int i = 0; i < n_bits; i++) rebuilt.push_back(1'b0);
    pos = -1;
    foreach (read_back[j]) begin
      pos += read_back[j];
      if (pos < n_bits) rebuilt[pos] = 1'b1;
    end
    for (int tau = 1; tau <= 8; tau++) begin
      int g_raw, g_reb;
      g_raw = 0;
      g_reb = 0;
      for (int i = 0; i + tau < n_bits; i++) begin
        g_raw += int'(err_pattern[first_bit + i] && err_pattern[first_bit + i + tau]);
        g_reb += int'(rebuilt[i] && rebuilt[i + tau]);
      end
      check(g_raw == g_reb, $sformatf("ACF lag %0d: %0d vs %0d", tau, g_raw, g_reb));
      if (tau <= 3) $display("  ACF(%0d) = %0d", tau, g_raw);
    end
  endtask

  initial begin
    int errs_before;
    repeat (3) @(posedge tb_clk);
    rst_n = 1'b1;
    tb_rst_n = 1'b1;
    @(negedge tb_clk);
    el_clear = 1'b1;
    @(negedge tb_clk);
    el_clear = 1'b0;
    el_enable = 1'b1;
    hold_ticks = 1'b0;
    // decay constants of the study, both waveform classes
    for (int t = 10; t <= 70; t += 10) begin
      for (int sine = 0; sine < 2; sine++) begin
        int first_bit, last;
        last = (8 * t > 1023) ? 1023 : 8 * t;
        load_table(sine[0], real'(t), last);
        drain();
        // restart the log so that the interval list starts with this run
        hold_ticks = 1'b1;
        @(negedge tb_clk);
        el_clear = 1'b1;
        @(negedge tb_clk);
        el_clear = 1'b0;
        read_back.delete();
        last_err = bitno;
        first_bit = int'(bitno);
        hold_ticks = 1'b0;
        errs_before = n_errors;
        repeat (4) fire_and_wait(30);
        drain();
        $display("T=%0d %s: %0d errors over %0d bits", t, sine ? "decaying sine" : "peak-and-decay",
                 n_errors - errs_before, int'(bitno) - first_bit);
        compare_acf(first_bit, int'(bitno) - first_bit);
      end
    end
    check(!el_overflow, "no overflow while reading");
    // overflow: full-scale interference with the reader paused
    for (int i = 0; i < 1024; i++) table_model[i] = 8'hff;
    for (int i = 0; i < 1024; i++) begin
      @(negedge tb_clk);
      tg_tbl_we = 1'b1;
      tg_tbl_addr = 10'(i);
      tg_tbl_wdata = 8'hff;
    end
    @(negedge tb_clk);
    tg_tbl_we = 1'b0;
    tg_last_addr = 10'd1023;
    drain();
    reader_paused = 1'b1;
    repeat (3) fire_and_wait(5);
    check(el_overflow, "overflow flag set");
    check(int'(el_level) == 1024, "buffer full");
    reader_paused = 1'b0;
    drain();
    // saturation: a long quiet stretch, then one transient
    hold_ticks = 1'b1;
    @(negedge tb_clk);
    el_clear = 1'b1;
    @(negedge tb_clk);
    el_clear = 1'b0;
    check(!el_overflow, "overflow cleared");
    last_err = bitno;
    fast_ticks = 1'b1;
    hold_ticks = 1'b0;
    repeat (70000) @(negedge tb_clk);
    fire_and_wait(10);
    drain();
    wait (ma_done);
    $display("modadd: reductions accepted=%0d rejected=%0d, final pick C+S-N=%0d C+S=%0d, stalls=%0d",
             n_accept, n_reject, n_pick_hat, n_pick_plain, n_stall);
    $display("test bed: playbacks=%0d errors=%0d logged=%0d dropped=%0d saturated=%0d",
             n_playbacks, n_errors, n_logged, n_dropped, n_saturated);
    check(n_accept > 0, "reduction accepted at least once");
    check(n_reject > 0, "reduction rejected at least once");
    check(n_pick_hat > 0 && n_pick_plain > 0, "both final candidates chosen");
    check(n_stall > 0, "operand stall seen");
    check(n_playbacks > 0 && n_errors > 0, "playbacks caused errors");
    check(n_idle_errors == 0, "no errors without interference");
    check(n_dropped > 0, "overflow drops happened");
    check(n_saturated > 0, "interval saturation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
