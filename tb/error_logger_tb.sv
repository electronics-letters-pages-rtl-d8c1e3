// error_logger_tb: self-checking test of the error-interval logger.
//
// Two instances: the default one and a small one (4-bit counter, 8-entry
// buffer) that reaches counter saturation and buffer overflow. Random error
// streams, with bursts of adjacent errors and long error-free stretches,
// are applied on random bit ticks. The testbench keeps its own list of
// intervals, worked out from the bit index of each error, and compares
// every interval read back, the buffer level and the overflow flag.
module error_logger_tb;
  localparam int NCFG = 2;
  localparam int CFG_IW [NCFG] = '{16, 4};
  localparam int CFG_DW [NCFG] = '{10, 3};

  int checks = 0, failures = 0;
  int n_sat = 0, n_ovf = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  bit done [NCFG];

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int IW = CFG_IW[g];
    localparam int DWID = CFG_DW[g];
    localparam int DEPTH = 2 ** DWID;
    logic tick = 1'b0, err = 1'b0, enable = 1'b0, clear = 1'b0, rd_en = 1'b0;
    logic rd_valid, overflow;
    logic [IW-1:0] rd_data;
    logic [DWID:0] level;

    if (g == 0) begin : g_def
      error_logger dut (.clk, .rst_n, .tick, .err, .enable, .clear, .rd_en,
                        .rd_valid, .rd_data, .level, .overflow);
    end else begin : g_par
      error_logger #(.IW(IW), .DEPTH_W(DWID)) dut (.clk, .rst_n, .tick, .err,
        .enable, .clear, .rd_en, .rd_valid, .rd_data, .level, .overflow);
    end

    initial begin
      longint bitno, last_err;
      int exp_q [$];
      bit exp_ovf;
      int p_err;
      wait (rst_n);
      for (int round = 0; round < 6; round++) begin
        @(negedge clk);
        clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
        enable = 1'b1;
        exp_q.delete();
        exp_ovf = 1'b0;
        bitno = 0;
        last_err = 0;
        for (int b = 0; b < 3000; b++) begin
          // error probability changes in phases: bursts and quiet stretches
          p_err = ((b / 150) % 3 == 0) ? 50 : ((b / 150) % 3 == 1) ? 0 : 5;
          tick = ($urandom_range(4) != 0);
          err = tick && ($urandom_range(99) < p_err);
          if (tick) begin
            bitno++;
            if (err) begin
              longint iv;
              iv = bitno - last_err;
              if (iv > (longint'(1) << IW) - 1) begin
                iv = (longint'(1) << IW) - 1;
                if (g == 1) n_sat++;
              end
              last_err = bitno;
              if (exp_q.size() < DEPTH) exp_q.push_back(int'(iv));
              else begin
                exp_ovf = 1'b1;
                if (g == 1) n_ovf++;
              end
            end
          end
          @(negedge clk);
          tick = 1'b0;
          err = 1'b0;
          // drain now and then, only when the reference list is not full
          if (b % 97 == 96 && round % 2 == 0) begin
            enable = 1'b0;
            checks++;
            if (int'(level) != exp_q.size()) begin
              failures++;
              $display("FAIL cfg%0d level %0d expected %0d", g, level, exp_q.size());
            end
            while (exp_q.size() > 0) begin
              rd_en = 1'b1;
              @(negedge clk);
              rd_en = 1'b0;
              checks++;
              if (!rd_valid || int'(rd_data) != exp_q[0]) begin
                failures++;
                $display("FAIL cfg%0d read %0d valid %b expected %0d", g, rd_data, rd_valid, exp_q[0]);
              end
              void'(exp_q.pop_front());
            end
            // while disabled, bits are not counted: the reference skips them too
            enable = 1'b1;
          end
        end
        enable = 1'b0;
        checks += 2;
        if (overflow != exp_ovf) begin
          failures++;
          $display("FAIL cfg%0d overflow %b expected %b", g, overflow, exp_ovf);
        end
        if (int'(level) != exp_q.size()) begin
          failures++;
          $display("FAIL cfg%0d final level %0d expected %0d", g, level, exp_q.size());
        end
        while (exp_q.size() > 0) begin
          rd_en = 1'b1;
          @(negedge clk);
          rd_en = 1'b0;
          checks++;
          if (!rd_valid || int'(rd_data) != exp_q[0]) begin
            failures++;
            $display("FAIL cfg%0d final read %0d expected %0d", g, rd_data, exp_q[0]);
          end
          void'(exp_q.pop_front());
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1]);
    $display("saturated intervals=%0d dropped intervals=%0d", n_sat, n_ovf);
    checks++;
    if (n_sat == 0 || n_ovf == 0) begin
      failures++;
      $display("FAIL saturation or overflow never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
