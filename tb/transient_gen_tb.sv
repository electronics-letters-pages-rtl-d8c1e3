// transient_gen_tb: self-checking test of the interference waveform player.
//
// Loads a peak-and-decay transient A*t*exp(-t/T) (T = 20 bits) into the
// table, plays it with random gaps between bit ticks and random lengths,
// and compares every output sample with the table contents kept in the
// testbench. Also checks the idle code before and after a playback, that a
// trigger during a playback is ignored, and that a table rewrite (a decaying
// sine) takes effect on the next playback.
module transient_gen_tb;
  localparam int unsigned AW = 10;
  localparam int unsigned DW = 8;
  localparam logic [DW-1:0] IDLE = 8'h80;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick = 1'b0, tbl_we = 1'b0, trigger = 1'b0, busy;
  logic [AW-1:0] tbl_addr = '0, last_addr = '0;
  logic [DW-1:0] tbl_wdata = '0, dac_code;
  logic [DW-1:0] model [2**AW];

  always #5 clk = ~clk;

  transient_gen dut (.clk, .rst_n, .tick, .tbl_we, .tbl_addr, .tbl_wdata,
                     .last_addr, .trigger, .busy, .dac_code);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_table(input bit sine);
    real tau, v;
    tau = 20.0;
    for (int i = 0; i < 2**AW; i++) begin
      if (sine) v = 120.0 * $exp(-i / tau) * $sin(0.3 * i);
      else      v = 127.0 * (i / tau) * $exp(1.0 - i / tau);
      model[i] = DW'(128 + $rtoi(v));
      @(negedge clk);
      tbl_we = 1'b1; tbl_addr = AW'(i); tbl_wdata = model[i];
    end
    @(negedge clk);
    tbl_we = 1'b0;
  endtask

  // Plays samples 0..last and checks each one; extra_trigger fires a
  // trigger in the middle of the playback, which must be ignored.
  task automatic play(input int last, input bit extra_trigger);
    int idx;
    @(negedge clk);
    last_addr = AW'(last);
    trigger = 1'b1;
    @(negedge clk);
    trigger = 1'b0;
    check(busy, "busy after trigger");
    check(dac_code == IDLE, "idle code before first tick");
    idx = 0;
    while (idx <= last + 1) begin
      tick = ($urandom_range(3) != 0);
      if (extra_trigger && idx == last / 2) begin
        trigger = 1'b1;
        last_addr = AW'(3);
      end
      @(negedge clk);
      trigger = 1'b0;
      if (tick) begin
        if (idx <= last) check(dac_code == model[idx], $sformatf("sample %0d", idx));
        else             check(dac_code == IDLE, "idle code after playback");
        idx++;
      end
      tick = 1'b0;
    end
    check(!busy, "not busy after playback");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(dac_code == IDLE && !busy, "reset state");
    load_table(1'b0);
    play(139, 1'b0);
    play(0, 1'b0);
    play(2**AW - 1, 1'b1);
    play($urandom_range(200, 20), 1'b1);
    load_table(1'b1);
    play(99, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
