// cs_resolve_tb: self-checking test of the carry-save resolver.
//
// Loads random carry/sum pairs (and the worst case of all ones), checks that
// `valid` rises exactly W cycles after the load, and that the value equals
// c + s modulo 2^W.
module cs_resolve_tb;
  localparam int unsigned W = 18;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0;
  logic [W-1:0] c_in = '0, s_in = '0, value;
  logic valid;

  always #5 clk = ~clk;

  cs_resolve dut (.clk, .rst_n, .load, .c_in, .s_in, .valid, .value);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid before any load"); end
    for (int i = 0; i < 300; i++) begin
      c_in = (i == 0) ? '1 : W'($urandom);
      s_in = (i == 0) ? W'(1) : W'($urandom);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      lat = 0;
      do begin
        @(negedge clk);
        lat++;
      end while (!valid && lat < 100);
      checks += 2;
      if (lat != W) begin failures++; $display("FAIL latency %0d", lat); end
      if (value != W'(c_in + s_in)) begin
        failures++;
        $display("FAIL %h + %h -> %h", c_in, s_in, value);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
