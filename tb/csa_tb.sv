// csa_tb: self-checking test of the carry-save adder.
//
// Drives random triples and carry-ins at the default width and at a narrow
// width, and checks that carry + sum equals a + b + d + cin modulo 2^W and
// that the sum vector is the bitwise XOR of the inputs.
module csa_tb;
  localparam int unsigned W  = 19;
  localparam int unsigned WS = 4;

  int checks = 0, failures = 0;

  logic [W-1:0]  a, b, d, carry, sum;
  logic          cin;
  logic [WS-1:0] as, bs, ds, carrys, sums;
  logic          cins;

  csa dut (.a, .b, .d, .cin, .carry, .sum);
  csa #(.W(WS)) dut_small (.a(as), .b(bs), .d(ds), .cin(cins), .carry(carrys), .sum(sums));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] total;
    for (int i = 0; i < 2000; i++) begin
      a = W'($urandom); b = W'($urandom); d = W'($urandom); cin = 1'($urandom);
      if (i == 0) begin a = '1; b = '1; d = '1; cin = 1'b1; end
      #1;
      total = {1'b0, a} + {1'b0, b} + {1'b0, d} + (W+1)'(cin);
      check(W'(carry + sum) == total[W-1:0],
            $sformatf("sum a=%h b=%h d=%h cin=%b", a, b, d, cin));
      check(sum == (a ^ b ^ d), "xor");
    end
    // exhaustive at 4 bits
    for (int i = 0; i < (1 << (3 * WS + 1)); i++) begin
      {cins, as, bs, ds} = (3 * WS + 1)'(i);
      #1;
      check(WS'(carrys + sums) == WS'(as + bs + ds + WS'(cins)), "small");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
