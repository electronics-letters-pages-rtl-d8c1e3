// sign_est_tb: self-checking test of the sign estimator.
//
// The reference clears the low n-1 bits of both vectors, adds them as
// (n + 2)-bit two's complement numbers and takes the sign bit. Checked
// exhaustively at n = 4 and with random vectors at the default n = 16.
module sign_est_tb;
  localparam int unsigned N  = 16;
  localparam int unsigned NS = 4;

  int checks = 0, failures = 0;

  logic [N+1:0]  c, s;
  logic          sign;
  logic [NS+1:0] cs_, ss_;
  logic          signs;

  sign_est dut (.c, .s, .sign);
  sign_est #(.N_BITS(NS)) dut_small (.c(cs_), .s(ss_), .sign(signs));

  function automatic bit ref_sign(input longint cv, input longint sv, input int n);
    longint mask, tot;
    mask = ~((longint'(1) << (n - 1)) - 1);
    tot  = (cv & mask) + (sv & mask);
    return 1'((tot >> (n + 1)) & 1);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * (NS + 2))); i++) begin
      {cs_, ss_} = (2 * (NS + 2))'(i);
      #1;
      checks++;
      if (signs != ref_sign(longint'(cs_), longint'(ss_), NS)) begin
        failures++;
        $display("FAIL small c=%b s=%b got %b", cs_, ss_, signs);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      c = (N+2)'($urandom); s = (N+2)'($urandom);
      #1;
      checks++;
      if (sign != ref_sign(longint'(c), longint'(s), N)) begin
        failures++;
        $display("FAIL c=%h s=%h got %b", c, s, sign);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
