// cs_resolve: carry-save to binary conversion by an iterated carry-save adder.
//
// A carry/sum pair loaded with `load` is fed back through a W-bit carry-save
// adder whose third input is zero, once per clock. Each pass clears at least
// one more low bit of the carry vector, so after W passes the carry vector is
// zero and the sum vector holds c + s (mod 2^W). No carry-propagate adder is
// used, which is the cost model of the published sign-estimation method
// (final reduction in n + 2 cycles for a CSA of length n + 2).
//
// Timing: `load` in cycle 0 captures the pair; `valid` rises W cycles later
// and stays high, with `value`, until the next `load`. The fixed pass count
// (rather than stopping once the carry is zero) is this design's choice; it
// makes the latency independent of the data.
module cs_resolve #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] c_in,
  input  logic [W-1:0] s_in,
  output logic         valid,
  output logic [W-1:0] value
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  c_q, s_q, c_nx, s_nx;
  logic [CW-1:0] cnt_q;
  logic          loaded_q;

  csa #(.W(W)) u_csa (
    .a(c_q), .b(s_q), .d('0), .cin(1'b0),
    .carry(c_nx), .sum(s_nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q      <= '0;
      s_q      <= '0;
      cnt_q    <= '0;
      loaded_q <= 1'b0;
    end else if (load) begin
      c_q      <= c_in;
      s_q      <= s_in;
      cnt_q    <= CW'(W);
      loaded_q <= 1'b1;
    end else if (cnt_q != '0) begin
      c_q   <= c_nx;
      s_q   <= s_nx;
      cnt_q <= cnt_q - 1'b1;
    end
  end

  assign valid = loaded_q && (cnt_q == '0);
  assign value = s_q;

  // After W passes nothing may be left in the carry vector.
  a_carry_cleared: assert property (@(posedge clk) disable iff (!rst_n)
    valid |-> (c_q == '0));
endmodule
