// modadd_csa: multi-operand modulo N adder with carry-save accumulation and
// sign estimation.
//
// Computes S = (X_1 + X_2 + ... + X_k) mod N for operands X_i in [0, N),
// reducing after every operand without ever propagating a carry across the
// word during accumulation:
//
//   load    C = 0, S = X_1
//   per X_i cycle A (ADD): C + S += X_i                     (carry-save add)
//           cycle B (SUB): C^ + S^ = C + S - N              (carry-save add of ~N, +1 at carry LSB)
//                          if T(C^) + T(S^) >= 0 then C, S = C^, S^
//   final   resolve C + S and (C + S) - N to binary, and take the second
//           if it is not negative, else the first
//
// T() clears the n-1 low bits, so the sign test of cycle B needs only the
// top three bits of each vector (sign_est, a 2-bit carry look-ahead). With
// this test C + S stays in [0, N + 2^(n-1)) after every B cycle, so one of
// the two final candidates lies in [0, N) provided N >= 2^(n-1). C and S are
// n + 3 bits wide, the final pairs n + 2 bits; all of this follows the
// published sign-estimation method for multi-operand modulo addition.
//
// Interface: operands arrive on a valid/ready stream (x, x_last marks X_k).
// The modulus is sampled with X_1 and must have bit n-1 set. The result is
// presented on `res` with a one-cycle `res_valid` pulse and held afterwards.
//
// Timing, with operands offered back to back: X_1 is taken in one cycle,
// every further operand costs two cycles (2k - 2 in all, as in the
// published cycle counts). The final stage then takes:
//   - 1 cycle to form C + S - N from the final C, S. The published method
//     sums the last subtracted pair instead, but that pair equals C + S
//     whenever the last reduction was taken; forming C + S - N afresh is
//     this design's correction;
//   - n + 2 cycles with two resolvers in parallel (DUAL_FINAL = 1, the
//     published two-level CSA), or 2n + 4 cycles plus one hand-over cycle
//     with one resolver used twice (DUAL_FINAL = 0);
//   - 1 cycle to register the selected result.
module modadd_csa #(
  parameter int unsigned N_BITS     = 16,   // n: width of the modulus
  parameter bit          DUAL_FINAL = 1'b1  // 1: two resolvers, 0: one resolver
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_BITS-1:0] modulus,
  input  logic              x_valid,
  output logic              x_ready,
  input  logic [N_BITS-1:0] x,
  input  logic              x_last,
  output logic              res_valid,
  output logic [N_BITS-1:0] res
);
  localparam int unsigned W  = N_BITS + 3;  // accumulation width
  localparam int unsigned WF = N_BITS + 2;  // final reduction width

  typedef enum logic [2:0] {
    S_IDLE, S_ADD, S_SUB, S_FLOAD, S_RES0, S_RES1
  } state_t;

  state_t            state_q;
  logic [W-1:0]      c_q, s_q;
  logic [N_BITS-1:0] n_q;
  logic              last_q;
  logic [N_BITS-1:0] plain_q;

  // One carry-save adder serves both cycle types: third input is X_i in an
  // ADD cycle and ~N (with carry-in 1) otherwise.
  logic [W-1:0] csa_d, csa_c, csa_s;
  logic         csa_cin;
  logic         neg_est;

  always_comb begin
    if (state_q == S_ADD) begin
      csa_d   = W'(x);
      csa_cin = 1'b0;
    end else begin
      csa_d   = ~W'(n_q);
      csa_cin = 1'b1;
    end
  end

  csa #(.W(W)) u_csa (
    .a(c_q), .b(s_q), .d(csa_d), .cin(csa_cin),
    .carry(csa_c), .sum(csa_s)
  );

  sign_est #(.N_BITS(N_BITS)) u_sign (
    .c(csa_c[WF-1:0]), .s(csa_s[WF-1:0]), .sign(neg_est)
  );

  // Final stage: resolver 0 takes C + S; resolver 1 (or resolver 0 a second
  // time) takes C + S - N, both on n + 2 bits.
  logic          r0_load, r0_valid, r1_valid;
  logic [WF-1:0] r0_c, r0_s, r0_value, r1_value;
  logic          fin_done;

  if (DUAL_FINAL) begin : g_dual
    always_comb begin
      r0_c = c_q[WF-1:0];
      r0_s = s_q[WF-1:0];
    end
    cs_resolve #(.W(WF)) u_res1 (
      .clk, .rst_n, .load(state_q == S_FLOAD),
      .c_in(csa_c[WF-1:0]), .s_in(csa_s[WF-1:0]),
      .valid(r1_valid), .value(r1_value)
    );
    assign fin_done = (state_q == S_RES0) && r0_valid && r1_valid;
  end else begin : g_single
    always_comb begin
      if (state_q == S_FLOAD) begin
        r0_c = c_q[WF-1:0];
        r0_s = s_q[WF-1:0];
      end else begin
        r0_c = csa_c[WF-1:0];
        r0_s = csa_s[WF-1:0];
      end
    end
    assign r1_valid = r0_valid;
    assign r1_value = r0_value;
    assign fin_done = (state_q == S_RES1) && r0_valid;
  end

  assign r0_load = (state_q == S_FLOAD) ||
                   (!DUAL_FINAL && state_q == S_RES0 && r0_valid);

  cs_resolve #(.W(WF)) u_res0 (
    .clk, .rst_n, .load(r0_load), .c_in(r0_c), .s_in(r0_s),
    .valid(r0_valid), .value(r0_value)
  );

  // Step 5: the reduced candidate wins when it is not negative.
  logic [N_BITS-1:0] plain_val, result_val;
  always_comb begin
    plain_val  = DUAL_FINAL ? r0_value[N_BITS-1:0] : plain_q;
    result_val = r1_value[WF-1] ? plain_val : r1_value[N_BITS-1:0];
  end

  assign x_ready = (state_q == S_IDLE) || (state_q == S_ADD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      c_q       <= '0;
      s_q       <= '0;
      n_q       <= '0;
      last_q    <= 1'b0;
      plain_q   <= '0;
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      res_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (x_valid) begin
          c_q     <= '0;
          s_q     <= W'(x);
          n_q     <= modulus;
          state_q <= x_last ? S_FLOAD : S_ADD;
        end
        S_ADD: if (x_valid) begin
          c_q     <= csa_c;
          s_q     <= csa_s;
          last_q  <= x_last;
          state_q <= S_SUB;
        end
        S_SUB: begin
          if (!neg_est) begin
            c_q <= csa_c;
            s_q <= csa_s;
          end
          state_q <= last_q ? S_FLOAD : S_ADD;
        end
        S_FLOAD: state_q <= S_RES0;
        S_RES0: begin
          if (DUAL_FINAL && fin_done) begin
            res       <= result_val;
            res_valid <= 1'b1;
            state_q   <= S_IDLE;
          end else if (!DUAL_FINAL && r0_valid) begin
            plain_q <= r0_value[N_BITS-1:0];
            state_q <= S_RES1;
          end
        end
        S_RES1: if (fin_done) begin
          res       <= result_val;
          res_valid <= 1'b1;
          state_q   <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The algorithm needs 2^(n-1) <= N and every operand below N.
  a_modulus_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_IDLE && x_valid) |-> modulus[N_BITS-1]);
  a_operand_range: assert property (@(posedge clk) disable iff (!rst_n)
    (x_valid && x_ready) |->
      (x < ((state_q == S_IDLE) ? modulus : n_q)));
endmodule
