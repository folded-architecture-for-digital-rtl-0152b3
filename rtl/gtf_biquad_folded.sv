// Folded second-order gammatone filter section.
//
// Computes the gammatone biquad in transposed direct form:
//   y(n)  = M0 + s1(n-1)                     M0 = b0*x(n)
//   s1(n) = (M1 + s2(n-1)) + M3              M1 = b1*x(n),  M3 = a1*y(n)
//   s2(n) = M2 + M4                          M2 = b2*x(n),  M4 = a2*y(n)
// with all five multiplications on one two-stage Booth multiplier and all
// additions on one ripple carry adder followed by its pipeline register D,
// folded with factor K = 5.  a1 and a2 are the constants the feedback
// multipliers M3/M4 apply, i.e. the negated denominator coefficients of
// G(z) = (b0 + b1 z^-1 + b2 z^-2) / (1 + a1' z^-1 + a2' z^-2).
//
// Schedule (step m of 5l+m; the multiplier result of step m appears at step
// m+2, the adder result of step m at step m+1):
//   m  multiplier        adder (into D)            register loads (edge)
//   0  M0 = b0*R1        S1 = D(=T) + M3           -
//   1  M1 = b1*R1        S2 = R4(=M2) + M4         R2 <= D (S1)
//   2  M2 = b2*R1        Y  = M0 + R2              R3 <= D (S2)
//   3  M3 = a1*D(=Y)     T  = M1 + R3              R5 <= D (Y)
//   4  M4 = a2*R5        (idle, D holds T)         R4 <= M2, R1 <= x
// The multiplier order M0..M4 and the five data registers R1..R5 follow the
// published architecture (multiplier folding set, five registers); the
// assignment of the values to the registers and the adder time steps are
// this design's own, worked out so that the schedule is causal with
// T_A = 1 and T_M = 2.  The three-input node A1 takes two additions, so the
// adder is busy in steps 0..3 and idle in step 4.
//
// Arithmetic: two's complement, DATA_W-bit data, COEF_W-bit coefficients
// with COEF_FRAC fraction bits.  Products are truncated (arithmetic shift)
// and saturated to DATA_W bits; each sum is saturated to DATA_W bits.
//
// Interface/timing: step and en come from the shared controller.  x is
// sampled at the edge that closes step 4; y (register R5) holds the output
// of that sample from the edge that closes step 3 of the next iteration,
// i.e. 4 enabled cycles later, until the same edge one iteration on.
// Synchronous active-low reset clears all state.  The adder's carry out is
// left unused (a lint warning): the adder is one bit wider than the data and
// overflow is read from its two top sum bits.
module gtf_biquad_folded
  import gtf_pkg::*;
#(
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned COEF_W    = 8,
  parameter int unsigned COEF_FRAC = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  fold_step_t               step,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [COEF_W-1:0] coef [N_COEF],   // b0, b1, b2, a1, a2
  output logic signed [DATA_W-1:0] y
);

  typedef logic signed [DATA_W-1:0] data_t;

  localparam data_t DMAX = data_t'((64'sd1 <<< (DATA_W - 1)) - 1);
  localparam data_t DMIN = data_t'(-(64'sd1 <<< (DATA_W - 1)));

  data_t r1, r2, r3, r4, r5;   // the five data registers
  data_t d;                    // adder pipeline register
  data_t mout;                 // multiplier result (after its two stages)

  // ---- multiplier operand switches -------------------------------------
  data_t                     m_a;
  logic signed [COEF_W-1:0]  m_b;

  always_comb begin
    unique case (step)
      3'd0:    begin m_a = r1; m_b = coef[C_B0]; end
      3'd1:    begin m_a = r1; m_b = coef[C_B1]; end
      3'd2:    begin m_a = r1; m_b = coef[C_B2]; end
      3'd3:    begin m_a = d;  m_b = coef[C_A1]; end
      default: begin m_a = r5; m_b = coef[C_A2]; end
    endcase
  end

  booth_mult #(
    .A_W  (DATA_W),
    .B_W  (COEF_W),
    .FRAC (COEF_FRAC),
    .OUT_W(DATA_W)
  ) u_mult (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .a    (m_a),
    .b    (m_b),
    .p    (mout)
  );

  // ---- adder operand switch, ripple carry adder, saturation ------------
  data_t             add_l;
  logic [DATA_W:0]   add_sum;
  logic              add_cout;   // unused: overflow is read from the extra sum bit
  data_t             add_sat;
  logic              add_active;

  always_comb begin
    add_active = 1'b1;
    unique case (step)
      3'd0:    add_l = d;    // T  + M3 -> S1
      3'd1:    add_l = r4;   // M2 + M4 -> S2
      3'd2:    add_l = r2;   // S1 + M0 -> Y
      3'd3:    add_l = r3;   // S2 + M1 -> T
      default: begin add_l = '0; add_active = 1'b0; end
    endcase
  end

  rca_adder #(.W(DATA_W + 1)) u_add (
    .a   ({add_l[DATA_W-1], add_l}),
    .b   ({mout[DATA_W-1], mout}),
    .cin (1'b0),
    .sum (add_sum),
    .cout(add_cout)
  );

  always_comb begin
    if (add_sum[DATA_W] != add_sum[DATA_W-1])
      add_sat = add_sum[DATA_W] ? DMIN : DMAX;
    else
      add_sat = add_sum[DATA_W-1:0];
  end

  // ---- registers -------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d  <= '0;
      r1 <= '0;
      r2 <= '0;
      r3 <= '0;
      r4 <= '0;
      r5 <= '0;
    end else if (en) begin
      if (add_active) d <= add_sat;
      unique case (step)
        3'd1:    r2 <= d;
        3'd2:    r3 <= d;
        3'd3:    r5 <= d;
        3'd4:    begin r4 <= mout; r1 <= x; end
        default: ;
      endcase
    end
  end

  assign y = r5;

endmodule
