// Folded eighth-order digital gammatone filter for one cochlea channel.
//
// The fourth-order analog gammatone filter becomes, by impulse invariance,
// an eighth-order digital IIR filter, realised as four second-order sections
// in cascade.  Each section is folded by a factor of five
// onto one multiplier and one adder (gtf_biquad_folded), so the channel uses
// four multipliers and four adders instead of twenty and twelve.  One
// controller (fold_ctrl) supplies the time step 5l+m to all four sections;
// sharing it is this design's own choice, the published architecture replicates the folded
// section and says nothing about the controller count.
//
// Cascade: section k+1 loads the output register R5 of section k at the same
// edge at which section 1 loads a new input sample (end of step 4), so each
// section works on the previous section's result one iteration later.
//
// Interface:
//   x, x_valid, x_ready  input samples; a sample is taken when both are
//                        high (x_ready is high in step 4).  Without a sample
//                        the whole datapath stalls in step 4.
//   coef[s][c]           coefficients of section s (0 = first), c = b0, b1,
//                        b2, a1, a2, signed COEF_W bits with COEF_FRAC
//                        fraction bits; a1/a2 are the feedback multiplier
//                        constants (negated denominator coefficients).
//                        Keep them constant while filtering.
//   y, y_valid           filtered output; y_valid pulses for one cycle when
//                        y holds a new output.  The output of the sample
//                        accepted at some edge is on y 19 enabled cycles
//                        later (3 iterations of 5 cycles + 4 cycles), so it
//                        appears only once three further samples have been
//                        accepted.  The first three pulses are suppressed
//                        (they carry only the reset state).
//   ex_*                 the introductory folding example (fold_add3), which
//                        stands beside the filter with its own ports.
module gtf8_folded_top
  import gtf_pkg::*;
#(
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned COEF_W    = 8,
  parameter int unsigned COEF_FRAC = 6,
  parameter int unsigned EX_W      = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,

  input  logic signed [DATA_W-1:0] x,
  input  logic                     x_valid,
  output logic                     x_ready,
  input  logic signed [COEF_W-1:0] coef [N_SECT][N_COEF],
  output logic signed [DATA_W-1:0] y,
  output logic                     y_valid,

  input  logic [EX_W-1:0]          ex_x1,
  input  logic [EX_W-1:0]          ex_x2,
  input  logic [EX_W-1:0]          ex_x3,
  output logic [EX_W-1:0]          ex_y,
  output logic                     ex_y_valid,
  output logic                     ex_phase
);

  fold_step_t step;
  logic       en;

  fold_ctrl u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .x_valid(x_valid),
    .step   (step),
    .en     (en),
    .x_ready(x_ready)
  );

  logic signed [DATA_W-1:0] sect_out [N_SECT];

  for (genvar s = 0; s < N_SECT; s++) begin : g_sect
    gtf_biquad_folded #(
      .DATA_W   (DATA_W),
      .COEF_W   (COEF_W),
      .COEF_FRAC(COEF_FRAC)
    ) u_sect (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .step (step),
      .x    ((s == 0) ? x : sect_out[(s == 0) ? 0 : s - 1]),
      .coef (coef[s]),
      .y    (sect_out[s])
    );
  end

  assign y = sect_out[N_SECT-1];

  // y_valid: pulse after each update of the last section's R5 (edge closing
  // step 3), once N_SECT samples have entered the cascade.
  logic [2:0] n_in;     // accepted samples, saturating at N_SECT

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_in    <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (en && x_ready && n_in != 3'(N_SECT)) n_in <= n_in + 1'b1;
      if (en && step == 3'd3 && n_in == 3'(N_SECT)) y_valid <= 1'b1;
    end
  end

  // An output pulse follows the edge that closes step 3, so it is always
  // seen in step 4.
  a_yvalid_step: assert property (@(posedge clk) disable iff (!rst_n)
                                  y_valid |-> step == 3'd4);

  fold_add3 #(.W(EX_W)) u_ex (
    .clk    (clk),
    .rst_n  (rst_n),
    .x1     (ex_x1),
    .x2     (ex_x2),
    .x3     (ex_x3),
    .y      (ex_y),
    .y_valid(ex_y_valid),
    .phase  (ex_phase)
  );

endmodule
