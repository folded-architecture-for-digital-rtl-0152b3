// Folding example: y(n) = x1(n) + x2(n) + x3(n) on a single adder.
//
// The two additions of the three-input sum are time-multiplexed (folding
// factor 2) onto one adder followed by one pipeline register D.  A phase bit
// gives the switching instance 2l+0 / 2l+1:
//   2l+0  D <= x1 + x2
//   2l+1  D <= D  + x3
// so at the start of the next 2l+0 cycle D holds x1+x2+x3.  The inputs of
// one sample must stay valid for both cycles of an iteration.  This is the
// introductory folding example of the published architecture; the widths, the phase register
// and the y_valid flag are this design's own.
//   y        = D, the sum, valid while y_valid is high (every 2l+0 cycle
//              after the first complete iteration); one sum every 2 cycles.
// Synchronous active-low reset; the phase starts at 2l+0.  Sums wrap
// modulo 2^W.
module fold_add3 #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  output logic [W-1:0] y,
  output logic         y_valid,
  output logic         phase      // 0: cycle 2l+0, 1: cycle 2l+1
);

  logic [W-1:0] d;
  logic [W-1:0] op_l, op_t;
  logic         done;               // one complete iteration has run

  assign op_l = phase ? d  : x1;    // left switch: x1 at 2l+0, D at 2l+1
  assign op_t = phase ? x3 : x2;    // top switch:  x2 at 2l+0, x3 at 2l+1

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d     <= '0;
      phase <= 1'b0;
      done  <= 1'b0;
    end else begin
      d     <= op_l + op_t;
      phase <= ~phase;
      if (phase) done <= 1'b1;
    end
  end

  assign y       = d;
  assign y_valid = done && !phase;

endmodule
