// Two-stage pipelined radix-4 (modified) Booth multiplier.
//
// Computes p = sat((a * b) >>> FRAC), a signed A_W-bit data word times a
// signed B_W-bit coefficient, rescaled by the coefficient's FRAC fraction
// bits and saturated to OUT_W bits.  The published architecture names a modified Booth
// multiplier with a regular partial product array, and gives the multiply
// two time units (T_M = 2, the "2D" after the multiplier of the folded
// section); the split of the work over the two stages is this design's own:
//   stage 1  Booth-recodes b in overlapping 3-bit groups into digits
//            {-2,-1,0,+1,+2} and registers the ceil(B_W/2) partial products
//            (each sign-extended to the full product width and pre-shifted);
//   stage 2  adds the partial products, shifts right arithmetically by FRAC
//            (truncation towards minus infinity), saturates and registers p.
// Timing: operands presented in a cycle with en = 1 give p two enabled
// clock edges later.  With en = 0 both stages hold.  Synchronous
// active-low reset clears both stages.
module booth_mult #(
  parameter int unsigned A_W   = 16,  // data width
  parameter int unsigned B_W   = 8,   // coefficient width
  parameter int unsigned FRAC  = 6,   // fraction bits of the coefficient
  parameter int unsigned OUT_W = 16   // width of the saturated result
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [A_W-1:0]   a,
  input  logic signed [B_W-1:0]   b,
  output logic signed [OUT_W-1:0] p
);

  localparam int unsigned NPP = (B_W + 1) / 2;   // number of partial products
  localparam int unsigned P_W = A_W + 2 * NPP;   // full product width

  localparam logic signed [P_W-1:0] OUT_MAX = P_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [P_W-1:0] OUT_MIN = -P_W'(64'sd1 <<< (OUT_W - 1));

  // ---- stage 1: Booth recoding and partial product generation ----------
  logic [2*NPP:0]          bx;      // b sign-extended, with the implicit 0 at bit -1
  logic [NPP-1:0][P_W-1:0] pp;        // partial products
  logic [NPP-1:0][P_W-1:0] pp_q;      // stage-1 pipeline register
  logic signed [P_W-1:0] a_ext;

  logic signed [2*NPP-1:0] b_ext;
  assign b_ext = b;                    // sign extension to an even width
  assign bx    = {b_ext, 1'b0};
  assign a_ext = P_W'(a);

  always_comb begin
    for (int j = 0; j < NPP; j++) begin
      logic [P_W-1:0] m;
      unique case (bx[2*j +: 3])
        3'b001, 3'b010: m = a_ext;
        3'b011:         m = a_ext <<< 1;
        3'b100:         m = -(a_ext <<< 1);
        3'b101, 3'b110: m = -a_ext;
        default:        m = '0;
      endcase
      pp[j] = m << (2 * j);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  pp_q <= '0;
    else if (en) pp_q <= pp;
  end

  // ---- stage 2: partial product sum, rescale, saturate -----------------
  logic signed [P_W-1:0] prod;
  logic signed [P_W-1:0] scaled;
  logic signed [OUT_W-1:0] p_d;

  always_comb begin
    prod = '0;
    for (int j = 0; j < NPP; j++) prod = prod + $signed(pp_q[j]);
    scaled = prod >>> FRAC;
    if (scaled > OUT_MAX)      p_d = OUT_W'(OUT_MAX);
    else if (scaled < OUT_MIN) p_d = OUT_W'(OUT_MIN);
    else                       p_d = OUT_W'(scaled);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  p <= '0;
    else if (en) p <= p_d;
  end

endmodule
