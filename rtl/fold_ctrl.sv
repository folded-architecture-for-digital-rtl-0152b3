// Folding controller: generates the time step m of the switching instance
// 5l+m that steers every multiplexer of the folded filter sections.
//
// A modulo-K counter (K = 5, the folding factor) advances once per clock.
// Step K-1 is the last step of an iteration; at its closing edge the first
// section loads a new input sample.  The published architecture gives the folding factor
// and the form 5l+m of the switching instances; the sample handshake is this
// design's own: in step K-1 the controller raises x_ready, and if x_valid is
// low it stalls by dropping the global enable en, which freezes every
// register of the datapath until a sample arrives.  Thus one sample is taken
// per K enabled cycles, and the filter idles between samples when the clock
// is faster than K times the sampling rate.
//   step     current time step m (0..K-1); reset value K-1 (waiting for
//            the first sample)
//   en       datapath clock enable (low only while stalled in step K-1)
//   x_ready  high in step K-1: x_valid & x_ready accepts a sample
module fold_ctrl
  import gtf_pkg::*;
#(
  parameter int unsigned FOLD = K
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x_valid,
  output fold_step_t step,
  output logic       en,
  output logic       x_ready
);

  localparam fold_step_t LAST = fold_step_t'(FOLD - 1);

  assign x_ready = (step == LAST);
  assign en      = !(x_ready && !x_valid);

  always_ff @(posedge clk) begin
    if (!rst_n)          step <= LAST;
    else if (en)         step <= (step == LAST) ? '0 : step + 1'b1;
  end

  // Handshake rules: the step stays in range, and the datapath only ever
  // waits in the last step, where a sample is expected.
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n) step <= LAST);
  a_stall_only_last: assert property (@(posedge clk) disable iff (!rst_n) !en |-> x_ready);
  a_wait_holds: assert property (@(posedge clk) disable iff (!rst_n)
                                 (x_ready && !x_valid) |=> (step == LAST));

endmodule
