// Self-checking testbench of the folding controller.  x_valid is driven
// randomly; a cycle-by-cycle model predicts step, en and x_ready: the step
// counts 0,1,2,3,4 and waits in step 4 (en low) until x_valid is high.
// Also checks that back-to-back samples are taken exactly every 5 cycles.
module tb_fold_ctrl;
  import gtf_pkg::*;
  logic clk = 0, rst_n = 0, x_valid = 0;
  fold_step_t step;
  logic en, x_ready;
  int checks = 0, failures = 0;
  int exp_step;
  int last_accept = -1, cyc = 0, stalls = 0, periods5 = 0;

  fold_ctrl dut (.clk(clk), .rst_n(rst_n), .x_valid(x_valid),
                 .step(step), .en(en), .x_ready(x_ready));

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s (step=%0d en=%b rdy=%b)", cyc, what, step, en, x_ready);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    exp_step = 4;
    for (cyc = 0; cyc < 4000; cyc++) begin
      // first half: always valid; second half: random gaps
      x_valid = (cyc < 1000) ? 1'b1 : (($urandom % 3) == 0);
      #1;
      chk(int'(step) == exp_step, "step");
      chk(x_ready == (exp_step == 4), "x_ready");
      chk(en == !(exp_step == 4 && !x_valid), "en");
      if (x_ready && x_valid) begin
        if (last_accept >= 0 && cyc - last_accept == 5) periods5++;
        last_accept = cyc;
      end
      if (x_ready && !x_valid) stalls++;
      if (!(exp_step == 4 && !x_valid)) exp_step = (exp_step + 1) % 5;
      @(negedge clk);
    end
    chk(stalls > 0, "a stall happened");
    chk(periods5 > 100, "back-to-back samples every 5 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
