// Self-checking testbench of one folded second-order section.
//
// The testbench plays the controller: it counts the time step 0..4 and
// stalls in step 4 at random (en low).  Each sample loaded at the edge that
// closes step 4 is also run through the unfolded reference model
// (gtf_ref_pkg::sect_step).  The section's y must stay at the previous
// output through step 3 and show the new output from step 4 on, i.e. it
// must appear exactly 4 enabled cycles after the sample was taken.
// Three runs, each from reset: the first section of the 1 kHz gammatone
// channel with a sine input, the same with random input, and random
// coefficients with large inputs (which drives the saturation).
module tb_gtf_biquad_folded;
  import gtf_pkg::*;
  import gtf_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  fold_step_t step;
  logic signed [15:0] x, y;
  logic signed [7:0]  coef [N_COEF];
  int checks = 0, failures = 0;
  int c_int [5];
  sect_state_t st;
  int y_ref_prev, y_ref_cur;
  int stalls = 0;

  gtf_biquad_folded dut (.clk(clk), .rst_n(rst_n), .en(en), .step(step),
                         .x(x), .coef(coef), .y(y));

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: step=%0d y=%0d ref_prev=%0d ref_cur=%0d", what, step, y,
               y_ref_prev, y_ref_cur);
    end
  endtask

  // Run n samples from reset; mode 0: sine, 1: random small, 2: random full.
  task automatic run(int n, int mode);
    sect_result_t r;
    rst_n = 0; en = 0; step = 3'd4; x = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    st.s1 = 0; st.s2 = 0;
    y_ref_prev = 0; y_ref_cur = 0;
    for (int i = 0; i < n; i++) begin
      // step 4: optional stall cycles, then take a sample
      step = 3'd4;
      while (($urandom % 4) == 0) begin
        en = 0; x = 16'($urandom);
        stalls++;
        @(negedge clk);
        chk(y == 16'(y_ref_cur), "hold during stall");
      end
      en = 1;
      case (mode)
        0: x = 16'($rtoi(3000.0 * $sin(2.0 * 3.14159265 * 1000.0 * i / 16000.0)));
        1: x = 16'(int'($urandom % 8001) - 4000);
        default: x = 16'($urandom);
      endcase
      y_ref_prev = y_ref_cur;
      r          = sect_step(st, c_int, int'(x));
      st         = r.st;
      y_ref_cur  = r.y;
      @(negedge clk);
      x = 16'($urandom);          // input only matters at the step-4 edge
      for (int m = 0; m < 4; m++) begin
        step = 3'(m);
        en = 1;
        chk(y == 16'(y_ref_prev), "old output until step 3 closes");
        @(negedge clk);
      end
      step = 3'd4;
      chk(y == 16'(y_ref_cur), "new output in step 4");
    end
  endtask

  initial begin
    coef_set_t cs;
    cs = gtf_coefs(1000.0, 16000.0);
    for (int c = 0; c < 5; c++) begin
      c_int[c] = cs[0][c];
      coef[c]  = 8'(cs[0][c]);
    end
    run(300, 0);
    run(300, 1);
    for (int c = 0; c < 5; c++) begin
      c_int[c] = int'($signed(8'($urandom)));
      coef[c]  = 8'(c_int[c]);
    end
    run(300, 2);
    chk(stalls > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
