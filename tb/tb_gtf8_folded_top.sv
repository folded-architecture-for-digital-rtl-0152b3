// End-to-end testbench of the folded eighth-order gammatone filter, at the
// default sizes (16-bit data, 8-bit coefficients with 6 fraction bits).
//
// Coefficients of the 1 kHz channel at 16 kHz sampling are computed with
// the impulse-invariant gammatone design in gtf_ref_pkg.  Every output is
// compared with a cascade of four unfolded reference sections.  Runs, each
// from reset:
//   1. 1 kHz sine, a sample offered in every cycle (back-to-back samples,
//      one every 5 cycles);
//   2. 3 kHz sine with random gaps between samples (datapath stalls);
//   3. random coefficients and full-scale random input (saturation).
// Checked besides the values: latency of 19 enabled cycles from sample to
// output, one sample per 5 cycles without gaps, suppression of the first
// three output pulses, and the band-pass selectivity (the 1 kHz output
// swing must exceed ten times the 3 kHz one).  The folding example on the
// ex_* ports is driven alongside and checked every second cycle.  Each
// mechanism (back-to-back samples, stall, saturation, output suppression,
// use of all four sections) is counted and must occur at least once.
module tb_gtf8_folded_top;
  import gtf_pkg::*;
  import gtf_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] x, y;
  logic x_valid = 0, x_ready, y_valid;
  logic signed [7:0] coef [N_SECT][N_COEF];
  logic [15:0] ex_x1 = 0, ex_x2 = 0, ex_x3 = 0, ex_y;
  logic ex_y_valid, ex_phase;

  int checks = 0, failures = 0;

  gtf8_folded_top dut (
    .clk(clk), .rst_n(rst_n),
    .x(x), .x_valid(x_valid), .x_ready(x_ready), .coef(coef),
    .y(y), .y_valid(y_valid),
    .ex_x1(ex_x1), .ex_x2(ex_x2), .ex_x3(ex_x3),
    .ex_y(ex_y), .ex_y_valid(ex_y_valid), .ex_phase(ex_phase)
  );

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- reference cascade and bookkeeping -------------------------------
  int          c_int [N_SECT][5];
  sect_state_t st [N_SECT];
  int          exp_q [$];
  int          acc_edge_q [$];
  int          acc_stall_q [$];
  int          edge_cnt = 0, stall_cum = 0;
  int          n_out = 0, peak = 0;
  int          last_acc = -100;

  // mechanism counters
  int n_back2back = 0, n_stall = 0, n_sat = 0, n_suppressed = 0, n_sect_used = 0;
  int pulses_in_run = 0, accepts_in_run = 0;

  always @(posedge clk) edge_cnt++;

  function automatic int ref_cascade(int xin);
    sect_result_t r;
    int v;
    v = xin;
    for (int s = 0; s < N_SECT; s++) begin
      r     = sect_step(st[s], c_int[s], v);
      st[s] = r.st;
      v     = r.y;
    end
    return v;
  endfunction

  // Monitor, half a cycle after each edge.  The output is handled first:
  // a stall seen in this cycle delays only the edges still to come.
  always @(negedge clk) if (rst_n) begin
    if (y_valid) begin
      int e, ae, as_;
      pulses_in_run++;
      // outputs of samples 0..2 of a run must never be flagged: the first
      // pulse belongs to sample 0 only after 4 samples have entered.
      chk(accepts_in_run >= 4, "no output pulse before four samples");
      e   = exp_q.pop_front();
      ae  = acc_edge_q.pop_front();
      as_ = acc_stall_q.pop_front();
      chk(int'(y) == e, $sformatf("output value %0d exp %0d", y, e));
      chk(edge_cnt - ae - (stall_cum - as_) == 19,
          $sformatf("latency %0d", edge_cnt - ae - (stall_cum - as_)));
      if (y != 0) n_sect_used++;
      if ((y < 0 ? -int'(y) : int'(y)) > peak && n_out > 100) peak = (y < 0) ? -int'(y) : int'(y);
      n_out++;
    end
    if (x_ready && !x_valid) begin
      stall_cum++;
      n_stall++;
    end
    if (x_valid && x_ready) begin
      if (edge_cnt + 1 - last_acc == 5) n_back2back++;
      last_acc = edge_cnt + 1;
      exp_q.push_back(ref_cascade(int'(x)));
      acc_edge_q.push_back(edge_cnt + 1);
      acc_stall_q.push_back(stall_cum);
      accepts_in_run++;
    end
  end

  // ---- folding example driven alongside --------------------------------
  logic [15:0] ex_exp;
  logic        ex_started = 0;
  always @(negedge clk) begin
    if (!rst_n) ex_started <= 0;
    else if (!ex_phase) begin
      if (ex_started) chk(ex_y_valid && ex_y == ex_exp, "folding example sum");
      ex_x1 <= 16'($urandom); ex_x2 <= 16'($urandom); ex_x3 <= 16'($urandom);
      ex_started <= 1;
    end else begin
      ex_exp <= ex_x1 + ex_x2 + ex_x3;
    end
  end

  // ---- stimulus ----------------------------------------------------------
  task automatic do_reset();
    @(posedge clk);
    #1;
    rst_n = 0; x_valid = 0;
    repeat (3) @(posedge clk);
    #1;
    for (int s = 0; s < N_SECT; s++) begin st[s].s1 = 0; st[s].s2 = 0; end
    exp_q.delete(); acc_edge_q.delete(); acc_stall_q.delete();
    n_out = 0; peak = 0; pulses_in_run = 0; accepts_in_run = 0;
    rst_n = 1;
  endtask

  // mode 0: sine of frequency f, 1: full-scale random; gap_pct: chance of
  // leaving x_valid low in a cycle.
  task automatic run(int n, int mode, real f, int amp, int gap_pct);
    int i = 0;
    while (i < n) begin
      if (($urandom % 100) < gap_pct) begin
        x_valid = 0;
        x = 16'($urandom);
      end else begin
        x_valid = 1;
        if (mode == 0) x = 16'($rtoi(amp * $sin(2.0 * 3.14159265 * f * i / 16000.0)));
        else           x = 16'($urandom);
      end
      @(negedge clk);   // the monitor samples this cycle here
      if (x_valid && x_ready) i++;
      @(posedge clk);
      #1;
    end
    x_valid = 0;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    coef_set_t cs;
    int peak_1k, peak_3k, sat0;
    cs = gtf_coefs(1000.0, 16000.0);
    for (int s = 0; s < N_SECT; s++)
      for (int c = 0; c < 5; c++) begin
        c_int[s][c] = cs[s][c];
        coef[s][c]  = 8'(cs[s][c]);
      end

    do_reset();
    run(600, 0, 1000.0, 4000, 0);
    peak_1k = peak;
    chk(pulses_in_run == 597, "one output per sample after the first three");
    n_suppressed += accepts_in_run - pulses_in_run;

    do_reset();
    run(600, 0, 3000.0, 4000, 60);
    peak_3k = peak;
    chk(pulses_in_run == 597, "outputs with stalls");
    n_suppressed += accepts_in_run - pulses_in_run;
    $display("peak output: 1 kHz %0d, 3 kHz %0d", peak_1k, peak_3k);
    chk(peak_1k > 10 * peak_3k, "band-pass selectivity");
    chk(peak_1k > 1000, "pass-band output swing");

    sat0 = sat_events;
    for (int s = 0; s < N_SECT; s++)
      for (int c = 0; c < 5; c++) begin
        c_int[s][c] = int'($signed(8'($urandom)));
        coef[s][c]  = 8'(c_int[s][c]);
      end
    do_reset();
    run(400, 1, 0.0, 0, 30);
    n_sat = sat_events - sat0;
    n_suppressed += accepts_in_run - pulses_in_run;

    $display("mechanisms: back-to-back=%0d stall=%0d saturation=%0d suppressed=%0d nonzero_out=%0d",
             n_back2back, n_stall, n_sat, n_suppressed, n_sect_used);
    chk(n_back2back > 0, "back-to-back samples happened");
    chk(n_stall > 0, "stall happened");
    chk(n_sat > 0, "saturation happened");
    chk(n_suppressed == 9, "first three pulses suppressed in each run");
    chk(n_sect_used > 0, "non-zero output through all four sections");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
