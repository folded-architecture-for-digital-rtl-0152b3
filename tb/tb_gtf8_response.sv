// Frequency-response testbench of the 1 kHz gammatone channel (16 kHz
// sampling, 8-bit coefficients), run on the full filter at its default
// sizes.  For each test frequency the filter is reset and fed 1000 samples
// of a sine of amplitude 16000; the peak output over the last 500 samples
// gives the gain.  Every output is also compared with the unfolded
// reference cascade.  Expected shape, from the quantized coefficients:
// within 3 dB of unity gain at 1 kHz, the largest gain of the sweep there,
// below -20 dB at 750 Hz and 1250 Hz, and below -40 dB at 500 Hz and lower
// and at 1500 Hz and higher (the floor near -55 dB is the truncation noise
// of the 16-bit datapath).
module tb_gtf8_response;
  import gtf_pkg::*;
  import gtf_ref_pkg::*;

  localparam int NF = 14;
  localparam int AMP = 16000;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] x, y;
  logic x_valid = 0, x_ready, y_valid;
  logic signed [7:0] coef [N_SECT][N_COEF];
  logic [15:0] ex_x1 = 0, ex_x2 = 0, ex_x3 = 0, ex_y;
  logic ex_y_valid, ex_phase;

  int checks = 0, failures = 0;
  int c_int [N_SECT][5];
  sect_state_t st [N_SECT];
  int exp_q [$];
  int n_out, peak;

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
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

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

  always @(negedge clk) if (rst_n) begin
    if (y_valid) begin
      int e;
      e = exp_q.pop_front();
      chk(int'(y) == e, $sformatf("output %0d exp %0d", y, e));
      if (n_out >= 497) peak = (y < 0 && -int'(y) > peak) ? -int'(y) : (int'(y) > peak ? int'(y) : peak);
      n_out++;
    end
    if (x_valid && x_ready) exp_q.push_back(ref_cascade(int'(x)));
  end

  task automatic measure(real f, output real gain_db);
    @(posedge clk); #1;
    rst_n = 0; x_valid = 0;
    repeat (3) @(posedge clk);
    #1;
    for (int s = 0; s < N_SECT; s++) begin st[s].s1 = 0; st[s].s2 = 0; end
    exp_q.delete();
    n_out = 0; peak = 0;
    rst_n = 1;
    for (int i = 0; i < 1000; ) begin
      x_valid = 1;
      x = 16'($rtoi(AMP * $sin(2.0 * 3.14159265 * f * i / 16000.0)));
      @(negedge clk);
      if (x_ready) i++;
      @(posedge clk); #1;
    end
    x_valid = 0;
    repeat (10) @(negedge clk);
    chk(n_out == 997, $sformatf("output count %0d", n_out));
    gain_db = 20.0 * $log10(((peak > 0) ? peak : 1) / real'(AMP));
  endtask

  initial begin
    coef_set_t cs;
    real freqs [NF];
    real g [NF];
    real g1k;
    int  i1k;
    freqs = '{125.0, 250.0, 500.0, 750.0, 875.0, 1000.0, 1125.0, 1250.0,
              1500.0, 2000.0, 3000.0, 4000.0, 6000.0, 7500.0};
    cs = gtf_coefs(1000.0, 16000.0);
    for (int s = 0; s < N_SECT; s++)
      for (int c = 0; c < 5; c++) begin
        c_int[s][c] = cs[s][c];
        coef[s][c]  = 8'(cs[s][c]);
      end
    for (int k = 0; k < NF; k++) begin
      measure(freqs[k], g[k]);
      $display("f = %6.0f Hz  gain = %6.1f dB", freqs[k], g[k]);
      if (freqs[k] == 1000.0) begin g1k = g[k]; i1k = k; end
    end
    chk(g1k > -3.0 && g1k < 1.0, "unity gain at 1 kHz");
    for (int k = 0; k < NF; k++) begin
      if (k != i1k) chk(g[k] < g1k, $sformatf("1 kHz is the peak (%0.0f Hz)", freqs[k]));
      if (freqs[k] == 750.0 || freqs[k] == 1250.0)
        chk(g[k] < -20.0, $sformatf("skirt at %0.0f Hz", freqs[k]));
      if (freqs[k] <= 500.0 || freqs[k] >= 1500.0)
        chk(g[k] < -40.0, $sformatf("stop band at %0.0f Hz", freqs[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
