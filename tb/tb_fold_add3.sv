// Self-checking testbench of the folding example: random x1, x2, x3 held
// for the two cycles of an iteration; at each 2l+0 cycle y must equal the
// sum of the previous iteration's inputs (one result every two cycles).
module tb_fold_add3;
  logic clk = 0, rst_n = 0;
  logic [15:0] x1, x2, x3, y;
  logic y_valid, phase;
  logic [15:0] exp_y;
  int checks = 0, failures = 0, outs = 0;
  int cyc = 0, last_out = -1, bad_rate = 0;

  fold_add3 dut (.clk(clk), .rst_n(rst_n), .x1(x1), .x2(x2), .x3(x3),
                 .y(y), .y_valid(y_valid), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    x1 = 0; x2 = 0; x3 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (y_valid) begin failures++; $display("FAIL y_valid right after reset"); end
    for (int it = 0; it < 500; it++) begin
      // cycle 2l+0
      checks++;
      if (phase !== 1'b0) begin failures++; $display("FAIL phase at 2l+0"); end
      if (it > 0) begin
        checks++;
        if (!y_valid || y !== exp_y) begin
          failures++;
          $display("FAIL it=%0d y=%h exp %h valid=%b", it, y, exp_y, y_valid);
        end
        if (last_out >= 0 && cyc - last_out != 2) bad_rate++;
        last_out = cyc;
        outs++;
      end
      x1 = 16'($urandom); x2 = 16'($urandom); x3 = 16'($urandom);
      exp_y = x1 + x2 + x3;
      @(negedge clk); cyc++;
      // cycle 2l+1
      checks++;
      if (y_valid) begin failures++; $display("FAIL y_valid at 2l+1"); end
      @(negedge clk); cyc++;
    end
    checks++;
    if (bad_rate != 0 || outs != 499) begin failures++; $display("FAIL rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
