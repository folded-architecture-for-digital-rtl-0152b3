// Self-checking testbench of the ripple carry adder: corner operands and
// random operands at the width used in the filter (17 bits), result and
// carry out compared with the integer sum a + b + cin.
module tb_rca_adder;
  localparam int W = 17;   // the default width of the adder
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check_one(logic [W-1:0] ta, logic [W-1:0] tb_, logic tc);
    logic [W:0] exp_v;
    a = ta; b = tb_; cin = tc;
    #1;
    exp_v = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %h exp %h", ta, tb_, tc, {cout, sum}, exp_v);
    end
  endtask

  initial begin
    check_one('0, '0, 1'b0);
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b1);
    check_one({1'b0, {(W-1){1'b1}}}, 17'd1, 1'b0);
    for (int i = 0; i < 2000; i++)
      check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
