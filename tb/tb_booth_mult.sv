// Self-checking testbench of the two-stage Booth multiplier at its default
// sizes (16-bit data, 8-bit coefficient, 6 fraction bits).  Random and
// corner operands are issued with a random enable; each result must appear
// exactly two enabled edges after its operands and equal
// sat((a*b) >>> 6), computed here with integer arithmetic.
module tb_booth_mult;
  import gtf_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [15:0] a;
  logic signed [7:0]  b;
  logic signed [15:0] p;
  int checks = 0, failures = 0;
  int q [$];            // expected results, in issue order
  int pend = 0;         // enabled issues whose result is not yet out

  booth_mult dut (.clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    int n;
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    n = 0;
    while (n < 3000) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      case ($urandom % 8)
        0: begin a = 16'sh8000; b = 8'sh80; end
        1: begin a = 16'sh7fff; b = 8'sh7f; end
        2: begin a = 16'sh8000; b = 8'sh7f; end
        default: begin a = 16'($urandom); b = 8'($urandom); end
      endcase
      if (en) begin
        q.push_back(mul(int'(b), int'(a)));
        n++;
      end
      @(posedge clk);
      #1;
      if (en) begin
        pend++;
        if (pend >= 2) begin
          int e;
          e = q.pop_front();
          pend--;
          checks++;
          if (int'(p) != e) begin
            failures++;
            $display("FAIL got %0d exp %0d", p, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
