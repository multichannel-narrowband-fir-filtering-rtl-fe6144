// tb_fir_preadder: self-checking test of the symmetric pre-adder.
//
// Applies extreme and random sample pairs, with and without the centre
// flag, and compares the 17-bit sum with integer arithmetic.
module tb_fir_preadder;
  localparam int W = 16;
  logic signed [W-1:0] a, b;
  logic center;
  logic signed [W:0] sum;
  int checks = 0, failures = 0;

  fir_preadder #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic signed [W-1:0] ta, input logic signed [W-1:0] tb_, input logic c);
    int expct;
    a = ta; b = tb_; center = c;
    #1;
    expct = c ? int'(ta) : int'(ta) + int'(tb_);
    checks++;
    if (int'(sum) != expct) begin
      failures++;
      $display("a=%0d b=%0d center=%0b sum=%0d expected %0d", ta, tb_, c, sum, expct);
    end
  endtask

  initial begin
    chk(16'sh7fff, 16'sh7fff, 0);
    chk(-16'sh8000, -16'sh8000, 0);
    chk(16'sh7fff, -16'sh8000, 0);
    chk(-16'sh8000, 16'sh1234, 1);
    chk(16'sh7fff, 16'sh7fff, 1);
    repeat (500) chk(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
