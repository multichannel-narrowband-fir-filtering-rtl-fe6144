// tb_fir_accumulator: self-checking test of the 40-bit accumulator.
//
// Adds runs of random 33-bit products (including full-scale ones, so that
// the sum leaves the 32-bit range and uses the guard bits), clears it, and
// idles it, comparing the register with a 64-bit model after every cycle.
module tb_fir_accumulator;
  localparam int IN_W = 33;
  localparam int AW = 40;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic signed [IN_W-1:0] din = '0;
  logic signed [AW-1:0] acc;
  longint model = 0;
  int checks = 0, failures = 0, guard_used = 0;

  fir_accumulator #(.IN_W(IN_W), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clr = ($urandom % 40) == 0;
      en  = ($urandom % 4) != 0;
      if (($urandom % 3) == 0) din = (($urandom % 2) != 0) ? (33'sh0_FFFF_FFFF) : -(33'sh1_0000_0000);
      else                   din = IN_W'({$urandom, $urandom});
      @(posedge clk);
      if (clr) model = 0;
      else if (en) model = model + longint'(din);
      #1;
      checks++;
      if (longint'(acc) != model) begin
        failures++;
        $display("acc=%0d expected %0d", acc, model);
      end
      if (model > 64'sd2147483647 || model < -64'sd2147483648) guard_used++;
    end
    checks++;
    if (guard_used == 0) begin
      failures++;
      $display("accumulator never left the 32-bit range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
