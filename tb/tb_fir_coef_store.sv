// tb_fir_coef_store: self-checking test of the coefficient registers.
//
// Checks that reset clears all 9 entries, then makes random writes
// (including ones to unused addresses, which must be ignored) and reads
// every entry back against a model array.
module tb_fir_coef_store;
  localparam int N_TAPS = 17;
  localparam int N_U = 9;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = '0;
  logic signed [15:0] wdata = '0;
  logic signed [15:0] coefs [N_U];
  logic signed [15:0] model [16];
  int checks = 0, failures = 0;

  fir_coef_store #(.N_TAPS(N_TAPS), .W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    #1;
    for (int i = 0; i < N_U; i++) begin
      checks++;
      if (coefs[i] != model[i]) begin
        failures++;
        $display("entry %0d = %0d expected %0d", i, coefs[i], model[i]);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = 1; waddr = 4'($urandom); wdata = 16'($urandom);
      @(posedge clk);
      if (int'(waddr) < N_U) model[waddr] = wdata;
      @(negedge clk);
      we = 0; wdata = 16'($urandom);
      if (n % 10 == 0) check_all();
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
