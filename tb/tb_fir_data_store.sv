// tb_fir_data_store: self-checking test of the per-channel delay lines.
//
// Shifts random samples into random channels of the 8 x 17 store, with
// idle cycles in between, and after every cycle reads the whole history of
// random channels, comparing it with a model that keeps each channel's
// history. Also checks that reset leaves every tap at zero.
module tb_fir_data_store;
  localparam int N_CH = 8;
  localparam int N_TAPS = 17;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic [2:0] wr_ch = '0, rd_ch = '0;
  logic signed [15:0] wr_data = '0;
  logic signed [15:0] rd_line [N_TAPS];
  logic signed [15:0] model [N_CH][N_TAPS];
  int checks = 0, failures = 0;

  fir_data_store #(.N_CH(N_CH), .N_TAPS(N_TAPS), .W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(input int c);
    rd_ch = 3'(c);
    #1;
    for (int t = 0; t < N_TAPS; t++) begin
      checks++;
      if (rd_line[t] != model[c][t]) begin
        failures++;
        $display("ch %0d tap %0d = %0d expected %0d", c, t, rd_line[t], model[c][t]);
      end
    end
  endtask

  initial begin
    foreach (model[c, t]) model[c][t] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < N_CH; c++) probe(c);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      shift_en = ($urandom % 3) != 0;
      wr_ch = 3'($urandom);
      wr_data = 16'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int t = N_TAPS - 1; t > 0; t--) model[wr_ch][t] = model[wr_ch][t-1];
        model[wr_ch][0] = wr_data;
      end
      @(negedge clk);
      shift_en = 0;
      repeat (2) probe($urandom % N_CH);
    end
    for (int c = 0; c < N_CH; c++) probe(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
