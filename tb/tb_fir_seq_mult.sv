// tb_fir_seq_mult: self-checking test of the shift-add multiplier.
//
// Multiplies corner operands (zero, one, minus one, the most positive and
// most negative values of both widths) and 300 random pairs, compares each
// product with the simulator's own signed multiplication, and checks that
// done rises exactly BW+1 cycles after the start cycle and lasts one cycle.
module tb_fir_seq_mult;
  localparam int AW = 17;
  localparam int BW = 16;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic signed [AW-1:0] a = '0;
  logic signed [BW-1:0] b = '0;
  logic busy, done;
  logic signed [AW+BW-1:0] p;
  int checks = 0, failures = 0;

  fir_seq_mult #(.AW(AW), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic signed [AW-1:0] ta, input logic signed [BW-1:0] tb_);
    longint expct;
    int cyc;
    expct = longint'(ta) * longint'(tb_);
    @(negedge clk);
    a = ta; b = tb_; start = 1;
    @(negedge clk);
    start = 0; a = AW'($urandom); b = BW'($urandom);  // operands need not be held
    cyc = 1;
    while (!done && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != BW + 1) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, BW + 1);
    end
    checks++;
    if (longint'(p) != expct) begin
      failures++;
      $display("%0d * %0d = %0d, expected %0d", ta, tb_, p, expct);
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("done/busy not cleared after one cycle");
    end
  endtask

  initial begin
    logic signed [AW-1:0] ca [6];
    logic signed [BW-1:0] cb [6];
    ca = '{0, 1, -1, (1 <<< (AW-1)) - 1, -(1 <<< (AW-1)), 12345};
    cb = '{0, 1, -1, (1 <<< (BW-1)) - 1, -(1 <<< (BW-1)), -321};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ca[i]) foreach (cb[j]) run(ca[i], cb[j]);
    repeat (300) run(AW'($urandom), BW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
