// tb_fir_saturate: self-checking test of the 40-to-32-bit saturation.
//
// Checks values at and just beyond both 32-bit limits, the 40-bit extremes
// and random values of every magnitude against a clamp worked out with
// 64-bit integers.
module tb_fir_saturate;
  logic signed [39:0] din;
  logic signed [31:0] dout;
  logic sat;
  int checks = 0, failures = 0;

  fir_saturate #(.IN_W(40), .OUT_W_P(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input longint v);
    longint e;
    logic es;
    din = 40'(v);
    #1;
    es = 0;
    e = longint'(din);
    if (e > 64'sd2147483647) begin e = 64'sd2147483647; es = 1; end
    if (e < -64'sd2147483648) begin e = -64'sd2147483648; es = 1; end
    checks++;
    if (longint'(dout) != e || sat != es) begin
      failures++;
      $display("din=%0d dout=%0d sat=%0b expected %0d %0b", din, dout, sat, e, es);
    end
  endtask

  initial begin
    chk(0); chk(1); chk(-1);
    chk(64'sd2147483647); chk(64'sd2147483648);
    chk(-64'sd2147483648); chk(-64'sd2147483649);
    chk(64'sd549755813887); chk(-64'sd549755813888);
    repeat (1000) chk(longint'({$urandom, $urandom}) >>> ($urandom % 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
