// tb_fir_ctrl: self-checking test of the filter sequencer.
//
// Three controllers are tested side by side, with 9, 4 and 1 multiplier
// lanes for a 17-tap filter (9 distinct coefficients): one group, three
// groups with a partly used last group, and nine groups. The test bench
// plays the multipliers: mult_done rises for one cycle exactly 17 cycles
// after each mult_start, like a 16-bit shift-add multiplier. For samples on
// random channels after random idle gaps it checks that the store shifts
// and the accumulator clears only on the accepting edge; that the groups
// are started in order; that the products are accumulated once each, in
// coefficient order k = grp*N_MUL + lane = 0..8, and only after the
// multipliers are done; that out_valid carries the right channel exactly
// 1 + 18*G + 9 cycles after acceptance; and that in_ready is low while busy.
module tb_fir_ctrl;
  localparam int N_CH = 8;
  localparam int N_TAPS = 17;
  localparam int N_U = 9;
  localparam int NCFG = 3;
  localparam int MULS [NCFG] = '{9, 4, 1};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int finished = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    $display("%s", s);
  endtask

  for (genvar ci = 0; ci < NCFG; ci++) begin : g_cfg
    localparam int NM  = MULS[ci];
    localparam int NG  = (N_U + NM - 1) / NM;
    localparam int GW  = (NG > 1) ? $clog2(NG) : 1;
    localparam int LW  = (NM > 1) ? $clog2(NM) : 1;
    localparam int LAT = 1 + 18 * NG + N_U;

    logic in_valid = 0;
    logic [2:0] in_ch = '0;
    logic in_ready, store_shift, mult_start, acc_clr, acc_en, out_valid;
    logic mult_done;
    logic [2:0] rd_ch, out_ch;
    logic [GW-1:0] grp;
    logic [LW-1:0] acc_lane;

    fir_ctrl #(.N_CH(N_CH), .N_TAPS(N_TAPS), .N_MUL(NM)) dut (.*);

    // Multiplier stand-in: done 17 cycles after start.
    int mcnt = -1;
    always_ff @(posedge clk) begin
      if (mult_start) mcnt <= 16;
      else if (mcnt > 0) mcnt <= mcnt - 1;
      else mcnt <= -1;
    end
    assign mult_done = (mcnt == 0);

    task automatic one_sample(input int ch);
      int cyc, starts, accs;
      bit have_product;
      @(negedge clk);
      in_valid = 1; in_ch = 3'(ch);
      #1;
      checks++;
      if (!in_ready || !store_shift || !acc_clr) fail("accept cycle signals wrong");
      @(negedge clk);
      in_valid = 0; in_ch = 3'($urandom);
      cyc = 1; starts = 0; accs = 0; have_product = 0;
      while (!out_valid && cyc < 1000) begin
        checks++;
        if (in_ready || store_shift || acc_clr) fail("ready/shift/clear while busy");
        checks++;
        if (rd_ch != 3'(ch)) fail("read channel changed");
        if (mult_done) have_product = 1;
        if (mult_start) begin
          checks++;
          if (int'(grp) != starts) fail($sformatf("N_MUL=%0d: group %0d started as %0d", NM, starts, grp));
          starts++;
          have_product = 0;
        end
        if (acc_en) begin
          checks++;
          if (int'(grp) * NM + int'(acc_lane) != accs || !have_product)
            fail($sformatf("N_MUL=%0d: product %0d taken from group %0d lane %0d", NM, accs, grp, acc_lane));
          accs++;
        end
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != LAT) fail($sformatf("N_MUL=%0d: latency %0d expected %0d", NM, cyc, LAT));
      checks++;
      if (starts != NG || accs != N_U) fail($sformatf("N_MUL=%0d: %0d starts %0d accumulates", NM, starts, accs));
      checks++;
      if (out_ch != 3'(ch)) fail("wrong output channel");
      @(negedge clk);
      checks++;
      if (out_valid || !in_ready) fail("out_valid not one cycle / not ready after");
    endtask

    initial begin
      @(posedge rst_n);
      repeat (2) @(negedge clk);
      checks++;
      if (!in_ready || out_valid || mult_start) fail("bad idle state");
      for (int i = 0; i < 40; i++) begin
        repeat ($urandom % 4) @(negedge clk);
        one_sample($urandom % N_CH);
      end
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
