// tb_fir_mc_top_serial: end-to-end test of the eight-channel filter built
// with a single shared multiplier (N_MUL = 1): the same checks as the
// default-size test, with the nine multiplications done one after another.
//
// A model kept here holds every channel's 17-sample history and the full
// 17 coefficients (unfolded, h(k) = h(16-k)) and computes
// y(n) = sum h(k) x(n-k) with 64-bit integers, clamped to 32 bits. Every
// result the filter produces is compared with it, together with its
// channel, its saturation flag and its latency (1 + 18*G + 9 cycles from
// the accepting cycle, G = ceil(9/N_MUL) multiplier groups: 28 cycles with
// the default 9 multipliers). The phases are:
//   1. impulse response: a unit impulse on one channel must reproduce the
//      17 coefficients in order, then zeros;
//   2. random samples on random channels, offered back to back so that
//      the input is held off while the filter is busy;
//   3. coefficient reload between samples, then more random traffic;
//   4. full-scale inputs that saturate positive and negative;
//   5. a case whose partial sum leaves the 32-bit range but whose final
//      value is back inside it, which needs the accumulator's guard bits.
// Each mechanism is counted and a failure is counted for any that never
// occurred.
module tb_fir_mc_top_serial;
  localparam int N_CH = 8;
  localparam int N_TAPS = 17;
  localparam int N_U = 9;
  localparam int N_MUL = 1;
  localparam int LAT = 1 + 18 * ((N_U + N_MUL - 1) / N_MUL) + N_U;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [2:0] in_ch = '0;
  logic signed [15:0] in_data = '0;
  logic coef_we = 0;
  logic [3:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic out_valid, out_sat;
  logic [2:0] out_ch;
  logic signed [31:0] out_data;

  fir_mc_top #(.N_MUL(N_MUL)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  longint hist [N_CH][N_TAPS];
  longint hu [N_U];

  typedef struct {
    int     ch;
    longint y;
    bit     sat;
    longint t;
  } exp_t;
  exp_t expq[$];

  function automatic longint coef_of(int k);
    return hu[(k < N_U) ? k : N_TAPS - 1 - k];
  endfunction

  // mechanism counters
  int n_ch_used [N_CH];
  int n_stall = 0, n_sat_pos = 0, n_sat_neg = 0, n_reload = 0, n_guard = 0;
  int n_impulse = 0, n_results = 0;

  // ---------------- drivers ----------------
  task automatic write_coef(int idx, int val);
    @(negedge clk);
    coef_we = 1; coef_addr = 4'(idx); coef_data = 16'(val);
    @(posedge clk);
    hu[idx] = longint'(coef_data);
    @(negedge clk);
    coef_we = 0;
  endtask

  task automatic wait_idle();
    while (expq.size() != 0) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic send(int c, int x);
    exp_t e;
    longint acc;
    @(negedge clk);
    in_valid = 1; in_ch = 3'(c); in_data = 16'(x);
    while (!in_ready) begin
      n_stall++;
      @(negedge clk);
    end
    e.t = cyc;
    @(posedge clk);
    for (int t = N_TAPS - 1; t > 0; t--) hist[c][t] = hist[c][t-1];
    hist[c][0] = longint'(in_data);
    acc = 0;
    for (int k = 0; k < N_TAPS; k++) acc += coef_of(k) * hist[c][k];
    e.ch = c; e.sat = 0; e.y = acc;
    if (acc > 64'sd2147483647)  begin e.y = 64'sd2147483647;  e.sat = 1; end
    if (acc < -64'sd2147483648) begin e.y = -64'sd2147483648; e.sat = 1; end
    expq.push_back(e);
    n_ch_used[c]++;
    @(negedge clk);
    in_valid = 0; in_data = 16'($urandom); in_ch = 3'($urandom);
  endtask

  // ---------------- output monitor ----------------
  bit wide_partial = 0;
  always @(negedge clk) begin
    if (dut.u_acc.acc > 40'sd2147483647 || dut.u_acc.acc < -40'sd2147483648)
      wide_partial <= 1;
    if (out_valid) begin
      exp_t e;
      n_results++;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected result");
      end else begin
        e = expq.pop_front();
        if (out_ch != 3'(e.ch) || longint'(out_data) != e.y || out_sat != e.sat) begin
          failures++;
          $display("ch %0d: got ch %0d y %0d sat %0b, expected y %0d sat %0b",
                   e.ch, out_ch, out_data, out_sat, e.y, e.sat);
        end
        checks++;
        if (cyc - e.t != longint'(LAT)) begin
          failures++;
          $display("latency %0d expected %0d", cyc - e.t, LAT);
        end
        if (e.sat && e.y > 0) n_sat_pos++;
        if (e.sat && e.y < 0) n_sat_neg++;
        if (wide_partial && !e.sat) n_guard++;
      end
      wide_partial <= 0;
    end
  end

  task automatic mech(string name, int n);
    checks++;
    $display("%-28s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    foreach (hist[c, t]) hist[c][t] = 0;
    foreach (hu[i]) hu[i] = 0;
    foreach (n_ch_used[i]) n_ch_used[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. impulse response on channel 5
    for (int i = 0; i < N_U; i++) write_coef(i, int'($urandom % 20001) - 10000);
    send(5, 1);
    wait_idle();
    for (int n = 1; n < N_TAPS + 3; n++) begin
      send(5, 0);
      wait_idle();
      checks++;
      if (longint'(out_data) != ((n < N_TAPS) ? coef_of(n) : 0)) begin
        failures++;
        $display("impulse response sample %0d = %0d", n, out_data);
      end else n_impulse++;
    end

    // 2. random back-to-back traffic on all channels
    for (int i = 0; i < 200; i++) send($urandom % N_CH, int'($urandom));
    wait_idle();

    // 3. reload coefficients, then more traffic
    for (int i = 0; i < N_U; i++) write_coef(i, int'($urandom));
    n_reload++;
    for (int i = 0; i < 200; i++) send($urandom % N_CH, int'($urandom));
    wait_idle();

    // 4. saturation, both directions, on channel 2
    for (int i = 0; i < N_U; i++) write_coef(i, 32767);
    n_reload++;
    for (int i = 0; i < N_TAPS; i++) send(2, 32767);
    for (int i = 0; i < N_TAPS; i++) send(2, -32768);
    wait_idle();

    // 5. guard bits: pair 0 gives +2^31, pair 1 brings it back to 65536
    write_coef(0, -32768);
    write_coef(1, 32767);
    for (int i = 2; i < N_U; i++) write_coef(i, 0);
    n_reload++;
    for (int i = 0; i < N_TAPS; i++) send(7, -32768);
    wait_idle();
    checks++;
    if (out_data != 32'sd65536 || out_sat) begin
      failures++;
      $display("guard-bit case gave %0d sat %0b", out_data, out_sat);
    end

    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d results missing", expq.size());
    end

    for (int c = 0; c < N_CH; c++) mech($sformatf("samples on channel %0d", c), n_ch_used[c]);
    mech("input held off while busy", n_stall);
    mech("coefficient reloads", n_reload);
    mech("impulse response taps", n_impulse);
    mech("positive saturation", n_sat_pos);
    mech("negative saturation", n_sat_neg);
    mech("guard bits used", n_guard);
    mech("results", n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
