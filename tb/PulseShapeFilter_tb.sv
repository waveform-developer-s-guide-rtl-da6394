// PulseShapeFilter_tb: checks the x8 root-raised-cosine filter against a
// reference written with the simulator's real-valued $sin/$cos.
//
// Random symbols are fed with a symbol enable every 8 clocks. The reference
// keeps its own symbol history and phase and sums +-h over the last seven
// symbols, with h = PEAK * rrc(t) / rrc(0), rounded; every output sample must
// match to within 1. Also checks the centre tap (an isolated symbol gives
// +PEAK at its centre) and that the output never exceeds 16 bits. A watchdog
// ends the run if it hangs.
module PulseShapeFilter_tb;
  localparam int OSR = 8, SPAN = 6, PEAK = 12000;
  localparam real A = 0.35;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, se, b;
  logic signed [15:0] y;

  PulseShapeFilter dut (.Clk(clk), .Reset(rst), .SymbEn(se), .BitIn(b), .DataOut(y));

  int checks = 0, failures = 0;
  int h[OSR*SPAN+1];
  bit hist[$];
  int ph;

  function automatic real rrc(real t);
    if (t == 0.0) return 1.0 - A + 4.0 * A / PI;
    return ($sin(PI*t*(1.0-A)) + 4.0*A*t*$cos(PI*t*(1.0+A))) / (PI*t*(1.0 - (4.0*A*t)**2));
  endfunction

  function automatic int model();
    int s = 0;
    for (int k = 0; k <= SPAN; k++)
      if (ph + OSR*k <= OSR*SPAN && k < hist.size())
        s += hist[hist.size()-1-k] ? -h[ph + OSR*k] : h[ph + OSR*k];
    return s;
  endfunction

  initial begin
    #1000000 $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int exp_v, peak_seen;
  real v;
  initial begin
    for (int n = 0; n <= OSR*SPAN; n++) begin
      v = real'(PEAK) * rrc(real'(n - OSR*SPAN/2) / real'(OSR)) / rrc(0.0);
      h[n] = v < 0.0 ? -$rtoi(-v + 0.5) : $rtoi(v + 0.5);
    end
    rst = 1; se = 0; b = 0; ph = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k <= SPAN; k++) hist.push_back(0);
    // phase 1: one isolated +1 symbol among -1s shows the impulse response
    // phase 2: random symbols
    for (int sym = 0; sym < 400; sym++) begin
      for (int s = 0; s < OSR; s++) begin
        @(negedge clk);
        se = (s == 0);
        if (s == 0) b = (sym < 20) ? (sym != 10) : 1'($urandom);
        @(posedge clk);
        #1;
        // the register loaded on this edge holds the sum for the phase before it
        if (sym > 0 || s > 0) begin
          checks++;
          if (y > exp_v + 1 || y < exp_v - 1) begin
            failures++;
            if (failures < 10) $display("FAIL sym %0d s %0d: got %0d exp %0d", sym, s, y, exp_v);
          end
        end
        if (sym == 10 + SPAN/2 && s == 1) peak_seen = y;
        if (se) begin hist.push_back(b); if (hist.size() > SPAN+1) void'(hist.pop_front()); ph = 0; end
        else ph++;
        exp_v = model();
      end
    end
    // isolated 0 symbol (+1) among 1s (-1): the centre sample is the centre
    // tap PEAK minus the neighbours' taps one, two and three symbols away
    exp_v = PEAK;
    for (int k = 1; k <= SPAN/2; k++) exp_v -= h[OSR*SPAN/2 + OSR*k] + h[OSR*SPAN/2 - OSR*k];
    checks++;
    if (peak_seen > exp_v + 1 || peak_seen < exp_v - 1 || h[OSR*SPAN/2] != PEAK) begin
      failures++; $display("FAIL centre %0d exp %0d", peak_seen, exp_v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
