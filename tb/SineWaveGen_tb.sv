// SineWaveGen_tb: runs the tone generator with several phase increments and
// compares every output with AMPLITUDE*sin / AMPLITUDE*cos of the table phase,
// computed here with $sin/$cos, allowing one LSB of rounding. Also checks that
// the outputs hold while ClockEn is low.
module SineWaveGen_tb;
  logic Clk = 0, Reset = 1, ClockEn = 0;
  logic [15:0] PhaseInc = 0;
  logic signed [15:0] SinOut, CosOut;
  int checks = 0, failures = 0;
  function automatic real absr(input real x); return x < 0.0 ? -x : x; endfunction

  SineWaveGen #(.LUT_BITS(10), .AMPLITUDE(32000)) dut (.Clk, .Reset, .ClockEn, .PhaseInc, .SinOut, .CosOut);
  always #5 Clk = ~Clk;

  initial begin
    logic [15:0] ph;
    real es, ec;
    logic signed [15:0] hs;
    repeat (2) @(posedge Clk);
    Reset <= 0;
    ph = 0;
    for (int k = 0; k < 1200; k++) begin
      @(negedge Clk) begin
        PhaseInc = (k < 400) ? 16'd64 : (k < 800) ? 16'd1000 : 16'd7777;
        ClockEn = 1;
      end
      @(negedge Clk) ClockEn = 0;
      es = 32000.0 * $sin(2.0 * 3.14159265358979 * real'(ph[15:6]) / 1024.0);
      ec = 32000.0 * $cos(2.0 * 3.14159265358979 * real'(ph[15:6]) / 1024.0);
      ph = ph + PhaseInc;
      checks += 2;
      if (absr(real'(SinOut) - es) > 1.0) begin failures++; $display("FAIL sin %0d exp %f", SinOut, es); end
      if (absr(real'(CosOut) - ec) > 1.0) begin failures++; $display("FAIL cos %0d exp %f", CosOut, ec); end
      if (k % 50 == 0) begin
        hs = SinOut;
        repeat (3) @(negedge Clk);
        checks++;
        if (SinOut !== hs) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge Clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
