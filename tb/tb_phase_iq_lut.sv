// tb_phase_iq_lut - compares every table entry with cos/sin computed here.
//
// For each phase k the expected sample is 2047*exp(j*(k+0.5)*2*pi/256),
// rounded; the output must match within one LSB and appear exactly one
// clock after the phase is applied. A second instance checks the table
// without the half-step offset.
module tb_phase_iq_lut;

  logic              clk = 1'b0;
  logic [7:0]        phase;
  logic signed [11:0] c1, s1, c0, s0;
  int checks = 0, failures = 0;

  phase_iq_lut #(.PHASE_W(8), .IQ_W(12), .HALF_LSB(1'b1)) dut_h (
    .clk(clk), .phase(phase), .cos_o(c1), .sin_o(s1));
  phase_iq_lut #(.PHASE_W(8), .IQ_W(12), .HALF_LSB(1'b0)) dut_0 (
    .clk(clk), .phase(phase), .cos_o(c0), .sin_o(s0));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(int got, real want);
    return (real'(got) - want <= 1.0) && (want - real'(got) <= 1.0);
  endfunction

  initial begin
    real a;
    phase = 8'd0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      phase = 8'(k);
      @(negedge clk);                 // one rising edge later
      phase = 8'(k + 77);             // changing the input must not disturb the output yet
      a = (real'(k) + 0.5) * 2.0 * 3.14159265358979 / 256.0;
      checks += 4;
      if (!near(c1, 2047.0 * $cos(a))) begin failures++; $display("FAIL cos k=%0d %0d", k, c1); end
      if (!near(s1, 2047.0 * $sin(a))) begin failures++; $display("FAIL sin k=%0d %0d", k, s1); end
      a = real'(k) * 2.0 * 3.14159265358979 / 256.0;
      if (!near(c0, 2047.0 * $cos(a))) begin failures++; $display("FAIL cos0 k=%0d %0d", k, c0); end
      if (!near(s0, 2047.0 * $sin(a))) begin failures++; $display("FAIL sin0 k=%0d %0d", k, s0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
