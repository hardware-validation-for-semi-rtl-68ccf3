// tb_phase_derotator - complex derotation against a real-number model.
//
// Random chips of up to full scale and random phases are streamed one per
// clock, with gaps and some bypassed chips. Each output must equal
// (i + jq) * exp(-j*(k+0.5)*2*pi/256) * 2047/2048 within 2 LSB (bypassed
// chips exactly) and arrive exactly two clocks after its input.
module tb_phase_derotator;

  logic               clk = 1'b0, rst_n = 1'b1;
  logic               in_valid = 1'b0, bypass = 1'b0;
  logic signed [11:0] in_i = '0, in_q = '0;
  logic [7:0]         phase = '0;
  logic               out_valid;
  logic signed [12:0] out_i, out_q;
  int checks = 0, failures = 0;

  typedef struct { real re; real im; bit byp; int cyc; } exp_t;
  exp_t q[$];
  int cyc = 0;

  phase_derotator #(.IN_W(12), .PHASE_W(8), .LUT_W(12), .HALF_LSB(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_i(in_i), .in_q(in_q),
    .phase(phase), .bypass(bypass), .out_valid(out_valid), .out_i(out_i), .out_q(out_q));

  always #5 clk = ~clk;

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        if (cyc - e.cyc != 2) begin
          failures++;
          $display("FAIL latency %0d", cyc - e.cyc);
        end
        checks++;
        if (rabs(real'(out_i) - e.re) > 2.0 || rabs(real'(out_q) - e.im) > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d,%0d exp %f,%f byp=%0d", out_i, out_q, e.re, e.im, e.byp);
        end
      end
    end
  end

  initial begin
    real a, g;
    exp_t e;
    g = 2047.0 / 2048.0;
    #2 rst_n = 1'b0;   // a falling edge, so the asynchronous reset is seen
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      bypass   = ($urandom_range(0, 9) == 0);
      in_i     = 12'($urandom_range(0, 4094) - 2047);
      in_q     = 12'($urandom_range(0, 4094) - 2047);
      if (n < 4) begin in_i = 12'sd2047; in_q = 12'sd2047; end
      phase    = 8'($urandom);
      if (in_valid) begin
        a = (real'(phase) + 0.5) * 2.0 * 3.14159265358979 / 256.0;
        e.byp = bypass;
        e.cyc = cyc;
        if (bypass) begin
          e.re = real'(in_i);
          e.im = real'(in_q);
        end else begin
          e.re = g * (real'(in_i) * $cos(a) + real'(in_q) * $sin(a));
          e.im = g * (real'(in_q) * $cos(a) - real'(in_i) * $sin(a));
        end
        q.push_back(e);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
