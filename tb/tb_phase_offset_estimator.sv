// tb_phase_offset_estimator - CORDIC angle estimate against atan2.
//
// Drives complex values of random angle and magnitude (from a few thousand
// up to the full 34-bit correlation range, all four quadrants and the axes)
// into the estimator at its default size (8-bit phase, 12 iterations) and
// checks: the phase index is within one step of round(atan2(im, re) * 256 /
// 2*pi) modulo 256, done comes exactly ITER + 1 clocks after start, done is a
// single pulse, and phase holds its value until the next start.
module tb_phase_offset_estimator;

  localparam int  IN_W = 34;
  localparam int  ITER = 12;
  localparam real PI   = 3.14159265358979;

  logic                   clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic signed [IN_W-1:0] re = '0, im = '0;
  logic                   done;
  logic [7:0]             phase;

  int checks = 0, failures = 0;

  phase_offset_estimator #(.IN_W(IN_W), .PHASE_W(8), .FRAC(4), .ITER(ITER)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .re(re), .im(im), .done(done), .phase(phase));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_exact = 0, n_off1 = 0, n_quad [4] = '{0, 0, 0, 0};

  task automatic one(real ang, real mag);
    longint r, i;
    int exp_idx, d, lat;
    logic [7:0] held;
    r = longint'($floor(mag * $cos(ang) + 0.5));
    i = longint'($floor(mag * $sin(ang) + 0.5));
    exp_idx = int'($floor($atan2(real'(i), real'(r)) * 256.0 / (2.0 * PI) + 0.5));
    exp_idx = ((exp_idx % 256) + 256) % 256;
    @(negedge clk);
    re = IN_W'(r);
    im = IN_W'(i);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    re = IN_W'(longint'($urandom));   // inputs are only read with start
    im = IN_W'(longint'($urandom));
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (lat != ITER + 1) begin failures++; $display("FAIL done after %0d clocks", lat); end
    @(negedge clk);
    checks += 2;
    if (done) begin failures++; $display("FAIL done longer than one clock"); end
    d = ((int'(phase) - exp_idx + 384) % 256) - 128;
    if (d == 0) n_exact++;
    else if (d == 1 || d == -1) n_off1++;
    else begin
      failures++;
      $display("FAIL angle %f mag %e: phase %0d expected %0d", ang, mag, phase, exp_idx);
    end
    n_quad[(exp_idx / 64) % 4]++;
    held = phase;
    repeat ($urandom_range(0, 5)) @(negedge clk);
    if (phase != held) begin failures++; $display("FAIL phase changed without start"); end
  endtask

  initial begin
    #2 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // axes and diagonals
    for (int k = 0; k < 8; k++) one(real'(k) * PI / 4.0, 1.0e9);
    // random
    for (int n = 0; n < 2000; n++) begin
      real ang, mag;
      ang = 2.0 * PI * real'($urandom) / 4294967296.0;
      mag = 4000.0 * (2.0 ** (real'($urandom_range(0, 1000)) / 1000.0 * 21.0));
      if (mag > 8.0e9) mag = 8.0e9;
      one(ang, mag);
    end
    $display("exact %0d, one step off %0d, per quadrant %0d %0d %0d %0d",
             n_exact, n_off1, n_quad[0], n_quad[1], n_quad[2], n_quad[3]);
    checks += 2;
    if (n_exact < 1800) begin failures++; $display("FAIL too few exact estimates"); end
    if (n_quad[0] == 0 || n_quad[1] == 0 || n_quad[2] == 0 || n_quad[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
