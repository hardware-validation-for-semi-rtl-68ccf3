// tb_preamble_detector - the frame-start correlator at its full size (175
// chips, two samples per chip).
//
// Each trial arms the detector with a key, waits for ready, then sends
// silence or noise, one preamble symbol built from the reference model of the
// keyed generator (random data sign, random carrier phase, random amplitude
// near full scale, each chip held for two samples), and more silence. Samples
// arrive with occasional in_valid gaps. Checks:
//   ready comes WIN_CHIPS + 1 clocks after the edge that takes arm;
//   detect pulses only for the right key, one clock after the sample that
//   completes the symbol (its last chip's first or second copy), and at most
//   twice per symbol (once per copy);
//   det_mag is within 2 % of a floating-point model of the correlation, and
//   det_re/det_im (the complex correlation) within 1 %;
//   a wrong key, noise alone, or search low never give a detection.
module tb_preamble_detector;
  import sc_pkg::*;
  `include "sc_ref_model.svh"

  localparam int N   = 175;
  localparam int OSR = 2;
  localparam real PI = 3.14159265358979;

  logic               clk = 1'b0, rst_n = 1'b1;
  logic               arm = 1'b0, search = 1'b1, in_valid = 1'b0;
  seed_t              key;
  logic signed [11:0] in_i = '0, in_q = '0;
  logic               ready, detect;
  logic [22:0]        det_mag;
  logic signed [33:0] det_re, det_im;

  int checks = 0, failures = 0;

  preamble_detector #(.WIN_CHIPS(N), .OSR(OSR)) dut (
    .clk(clk), .rst_n(rst_n), .arm(arm), .key_seed(key), .search(search),
    .in_valid(in_valid), .in_i(in_i), .in_q(in_q),
    .ready(ready), .detect(detect), .det_mag(det_mag), .det_re(det_re), .det_im(det_im));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample bookkeeping: tag of the sample last accepted (chip*OSR + copy for
  // the symbol, -1 otherwise), and the detections seen
  int  cur_tag = -1, h0 = -2, h1 = -2;
  int  n_det = 0, n_det_ok = 0;
  real exp_mag = 0.0, exp_re = 0.0, exp_im = 0.0;
  int  n_mag = 0, n_mag_ok = 0;

  // h1 is the tag of the sample accepted two edges ago, the one a detect
  // seen at this edge refers to
  always @(posedge clk) begin
    h0 <= in_valid ? cur_tag : -2;
    h1 <= h0;
    if (detect) begin
      n_det++;
      checks++;
      if (h1 == (N - 1) * OSR || h1 == (N - 1) * OSR + 1) n_det_ok++;
      else $display("FAIL detect with sample tag %0d", h1);
      if (exp_mag > 0.0) begin
        n_mag++;
        checks++;
        if (real'(det_mag) > 0.98 * exp_mag && real'(det_mag) < 1.02 * exp_mag) n_mag_ok++;
        else $display("FAIL det_mag %0d, model %f", det_mag, exp_mag);
        // the complex correlation itself, to 1 % of its size
        checks++;
        if ($sqrt((real'(det_re) - exp_re) ** 2 + (real'(det_im) - exp_im) ** 2)
            > 0.01 * $sqrt(exp_re ** 2 + exp_im ** 2)) begin
          failures++;
          $display("FAIL det_re/det_im %0d %0d, model %f %f", det_re, det_im, exp_re, exp_im);
        end
      end
    end
  end

  task automatic sample(int i, int q, int tag, int noise);
    if ($urandom_range(0, 19) == 0) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
    @(negedge clk);
    i += (noise > 0) ? int'($urandom_range(0, 2 * noise)) - noise : 0;
    q += (noise > 0) ? int'($urandom_range(0, 2 * noise)) - noise : 0;
    in_valid = 1'b1;
    in_i = 12'(i > 2047 ? 2047 : (i < -2048 ? -2048 : i));
    in_q = 12'(q > 2047 ? 2047 : (q < -2048 ? -2048 : q));
    cur_tag = tag;
  endtask

  task automatic do_arm(seed_t k);
    int c;
    @(negedge clk);
    in_valid = 1'b0;
    key = k;
    arm = 1'b1;
    @(negedge clk);
    arm = 1'b0;
    c = 1;
    while (!ready && c < 1000) begin @(negedge clk); c++; end
    checks++;
    if (c != N + 2) begin failures++; $display("FAIL ready %0d clocks after arm", c); end
  endtask

  // one trial; returns the number of detections it produced
  task automatic trial(seed_t txkey, int noise, int pre, int post, output int dets);
    real amp, rot, mre, mim;
    bit  d;
    int  det0;
    det0 = n_det;
    amp = 1700.0 + real'($urandom_range(0, 347));
    rot = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    d   = 1'($urandom);
    mre = 0.0;
    mim = 0.0;
    for (int s = 0; s < pre; s++) sample(0, 0, -1, noise);
    for (int k = 0; k < N; k++) begin
      real ph, xi, xq, ri, rq, rph;
      ph  = (real'(ref_theta(txkey, longint'(k))) + 0.5) * 2.0 * PI / 256.0 + (d ? PI : 0.0) + rot;
      xi  = $floor(amp * $cos(ph) + 0.5);
      xq  = $floor(amp * $sin(ph) + 0.5);
      rph = (real'(ref_theta(key, longint'(k))) + 0.5) * 2.0 * PI / 256.0;
      ri  = $floor(2047.0 * $cos(rph) + 0.5);
      rq  = $floor(2047.0 * $sin(rph) + 0.5);
      mre += xi * ri + xq * rq;
      mim += xq * ri - xi * rq;
      for (int c = 0; c < OSR; c++) sample(int'(xi), int'(xq), k * OSR + c, noise);
    end
    // the model leaves out noise, so noisy trials are not compared
    exp_re  = mre;
    exp_im  = mim;
    exp_mag = (noise > 0) ? -1.0 : ((mre < 0 ? -mre : mre) + (mim < 0 ? -mim : mim)) / 2048.0;
    for (int s = 0; s < post; s++) sample(0, 0, -1, noise);
    dets = n_det - det0;
  endtask

  initial begin
    seed_t k1, k2;
    int dets, n_good, n_wrong, n_noise, n_off;
    n_good = 0; n_wrong = 0; n_noise = 0; n_off = 0;
    k1 = {8'd200, 8'd13, 8'd99, 8'd42};
    k2 = {8'd17, 8'd180, 8'd3, 8'd250};
    #2 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // no detection before the reference exists
    for (int s = 0; s < 50; s++) sample(1000, -1000, -1, 0);
    checks++;
    if (n_det != 0 || ready) begin failures++; $display("FAIL activity before arm"); end

    do_arm(k1);
    for (int t = 0; t < 12; t++) begin
      trial(k1, (t % 3 == 2) ? 600 : 0, $urandom_range(10, 400), 40, dets);
      checks++;
      if (dets < 1 || dets > OSR) begin failures++; $display("FAIL %0d detections for the right key", dets); end
      else n_good++;
    end

    // another key in the transmitter: nothing
    for (int t = 0; t < 4; t++) begin
      trial(k2, 0, 50, 40, dets);
      checks++;
      if (dets != 0) begin failures++; $display("FAIL detection with the wrong key"); end
      else n_wrong++;
    end

    // noise alone
    begin
      int d0;
      d0 = n_det;
      for (int s = 0; s < 4000; s++) sample(0, 0, -1, 1500);
      checks++;
      if (n_det != d0) begin failures++; $display("FAIL detection on noise"); end
      else n_noise++;
    end

    // search low: nothing
    search = 1'b0;
    begin
      trial(k1, 0, 50, 40, dets);
      checks++;
      if (dets != 0) begin failures++; $display("FAIL detection while search is low"); end
      else n_off++;
    end
    search = 1'b1;

    // re-arm with the other key: its preambles are found, the first key's not
    do_arm(k2);
    trial(k2, 0, 50, 40, dets);
    checks++;
    if (dets < 1 || dets > OSR) begin failures++; $display("FAIL re-armed key missed"); end
    trial(k1, 0, 50, 40, dets);
    checks++;
    if (dets != 0) begin failures++; $display("FAIL old key still detected"); end

    $display("detections %0d (timing ok %0d, magnitude ok %0d); right-key trials %0d, wrong-key %0d, noise %0d, search-off %0d",
             n_det, n_det_ok, n_mag_ok, n_good, n_wrong, n_noise, n_off);
    checks += 3;
    if (n_det == 0 || n_det_ok != n_det) failures++;
    if (n_mag == 0 || n_mag_ok != n_mag) failures++;
    if (n_good == 0 || n_wrong == 0 || n_noise == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
