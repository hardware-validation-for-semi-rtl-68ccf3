// tb_semicoherent_link - end-to-end run of the whole link at the default
// parameters (175 chips per symbol, 256 phases, m = 67, 8-symbol preamble).
//
// The testbench is the channel: the transmitter runs on tx_clk, the receiver
// on rx_clk at twice the rate, so every chip is seen by two receiver samples.
// The channel adds a delay of a whole number of samples (odd or even, so both
// downsampling phases occur), optionally uniform noise, and silence between
// frames. The receiver finds every frame by itself. Each frame is an
// 8-symbol clean preamble and 40 data symbols; the receiver despreads from
// preamble symbol 2 on, so 7 + 40 symbols are checked per frame. Frames:
//   1  semi-coherent receiver
//   2  same key and data, new perturbation seed, odd channel delay
//   3  trusted receiver that also removes the perturbation
//   4  semi-coherent receiver with channel noise
// Frames 2, 3, 4 and 6 also carry a static carrier phase offset, which the
// receiver estimates from the detection and removes.
//   5  receiver armed with a wrong session key: it must never detect
//   6  correct key again
//   7  a packet of 8 data symbols, 8  a packet of 128 data symbols (the
//      shortest and longest packets the scheme was run with)
// Checks: detection and end of every frame, every decision, the measured loss
// of perturbed against preamble symbols (about 0.5 dB for m = 67) and near
// zero in trusted mode, different chip streams for frames 1 and 2, one
// symbol per 2*175 receiver clocks, detection 2*175 receiver clocks (plus the
// channel delay) after the first chip, and that each mechanism happened.
module tb_semicoherent_link;
  import sc_pkg::*;

  localparam int N     = 175;
  localparam int NPRE  = 8;
  localparam int NDATA = 40;      // data symbols in most frames
  localparam int NMAX  = 128;     // longest packet
  int ndata = NDATA;
  int nexp  = NPRE - 1 + NDATA;

  logic               tx_clk = 1'b0, rx_clk = 1'b0, rst_n = 1'b1;
  logic               tx_frame_start = 1'b0, rx_arm = 1'b0;
  seed_t              tx_key, tx_pseed, rx_key, rx_pseed;
  logic               s_valid = 1'b0, s_ready, s_data = 1'b0, s_clean = 1'b0;
  logic               chip_valid, chip_clean;
  logic signed [11:0] chip_i, chip_q;
  logic [7:0]         chip_phase;
  logic signed [6:0]  chip_psi;
  logic               rx_sync = 1'b0;
  logic signed [11:0] rx_i, rx_q;
  logic               rx_ready, rx_detect, rx_in_packet, rx_end;
  logic [22:0]        rx_det_mag;
  logic               sym_valid, sym_bit;
  logic signed [22:0] sym_soft;
  logic [22:0]        sym_mag;

  int checks = 0, failures = 0;

  semicoherent_link dut (
    .tx_clk(tx_clk), .rx_clk(rx_clk), .rst_n(rst_n),
    .tx_frame_start(tx_frame_start), .tx_key_seed(tx_key), .tx_pert_seed(tx_pseed),
    .tx_s_valid(s_valid), .tx_s_ready(s_ready), .tx_s_data(s_data), .tx_s_clean(s_clean),
    .tx_chip_valid(chip_valid), .tx_chip_i(chip_i), .tx_chip_q(chip_q),
    .tx_chip_phase(chip_phase), .tx_chip_psi(chip_psi), .tx_chip_clean(chip_clean),
    .rx_arm(rx_arm), .rx_key_seed(rx_key), .rx_pert_seed(rx_pseed),
    .rx_sync_perturb(rx_sync), .rx_in_valid(1'b1), .rx_in_i(rx_i), .rx_in_q(rx_q),
    .rx_ready(rx_ready), .rx_detect(rx_detect), .rx_det_mag(rx_det_mag),
    .rx_in_packet(rx_in_packet), .rx_packet_end(rx_end),
    .rx_sym_valid(sym_valid), .rx_sym_bit(sym_bit), .rx_sym_soft(sym_soft), .rx_sym_mag(sym_mag));

  always #5  rx_clk = ~rx_clk;
  always #10 tx_clk = ~tx_clk;

  initial begin : watchdog
    repeat (400000) @(posedge rx_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- channel
  localparam int MAXD = 8;
  int noise_amp = 0;
  int delay = 2;
  real rot = 0.0;   // carrier phase offset of the channel, radians
  logic signed [11:0] d_i [MAXD], d_q [MAXD];

  function automatic logic signed [11:0] sat12(int x);
    if (x > 2047) return 12'sd2047;
    if (x < -2048) return -12'sd2048;
    return 12'(x);
  endfunction

  always @(posedge rx_clk) begin
    int ni, nq;
    real ci, cq, c, sn;
    ni = (noise_amp > 0) ? int'($urandom_range(0, 2 * noise_amp)) - noise_amp : 0;
    nq = (noise_amp > 0) ? int'($urandom_range(0, 2 * noise_amp)) - noise_amp : 0;
    ci = chip_valid ? real'(chip_i) : 0.0;
    cq = chip_valid ? real'(chip_q) : 0.0;
    c  = $cos(rot);
    sn = $sin(rot);
    d_i[0] <= sat12(int'($floor(ci * c - cq * sn + 0.5)) + ni);
    d_q[0] <= sat12(int'($floor(ci * sn + cq * c + 0.5)) + nq);
    for (int k = 1; k < MAXD; k++) begin
      d_i[k] <= d_i[k-1];
      d_q[k] <= d_q[k-1];
    end
  end
  assign rx_i = d_i[delay];
  assign rx_q = d_q[delay];

  // ------------------------------------------------------------- counters
  int n_detect = 0, n_end = 0, n_clean = 0, n_pert = 0, n_trusted = 0, n_reseed = 0;
  int n_short = 0, n_long = 0, n_rot = 0, n_b2b = 0, n_wrap = 0, n_noisy = 0, n_wrongkey = 0, n_odd = 0, n_even = 0;
  int rcyc = 0, last_sym_cyc = -1, n_rate = 0, n_rate_ok = 0;

  always @(posedge tx_clk) begin
    int th;
    if (chip_valid && !chip_clean) begin
      th = (int'(chip_phase) - int'(chip_psi) + 256) % 256;
      if (th + int'(chip_psi) > 255 || th + int'(chip_psi) < 0) n_wrap++;
    end
    if (s_valid && s_ready && chip_valid) n_b2b++;
  end

  // ------------------------------------------------------------- receiver log
  bit   exp_bits [$];
  int   got = 0, errors = 0, extra = 0;
  real  e_clean = 0.0, e_pert = 0.0;
  int   c_clean = 0, c_pert = 0;
  bit   collecting = 1'b0;
  int   frame_phase [2][$];
  int   cur_frame = 0;

  // detection latency: from the first chip leaving the transmitter to detect
  realtime t_first = 0;
  real     lat_rx = 0.0;
  int      n_lat = 0, n_lat_ok = 0;
  logic    cv_q = 1'b0;
  always @(posedge tx_clk) begin
    cv_q <= chip_valid;
    if (chip_valid && !cv_q) t_first = $realtime;
  end
  always @(posedge rx_clk) if (rx_detect && !rx_in_packet) begin
    lat_rx = ($realtime - t_first) / 10.0;
    n_lat++;
    // the last chip of preamble symbol 1 has to be in: 2*N - 1 samples, plus
    // the channel delay and the registered detect
    if (lat_rx >= real'(2 * N - 1 + delay) && lat_rx <= real'(2 * N + 1 + delay)) n_lat_ok++;
    else $display("FAIL detection %f receiver clocks after the first chip (delay %0d)", lat_rx, delay);
  end

  always @(posedge tx_clk) if (chip_valid && cur_frame < 2) frame_phase[cur_frame].push_back(int'(chip_phase));

  always @(posedge rx_clk) begin
    rcyc <= rcyc + 1;
    if (rx_detect && !rx_in_packet) n_detect++;
    if (rx_end) n_end++;
    if (sym_valid && collecting) begin
      if (got < nexp) begin
        if (sym_bit != exp_bits[got]) errors++;
        if (got < NPRE - 1) begin e_clean += real'(sym_mag); c_clean++; end
        else                begin e_pert  += real'(sym_mag); c_pert++;  end
        if (last_sym_cyc >= 0) begin
          n_rate++;
          if (rcyc - last_sym_cyc == 2 * N) n_rate_ok++;
        end
        last_sym_cyc = rcyc;
      end else begin
        extra++;
      end
      got++;
    end
  end

  task automatic send_sym(bit d, bit c);
    @(negedge tx_clk);
    s_valid = 1'b1; s_data = d; s_clean = c;
    @(posedge tx_clk);
    while (!s_ready) @(posedge tx_clk);
    @(negedge tx_clk);
    s_valid = 1'b0;
  endtask

  task automatic arm(seed_t key);
    @(negedge rx_clk);
    rx_key = key;
    rx_arm = 1'b1;
    @(negedge rx_clk);
    rx_arm = 1'b0;
    while (!rx_ready) @(negedge rx_clk);
  endtask

  bit data_pattern [NMAX];

  // One frame; returns after the receiver has ended it (or a timeout).
  task automatic run_frame(seed_t pseed_tx, seed_t pseed_rx, bit sync, int noise, int dly, real deg);
    int det0, end0;
    got = 0; errors = 0; extra = 0;
    e_clean = 0.0; e_pert = 0.0; c_clean = 0; c_pert = 0;
    last_sym_cyc = -1;
    exp_bits.delete();
    for (int s = 1; s < NPRE; s++) exp_bits.push_back(s[0]);
    for (int s = 0; s < ndata; s++) exp_bits.push_back(data_pattern[s]);
    noise_amp = noise;
    delay = dly;
    rot = deg * 3.14159265358979 / 180.0;
    if (deg != 0.0) n_rot++;
    rx_pseed = pseed_rx;
    rx_sync  = sync;
    det0 = n_detect;
    end0 = n_end;
    collecting = 1'b1;
    @(negedge tx_clk);
    tx_pseed = pseed_tx;
    tx_frame_start = 1'b1;
    @(negedge tx_clk);
    tx_frame_start = 1'b0;
    for (int s = 0; s < NPRE; s++) send_sym(s[0], 1'b1);
    for (int s = 0; s < ndata; s++) send_sym(data_pattern[s], 1'b0);
    // silence until the receiver declares the end (at most 20 symbols)
    for (int w = 0; w < 20 * 2 * N && n_end == end0; w++) @(posedge rx_clk);
    repeat (4 * N) @(posedge rx_clk);
    collecting = 1'b0;
    if (dly % 2 == 1) n_odd++; else n_even++;
    checks += 2;
    if (n_detect != det0 + 1) begin failures++; $display("FAIL %0d detections in frame", n_detect - det0); end
    if (n_end != end0 + 1)    begin failures++; $display("FAIL %0d packet ends in frame", n_end - end0); end
  endtask

  function automatic real loss_db();
    return -10.0 * $log10((e_pert / c_pert) / (e_clean / c_clean));
  endfunction

  task automatic check_frame(string name, real lmin, real lmax);
    real l;
    l = loss_db();
    $display("%s: %0d symbols (+%0d after the packet), %0d errors, loss %f dB",
             name, got - extra, extra, errors, l);
    checks += 3;
    if (got - extra != nexp) begin failures++; $display("FAIL symbol count"); end
    if (errors != 0) begin failures++; $display("FAIL decision errors"); end
    if (l < lmin || l > lmax) begin failures++; $display("FAIL loss %f dB outside [%f, %f]", l, lmin, lmax); end
  endtask

  initial begin
    seed_t key, wrong_key;
    int diff;
    key       = {8'd200, 8'd13, 8'd99, 8'd42};
    wrong_key = {8'd17, 8'd180, 8'd3, 8'd250};
    tx_key    = key;
    rx_key    = key;
    tx_pseed  = '0;
    rx_pseed  = '0;
    foreach (data_pattern[i]) data_pattern[i] = 1'($urandom);
    #2 rst_n = 1'b0;   // a falling edge, so the asynchronous reset is seen
    repeat (3) @(posedge tx_clk);
    rst_n = 1'b1;
    arm(key);

    cur_frame = 0;
    run_frame({8'd1, 8'd2, 8'd3, 8'd4}, '0, 1'b0, 0, 2, 0.0);
    check_frame("frame 1", 0.40, 0.60);
    n_clean += c_clean; n_pert += c_pert;

    cur_frame = 1;
    run_frame({8'd77, 8'd150, 8'd9, 8'd31}, '0, 1'b0, 0, 5, 100.0);
    check_frame("frame 2 (reseeded, odd delay)", 0.40, 0.60);
    n_reseed++;
    n_pert += c_pert;
    diff = 0;
    for (int i = NPRE * N; i < (NPRE + NDATA) * N; i++)
      if (frame_phase[0][i] != frame_phase[1][i]) diff++;
    $display("frames 1/2: %0d of %0d perturbed chips differ", diff, NDATA * N);
    checks += 2;
    if (diff < NDATA * N * 95 / 100) begin failures++; $display("FAIL chip streams too alike"); end
    for (int i = 0; i < NPRE * N; i++)
      if (frame_phase[0][i] != frame_phase[1][i]) begin failures++; $display("FAIL preamble differs"); break; end
    cur_frame = 2;

    run_frame({8'd5, 8'd6, 8'd7, 8'd8}, {8'd5, 8'd6, 8'd7, 8'd8}, 1'b1, 0, 3, 200.0);
    check_frame("frame 3 (trusted)", -0.03, 0.03);
    n_reseed++;
    n_trusted += c_pert;

    run_frame({8'd11, 8'd22, 8'd33, 8'd44}, '0, 1'b0, 1500, 4, 37.0);
    check_frame("frame 4 (noise)", 0.2, 0.8);
    n_reseed++;
    n_noisy += got;

    // eavesdropper: wrong key, the frame must go unnoticed
    arm(wrong_key);
    begin
      int det0;
      det0 = n_detect;
      @(negedge tx_clk);
      tx_pseed = {8'd12, 8'd23, 8'd34, 8'd45};
      tx_frame_start = 1'b1;
      @(negedge tx_clk);
      tx_frame_start = 1'b0;
      for (int s = 0; s < NPRE; s++) send_sym(s[0], 1'b1);
      for (int s = 0; s < NDATA; s++) send_sym(data_pattern[s], 1'b0);
      repeat (4 * N) @(posedge rx_clk);
      $display("frame 5 (wrong key): %0d detections", n_detect - det0);
      checks++;
      if (n_detect != det0) begin failures++; $display("FAIL wrong-key receiver detected a frame"); end
      n_wrongkey++;
    end

    arm(key);
    run_frame({8'd99, 8'd98, 8'd97, 8'd96}, '0, 1'b0, 0, 7, -130.0);
    check_frame("frame 6 (re-armed)", 0.40, 0.60);
    n_reseed++;

    // the shortest and the longest packet: 8 and 128 data symbols
    ndata = 8;
    nexp  = NPRE - 1 + ndata;
    run_frame({8'd3, 8'd1, 8'd4, 8'd1}, '0, 1'b0, 0, 1, 250.0);
    check_frame("frame 7 (8 data symbols)", 0.2, 0.8);
    n_short++;
    ndata = NMAX;
    nexp  = NPRE - 1 + ndata;
    run_frame({8'd5, 8'd9, 8'd2, 8'd6}, '0, 1'b0, 0, 6, 61.0);
    check_frame("frame 8 (128 data symbols)", 0.40, 0.60);
    n_long++;

    checks++;
    if (n_lat == 0 || n_lat_ok != n_lat) failures++;
    checks++;
    if (n_rate == 0 || n_rate_ok != n_rate) begin
      failures++; $display("FAIL symbol spacing: %0d of %0d at %0d receiver clocks", n_rate_ok, n_rate, 2 * N);
    end

    $display("mechanisms: short_packet=%0d long_packet=%0d phase_offset=%0d detect=%0d packet_end=%0d clean=%0d perturbed=%0d trusted=%0d reseed=%0d back_to_back=%0d wrap=%0d noisy=%0d wrong_key=%0d odd_phase=%0d even_phase=%0d",
             n_short, n_long, n_rot, n_detect, n_end, n_clean, n_pert, n_trusted, n_reseed, n_b2b, n_wrap, n_noisy, n_wrongkey, n_odd, n_even);
    checks += 15;
    if (n_short == 0)    failures++;
    if (n_long == 0)     failures++;
    if (n_rot == 0)      failures++;
    if (n_detect == 0)   failures++;
    if (n_end == 0)      failures++;
    if (n_clean == 0)    failures++;
    if (n_pert == 0)     failures++;
    if (n_trusted == 0)  failures++;
    if (n_reseed == 0)   failures++;
    if (n_b2b == 0)      failures++;
    if (n_wrap == 0)     failures++;
    if (n_noisy == 0)    failures++;
    if (n_wrongkey == 0) failures++;
    if (n_odd == 0)      failures++;
    if (n_even == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
