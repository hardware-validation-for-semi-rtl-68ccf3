// tb_semicoherent_tx - transmitter chip stream against the reference model.
//
// Sends two frames with different perturbation seeds and the same key. Every
// chip's phase state must be theta(t) + 128*data + psi(t) mod 256 with theta,
// psi from the closed-form generator model (psi = 0 for clean symbols), and
// its I/Q must be the constellation point of that phase within one LSB. Also
// checks N chips per symbol, back-to-back symbols with no gap (one symbol per
// N clocks), a fixed accept-to-first-chip latency and that the two frames
// carry the same code but different perturbations.
module tb_semicoherent_tx;
  import sc_pkg::*;
  `include "sc_ref_model.svh"

  localparam int N   = 175;
  localparam int M   = 67;
  localparam int LAT = 3;      // clocks from accept to first chip

  logic               clk = 1'b0, rst_n = 1'b1;
  logic               frame_start = 1'b0;
  seed_t              key_seed, pert_seed;
  logic               s_valid = 1'b0, s_ready, s_data = 1'b0, s_clean = 1'b0;
  logic               chip_valid, chip_clean;
  logic signed [11:0] chip_i, chip_q;
  logic [7:0]         chip_phase;
  logic signed [6:0]  chip_psi;
  int checks = 0, failures = 0;

  semicoherent_tx dut (
    .clk(clk), .rst_n(rst_n), .frame_start(frame_start), .key_seed(key_seed),
    .pert_seed(pert_seed), .s_valid(s_valid), .s_ready(s_ready), .s_data(s_data),
    .s_clean(s_clean), .chip_valid(chip_valid), .chip_i(chip_i), .chip_q(chip_q),
    .chip_phase(chip_phase), .chip_psi(chip_psi), .chip_clean(chip_clean));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit data; bit clean; int acc_cyc; } sym_t;
  sym_t  accq[$];
  int    cyc = 0;
  longint t = 0;            // chip index within the frame
  int    k = 0;             // chip index within the symbol
  int    last_chip_cyc = -10;
  int    gapless = 0;
  int    frame_phase [2][$];
  int    frame_no = 0;

  function automatic bit near(int got, real want);
    return (real'(got) - want <= 1.0) && (want - real'(got) <= 1.0);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (s_valid && s_ready) begin
      sym_t s;
      s.data = s_data; s.clean = s_clean; s.acc_cyc = cyc;
      accq.push_back(s);
    end
    if (chip_valid) begin
      int th, ps, ph;
      real a;
      if (accq.size() == 0) begin
        failures++;
        $display("FAIL chip without symbol");
      end else begin
        if (k == 0) begin
          checks++;
          if (cyc - accq[0].acc_cyc != LAT) begin
            failures++;
            $display("FAIL first-chip latency %0d", cyc - accq[0].acc_cyc);
          end
          if (last_chip_cyc == cyc - 1) gapless++;
        end
        th = ref_theta(key_seed, t);
        ps = accq[0].clean ? 0 : ref_psi(pert_seed, t, M);
        ph = ref_mod256(th + 128 * int'(accq[0].data) + ps);
        a  = (real'(ph) + 0.5) * 2.0 * 3.14159265358979 / 256.0;
        checks += 4;
        if (int'(chip_phase) != ph) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d phase %0d exp %0d", t, chip_phase, ph);
        end
        if (int'(chip_psi) != ps) failures++;
        if (chip_clean != accq[0].clean) failures++;
        if (!near(chip_i, 2047.0 * $cos(a)) || !near(chip_q, 2047.0 * $sin(a))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d iq %0d,%0d", t, chip_i, chip_q);
        end
        frame_phase[frame_no].push_back(ph - 128 * int'(accq[0].data));
        t++;
        k++;
        last_chip_cyc = cyc;
        if (k == N) begin
          k = 0;
          void'(accq.pop_front());
        end
      end
    end
  end

  task automatic start_frame(seed_t ps);
    @(negedge clk);
    pert_seed   = ps;
    frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    t = 0;
  endtask

  task automatic send(bit d, bit c);
    s_valid = 1'b1; s_data = d; s_clean = c;
    @(posedge clk);
    while (!s_ready) @(posedge clk);
    @(negedge clk);
    s_valid = 1'b0;
  endtask

  initial begin
    int diff, start_cyc;
    key_seed  = {8'd12, 8'd200, 8'd77, 8'd5};
    pert_seed = {8'd1, 8'd2, 8'd3, 8'd4};
    #2 rst_n = 1'b0;   // a falling edge, so the asynchronous reset is seen
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      frame_no = f;
      start_frame(f == 0 ? seed_t'({8'd1, 8'd2, 8'd3, 8'd4}) : seed_t'({8'd90, 8'd61, 8'd222, 8'd140}));
      // two clean (preamble) symbols, then back-to-back data symbols
      start_cyc = cyc;
      send(1'b0, 1'b1);
      send(1'b1, 1'b1);
      for (int s = 0; s < 6; s++) send(1'(s % 3 == 1), 1'b0);
      // a gap, then one more symbol
      while (accq.size() != 0 || chip_valid) @(posedge clk);
      repeat (40) @(negedge clk);
      send(1'b1, 1'b0);
      while (accq.size() != 0 || chip_valid) @(posedge clk);
      repeat (5) @(posedge clk);
    end
    // 9 symbols per frame, 7 of them back to back after the first
    checks++;
    if (gapless != 14) begin
      failures++;
      $display("FAIL gapless symbol starts %0d, expected 14", gapless);
    end
    // same code in both frames, but the perturbation makes most chips differ
    diff = 0;
    for (int i = 2 * N; i < 9 * N; i++) if (frame_phase[0][i] != frame_phase[1][i]) diff++;
    checks += 2;
    if (diff < 7 * N * 9 / 10) begin failures++; $display("FAIL only %0d chips differ", diff); end
    for (int i = 0; i < 2 * N; i++) if (frame_phase[0][i] != frame_phase[1][i]) begin
      failures++;
      $display("FAIL clean chips differ between frames");
      break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
