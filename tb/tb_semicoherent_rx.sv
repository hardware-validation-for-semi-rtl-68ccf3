// tb_semicoherent_rx - receiver despreading against chips built here.
//
// The testbench builds each chip itself from the generator model:
// 2047*exp(j*(phi+0.5)*2*pi/256), phi = theta + 128*data + psi. Frame one is
// received semi-coherently (psi left in), frame two in trusted mode (psi also
// removed), frame three semi-coherently with every chip turned by a random
// carrier phase offset that is given on phase_offset. Each soft symbol must equal the sum of the projected chips,
// 2047*g*cos(residual phase), within a rounding allowance; decisions must be
// right; every symbol must appear a fixed number of clocks after its last
// chip. Chips arrive with random gaps.
module tb_semicoherent_rx;
  import sc_pkg::*;
  `include "sc_ref_model.svh"

  localparam int N   = 175;
  localparam int M   = 67;
  localparam int LAT = 5;      // clocks from last chip in to sym_valid
  localparam real PI = 3.14159265358979;
  localparam real G  = 2047.0 / 2048.0;

  logic               clk = 1'b0, rst_n = 1'b1;
  logic               frame_start = 1'b0, sync_perturb = 1'b0;
  seed_t              key_seed, pert_seed;
  logic               in_valid = 1'b0, in_clean = 1'b0;
  logic signed [11:0] in_i = '0, in_q = '0;
  logic [7:0]         poff = '0;   // carrier phase offset, phase steps
  logic               sym_valid, sym_bit;
  logic signed [22:0] sym_soft;
  logic [22:0]        sym_mag;
  int checks = 0, failures = 0;

  semicoherent_rx dut (
    .clk(clk), .rst_n(rst_n), .frame_start(frame_start), .key_seed(key_seed),
    .pert_seed(pert_seed), .sync_perturb(sync_perturb), .phase_offset(poff), .in_valid(in_valid),
    .in_i(in_i), .in_q(in_q), .in_clean(in_clean), .sym_valid(sym_valid),
    .sym_bit(sym_bit), .sym_soft(sym_soft), .sym_mag(sym_mag));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real xsoft; bit data; int last_cyc; } exp_t;
  exp_t q[$];
  int cyc = 0;
  real e_sum [2];     // per mode: sum of |soft| / (N*2047) over perturbed symbols
  int  e_cnt [2];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sym_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected symbol");
      end else begin
        e = q.pop_front();
        checks += 3;
        if (cyc - e.last_cyc != LAT) begin failures++; $display("FAIL latency %0d", cyc - e.last_cyc); end
        if (sym_bit != e.data) begin failures++; $display("FAIL decision"); end
        if ((real'(sym_soft) - e.xsoft > 250.0) || (e.xsoft - real'(sym_soft) > 250.0)) begin
          failures++;
          $display("FAIL xsoft %0d exp %f", sym_soft, e.xsoft);
        end
      end
    end
  end

  task automatic frame(bit sync, int nclean, int ndata);
    longint t = 0;
    @(negedge clk);
    sync_perturb = sync;
    frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    for (int s = 0; s < nclean + ndata; s++) begin
      bit d, c;
      real xsoft;
      exp_t e;
      d = 1'($urandom);
      c = (s < nclean);
      xsoft = 0.0;
      for (int k = 0; k < N; k++) begin
        int th, ps, ph, resid;
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
        th = ref_theta(key_seed, t);
        ps = c ? 0 : ref_psi(pert_seed, t, M);
        ph = ref_mod256(th + 128 * int'(d) + ps + int'(poff));
        @(negedge clk);
        in_valid = 1'b1;
        in_clean = c;
        in_i = 12'($rtoi($floor(2047.0 * $cos((real'(ph) + 0.5) * 2.0 * PI / 256.0) + 0.5)));
        in_q = 12'($rtoi($floor(2047.0 * $sin((real'(ph) + 0.5) * 2.0 * PI / 256.0) + 0.5)));
        resid = 128 * int'(d) + ((sync && !c) ? 0 : ps);
        xsoft += 2047.0 * G * ((sync && !c) ? G : 1.0) * $cos(real'(resid) * 2.0 * PI / 256.0);
        t++;
      end
      e.xsoft = xsoft;
      e.data = d;
      e.last_cyc = cyc;
      q.push_back(e);
      if (!c) begin
        e_sum[sync] += (xsoft < 0.0 ? -xsoft : xsoft) / (real'(N) * 2047.0);
        e_cnt[sync]++;
      end
      end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
  endtask

  initial begin
    key_seed  = {8'd33, 8'd44, 8'd55, 8'd66};
    pert_seed = {8'd9, 8'd8, 8'd7, 8'd6};
    #2 rst_n = 1'b0;   // a falling edge, so the asynchronous reset is seen
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    frame(1'b0, 2, 12);
    pert_seed = {8'd101, 8'd3, 8'd250, 8'd19};
    frame(1'b1, 2, 12);
    // a third frame whose chips all carry a carrier phase offset, which the
    // receiver is told through phase_offset
    poff = 8'($urandom_range(1, 255));
    sync_perturb = 1'b0;
    pert_seed = {8'd71, 8'd13, 8'd2, 8'd200};
    frame(1'b0, 2, 12);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d symbols missing", q.size()); end
    // semi-coherent symbols lose energy (about 0.5 dB), trusted ones nearly none
    checks += 2;
    if (e_sum[0] / e_cnt[0] > 0.93 || e_sum[0] / e_cnt[0] < 0.85) begin
      failures++; $display("FAIL semi-coherent energy %f", e_sum[0] / e_cnt[0]);
    end
    if (e_sum[1] / e_cnt[1] < 0.995) begin
      failures++; $display("FAIL coherent energy %f", e_sum[1] / e_cnt[1]);
    end
    $display("mean symbol energy: semi-coherent %f, trusted %f", e_sum[0] / e_cnt[0], e_sum[1] / e_cnt[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
