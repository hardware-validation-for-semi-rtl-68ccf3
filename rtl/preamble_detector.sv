// preamble_detector - sliding correlator that finds the start of a frame.
//
// The receiver samples the chip stream at OSR = 2 samples per chip. Every
// frame starts with a preamble whose chips are sent unperturbed on the keyed
// code, so its first WIN_CHIPS chips (one symbol, 175) form a known sequence
// r_k = exp(j*theta_k). On arm the detector loads the session key into its own
// copy of the keyed generator and, over WIN_CHIPS clocks, fills a reference
// register with r_0 .. r_{WIN_CHIPS-1}. Then, for every new sample, it
// correlates the last OSR*(WIN_CHIPS-1)+1 samples, taking every OSR-th one,
// against the reference:
//   C = sum_k x_k * conj(r_k),  mag = (|Re C| + |Im C|) / 2^(IQ_W-1)
// and compares mag with a threshold that follows the input level, the sum of
// |I| + |Q| over the same taps shifted right by THR_SHIFT (one half). A
// perturbation-free, noise-free preamble gives mag about 1 to 1.4 times that
// sum, random data or noise about 1/sqrt(WIN_CHIPS) of it. The symbol data
// sign does not matter because only magnitudes are compared. A second
// condition, level >= MIN_LEVEL, blocks detections while only the first few
// chips of a frame are in the window after silence: a handful of chips always
// correlates well with something. The default floor is a quarter of the level
// of a full-scale signal filling the window.
//
// Following the document: a correlation magnitude computed every clock on a
// twice-oversampled signal, against a threshold derived from a moving measure
// of the incoming samples. This design's own choices: the window length (one
// preamble symbol), the L1 magnitude, the threshold ratio, the level floor
// (which assumes the input is gain-controlled to near full scale) and the reference
// built from the keyed generator.
//
// Interface and timing: arm (idle or at any time) restarts the reference
// build; ready rises when it is complete. While ready and search are high,
// detect pulses, registered, in the clock after the sample that completes a
// match enters; det_mag holds that correlation magnitude and det_re/det_im
// the complex correlation itself (its angle is the carrier phase offset).
// The correlation is
// one combinational sum over WIN_CHIPS complex products; a faster clock would
// want it pipelined.
module preamble_detector
  import sc_pkg::*;
#(
  parameter int unsigned WIN_CHIPS = sc_pkg::DEF_N_CHIPS,
  parameter int unsigned OSR       = 2,
  parameter int unsigned PHASE_W   = sc_pkg::DEF_PHASE_W,
  parameter int unsigned IQ_W      = sc_pkg::DEF_IQ_W,
  parameter int unsigned THR_SHIFT = 1,
  parameter int unsigned MIN_LEVEL = WIN_CHIPS << (IQ_W - 3),
  parameter int unsigned MAG_W     = IQ_W + 2 + $clog2(WIN_CHIPS) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   arm,
  input  seed_t                  key_seed,
  input  logic                   search,
  input  logic                   in_valid,
  input  logic signed [IQ_W-1:0] in_i,
  input  logic signed [IQ_W-1:0] in_q,
  output logic                   ready,
  output logic                   detect,
  output logic [MAG_W-1:0]       det_mag,
  output logic signed [2*IQ_W+1+$clog2(WIN_CHIPS):0] det_re,
  output logic signed [2*IQ_W+1+$clog2(WIN_CHIPS):0] det_im
);

  localparam int unsigned DEPTH = OSR * (WIN_CHIPS - 1) + 1;
  localparam int unsigned CW    = $clog2(WIN_CHIPS + 2);
  localparam int unsigned PW    = 2 * IQ_W + 2 + $clog2(WIN_CHIPS);   // signed correlation sum
  localparam int unsigned SW    = IQ_W + 1 + $clog2(WIN_CHIPS);       // input level sum

  // ------------------------------------------------------- reference build
  logic               building;
  logic [CW-1:0]      build_cnt;
  logic [PHASE_W-1:0] theta;
  logic signed [IQ_W-1:0] lut_c, lut_s;
  logic signed [IQ_W-1:0] ref_c [WIN_CHIPS];
  logic signed [IQ_W-1:0] ref_s [WIN_CHIPS];

  rns_prng #(.OUT_W(PHASE_W), .MODULI(BULK_MODULI), .SALT(32'h0000_0000)) u_code (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (arm),
    .seed    (key_seed),
    .advance (building),
    .rnd     (theta)
  );

  phase_iq_lut #(.PHASE_W(PHASE_W), .IQ_W(IQ_W), .HALF_LSB(1'b1)) u_lut (
    .clk   (clk),
    .phase (theta),
    .cos_o (lut_c),
    .sin_o (lut_s)
  );

  // build_cnt counts table outputs; the table lags the generator by a clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      building  <= 1'b0;
      ready     <= 1'b0;
      build_cnt <= '0;
    end else if (arm) begin
      building  <= 1'b1;
      ready     <= 1'b0;
      build_cnt <= '0;
    end else if (building || (build_cnt != '0 && !ready)) begin
      build_cnt <= build_cnt + 1'b1;
      if (build_cnt == CW'(WIN_CHIPS - 1)) building <= 1'b0;
      if (build_cnt == CW'(WIN_CHIPS))     ready    <= 1'b1;
    end
  end

  // Reference shift register: after the build, ref_*[k] = r_k.
  always_ff @(posedge clk) begin
    if (build_cnt != '0 && !ready) begin
      for (int k = 0; k < int'(WIN_CHIPS) - 1; k++) begin
        ref_c[k] <= ref_c[k+1];
        ref_s[k] <= ref_s[k+1];
      end
      ref_c[WIN_CHIPS-1] <= lut_c;
      ref_s[WIN_CHIPS-1] <= lut_s;
    end
  end

  // ------------------------------------------------------ sample window
  logic signed [IQ_W-1:0] smp_i [DEPTH];
  logic signed [IQ_W-1:0] smp_q [DEPTH];
  logic                   new_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      new_q <= 1'b0;
      for (int j = 0; j < int'(DEPTH); j++) begin
        smp_i[j] <= '0;
        smp_q[j] <= '0;
      end
    end else begin
      new_q <= in_valid;
      if (in_valid) begin
        smp_i[0] <= in_i;
        smp_q[0] <= in_q;
        for (int j = 1; j < int'(DEPTH); j++) begin
          smp_i[j] <= smp_i[j-1];
          smp_q[j] <= smp_q[j-1];
        end
      end
    end
  end

  // ------------------------------------------------------ correlation
  logic signed [PW-1:0] corr_re, corr_im;
  logic [PW-1:0]        corr_l1;
  logic [SW-1:0]        level;
  logic [MAG_W-1:0]     mag;

  function automatic logic [IQ_W-1:0] absv(input logic signed [IQ_W-1:0] v);
    return v[IQ_W-1] ? IQ_W'(-v) : IQ_W'(v);
  endfunction

  always_comb begin
    corr_re = '0;
    corr_im = '0;
    level   = '0;
    for (int k = 0; k < int'(WIN_CHIPS); k++) begin
      // chip k of the window sits OSR*(WIN_CHIPS-1-k) samples back
      corr_re = corr_re + PW'(smp_i[OSR*(WIN_CHIPS-1-k)] * ref_c[k])
                        + PW'(smp_q[OSR*(WIN_CHIPS-1-k)] * ref_s[k]);
      corr_im = corr_im + PW'(smp_q[OSR*(WIN_CHIPS-1-k)] * ref_c[k])
                        - PW'(smp_i[OSR*(WIN_CHIPS-1-k)] * ref_s[k]);
      level   = level + SW'(absv(smp_i[OSR*(WIN_CHIPS-1-k)]))
                      + SW'(absv(smp_q[OSR*(WIN_CHIPS-1-k)]));
    end
    corr_l1 = (corr_re[PW-1] ? PW'(-corr_re) : PW'(corr_re))
            + (corr_im[PW-1] ? PW'(-corr_im) : PW'(corr_im));
    mag     = MAG_W'(corr_l1 >> (IQ_W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      detect  <= 1'b0;
      det_mag <= '0;
      det_re  <= '0;
      det_im  <= '0;
    end else begin
      detect <= 1'b0;
      if (ready && search && new_q && (SW'(mag) > (level >> THR_SHIFT))
          && (level >= SW'(MIN_LEVEL))) begin
        detect  <= 1'b1;
        det_mag <= mag;
        det_re  <= corr_re;
        det_im  <= corr_im;
      end
    end
  end

  initial begin
    assert (MAG_W >= SW) else $error("MAG_W too narrow");
  end

endmodule
