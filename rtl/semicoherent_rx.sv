// semicoherent_rx - despreading receiver for the semi-coherent TRANSEC chips.
//
// The receiver runs a copy of the keyed bulk-phase generator, time
// synchronized with the transmitter (frame_start marks the first chip of a
// frame and both ends load the same session key), and derotates every chip by
// exp(-j*theta). What is left is exp(j*psi) times the data sign. A semi-coherent
// receiver, which cannot reproduce psi, projects that onto the real axis and
// sums N_CHIPS chips, getting on average sin(psi_max)/psi_max of the coherent
// symbol energy. A trusted receiver that also holds the perturbation seed sets
// sync_perturb: a second generator reproduces psi and a second derotator
// removes it too, giving fully coherent despreading.
//
// Following the document: synchronized bulk PRNG, theta derotation, optional
// psi derotation, projection mapping and accumulator (its Figure 1 receiver).
// This design's own choices: the chip interface, the externally supplied frame
// timing (acquisition is not part of this block) and in_clean, which tells a
// trusted receiver which chips were sent without perturbation.
//
// frame_start loads both generators LOAD_SKIP chips into the frame (0: the
// next chip is chip 0 of the frame). phase_offset (in phase steps) is added to
// theta before derotation, which removes a static carrier phase offset; tie
// it to zero when there is none.
//
// Timing: one chip per cycle at most. Each derotator adds two cycles and the
// accumulator one, so sym_valid pulses five cycles after the last chip of a
// symbol enters. Both generators step on every in_valid, perturbed or not,
// as in the transmitter.
module semicoherent_rx
  import sc_pkg::*;
#(
  parameter int unsigned N_CHIPS = sc_pkg::DEF_N_CHIPS,
  parameter int unsigned M_RANGE = sc_pkg::DEF_M_RANGE,
  parameter int unsigned PHASE_W = sc_pkg::DEF_PHASE_W,
  parameter int unsigned PERT_W  = sc_pkg::DEF_PERT_W,
  parameter int unsigned IQ_W    = sc_pkg::DEF_IQ_W,
  parameter int unsigned ERR_W   = err_width(M_RANGE),
  parameter int unsigned ACC_W   = IQ_W + 2 + $clog2(N_CHIPS) + 1,
  parameter int unsigned LOAD_SKIP = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    frame_start,
  input  seed_t                   key_seed,
  input  seed_t                   pert_seed,
  input  logic                    sync_perturb,
  input  logic [PHASE_W-1:0]      phase_offset,
  input  logic                    in_valid,
  input  logic signed [IQ_W-1:0]  in_i,
  input  logic signed [IQ_W-1:0]  in_q,
  input  logic                    in_clean,
  output logic                    sym_valid,
  output logic                    sym_bit,
  output logic signed [ACC_W-1:0] sym_soft,
  output logic [ACC_W-1:0]        sym_mag
);

  logic [PHASE_W-1:0]      theta;
  logic [PERT_W-1:0]       pert_word;
  logic signed [ERR_W-1:0] psi;

  logic [1:0][PHASE_W-1:0] psi_dly;
  logic [1:0]              byp_dly;

  logic                    d1_valid, d2_valid;
  logic signed [IQ_W:0]    d1_i, d1_q;
  logic signed [IQ_W+1:0]  d2_i, d2_q;

  // Local copies of the transmitter's generators.
  rns_prng #(.OUT_W(PHASE_W), .MODULI(BULK_MODULI), .SALT(32'h0000_0000), .LOAD_SKIP(LOAD_SKIP)) u_bulk_prng (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (frame_start),
    .seed    (key_seed),
    .advance (in_valid),
    .rnd     (theta)
  );

  rns_prng #(.OUT_W(PERT_W), .MODULI(PERT_MODULI), .SALT(32'h6A09_E667), .LOAD_SKIP(LOAD_SKIP)) u_pert_prng (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (frame_start),
    .seed    (pert_seed),
    .advance (in_valid),
    .rnd     (pert_word)
  );

  phase_error_map #(.IN_W(PERT_W), .M_RANGE(M_RANGE), .ERR_W(ERR_W)) u_err_map (
    .rnd (pert_word),
    .err (psi)
  );

  // Bulk-phase derotation, exp(-j*theta).
  phase_derotator #(.IN_W(IQ_W), .PHASE_W(PHASE_W), .LUT_W(IQ_W), .HALF_LSB(1'b1)) u_derot_theta (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_i      (in_i),
    .in_q      (in_q),
    .phase     (theta + phase_offset),
    .bypass    (1'b0),
    .out_valid (d1_valid),
    .out_i     (d1_i),
    .out_q     (d1_q)
  );

  // psi and its enable travel alongside the chip through the first derotator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psi_dly <= '0;
      byp_dly <= '1;
    end else begin
      psi_dly <= {psi_dly[0], PHASE_W'(psi)};
      byp_dly <= {byp_dly[0], !(sync_perturb && !in_clean)};
    end
  end

  // Optional perturbation derotation, exp(-j*psi); psi is an offset, so its
  // table has points on the axes.
  phase_derotator #(.IN_W(IQ_W+1), .PHASE_W(PHASE_W), .LUT_W(IQ_W), .HALF_LSB(1'b0)) u_derot_psi (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (d1_valid),
    .in_i      (d1_i),
    .in_q      (d1_q),
    .phase     (psi_dly[1]),
    .bypass    (byp_dly[1]),
    .out_valid (d2_valid),
    .out_i     (d2_i),
    .out_q     (d2_q)
  );

  // Projection onto the real axis and integration over the symbol.
  despread_accumulator #(.N_CHIPS(N_CHIPS), .IN_W(IQ_W+2), .ACC_W(ACC_W)) u_acc (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (frame_start),
    .in_valid  (d2_valid),
    .in_re     (d2_i),
    .sym_valid (sym_valid),
    .sym_bit   (sym_bit),
    .sym_soft  (sym_soft),
    .sym_mag   (sym_mag)
  );

  // The quadrature part is not used after projection.
  logic unused_q;
  assign unused_q = ^d2_q;

endmodule
