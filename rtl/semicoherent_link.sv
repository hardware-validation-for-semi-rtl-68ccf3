// semicoherent_link - semi-coherent TRANSEC transmitter and receiver.
//
// Top level of the design. The transmitter spreads data symbols over chips
// whose keyed PSK phase carries a small unsynchronized perturbation. The
// receiver finds each frame by correlating against the keyed preamble code,
// joins the code at the right chip, derotates with the keyed phase sequence
// and despreads. It loses only a fraction of a dB of symbol energy (about
// 0.5 dB for the default m = 67 on a 256-point circle), or nothing in
// trusted mode, where it also removes the perturbation. Everything analog
// between the two ends (DAC, RF, cable, noise, ADC) is outside: chips leave
// on tx_chip_* at one per tx_clk cycle while a symbol is sent, and the
// receiver takes a continuous sample stream on rx_in_* at OSR = 2 samples per
// chip, one per rx_clk cycle (rx_clk = 2 x tx_clk in frequency). The two
// halves share only rst_n; no signal crosses between tx_clk and rx_clk.
//
// Receiver sequence: rx_arm loads the session key and builds the preamble
// reference (rx_ready). While searching, a detection (rx_detect, one pulse
// per frame) marks the end of the first preamble symbol. The angle of the
// detection correlation gives the static carrier phase offset
// (phase_offset_estimator), which the receiver adds to the keyed phase. So
// that this estimate is ready for the first chip, the sample stream and the
// detection pulse reach the downsampler through a 16-clock delay line. The
// receiver then loads its generators one symbol into the frame, keeps every
// second sample (the one in step with the detection) and despreads from
// preamble symbol 2 on. The first PRE_SYMS-1 symbols it despreads are
// preamble, sent unperturbed, which a trusted receiver takes into account.
// The packet end detector watches the symbol magnitudes; on rx_packet_end
// the receiver goes back to searching. A few symbols despread from the
// silence after a packet come out before the end is seen; the packet length
// known to the user tells them apart.
//
// Following the document: 175 chips per symbol, 256 phases, a 12-bit
// perturbation word reduced modulo 67, an eight-symbol preamble, correlation
// on a twice-oversampled signal with an input-relative threshold, downsampling
// by two after detection, a static phase offset derived from the preamble,
// and end of packet from eight symbol magnitudes. This design's own:
// detection on the first preamble symbol, the thresholds, the offset
// estimate from the detection correlation, and that the receiver knows the
// preamble length. Frequency offset is not estimated.
module semicoherent_link
  import sc_pkg::*;
#(
  parameter int unsigned N_CHIPS  = sc_pkg::DEF_N_CHIPS,
  parameter int unsigned M_RANGE  = sc_pkg::DEF_M_RANGE,
  parameter int unsigned PHASE_W  = sc_pkg::DEF_PHASE_W,
  parameter int unsigned PERT_W   = sc_pkg::DEF_PERT_W,
  parameter int unsigned IQ_W     = sc_pkg::DEF_IQ_W,
  parameter int unsigned PRE_SYMS = 8,
  parameter int unsigned ERR_W    = err_width(M_RANGE),
  parameter int unsigned ACC_W    = IQ_W + 2 + $clog2(N_CHIPS) + 1
) (
  input  logic                    tx_clk,
  input  logic                    rx_clk,
  input  logic                    rst_n,
  // transmitter (tx_clk)
  input  logic                    tx_frame_start,
  input  seed_t                   tx_key_seed,
  input  seed_t                   tx_pert_seed,
  input  logic                    tx_s_valid,
  output logic                    tx_s_ready,
  input  logic                    tx_s_data,
  input  logic                    tx_s_clean,
  output logic                    tx_chip_valid,
  output logic signed [IQ_W-1:0]  tx_chip_i,
  output logic signed [IQ_W-1:0]  tx_chip_q,
  output logic [PHASE_W-1:0]      tx_chip_phase,
  output logic signed [ERR_W-1:0] tx_chip_psi,
  output logic                    tx_chip_clean,
  // receiver (rx_clk)
  input  logic                    rx_arm,
  input  seed_t                   rx_key_seed,
  input  seed_t                   rx_pert_seed,
  input  logic                    rx_sync_perturb,
  input  logic                    rx_in_valid,
  input  logic signed [IQ_W-1:0]  rx_in_i,
  input  logic signed [IQ_W-1:0]  rx_in_q,
  output logic                    rx_ready,
  output logic                    rx_detect,
  output logic [ACC_W-1:0]        rx_det_mag,
  output logic                    rx_in_packet,
  output logic                    rx_packet_end,
  output logic                    rx_sym_valid,
  output logic                    rx_sym_bit,
  output logic signed [ACC_W-1:0] rx_sym_soft,
  output logic [ACC_W-1:0]        rx_sym_mag
);

  localparam int unsigned OSR      = 2;
  localparam int unsigned CLEAN_CH = (PRE_SYMS - 1) * N_CHIPS;   // preamble chips after detection
  localparam int unsigned CCW      = $clog2(CLEAN_CH + 1);

  // ------------------------------------------------------------ transmitter
  semicoherent_tx #(
    .N_CHIPS(N_CHIPS), .M_RANGE(M_RANGE), .PHASE_W(PHASE_W),
    .PERT_W(PERT_W), .IQ_W(IQ_W), .ERR_W(ERR_W)
  ) u_tx (
    .clk         (tx_clk),
    .rst_n       (rst_n),
    .frame_start (tx_frame_start),
    .key_seed    (tx_key_seed),
    .pert_seed   (tx_pert_seed),
    .s_valid     (tx_s_valid),
    .s_ready     (tx_s_ready),
    .s_data      (tx_s_data),
    .s_clean     (tx_s_clean),
    .chip_valid  (tx_chip_valid),
    .chip_i      (tx_chip_i),
    .chip_q      (tx_chip_q),
    .chip_phase  (tx_chip_phase),
    .chip_psi    (tx_chip_psi),
    .chip_clean  (tx_chip_clean)
  );

  // ------------------------------------------------------ frame detection
  typedef enum logic {SEARCH, DEMOD} rx_state_t;
  rx_state_t state;

  localparam int unsigned CORR_W = 2 * IQ_W + 2 + $clog2(N_CHIPS);
  localparam int unsigned EST_IT = PHASE_W + 4;
  localparam int unsigned EST_DLY = EST_IT + 4;   // > estimator latency

  logic                     pending;     // detected, waiting for the delayed stream
  logic signed [CORR_W-1:0] det_re, det_im;
  logic [PHASE_W-1:0]       phase_est;
  logic                     est_done;

  preamble_detector #(
    .WIN_CHIPS(N_CHIPS), .OSR(OSR), .PHASE_W(PHASE_W), .IQ_W(IQ_W),
    .THR_SHIFT(1), .MAG_W(ACC_W)
  ) u_det (
    .clk      (rx_clk),
    .rst_n    (rst_n),
    .arm      (rx_arm),
    .key_seed (rx_key_seed),
    .search   (state == SEARCH && !pending && !rx_detect),
    .in_valid (rx_in_valid),
    .in_i     (rx_in_i),
    .in_q     (rx_in_q),
    .ready    (rx_ready),
    .detect   (rx_detect),
    .det_mag  (rx_det_mag),
    .det_re   (det_re),
    .det_im   (det_im)
  );

  // static carrier phase offset from the detection correlation
  phase_offset_estimator #(
    .IN_W(CORR_W), .PHASE_W(PHASE_W), .FRAC(4), .ITER(EST_IT)
  ) u_est (
    .clk   (rx_clk),
    .rst_n (rst_n),
    .start (rx_detect),
    .re    (det_re),
    .im    (det_im),
    .done  (est_done),
    .phase (phase_est)
  );

  // The sample stream and the detection pulse are delayed by EST_DLY clocks,
  // so the phase estimate is ready before the first chip is derotated.
  logic                   dl_valid [EST_DLY];
  logic                   dl_det   [EST_DLY];
  logic signed [IQ_W-1:0] dl_i     [EST_DLY];
  logic signed [IQ_W-1:0] dl_q     [EST_DLY];
  logic                   d_valid, d_det;
  logic signed [IQ_W-1:0] d_i, d_q;

  always_ff @(posedge rx_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(EST_DLY); k++) begin
        dl_valid[k] <= 1'b0;
        dl_det[k]   <= 1'b0;
        dl_i[k]     <= '0;
        dl_q[k]     <= '0;
      end
    end else begin
      dl_valid[0] <= rx_in_valid;
      dl_det[0]   <= rx_detect && state == SEARCH && !pending && !rx_arm;
      dl_i[0]     <= rx_in_i;
      dl_q[0]     <= rx_in_q;
      for (int k = 1; k < int'(EST_DLY); k++) begin
        dl_valid[k] <= dl_valid[k-1];
        dl_det[k]   <= dl_det[k-1];
        dl_i[k]     <= dl_i[k-1];
        dl_q[k]     <= dl_q[k-1];
      end
    end
  end

  // pulse and samples go through the same stages, so d_det lines up with
  // d_i/d_q exactly as rx_detect lines up with rx_in_i/rx_in_q
  assign d_det   = dl_det[EST_DLY-1];
  assign d_valid = dl_valid[EST_DLY-1];
  assign d_i     = dl_i[EST_DLY-1];
  assign d_q     = dl_q[EST_DLY-1];

  // ------------------------------------------------------ downsampling by 2
  logic                   skip;
  logic                   dec_valid, dec_clean;
  logic signed [IQ_W-1:0] dec_i, dec_q;
  logic [CCW-1:0]         chip_cnt;
  logic                   frame_go;

  assign frame_go = d_det && state == SEARCH;

  always_ff @(posedge rx_clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SEARCH;
      pending   <= 1'b0;
      skip      <= 1'b0;
      dec_valid <= 1'b0;
      dec_clean <= 1'b0;
      dec_i     <= '0;
      dec_q     <= '0;
      chip_cnt  <= '0;
    end else begin
      dec_valid <= 1'b0;
      if (rx_detect && state == SEARCH && !rx_arm) pending <= 1'b1;
      if (rx_arm || rx_packet_end) begin
        state   <= SEARCH;
        pending <= 1'b0;
      end else if (frame_go) begin
        state     <= DEMOD;
        pending   <= 1'b0;
        dec_valid <= d_valid;
        dec_i     <= d_i;
        dec_q     <= d_q;
        dec_clean <= (CLEAN_CH != 0);
        chip_cnt  <= CCW'(d_valid);
        skip      <= d_valid;
      end else if (state == DEMOD && d_valid) begin
        skip <= !skip;
        if (!skip) begin
          dec_valid <= 1'b1;
          dec_i     <= d_i;
          dec_q     <= d_q;
          dec_clean <= (chip_cnt < CCW'(CLEAN_CH));
          if (chip_cnt != CCW'(CLEAN_CH)) chip_cnt <= chip_cnt + 1'b1;
        end
      end
    end
  end

  assign rx_in_packet = (state == DEMOD);

  semicoherent_rx #(
    .N_CHIPS(N_CHIPS), .M_RANGE(M_RANGE), .PHASE_W(PHASE_W),
    .PERT_W(PERT_W), .IQ_W(IQ_W), .ERR_W(ERR_W), .ACC_W(ACC_W),
    .LOAD_SKIP(N_CHIPS)
  ) u_rx (
    .clk          (rx_clk),
    .rst_n        (rst_n),
    .frame_start  (frame_go),
    .key_seed     (rx_key_seed),
    .pert_seed    (rx_pert_seed),
    .sync_perturb (rx_sync_perturb),
    .phase_offset (phase_est),
    .in_valid     (dec_valid),
    .in_i         (dec_i),
    .in_q         (dec_q),
    .in_clean     (dec_clean),
    .sym_valid    (rx_sym_valid),
    .sym_bit      (rx_sym_bit),
    .sym_soft     (rx_sym_soft),
    .sym_mag      (rx_sym_mag)
  );

  // ----------------------------------------------------------- end of packet
  logic end_active;

  packet_end_detector #(.WIN(8), .MAG_W(ACC_W), .THR_SHIFT(2)) u_end (
    .clk       (rx_clk),
    .rst_n     (rst_n),
    .start     (frame_go),
    .trig_mag  (rx_det_mag),
    .sym_valid (rx_sym_valid),
    .sym_mag   (rx_sym_mag),
    .active    (end_active),
    .done      (rx_packet_end)
  );

  logic unused_active;
  assign unused_active = end_active ^ est_done;

endmodule
