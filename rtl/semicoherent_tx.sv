// semicoherent_tx - semi-coherent TRANSEC spread-spectrum transmitter.
//
// Every data symbol is spread over N_CHIPS chips. For each chip a keyed RNS
// generator gives the 8-bit bulk phase theta on a 256-point circle; a second,
// unsynchronized RNS generator gives a 12-bit word that phase_error_map turns
// into psi in [-33 : 33] steps (m = 67 states, about 0.5 dB average chip
// energy loss). phase_state_adder sums theta, the data rotation (BPSK: data 1
// adds pi) and psi modulo 2*pi, and phase_iq_lut turns the phase state into a
// chip sample. The perturbation hides theta, and with it the generator state
// and key, from an observer of the chip phases; a receiver that knows theta
// only loses a little correlation energy.
//
// Following the document: the two generators, 8 + 12 bit words, mod-m error
// mapping and the modular phase add, plus reseeding of the perturbation
// generator at every frame while the keyed code restarts identically.
// This design's own choices: the valid/ready symbol interface, one chip per
// clock, BPSK data, and the s_clean flag that sends a symbol without
// perturbation (the document allows dropping psi for the preamble).
//
// Interface and timing:
//   frame_start (only while idle, s_ready high and nothing accepted) loads
//   key_seed into the bulk generator and pert_seed into the perturbation one.
//   A symbol is taken when s_valid && s_ready; its first chip leaves on
//   chip_valid three cycles later, and its chips leave back to back. s_ready
//   is high while idle and in the cycle of a symbol's last chip, so a waiting
//   symbol follows with no gap: one symbol per N_CHIPS cycles.
//   chip_phase is the transmitted phase state, chip_psi the error added to it
//   and chip_clean marks chips sent without perturbation.
module semicoherent_tx
  import sc_pkg::*;
#(
  parameter int unsigned N_CHIPS = sc_pkg::DEF_N_CHIPS,
  parameter int unsigned M_RANGE = sc_pkg::DEF_M_RANGE,
  parameter int unsigned PHASE_W = sc_pkg::DEF_PHASE_W,
  parameter int unsigned PERT_W  = sc_pkg::DEF_PERT_W,
  parameter int unsigned IQ_W    = sc_pkg::DEF_IQ_W,
  parameter int unsigned ERR_W   = err_width(M_RANGE)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    frame_start,
  input  seed_t                   key_seed,
  input  seed_t                   pert_seed,
  input  logic                    s_valid,
  output logic                    s_ready,
  input  logic                    s_data,
  input  logic                    s_clean,
  output logic                    chip_valid,
  output logic signed [IQ_W-1:0]  chip_i,
  output logic signed [IQ_W-1:0]  chip_q,
  output logic [PHASE_W-1:0]      chip_phase,
  output logic signed [ERR_W-1:0] chip_psi,
  output logic                    chip_clean
);

  localparam int unsigned CW = $clog2(N_CHIPS);

  logic                    busy;
  logic [CW-1:0]           chip_cnt;
  logic                    cur_data, cur_clean;
  logic                    last_chip, accept;

  logic [PHASE_W-1:0]      theta;
  logic [PERT_W-1:0]       pert_word;
  logic signed [ERR_W-1:0] psi;
  logic [PHASE_W-1:0]      phase;

  logic                    v_s1, clean_s1;
  logic [PHASE_W-1:0]      phase_s1;
  logic signed [ERR_W-1:0] psi_s1;

  // ---------------------------------------------------------------- control
  always_comb begin
    last_chip = busy && (chip_cnt == CW'(N_CHIPS - 1));
    s_ready   = !busy || last_chip;
    accept    = s_valid && s_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      chip_cnt  <= '0;
      cur_data  <= 1'b0;
      cur_clean <= 1'b0;
    end else begin
      if (accept) begin
        busy      <= 1'b1;
        chip_cnt  <= '0;
        cur_data  <= s_data;
        cur_clean <= s_clean;
      end else if (last_chip) begin
        busy      <= 1'b0;
        chip_cnt  <= '0;
      end else if (busy) begin
        chip_cnt  <= chip_cnt + 1'b1;
      end
    end
  end

  // ------------------------------------------------------- phase generation
  rns_prng #(.OUT_W(PHASE_W), .MODULI(BULK_MODULI), .SALT(32'h0000_0000)) u_bulk_prng (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (frame_start),
    .seed    (key_seed),
    .advance (busy),
    .rnd     (theta)
  );

  rns_prng #(.OUT_W(PERT_W), .MODULI(PERT_MODULI), .SALT(32'h6A09_E667)) u_pert_prng (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (frame_start),
    .seed    (pert_seed),
    .advance (busy),
    .rnd     (pert_word)
  );

  phase_error_map #(.IN_W(PERT_W), .M_RANGE(M_RANGE), .ERR_W(ERR_W)) u_err_map (
    .rnd (pert_word),
    .err (psi)
  );

  phase_state_adder #(.PHASE_W(PHASE_W), .ERR_W(ERR_W)) u_adder (
    .theta   (theta),
    .psi     (psi),
    .data    (cur_data),
    .pert_en (!cur_clean),
    .phase   (phase)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_s1       <= 1'b0;
      clean_s1   <= 1'b0;
      phase_s1   <= '0;
      psi_s1     <= '0;
      chip_valid <= 1'b0;
      chip_clean <= 1'b0;
      chip_phase <= '0;
      chip_psi   <= '0;
    end else begin
      v_s1       <= busy;
      clean_s1   <= cur_clean;
      phase_s1   <= phase;
      psi_s1     <= cur_clean ? '0 : psi;
      chip_valid <= v_s1;
      chip_clean <= clean_s1;
      chip_phase <= phase_s1;
      chip_psi   <= psi_s1;
    end
  end

  // --------------------------------------------------- phase state to I/Q
  phase_iq_lut #(.PHASE_W(PHASE_W), .IQ_W(IQ_W), .HALF_LSB(1'b1)) u_iq (
    .clk   (clk),
    .phase (phase_s1),
    .cos_o (chip_i),
    .sin_o (chip_q)
  );

  initial begin
    assert (ERR_W <= PHASE_W && M_RANGE < 2**PHASE_W) else $error("perturbation range too wide for the phase word");
  end

  assert property (@(posedge clk) disable iff (!rst_n) frame_start |-> !busy)
    else $error("frame_start while a symbol is being sent");

endmodule
