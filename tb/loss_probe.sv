// loss_probe - testbench helper: one transmitter/receiver pair with a given
// number of perturbation states m, looped back without noise.
//
// After start it sends one frame of NPRE clean symbols and NSYM perturbed
// random symbols to a semi-coherent receiver, and reports the average energy
// of the perturbed symbols relative to the clean ones as a loss in dB,
// together with the count of wrong decisions. done rises when all symbols
// have come back.
module loss_probe #(
  parameter int unsigned M_RANGE = 67,
  parameter int unsigned NPRE    = 8,
  parameter int unsigned NSYM    = 160
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output real  loss_db,
  output int   errors
);
  import sc_pkg::*;

  localparam int unsigned ERR_W = err_width(M_RANGE);

  logic               s_valid, s_ready, s_data, s_clean;
  logic               chip_valid, chip_clean;
  logic signed [11:0] chip_i, chip_q;
  logic [7:0]         chip_phase;
  logic signed [ERR_W-1:0] chip_psi;
  logic               sym_valid, sym_bit;
  logic signed [22:0] sym_soft;
  logic [22:0]        sym_mag;

  // transmitter and receiver wired back to back; frame timing is given, so
  // the measurement does not depend on acquisition
  semicoherent_tx #(.M_RANGE(M_RANGE)) u_tx (
    .clk(clk), .rst_n(rst_n),
    .frame_start(start), .key_seed(seed_t'({8'd3, 8'd141, 8'd59, 8'd26})),
    .pert_seed(seed_t'({8'd27, 8'd182, 8'd81, 8'd28})),
    .s_valid(s_valid), .s_ready(s_ready), .s_data(s_data), .s_clean(s_clean),
    .chip_valid(chip_valid), .chip_i(chip_i), .chip_q(chip_q),
    .chip_phase(chip_phase), .chip_psi(chip_psi), .chip_clean(chip_clean));

  semicoherent_rx #(.M_RANGE(M_RANGE)) u_rx (
    .clk(clk), .rst_n(rst_n),
    .frame_start(start), .key_seed(seed_t'({8'd3, 8'd141, 8'd59, 8'd26})),
    .pert_seed('0), .sync_perturb(1'b0), .phase_offset('0),
    .in_valid(chip_valid), .in_i(chip_i), .in_q(chip_q), .in_clean(chip_clean),
    .sym_valid(sym_valid), .sym_bit(sym_bit), .sym_soft(sym_soft), .sym_mag(sym_mag));

  bit  sent [$];
  int  nsent, nrecv;
  real e_clean, e_pert;
  bit  running;

  always @(posedge clk) begin
    if (!rst_n || start) begin
      nsent   <= 0;
      running <= start;
      s_valid <= 1'b0;
    end else if (running) begin
      if (!s_valid || s_ready) begin
        if (nsent < int'(NPRE + NSYM)) begin
          bit d;
          d = 1'($urandom);
          s_valid <= 1'b1;
          s_data  <= d;
          s_clean <= (nsent < int'(NPRE));
          sent.push_back(d);
          nsent   <= nsent + 1;
        end else begin
          s_valid <= 1'b0;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (!rst_n || start) begin
      nrecv   <= 0;
      errors  <= 0;
      e_clean <= 0.0;
      e_pert  <= 0.0;
      done    <= 1'b0;
    end else if (sym_valid) begin
      if (sent.pop_front() != sym_bit) errors <= errors + 1;
      if (nrecv < int'(NPRE)) e_clean <= e_clean + real'(sym_mag);
      else                    e_pert  <= e_pert + real'(sym_mag);
      nrecv <= nrecv + 1;
      if (nrecv + 1 == int'(NPRE + NSYM)) done <= 1'b1;
    end
  end

  always_comb loss_db = -10.0 * $log10((e_pert / real'(NSYM)) / ((e_clean + 1.0) / real'(NPRE)));

  logic unused;
  assign unused = ^{chip_phase, chip_psi, sym_soft};

endmodule
