// despread_accumulator - projection mapping and symbol integration.
//
// Each derotated chip is projected onto the real axis (its imaginary part is
// dropped: for a zero-mean phase error it averages to zero) and N_CHIPS real
// parts are summed into one soft symbol, the despread symbol energy of
// eps_s = eps_c * sum(cos psi_n). After the N-th chip the sum is output with a
// hard decision (sym_bit = 1 for a negative sum, i.e. a chip sent half a turn
// from its code phase) and its magnitude, and the sum restarts.
//
// clear (a frame start) empties the sum and restarts the chip count so that
// symbols line up with the transmitter's. Timing: sym_valid pulses one cycle
// after the clock edge that takes the last chip of a symbol; a chip can be
// accepted every cycle, so one symbol leaves every N_CHIPS valid chips.
module despread_accumulator #(
  parameter int unsigned N_CHIPS = 175,
  parameter int unsigned IN_W    = 14,
  parameter int unsigned ACC_W   = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  output logic                    sym_valid,
  output logic                    sym_bit,
  output logic signed [ACC_W-1:0] sym_soft,
  output logic [ACC_W-1:0]        sym_mag
);

  localparam int unsigned CW = $clog2(N_CHIPS);

  logic [CW-1:0]           chip_cnt;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] acc_next;
  logic                    last_chip;

  always_comb begin
    acc_next  = acc + ACC_W'(in_re);
    last_chip = (chip_cnt == CW'(N_CHIPS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chip_cnt  <= '0;
      acc       <= '0;
      sym_valid <= 1'b0;
      sym_bit   <= 1'b0;
      sym_soft  <= '0;
      sym_mag   <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (clear) begin
        chip_cnt <= '0;
        acc      <= '0;
      end else if (in_valid) begin
        if (last_chip) begin
          chip_cnt  <= '0;
          acc       <= '0;
          sym_valid <= 1'b1;
          sym_soft  <= acc_next;
          sym_bit   <= acc_next[ACC_W-1];
          sym_mag   <= acc_next[ACC_W-1] ? ACC_W'(-acc_next) : ACC_W'(acc_next);
        end else begin
          chip_cnt <= chip_cnt + 1'b1;
          acc      <= acc_next;
        end
      end
    end
  end

  initial begin
    assert (ACC_W >= IN_W + $clog2(N_CHIPS) + 1) else $error("ACC_W too narrow for N_CHIPS chips");
  end

endmodule
