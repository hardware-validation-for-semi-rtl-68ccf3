// phase_derotator - removes a known phase from a complex chip.
//
// The receiver multiplies each incoming chip by the complex conjugate of the
// constellation point of a phase word, out = in * exp(-j*phase), which takes a
// chip sent at phase theta (+ psi) back towards the real axis. One instance
// removes the keyed bulk phase theta; a second, optional one removes the
// perturbation psi when the receiver holds the perturbation generator too.
// With bypass = 1 the chip passes unrotated (stage disabled).
//
// Arithmetic: the table samples have LUT_W bits and amplitude 2^(LUT_W-1)-1;
// the complex product is rounded and scaled by 2^-(LUT_W-1), so the gain is
// just under one. The output is one bit wider than the input because a chip
// with |I| = |Q| = full scale can rotate onto an axis.
//
// Timing: two-cycle latency, one chip per cycle. Cycle 1 looks the phase up
// and registers the chip; cycle 2 registers the product. phase and bypass are
// sampled with the chip.
module phase_derotator #(
  parameter int unsigned IN_W     = 12,
  parameter int unsigned PHASE_W  = 8,
  parameter int unsigned LUT_W    = 12,
  parameter bit          HALF_LSB = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  input  logic [PHASE_W-1:0]     phase,
  input  logic                   bypass,
  output logic                   out_valid,
  output logic signed [IN_W:0]   out_i,
  output logic signed [IN_W:0]   out_q
);

  localparam int unsigned PW = IN_W + LUT_W + 1;   // width of a sum of two products

  logic signed [LUT_W-1:0] c_s1, s_s1;
  logic signed [IN_W-1:0]  i_s1, q_s1;
  logic                    v_s1, byp_s1;
  logic signed [PW-1:0]    re_full, im_full;

  phase_iq_lut #(.PHASE_W(PHASE_W), .IQ_W(LUT_W), .HALF_LSB(HALF_LSB)) u_lut (
    .clk   (clk),
    .phase (phase),
    .cos_o (c_s1),
    .sin_o (s_s1)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_s1      <= 1'b0;
      byp_s1    <= 1'b0;
      i_s1      <= '0;
      q_s1      <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      v_s1      <= in_valid;
      byp_s1    <= bypass;
      i_s1      <= in_i;
      q_s1      <= in_q;
      out_valid <= v_s1;
      if (byp_s1) begin
        out_i <= (IN_W+1)'(i_s1);
        out_q <= (IN_W+1)'(q_s1);
      end else begin
        out_i <= (IN_W+1)'((re_full + PW'(2**(LUT_W-2))) >>> (LUT_W-1));
        out_q <= (IN_W+1)'((im_full + PW'(2**(LUT_W-2))) >>> (LUT_W-1));
      end
    end
  end

  // (i + jq)(c - js) = (ic + qs) + j(qc - is)
  always_comb begin
    re_full = PW'(i_s1 * c_s1) + PW'(q_s1 * s_s1);
    im_full = PW'(q_s1 * c_s1) - PW'(i_s1 * s_s1);
  end

endmodule
