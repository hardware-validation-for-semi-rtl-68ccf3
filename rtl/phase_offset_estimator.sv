// phase_offset_estimator - angle of a complex correlation, as a phase index.
//
// When the preamble detector fires, its correlation C = sum x_k * conj(r_k)
// points in the direction of the carrier phase offset between transmitter
// and receiver (times the sign of the first preamble symbol). This block turns
// C into the index of that angle on the 2^PHASE_W-point phase circle, so the
// receiver can remove a static phase offset by adding the index to its keyed
// phase before derotation.
//
// How: a CORDIC in vectoring mode. C is first folded into the right half
// plane (a half turn is added to the angle if Re C < 0), then ITER
// micro-rotations by +-atan(2^-i) drive Im to zero while the angle is summed
// in units of 2*pi / 2^(PHASE_W+FRAC). The table of atan(2^-i) is computed
// at elaboration. The result is rounded to PHASE_W bits. The residual error
// is below one phase step; the CORDIC gain of 1.65 only grows x, which has
// two bits of headroom.
//
// Following the document: a static phase offset derived from the preamble.
// How it is derived (the CORDIC, its precision, using the detection
// correlation itself) is this design's choice.
//
// Interface and timing: start loads re/im; done pulses ITER + 1 clocks later
// and phase then holds the estimate until the next start.
module phase_offset_estimator #(
  parameter int unsigned IN_W    = 34,
  parameter int unsigned PHASE_W = 8,
  parameter int unsigned FRAC    = 4,
  parameter int unsigned ITER    = PHASE_W + FRAC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [IN_W-1:0] re,
  input  logic signed [IN_W-1:0] im,
  output logic                   done,
  output logic [PHASE_W-1:0]     phase
);

  localparam int unsigned ZW = PHASE_W + FRAC;
  localparam int unsigned XW = IN_W + 2;
  localparam int unsigned IW = $clog2(ITER + 1);

  typedef logic [ZW-1:0] atan_tab_t [ITER];

  function automatic atan_tab_t make_atan();
    atan_tab_t t;
    for (int i = 0; i < int'(ITER); i++)
      t[i] = ZW'(longint'($floor($atan(1.0 / real'(longint'(1) << i))
                                 / (2.0 * 3.14159265358979323846)
                                 * real'(longint'(1) << ZW) + 0.5)));
    return t;
  endfunction

  localparam atan_tab_t ATAN = make_atan();

  logic signed [XW-1:0] x, y;
  logic [ZW-1:0]        z;
  logic [IW-1:0]        it;
  logic                 busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      z     <= '0;
      it    <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      phase <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        it   <= '0;
        if (re < 0) begin
          x <= -XW'(re);
          y <= -XW'(im);
          z <= ZW'(1) << (ZW - 1);
        end else begin
          x <= XW'(re);
          y <= XW'(im);
          z <= '0;
        end
      end else if (busy) begin
        if (y >= 0) begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + ATAN[it];
        end else begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - ATAN[it];
        end
        if (it == IW'(ITER - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
        end else begin
          it <= it + 1'b1;
        end
      end
      if (done) phase <= PHASE_W'((z + (ZW'(1) << (FRAC - 1))) >> FRAC);
    end
  end

endmodule
