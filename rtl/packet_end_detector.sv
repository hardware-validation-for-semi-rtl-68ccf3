// packet_end_detector - decides that a packet has ended.
//
// After a frame is detected, every despread symbol magnitude is pushed into a
// window of the last WIN = 8 symbols. Once the window is full, the packet is
// declared over when the window sum drops below the detection magnitude that
// started demodulation, scaled by WIN / 2^THR_SHIFT (with THR_SHIFT = 2: the
// average symbol magnitude has fallen below a quarter of the preamble
// correlation). Symbols that still carry signal, even with the perturbation
// loss, stay far above that; symbols made of silence or noise fall below it
// within a few symbols.
//
// Following the document: the comparison of a sequence of eight despread
// symbol magnitudes with the triggering correlation magnitude. The threshold
// ratio and the running-sum form are this design's choice.
//
// Interface and timing: start (with trig_mag) begins a packet and empties the
// window; active stays high until done pulses, which happens in the clock
// after the sym_valid that brings the window below the threshold.
module packet_end_detector #(
  parameter int unsigned WIN       = 8,
  parameter int unsigned MAG_W     = 23,
  parameter int unsigned THR_SHIFT = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [MAG_W-1:0] trig_mag,
  input  logic             sym_valid,
  input  logic [MAG_W-1:0] sym_mag,
  output logic             active,
  output logic             done
);

  localparam int unsigned SW = MAG_W + $clog2(WIN) + 1;
  localparam int unsigned CW = $clog2(WIN + 1);

  logic [MAG_W-1:0] win [WIN];
  logic [SW-1:0]    sum, sum_next, thr, thr_q;
  logic [CW-1:0]    fill;

  always_comb begin
    sum_next = sum + SW'(sym_mag) - SW'(win[WIN-1]);
    thr      = (SW'(trig_mag) * SW'(WIN)) >> THR_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      done   <= 1'b0;
      sum    <= '0;
      thr_q  <= '0;
      fill   <= '0;
      for (int k = 0; k < int'(WIN); k++) win[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active <= 1'b1;
        sum    <= '0;
        thr_q  <= thr;
        fill   <= '0;
        for (int k = 0; k < int'(WIN); k++) win[k] <= '0;
      end else if (active && sym_valid) begin
        win[0] <= sym_mag;
        for (int k = 1; k < int'(WIN); k++) win[k] <= win[k-1];
        sum <= sum_next;
        if (fill != CW'(WIN)) fill <= fill + 1'b1;
        if ((fill >= CW'(WIN - 1)) && (sum_next < thr_q)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
