// tb_phase_state_adder - random and corner checks of the modular phase add.
//
// Expected phase = (theta + 128*data + pert_en*psi) mod 256, computed with
// integers. Counts the cases that wrap past 0 or 255 and requires both.
module tb_phase_state_adder;
  `include "sc_ref_model.svh"

  logic              clk = 1'b0;
  logic [7:0]        theta;
  logic signed [6:0] psi;
  logic              data, pert_en;
  logic [7:0]        phase;
  int checks = 0, failures = 0, wrap_hi = 0, wrap_lo = 0;

  phase_state_adder #(.PHASE_W(8), .ERR_W(7)) dut (
    .theta(theta), .psi(psi), .data(data), .pert_en(pert_en), .phase(phase));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int th, int ps, bit d, bit en);
    int raw, e;
    theta = 8'(th); psi = 7'(ps); data = d; pert_en = en;
    @(posedge clk);
    raw = th + 128 * int'(d) + (en ? ps : 0);
    e = ref_mod256(raw);
    if (raw > 255) wrap_hi++;
    if (raw < 0) wrap_lo++;
    checks++;
    if (int'(phase) != e) begin
      failures++;
      if (failures < 10) $display("FAIL th=%0d psi=%0d d=%0d en=%0d got %0d exp %0d", th, ps, d, en, phase, e);
    end
  endtask

  initial begin
    apply(0, -33, 0, 1);
    apply(255, 33, 0, 1);
    apply(255, 33, 1, 1);
    apply(10, -33, 0, 0);
    apply(200, 20, 1, 1);
    for (int i = 0; i < 5000; i++)
      apply($urandom_range(0, 255), int'($urandom_range(0, 66)) - 33, 1'($urandom), 1'($urandom));
    checks++;
    if (wrap_hi == 0 || wrap_lo == 0) begin
      failures++;
      $display("FAIL wrap cases not seen: hi=%0d lo=%0d", wrap_hi, wrap_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
