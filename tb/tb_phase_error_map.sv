// tb_phase_error_map - exhaustive check of the mod-m phase error mapping.
//
// Every 12-bit input is applied; the expected error (x mod 67) - 33 is
// computed here with integer arithmetic. Also checks the output stays in
// [-33:33] and that the histogram is the near-uniform one expected from
// 4096 = 61*67 + 9 (residues 0..8 one count more often).
module tb_phase_error_map;

  localparam int unsigned M = 67;

  logic              clk = 1'b0;
  logic [11:0]       rnd;
  logic signed [6:0] err;
  int checks = 0, failures = 0;
  int hist [M];

  phase_error_map #(.IN_W(12), .M_RANGE(M), .ERR_W(7)) dut (.rnd(rnd), .err(err));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    foreach (hist[k]) hist[k] = 0;
    for (int x = 0; x < 4096; x++) begin
      rnd = 12'(x);
      @(posedge clk);
      expv = (x % M) - (M / 2);
      checks++;
      if (int'(err) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL rnd=%0d err=%0d exp=%0d", x, err, expv);
      end
      checks++;
      if (int'(err) < -33 || int'(err) > 33) failures++;
      hist[int'(err) + 33]++;
    end
    for (int k = 0; k < int'(M); k++) begin
      checks++;
      if (hist[k] != ((k < 9) ? 62 : 61)) begin
        failures++;
        $display("FAIL histogram bin %0d = %0d", k - 33, hist[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
