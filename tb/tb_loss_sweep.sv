// tb_loss_sweep - average symbol energy loss against the number of
// perturbation states m on a 256-phase circle.
//
// Six transmitter/receiver pairs run side by side, with m = 31, 47, 67, 93,
// 129 and 155, the values chosen for 0.1, 0.25, 0.5, 1, 2 and 3 dB of average
// chip-energy loss. Each sends 8 clean and 160 perturbed symbols of 175 chips
// (28,000 perturbed chips) to a semi-coherent receiver; the measured loss of
// the perturbed symbols must lie within 0.1 dB of the published simulation
// results (0.1053, 0.2440, 0.5021, 0.9888, 1.9797 and 3.0493 dB) and every
// decision must be right, since the link carries no noise.
module tb_loss_sweep;

  localparam int unsigned NM = 6;
  localparam int unsigned MS [NM] = '{31, 47, 67, 93, 129, 155};
  localparam real REF_DB [NM] = '{0.1053, 0.2440, 0.5021, 0.9888, 1.9797, 3.0493};

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic done [NM];
  real  loss [NM];
  int   errs [NM];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NM; g++) begin : g_probe
    loss_probe #(.M_RANGE(MS[g]), .NPRE(8), .NSYM(160)) u_probe (
      .clk(clk), .rst_n(rst_n), .start(start), .done(done[g]), .loss_db(loss[g]), .errors(errs[g]));
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    #2 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < int'(NM); i++) if (!done[i]) all_done = 1'b0;
    end while (!all_done);
    for (int i = 0; i < int'(NM); i++) begin
      $display("m = %0d: measured loss %f dB, reference %f dB, %0d decision errors",
               MS[i], loss[i], REF_DB[i], errs[i]);
      checks += 2;
      if (loss[i] - REF_DB[i] > 0.1 || REF_DB[i] - loss[i] > 0.1) begin
        failures++;
        $display("FAIL m = %0d loss off the reference", MS[i]);
      end
      if (errs[i] != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
