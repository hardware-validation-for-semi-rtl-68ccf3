// tb_rns_prng - checks the RNS generator against a closed-form model.
//
// Two instances: the 8-bit keyed bulk-phase generator and the 12-bit
// perturbation generator with the other residue set. After a load, output t
// must equal the model evaluated at chip index t; the test steps past the
// wrap of every residue counter, holds advance low at random, reloads with a
// new seed mid-run and checks the bulk output is roughly uniform. A third
// instance loads 175 chips ahead and must match the model at t + 175.
module tb_rns_prng;
  import sc_pkg::*;
  `include "sc_ref_model.svh"

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        load = 1'b0, advance = 1'b0;
  seed_t       seed_b, seed_p;
  logic [7:0]  rnd_b;
  logic [11:0] rnd_p;
  logic [7:0]  rnd_s;
  int checks = 0, failures = 0;

  rns_prng #(.OUT_W(8),  .MODULI(BULK_MODULI), .SALT(32'h0000_0000)) dut_b (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed_b), .advance(advance), .rnd(rnd_b));
  rns_prng #(.OUT_W(12), .MODULI(PERT_MODULI), .SALT(32'h6A09_E667)) dut_p (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed_p), .advance(advance), .rnd(rnd_p));

  // same generator, loaded 175 chips into the code
  rns_prng #(.OUT_W(8),  .MODULI(BULK_MODULI), .SALT(32'h0000_0000), .LOAD_SKIP(175)) dut_s (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed_b), .advance(advance), .rnd(rnd_s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now(longint t);
    int eb, ep;
    eb = ref_rns(REF_BULK_P, REF_BULK_SALT, 8, seed_b, t);
    checks++;
    if (int'(rnd_s) != ref_rns(REF_BULK_P, REF_BULK_SALT, 8, seed_b, t + 175)) begin
      failures++;
      if (failures < 10) $display("FAIL skip t=%0d got %0d", t, rnd_s);
    end
    ep = ref_rns(REF_PERT_P, REF_PERT_SALT, 12, seed_p, t);
    checks += 2;
    if (int'(rnd_b) != eb) begin
      failures++;
      if (failures < 10) $display("FAIL bulk t=%0d got %0d exp %0d", t, rnd_b, eb);
    end
    if (int'(rnd_p) != ep) begin
      failures++;
      if (failures < 10) $display("FAIL pert t=%0d got %0d exp %0d", t, rnd_p, ep);
    end
  endtask

  task automatic run(int steps);
    longint t = 0;
    longint sum = 0;
    int n = 0;
    int same = 0;
    // load
    @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check_now(0);
    for (int i = 0; i < steps; i++) begin
      advance = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (advance) t++;
      check_now(t);
      sum += rnd_b;
      n++;
    end
    advance = 1'b0;
    // bulk output should average near 127.5 over many chips
    checks++;
    if (sum / n < 115 || sum / n > 140) begin
      failures++;
      $display("FAIL bulk mean %0d", sum / n);
    end
    // the two generators must not track each other
    same = 0;
    for (int i = 0; i < 200; i++) begin
      if (ref_rns(REF_BULK_P, REF_BULK_SALT, 8, seed_b, i) == (ref_rns(REF_PERT_P, REF_PERT_SALT, 12, seed_p, i) >> 4)) same++;
    end
    checks++;
    if (same > 10) failures++;
  endtask

  initial begin
    seed_b = {8'd250, 8'd17, 8'd3, 8'd255};   // 255 exercises seed reduction mod 251
    seed_p = {8'd7, 8'd99, 8'd228, 8'd1};
    #2 rst_n = 1'b0;   // a falling edge, so the asynchronous reset is seen
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // after reset all residues are zero
    @(negedge clk);
    checks++;
    if (int'(rnd_b) != ref_rns(REF_BULK_P, REF_BULK_SALT, 8, '0, 0)) failures++;
    run(1200);                               // > 4 wraps of the largest modulus
    seed_b = {$urandom_range(0,255), $urandom_range(0,255), $urandom_range(0,255), $urandom_range(0,255)};
    seed_p = {$urandom_range(0,255), $urandom_range(0,255), $urandom_range(0,255), $urandom_range(0,255)};
    run(600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
