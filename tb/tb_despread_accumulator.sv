// tb_despread_accumulator - symbol integration over N = 175 chips.
//
// Streams random chip values with random gaps, recomputes every symbol sum
// here, and checks sum, decision, magnitude, that each symbol appears one
// clock after its last chip, and that clear restarts the chip count.
module tb_despread_accumulator;

  localparam int N = 175;

  logic               clk = 1'b0, rst_n = 1'b1;
  logic               clear = 1'b0, in_valid = 1'b0;
  logic signed [13:0] in_re = '0;
  logic               sym_valid, sym_bit;
  logic signed [23:0] sym_soft;
  logic [23:0]        sym_mag;
  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_sum [$];
  int exp_cyc [$];

  despread_accumulator #(.N_CHIPS(N), .IN_W(14), .ACC_W(24)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid), .in_re(in_re),
    .sym_valid(sym_valid), .sym_bit(sym_bit), .sym_soft(sym_soft), .sym_mag(sym_mag));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sym_valid) begin
      int e, ec;
      checks++;
      if (exp_sum.size() == 0) begin
        failures++;
        $display("FAIL unexpected symbol");
      end else begin
        e = exp_sum.pop_front();
        ec = exp_cyc.pop_front();
        checks += 4;
        if (int'(sym_soft) != e) begin failures++; $display("FAIL sum %0d exp %0d", sym_soft, e); end
        if (sym_bit != (e < 0)) failures++;
        if (int'(sym_mag) != ((e < 0) ? -e : e)) failures++;
        if (cyc - ec != 1) begin failures++; $display("FAIL symbol latency %0d", cyc - ec); end
      end
    end
  end

  task automatic send_symbols(int nsym, int bias);
    for (int s = 0; s < nsym; s++) begin
      int sum = 0;
      int k = 0;
      while (k < N) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 5) != 0);
        in_re = 14'(int'($urandom_range(0, 8000)) - 4000 + bias);
        if (in_valid) begin
          sum += int'(in_re);
          k++;
          if (k == N) begin
            exp_sum.push_back(sum);
            exp_cyc.push_back(cyc);
          end
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    #2 rst_n = 1'b0;   // a falling edge, so the asynchronous reset is seen
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send_symbols(20, 3000);
    send_symbols(20, -3000);
    send_symbols(20, 0);
    // a partial symbol, then clear: the partial sum must be dropped
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_re = 14'sd1000;
    end
    @(negedge clk);
    in_valid = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    send_symbols(5, 500);
    repeat (4) @(posedge clk);
    checks++;
    if (exp_sum.size() != 0) begin
      failures++;
      $display("FAIL %0d symbols missing", exp_sum.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
