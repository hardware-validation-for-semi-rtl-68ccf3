// tb_packet_end_detector - random packets of symbol magnitudes against a
// model of the end rule: after start, keep the last 8 magnitudes; once 8 have
// arrived, the packet ends at the first symbol that brings their sum below
// 8 * trig_mag / 4. Each packet has a random number of strong symbols (drawn
// around trig_mag, with perturbation-like spread) and then weak ones; symbols
// arrive with random gaps. Checks done timing (one clock after the deciding
// symbol), that active falls with done, that nothing happens before a start
// or after the end, and that the end never comes before the window is full.
module tb_packet_end_detector;

  localparam int WIN = 8;
  localparam int MW  = 23;

  logic          clk = 1'b0, rst_n = 1'b1;
  logic          start = 1'b0, sym_valid = 1'b0;
  logic [MW-1:0] trig_mag = '0, sym_mag = '0;
  logic          active, done;

  int checks = 0, failures = 0;

  packet_end_detector #(.WIN(WIN), .MAG_W(MW), .THR_SHIFT(2)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .trig_mag(trig_mag),
    .sym_valid(sym_valid), .sym_mag(sym_mag), .active(active), .done(done));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_end = 0, n_early = 0, n_long = 0;

  // drives one symbol; returns whether the model expects the end on it
  task automatic push(int mag, ref int hist [$], input longint thr, output bit fin);
    longint s;
    @(negedge clk);
    sym_valid = 1'b1;
    sym_mag   = MW'(mag);
    hist.push_front(mag);
    if (hist.size() > WIN) void'(hist.pop_back());
    s = 0;
    foreach (hist[k]) s += longint'(hist[k]);
    fin = (hist.size() == WIN) && (s < thr);
    @(negedge clk);
    sym_valid = 1'b0;
    // done is registered: high now, one clock after the symbol's edge
    checks += 2;
    if (done != fin)    begin failures++; $display("FAIL done=%0d expected %0d", done, fin); end
    if (active == fin)  begin failures++; $display("FAIL active=%0d after symbol", active); end
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("FAIL done outside a symbol"); end
    end
  endtask

  initial begin
    #2 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // symbols before any start do nothing
    repeat (20) begin
      @(negedge clk);
      sym_valid = 1'b1;
      sym_mag   = MW'($urandom_range(0, 1000));
      @(negedge clk);
      sym_valid = 1'b0;
      checks++;
      if (done || active) begin failures++; $display("FAIL activity without start"); end
    end

    for (int p = 0; p < 300; p++) begin
      int hist [$];
      int tm, nstrong, k;
      longint thr;
      bit fin;
      hist.delete();
      tm = $urandom_range(1000, 400000);
      nstrong = $urandom_range(0, 30);
      thr = (longint'(tm) * WIN) >> 2;
      @(negedge clk);
      start = 1'b1;
      trig_mag = MW'(tm);
      @(negedge clk);
      start = 1'b0;
      checks++;
      if (!active) begin failures++; $display("FAIL not active after start"); end
      fin = 1'b0;
      k = 0;
      while (!fin && k < 200) begin
        int m;
        if (k < nstrong) m = $urandom_range(tm / 3, tm + tm / 2);
        else             m = $urandom_range(0, tm / 5);
        push(m, hist, thr, fin);
        if (fin && k < WIN - 1) n_early++;
        k++;
      end
      checks++;
      if (!fin) begin failures++; $display("FAIL packet %0d never ended", p); end
      else n_end++;
      if (k > nstrong + WIN) n_long++;
      // symbols after the end are ignored
      repeat (3) begin
        @(negedge clk);
        sym_valid = 1'b1;
        sym_mag = '0;
        @(negedge clk);
        sym_valid = 1'b0;
        checks++;
        if (done || active) begin failures++; $display("FAIL activity after the end"); end
      end
    end

    $display("packets ended: %0d, before a full window: %0d, ended later than %0d weak symbols: %0d",
             n_end, n_early, WIN, n_long);
    checks += 2;
    if (n_end != 300) failures++;
    if (n_early != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
