// tb_sacha_pulse_sync: sends pulses from a 125 MHz domain into a 100 MHz
// domain (and the reverse) and checks that every pulse arrives exactly once,
// as a single-cycle pulse, within three destination cycles.
module tb_sacha_pulse_sync;
  logic c1 = 0, c2 = 0, r1 = 0, r2 = 0;
  always #4 c1 = ~c1;   // 125 MHz
  always #5 c2 = ~c2;   // 100 MHz

  logic p12 = 0, p21 = 0, q12, q21;
  int checks = 0, failures = 0, got12 = 0, got21 = 0, sent12 = 0, sent21 = 0;

  sacha_pulse_sync u12 (.src_clk(c1), .src_rst_n(r1), .src_pulse(p12),
                        .dst_clk(c2), .dst_rst_n(r2), .dst_pulse(q12));
  sacha_pulse_sync u21 (.src_clk(c2), .src_rst_n(r2), .src_pulse(p21),
                        .dst_clk(c1), .dst_rst_n(r1), .dst_pulse(q21));

  always @(posedge c2) if (r2 && q12) got12++;
  always @(posedge c1) if (r1 && q21) got21++;

  // Pulse width in the destination domain is one cycle.
  always @(posedge c2) if (r2 && q12) begin
    checks++;
    @(posedge c2);
    if (q12) begin failures++; $display("FAIL wide pulse"); end
  end

  initial begin
    repeat (3) @(posedge c2); r1 = 1; r2 = 1;
    for (int i = 0; i < 40; i++) begin
      int prev;
      prev = got12;
      @(negedge c1); p12 = 1; @(negedge c1); p12 = 0; sent12++;
      repeat (4) @(posedge c2);
      checks++;
      if (got12 != prev + 1) begin failures++; $display("FAIL 1->2 pulse %0d", i); end
      repeat ($urandom_range(0, 3)) @(posedge c2);
    end
    for (int i = 0; i < 40; i++) begin
      int prev;
      prev = got21;
      @(negedge c2); p21 = 1; @(negedge c2); p21 = 0; sent21++;
      repeat (4) @(posedge c1);
      checks++;
      if (got21 != prev + 1) begin failures++; $display("FAIL 2->1 pulse %0d", i); end
    end
    checks++;
    if (got12 != sent12 || got21 != sent21) begin failures++; $display("FAIL totals %0d/%0d %0d/%0d", got12, sent12, got21, sent21); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge c1);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
