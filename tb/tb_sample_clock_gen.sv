// Testbench for sample_clock_gen at its default parameters (24 bits,
// code 13422, i.e. 40 kHz from 50 MHz). Checks that sam_tick is a
// one-cycle strobe, that strobes are 1249 or 1250 clocks apart (the K =
// 1250 divider on average), that the number of strobes in 1,000,000
// clocks matches 1e6*13422/2^24 = 800.01, and that reset restarts it.
module tb_sample_clock_gen;
  logic clk = 1'b0, rst = 1'b1;
  logic sam_msb, sam_tick;
  int   checks = 0, failures = 0;

  sample_clock_gen dut (.clk(clk), .rst(rst), .sam_msb(sam_msb), .sam_tick(sam_tick));

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  n_ticks, last, cyc, first_tick;
    bit  prev;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    n_ticks = 0; last = -1; prev = 0; first_tick = -1;
    for (cyc = 0; cyc < 1_000_000; cyc++) begin
      @(posedge clk);
      #1;
      if (sam_tick) begin
        check(!prev, "sam_tick longer than one cycle");
        if (last >= 0)
          check((cyc - last == 1249) || (cyc - last == 1250),
                $sformatf("tick interval %0d", cyc - last));
        else first_tick = cyc;
        last = cyc;
        n_ticks++;
      end
      prev = sam_tick;
    end
    // 1e6 * 13422 / 2^24 = 800.01 rising MSB edges
    check(n_ticks == 800 || n_ticks == 801, $sformatf("tick count %0d", n_ticks));
    // the first MSB rise needs ceil(2^23/13422) = 625 additions
    check(first_tick >= 624 && first_tick <= 628, $sformatf("first tick at %0d", first_tick));
    // reset clears the accumulator: the first tick comes again after ~625 clocks
    rst <= 1'b1;
    repeat (2) @(posedge clk);
    #1 check(!sam_tick && !sam_msb, "outputs during reset");
    rst <= 1'b0;
    for (cyc = 0; cyc < 700; cyc++) begin
      @(posedge clk);
      #1;
      if (sam_tick) break;
    end
    check(cyc >= 624 && cyc <= 628, $sformatf("first tick after reset at %0d", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
