// Testbench for dds at its default sizes (24-bit phase, 8192-word tables).
// A phase model kept here steps by the code on each en; the expected
// sine and cosine words come from $sin/$cos of that phase (top 13 bits)
// through the half-table mirror rule, and must also be within one LSB of
// the ideal waveform. Covers the 10 kHz carrier code, the 1 kHz and
// 1.5 kHz tone codes, a random code, holding while en is low and reset.
module tb_dds;
  localparam real PI = 3.14159265358979323846;
  logic        clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [23:0] code = '0;
  logic [7:0]  sin_o, cos_o;
  int          checks = 0, failures = 0;

  dds dut (.clk(clk), .rst(rst), .en(en), .code(code), .sin_o(sin_o), .cos_o(cos_o));

  always #10 clk = ~clk;

  // table word for a 13-bit address, by the half-period mirror rule
  function automatic int word(input int a);
    int i;
    i = a % 4096;
    if (a < 4096) return int'($floor(127.5 + 127.5 * $sin(PI * real'(i) / 4096.0) + 0.5));
    else          return 255 - int'($floor(127.5 + 127.5 * $sin(PI * real'(i) / 4096.0) + 0.5));
  endfunction

  task automatic check_word(input int got, input int a, input string what);
    real ideal;
    checks++;
    if (got != word(a)) begin
      failures++;
      $display("FAIL: %s addr %0d got %0d expected %0d", what, a, got, word(a));
    end
    ideal = 127.5 + 127.5 * $sin(2.0 * PI * real'(a) / 8192.0);
    checks++;
    if (real'(got) - ideal > 1.0 || ideal - real'(got) > 1.0) begin
      failures++;
      $display("FAIL: %s addr %0d got %0d far from %f", what, a, got, ideal);
    end
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned phase;

  task automatic run_code(input int c, input int steps);
    code = 24'(c);
    for (int s = 0; s < steps; s++) begin
      @(negedge clk) en = 1'b1;
      @(negedge clk) en = 1'b0;
      phase = (phase + longint'(c)) % (64'd1 << 24);
      @(negedge clk);  // table read latency
      check_word(int'(sin_o), int'(phase >> 11), "sin");
      check_word(int'(cos_o), int'(((phase >> 11) + 2048) % 8192), "cos");
    end
  endtask

  initial begin
    phase = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk); @(negedge clk);
    check_word(int'(sin_o), 0, "sin after reset");
    check_word(int'(cos_o), 2048, "cos after reset");
    run_code(4194304, 8);   // 10 kHz carrier at 40 kHz: quarter period steps
    run_code(419430, 80);   // 1 kHz
    run_code(629146, 80);   // 1.5 kHz
    run_code(int'($urandom_range(24'hFFFFFF)), 200);
    // no step without en
    code = 24'd123457;
    repeat (20) @(negedge clk);
    check_word(int'(sin_o), int'(phase >> 11), "sin hold");
    // reset returns to phase 0
    rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    @(negedge clk); @(negedge clk);
    phase = 0;
    check_word(int'(sin_o), 0, "sin after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
