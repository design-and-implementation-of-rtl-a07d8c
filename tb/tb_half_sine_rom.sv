// Testbench for half_sine_rom (8192 x 8, half stored). Reads every
// address and compares with the mirrored table built here from $sin:
// v(i) = floor(127.5+127.5*sin(pi*i/4096)+0.5) for the first half and
// 255 - v(i) for the second. Also checks that every word is within one
// LSB of the true sine 127.5 + 127.5*sin(2*pi*a/8192) and that the read
// takes exactly one clock.
module tb_half_sine_rom;
  localparam real PI = 3.14159265358979323846;
  logic        clk = 1'b0;
  logic [12:0] addr = '0;
  logic [7:0]  data;
  int          checks = 0, failures = 0;

  half_sine_rom dut (.clk(clk), .addr(addr), .data(data));

  always #10 clk = ~clk;

  function automatic int first_half(input int i);
    return int'($floor(127.5 + 127.5 * $sin(PI * real'(i) / 4096.0) + 0.5));
  endfunction

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  exp_v, bad_exact, bad_near;
    real ideal;
    bad_exact = 0; bad_near = 0;
    for (int a = 0; a < 8192; a++) begin
      @(negedge clk) addr = 13'(a);
      @(posedge clk);
      #1;
      exp_v = (a < 4096) ? first_half(a) : 255 - first_half(a - 4096);
      ideal = 127.5 + 127.5 * $sin(2.0 * PI * real'(a) / 8192.0);
      checks++;
      if (int'(data) != exp_v) begin
        failures++;
        if (bad_exact++ < 5) $display("FAIL: addr %0d data %0d expected %0d", a, data, exp_v);
      end
      checks++;
      if ((real'(data) - ideal > 1.0) || (ideal - real'(data) > 1.0)) begin
        failures++;
        if (bad_near++ < 5) $display("FAIL: addr %0d data %0d ideal %f", a, data, ideal);
      end
    end
    // one-clock latency: the output changes only at the clock edge
    @(negedge clk) addr = 13'd2048;   // peak, 255
    @(posedge clk); #1;
    @(negedge clk) addr = 13'd6144;   // trough, 0
    #1 checks++;
    if (data != 8'd255) begin failures++; $display("FAIL: output changed before clock"); end
    @(posedge clk); #1 checks++;
    if (data != 8'd0) begin failures++; $display("FAIL: trough %0d", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
