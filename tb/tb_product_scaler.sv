// Testbench for product_scaler (16 -> 8 bits, shift 7): expected output is
// floor(din/128) clipped to -128..127, computed here with real
// arithmetic, for random and corner inputs; also checks the hold while
// en is low.
module tb_product_scaler;
  logic               clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [15:0] din;
  logic signed [7:0]  dout;
  int                 checks = 0, failures = 0;

  product_scaler dut (.clk(clk), .rst(rst), .en(en), .din(din), .dout(dout));

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v);
    int e;
    @(negedge clk);
    din = 16'(v); en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    e = int'($floor(real'(v) / 128.0));
    if (e > 127) e = 127;
    if (e < -128) e = -128;
    checks++;
    if (int'(dout) != e) begin
      failures++;
      $display("FAIL: %0d gave %0d expected %0d", v, dout, e);
    end
  endtask

  initial begin
    logic signed [7:0] hold;
    din = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    apply(16384); apply(16383); apply(16129); apply(-16384); apply(-1); apply(0);
    apply(32767); apply(-32768); apply(127); apply(-129);
    for (int i = 0; i < 500; i++) apply($urandom_range(32768) - 16384);
    for (int i = 0; i < 100; i++) apply(int'($urandom_range(65535)) - 32768);
    hold = dout;
    @(negedge clk) din = (dout == 8'sd39) ? 16'sd9000 : 16'sd5000;
    repeat (2) @(negedge clk);
    checks++;
    if (dout != hold) begin failures++; $display("FAIL: output changed without en"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
