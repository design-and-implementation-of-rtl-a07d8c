// Testbench for product_mixer: random offset-binary operands; the
// expected product (x-128)*(lo-128) is computed here in integers. Also
// checks the corner (-128)*(-128), that the output holds while en is low
// and that reset clears it.
module tb_product_mixer;
  logic               clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [7:0]         x_u, lo_u;
  logic signed [15:0] prod;
  int                 checks = 0, failures = 0;

  product_mixer dut (.clk(clk), .rst(rst), .en(en), .x_u(x_u), .lo_u(lo_u), .prod(prod));

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int lo);
    int exp_p;
    @(negedge clk);
    x_u = 8'(x); lo_u = 8'(lo); en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    exp_p = (x - 128) * (lo - 128);
    checks++;
    if (int'(prod) != exp_p) begin
      failures++;
      $display("FAIL: %0d*%0d gave %0d expected %0d", x, lo, prod, exp_p);
    end
  endtask

  initial begin
    int hold;
    x_u = 8'd0; lo_u = 8'd0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (prod != 0) begin failures++; $display("FAIL: reset value"); end
    rst = 1'b0;
    apply(0, 0);       // (-128)*(-128) = 16384
    apply(255, 0);     // 127*(-128)
    apply(255, 255);
    apply(128, 77);
    for (int i = 0; i < 500; i++) apply($urandom_range(255), $urandom_range(255));
    hold = int'(prod);
    @(negedge clk) x_u = 8'd3; lo_u = 8'd250;
    repeat (3) @(negedge clk);
    checks++;
    if (int'(prod) != hold) begin failures++; $display("FAIL: output changed without en"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
