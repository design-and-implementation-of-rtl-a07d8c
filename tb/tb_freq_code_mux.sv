// Testbench for freq_code_mux: both switch positions give the code
// round(f*2^24/40000) of their tone, computed here from the frequencies.
module tb_freq_code_mux;
  logic        sel;
  logic [23:0] code;
  int          checks = 0, failures = 0;

  freq_code_mux dut (.sel(sel), .code(code));

  function automatic int code_of(input real f_hz);
    return int'($floor(f_hz * (2.0 ** 24) / 40000.0 + 0.5));
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      sel = 1'b1;
      #5 checks++;
      if (int'(code) != code_of(1000.0)) begin failures++; $display("FAIL: 1 kHz code %0d", code); end
      sel = 1'b0;
      #5 checks++;
      if (int'(code) != code_of(1500.0)) begin failures++; $display("FAIL: 1.5 kHz code %0d", code); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
