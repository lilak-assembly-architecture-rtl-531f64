// tb_sign_extend: checks all 256 8-bit values against value - 256 for
// values of 128 and above.
module tb_sign_extend;
  import lilak_pkg::*;
  logic [7:0] value;
  word_t      extended;
  int         checks = 0, failures = 0;

  sign_extend dut (.value(value), .extended(extended));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int expv;
      value = 8'(v);
      #1;
      expv = (v >= 128) ? v - 256 : v;
      checks++;
      if (extended !== word_t'(expv)) begin
        failures++;
        $display("FAIL %0d -> %h", v, extended);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
