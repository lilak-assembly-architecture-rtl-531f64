// tb_instr_mem: loads all 512 words with a pattern through the load port,
// then reads them back by byte address (even and odd PCs must give the same
// word, PC bits above the memory are ignored).
module tb_instr_mem;
  import lilak_pkg::*;
  logic       clk = 0;
  word_t      pc, instr, load_data;
  logic       load_we;
  logic [8:0] load_addr;
  int         checks = 0, failures = 0;

  instr_mem dut (.*);

  always #5 clk = ~clk;

  function automatic word_t pattern(int i);
    return word_t'(i * 16'h9E37 + 16'h1234);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; pc = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 9'(i); load_data = pattern(i);
    end
    @(negedge clk);
    load_we = 0;
    for (int i = 0; i < 512; i++) begin
      pc = word_t'(2 * i); #1;
      checks++;
      if (instr !== pattern(i)) begin failures++; $display("FAIL pc=%h got %h", pc, instr); end
      pc = word_t'(2 * i + 1 + 16'h0400 * (i % 3)); #1;
      checks++;
      if (instr !== pattern(i)) begin failures++; $display("FAIL pc=%h got %h", pc, instr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
