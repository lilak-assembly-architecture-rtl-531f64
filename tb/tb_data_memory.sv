// tb_data_memory: random stores and loads against a shadow array of 512
// words. Stores write on the clock edge, loads read combinationally, a
// store with MemRead also high must not write, and byte addresses 2k and
// 2k+1 name the same word.
module tb_data_memory;
  import lilak_pkg::*;
  logic  clk = 0, mem_read, mem_write;
  word_t addr, wdata, rdata;
  int    checks = 0, failures = 0;
  word_t shadow [512];

  data_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_read = 0; mem_write = 0; addr = 0; wdata = 0;
    // initialise every word
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      mem_write = 1; addr = word_t'(2 * i); wdata = word_t'(i ^ 16'h5A5A);
      shadow[i] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      int w;
      @(negedge clk);
      w = $urandom_range(0, 511);
      addr = word_t'(2 * w + (n & 1) + ((n & 2) ? 16'hFC00 : 16'h0));
      mem_read  = 1'($urandom);
      mem_write = 1'($urandom);
      wdata     = word_t'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[w]) begin
        failures++;
        $display("FAIL read word %0d got %h exp %h", w, rdata, shadow[w]);
      end
      if (mem_write && !mem_read) shadow[w] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
