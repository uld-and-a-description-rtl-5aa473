// tb_pdp8_memory: fills every word of the 32-page store with a value derived
// from its page and word address, reads all back, then performs random
// writes and reads against a shadow array. Reads are combinational, writes
// take effect at the clock edge.
module tb_pdp8_memory;
  import pdp8_pkg::*;

  logic  clk = 1'b0;
  word_t addr = '0;
  logic  wr = 1'b0;
  word_t wdata = '0;
  word_t rdata;
  word_t shadow [4096];
  int checks = 0, failures = 0;

  pdp8_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pattern(input int i);
    return word_t'((i * 12'o1463) ^ (i >> 5));
  endfunction

  initial begin
    @(negedge clk);
    for (int i = 0; i < 4096; i++) begin
      addr = word_t'(i); wdata = pattern(i); wr = 1'b1;
      shadow[i] = wdata;
      @(negedge clk);
    end
    wr = 1'b0;
    for (int i = 0; i < 4096; i++) begin
      addr = word_t'(i);
      #1;
      checks++;
      if (rdata !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %o: %o expected %o", i, rdata, shadow[i]);
      end
      @(negedge clk);
    end
    for (int k = 0; k < 3000; k++) begin
      addr = 12'($urandom);
      if ($urandom_range(0, 1)) begin
        wdata = 12'($urandom); wr = 1'b1; shadow[addr] = wdata;
      end else begin
        wr = 1'b0;
        #1;
        checks++;
        if (rdata !== shadow[addr]) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
