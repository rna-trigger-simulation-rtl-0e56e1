// tb_lut_sram: self-checking test of the look-up-table SRAM at its full
// 256k x 16 size. Random writes are mirrored in an associative array; reads
// at written and rewritten addresses must return the last value, and the
// read data must follow the address without a clock edge.
module tb_lut_sram;
  logic        clk = 0;
  logic [17:0] addr = '0;
  logic        we = 0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] ref_mem [int];
  int checks = 0, failures = 0;

  lut_sram #(.AW(18), .DW(16)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int keys[$];
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr  = (i < 1000) ? 18'($urandom) : 18'(keys[$urandom_range(0, keys.size()-1)]);
      wdata = 16'($urandom);
      we    = 1;
      if (!ref_mem.exists(int'(addr))) keys.push_back(int'(addr));
      ref_mem[int'(addr)] = wdata;
    end
    @(negedge clk) we = 0;
    foreach (keys[i]) begin
      addr = 18'(keys[i]);
      #0.1;
      checks++;
      if (rdata !== ref_mem[keys[i]]) begin
        failures++;
        $display("FAIL addr %h got %h expected %h", addr, rdata, ref_mem[keys[i]]);
      end
    end
    // a write with we low must not change the contents
    @(negedge clk) addr = 18'(keys[0]); wdata = ~ref_mem[keys[0]]; we = 0;
    @(negedge clk);
    checks++;
    if (rdata !== ref_mem[keys[0]]) begin failures++; $display("FAIL write without we"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
