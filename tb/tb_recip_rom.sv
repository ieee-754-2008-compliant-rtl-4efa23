// tb_recip_rom - reads every entry of the divisor high inverse memory.
//
// For each 4-digit prefix a = 1000..9999 the address is presented with en
// for one clock. The entry, available after that clock edge, must be the BCD
// form of floor(10^7 / (a + 1)). The output must also hold its value while en
// is low. Runs at the default depth of 9000.
module tb_recip_rom;
  import tb_dfp_ref_pkg::*;
  logic clk = 0, en = 0;
  logic [13:0] addr;
  logic [15:0] data, held;
  int checks = 0, failures = 0;

  recip_rom dut (.clk(clk), .en(en), .addr(addr), .data(data));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    addr = 14'd1000;
    for (int a = 1000; a < 10000; a++) begin
      @(negedge clk);
      addr = 14'(a); en = 1;
      @(negedge clk);
      en = 0;
      checks++;
      if (int'(from_bcd(256'(data), 4)) != 10000000 / (a + 1)) begin
        failures++;
        if (failures < 10) $display("a=%0d data=%h", a, data);
      end
      if (a % 97 == 0) begin
        held = data;
        addr = 14'(a + 1);
        @(negedge clk);
        checks++;
        if (data !== held) begin failures++; $display("output changed without en"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
