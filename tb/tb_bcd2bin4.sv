// tb_bcd2bin4 - exhaustive check of the 4-digit BCD to binary converter:
// every value 0..9999 must come out as its binary number.
module tb_bcd2bin4;
  import tb_dfp_ref_pkg::*;
  logic [15:0] bcd;
  logic [13:0] bin;
  int checks = 0, failures = 0;

  bcd2bin4 dut (.bcd(bcd), .bin(bin));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < 10000; v++) begin
      bcd = 16'(to_bcd(big_t'(v), 4));
      #1;
      checks++;
      if (int'(bin) != v) begin
        failures++;
        if (failures < 10) $display("bcd=%h bin=%0d", bcd, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
