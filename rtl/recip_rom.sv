// recip_rom - divisor high inverse memory: the four leading BCD digits of
// 1/Yh for every four-digit divisor prefix.
//
// Yh is the divisor's four leading digits followed by nines, so 1/Yh never
// exceeds 1/Y. For a prefix value a (1000..9999) the entry is
// floor(10^7 / (a + 1)), a four-digit number from 1000 to 9990, read as
// d.ddd. The example in the document reads 1534 -> 6.514. The memory has
// 9000 entries of 16 bits, addressed in binary by a - 1000. That makes it the
// 9000 x 16-bit memory the document lists. The contents are computed at
// initialisation from that formula, and the read is synchronous: the entry
// appears one cycle after en. Prefixes below 1000 do not occur, because the
// divisor is normalized.
module recip_rom #(
  parameter int unsigned DEPTH = 9000,
  parameter int unsigned BASE  = 1000
) (
  input  logic        clk,
  input  logic        en,
  input  logic [13:0] addr,              // binary value of the 4-digit prefix
  output logic [15:0] data               // 4 BCD digits of 1/Yh
);
  logic [15:0] mem [DEPTH];

  function automatic logic [15:0] to_bcd4(input int unsigned v);
    return {4'(v / 1000), 4'((v / 100) % 10), 4'((v / 10) % 10), 4'(v % 10)};
  endfunction

  // filled in chunks of CH entries, one initial block per chunk
  localparam int unsigned CH = 1000;
  for (genvar b = 0; b < (DEPTH + CH - 1) / CH; b++) begin : g_init
    initial begin
      for (int unsigned i = b * CH; i < DEPTH && i < (b + 1) * CH; i++)
        mem[i] = to_bcd4(10_000_000 / (i + BASE + 1));
    end
  end

  logic [13:0] idx;
  assign idx = addr - 14'(BASE);

  always_ff @(posedge clk)
    if (en) data <= (idx < 14'(DEPTH)) ? mem[idx] : 16'h9990;
endmodule
