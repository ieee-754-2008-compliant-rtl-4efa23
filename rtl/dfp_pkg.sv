// dfp_pkg - shared types, constants and digit-level helper functions of the
// decimal64 divider.
//
// Digits travel in three binary codings. 8421 is ordinary BCD. 4221 and 5211
// are redundant codes whose bit weights add up to nine: every 4-bit pattern is
// a valid digit, and inverting the bits gives the nines complement. The
// functions below convert single digits between these codes by value. The
// modules apply them digit by digit across wide vectors. The decimal64
// constants (16 digits, bias 398, biased exponent range 0..767) follow
// IEEE 754-2008. The rounding-mode encoding is this design's choice.
package dfp_pkg;

  localparam int unsigned P      = 16;   // coefficient digits (decimal64)
  localparam int unsigned EW     = 10;   // biased exponent width
  localparam int unsigned BIAS   = 398;
  localparam int unsigned EMAX_B = 767;  // largest biased exponent

  // Rounding modes: the five of IEEE 754-2008 and two more in common use.
  typedef enum logic [2:0] {
    RM_TIES_EVEN   = 3'd0,
    RM_TIES_AWAY   = 3'd1,
    RM_TOWARD_POS  = 3'd2,
    RM_TOWARD_NEG  = 3'd3,
    RM_TOWARD_ZERO = 3'd4,
    RM_TIES_ZERO   = 3'd5,   // round half down
    RM_AWAY_ZERO   = 3'd6    // round up in magnitude
  } round_mode_e;

  typedef struct packed {
    logic invalid;
    logic div_by_zero;
    logic overflow;
    logic underflow;
    logic inexact;
  } dfp_flags_t;

  // value (0..9) of a 4221 digit
  function automatic logic [3:0] val4221(input logic [3:0] d);
    return {d[3], 2'b00} + {2'b00, d[2], 1'b0} + {2'b00, d[1], 1'b0} + {3'b000, d[0]};
  endfunction

  // canonical 4221 code of a value 0..9 (values above 9 give 9)
  function automatic logic [3:0] enc4221(input logic [3:0] v);
    case (v)
      4'd0: return 4'b0000;  4'd1: return 4'b0001;
      4'd2: return 4'b0010;  4'd3: return 4'b0011;
      4'd4: return 4'b1000;  4'd5: return 4'b1001;
      4'd6: return 4'b1010;  4'd7: return 4'b1011;
      4'd8: return 4'b1110;  default: return 4'b1111;
    endcase
  endfunction

  // 5211 code of a value 0..9, bits weigh {5,2,1,1}
  function automatic logic [3:0] enc5211(input logic [3:0] v);
    case (v)
      4'd0: return 4'b0000;  4'd1: return 4'b0001;
      4'd2: return 4'b0011;  4'd3: return 4'b0101;
      4'd4: return 4'b0111;  4'd5: return 4'b1000;
      4'd6: return 4'b1001;  4'd7: return 4'b1011;
      4'd8: return 4'b1101;  default: return 4'b1111;
    endcase
  endfunction

  // DPD declet -> three BCD digits (IEEE 754-2008 densely packed decimal)
  function automatic logic [11:0] dpd2bcd(input logic [9:0] b);
    logic p, q, r, s, t, u, v, w, x, y;
    logic [3:0] d2, d1, d0;
    {p, q, r, s, t, u, v, w, x, y} = b;
    if (!v) begin
      d2 = {1'b0, p, q, r}; d1 = {1'b0, s, t, u}; d0 = {1'b0, w, x, y};
    end else begin
      case ({w, x})
        2'b00: begin d2 = {1'b0, p, q, r}; d1 = {1'b0, s, t, u}; d0 = {3'b100, y}; end
        2'b01: begin d2 = {1'b0, p, q, r}; d1 = {3'b100, u}; d0 = {1'b0, s, t, y}; end
        2'b10: begin d2 = {3'b100, r}; d1 = {1'b0, s, t, u}; d0 = {1'b0, p, q, y}; end
        default:
          case ({s, t})
            2'b00:   begin d2 = {3'b100, r}; d1 = {3'b100, u}; d0 = {1'b0, p, q, y}; end
            2'b01:   begin d2 = {3'b100, r}; d1 = {1'b0, p, q, u}; d0 = {3'b100, y}; end
            2'b10:   begin d2 = {1'b0, p, q, r}; d1 = {3'b100, u}; d0 = {3'b100, y}; end
            default: begin d2 = {3'b100, r}; d1 = {3'b100, u}; d0 = {3'b100, y}; end
          endcase
      endcase
    end
    return {d2, d1, d0};
  endfunction

  // three BCD digits -> DPD declet
  function automatic logic [9:0] bcd2dpd(input logic [11:0] d);
    logic a, b, c, dd, e, f, g, h, i, j, k, m;
    {a, b, c, dd, e, f, g, h, i, j, k, m} = d;
    case ({a, e, i})
      3'b000: return {b, c, dd, f, g, h, 1'b0, j, k, m};
      3'b001: return {b, c, dd, f, g, h, 1'b1, 1'b0, 1'b0, m};
      3'b010: return {b, c, dd, j, k, h, 1'b1, 1'b0, 1'b1, m};
      3'b011: return {b, c, dd, 1'b1, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      3'b100: return {j, k, dd, f, g, h, 1'b1, 1'b1, 1'b0, m};
      3'b101: return {f, g, dd, 1'b0, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
      3'b110: return {j, k, dd, 1'b0, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      default: return {1'b0, 1'b0, dd, 1'b1, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
    endcase
  endfunction

endpackage
