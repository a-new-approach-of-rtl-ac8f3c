// tb_sc_ref_pkg - reference model shared by the testbenches of the
// stochastic PWL function units. It is written independently of the RTL:
// the coefficient table is kept in its signed published form (a_i, b_i as
// multiples of 2^-8) and converted here to what each ROM must hold, and the
// LFSR and stream arithmetic are re-derived cycle by cycle from the
// polynomial exponents.
package tb_sc_ref_pkg;

  localparam int STREAM_LEN = 255;
  localparam int SEED_X = 33;   // seeds the RTL uses by default
  localparam int SEED_A = 176;
  localparam int K_X = 1;       // x^8 + x^K_X + 1
  localparam int K_A = 2;       // x^8 + x^K_A + 1

  // function order: 0 ln(1+x), 1 tanh, 2 sigmoid, 3 sin, 4 cos, 5 e^-x
  localparam int NF = 6;
  typedef int tbl_t [NF][8];
  // Slopes a_i * 2^8 (signed)
  localparam tbl_t A_SIGNED = '{
    '{243, 217, 193, 180, 162, 151, 143, 126},
    '{255, 247, 232, 213, 189, 165, 141, 117},
    '{ 64,  64,  63,  63,  57,  57,  52,  50},
    '{255, 254, 245, 232, 214, 201, 178, 144},
    '{-13, -47, -79,-106,-138,-162,-186,-211},
    '{-234,-211,-187,-166,-144,-131,-116,-101}};
  // Offsets b_i * 2^8 (cos b_0 = 1.0 = 256; sigmoid b_6 taken as 135)
  localparam tbl_t B_SIGNED = '{
    '{  0,   3,   9,  14,  23,  30,  36,  51},
    '{  0,   2,   5,  12,  24,  39,  57,  78},
    '{128, 128, 128, 128, 131, 131, 135, 137},
    '{  0,   0,   2,   7,  16,  24,  41,  71},
    '{256, 260, 268, 278, 294, 309, 327, 349},
    '{256, 252, 246, 238, 227, 219, 208, 195}};

  function automatic int rom_a(int fn, int seg);
    int a = A_SIGNED[fn][seg];
    return (a < 0) ? -a : a;
  endfunction

  function automatic int rom_b(int fn, int seg);
    int b = B_SIGNED[fn][seg];
    if (fn == 4) return b - 256;          // cos keeps b - 1.0
    return (b > 255) ? 255 : b;           // e^-x b_0 = 1.0 clipped
  endfunction

  function automatic bit [7:0] lfsr_step(bit [7:0] s, int k);
    bit fb = s[7] ^ s[k-1];
    return {s[6:0], fb};
  endfunction

  // Ones of the product stream over a window of len bits
  function automatic int ref_count(int fn, int x, int len = STREAM_LEN);
    bit [7:0] rx = 8'(SEED_X), ra = 8'(SEED_A);
    int a = rom_a(fn, x / 32);
    int n = 0;
    for (int t = 0; t < len; t++) begin
      bit p = (int'(rx) < x) && (int'(ra) < a);
      if (fn == 4) p = !p;
      n += p;
      rx = lfsr_step(rx, K_X);
      ra = lfsr_step(ra, K_A);
    end
    return n;
  endfunction

  function automatic int ref_f(int fn, int x, int len = STREAM_LEN);
    int c = ref_count(fn, x, len);
    int b = rom_b(fn, x / 32);
    int v = (fn == 5) ? b - c : b + c;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  function automatic real true_f(int fn, real x);
    case (fn)
      0: return $ln(1.0 + x);
      1: return $tanh(x);
      2: return 1.0 / (1.0 + $exp(-x));
      3: return $sin(x);
      4: return $cos(x);
      default: return $exp(-x);
    endcase
  endfunction

endpackage
