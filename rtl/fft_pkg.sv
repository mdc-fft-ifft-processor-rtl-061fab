// Shared types, constants and helper functions of the four-stream MDC FFT/IFFT
// processor. The processor transforms four parallel streams (MIMO spatial
// streams A-D) of N = 2048, 1024, 512 or 128 points with one radix-4 butterfly
// per pipeline stage. Word lengths follow the design description: 8-bit input,
// 10-bit internal words, 12-bit output. The twiddle width (12 bits, 10
// fractional) and the scaling schedule are choices of this implementation.
package fft_pkg;

  // Word lengths (per real or imaginary part).
  localparam int unsigned IN_W   = 8;
  localparam int unsigned DATA_W = 10;
  localparam int unsigned OUT_W  = 12;
  // Twiddle coefficients: signed, TW_FRAC fractional bits, 1.0 = 2**TW_FRAC.
  localparam int unsigned TW_W    = 12;
  localparam int unsigned TW_FRAC = 10;

  // Largest transform and its index widths.
  localparam int unsigned NMAX      = 2048;
  localparam int unsigned NMAX_LOG  = 11;
  localparam int unsigned LANES     = 4;
  // Entries of the one-octant twiddle table: angles 2*pi*r/NMAX, r = 0..NMAX/8.
  localparam int unsigned OCT_ENTRIES = NMAX / 8 + 1;

  // Transform length selection.
  typedef enum logic [1:0] {
    LEN_2048 = 2'd0,
    LEN_1024 = 2'd1,
    LEN_512  = 2'd2,
    LEN_128  = 2'd3
  } len_e;

  // Sample tags that travel with the four lanes through the pipeline.
  typedef struct packed {
    logic       valid;   // lanes hold samples of a stream block
    logic       first;   // first cycle of a stream block
    logic [1:0] stream;  // 0..3 = stream A..D
  } tag_t;

  // log2 of the transform length.
  function automatic int unsigned len_log2(len_e len);
    case (len)
      LEN_2048: return 11;
      LEN_1024: return 10;
      LEN_512:  return 9;
      default:  return 7;
    endcase
  endfunction

  // Pipeline stage s (1..5) is used for this length (Fig. 1 decomposition:
  // shorter transforms drop the first stages, the last three are shared).
  function automatic logic stage_active(len_e len, int unsigned s);
    case (len)
      LEN_2048, LEN_1024: return 1'b1;
      LEN_512:            return s >= 2;
      default:            return s >= 3;
    endcase
  endfunction

  // log2 of the commutator delay unit D of radix-4 stage s (1..4). For the
  // lengths with a radix-8 last stage D = 2048 / 4**(s+1); for 1024 it is half.
  function automatic logic [2:0] stage_dlog(len_e len, int unsigned s);
    int unsigned d;
    d = 11 - 2 * (s + 1);
    if (len == LEN_1024) d = d - 1;
    return 3'(d);
  endfunction

  // Cosine / sine table of one octant, scaled by 2**TW_FRAC and rounded.
  typedef logic signed [OCT_ENTRIES-1:0][TW_W-1:0] oct_rom_t;

  function automatic oct_rom_t make_cos_rom();
    oct_rom_t rom;
    real pi;
    pi = 3.14159265358979323846;
    for (int r = 0; r < int'(OCT_ENTRIES); r++)
      rom[r] = TW_W'($rtoi($floor($cos(2.0 * pi * r / NMAX) * (2.0 ** TW_FRAC) + 0.5)));
    return rom;
  endfunction

  function automatic oct_rom_t make_sin_rom();
    oct_rom_t rom;
    real pi;
    pi = 3.14159265358979323846;
    for (int r = 0; r < int'(OCT_ENTRIES); r++)
      rom[r] = TW_W'($rtoi($floor($sin(2.0 * pi * r / NMAX) * (2.0 ** TW_FRAC) + 0.5)));
    return rom;
  endfunction

  // Round-half-up arithmetic right shift followed by saturation to OW bits.
  // Input is given as a 32-bit signed value.
  function automatic logic signed [31:0] rnd_sat(logic signed [31:0] v,
                                                 int unsigned sh, int unsigned ow);
    logic signed [31:0] half, r, hi, lo;
    half = (sh > 0) ? (32'sd1 <<< (sh - 1)) : 32'sd0;
    r    = (v + half) >>> sh;
    hi   = (32'sd1 <<< (ow - 1)) - 32'sd1;
    lo   = -(32'sd1 <<< (ow - 1));
    return (r > hi) ? hi : ((r < lo) ? lo : r);
  endfunction

endpackage
