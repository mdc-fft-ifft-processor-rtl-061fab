// Twiddle factor generator (combinational ROM look-up).
// Returns W = exp(-j*2*pi*e/NMAX) for an 11-bit exponent e. Only the angles
// of one octant (0..NMAX/8) are stored, as a cosine and a sine table; the
// other seven octants follow by swapping the two values (second half of a
// quadrant) and by quadrant conversion (sign changes and swaps). Keeping one
// octant with quadrant conversion follows the design description; the table
// is computed at elaboration time from cos/sin and rounded to TW_W bits.
module twiddle_gen (
  input  logic [fft_pkg::NMAX_LOG-1:0]    e,
  output logic signed [fft_pkg::TW_W-1:0] w_re,
  output logic signed [fft_pkg::TW_W-1:0] w_im
);
  import fft_pkg::*;

  localparam oct_rom_t COS_ROM = make_cos_rom();
  localparam oct_rom_t SIN_ROM = make_sin_rom();

  logic [1:0]                 quad;
  logic [NMAX_LOG-3:0]        r;      // position inside the quadrant
  logic [NMAX_LOG-3:0]        ri;     // mirrored position, 512 - r
  logic signed [TW_W-1:0]     c, s;   // cos / sin of the angle inside the quadrant

  always_comb begin
    quad = e[NMAX_LOG-1 -: 2];
    r    = e[NMAX_LOG-3:0];
    ri   = (NMAX_LOG-2)'(NMAX / 4) - r;
    if (r <= (NMAX_LOG-2)'(NMAX / 8)) begin
      c = COS_ROM[r];
      s = SIN_ROM[r];
    end else begin
      c = SIN_ROM[ri];
      s = COS_ROM[ri];
    end
    // angle = quad*pi/2 + phi; W = cos(angle) - j sin(angle)
    case (quad)
      2'd0:    begin w_re =  c; w_im = -s; end
      2'd1:    begin w_re = -s; w_im = -c; end
      2'd2:    begin w_re = -c; w_im =  s; end
      default: begin w_re =  s; w_im =  c; end
    endcase
  end

endmodule
