// Direct digital synthesizer used as the PLL's voltage-controlled oscillator.
//
// The frequency word f from the loop filter is Q16.16 in offset-frequency
// units. The original design shifts it right by SHIFT = 16 bits and casts it
// to a 32-bit pure fraction M (the DDS data port), with f_out = f_clk * M.
// With SHIFT = 16 both steps together leave the bit pattern unchanged, so the
// 32-bit phase increment is simply the raw bits of f: 32.768 -> 2147484 ->
// 50.00 Hz at the 100 kHz sample rate. The other shifts of the original
// (11..17, with centre offsets 5e-4 * 2^SHIFT = 1.024 .. 65.536) scale the
// raw word by 2^(16 - SHIFT). The increment register loads when we is high (tied high
// in the original), the 32-bit phase accumulator adds it on every ce, and the
// top PHASE_BITS (12) of the phase address a quarter-wave sine table of
// 2^(PHASE_BITS-2) entries, computed at elaboration as
//   T[i] = round(65536 * sin(pi/2 * (i + 0.5) / 2^(PHASE_BITS-2))),
// from which sine and cosine (phase + a quarter turn) are unfolded by symmetry.
// Table size, output width and the half-step offset are this design's choices.
//
// Timing: increment register, phase accumulator and output register: a new
// word reaches the accumulator one ce after it is presented, and sin/cos are
// the table values of the phase held in the accumulator one ce earlier.
module dds
  import fx_pkg::*;
#(
  parameter int PHASE_BITS = 12,
  parameter int SHIFT      = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        we,          // load the frequency word
  input  fx_t         f,           // frequency word before the >>16 shift
  output logic [31:0] phase,       // phase accumulator, 2^32 = one turn
  output fx_t         sin_theta,   // Q16.16
  output fx_t         cos_theta    // Q16.16
);
  localparam int QB = PHASE_BITS - 2;
  localparam int QN = 2 ** QB;
  localparam int LSH = (SHIFT < FRAC) ? FRAC - SHIFT : 0;
  localparam int RSH = (SHIFT > FRAC) ? SHIFT - FRAC : 0;

  typedef logic [16:0] qtab_t [QN];

  function automatic qtab_t make_table();
    qtab_t t;
    for (int i = 0; i < QN; i++)
      t[i] = 17'($rtoi($floor(65536.0 * $sin(1.5707963267948966 * (i + 0.5) / QN) + 0.5)));
    return t;
  endfunction

  localparam qtab_t QTAB = make_table();

  // sine of a PHASE_BITS-bit phase, unfolded from the quarter table
  function automatic fx_t lookup(input logic [PHASE_BITS-1:0] p);
    logic [QB-1:0] idx;
    fx_t           mag;
    idx = p[PHASE_BITS-2] ? ~p[QB-1:0] : p[QB-1:0];
    mag = fx_t'(QTAB[idx]);
    return p[PHASE_BITS-1] ? -mag : mag;
  endfunction

  logic [31:0]           inc;
  logic [PHASE_BITS-1:0] p_s, p_c;

  assign p_s = phase[31 -: PHASE_BITS];
  assign p_c = p_s + PHASE_BITS'(QN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc       <= '0;
      phase     <= '0;
      sin_theta <= '0;
      cos_theta <= '0;
    end else if (ce) begin
      if (we) inc <= 32'((f <<< LSH) >>> RSH);
      phase     <= phase + inc;
      sin_theta <= lookup(p_s);
      cos_theta <= lookup(p_c);
    end
  end
endmodule
