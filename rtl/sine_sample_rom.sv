// Sine sample memory (one of Memory1..Memory5).
//
// Holds DEPTH samples of one period of a sinusoid whose amplitude is
// AMPLITUDE units (+1, +2, -1, -2 or 0). Location k holds
//   round(AMPLITUDE * AMP_UNIT * sin(2*pi*k/DEPTH))
// as a WIDTH-bit two's-complement number, so one unit of amplitude is
// AMP_UNIT codes and the +/-2 tables use nearly the full 8-bit range (+/-126).
// A negative amplitude is the same sinusoid in opposite phase. The table is
// computed when the design is elaborated, so DEPTH can be raised (to 256, for
// a finer waveform) without any data file.
//
// Interface and timing: a synchronous read port. When rd_en is high at a
// rising clk edge, data takes the sample at addr; otherwise data holds its
// value. One clock of read latency, one sample per clock.
//
// From the architecture: the 8 x 8-bit size and what each memory stores.
// This design's own choices: the number format, the scale of one unit, the
// sample phase (location 0 is the zero crossing) and the registered read.
module sine_sample_rom #(
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned WIDTH     = 8,
  parameter int          AMPLITUDE = 1,
  parameter int unsigned AMP_UNIT  = ((1 << (WIDTH - 1)) - 1) / 2,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rd_en,
  input  logic [AW-1:0]           addr,
  output logic signed [WIDTH-1:0] data
);

  typedef logic signed [WIDTH-1:0] table_t [DEPTH];

  localparam real PI = 3.14159265358979323846;

  function automatic table_t make_table();
    table_t t;
    real    v;
    for (int k = 0; k < int'(DEPTH); k++) begin
      v    = real'(AMPLITUDE) * real'(AMP_UNIT) * $sin(2.0 * PI * real'(k) / real'(DEPTH));
      t[k] = WIDTH'(int'($floor(v + 0.5)));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk) begin
    if (rd_en) data <= TABLE[addr];
  end

endmodule
