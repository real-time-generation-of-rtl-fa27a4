// Sample multiplexer.
//
// Passes the sample of the selected memory on to the D/A converter port.
// The select is one-hot, one bit per memory, so the mux is an AND-OR tree:
// each memory's sample is gated by its select bit and the results are ORed.
// With no bit set the output is 0 (no signal transmitted).
//
// Interface and timing: purely combinational. in[i] is the sample of memory
// index i; sel must be one-hot or zero (the generator checks this).
//
// From the architecture: a multiplexer between the five memories and the
// D/A converter. This design's own choices: the one-hot AND-OR form and the
// zero output when nothing is selected.
module sample_mux #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned N     = 5
) (
  input  logic [N-1:0]            sel,
  input  logic signed [WIDTH-1:0] in [N],
  output logic signed [WIDTH-1:0] out
);

  always_comb begin
    out = '0;
    for (int i = 0; i < int'(N); i++) begin
      out = out | (in[i] & {WIDTH{sel[i]}});
    end
  end

endmodule
