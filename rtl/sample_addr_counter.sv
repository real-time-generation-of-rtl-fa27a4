// Sample address counter.
//
// Steps the read address of the sample memories through locations
// 0..DEPTH-1, one location per clock, so that the DEPTH samples of one
// sequence element take DEPTH clocks and the generated sinusoid has the
// frequency f_clk / DEPTH.
//
// Interface and timing: while run is high the address advances on every
// rising clk edge and wraps from DEPTH-1 to 0. While run is low, and after
// reset (rst_n low, asynchronous), it is held at 0, so the next element
// starts at the first sample. sym_start is high in the cycle in which
// location 0 is addressed with run high, i.e. the first clock of each element
// period; sym_last marks the last one.
//
// From the architecture: one location per clock, 8 clocks per element. This
// design's own choices: the run control, the reset and the two period marks.
module sample_addr_counter #(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  output logic [AW-1:0] addr,
  output logic          sym_start,
  output logic          sym_last
);

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          addr <= '0;
    else if (!run)       addr <= '0;
    else if (addr == LAST) addr <= '0;
    else                 addr <= addr + 1'b1;
  end

  assign sym_start = run && (addr == '0);
  assign sym_last  = run && (addr == LAST);

endmodule
