// Quinquenary pulse-compression waveform generator.
//
// Turns a stream of quinquenary sequence elements (+1, +2, -1, -2, 0) into
// the sampled transmit waveform: each element becomes one period of a
// sinusoid of that signed amplitude (0 = no signal), DEPTH samples long,
// played out one sample per clock to a D/A converter. The sinusoid frequency
// is therefore f_clk / DEPTH, f_clk / 8 at the default size, and changes only
// with the clock.
//
// Structure (datapath of the architecture): five sine sample memories,
// Memory1..Memory5, hold the periods of amplitude +1, +2, -1, -2 and 0. An
// address counter steps all of them through their locations. A demultiplexer
// decodes the element code and enables the one memory to read, and a
// multiplexer forwards that memory's sample to the D/A port.
//
// Interface and timing:
//   run        high to generate. The address counter restarts at location 0
//              whenever run falls, so each run begins with a whole element.
//   elem_code  3-bit element code (+1 = 001, -1 = 011, +2 = 101, 0 = 000,
//              -2 = 111). It is sampled in the first clock of each element
//              period, the cycle in which elem_ack is high, and held
//              internally for the rest of the period. The source presents
//              the next element before that cycle and moves on after it.
//   elem_ack   element taken; high once every DEPTH clocks while run is high.
//   code_err   high together with elem_ack when the taken code is not an
//              element; it is then sent as 0.
//   dac_data   two's-complement sample for the D/A converter, dac_valid high
//              when it belongs to an element. The first sample of an element
//              appears one clock after its elem_ack cycle, followed by the
//              other DEPTH-1 on consecutive clocks. dac_data is 0 while
//              dac_valid is low.
//
// From the architecture: the five memories and their contents, the element
// codes, the demultiplexer / multiplexer structure, DEPTH samples per element
// at one per clock. This design's own choices: the run / elem_ack handshake,
// holding the element in a register for its period, the registered memory
// read, reset and the handling of unused codes.
module quin_pcs_gen
  import quin_pkg::*;
#(
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned AMP_UNIT = ((1 << (WIDTH - 1)) - 1) / 2,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  logic [2:0]              elem_code,
  output logic                    elem_ack,
  output logic                    code_err,
  output logic signed [WIDTH-1:0] dac_data,
  output logic                    dac_valid
);

  logic [AW-1:0] addr;
  logic          sym_start;
  logic [2:0]    elem_q;
  logic [2:0]    cur_code;
  mem_sel_t      rd_sel;
  mem_sel_t      sel_q;
  logic          dec_err;
  logic signed [WIDTH-1:0] mem_data [NUM_MEMS];

  sample_addr_counter #(.DEPTH(DEPTH)) u_addr (
    .clk      (clk),
    .rst_n    (rst_n),
    .run      (run),
    .addr     (addr),
    .sym_start(sym_start),
    .sym_last ()
  );

  // The element in force: the bus in the first clock of a period, the held
  // copy for the remaining DEPTH-1 clocks.
  assign cur_code = sym_start ? elem_code : elem_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         elem_q <= ELEM_ZERO;
    else if (sym_start) elem_q <= elem_code;
  end

  element_demux u_demux (
    .en      (run),
    .code    (cur_code),
    .sel     (rd_sel),
    .code_err(dec_err)
  );

  for (genvar m = 0; m < NUM_MEMS; m++) begin : g_mem
    sine_sample_rom #(
      .DEPTH    (DEPTH),
      .WIDTH    (WIDTH),
      .AMPLITUDE(mem_amplitude(m)),
      .AMP_UNIT (AMP_UNIT)
    ) u_mem (
      .clk  (clk),
      .rd_en(rd_sel[m]),
      .addr (addr),
      .data (mem_data[m])
    );
  end

  // The select travels with the read by one clock so the multiplexer picks
  // the memory that was read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q     <= '0;
      dac_valid <= 1'b0;
    end else begin
      sel_q     <= rd_sel;
      dac_valid <= run;
    end
  end

  sample_mux #(.WIDTH(WIDTH), .N(NUM_MEMS)) u_mux (
    .sel(sel_q),
    .in (mem_data),
    .out(dac_data)
  );

  assign elem_ack = sym_start;
  assign code_err = sym_start && dec_err;

  // At most one memory is read and forwarded at a time.
  always @(posedge clk) begin
    if (rst_n) begin
      assert ((rd_sel & (rd_sel - 1'b1)) == '0)
        else $error("quin_pcs_gen: read select %b is not one-hot", rd_sel);
      assert ((sel_q & (sel_q - 1'b1)) == '0)
        else $error("quin_pcs_gen: output select %b is not one-hot", sel_q);
    end
  end

endmodule
