// Shared types and constants of the quinquenary pulse-compression waveform
// generator.
//
// A quinquenary sequence uses the five elements +1, +2, -1, -2 and 0. Each
// element is carried on the 3-bit element bus in the binary code that the
// generator was specified with: +1 = 001, -1 = 011, +2 = 101, 0 = 000 and
// -2 = 111. The three remaining codes (010, 100, 110) are not elements; the
// generator treats them as 0 and flags them (that handling is this design's
// own choice).
//
// The generator holds one sample memory per element. MEM_* name the memory
// index, in the order Memory1..Memory5 of the architecture: Memory1 = +1,
// Memory2 = +2, Memory3 = -1, Memory4 = -2, Memory5 = 0.
package quin_pkg;

  // Element codes on the 3-bit element bus.
  typedef enum logic [2:0] {
    ELEM_ZERO = 3'b000,
    ELEM_P1   = 3'b001,
    ELEM_M1   = 3'b011,
    ELEM_P2   = 3'b101,
    ELEM_M2   = 3'b111
  } elem_code_e;

  // Number of sample memories, one per element.
  localparam int unsigned NUM_MEMS = 5;

  // Memory indices (position of each memory's bit in a one-hot select).
  localparam int unsigned MEM_P1   = 0;  // Memory1: amplitude +1
  localparam int unsigned MEM_P2   = 1;  // Memory2: amplitude +2
  localparam int unsigned MEM_M1   = 2;  // Memory3: amplitude -1
  localparam int unsigned MEM_M2   = 3;  // Memory4: amplitude -2
  localparam int unsigned MEM_ZERO = 4;  // Memory5: amplitude 0

  // One-hot memory select, bit i enables memory index i.
  typedef logic [NUM_MEMS-1:0] mem_sel_t;

  // Amplitude, in units, of the sinusoid stored in memory index idx.
  function automatic int mem_amplitude(int unsigned idx);
    case (idx)
      MEM_P1:  return 1;
      MEM_P2:  return 2;
      MEM_M1:  return -1;
      MEM_M2:  return -2;
      MEM_ZERO: return 0;
      default: return 0;
    endcase
  endfunction

endpackage
