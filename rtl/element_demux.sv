// Element demultiplexer.
//
// Decodes the 3-bit code of the current sequence element and enables exactly
// one of the five sample memories: +1 -> Memory1, +2 -> Memory2,
// -1 -> Memory3, -2 -> Memory4, 0 -> Memory5. With en low no memory is
// enabled.
//
// Interface and timing: purely combinational. sel is one-hot (or all zero
// when en is low), bit i enabling memory index i of quin_pkg. A code that is
// not one of the five elements (010, 100, 110) enables Memory5, so nothing is
// transmitted, and raises code_err.
//
// From the architecture: the element codes and the element-to-memory
// mapping. This design's own choices: the en input and the handling of
// unused codes.
module element_demux
  import quin_pkg::*;
(
  input  logic       en,
  input  logic [2:0] code,
  output mem_sel_t   sel,
  output logic       code_err
);

  always_comb begin
    sel      = '0;
    code_err = 1'b0;
    if (en) begin
      case (code)
        ELEM_P1:   sel[MEM_P1]   = 1'b1;
        ELEM_P2:   sel[MEM_P2]   = 1'b1;
        ELEM_M1:   sel[MEM_M1]   = 1'b1;
        ELEM_M2:   sel[MEM_M2]   = 1'b1;
        ELEM_ZERO: sel[MEM_ZERO] = 1'b1;
        default: begin
          sel[MEM_ZERO] = 1'b1;
          code_err      = 1'b1;
        end
      endcase
    end
  end

endmodule
