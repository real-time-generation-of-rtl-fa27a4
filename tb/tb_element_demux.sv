// Testbench for element_demux.
//
// Applies all 8 codes with en high and low and compares the one-hot select
// and the error flag with the element-to-memory table: 001 (+1) -> Memory1,
// 101 (+2) -> Memory2, 011 (-1) -> Memory3, 111 (-2) -> Memory4,
// 000 (0) -> Memory5, anything else -> Memory5 with code_err.
module tb_element_demux;
  import quin_pkg::*;

  logic en;
  logic [2:0] code;
  mem_sel_t sel;
  logic code_err;
  int checks = 0;
  int failures = 0;

  element_demux dut (.en(en), .code(code), .sel(sel), .code_err(code_err));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Expected memory number (1..5) for each code, 0 = invalid code.
  localparam int MEMNO [8] = '{5, 1, 0, 3, 0, 2, 0, 4};

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < 8; c++) begin
        int exp_sel;
        en = 1'(e); code = 3'(c);
        #1;
        if (e == 0)             exp_sel = 0;
        else if (MEMNO[c] == 0) exp_sel = 5'b10000;
        else                    exp_sel = 1 << (MEMNO[c] - 1);
        check($sformatf("sel en=%0d code=%03b", e, c), int'(sel), exp_sel);
        check($sformatf("err en=%0d code=%03b", e, c), int'(code_err), int'(e == 1 && MEMNO[c] == 0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
