// Testbench for quin_pcs_gen with 256-location sample memories, the larger
// memory size the architecture allows for a finer waveform.
//
// Sends each of the five elements once, in the order +1, -2, 0, +2, -1, and
// checks that every element lasts exactly 256 clocks (carrier at f_clk/256),
// that each sample is within one code of A * 63 * sin(2*pi*k/256), that
// element changes are seamless and that the output is 0 and invalid outside
// a run.
module tb_quin_pcs_gen_256;
  localparam int DEPTH = 256;

  logic clk = 1'b0;
  logic rst_n;
  logic run;
  logic [2:0] elem_code;
  logic elem_ack, code_err, dac_valid;
  logic signed [7:0] dac_data;
  int checks = 0;
  int failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  quin_pcs_gen #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .elem_code(elem_code),
    .elem_ack(elem_ack), .code_err(code_err),
    .dac_data(dac_data), .dac_valid(dac_valid)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %0d expected %0d", what, cyc, got, exp);
    end
  endtask

  localparam logic [2:0] SEQ [5] = '{3'b001, 3'b111, 3'b000, 3'b101, 3'b011};
  localparam int AMP [5] = '{1, -2, 0, 2, -1};
  localparam real PI = 3.14159265358979323846;

  int ack_cyc [5];

  initial begin
    rst_n = 1'b0; run = 1'b0; elem_code = 3'b000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int e = 0; e < 5; e++) begin
      run = 1'b1;
      elem_code = SEQ[e];
      #1;
      check($sformatf("elem_ack element %0d", e), int'(elem_ack), 1);
      check("code_err", int'(code_err), 0);
      ack_cyc[e] = cyc;
      for (int k = 0; k < DEPTH; k++) begin
        real ideal;
        int diff;
        @(negedge clk);
        cyc++;
        // The next element goes on the bus during this one.
        elem_code = 3'b010;
        ideal = real'(AMP[e]) * 63.0 * $sin(2.0 * PI * real'(k) / real'(DEPTH));
        diff = int'(dac_data) - int'($floor(ideal + 0.5));
        check("dac_valid", int'(dac_valid), 1);
        check($sformatf("sample %0d of element %0d within 1 code", k, e), int'(diff >= -1 && diff <= 1), 1);
        if (k < DEPTH - 1) begin
          #1;
          check("no elem_ack inside an element", int'(elem_ack), 0);
        end
      end
      if (e > 0) check("element period", ack_cyc[e] - ack_cyc[e-1], DEPTH);
    end
    run = 1'b0;
    @(negedge clk);
    check("stopped valid", int'(dac_valid), 0);
    check("stopped data", int'(dac_data), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
