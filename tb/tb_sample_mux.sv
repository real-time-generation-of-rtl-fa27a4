// Testbench for sample_mux.
//
// Drives five random samples and checks that each one-hot select passes
// exactly the selected sample and that an all-zero select gives 0.
module tb_sample_mux;
  localparam int WIDTH = 8;
  localparam int N = 5;

  logic [N-1:0] sel;
  logic signed [WIDTH-1:0] in [N];
  logic signed [WIDTH-1:0] out;
  int checks = 0;
  int failures = 0;

  sample_mux #(.WIDTH(WIDTH), .N(N)) dut (.sel(sel), .in(in), .out(out));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < N; i++) in[i] = WIDTH'($urandom);
      sel = '0; #1;
      check("no select", int'(out), 0);
      for (int i = 0; i < N; i++) begin
        sel = N'(1) << i; #1;
        check($sformatf("select %0d", i), int'(out), int'(in[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
