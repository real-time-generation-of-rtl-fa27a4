// Testbench for sample_addr_counter.
//
// Runs the counter at the default depth of 8. Checks the address sequence
// 0..7 with wrap-around, that sym_start and sym_last mark the first and last
// clock of each 8-clock element period, that an element period is exactly 8
// clocks, that dropping run returns the address to 0 and that reset does too.
module tb_sample_addr_counter;
  localparam int DEPTH = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic run;
  logic [2:0] addr;
  logic sym_start, sym_last;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  sample_addr_counter #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .addr(addr),
    .sym_start(sym_start), .sym_last(sym_last)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int exp_addr;
  int last_start;
  int cyc;

  initial begin
    rst_n = 1'b0; run = 1'b0; exp_addr = 0; last_start = -1; cyc = 0;
    repeat (2) @(negedge clk);
    check("reset addr", int'(addr), 0);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle addr", int'(addr), 0);
    check("idle sym_start", int'(sym_start), 0);
    run = 1'b1;
    #1;
    // 5 full periods plus 3 clocks.
    for (int n = 0; n < 5 * DEPTH + 3; n++) begin
      check("addr", int'(addr), exp_addr);
      check("sym_start", int'(sym_start), int'(exp_addr == 0));
      check("sym_last", int'(sym_last), int'(exp_addr == DEPTH - 1));
      if (sym_start) begin
        if (last_start >= 0) check("period length", cyc - last_start, DEPTH);
        last_start = cyc;
      end
      @(negedge clk); #1;
      cyc++;
      exp_addr = (exp_addr + 1) % DEPTH;
    end
    // Drop run mid-period: address returns to 0 and stays.
    run = 1'b0;
    @(negedge clk); #1;
    check("stop addr", int'(addr), 0);
    check("stop sym_start", int'(sym_start), 0);
    @(negedge clk); #1;
    check("stopped addr", int'(addr), 0);
    run = 1'b1; #1;
    check("restart sym_start", int'(sym_start), 1);
    repeat (3) @(negedge clk);
    #1;
    check("restart addr", int'(addr), 3);
    // Asynchronous reset mid-period.
    rst_n = 1'b0; #1;
    check("async reset addr", int'(addr), 0);
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
