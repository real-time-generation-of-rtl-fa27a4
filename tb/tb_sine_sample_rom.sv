// Testbench for sine_sample_rom.
//
// Builds the five sample memories of the generator at the default 8 x 8-bit
// size (amplitudes +1, +2, -1, -2, 0) and one 256-location memory of
// amplitude +1, the larger size the architecture allows. Every location of
// the 8-deep memories is read and compared with a table written out by hand
// from round(A * 63 * sin(2*pi*k/8)); the 256-deep memory is checked at its
// zero crossings, peaks, 45-degree points and for odd symmetry. It also
// checks the one-clock read latency and that the output holds while rd_en
// is low.
module tb_sine_sample_rom;
  localparam int DEPTH = 8;
  localparam int WIDTH = 8;

  logic clk = 1'b0;
  logic rd_en;
  logic [2:0] addr;
  logic [7:0] addr256;
  logic rd_en256;
  logic signed [WIDTH-1:0] d [5];
  logic signed [WIDTH-1:0] d256;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  // Expected samples, by amplitude index: +1, +2, -1, -2, 0.
  localparam int EXP [5][DEPTH] = '{
    '{0,   45,   63,   45, 0,  -45,  -63,  -45},
    '{0,   89,  126,   89, 0,  -89, -126,  -89},
    '{0,  -45,  -63,  -45, 0,   45,   63,   45},
    '{0,  -89, -126,  -89, 0,   89,  126,   89},
    '{0,    0,    0,    0, 0,    0,    0,    0}
  };
  localparam int AMP [5] = '{1, 2, -1, -2, 0};

  for (genvar m = 0; m < 5; m++) begin : g_rom
    sine_sample_rom #(.DEPTH(DEPTH), .WIDTH(WIDTH), .AMPLITUDE(AMP[m])) u_rom (
      .clk(clk), .rd_en(rd_en), .addr(addr), .data(d[m])
    );
  end

  sine_sample_rom #(.DEPTH(256), .WIDTH(WIDTH), .AMPLITUDE(1)) u_rom256 (
    .clk(clk), .rd_en(rd_en256), .addr(addr256), .data(d256)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int read256_ref(int k);
    // Reference points of 63*sin(2*pi*k/256).
    case (k)
      0, 128: return 0;
      32:     return 45;
      64:     return 63;
      96:     return 45;
      160:    return -45;
      192:    return -63;
      224:    return -45;
      default: return 999;
    endcase
  endfunction

  int s256 [256];

  initial begin
    rd_en = 1'b0; addr = '0; rd_en256 = 1'b0; addr256 = '0;
    @(negedge clk);
    // Read every location of the five 8-deep memories.
    for (int k = 0; k < DEPTH; k++) begin
      rd_en = 1'b1; addr = 3'(k);
      @(posedge clk); #1;
      for (int m = 0; m < 5; m++) check($sformatf("mem %0d loc %0d", m, k), int'(d[m]), EXP[m][k]);
      @(negedge clk);
    end
    // Output holds while rd_en is low.
    rd_en = 1'b1; addr = 3'd2;
    @(posedge clk); #1;
    rd_en = 1'b0; addr = 3'd6;
    @(posedge clk); #1;
    for (int m = 0; m < 5; m++) check($sformatf("mem %0d hold", m), int'(d[m]), EXP[m][2]);
    rd_en = 1'b1;
    @(posedge clk); #1;
    for (int m = 0; m < 5; m++) check($sformatf("mem %0d after hold", m), int'(d[m]), EXP[m][6]);
    // 256-deep memory.
    rd_en = 1'b0;
    rd_en256 = 1'b1;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk); addr256 = 8'(k);
      @(posedge clk); #1;
      s256[k] = int'(d256);
    end
    for (int k = 0; k < 256; k += 32) check($sformatf("mem256 loc %0d", k), s256[k], read256_ref(k));
    for (int k = 1; k < 128; k++) check($sformatf("mem256 symmetry %0d", k), s256[k], -s256[k+128]);
    for (int k = 1; k < 64; k++) check($sformatf("mem256 quarter %0d", k), s256[k], s256[128-k]);
    for (int k = 1; k < 64; k++) check($sformatf("mem256 rising %0d", k), int'(s256[k] >= s256[k-1]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
