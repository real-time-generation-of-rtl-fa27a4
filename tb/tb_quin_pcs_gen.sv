// End-to-end testbench for quin_pcs_gen at its default size (8 samples of
// 8 bits per element).
//
// A source feeds the generator a stream of element codes, presenting the
// next one until the generator acknowledges it. The stream holds, for each
// of the element pairs +1/+2, +1/-2, -1/+2, -1/-2, +2/0 and +2/-2, a
// pattern of eight elements mixing the two,
// then a run of pseudo-random elements and the three unused codes. Twice the
// run input is dropped: once for a whole number of element periods and once
// in the middle of an element, which cuts that element short.
//
// A cycle model written independently of the RTL (its own phase counter and
// hand-written sample tables: round(A*63*sin(2*pi*k/8))) predicts dac_data,
// dac_valid, elem_ack and code_err every clock, which also checks the
// one-clock latency from elem_ack to the first sample and that one element
// lasts exactly 8 clocks (carrier at f_clk/8). Each mechanism (all five
// elements, each figure pair, unused code, stop between elements, stop
// within an element, restart) is counted, and one that never happened
// counts as a failure.
module tb_quin_pcs_gen;
  logic clk = 1'b0;
  logic rst_n;
  logic run;
  logic [2:0] elem_code;
  logic elem_ack, code_err, dac_valid;
  logic signed [7:0] dac_data;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  quin_pcs_gen dut (
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

  // Sample tables.
  localparam int UNIT1 [8] = '{0, 45, 63, 45, 0, -45, -63, -45};
  localparam int UNIT2 [8] = '{0, 89, 126, 89, 0, -89, -126, -89};

  localparam logic [2:0] P1 = 3'b001, M1 = 3'b011, P2 = 3'b101, M2 = 3'b111, Z = 3'b000;

  function automatic int expected_sample(logic [2:0] c, int k);
    case (c)
      P1:      return UNIT1[k];
      M1:      return -UNIT1[k];
      P2:      return UNIT2[k];
      M2:      return -UNIT2[k];
      default: return 0;
    endcase
  endfunction

  function automatic bit valid_code(logic [2:0] c);
    return c inside {P1, M1, P2, M2, Z};
  endfunction

  // Element stream.
  logic [2:0] stream [$];
  int idx;
  int cyc;

  // Model state.
  int ph;
  logic [2:0] cur;
  bit run_d;
  logic [2:0] code_d;
  bit took;
  int last_ack_cyc;
  bit run_gap;

  // Mechanism counters.
  int n_elem [8];
  int n_pair [6];
  int n_bad, n_stop_between, n_stop_within, n_restart, n_rate;
  logic [2:0] prev_taken;
  bit have_prev;

  localparam logic [2:0] PAIR_A [6] = '{P1, P1, M1, M1, P2, P2};
  localparam logic [2:0] PAIR_B [6] = '{P2, M2, P2, M2, Z,  M2};

  // Stop windows: one starting at the first element boundary after cycle
  // 200 and lasting two element periods, one from cycle 403 (mid-element).
  int stop_until = -1;
  bit first_stop_done = 0;
  function automatic bit in_stop_window(int c, int phase);
    if (!first_stop_done && c >= 200 && phase == 0) begin
      first_stop_done = 1;
      stop_until = c + 16;
    end
    return (c < stop_until) || (c >= 403 && c < 409);
  endfunction

  localparam logic [2:0] PICK [5] = '{P1, M1, P2, M2, Z};

  initial begin
    // Build the stream.
    for (int p = 0; p < 6; p++) begin
      stream.push_back(PAIR_A[p]); stream.push_back(PAIR_B[p]);
      stream.push_back(PAIR_A[p]); stream.push_back(PAIR_A[p]);
      stream.push_back(PAIR_B[p]); stream.push_back(PAIR_B[p]);
      stream.push_back(PAIR_A[p]); stream.push_back(PAIR_B[p]);
    end
    stream.push_back(3'b010);
    for (int i = 0; i < 30; i++) begin
      stream.push_back(PICK[$urandom_range(4)]);
    end
    stream.push_back(3'b100);
    stream.push_back(P2);
    stream.push_back(3'b110);
    stream.push_back(M1);

    rst_n = 1'b0; run = 1'b0; elem_code = Z;
    idx = 0; cyc = 0; ph = 0; cur = Z; run_d = 0; code_d = Z; took = 0;
    last_ack_cyc = -1; have_prev = 0; run_gap = 0;
    n_bad = 0; n_stop_between = 0; n_stop_within = 0; n_restart = 0; n_rate = 0;
    foreach (n_elem[i]) n_elem[i] = 0;
    foreach (n_pair[i]) n_pair[i] = 0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("idle valid", int'(dac_valid), 0);
    check("idle data", int'(dac_data), 0);

    forever begin
      @(negedge clk);
      cyc++;
      // Model the edge that just happened.
      if (!run_d) begin
        check("dac_valid", int'(dac_valid), 0);
        check("dac_data idle", int'(dac_data), 0);
        ph = 0;
      end else begin
        if (ph == 0) cur = code_d;
        check("dac_valid", int'(dac_valid), 1);
        check($sformatf("dac_data code %03b sample %0d", cur, ph), int'(dac_data),
              expected_sample(cur, ph));
        ph = (ph + 1) % 8;
      end
      if (took) idx++;

      if (idx >= stream.size() && ph == 0) break;

      // Drive the next inputs.
      if (in_stop_window(cyc, ph)) begin
        if (run_d) begin
          if (ph == 0) n_stop_between++;
          else n_stop_within++;
        end
        run = 1'b0;
        run_gap = 1;
      end else begin
        run = 1'b1;
      end
      elem_code = (idx < stream.size()) ? stream[idx] : Z;
      #1;
      check("elem_ack", int'(elem_ack), int'(run && ph == 0));
      check("code_err", int'(code_err), int'(run && ph == 0 && !valid_code(elem_code)));
      took = elem_ack;
      if (elem_ack) begin
        if (run_gap) n_restart++;
        else if (last_ack_cyc >= 0) begin
          check("element period", cyc - last_ack_cyc, 8);
          n_rate++;
        end
        run_gap = 0;
        last_ack_cyc = cyc;
        n_elem[elem_code]++;
        if (!valid_code(elem_code)) n_bad++;
        if (have_prev)
          for (int p = 0; p < 6; p++)
            if ((prev_taken == PAIR_A[p] && elem_code == PAIR_B[p]) ||
                (prev_taken == PAIR_B[p] && elem_code == PAIR_A[p])) n_pair[p]++;
        prev_taken = elem_code;
        have_prev = 1;
      end
      run_d = run;
      code_d = elem_code;
    end

    // Stop and check the output returns to idle.
    run = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check("final valid", int'(dac_valid), 0);
    check("final data", int'(dac_data), 0);

    // Every mechanism must have happened.
    check("elements +1 used", int'(n_elem[P1] > 0), 1);
    check("elements -1 used", int'(n_elem[M1] > 0), 1);
    check("elements +2 used", int'(n_elem[P2] > 0), 1);
    check("elements -2 used", int'(n_elem[M2] > 0), 1);
    check("elements 0 used", int'(n_elem[Z] > 0), 1);
    for (int p = 0; p < 6; p++) check($sformatf("pair %0d transitions", p), int'(n_pair[p] > 0), 1);
    check("unused codes", int'(n_bad > 0), 1);
    check("stop between elements", int'(n_stop_between > 0), 1);
    check("stop within an element", int'(n_stop_within > 0), 1);
    check("restarts", int'(n_restart > 0), 1);
    check("back-to-back elements", int'(n_rate > 0), 1);
    check("elements sent", idx, stream.size());
    $display("elements %0d (+1 %0d, -1 %0d, +2 %0d, -2 %0d, 0 %0d), unused codes %0d",
             idx, n_elem[P1], n_elem[M1], n_elem[P2], n_elem[M2], n_elem[Z], n_bad);
    $display("stops between %0d, within %0d, restarts %0d, back-to-back %0d",
             n_stop_between, n_stop_within, n_restart, n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
